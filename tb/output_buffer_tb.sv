// output_buffer_tb: random writes and reads with phases that fill the
// buffer completely and drain it; checks order, the full/empty handshake and
// the word count against a queue model.
module output_buffer_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_pkg::*;

  localparam int DEPTH = 512;
  logic clk = 1'b0, rst = 1'b1;
  logic wr_valid = 1'b0, rd_pop = 1'b0;
  hit_t wr_hit = '0, rd_hit;
  logic wr_ready, rd_valid;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0;

  output_buffer dut (.*);

  always #8 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hit_t q[$];
    int n_full, pw, pr;
    n_full = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int c = 0; c < 12000; c++) begin
      @(negedge clk);
      check(count == q.size(), "count");
      check(wr_ready == (q.size() < DEPTH), "ready");
      check(rd_valid == (q.size() > 0), "valid");
      if (q.size() > 0) check(rd_hit == q[0], "order");
      if (!wr_ready) n_full++;
      pw = ((c / 2000) % 2 == 0) ? 90 : 20;
      pr = ((c / 2000) % 2 == 0) ? 20 : 90;
      wr_valid = ($urandom_range(0, 99) < pw);
      wr_hit   = hit_t'($urandom);
      rd_pop   = ($urandom_range(0, 99) < pr);
      if (rd_pop && q.size() > 0) void'(q.pop_front());
      if (wr_valid && wr_ready) q.push_back(wr_hit);
    end
    check(n_full > 100, "buffer filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
