// pipe4_tb: random bursts of hits written at 250 MHz and removed at
// 62.5 MHz; checks order, the four-hit limit with the drop flag, and the
// scaler latch and shift behaviour, against a queue model.
module pipe4_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_pkg::*;

  logic clk250, clk62, rst = 1'b1;
  logic wr = 1'b0, rd_pop = 1'b0, dropped, rd_valid;
  hit_t wr_hit = '0, rd_hit;
  logic [SC_W-1:0] sc_cnt = '0, sch_in = '0, sch_out;
  logic sc_latch = 1'b0, sc_shift = 1'b0;
  int checks = 0, failures = 0;

  tb_clkgen u_clk (.clk250, .clk62);
  pipe4 dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hit_t q[$];
    bit   e_drop, prev62;
    int   n, n_full, burst;
    logic [SC_W-1:0] e_sch;
    e_drop = 0; n_full = 0; n = 0; e_sch = '0;
    repeat (3) @(posedge clk62);
    rst <= 1'b0;
    @(negedge clk250);
    prev62 = clk62;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk250);
      n = (clk62 && !prev62) ? 0 : n + 1;
      prev62 = clk62;
      // outputs
      check(rd_valid == (q.size() > 0), "rd_valid");
      if (q.size() > 0) check(rd_hit == q[0], "rd_hit order");
      check(dropped == e_drop, "dropped flag");
      check(sch_out == e_sch, "scaler register");
      // inputs for the coming edge
      burst  = (c / 500) % 2;               // alternate heavy and light load
      wr     = ($urandom_range(0, 99) < (burst ? 60 : 10));
      wr_hit = hit_t'($urandom);
      if (n == 3) begin
        rd_pop   = ($urandom_range(0, 99) < 70);
        sc_cnt   = SC_W'($urandom);
        sch_in   = SC_W'($urandom);
        sc_latch = ($urandom_range(0, 3) == 0);
        sc_shift = 1'($urandom);
      end
      // reference, evaluated on the values before the edge
      begin
        bit full, pop;
        full = (q.size() == 4);
        pop  = (n == 3) && rd_pop && (q.size() > 0);
        if (pop) void'(q.pop_front());
        if (wr) begin
          if (full) begin e_drop = 1; n_full++; end
          else q.push_back(wr_hit);
        end
        if (n == 3) e_sch = sc_latch ? sc_cnt : (sc_shift ? sch_in : e_sch);
      end
    end
    check(n_full > 10, "buffer filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
