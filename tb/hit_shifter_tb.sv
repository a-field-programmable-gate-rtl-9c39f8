// hit_shifter_tb: one shifter stage with random traffic on both inputs and a
// random sink. Checks that every word arrives exactly once and in order, that
// the chain input has priority over the local input, and that a word on offer
// is held while the sink is not ready.
module hit_shifter_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic up_valid = 1'b0, loc_valid = 1'b0, out_ready = 1'b0;
  hit_t up_hit = '0, loc_hit = '0, out_hit;
  logic up_ready, loc_ready, out_valid;
  int checks = 0, failures = 0;

  hit_shifter dut (.*);

  always #8 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hit_t exp_q[$];
    int   seq_up, seq_loc, n_out, n_stall;
    bit   tk_up, tk_loc;
    seq_up = 0; seq_loc = 0; n_out = 0; n_stall = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      // offer new words only when the previous ones were taken
      if (!up_valid) begin
        up_valid = ($urandom_range(0, 9) < 4);
        up_hit   = '{ch: 6'd1, pol: 1'b0, tc: TC_W'(seq_up), fine: '0};
      end
      if (!loc_valid) begin
        loc_valid = ($urandom_range(0, 9) < 4);
        loc_hit   = '{ch: 6'd2, pol: 1'b1, tc: TC_W'(seq_loc), fine: '0};
      end
      out_ready = ($urandom_range(0, 9) < 6);
      #1;
      // priority: the local source is held off while the chain offers a word
      if (up_valid) check(!loc_ready, "chain priority");
      check(up_ready == (!out_valid || out_ready), "ready rule");
      if (out_valid && out_ready) begin
        check(exp_q.size() > 0 && out_hit == exp_q[0], $sformatf("output order got %h exp %h size %0d", out_hit, exp_q.size() ? exp_q[0] : 0, exp_q.size()));
        if (exp_q.size() > 0) void'(exp_q.pop_front());
        n_out++;
      end
      if (out_valid && !out_ready) n_stall++;
      tk_up  = up_valid && up_ready;
      tk_loc = loc_valid && loc_ready;
      if (tk_up) begin
        exp_q.push_back(up_hit);
        seq_up++;
      end else if (tk_loc) begin
        exp_q.push_back(loc_hit);
        seq_loc++;
      end
      @(posedge clk);
      #1;
      if (tk_up) up_valid = 1'b0;
      else if (tk_loc) loc_valid = 1'b0;
    end
    check(exp_q.size() <= 1, "nothing lost");
    check(n_out > 1000 && n_stall > 100 && seq_loc > 300, "traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
