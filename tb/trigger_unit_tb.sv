// trigger_unit_tb: raises the trigger input at random 250 MHz cycles, with
// the copy-in-progress input high or low, and checks that an idle unit gives
// exactly one start pulse carrying the 4 ns time of the edge, and that a busy
// unit gives none and counts a rejection.
module trigger_unit_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_pkg::*;

  logic clk250, clk62, rst = 1'b1;
  logic trig_in = 1'b0, busy = 1'b0;
  logic [TCHI_W-1:0] tc_hi;
  logic [TC_W-1:0] tc250, trig_tc;
  logic ph_last, start;
  logic [15:0] n_accepted, n_rejected;
  int checks = 0, failures = 0;
  int n_start = 0;
  logic [TC_W-1:0] start_tc;

  tb_clkgen u_clk (.clk250, .clk62);
  tc_counter u_tc (.clk62, .clk250, .rst, .tc_hi, .tc250, .tc_lo(), .ph_last, .sclr());
  trigger_unit dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  always @(posedge clk62) begin
    if (start) n_start++;
  end
  always @(negedge clk62) begin
    if (start) start_tc = trig_tc;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [TC_W-1:0] exp_tc;
    int s0, acc0, rej0, n_rej_tb;
    n_rej_tb = 0;
    repeat (3) @(posedge clk62);
    rst <= 1'b0;
    repeat (10) @(posedge clk62);
    for (int t = 0; t < 300; t++) begin
      repeat ($urandom_range(1, 40)) @(negedge clk250);
      busy = ($urandom_range(0, 3) == 0);
      s0 = n_start; acc0 = n_accepted; rej0 = n_rejected;
      trig_in = 1'b1;
      @(posedge clk250);
      #0.5;
      exp_tc = tc250;
      repeat ($urandom_range(2, 6)) @(negedge clk250);
      trig_in = 1'b0;
      repeat (12) @(negedge clk250);
      if (busy) begin
        n_rej_tb++;
        check(n_start == s0, "no start while busy");
        check(n_rejected == 16'(rej0 + 1) && n_accepted == 16'(acc0), "rejection counted");
      end else begin
        check(n_start == s0 + 1, $sformatf("one start, got %0d", n_start - s0));
        check(start_tc == exp_tc, $sformatf("trigger time %0d exp %0d", start_tc, exp_tc));
        check(n_accepted == 16'(acc0 + 1), "accept counted");
      end
      busy = 1'b0;
    end
    check(n_rej_tb > 20, "busy cases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
