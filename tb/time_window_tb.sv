// time_window_tb: random hit times, trigger times and window bounds,
// including windows that wrap around the 11-bit counter; checks which hits
// pass, that rejected hits never stall the input, and the rejection count.
module time_window_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [TC_W-1:0] trig_tc = '0, tw_lo = '0, tw_hi = '0;
  logic in_valid = 1'b0, out_ready = 1'b0;
  hit_t in_hit = '0, out_hit;
  logic in_ready, out_valid;
  logic [15:0] n_outside;
  int checks = 0, failures = 0;

  time_window dut (.*);

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
    int n_out, n_pass, age;
    bit pass;
    n_out = 0; n_pass = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (i % 100 == 0) begin
        trig_tc = TC_W'($urandom);
        tw_lo   = TC_W'($urandom_range(0, 300));
        tw_hi   = tw_lo + TC_W'($urandom_range(0, 400));
      end
      in_valid  = 1'b1;
      in_hit    = hit_t'($urandom);
      age       = $urandom_range(0, 900);       // trigger time minus hit time
      in_hit.tc = trig_tc - TC_W'(age);
      out_ready = 1'($urandom);
      #1;
      pass = (age >= tw_lo) && (age <= tw_hi);
      check(out_valid == pass, $sformatf("age %0d window %0d..%0d", age, tw_lo, tw_hi));
      check(out_hit == in_hit, "hit passed unchanged");
      check(in_ready == (pass ? out_ready : 1'b1), "ready");
      if (!pass) n_out++; else n_pass++;
    end
    @(negedge clk);
    check(n_outside == 16'(n_out), "rejection count");
    check(n_out > 500 && n_pass > 500, "both outcomes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
