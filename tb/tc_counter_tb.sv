// tc_counter_tb: checks that the 11-bit time seen at 250 MHz steps by one
// every 4 ns and wraps at 2048, that TC[10:2] steps once per 16 ns, that
// ph_last marks exactly the 250 MHz cycle ending on a 62.5 MHz edge, that the
// 4 ns pulser fires once every 32 ns, and that the low bits agree with
// TC[10:2] there.
module tc_counter_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_pkg::*;

  logic clk250, clk62, rst = 1'b1;
  logic [TCHI_W-1:0] tc_hi;
  logic [TC_W-1:0]   tc250;
  logic [1:0]        tc_lo;
  logic              ph_last, sclr;
  int checks = 0, failures = 0;

  tb_clkgen u_clk (.clk250, .clk62);
  tc_counter dut (.clk62, .clk250, .rst, .tc_hi, .tc250, .tc_lo, .ph_last, .sclr);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [TC_W-1:0]   prev_tc;
    logic [TCHI_W-1:0] prev_hi;
    logic              prev62;
    int                n, since_sclr, sclr_seen;
    repeat (3) @(posedge clk62);
    rst <= 1'b0;
    @(negedge clk250);
    prev_tc = tc250;
    prev_hi = tc_hi;
    prev62  = clk62;
    n = 0; since_sclr = -1; sclr_seen = 0;
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk250);
      // n counts 250 MHz cycles since the last common rising edge
      n = (clk62 && !prev62) ? 0 : n + 1;
      prev62 = clk62;
      check(tc250 == TC_W'(prev_tc + 1), $sformatf("tc250 %0d after %0d", tc250, prev_tc));
      check(ph_last == (n == 3), $sformatf("ph_last %b at n=%0d", ph_last, n));
      if (n == 0) begin
        check(tc_hi == TCHI_W'(prev_hi + 1), "tc_hi step");
        prev_hi = tc_hi;
      end else begin
        check(tc_hi == prev_hi, "tc_hi stable");
      end
      if (ph_last) check(tc250[TC_W-1:2] == tc_hi, "high bits aligned");
      if (sclr) begin
        if (since_sclr >= 0) check(since_sclr == 8, $sformatf("sclr period %0d", since_sclr));
        since_sclr = 0;
        sclr_seen++;
      end
      if (since_sclr >= 0) since_sclr++;
      prev_tc = tc250;
    end
    check(sclr_seen > 100, "pulser fired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
