// mhe_counting_tb: drives random edge streams through the multi-hit
// elimination stage with elimination off, non-updating and updating, and
// compares the accepted hits with a reference that applies the window rule
// to hit times. Also checks the 16 ns-resolution hit counter and its restart.
module mhe_counting_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_pkg::*;

  logic clk250 = 1'b0, rst = 1'b1;
  logic hit_in = 1'b0, pol_in = 1'b0;
  logic [FINE_W-1:0] fine_in = '0;
  logic [TC_W-1:0] tc250 = '0;
  logic ph_last = 1'b0, sc_clear = 1'b0;
  logic mhe_en = 1'b0, mhe_update = 1'b0;
  logic [MHE_W-1:0] mhe_win = '0;
  logic acc;
  hit_t acc_hit;
  logic [SC_W-1:0] sc_cnt;
  int checks = 0, failures = 0;
  int n_suppressed = 0, n_restart = 0;

  mhe_counting #(.CH(6'd37)) dut (.*);

  always #2 clk250 = ~clk250;

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
    longint cyc, last_ref;
    bit     have_ref, e_acc, prev_e_acc;
    hit_t   e_hit, prev_e_hit;
    int     w, windows_hit, period_any, e_cnt;
    repeat (2) @(posedge clk250);
    rst <= 1'b0;
    @(posedge clk250);
    for (int mode = 0; mode < 3; mode++) begin
      mhe_en     = (mode != 0);
      mhe_update = (mode == 2);
      mhe_win    = MHE_W'(mode == 0 ? 0 : (mode == 1 ? 5 : 2));
      w          = mhe_win + 4;      // window in 4 ns cycles
      have_ref   = 0;
      prev_e_acc = 0;
      e_cnt      = 0;
      period_any = 0;
      hit_in = 1'b0;
      // wait out any window left from the previous mode
      repeat (80) @(negedge clk250);
      // restart the counter on a period boundary
      sc_clear = 1'b1;
      for (cyc = 0; cyc < 4000; cyc++) begin
        @(negedge clk250);
        // outputs registered at the last edge belong to the previous cycle
        check(acc == prev_e_acc, $sformatf("mode %0d cyc %0d acc %b exp %b", mode, cyc, acc, prev_e_acc));
        if (prev_e_acc) check(acc_hit == prev_e_hit, "hit word");
        // drive this cycle
        ph_last  = (cyc % 4 == 3);
        if (cyc == 4) sc_clear = 1'b0;
        hit_in   = ($urandom_range(0, 9) < 2);
        fine_in  = FINE_W'($urandom_range(0, 8));
        pol_in   = 1'($urandom);
        tc250    = TC_W'(cyc);
        e_acc    = 0;
        if (hit_in) begin
          if (!mhe_en || !have_ref || (cyc - last_ref) >= w) begin
            e_acc = 1; last_ref = cyc; have_ref = 1;
          end else begin
            n_suppressed++;
            if (mhe_update) begin last_ref = cyc; n_restart++; end
          end
        end
        e_hit = '{ch: 6'd37, pol: pol_in, tc: tc250, fine: fine_in};
        prev_e_acc = e_acc;
        prev_e_hit = e_hit;
        // counter reference: periods of four cycles containing an edge
        if (hit_in) period_any = 1;
        if (ph_last) begin
          if (cyc == 3) e_cnt = period_any;
          else e_cnt = (e_cnt + period_any) % 256;
          period_any = 0;
        end
        if (cyc % 4 == 1 && cyc > 4) check(sc_cnt == SC_W'(e_cnt), $sformatf("sc_cnt %0d exp %0d", sc_cnt, e_cnt));
      end
    end
    check(n_suppressed > 100, "elimination exercised");
    check(n_restart > 50, "updating mode exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
