// ch4_reg_tb: four channels driven with edges at random picosecond times.
// Checks that every edge comes out once, in order per channel, with its
// channel number and polarity, and that coarse and fine time reconstruct the
// edge time (t = 4 ns * coarse - 0.45 ns * fine + constant) to within one
// tap. Then checks multi-hit elimination in both modes and the hit counts
// delivered by the scaler chain.
module ch4_reg_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_pkg::*;

  logic clk250, clk62, rst = 1'b1;
  logic [3:0] hit_in = '0;
  logic [TCHI_W-1:0] tc_hi;
  logic [TC_W-1:0] tc250;
  logic ph_last;
  logic mhe_en = 1'b0, mhe_update = 1'b0;
  logic [MHE_W-1:0] mhe_win = '0;
  logic sc_latch = 1'b0, sc_shift = 1'b0;
  logic [SC_W-1:0] sch_out;
  logic out_valid;
  hit_t out_hit;
  logic [3:0] dropped;
  int checks = 0, failures = 0;

  tb_clkgen u_clk (.clk250, .clk62);
  tc_counter u_tc (.clk62, .clk250, .rst, .tc_hi, .tc250, .tc_lo(), .ph_last, .sclr());
  ch4_reg #(.CH_BASE(6'd20)) dut (
    .clk250, .clk62, .rst, .hit_in, .tc250, .ph_last, .mhe_en, .mhe_update, .mhe_win,
    .sc_latch, .sc_shift, .sch_in(8'd0), .sch_out, .out_valid, .out_hit, .dropped
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  // edges sent, per channel: true time and polarity
  real  t_sent [4][$];
  bit   p_sent [4][$];
  hit_t got    [4][$];

  always @(negedge clk62) begin
    if (!rst && out_valid) got[out_hit.ch - 20].push_back(out_hit);
  end

  // wait a number of picoseconds without a variable delay
  task automatic wait_ps(input int ps);
    repeat (ps / 1000) #1;
    repeat (ps % 1000) #1ps;
  endtask

  task automatic send(input int ch, input int gap_ps);
    wait_ps(gap_ps);
    hit_in[ch] = ~hit_in[ch];
    t_sent[ch].push_back($realtime);
    p_sent[ch].push_back(hit_in[ch]);
  endtask

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real  offs;
  bit   have_offs = 0;

  task automatic compare_all(input int first [4]);
    for (int ch = 0; ch < 4; ch++) begin
      check(got[ch].size() == t_sent[ch].size() - first[ch] || first[ch] < 0,
            $sformatf("ch %0d: %0d words for %0d edges", ch, got[ch].size(), t_sent[ch].size()));
    end
  endtask

  initial begin
    int n_edges [4];
    int n_match;
    real d, trec;
    hit_t h;
    repeat (3) @(posedge clk62);
    rst <= 1'b0;
    // clear the counters: one latch period
    repeat (300) @(posedge clk62);
    @(negedge clk62);
    sc_latch = 1'b1;
    @(negedge clk62);
    sc_latch = 1'b0;
    // phase 1: random edges, at least 40 ns apart on a channel
    fork
      for (int ch = 0; ch < 4; ch++) begin
        automatic int c = ch;
        fork
          for (int e = 0; e < 40; e++) send(c, $urandom_range(40000, 160000));
        join_none
      end
    join_none
    #7000;
    check(dropped == 4'b0000, "no hit dropped");
    n_match = 0;
    for (int ch = 0; ch < 4; ch++) begin
      check(got[ch].size() == t_sent[ch].size(),
            $sformatf("ch %0d: %0d words for %0d edges", ch, got[ch].size(), t_sent[ch].size()));
      for (int e = 0; e < got[ch].size() && e < t_sent[ch].size(); e++) begin
        h = got[ch][e];
        check(h.pol == p_sent[ch][e], "polarity");
        check(h.fine <= 8, "fine code range");
        trec = 4.0 * h.tc - 0.45 * h.fine;
        d = trec - t_sent[ch][e];
        // fold into one 8192 ns turn of the coarse counter
        while (d < 0) d += 8192.0;
        while (d >= 8192.0) d -= 8192.0;
        if (!have_offs) begin offs = d; have_offs = 1; end
        check((d - offs) < 0.46 && (d - offs) > -0.46,
              $sformatf("ch %0d edge %0d: time error %0.3f ns", ch, e, d - offs));
        n_match++;
      end
    end
    check(n_match == 160, "all edges compared");
    // scaler: latch, then shift out channels 0..3
    @(negedge clk62);
    sc_latch = 1'b1;
    @(negedge clk62);
    sc_latch = 1'b0;
    for (int ch = 0; ch < 4; ch++) begin
      check(sch_out == SC_W'(t_sent[ch].size()),
            $sformatf("scaler ch %0d: %0d exp %0d", ch, sch_out, t_sent[ch].size()));
      sc_shift = 1'b1;
      @(negedge clk62);
      sc_shift = 1'b0;
    end
    // phase 2: elimination, window 16 + 4 * 2 = 24 ns
    for (int ch = 0; ch < 4; ch++) begin got[ch].delete(); t_sent[ch].delete(); p_sent[ch].delete(); end
    mhe_en = 1'b1; mhe_update = 1'b0; mhe_win = 6'd2;
    // non-updating: 0, +8, +14 suppressed, +46 accepted (window closed at 24)
    send(0, 100000); send(0, 8000); send(0, 6000); send(0, 32000);
    // updating: 0, +14, +28, +42 all restart the window; +100 accepted
    #200;
    mhe_update = 1'b1;
    send(1, 100000); send(1, 14000); send(1, 14000); send(1, 14000); send(1, 100000);
    #500;
    check(got[0].size() == 2 && got[0][0].pol == p_sent[0][0] && got[0][1].pol == p_sent[0][3],
          $sformatf("non-updating: %0d words", got[0].size()));
    check(got[1].size() == 2 && got[1][0].pol == p_sent[1][0] && got[1][1].pol == p_sent[1][4],
          $sformatf("updating: %0d words", got[1].size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
