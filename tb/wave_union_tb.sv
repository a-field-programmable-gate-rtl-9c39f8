// wave_union_tb: workload test of the whole TDC (tdc_top, full size) in the
// two bench set-ups of the published tests, driven through the register
// bus.
//  1. Wave union: two launchers (wu_launcher: pulse plus cable reflection)
//     each feed one set of 8 channels (set A: 0..7, set B: 8..15) through
//     fixed per-channel cable skews. Set B fires a random 2..6 ns after A.
//     Every channel must record its four edges in order rise, fall, rise,
//     fall. From the words the bench forms T1A-T1B (single leading edge,
//     channels 0 and 8), AllEdges per channel and WU_Ave over the 8
//     channels, and compares them with the true times. WU_Ave must be
//     within one bin of the truth and its spread must be well below the
//     single-edge spread: the wave union gain obtained without touching
//     the TDC logic.
//  2. Modular method: a hit on channel 20 and a stop on channel 21, the stop
//     following the hit by 30 ns + k * 7.2917 ns in event k; the measured
//     hit-to-stop time must match within the two quantisation errors.
// The pulse width (10 ns) and reflection delay (25 ns) of the launchers are
// not published and are this bench's choice. The delay cells are ideal, so
// no bin-width calibration is needed or done.
module wave_union_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_pkg::*;

  localparam int    NEV      = 40;
  localparam int    PULSE_PS = 10000;
  localparam real   STEP_NS  = 7.2917;
  localparam real   EDGE_OFF [4] = '{0.0, 10.0, 25.0, 35.0};

  logic clk250, clk62, rst = 1'b1;
  wire  [63:0] hit_in;
  logic trig_in = 1'b0;
  logic [3:0] bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic bus_we = 1'b0, bus_re = 1'b0;
  logic cip;
  int checks = 0, failures = 0;

  tb_clkgen u_clk (.clk250, .clk62);
  tdc_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("%0t: %s", $time, what);
    end
  endtask

  // ---- sources, launchers and cabling ----
  logic src_a = 1'b0, src_b = 1'b0, lau_a, lau_b;
  logic hit20 = 1'b0, stop21 = 1'b0;

  wu_launcher u_la (.in(src_a), .out(lau_a));
  wu_launcher u_lb (.in(src_b), .out(lau_b));

  function automatic int skew_ps(input int ch);
    return (ch < 8) ? 100 + ch * 173 : 60 + (ch - 8) * 211;
  endfunction

  for (genvar i = 0; i < 16; i++) begin : g_cable
    if (i < 8) begin : g_a
      assign #((100 + i * 173) * 1ps) hit_in[i] = lau_a;
    end else begin : g_b
      assign #((60 + (i - 8) * 211) * 1ps) hit_in[i] = lau_b;
    end
  end
  assign hit_in[19:16] = '0;
  assign hit_in[20]    = hit20;
  assign hit_in[21]    = stop21;
  assign hit_in[63:22] = '0;

  // ---- bus ----
  task automatic bus_read(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk62);
    bus_addr = a; bus_re = 1'b1;
    #1;
    d = bus_rdata;
    @(negedge clk62);
    bus_re = 1'b0;
  endtask

  task automatic wait_ps(input longint ps);
    repeat (ps / 1000) #1;
    repeat (ps % 1000) #1ps;
  endtask

  task automatic pulse(ref logic s, input longint width_ps);
    s = 1'b1;
    wait_ps(width_ps);
    s = 1'b0;
  endtask

  hit_t got [64][$];

  task automatic read_event();
    logic [31:0] st, w;
    hit_t h;
    foreach (got[c]) got[c].delete();
    forever begin
      bus_read(REG_OUT, w);
      if (w[31]) begin
        h = hit_t'(w[21:0]);
        got[h.ch].push_back(h);
      end else begin
        bus_read(REG_STATUS, st);
        if (!st[0] && !st[3]) break;
      end
    end
  endtask

  // measured time in ns, up to a constant common to all channels
  function automatic real tm(input hit_t h);
    return 4.0 * h.tc - 0.45 * h.fine;
  endfunction

  // difference folded into (-4096, 4096] ns (coarse counter wraps at 8192)
  function automatic real fold(input real d);
    while (d > 4096.0) d -= 8192.0;
    while (d <= -4096.0) d += 8192.0;
    return d;
  endfunction

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // ---- statistics ----
  int  m_events = 0, m_chan4 = 0, m_modular = 0;
  real s1_sum2 = 0.0, wu_sum2 = 0.0, wu_max = 0.0, md_sum2 = 0.0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    real dt, ta, tb, d_true, sum_a, sum_b, sk_a, sk_b, wu, t1, e1, md, md_true;
    int  ok_ch;
    repeat (3) @(posedge clk62);
    rst <= 1'b0;
    do bus_read(REG_STATUS, r); while (!r[1]);

    sk_a = 0.0; sk_b = 0.0;
    for (int c = 0; c < 8; c++) begin
      sk_a += skew_ps(c) / 8000.0;
      sk_b += skew_ps(c + 8) / 8000.0;
    end

    for (int ev = 0; ev < NEV; ev++) begin
      longint dly_ps, md_ps;
      wait_ps($urandom_range(0, 3999));
      dly_ps  = $urandom_range(2000, 6000);
      md_ps   = 30000 + longint'(ev) * 7292;   // 7.2917 ns to the nearest ps
      d_true  = dly_ps / 1000.0;
      md_true = md_ps / 1000.0;
      fork
        pulse(src_a, PULSE_PS);
        begin wait_ps(dly_ps); pulse(src_b, PULSE_PS); end
        pulse(hit20, 20000);
        begin wait_ps(md_ps); pulse(stop21, 20000); end
      join
      #600;
      @(negedge clk250);
      trig_in = 1'b1;
      repeat (10) @(negedge clk250);
      trig_in = 1'b0;
      read_event();

      // four edges per channel, rise-fall-rise-fall, spaced as launched
      ok_ch = 0;
      for (int c = 0; c < 16; c++) begin
        bit good;
        good = got[c].size() == 4;
        check(good, $sformatf("ev %0d ch %0d: %0d edges", ev, c, got[c].size()));
        if (good) begin
          for (int e = 0; e < 4; e++) begin
            check(got[c][e].pol == ((e % 2) == 0), $sformatf("ch %0d edge %0d polarity", c, e));
            dt = fold(tm(got[c][e]) - tm(got[c][0]));
            check(absr(dt - EDGE_OFF[e]) < 0.5, $sformatf("ch %0d edge %0d spacing %0.3f", c, e, dt));
          end
          ok_ch++;
        end
      end
      m_chan4 += ok_ch;
      if (ok_ch == 16) begin
        // single leading edge
        t1 = fold(tm(got[0][0]) - tm(got[8][0]));
        e1 = t1 - (skew_ps(0) / 1000.0 - skew_ps(8) / 1000.0 - d_true);
        s1_sum2 += e1 * e1;
        // WU_Ave over the AllEdges averages of the two sets
        sum_a = 0.0; sum_b = 0.0;
        for (int c = 0; c < 8; c++)
          for (int e = 0; e < 4; e++) begin
            sum_a += fold(tm(got[c][e]) - tm(got[0][0])) / 32.0;
            sum_b += fold(tm(got[c + 8][e]) - tm(got[0][0])) / 32.0;
          end
        wu = sum_a - sum_b;
        wu = wu - (sk_a - sk_b - d_true);
        wu_sum2 += wu * wu;
        if (absr(wu) > wu_max) wu_max = absr(wu);
        check(absr(wu) < 0.45, $sformatf("ev %0d: WU_Ave error %0.3f ns", ev, wu));
        m_events++;
      end

      // modular method pair
      if (got[20].size() == 2 && got[21].size() == 2) begin
        md = fold(tm(got[21][0]) - tm(got[20][0]));
        check(absr(md - md_true) < 0.6,
              $sformatf("ev %0d: hit-stop %0.3f ns, true %0.3f", ev, md, md_true));
        md_sum2 += (md - md_true) * (md - md_true);
        m_modular++;
      end else begin
        check(0, $sformatf("ev %0d: modular pair %0d/%0d words", ev, got[20].size(), got[21].size()));
      end
    end

    $display("wave union: %0d events, single-edge rms %0.3f ns, WU_Ave rms %0.3f ns (max %0.3f), modular rms %0.3f ns",
             m_events, $sqrt(s1_sum2 / (m_events > 0 ? m_events : 1)),
             $sqrt(wu_sum2 / (m_events > 0 ? m_events : 1)), wu_max,
             $sqrt(md_sum2 / (m_modular > 0 ? m_modular : 1)));
    check(m_events == NEV, "every event complete");
    check(m_chan4 == NEV * 16, "four edges on every channel");
    check(m_modular == NEV, "every modular pair read");
    check($sqrt(s1_sum2 / NEV) > 0.05 && $sqrt(s1_sum2 / NEV) < 0.35, "single-edge spread of one quantisation step");
    check($sqrt(wu_sum2 / NEV) < 0.5 * $sqrt(s1_sum2 / NEV), "wave union at least halves the spread");
    check($sqrt(md_sum2 / NEV) < 0.35, "modular method spread");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
