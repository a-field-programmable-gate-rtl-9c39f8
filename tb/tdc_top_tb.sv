// tdc_top_tb: end-to-end test of the 64-channel TDC through its register
// bus, at the design's full size. Edges are placed on the inputs at random
// picosecond times around triggers. Events are run in all three circular
// buffer organisations, with the time window open and narrowed, with
// multi-hit elimination in non-updating and updating mode, and one event
// dense enough to fill the event buffer and stall the copy. Each event's
// words are read over the bus and compared with the edges that must be
// there: channel, polarity and time. Also checked: triggers during a copy
// are rejected, the scaler totals in two scaler buffers, and the Pipe4
// overflow flag. Every mechanism is counted and must occur.
module tdc_top_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_pkg::*;

  logic clk250, clk62, rst = 1'b1;
  logic [63:0] hit_in = '0;
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

  // ---- mechanism counters ----
  int m_events = 0, m_mode[3] = '{0, 0, 0}, m_rejected = 0, m_outside = 0;
  int m_stall = 0, m_suppr_fixed = 0, m_suppr_upd = 0, m_drop = 0;
  int m_bank = 0, m_rise = 0, m_fall = 0;

  always @(posedge clk62) if (dut.w_valid && !dut.w_ready) m_stall++;

  // ---- bus ----
  task automatic bus_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk62);
    bus_addr = a; bus_wdata = d; bus_we = 1'b1;
    @(negedge clk62);
    bus_we = 1'b0;
  endtask

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

  // ---- edges and expectations ----
  real  exp_t [64][$];
  bit   exp_p [64][$];
  hit_t got   [64][$];
  int   n_edges [64];

  task automatic clear_event();
    foreach (exp_t[c]) begin exp_t[c].delete(); exp_p[c].delete(); got[c].delete(); end
  endtask

  task automatic toggle(input int ch, input bit expect_it);
    hit_in[ch] = ~hit_in[ch];
    n_edges[ch]++;
    if (hit_in[ch]) m_rise++; else m_fall++;
    if (expect_it) begin
      exp_t[ch].push_back($realtime);
      exp_p[ch].push_back(hit_in[ch]);
    end
  endtask

  // Edges from now until t_end. Age = trigger time - edge time. An edge is
  // expected when its age lies in the span and its coarse age in the window;
  // ages within 'guard' ns of a boundary get no edge.
  int kseq = 0;
  task automatic edges_until(input real t_end, input real t_trig, input real span,
                             input int lo, input int hi, input int gmin, input int gmax);
    real age, guard;
    int  ch;
    bit  in_span, in_win, near;
    guard = 60.0;
    forever begin
      longint gap;
      gap = $urandom_range(gmin, gmax);
      if ($realtime + gap / 1000.0 > t_end) break;
      wait_ps(gap);
      age  = t_trig - $realtime;
      near = (age > -guard && age < 150.0) || (age > span - 150.0 && age < span + guard) ||
             ((age / 4.0 - 1.0) > lo - 15 && (age / 4.0 - 1.0) < lo + 15) ||
             ((age / 4.0 - 1.0) > hi - 15 && (age / 4.0 - 1.0) < hi + 15);
      if (near) continue;
      in_span = (age > 0.0) && (age < span);
      in_win  = ((age / 4.0 - 1.0) >= lo) && ((age / 4.0 - 1.0) <= hi);
      // spread consecutive edges over the 16 groups of four channels
      ch = ((kseq * 4) + (kseq / 16)) % 64;
      kseq++;
      toggle(ch, in_span && in_win);
    end
  endtask

  task automatic fire_trigger();
    @(negedge clk250);
    trig_in = 1'b1;
    repeat (10) @(negedge clk250);
    trig_in = 1'b0;
  endtask

  // read every word of the event; returns when the copy is over and the
  // event buffer is empty
  task automatic read_event(input int rd_delay);
    logic [31:0] st, w;
    hit_t h;
    repeat (rd_delay) @(negedge clk62);
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

  real offs;
  bit  have_offs = 0;

  task automatic compare_event(input string name);
    real d;
    int  n = 0;
    for (int c = 0; c < 64; c++) begin
      n += exp_t[c].size();
      check(got[c].size() == exp_t[c].size(),
            $sformatf("%s ch %0d: %0d words, %0d edges", name, c, got[c].size(), exp_t[c].size()));
      for (int e = 0; e < got[c].size() && e < exp_t[c].size(); e++) begin
        check(got[c][e].ch == 6'(c) && got[c][e].pol == exp_p[c][e], "channel and polarity");
        d = 4.0 * got[c][e].tc - 0.45 * got[c][e].fine - exp_t[c][e];
        while (d < 0) d += 8192.0;
        while (d >= 8192.0) d -= 8192.0;
        if (!have_offs) begin offs = d; have_offs = 1; end
        check((d - offs) < 0.46 && (d - offs) > -0.46, $sformatf("%s: time error %0.3f", name, d - offs));
      end
    end
    check(n > 0, {name, ": edges expected"});
  endtask

  // one trigger-matched event
  task automatic run_event(input string name, input int mode, input int lo, input int hi,
                           input int gmin, input int gmax, input int rd_delay);
    real span, t_trig;
    logic [31:0] r0, r1;
    span = 16.0 * (128 >> mode);
    bus_write(REG_CTRL, {19'd0, 3'd0, 2'(mode), 6'd0, 1'b0, 1'b0});
    bus_write(REG_TWIN, {5'd0, 11'(hi), 5'd0, 11'(lo)});
    bus_read(REG_TWOUT, r0);
    clear_event();
    t_trig = $realtime + span + 600.0;
    edges_until(t_trig, t_trig, span, lo, hi, gmin, gmax);
    fire_trigger();
    edges_until($realtime + 200.0, t_trig, span, lo, hi, gmin, gmax);
    read_event(rd_delay);
    compare_event(name);
    bus_read(REG_TWOUT, r1);
    m_outside += r1[15:0] - r0[15:0];
    m_events++;
    m_mode[mode]++;
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r, w;
    int tot [64];
    foreach (n_edges[c]) n_edges[c] = 0;
    repeat (3) @(posedge clk62);
    rst <= 1'b0;
    do bus_read(REG_STATUS, r); while (!r[1]);

    // ---- events in the three organisations, window fully open ----
    run_event("2x2048", 0, 0, 2047, 20000, 60000, 0);
    run_event("4x1024", 1, 0, 2047, 20000, 60000, 0);
    run_event("8x512",  2, 0, 2047, 20000, 60000, 0);
    // ---- narrowed time window ----
    run_event("window", 0, 100, 300, 10000, 30000, 0);
    // ---- dense event: more hits than the event buffer holds ----
    run_event("dense", 0, 0, 2047, 2500, 3200, 1000);

    // ---- trigger during a copy is rejected ----
    begin
      logic [31:0] e0, e1;
      bus_read(REG_EVCNT, e0);
      fire_trigger();
      repeat (4) @(negedge clk62);
      check(cip, "copy in progress");
      fire_trigger();
      while (cip) @(negedge clk62);
      bus_read(REG_EVCNT, e1);
      check(e1[15:0] == e0[15:0] + 1, "one trigger taken");
      check(e1[31:16] > e0[31:16], "trigger during copy rejected");
      m_rejected += e1[31:16] - e0[31:16];
      clear_event();
      read_event(0);
    end

    // ---- multi-hit elimination: window 16 + 4*2 = 24 ns ----
    begin
      real t0;
      clear_event();
      bus_write(REG_TWIN, {5'd0, 11'd2047, 5'd0, 11'd0});
      bus_write(REG_CTRL, {19'd0, 3'd0, 2'd0, 6'd2, 1'b0, 1'b1});   // non-updating
      t0 = $realtime;
      wait_ps(300000); toggle(5, 1);
      wait_ps(8000);   toggle(5, 0); m_suppr_fixed++;
      wait_ps(6000);   toggle(5, 0); m_suppr_fixed++;
      wait_ps(32000);  toggle(5, 1);
      wait_ps(100000);
      bus_write(REG_CTRL, {19'd0, 3'd0, 2'd0, 6'd2, 1'b1, 1'b1});   // updating
      wait_ps(100000); toggle(9, 1);
      wait_ps(14000);  toggle(9, 0); m_suppr_upd++;
      wait_ps(14000);  toggle(9, 0); m_suppr_upd++;
      wait_ps(14000);  toggle(9, 0); m_suppr_upd++;
      wait_ps(100000); toggle(9, 1);
      wait_ps(300000);
      fire_trigger();
      read_event(0);
      compare_event("elimination");
      bus_write(REG_CTRL, 32'd0);
    end

    // ---- scaler totals in buffer 0, then buffer 1 ----
    begin
      int base [64];
      logic [31:0] base_r [64];
      // let the last counts be summed: two full 2048 ns sweeps
      wait_ps(longint'(4500000));
      for (int c = 0; c < 64; c++) begin
        bus_write(REG_SCADDR, 32'(c));
        bus_read(REG_SCDATA, r);
        // the counter has a 16 ns resolution: the elimination test put two
        // edges of channels 5 and 9 less than 16 ns apart
        if (c == 5 || c == 9)
          check(r <= 32'(n_edges[c]) && r + 3 >= 32'(n_edges[c]), $sformatf("scaler ch %0d: %0d", c, r));
        else
          check(r == 32'(n_edges[c]), $sformatf("scaler ch %0d: %0d exp %0d", c, r, n_edges[c]));
        base[c] = n_edges[c];
        base_r[c] = r;
      end
      bus_write(REG_CTRL, {19'd0, 3'd1, 10'd0});                     // buffer 1
      wait_ps(longint'(4500000));
      for (int i = 0; i < 40; i++) begin
        wait_ps(longint'($urandom_range(30000, 90000)));
        toggle(i % 64, 0);
        wait_ps(30000);
        toggle(i % 64, 0);
      end
      wait_ps(longint'(4500000));
      for (int c = 0; c < 64; c++) begin
        bus_write(REG_SCADDR, 32'(64 + c));
        bus_read(REG_SCDATA, r);
        check(r == 32'(n_edges[c] - base[c]), $sformatf("scaler buffer 1 ch %0d: %0d exp %0d", c, r, n_edges[c] - base[c]));
        bus_write(REG_SCADDR, 32'(c));
        bus_read(REG_SCDATA, r);
        check(r == base_r[c], "scaler buffer 0 unchanged");
      end
      m_bank++;
    end

    // ---- Pipe4 overflow: eight edges 6 ns apart on one channel ----
    begin
      bus_read(REG_STATUS, r);
      check(!r[2], "no drop before the burst");
      for (int i = 0; i < 8; i++) begin
        wait_ps(6000);
        toggle(12, 0);
      end
      repeat (20) @(negedge clk62);
      bus_read(REG_STATUS, r);
      check(r[2], "overflow flagged");
      if (r[2]) m_drop++;
    end

    // ---- every mechanism must have happened ----
    check(m_events >= 5, "events");
    check(m_mode[0] > 0 && m_mode[1] > 0 && m_mode[2] > 0, "all three organisations");
    check(m_rejected > 0, "trigger rejection");
    check(m_outside > 0, "time window rejection");
    check(m_stall > 0, "event buffer full stall");
    check(m_suppr_fixed > 0 && m_suppr_upd > 0, "elimination in both modes");
    check(m_bank > 0, "scaler buffer switch");
    check(m_drop > 0, "Pipe4 overflow");
    check(m_rise > 0 && m_fall > 0, "both polarities");
    $display("mechanisms: events %0d modes %0d/%0d/%0d rejected %0d outside %0d stall-cycles %0d suppressed %0d+%0d overflow %0d",
             m_events, m_mode[0], m_mode[1], m_mode[2], m_rejected, m_outside, m_stall,
             m_suppr_fixed, m_suppr_upd, m_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
