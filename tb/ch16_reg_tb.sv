// ch16_reg_tb: sixteen channels, their four circular buffers and the readout
// chain. For each buffer organisation, edges are placed before, inside and
// after the buffer's time span ending at a trigger, with 150 ns margins to
// the span's ends; the copy must return exactly the edges inside, with the
// right channels, polarities and consistent times, through a randomly
// stalling sink, and the copy-in-progress flag must cover the copy.
module ch16_reg_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_pkg::*;

  logic clk250, clk62, rst = 1'b1;
  logic [15:0] hit_in = '0;
  logic [TCHI_W-1:0] tc_hi;
  logic [TC_W-1:0] tc250;
  logic ph_last;
  cb_mode_e cb_mode = CB_8X512;
  logic trig = 1'b0;
  logic [SC_W-1:0] sch_out;
  logic up_ready, out_valid, out_ready = 1'b1, cip, init_done;
  hit_t out_hit;
  logic [15:0] dropped;
  int checks = 0, failures = 0;
  int n_stall = 0;

  tb_clkgen u_clk (.clk250, .clk62);
  tc_counter u_tc (.clk62, .clk250, .rst, .tc_hi, .tc250, .tc_lo(), .ph_last, .sclr());
  ch16_reg #(.CH_BASE(6'd16)) dut (
    .clk250, .clk62, .rst, .hit_in, .tc250, .ph_last,
    .mhe_en(1'b0), .mhe_update(1'b0), .mhe_win(6'd0), .cb_mode, .trig,
    .sc_latch(1'b0), .sc_shift(1'b0), .sch_in(8'd0), .sch_out,
    .up_valid(1'b0), .up_hit('0), .up_ready,
    .out_valid, .out_hit, .out_ready, .cip, .init_done, .dropped
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  task automatic wait_ps(input longint ps);
    repeat (ps / 1000) #1;
    repeat (ps % 1000) #1ps;
  endtask

  real  exp_t [16][$];
  bit   exp_p [16][$];
  hit_t got   [16][$];

  // the sink decides at each falling edge whether it takes the word on
  // offer at the next rising edge
  always @(negedge clk62) begin
    out_ready = ($urandom_range(0, 3) != 0);
    if (!rst && out_valid && out_ready) got[out_hit.ch - 16].push_back(out_hit);
    if (out_valid && !out_ready) n_stall++;
  end

  // edges every 20..60 ns on random channels from now until t_end (ns)
  task automatic edges_until(input real t_end, input bit expect_it);
    int ch;
    forever begin
      longint gap;
      gap = $urandom_range(20000, 60000);
      if ($realtime + gap / 1000.0 > t_end) break;
      wait_ps(gap);
      ch = $urandom_range(0, 15);
      hit_in[ch] = ~hit_in[ch];
      if (expect_it) begin
        exp_t[ch].push_back($realtime);
        exp_p[ch].push_back(hit_in[ch]);
      end
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real  span, t_trig, offs, d;
    bit   have_offs;
    int   n_inside, cip_cycles;
    have_offs = 0;
    repeat (3) @(posedge clk62);
    rst <= 1'b0;
    wait (init_done);
    for (int m = 2; m >= 0; m--) begin
      cb_mode = cb_mode_e'(m);
      span = 16.0 * (128 >> m);
      for (int ev = 0; ev < 3; ev++) begin
        foreach (exp_t[c]) begin exp_t[c].delete(); exp_p[c].delete(); got[c].delete(); end
        t_trig = $realtime + span + 1000.0;
        edges_until(t_trig - span - 150.0, 0);
        wait_ps(longint'(300000));
        edges_until(t_trig - 150.0, 1);
        // trigger on the first clk62 edge after t_trig - 150 ns + margin
        wait_ps(longint'(150000));
        @(negedge clk62);
        trig = 1'b1;
        @(negedge clk62);
        trig = 1'b0;
        // edges after the trigger go to the next pipeline
        edges_until($realtime + 450.0, 0);
        cip_cycles = 0;
        while (cip) begin @(negedge clk62); cip_cycles++; end
        repeat (4) @(negedge clk62);
        n_inside = 0;
        for (int c = 0; c < 16; c++) begin
          n_inside += exp_t[c].size();
          check(got[c].size() == exp_t[c].size(),
                $sformatf("mode %0d ch %0d: %0d words, %0d edges", m, c, got[c].size(), exp_t[c].size()));
          for (int e = 0; e < got[c].size() && e < exp_t[c].size(); e++) begin
            check(got[c][e].pol == exp_p[c][e], "polarity");
            d = 4.0 * got[c][e].tc - 0.45 * got[c][e].fine - exp_t[c][e];
            while (d < 0) d += 8192.0;
            while (d >= 8192.0) d -= 8192.0;
            if (!have_offs) begin offs = d; have_offs = 1; end
            check((d - offs) < 0.46 && (d - offs) > -0.46, "time");
          end
        end
        check(n_inside > 2, "edges inside the span");
        check(cip_cycles + 45 >= (128 >> m), $sformatf("copy lasted %0d cycles", cip_cycles));
        check(dropped == '0, "no drop");
      end
    end
    check(n_stall > 10, "readout stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
