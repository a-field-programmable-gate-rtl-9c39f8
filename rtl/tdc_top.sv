// tdc_top: 64-channel multi-hit TDC with trigger-matched readout.
//
// Each channel digitises both edges of its input with a 450 ps tapped delay
// line sampled at 250 MHz and an 11-bit coarse counter (4 ns LSB), applies
// optional multi-hit elimination, counts its hits, and queues the hits in a
// four-deep first layer buffer. Groups of four channels write their hits,
// one per 16 ns, into a circular buffer that holds the last 512 to 2048 ns.
// A trigger switches every circular buffer to its next pipeline and copies
// the filled one out through a chain of hit data shifters, the time window
// and the event buffer, which the bus reads. In parallel, every 2048 ns the
// 64 hit counters are summed into 32-bit scaler totals.
//
// Clocks: clk250 and clk62 must be phase-aligned (clk62 = clk250 / 4, rising
// edges coincident). rst is synchronous, high, and released on a common edge.
// The local bus (bus_*) stands in for the VMEbus slave; see tdc_regs for the
// register map. The structure follows the published block diagram; the bus
// and the details named in each block are choices of this design.
// TC[1:0] and the 4 ns pulser of the coarse counter are used inside it (they
// form tc250) and are left unconnected at this level.
module tdc_top
  import tdc_pkg::*;
(
  input  logic           clk250,
  input  logic           clk62,
  input  logic           rst,
  input  logic [NCH-1:0] hit_in,
  input  logic           trig_in,
  input  logic [3:0]     bus_addr,
  input  logic [31:0]    bus_wdata,
  input  logic           bus_we,
  input  logic           bus_re,
  output logic [31:0]    bus_rdata,
  output logic           cip
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NGRP = NCH / 16;

  tdc_cfg_t          cfg;
  logic [TCHI_W-1:0] tc_hi;
  logic [TC_W-1:0]   tc250;
  logic              ph_last;
  logic              sc_latch, sc_shift, sc_init;
  logic [SC_W-1:0]   sch [NGRP+1];
  logic              c_valid [NGRP+1];
  hit_t              c_hit   [NGRP+1];
  logic              c_ready [NGRP+1];
  logic [NGRP-1:0]   g_cip, g_init;
  logic [NCH-1:0]    dropped;
  logic              start;
  logic [TC_W-1:0]   trig_tc;
  logic [15:0]       n_acc, n_rej, n_outside;
  logic              w_valid, w_ready;
  hit_t              w_hit;
  logic              o_valid, o_pop;
  hit_t              o_hit;
  logic [9:0]        o_count;
  logic [8:0]        sc_addr;
  logic [SCT_W-1:0]  sc_data;
  logic              all_init;

  tc_counter u_tc (
    .clk62, .clk250, .rst, .tc_hi, .tc250, .tc_lo(), .ph_last, .sclr()
  );

  assign sch[NGRP]     = '0;
  assign c_valid[NGRP] = 1'b0;
  assign c_hit[NGRP]   = '0;

  for (genvar g = 0; g < NGRP; g++) begin : g_grp
    ch16_reg #(.CH_BASE(CH_W'(16 * g))) u_ch16 (
      .clk250, .clk62, .rst, .hit_in(hit_in[16*g +: 16]),
      .tc250, .ph_last,
      .mhe_en(cfg.mhe_en), .mhe_update(cfg.mhe_update), .mhe_win(cfg.mhe_win),
      .cb_mode(cfg.cb_mode), .trig(start),
      .sc_latch, .sc_shift, .sch_in(sch[g+1]), .sch_out(sch[g]),
      .up_valid(c_valid[g+1]), .up_hit(c_hit[g+1]), .up_ready(c_ready[g+1]),
      .out_valid(c_valid[g]), .out_hit(c_hit[g]), .out_ready(c_ready[g]),
      .cip(g_cip[g]), .init_done(g_init[g]), .dropped(dropped[16*g +: 16])
    );
  end

  assign cip      = |g_cip;
  assign all_init = &g_init && sc_init;

  trigger_unit u_trig (
    .clk250, .clk62, .rst, .trig_in, .tc250, .ph_last,
    .busy(cip || !all_init), .start, .trig_tc,
    .n_accepted(n_acc), .n_rejected(n_rej)
  );

  time_window u_tw (
    .clk(clk62), .rst, .trig_tc, .tw_lo(cfg.tw_lo), .tw_hi(cfg.tw_hi),
    .in_valid(c_valid[0]), .in_hit(c_hit[0]), .in_ready(c_ready[0]),
    .out_valid(w_valid), .out_hit(w_hit), .out_ready(w_ready),
    .n_outside
  );

  output_buffer u_ob (
    .clk(clk62), .rst, .wr_valid(w_valid), .wr_hit(w_hit), .wr_ready(w_ready),
    .rd_valid(o_valid), .rd_hit(o_hit), .rd_pop(o_pop), .count(o_count)
  );

  scaler_buffer u_sc (
    .clk62, .rst, .tc_hi, .bank(cfg.sc_bank), .sch_in(sch[0]),
    .sc_latch, .sc_shift, .rd_addr(sc_addr), .rd_data(sc_data),
    .init_done(sc_init)
  );

  tdc_regs u_regs (
    .clk(clk62), .rst, .addr(bus_addr), .wdata(bus_wdata), .we(bus_we),
    .re(bus_re), .rdata(bus_rdata), .cfg, .sc_addr, .out_pop(o_pop),
    .cip, .init_done(all_init), .dropped(|dropped), .out_valid(o_valid),
    .out_hit(o_hit), .out_count(o_count), .sc_data,
    .n_accepted(n_acc), .n_rejected(n_rej), .n_outside
  );

endmodule
