// ch16_reg: sixteen channels with their circular buffers (16CH_Reg).
//
// Four 4CH_Reg groups each write their hit stream into their own circular
// buffer. On a trigger all four buffers switch pipelines and read out
// together; a chain of four hit data shifters merges their valid hits, and
// also passes on the words arriving from the 16CH_Reg below (up_*), so that
// the four 16CH_Reg blocks of the module form one readout chain. The scaler
// chains of the four groups are joined the same way. cip is high while any
// buffer of the block is still copying or any readout word is still in the
// block's shifters. Structure as in the published block diagram; the chain
// order is a choice of this design.
module ch16_reg
  import tdc_pkg::*;
#(
  parameter logic [CH_W-1:0] CH_BASE = '0
) (
  input  logic             clk250,
  input  logic             clk62,
  input  logic             rst,
  input  logic [15:0]      hit_in,
  input  logic [TC_W-1:0]  tc250,
  input  logic             ph_last,
  input  logic             mhe_en,
  input  logic             mhe_update,
  input  logic [MHE_W-1:0] mhe_win,
  input  cb_mode_e         cb_mode,
  input  logic             trig,
  // scaler chain
  input  logic             sc_latch,
  input  logic             sc_shift,
  input  logic [SC_W-1:0]  sch_in,
  output logic [SC_W-1:0]  sch_out,
  // readout chain
  input  logic             up_valid,
  input  hit_t             up_hit,
  output logic             up_ready,
  output logic             out_valid,
  output hit_t             out_hit,
  input  logic             out_ready,
  output logic             cip,
  output logic             init_done,
  output logic [15:0]      dropped
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [SC_W-1:0] sch [5];
  logic            sh_valid [5];
  hit_t            sh_hit   [5];
  logic            sh_ready [5];
  logic            up_rdy   [4];
  logic [3:0]      cb_busy, cb_init, sh_busy;

  assign sch[4]      = sch_in;
  assign sch_out     = sch[0];
  assign sh_valid[4] = up_valid;
  assign sh_hit[4]   = up_hit;
  assign up_ready    = up_rdy[3];
  assign sh_ready[0] = out_ready;
  assign out_valid   = sh_valid[0];
  assign out_hit     = sh_hit[0];
  assign cip         = |cb_busy || |sh_busy;
  assign init_done   = &cb_init;

  for (genvar g = 0; g < 4; g++) begin : g_grp
    logic wr_valid;
    hit_t wr_hit;
    logic cb_valid, cb_ready;
    hit_t cb_hit;

    ch4_reg #(.CH_BASE(CH_BASE + CH_W'(4 * g))) u_ch4 (
      .clk250, .clk62, .rst, .hit_in(hit_in[4*g +: 4]),
      .tc250, .ph_last, .mhe_en, .mhe_update, .mhe_win,
      .sc_latch, .sc_shift, .sch_in(sch[g+1]), .sch_out(sch[g]),
      .out_valid(wr_valid), .out_hit(wr_hit), .dropped(dropped[4*g +: 4])
    );

    circ_buffer u_cb (
      .clk62, .rst, .mode(cb_mode), .wr_valid, .wr_hit, .trig,
      .rd_valid(cb_valid), .rd_hit(cb_hit), .rd_ready(cb_ready),
      .busy(cb_busy[g]), .init_done(cb_init[g])
    );

    hit_shifter u_sh (
      .clk(clk62), .rst,
      .up_valid(sh_valid[g+1]), .up_hit(sh_hit[g+1]), .up_ready(up_rdy[g]),
      .loc_valid(cb_valid), .loc_hit(cb_hit), .loc_ready(cb_ready),
      .out_valid(sh_valid[g]), .out_hit(sh_hit[g]), .out_ready(sh_ready[g])
    );

    assign sh_busy[g] = sh_valid[g];

    if (g > 0) begin : g_rdy
      assign sh_ready[g] = up_rdy[g-1];
    end
  end

endmodule
