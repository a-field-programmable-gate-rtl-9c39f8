// ch4_reg: four TDC channels feeding one hit stream (4CH_Reg).
//
// Each channel is a tapped delay line (delay9ph), the fine time encoder, the
// multi-hit elimination and counting stage, and the Pipe4 first layer buffer.
// The four Pipe4 buffers are emptied at 62.5 MHz by a chain of four hit data
// shifters whose output, at most one hit per 16 ns, goes to the group's
// circular buffer; that output is never stalled. The channels' scaler
// registers are chained so that channel 0 sits at the output end. This
// grouping follows the published block diagram; the channel order in the
// chains is a choice of this design.
//
// Parameters: CH_BASE is the global number of channel 0; the hit words carry
// CH_BASE + i. Timing: a hit leaves the group about 3 clk250 cycles plus the
// shifter queueing after the edge.
module ch4_reg
  import tdc_pkg::*;
#(
  parameter logic [CH_W-1:0] CH_BASE = '0
) (
  input  logic             clk250,
  input  logic             clk62,
  input  logic             rst,
  input  logic [3:0]       hit_in,
  input  logic [TC_W-1:0]  tc250,
  input  logic             ph_last,
  input  logic             mhe_en,
  input  logic             mhe_update,
  input  logic [MHE_W-1:0] mhe_win,
  // scaler chain
  input  logic             sc_latch,
  input  logic             sc_shift,
  input  logic [SC_W-1:0]  sch_in,
  output logic [SC_W-1:0]  sch_out,
  // hit stream to the circular buffer
  output logic             out_valid,
  output hit_t             out_hit,
  output logic [3:0]       dropped
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [SC_W-1:0] sch [5];
  logic            sh_valid [5];
  hit_t            sh_hit   [5];
  logic            sh_ready [5];
  logic            up_rdy   [4];

  assign sch[4]      = sch_in;
  assign sch_out     = sch[0];
  assign sh_valid[4] = 1'b0;
  assign sh_hit[4]   = '0;
  assign sh_ready[0] = 1'b1;
  assign out_valid   = sh_valid[0];
  assign out_hit     = sh_hit[0];

  for (genvar i = 0; i < 4; i++) begin : g_ch
    logic [TAPS-1:0]   pattern;
    logic              enc_hit, enc_pol;
    logic [FINE_W-1:0] enc_fine;
    logic              acc;
    hit_t              acc_hit;
    logic [SC_W-1:0]   sc_cnt;
    logic              p_valid, p_pop;
    hit_t              p_hit;

    delay9ph #(.TAPS(TAPS)) u_dly (
      .clk250, .hit_in(hit_in[i]), .pattern
    );

    fine_encoder u_enc (
      .clk250, .rst, .pattern, .hit(enc_hit), .fine(enc_fine), .pol(enc_pol)
    );

    mhe_counting #(.CH(CH_BASE + CH_W'(i))) u_mhe (
      .clk250, .rst, .hit_in(enc_hit), .fine_in(enc_fine), .pol_in(enc_pol),
      .tc250, .ph_last, .mhe_en, .mhe_update, .mhe_win,
      .sc_clear(sc_latch), .acc, .acc_hit, .sc_cnt
    );

    pipe4 u_pipe4 (
      .clk250, .clk62, .rst,
      .wr(acc), .wr_hit(acc_hit), .dropped(dropped[i]),
      .rd_valid(p_valid), .rd_hit(p_hit), .rd_pop(p_pop),
      .sc_cnt, .sc_latch, .sc_shift, .sch_in(sch[i+1]), .sch_out(sch[i])
    );

    hit_shifter u_sh (
      .clk(clk62), .rst,
      .up_valid(sh_valid[i+1]), .up_hit(sh_hit[i+1]), .up_ready(up_rdy[i]),
      .loc_valid(p_valid), .loc_hit(p_hit), .loc_ready(p_pop),
      .out_valid(sh_valid[i]), .out_hit(sh_hit[i]), .out_ready(sh_ready[i])
    );

    // Stage i hands its word to stage i-1, which takes it whenever it can.
    if (i > 0) begin : g_rdy
      assign sh_ready[i] = up_rdy[i-1];
    end
  end

endmodule
