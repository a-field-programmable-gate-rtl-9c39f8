// tdc_regs: control and status registers on a simple local bus.
//
// The multi-hit elimination (on/off, updating mode, window), the circular
// buffer organisation, the scaler buffer selection and the time window are
// all set here, and the event buffer, the scaler totals, the status and the
// trigger counters are read here. That these settings are user registers is
// published; the register map below is this design's:
//   0 CTRL   rw [0] mhe_en [1] mhe_update [7:2] mhe_win [9:8] cb_mode
//              [12:10] sc_bank
//   1 TWIN   rw [10:0] tw_lo [26:16] tw_hi
//   2 STATUS r  [0] copy in progress [1] buffers initialised [2] hit dropped
//              [3] event data available [25:16] event buffer word count
//   3 OUT    r  [31] valid [21:0] hit word; reading removes the word
//   4 SCADDR rw [8:0] {scaler buffer, channel} to read
//   5 SCDATA r  32-bit total at SCADDR
//   6 EVCNT  r  [15:0] triggers taken [31:16] triggers rejected
//   7 TWOUT  r  [15:0] hits dropped by the time window
// Bus: synchronous to clk62; a write takes effect at the clock edge with we
// high; rdata is combinational from addr while re is high.
// Write-data bits outside the fields above are ignored.
module tdc_regs
  import tdc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [3:0]        addr,
  input  logic [31:0]       wdata,
  input  logic              we,
  input  logic              re,
  output logic [31:0]       rdata,
  output tdc_cfg_t          cfg,
  output logic [8:0]        sc_addr,
  output logic              out_pop,
  input  logic              cip,
  input  logic              init_done,
  input  logic              dropped,
  input  logic              out_valid,
  input  hit_t              out_hit,
  input  logic [9:0]        out_count,
  input  logic [SCT_W-1:0]  sc_data,
  input  logic [15:0]       n_accepted,
  input  logic [15:0]       n_rejected,
  input  logic [15:0]       n_outside
);
  timeunit 1ns;
  timeprecision 1ps;

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg     <= '{mhe_en: 1'b0, mhe_update: 1'b0, mhe_win: '0,
                   cb_mode: CB_2X2048, sc_bank: '0, tw_lo: '0, tw_hi: '1};
      sc_addr <= '0;
    end else if (we) begin
      unique case (addr)
        REG_CTRL: begin
          cfg.mhe_en     <= wdata[0];
          cfg.mhe_update <= wdata[1];
          cfg.mhe_win    <= wdata[7:2];
          cfg.cb_mode    <= cb_mode_e'(wdata[9:8]);
          cfg.sc_bank    <= wdata[12:10];
        end
        REG_TWIN: begin
          cfg.tw_lo <= wdata[10:0];
          cfg.tw_hi <= wdata[26:16];
        end
        REG_SCADDR: sc_addr <= wdata[8:0];
        default: ;
      endcase
    end
  end

  assign out_pop = re && (addr == REG_OUT) && out_valid;

  always_comb begin
    rdata = '0;
    if (re) begin
      unique case (addr)
        REG_CTRL:   rdata = {19'd0, cfg.sc_bank, cfg.cb_mode, cfg.mhe_win,
                             cfg.mhe_update, cfg.mhe_en};
        REG_TWIN:   rdata = {5'd0, cfg.tw_hi, 5'd0, cfg.tw_lo};
        REG_STATUS: rdata = {6'd0, out_count, 12'd0, out_valid, dropped,
                             init_done, cip};
        REG_OUT:    rdata = {out_valid, 31'(out_hit)};
        REG_SCADDR: rdata = {23'd0, sc_addr};
        REG_SCDATA: rdata = sc_data;
        REG_EVCNT:  rdata = {n_rejected, n_accepted};
        REG_TWOUT:  rdata = {16'd0, n_outside};
        default:    rdata = '0;
      endcase
    end
  end

endmodule
