// time_window: keeps only the hits of an event that fall in a time window.
//
// During the copy of a circular buffer each hit word is compared with the
// trigger time: dt = trigger time - hit coarse time, modulo 2^11 (4 ns
// units). A hit with tw_lo <= dt <= tw_hi is passed on to the output buffer;
// any other hit is consumed and counted. This lets the same module serve
// detectors with different drift times. The window itself is the published
// feature; the comparison on coarse time only, the inclusive bounds and the
// counter are choices of this design.
//
// Timing: purely combinational between the readout chain and the output
// buffer; a passed hit waits for out_ready.
// out_hit is in_hit passed straight through (only valid/ready are gated), so
// a synthesis report shows those 22 output bits as driven from inputs.
module time_window
  import tdc_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [TC_W-1:0] trig_tc,
  input  logic [TC_W-1:0] tw_lo,
  input  logic [TC_W-1:0] tw_hi,
  input  logic            in_valid,
  input  hit_t            in_hit,
  output logic            in_ready,
  output logic            out_valid,
  output hit_t            out_hit,
  input  logic            out_ready,
  output logic [15:0]     n_outside
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [TC_W-1:0] dt;
  logic            in_win;

  assign dt        = trig_tc - in_hit.tc;
  assign in_win    = (dt >= tw_lo) && (dt <= tw_hi);
  assign out_valid = in_valid && in_win;
  assign out_hit   = in_hit;
  assign in_ready  = in_win ? out_ready : 1'b1;

  always_ff @(posedge clk) begin
    if (rst)                     n_outside <= '0;
    else if (in_valid && !in_win) n_outside <= n_outside + 1'b1;
  end

endmodule
