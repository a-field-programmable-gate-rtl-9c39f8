// mhe_counting: multi-hit elimination and the per-channel hit counter.
//
// Elimination: when enabled, an accepted hit opens a window of
// 16 ns + 4 ns * mhe_win (mhe_win = 0..63) during which further edges of the
// channel are not recorded. In non-updating mode the window keeps its length;
// in updating mode every suppressed edge restarts it. When disabled every
// encoded edge is recorded. The window is counted at 250 MHz by a down
// counter; the 6-bit setting, the 4 ns step, the 16 ns minimum and the two
// modes are the published behaviour, while the counter's 7-bit width (the
// window plus its 16 ns base does not fit in six bits) is this design's.
//
// Counting: an 8-bit counter counts the 16 ns periods (one clk62 cycle) in
// which the channel saw at least one encoded edge, so the scaler resolution
// is 16 ns. When sc_clear is high (a 62.5 MHz signal held for a whole clk62
// cycle), the count is restarted on the clk62 edge that ends that cycle; the
// 62.5 MHz side copies the old value on the same edge. Counting raw edges
// (before elimination) is a choice of this design.
//
// Timing: hit_in is the registered encoder output; acc/acc_hit are
// registered, one clk250 cycle later, and the hit's coarse time is tc250 of
// the cycle in which hit_in was high.
// The channel field of acc_hit is the constant CH, so those six output
// bits are constants by design.
module mhe_counting
  import tdc_pkg::*;
#(
  parameter logic [CH_W-1:0] CH = '0
) (
  input  logic              clk250,
  input  logic              rst,
  input  logic              hit_in,
  input  logic [FINE_W-1:0] fine_in,
  input  logic              pol_in,
  input  logic [TC_W-1:0]   tc250,
  input  logic              ph_last,
  input  logic              mhe_en,
  input  logic              mhe_update,
  input  logic [MHE_W-1:0]  mhe_win,
  input  logic              sc_clear,
  output logic              acc,        // accepted hit, one cycle
  output hit_t              acc_hit,
  output logic [SC_W-1:0]   sc_cnt
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [MHE_W:0] rem;           // cycles left in the window
  logic [MHE_W:0] win_last;      // window length in cycles, minus one
  logic           busy;
  logic           sc_flag;
  logic           any;

  assign win_last = {1'b0, mhe_win} + (MHE_W+1)'(3);
  assign busy     = mhe_en && (rem != '0);
  assign any      = sc_flag | hit_in;

  always_ff @(posedge clk250) begin
    if (rst) begin
      rem     <= '0;
      acc     <= 1'b0;
      acc_hit <= '0;
    end else begin
      acc <= 1'b0;
      if (hit_in && !busy) begin
        acc     <= 1'b1;
        acc_hit <= '{ch: CH, pol: pol_in, tc: tc250, fine: fine_in};
        rem     <= mhe_en ? win_last : '0;
      end else if (hit_in && mhe_update) begin
        rem <= win_last;           // updating mode: window starts over
      end else if (rem != '0) begin
        rem <= rem - 1'b1;
      end
    end
  end

  always_ff @(posedge clk250) begin
    if (rst) begin
      sc_flag <= 1'b0;
      sc_cnt  <= '0;
    end else if (ph_last) begin
      sc_flag <= 1'b0;
      sc_cnt  <= (sc_clear ? '0 : sc_cnt) + SC_W'(any);
    end else begin
      sc_flag <= any;
    end
  end

endmodule
