// tc_counter: 11-bit coarse time counter split across two clocks.
//
// The high bits TC[10:2] count at 62.5 MHz (16 ns per step). The low bits
// TC[1:0] are a 2-bit counter at 250 MHz that is re-aligned every 32 ns by a
// 4 ns pulser: DF0 samples TC[2], DF1 samples DF0, the pulse is DF0 & !DF1,
// and a third flip-flop (DF2) registers the pulse and drives the synchronous
// clear (SCLR) of the 2-bit counter. This structure is the published one.
//
// Counting the pipeline latencies, the clear lands three 250 MHz cycles after
// TC[2] rises, so the low bits wrap from 3 to 0 three cycles after the high
// bits step. To give the 250 MHz logic one monotonic 11-bit time, this design
// delays TC[10:2] by three 250 MHz registers (reset to all ones) and
// concatenates it with the low bits: tc250 = {hi_delayed, lo}. It also flags
// ph_last, the 250 MHz cycle that ends on a common 62.5/250 MHz edge (the
// cycle with lo == 0), which the channel logic uses to hand values to the
// 62.5 MHz side. Both are choices of this design; so is the reset value 1 of
// the low counter, which makes the first clear land where the counter already
// is, so tc250 is monotonic from reset.
//
// Clocks: clk62 and clk250 are phase-aligned (clk62 = clk250 / 4). rst is
// synchronous and must be released on a common edge.
module tc_counter
  import tdc_pkg::*;
(
  input  logic              clk62,
  input  logic              clk250,
  input  logic              rst,
  output logic [TCHI_W-1:0] tc_hi,    // TC[10:2], 62.5 MHz domain
  output logic [TC_W-1:0]   tc250,    // full time, 250 MHz domain
  output logic [1:0]        tc_lo,    // TC[1:0]
  output logic              ph_last,  // this clk250 cycle ends on a clk62 edge
  output logic              sclr      // synchronous clear of TC[1:0] (DF2)
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int HI_DLY = 3;

  logic df0, df1;
  logic pulse;
  logic [TCHI_W-1:0] hi_d [HI_DLY];

  always_ff @(posedge clk62) begin
    if (rst) tc_hi <= '0;
    else     tc_hi <= tc_hi + 1'b1;
  end

  assign pulse = df0 & ~df1;

  always_ff @(posedge clk250) begin
    if (rst) begin
      df0   <= 1'b0;
      df1   <= 1'b0;
      sclr  <= 1'b0;
      tc_lo <= 2'd1;
      for (int i = 0; i < HI_DLY; i++) hi_d[i] <= '1;
    end else begin
      df0   <= tc_hi[0];         // TC[2]
      df1   <= df0;
      sclr  <= pulse;            // DF2: the 4 ns pulser
      tc_lo <= sclr ? 2'd0 : tc_lo + 2'd1;
      hi_d[0] <= tc_hi;
      for (int i = 1; i < HI_DLY; i++) hi_d[i] <= hi_d[i-1];
    end
  end

  assign tc250   = {hi_d[HI_DLY-1], tc_lo};
  assign ph_last = (tc_lo == 2'd0);

endmodule
