// fine_encoder: turns the registered delay-line pattern into a hit flag,
// a fine time code (0..8) and the edge polarity.
//
// The nine taps sampled at one clock edge, followed by tap 1 of the
// previous sample (taken 4 ns earlier), form ten points on a time line from
// newest (tap 1) to oldest. An edge lies between two neighbouring points that
// differ. The code is the position of the oldest such pair, 0..8: code j means
// the edge arrived between (j+1) and (j+2) tap delays before the sampling
// edge, so a larger code is an earlier edge. The polarity is the level on the
// newer side of that pair. Both rising and falling edges are hits, and only
// one edge per 4 ns cycle is encoded (the earliest).
//
// The fine code range 0..8 and the digitising of both polarities follow the
// published firmware; the oldest-transition rule and the use of the previous
// sample's first tap are choices of this design.
//
// Timing: one register stage; hit/fine/pol are valid one clk250 cycle after
// the pattern.
module fine_encoder
  import tdc_pkg::*;
#(
  parameter int N_TAPS = TAPS
) (
  input  logic              clk250,
  input  logic              rst,
  input  logic [N_TAPS-1:0] pattern,   // pattern[0] = tap 1 (least delayed)
  output logic              hit,
  output logic [FINE_W-1:0] fine,
  output logic              pol
);
  timeunit 1ns;
  timeprecision 1ps;

  logic              prev_tap1;
  logic [N_TAPS:0]   line;       // line[0] newest ... line[TAPS] oldest
  logic              found;
  logic [FINE_W-1:0] code;
  logic              level;

  assign line = {prev_tap1, pattern};

  always_comb begin
    found = 1'b0;
    code  = '0;
    level = 1'b0;
    for (int j = 0; j < N_TAPS; j++) begin
      if (line[j] != line[j+1]) begin   // later j overrides: oldest wins
        found = 1'b1;
        code  = FINE_W'(j);
        level = line[j];
      end
    end
  end

  always_ff @(posedge clk250) begin
    if (rst) begin
      prev_tap1 <= 1'b0;
      hit       <= 1'b0;
      fine      <= '0;
      pol       <= 1'b0;
    end else begin
      prev_tap1 <= pattern[0];
      hit       <= found;
      fine      <= code;
      pol       <= level;
    end
  end

endmodule
