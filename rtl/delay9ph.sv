// delay9ph: behavioural model of one channel's tapped delay line.
//
// Behavioural model (not synthesizable as intended): in the FPGA the line is
// a chain of logic cells whose propagation delay, nominally 450 ps each, is
// the fine time scale. Here each cell is a continuous assignment with a
// fixed delay. The hit input runs down nine cells; tap i (DFN1..DFN9 in the
// original naming) is the input delayed by i cells, and all nine taps are
// registered together on every rising edge of the 250 MHz clock. A level
// change that reached the first k taps before the clock edge therefore
// appears as k taps at the new level. The nine taps and the 450 ps cell come
// from the published firmware; the ideal, equal cell delay is a simplification
// (real cells differ, which is why the bins need calibration).
//
// Interface: hit_in is the asynchronous discriminated input; pattern[i-1]
// holds tap i as sampled at the last clk250 edge (one cycle of latency).
module delay9ph #(
  parameter int TAPS        = 9,
  parameter int TAP_DELAY_PS = 450
) (
  input  logic            clk250,
  input  logic            hit_in,
  output logic [TAPS-1:0] pattern
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [TAPS:0] tap;

  assign tap[0] = hit_in;
  for (genvar i = 1; i <= TAPS; i++) begin : g_cell
    assign #(TAP_DELAY_PS * 1ps) tap[i] = tap[i-1];
  end

  always_ff @(posedge clk250)
    pattern <= tap[TAPS:1];

endmodule
