// wu_launcher: timing model of an external wave union launcher, used only
// by the testbenches. The published launcher is a logic fan-in/out unit
// with an open-ended delay cable on a T connection: a pulse sent in comes
// out followed by its reflection, giving a double pulse (four edges).
// Here: out = in OR (in delayed by REFL_PS), the delay being a transport
// delay so the whole pulse is copied. Amplitude, shape and attenuation
// of the reflection are not modelled. REFL_PS (twice the cable delay) is
// not published; it must exceed the input pulse width so that the two
// pulses stay apart.
module wu_launcher #(
  parameter int REFL_PS = 25000
) (
  input  logic in,
  output logic out
);
  timeunit 1ns;
  timeprecision 1ps;

  logic refl = 1'b0;

  // one delayed copy per edge, so several edges can be in flight
  always @(posedge in) fork begin #(REFL_PS * 1ps); refl = 1'b1; end join_none
  always @(negedge in) fork begin #(REFL_PS * 1ps); refl = 1'b0; end join_none

  assign out = in | refl;
endmodule
