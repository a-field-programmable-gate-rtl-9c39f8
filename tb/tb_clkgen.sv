// tb_clkgen: phase-aligned 250 MHz and 62.5 MHz clocks for the testbenches.
// Both clocks are updated in one process so that every fourth clk250 rising
// edge and each clk62 rising edge fall in the same simulation step.
module tb_clkgen (
  output logic clk250,
  output logic clk62
);
  timeunit 1ns;
  timeprecision 1ps;

  int unsigned k = 0;

  initial begin
    clk250 = 1'b0;
    clk62  = 1'b0;
    forever begin
      #2;
      k++;
      clk250 = k[0];
      clk62  = ((k + 1) >> 2) % 2 == 1;
    end
  end
endmodule
