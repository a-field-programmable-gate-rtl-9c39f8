// trigger_unit: samples the trigger input and starts an event readout.
//
// At 250 MHz the trigger input is registered twice and its rising edge is
// taken as the trigger time, with the same 11-bit coarse time (tc250) that
// stamps the hits. The request is held until the end of the current 16 ns
// period (ph_last), where the 62.5 MHz side samples it. There, if no copy is
// in progress and the circular buffers are ready, a one-cycle start pulse is
// issued and the trigger time is kept for the time window; a trigger that
// arrives during a copy is not taken and is counted as rejected. The trigger
// starting the copy is the published behaviour; the edge sampling, the 4 ns
// trigger time, the rejection during a copy and the two counters are choices
// of this design.
module trigger_unit
  import tdc_pkg::*;
(
  input  logic            clk250,
  input  logic            clk62,
  input  logic            rst,
  input  logic            trig_in,
  input  logic [TC_W-1:0] tc250,
  input  logic            ph_last,
  input  logic            busy,       // copy in progress or not ready
  output logic            start,      // clk62 pulse: switch pipelines, copy
  output logic [TC_W-1:0] trig_tc,
  output logic [15:0]     n_accepted,
  output logic [15:0]     n_rejected
);
  timeunit 1ns;
  timeprecision 1ps;

  logic            s1, s2;
  logic            edge_det;
  logic            pend;
  logic [TC_W-1:0] pend_tc;

  assign edge_det = s1 && !s2;

  always_ff @(posedge clk250) begin
    if (rst) begin
      s1      <= 1'b0;
      s2      <= 1'b0;
      pend    <= 1'b0;
      pend_tc <= '0;
    end else begin
      s1 <= trig_in;
      s2 <= s1;
      // The 62.5 MHz side samples pend on the edge that ends a ph_last cycle.
      pend <= ph_last ? edge_det : (pend || edge_det);
      if (edge_det && (ph_last || !pend)) pend_tc <= tc250;
    end
  end

  always_ff @(posedge clk62) begin
    if (rst) begin
      start      <= 1'b0;
      trig_tc    <= '0;
      n_accepted <= '0;
      n_rejected <= '0;
    end else begin
      start <= 1'b0;
      if (pend) begin
        if (!busy && !start) begin
          start      <= 1'b1;
          trig_tc    <= pend_tc;
          n_accepted <= n_accepted + 1'b1;
        end else begin
          n_rejected <= n_rejected + 1'b1;
        end
      end
    end
  end

endmodule
