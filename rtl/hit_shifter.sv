// hit_shifter: one stage of a hit data shifter chain.
//
// A chain of these stages moves hit words from several sources towards one
// sink, one word per clock. Each stage holds one word. When its word leaves
// (or it is empty) it takes a new one: the word from the stage below (up_*)
// if there is one, otherwise the word offered by its own local source
// (loc_*). Words already in the chain therefore have priority, and a full
// chain stalls its local sources through the ready signals. The chain of
// shifters is the published structure; the valid/ready handshake and the
// priority rule are choices of this design.
//
// Timing: a word taken at a clock edge is offered on out_* from that edge on;
// a word moves one stage per cycle while out_ready is high.
module hit_shifter
  import tdc_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic up_valid,
  input  hit_t up_hit,
  output logic up_ready,
  input  logic loc_valid,
  input  hit_t loc_hit,
  output logic loc_ready,
  output logic out_valid,
  output hit_t out_hit,
  input  logic out_ready
);
  timeunit 1ns;
  timeprecision 1ps;

  logic take;

  assign take      = !out_valid || out_ready;
  assign up_ready  = take;
  assign loc_ready = take && !up_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_hit   <= '0;
    end else if (take) begin
      out_valid <= up_valid || loc_valid;
      out_hit   <= up_valid ? up_hit : loc_hit;
    end
  end

  // A word on offer stays until it is taken.
  property p_hold;
    @(posedge clk) disable iff (rst) (out_valid && !out_ready) |=> (out_valid && $stable(out_hit));
  endproperty
  a_hold: assert property (p_hold);

endmodule
