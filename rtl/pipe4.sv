// pipe4: first layer buffer of one channel, plus the channel's scaler latch.
//
// Hits: a four-entry FIFO written at 250 MHz by the multi-hit elimination
// stage and read at 62.5 MHz by the hit data shifter, so up to four hits of a
// channel can wait while the shifter chain is busy. A hit arriving when all
// four entries are occupied is dropped and counted in a sticky flag. The
// four-hit depth and the two rates are the published ones; the FIFO form and
// the drop policy are choices of this design. The two clocks are
// phase-aligned, so the pointers cross between them without synchronisers:
// each side only ever samples the other side's registers on a common edge.
//
// Scaler: on sc_latch (a clk62 cycle) the channel's 8-bit hit count is copied
// into sch_out, on the same edge on which the counter restarts; on sc_shift
// sch_out takes sch_in, so the registers of all channels form a shift chain
// that delivers the counts one channel at a time.
//
// Timing: rd_valid/rd_hit show the oldest entry (first-word fall-through);
// rd_pop removes it at the next clk62 edge.
module pipe4
  import tdc_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic            clk250,
  input  logic            clk62,
  input  logic            rst,
  // 250 MHz write side
  input  logic            wr,
  input  hit_t            wr_hit,
  output logic            dropped,     // sticky: a hit was lost
  // 62.5 MHz read side
  output logic            rd_valid,
  output hit_t            rd_hit,
  input  logic            rd_pop,
  // scaler chain, 62.5 MHz
  input  logic [SC_W-1:0] sc_cnt,
  input  logic            sc_latch,
  input  logic            sc_shift,
  input  logic [SC_W-1:0] sch_in,
  output logic [SC_W-1:0] sch_out
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int PW = $clog2(DEPTH);

  hit_t        mem [DEPTH];
  logic [PW:0] wptr;    // clk250 domain
  logic [PW:0] rptr;    // clk62 domain
  logic        full;

  assign full     = (wptr - rptr) == (PW+1)'(DEPTH);
  assign rd_valid = (wptr != rptr);
  assign rd_hit   = mem[rptr[PW-1:0]];

  always_ff @(posedge clk250) begin
    if (rst) begin
      wptr    <= '0;
      dropped <= 1'b0;
    end else if (wr) begin
      if (full) begin
        dropped <= 1'b1;
      end else begin
        mem[wptr[PW-1:0]] <= wr_hit;
        wptr <= wptr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk62) begin
    if (rst)                     rptr <= '0;
    else if (rd_pop && rd_valid) rptr <= rptr + 1'b1;
  end

  always_ff @(posedge clk62) begin
    if (rst)           sch_out <= '0;
    else if (sc_latch) sch_out <= sc_cnt;
    else if (sc_shift) sch_out <= sch_in;
  end

endmodule
