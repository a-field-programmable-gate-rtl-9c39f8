// output_buffer: event buffer between the time window and the bus.
//
// A first-word-fall-through FIFO of hit words. The readout chain writes
// through a valid/ready handshake, so a full buffer stalls the chain and,
// through it, the circular buffer copy, and no hit is lost. The bus side
// sees the oldest word on rd_hit whenever rd_valid is high and removes it
// with rd_pop. The buffer's existence and place follow the published block
// diagram; its 512-word depth and FIFO form are choices of this design.
module output_buffer
  import tdc_pkg::*;
#(
  parameter int DEPTH = 512
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   wr_valid,
  input  hit_t                   wr_hit,
  output logic                   wr_ready,
  output logic                   rd_valid,
  output hit_t                   rd_hit,
  input  logic                   rd_pop,
  output logic [$clog2(DEPTH):0] count
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int AW = $clog2(DEPTH);

  hit_t        mem [DEPTH];
  logic [AW:0] wptr, rptr;
  logic        do_wr, do_rd;

  assign count    = wptr - rptr;
  assign wr_ready = count != (AW+1)'(DEPTH);
  assign rd_valid = count != '0;
  assign rd_hit   = mem[rptr[AW-1:0]];
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_pop && rd_valid;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_hit;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

endmodule
