// circ_buffer: trigger-latency memory shared by a group of four channels.
//
// A 256-word memory is organised, by the mode register, as 2, 4 or 8
// circular buffers ("pipelines") of 128, 64 or 32 words. One word is written
// every 16 ns (62.5 MHz) into the current pipeline, holding the hit that the
// channel group delivered in that cycle or an empty word, so a pipeline
// always holds the last 2048, 1024 or 512 ns of hits. On a trigger the write
// pointer moves to the start of the next pipeline, and the pipeline just
// filled is read out oldest word first, one word per cycle; valid hits are
// offered on rd_* and wait for rd_ready, empty words are skipped. This
// copy-in-progress (busy) lasts at least the pipeline length. The
// organisations, lengths and switching rule are the published ones; the
// 256-word depth follows from them at one word per 16 ns. Choices of this
// design: a trigger is taken only while idle, the memory is cleared word by
// word for 256 cycles after reset (init_done low meanwhile, hits dropped),
// and the memory is read asynchronously.
module circ_buffer
  import tdc_pkg::*;
#(
  parameter int DEPTH = 256
) (
  input  logic     clk62,
  input  logic     rst,
  input  cb_mode_e mode,
  input  logic     wr_valid,
  input  hit_t     wr_hit,
  input  logic     trig,
  output logic     rd_valid,
  output hit_t     rd_hit,
  input  logic     rd_ready,
  output logic     busy,
  output logic     init_done
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int AW = $clog2(DEPTH);

  typedef struct packed {
    logic valid;
    hit_t hit;
  } word_t;

  word_t        mem [DEPTH];
  logic [AW:0]  init_cnt;
  logic [2:0]   wpipe, rpipe;
  logic [AW-1:0] woff, roff;     // offsets inside a pipeline
  logic [AW-1:0] rleft;          // words left to read, minus one
  logic [AW-1:0] off_mask;
  logic [2:0]    pipe_mask;
  int unsigned   off_bits;
  logic [AW-1:0] waddr, raddr;
  word_t         rword;
  logic          advance;

  always_comb begin
    unique case (mode)
      CB_4X1024: begin off_bits = AW - 2; pipe_mask = 3'd3; end
      CB_8X512:  begin off_bits = AW - 3; pipe_mask = 3'd7; end
      default:   begin off_bits = AW - 1; pipe_mask = 3'd1; end
    endcase
    off_mask = AW'((1 << off_bits) - 1);
  end

  assign waddr     = AW'({5'd0, wpipe} << off_bits) | woff;
  assign raddr     = AW'({5'd0, rpipe} << off_bits) | roff;
  assign init_done = init_cnt[AW];
  assign rword     = mem[raddr];
  assign rd_valid  = busy && rword.valid;
  assign rd_hit    = rword.hit;
  assign advance   = busy && (!rword.valid || rd_ready);

  always_ff @(posedge clk62) begin
    if (!init_done)
      mem[init_cnt[AW-1:0]] <= '0;
    else
      mem[waddr] <= '{valid: wr_valid, hit: wr_hit};
  end

  always_ff @(posedge clk62) begin
    if (rst) begin
      init_cnt <= '0;
      wpipe    <= '0;
      woff     <= '0;
      rpipe    <= '0;
      roff     <= '0;
      rleft    <= '0;
      busy     <= 1'b0;
    end else if (!init_done) begin
      init_cnt <= init_cnt + 1'b1;
    end else begin
      if (trig && !busy) begin
        wpipe <= (wpipe + 3'd1) & pipe_mask;
        woff  <= '0;
        rpipe <= wpipe;
        roff  <= (woff + 1'b1) & off_mask;
        rleft <= off_mask;
        busy  <= 1'b1;
      end else begin
        woff <= (woff + 1'b1) & off_mask;
        if (advance) begin
          roff  <= (roff + 1'b1) & off_mask;
          rleft <= rleft - 1'b1;
          if (rleft == '0) busy <= 1'b0;
        end
      end
    end
  end

endmodule
