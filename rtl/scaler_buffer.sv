// scaler_buffer: accumulates the per-channel hit counts into 32-bit totals.
//
// Every 2048 ns (128 cycles of 62.5 MHz, timed by TC[8:2]) all 64 channel
// counters are copied into their scaler registers and restarted (sc_latch).
// The following 128 cycles take the channels one at a time from the end of
// the scaler shift chain, two cycles each: in the first the running total of
// the channel is read from the buffer memory, in the second the 8-bit count is
// added (the adder) and written back, and the chain shifts by one channel
// (sc_shift). The memory holds 8 buffers of 64 totals; the register-selected
// buffer accumulates, and the selection is taken at the start of each
// 2048 ns sweep. A second read port lets the bus read any total. The 2048 ns
// sweep, the 8-bit counters, the adder, the 32-bit totals and the 8 buffers
// are the published scheme; the two-cycle read-add-write sequence, the order
// of channels and the 512-cycle clear of the memory after reset (no
// accumulation until init_done) are choices of this design.
// Only TC[8:2] times the sweep, so the top two bits of tc_hi are unused;
// sc_latch is decoded from tc_hi alone and so follows an input directly.
module scaler_buffer
  import tdc_pkg::*;
#(
  parameter int NCHAN = NCH,
  parameter int BANKS = SC_BANKS
) (
  input  logic                                  clk62,
  input  logic                                  rst,
  input  logic [TCHI_W-1:0]                     tc_hi,
  input  logic [$clog2(BANKS)-1:0]              bank,
  input  logic [SC_W-1:0]                       sch_in,
  output logic                                  sc_latch,
  output logic                                  sc_shift,
  input  logic [$clog2(BANKS*NCHAN)-1:0]        rd_addr,   // {bank, channel}
  output logic [SCT_W-1:0]                      rd_data,   // one cycle later
  output logic                                  init_done
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int CW = $clog2(NCHAN);
  localparam int BW = $clog2(BANKS);
  localparam int AW = CW + BW;
  localparam int PW = CW + 1;          // sweep phase: 2 cycles per channel

  logic [SCT_W-1:0] mem [BANKS*NCHAN];
  logic [PW-1:0]    ph;
  logic [CW-1:0]    ch;
  logic [BW-1:0]    bank_q;
  logic [AW:0]      init_cnt;
  logic [SCT_W-1:0] total;
  logic [AW-1:0]    acc_addr;

  assign ph        = tc_hi[PW-1:0];
  assign ch        = ph[PW-1:1];
  assign sc_latch  = (ph == '1);
  assign sc_shift  = ph[0];
  assign init_done = init_cnt[AW];
  assign acc_addr  = {bank_q, ch};

  always_ff @(posedge clk62) begin
    if (rst) begin
      init_cnt <= '0;
      bank_q   <= '0;
    end else begin
      if (!init_done) init_cnt <= init_cnt + 1'b1;
      if (sc_latch)   bank_q   <= bank;
    end
  end

  always_ff @(posedge clk62) begin
    if (!init_done)     mem[init_cnt[AW-1:0]] <= '0;
    else if (ph[0])     mem[acc_addr] <= total + SCT_W'(sch_in);
    if (!ph[0])         total <= mem[acc_addr];
    rd_data <= mem[rd_addr];
  end

endmodule
