// tdc_pkg: types and constants shared by the 64-channel multi-hit TDC.
//
// A hit word carries the global channel number, the edge polarity, the
// 11-bit coarse time (4 ns LSB) and the 4-bit fine time code (0..8, one
// unit per 450 ps delay tap). The channel count, the 11-bit coarse counter,
// the fine code range and the three circular-buffer organisations are the
// ones of the published firmware; the packing of the word, the polarity bit
// and the configuration record layout are choices of this design.
package tdc_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NCH      = 64;   // channels per module
  localparam int TAPS     = 9;    // delay taps per channel (Delay9ph)
  localparam int TC_W     = 11;   // coarse time counter width, TC[10:0]
  localparam int TCHI_W   = 9;    // TC[10:2], counted at 62.5 MHz
  localparam int FINE_W   = 4;    // fine code 0..8
  localparam int CH_W     = 6;    // global channel number
  localparam int MHE_W    = 6;    // multi-hit elimination window setting
  localparam int SC_W     = 8;    // per-channel scaler counter
  localparam int SCT_W    = 32;   // scaler total
  localparam int SC_BANKS = 8;    // selectable scaler buffers

  typedef struct packed {
    logic [CH_W-1:0]   ch;    // global channel number 0..63
    logic              pol;   // 1: rising edge, 0: falling edge
    logic [TC_W-1:0]   tc;    // coarse time, 4 ns units
    logic [FINE_W-1:0] fine;  // fine time code, 0..8
  } hit_t;

  localparam int HIT_W = $bits(hit_t);

  // Circular buffer organisation of the 256-word hit memory.
  typedef enum logic [1:0] {
    CB_2X2048 = 2'd0,   // 2 pipelines of 128 words (2048 ns)
    CB_4X1024 = 2'd1,   // 4 pipelines of  64 words (1024 ns)
    CB_8X512  = 2'd2    // 8 pipelines of  32 words ( 512 ns)
  } cb_mode_e;

  typedef struct packed {
    logic              mhe_en;      // multi-hit elimination on
    logic              mhe_update;  // 1: updating mode, 0: non-updating
    logic [MHE_W-1:0]  mhe_win;     // window = 16 ns + 4 ns * mhe_win
    cb_mode_e          cb_mode;     // circular buffer organisation
    logic [2:0]        sc_bank;     // scaler buffer that accumulates
    logic [TC_W-1:0]   tw_lo;       // time window, trigger time minus hit time,
    logic [TC_W-1:0]   tw_hi;       //   inclusive bounds in 4 ns units
  } tdc_cfg_t;

  // Register word addresses on the local bus.
  localparam logic [3:0] REG_CTRL   = 4'd0;
  localparam logic [3:0] REG_TWIN   = 4'd1;
  localparam logic [3:0] REG_STATUS = 4'd2;
  localparam logic [3:0] REG_OUT    = 4'd3;
  localparam logic [3:0] REG_SCADDR = 4'd4;
  localparam logic [3:0] REG_SCDATA = 4'd5;
  localparam logic [3:0] REG_EVCNT  = 4'd6;
  localparam logic [3:0] REG_TWOUT  = 4'd7;

endpackage
