`timescale 1ns/1ps
// ctrl_pkg: constants and helper functions shared by the two controller ICs.
//
// The error signal e[n] is a 4-bit code. On the isolation link it travels in a
// 16-bit frame: start sequence 0101, the 4 error bits each repeated twice, and
// stop sequence 1010, sent most significant bit first, one bit per system clock,
// so exactly one frame per switching period (16 system clocks). Doubling the
// data bits keeps the alternating 0101 pattern out of the data field.
package ctrl_pkg;

  localparam int unsigned ERR_W    = 4;   // error signal width
  localparam int unsigned EXT_W    = 8;   // expanded (doubled) error width
  localparam int unsigned FRAME_W  = 16;  // serial word length = system clocks per period
  localparam int unsigned RX_W     = 12;  // receiver shift register length
  localparam int unsigned DUTY_W   = 10;  // DPWM duty command width
  localparam int unsigned LUT_W    = 14;  // regulator look-up table word width
  localparam int unsigned LUT_WORDS = 16; // regulator look-up table depth

  localparam logic [3:0] START_SEQ = 4'b0101;
  localparam logic [3:0] STOP_SEQ  = 4'b1010;

  typedef logic [ERR_W-1:0]   err_t;
  typedef logic [DUTY_W-1:0]  duty_t;
  typedef logic signed [LUT_W-1:0] lut_word_t;

  // Which regulator table a programming write goes to.
  typedef enum logic [1:0] {
    LUT_A = 2'd0,   // weight of e[n]
    LUT_B = 2'd1,   // weight of e[n-1]
    LUT_C = 2'd2    // weight of e[n-2]
  } lut_sel_e;

  // Fig. 4 expansion: e3 e2 e1 e0 -> e3 e3 e2 e2 e1 e1 e0 e0.
  function automatic logic [EXT_W-1:0] expand_err(input err_t e);
    logic [EXT_W-1:0] x;
    for (int i = 0; i < ERR_W; i++) begin
      x[2*i]   = e[i];
      x[2*i+1] = e[i];
    end
    return x;
  endfunction

  // Fig. 4 compression: keep the upper bit of each doubled pair.
  function automatic err_t compress_err(input logic [EXT_W-1:0] x);
    err_t e;
    for (int i = 0; i < ERR_W; i++) e[i] = x[2*i+1];
    return e;
  endfunction

  // True when every doubled pair holds two equal bits.
  function automatic logic pairs_consistent(input logic [EXT_W-1:0] x);
    logic ok;
    ok = 1'b1;
    for (int i = 0; i < ERR_W; i++) ok &= (x[2*i] == x[2*i+1]);
    return ok;
  endfunction

  // Complete transmit frame for an error code.
  function automatic logic [FRAME_W-1:0] make_frame(input err_t e);
    return {START_SEQ, expand_err(e), STOP_SEQ};
  endfunction

endpackage
