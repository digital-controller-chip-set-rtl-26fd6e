`timescale 1ns/1ps
// serial_tx: serial transmitter of the secondary-side IC.
//
// Each rising edge of the system clock clk (received through the first
// opto-coupler) the error code is expanded to 8 bits (every bit doubled) and
// written, framed by the start sequence 0101 and the stop sequence 1010, into a
// 16-bit buffer register. A 16-bit circular shift register, clocked on the
// falling edge of clk, rotates left and drives ser_out from its most significant
// bit; the bit leaving the top is fed back in at the bottom. When the comparator
// sees the shift register aligned on a frame boundary (the start sequence in the
// top four bits) the previous word has been sent completely, and the register
// is reloaded from the buffer instead of rotating. One word therefore leaves
// every 16 system clocks, i.e. once per switching period.
//
// Follows the document: bit doubling, framing, 16-bit buffer, circular shift
// register reloaded by a start-sequence comparator, falling-edge shift clock.
// This design's own choices: the comparator also checks that the bottom four
// bits hold the stop sequence, because with only four bits a last data bit of 0
// followed by 101 of the stop sequence would also read 0101; the reload writes
// the new word already rotated by one place, since the first start bit (always
// 0) is on ser_out in the cycle of the reload; reset loads the frame of error
// code 0000.
module serial_tx
  import ctrl_pkg::*;
(
  input  logic clk,      // system clock, 16 x switching frequency
  input  logic rst_n,    // asynchronous active-low reset
  input  err_t e,        // error code to send
  output logic ser_out,  // serial data to the second opto-coupler
  output logic word_load // one clk cycle wide: shift register reloaded
);
  logic [FRAME_W-1:0] buf_q;   // 16-bit buffer register
  logic [FRAME_W-1:0] sr_q;    // circular shift register
  logic               aligned;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) buf_q <= make_frame('0);
    else        buf_q <= make_frame(e);
  end

  assign aligned = (sr_q[FRAME_W-1 -: 4] == START_SEQ) && (sr_q[3:0] == STOP_SEQ);

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n)       sr_q <= make_frame('0);
    else if (aligned) sr_q <= {buf_q[FRAME_W-2:0], buf_q[FRAME_W-1]};
    else              sr_q <= {sr_q[FRAME_W-2:0], sr_q[FRAME_W-1]};
  end

  assign ser_out   = sr_q[FRAME_W-1];
  assign word_load = aligned;
endmodule
