`timescale 1ns/1ps
// secondary_ctrl: secondary-side controller IC.
//
// The 8-bit output-voltage sample from the A/D converter is turned into the
// 4-bit error code against the reference, and the serial transmitter sends it,
// one 16-bit frame per switching period, clocked by the system clock received
// from the primary side through the first opto-coupler.
module secondary_ctrl
  import ctrl_pkg::*;
(
  input  logic       clk_in,   // system clock from the first opto-coupler
  input  logic       rst_n,    // active-low reset
  input  logic [7:0] vad,      // A/D converter sample
  input  logic [7:0] vref,     // digital reference
  output logic       ser_out,  // serial data to the second opto-coupler
  output err_t       e_tx,     // error code being sent (observation)
  output logic       frame_start // a new frame starts on ser_out (observation)
);
  err_window u_err (.vad, .vref, .e(e_tx));

  serial_tx u_tx (.clk(clk_in), .rst_n, .e(e_tx), .ser_out, .word_load(frame_start));
endmodule
