`timescale 1ns/1ps
// dpwm: 10-bit digital pulse-width modulator with programmable switching
// frequency, as used on the primary-side IC.
//
// A 32-stage ring oscillator (dpwm_delay_line, a behavioural model of the
// hand-built delay line) supplies 32 tap pulses per turn and the internal clock
// inc; dpwm_ctrl counts turns and sets and resets the output latch. The
// switching period is 1024 delay-block delays; fsel chooses 1 to 4 cells per
// block, i.e. four switching frequencies (about 750, 375, 250 and 188 kHz with
// 1.3 ns cells). The DPWM also delivers the system clock clk_sys = cnt[0] at
// 16 x switching frequency and the period position phase = cnt[4:1].
//
// start must be a pulse shorter than one block delay; it launches the ring once
// after reset (in the chip it comes from the power-on reset-start circuit).
// The logic loop (the ring) and the output latch that synthesis reports here
// are intended: they are the oscillator and the high-resolution SR output.
module dpwm
  import ctrl_pkg::*;
#(
  parameter realtime     T_CELL   = 1.3,
  parameter int unsigned DUTY_MAX = 1003
) (
  input  logic       rst_n,
  input  logic       start,
  input  logic [1:0] fsel,
  input  duty_t      duty_in,
  output logic       pwm,
  output logic       clk_sys,
  output logic [3:0] phase,
  output duty_t      duty_q
);
  logic [31:0] tap;
  logic        inc;
  logic [4:0]  cnt;

  dpwm_delay_line #(.N_STAGES(32), .T_CELL(T_CELL)) u_line (
    .rst_n, .start, .fsel, .tap, .inc
  );

  dpwm_ctrl #(.DUTY_MAX(DUTY_MAX)) u_ctrl (
    .rst_n, .inc, .tap, .duty_in, .pwm, .cnt, .duty_q
  );

  assign clk_sys = cnt[0];
  assign phase   = cnt[4:1];
endmodule
