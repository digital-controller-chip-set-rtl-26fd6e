`timescale 1ns/1ps
// primary_ctrl: primary-side controller IC.
//
// The DPWM runs from its own ring oscillator and provides the system clock
// clk_out (16 x switching frequency), which is sent to the secondary side and
// also clocks the serial receiver and the regulator here. The receiver rebuilds
// e[n] from ser_in; once per switching period, when the period position reaches
// REG_PHASE, the regulator computes a new 10-bit duty command, which the DPWM
// takes at the start of the next period. The gate drive d_out is the DPWM output.
//
// Follows the document: receiver -> regulator -> DPWM chain, system clock from
// the DPWM, frequency select fsel[1:0], programmable regulator. This design's
// own choices: the regulator update point REG_PHASE (mid-period), the table
// programming port, and the reset/start inputs that stand for the on-chip
// power-on reset-start circuit.
module primary_ctrl
  import ctrl_pkg::*;
#(
  parameter realtime     T_CELL    = 1.3,
  parameter int unsigned DUTY_MAX  = 1003,
  parameter int unsigned REG_PHASE = 8,
  parameter int          KA = 112,
  parameter int          KB = -128,
  parameter int          KC = 32
) (
  input  logic       rst_n,      // active-low master reset
  input  logic       start,      // ring oscillator launch pulse
  input  logic [1:0] fsel,       // switching frequency select
  input  logic       ser_in,     // serial error data from the secondary side
  input  logic       prog_we,    // regulator table programming
  input  lut_sel_e   prog_sel,
  input  logic [3:0] prog_addr,
  input  lut_word_t  prog_data,
  output logic       clk_out,    // system clock to the secondary side
  output logic       d_out,      // gate drive
  output err_t       e_rx,       // received error (observation)
  output duty_t      duty_cmd,   // regulator output (observation)
  output logic       e_upd,      // receiver updated e_rx (observation)
  output duty_t      duty_run    // duty of the running period (observation)
);
  logic       clk_sys;
  logic [3:0] phase;

  dpwm #(.T_CELL(T_CELL), .DUTY_MAX(DUTY_MAX)) u_dpwm (
    .rst_n, .start, .fsel, .duty_in(duty_cmd), .pwm(d_out), .clk_sys, .phase, .duty_q(duty_run)
  );

  serial_rx u_rx (
    .clk(clk_sys), .rst_n, .ser_in, .e(e_rx), .uc_out(e_upd)
  );

  lut_regulator #(.KA(KA), .KB(KB), .KC(KC)) u_reg (
    .clk(clk_sys), .rst_n, .update(phase == 4'(REG_PHASE)), .e(e_rx),
    .prog_we, .prog_sel, .prog_addr, .prog_data, .duty(duty_cmd)
  );

  assign clk_out = clk_sys;
endmodule
