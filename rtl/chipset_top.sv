`timescale 1ns/1ps
// chipset_top: the two controller ICs of the isolated DC power supply, side by
// side. The isolation links are external opto-couplers, so they appear as
// ports: clk_out must reach clk_in through the first one, ser_out must reach
// ser_in through the second one. The A/D sample and the reference enter on the
// secondary side, the gate drive d_out leaves the primary side.
module chipset_top
  import ctrl_pkg::*;
#(
  parameter realtime     T_CELL    = 1.3,
  parameter int unsigned DUTY_MAX  = 1003,
  parameter int unsigned REG_PHASE = 8,
  parameter int          KA = 112,
  parameter int          KB = -128,
  parameter int          KC = 32
) (
  // primary side
  input  logic       p_rst_n,
  input  logic       p_start,
  input  logic [1:0] fsel,
  input  logic       ser_in,
  input  logic       prog_we,
  input  lut_sel_e   prog_sel,
  input  logic [3:0] prog_addr,
  input  lut_word_t  prog_data,
  output logic       clk_out,
  output logic       d_out,
  output err_t       e_rx,
  output duty_t      duty_cmd,
  output logic       e_upd,
  output duty_t      duty_run,
  // secondary side
  input  logic       s_rst_n,
  input  logic       clk_in,
  input  logic [7:0] vad,
  input  logic [7:0] vref,
  output logic       ser_out,
  output err_t       e_tx,
  output logic       frame_start
);
  primary_ctrl #(
    .T_CELL(T_CELL), .DUTY_MAX(DUTY_MAX), .REG_PHASE(REG_PHASE),
    .KA(KA), .KB(KB), .KC(KC)
  ) u_primary (
    .rst_n(p_rst_n), .start(p_start), .fsel, .ser_in,
    .prog_we, .prog_sel, .prog_addr, .prog_data,
    .clk_out, .d_out, .e_rx, .duty_cmd, .e_upd, .duty_run
  );

  secondary_ctrl u_secondary (
    .clk_in, .rst_n(s_rst_n), .vad, .vref, .ser_out, .e_tx, .frame_start
  );
endmodule
