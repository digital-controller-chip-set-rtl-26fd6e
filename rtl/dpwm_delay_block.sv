`timescale 1ns/1ps
// dpwm_delay_block: behavioural model of one programmable delay block of the
// DPWM delay line. Not synthesizable: the real block is a chain of four buffer
// cells I0..I3 whose outputs go to a 4:1 multiplexer, so the signal passes
// through one to four cells. Here each cell is a transport delay of T_CELL.
//
// The multiplexer select lines are wired as in the document's drawing: fsel[1]
// drives select bit S0 and fsel[0] drives S1, so the number of cells passed is
// {fsel[0],fsel[1]} + 1. The cell delay default is the 1.3 ns resolution the
// document quotes for the highest switching frequency.
module dpwm_delay_block #(
  parameter realtime T_CELL = 1.3   // delay of one cell, ns
) (
  input  logic       in,
  input  logic [1:0] fsel,
  output logic       out
);
  logic [3:0] c;   // outputs of cells I0..I3
  logic [1:0] s;   // {S1, S0}

  initial c = '0;

  always @(in)   c[0] <= #(T_CELL) in;
  always @(c[0]) c[1] <= #(T_CELL) c[0];
  always @(c[1]) c[2] <= #(T_CELL) c[1];
  always @(c[2]) c[3] <= #(T_CELL) c[2];

  assign s   = {fsel[0], fsel[1]};
  assign out = c[s];
endmodule
