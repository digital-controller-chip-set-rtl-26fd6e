`timescale 1ns/1ps
// lut_regulator: programmable look-up-table PID regulator of the primary IC.
//
// The discrete-time control law is the incremental PID form
//   u[n] = u[n-1] + A(e[n]) + B(e[n-1]) + C(e[n-2])
// where A, B and C are three 16-word tables of 14-bit signed words indexed by
// the 4-bit error codes, so no multiplier is needed. u is a 14-bit unsigned
// accumulator holding the duty ratio with 4 fractional bits; it saturates at 0
// and at its maximum, and its upper 10 bits are the duty command for the DPWM.
//
// Timing: one update per switching period, on the rising clk edge where update
// is high; duty changes right after that edge. Tables are written one word per
// clock through the prog_* port. At reset the accumulator is cleared (duty 0),
// the error history is set to the zero-error code and the tables are filled
// with A(i)=KA*(i-7), B(i)=KB*(i-7), C(i)=KC*(i-7), code 7 meaning zero error.
//
// Follows the document: three 14-bit 16-word tables, 4-bit error in, 10-bit
// duty out, programmable. This design's own choices: the incremental PID form
// of the table regulator, the 10.4 fixed-point accumulator with saturation, the
// programming port and the default coefficients.
module lut_regulator
  import ctrl_pkg::*;
#(
  parameter int KA = 112,    // default table A slope, in 1/16 duty LSB per error LSB
  parameter int KB = -128,   // default table B slope
  parameter int KC = 32,    // default table C slope
  parameter int unsigned ERR_ZERO = 7  // error code that means zero error
) (
  input  logic      clk,
  input  logic      rst_n,        // asynchronous active-low reset
  input  logic      update,       // compute a new duty ratio at this edge
  input  err_t      e,            // e[n] from the receiver
  input  logic      prog_we,      // table write enable
  input  lut_sel_e  prog_sel,     // which table
  input  logic [3:0] prog_addr,   // which word
  input  lut_word_t prog_data,    // new 14-bit signed word
  output duty_t     duty          // duty command d[n], 10 bits
);
  localparam int ACC_W = LUT_W;                 // 10 integer + 4 fraction bits
  localparam logic signed [ACC_W+3:0] ACC_MAX = (ACC_W+4)'((1 << ACC_W) - 1);

  lut_word_t lut_a [LUT_WORDS];
  lut_word_t lut_b [LUT_WORDS];
  lut_word_t lut_c [LUT_WORDS];
  err_t              e1_q, e2_q;                // e[n-1], e[n-2]
  logic [ACC_W-1:0]  acc_q;
  logic signed [ACC_W+3:0] sum;                 // wide enough for acc + 3 words

  always_comb begin
    sum = $signed({4'b0000, acc_q}) + (ACC_W+4)'(lut_a[e]) + (ACC_W+4)'(lut_b[e1_q])
        + (ACC_W+4)'(lut_c[e2_q]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LUT_WORDS; i++) begin
        lut_a[i] <= lut_word_t'(KA * (i - int'(ERR_ZERO)));
        lut_b[i] <= lut_word_t'(KB * (i - int'(ERR_ZERO)));
        lut_c[i] <= lut_word_t'(KC * (i - int'(ERR_ZERO)));
      end
    end else if (prog_we) begin
      unique case (prog_sel)
        LUT_A:   lut_a[prog_addr] <= prog_data;
        LUT_B:   lut_b[prog_addr] <= prog_data;
        LUT_C:   lut_c[prog_addr] <= prog_data;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      e1_q  <= err_t'(ERR_ZERO);
      e2_q  <= err_t'(ERR_ZERO);
    end else if (update) begin
      if (sum < 0)              acc_q <= '0;
      else if (sum > ACC_MAX)   acc_q <= ACC_MAX[ACC_W-1:0];
      else                      acc_q <= sum[ACC_W-1:0];
      e1_q <= e;
      e2_q <= e1_q;
    end
  end

  assign duty = acc_q[ACC_W-1 -: DUTY_W];
endmodule
