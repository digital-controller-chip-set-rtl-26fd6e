`timescale 1ns/1ps
// dpwm_ctrl: counter and control logic of the 10-bit hybrid DPWM.
//
// The 10-bit duty command is split: the five upper bits are matched by a 5-bit
// counter that advances once per turn of the ring oscillator (clock inc, 32 x
// switching frequency), the five lower bits pick one of the 32 ring taps through
// a 32:1 multiplexer. A switching period is 32 counter states x 32 taps = 1024
// slots of one delay-block delay each. The output SR latch is set at the start
// of slot 0 (counter 0, tap 0) and reset when the counter equals in[9:5] while
// the selected tap in[4:0] is active, so the output is high for exactly `in`
// slots. A 10-bit NOR of the command holds the output low for duty 0, and the
// active-low master reset (or reset of the chip) holds it low as well.
//
// Timing: the input register takes duty_in at the inc edge that wraps the
// counter from 31 to 0, so a new command acts from the next period on. The
// start-up flip-flop (set once the counter has reached 16) keeps the output low
// during the first, incomplete period after reset. cnt[0] toggles once per ring
// turn and is the system clock at 16 x switching frequency; cnt[4:1] is the
// position within the period, stable at the rising edge of cnt[0].
//
// Follows the document: input register, 5-bit counter, 32:1 multiplexer, 5-bit
// comparator, 10-bit NOR, start-up flip-flop clocked from cnt[4], SR output
// latch, output forced to zero at reset and for a zero command, maximum duty of
// 98 %. This design's own choices: the 98 % limit is a clamp of the command to
// DUTY_MAX = 1003 (98 % of 1024) in the input register; the exact gate network
// of the document's drawing is replaced by the set and reset conditions above.
// The output latch is intentional: it is set and reset by the asynchronous ring
// taps, which is what gives the DPWM its sub-clock resolution.
module dpwm_ctrl
  import ctrl_pkg::*;
#(
  parameter int unsigned DUTY_MAX = 1003   // 98 % of 1024 slots
) (
  input  logic        rst_n,     // active-low master reset
  input  logic        inc,       // internal clock from the last ring stage
  input  logic [31:0] tap,       // ring tap pulses I0..I31
  input  duty_t       duty_in,   // duty command from the regulator
  output logic        pwm,       // gate drive
  output logic [4:0]  cnt,       // counter state
  output duty_t       duty_q     // duty value of the running period
);
  logic started_q;
  logic zero;
  logic hit;
  logic set_c;
  logic rst_c;

  always_ff @(posedge inc or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      duty_q    <= '0;
      started_q <= 1'b0;
    end else begin
      cnt <= cnt + 5'd1;
      if (cnt == 5'd31)
        duty_q <= (duty_in > duty_t'(DUTY_MAX)) ? duty_t'(DUTY_MAX) : duty_in;
      if (cnt[4]) started_q <= 1'b1;
    end
  end

  assign zero  = (duty_q == '0);
  assign hit   = (cnt == duty_q[9:5]) && tap[duty_q[4:0]];
  assign set_c = started_q && !zero && (cnt == 5'd0) && tap[0];
  assign rst_c = !rst_n || zero || hit;

  always_latch begin
    if (rst_c)      pwm = 1'b0;
    else if (set_c) pwm = 1'b1;
  end
endmodule
