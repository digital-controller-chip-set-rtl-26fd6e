`timescale 1ns/1ps
// dpwm_delay_line: behavioural model of the DPWM ring oscillator. Not
// synthesizable: it is a hand-built asynchronous delay line.
//
// Thirty-two stages form a ring. Each stage is a flip-flop with D tied high,
// clocked by the edge arriving from the previous stage, followed by a
// programmable delay block. A stage sets when the wave reaches it, and clears
// itself when its own delay block output rises, so tap[k] is a pulse one block
// delay Tb wide, starting k*Tb after the wave entered stage 0. The last delay
// block output closes the ring into stage 0 and is also the internal clock inc
// that advances the DPWM counter: one turn of the ring takes 32*Tb, one
// switching period is 32 turns, 1024*Tb.
//
// start (from the power-on reset-start circuit) launches the wave; while start
// is high the stage-to-stage path is blocked, as in the document's drawing
// where start is inverted and gated with each delay block output. rst_n clears
// all stages. Which net clears each stage is not printed in the document; the
// self-clearing wiring is this design's choice.
//
// The tap outputs rise T_CQ after their stage sets and the counter clock inc
// follows the last block output by T_CQ/2. This ordering (tap 31 falls, the
// counter advances, tap 0 rises) is what the control logic needs so that no tap
// is ever seen together with a counter value of the wrong turn; it models the
// clock-to-output delay of the stage flip-flops. Tap k is active from
// k*Tb + T_CQ to (k+1)*Tb.
//
// Synthesis sees this ring as a logic loop through the stage flip-flops'
// clear inputs, and the delays vanish there; the loop is the oscillator
// itself and stays as it is.
module dpwm_delay_line #(
  parameter int unsigned N_STAGES = 32,
  parameter realtime     T_CELL   = 1.3,
  parameter realtime     T_CQ     = 0.05   // stage flip-flop clock-to-output delay, ns
) (
  input  logic                rst_n,
  input  logic                start,
  input  logic [1:0]          fsel,
  output logic [N_STAGES-1:0] tap,
  output logic                inc
);
  logic [N_STAGES-1:0] q;       // stage flip-flops
  logic [N_STAGES-1:0] dly;     // delay block outputs
  logic [N_STAGES-1:0] edge_in; // clock of each stage flip-flop

  assign edge_in[0] = start | dly[N_STAGES-1];

  for (genvar k = 0; k < N_STAGES; k++) begin : g_stage
    if (k > 0) begin : g_and
      assign edge_in[k] = dly[k-1] & ~start;
    end

    logic q_st;   // this stage's flip-flop
    logic clr;    // its clear: chip reset or its own delayed output

    assign clr = !rst_n || dly[k];

    always @(posedge edge_in[k] or posedge clr) begin
      if (clr) q_st <= 1'b0;
      else     q_st <= 1'b1;
    end

    // tap output: rises T_CQ after the stage sets, falls when it clears
    logic q_cq;   // stage state delayed by T_CQ
    always @(q_st) q_cq <= #(T_CQ) q_st;

    assign q[k]   = q_st;
    assign tap[k] = q_st & q_cq;

    dpwm_delay_block #(.T_CELL(T_CELL)) u_blk (
      .in  (q[k]),
      .fsel(fsel),
      .out (dly[k])
    );
  end

  // the counter clock follows the last block output by half the clock-to-output
  // delay: after tap 31 has fallen and before tap 0 rises
  always @(dly[N_STAGES-1]) inc <= #(T_CQ / 2) dly[N_STAGES-1];
endmodule
