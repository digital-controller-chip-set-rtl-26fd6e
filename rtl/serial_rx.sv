`timescale 1ns/1ps
// serial_rx: serial data receiver of the primary-side IC.
//
// ser_in (from the second opto-coupler) is sampled on every rising edge of the
// system clock into a 12-bit shift register, entering at bit 0. When the four
// oldest bits r[11:8] hold the start sequence 0101, the comparator raises the
// update signal uc, and on the next rising edge the compress error register
// takes the 8 data bits r[7:0] and keeps one bit of each doubled pair, giving
// the 4-bit error e[n] again. uc_out pulses for one clock when e changes hands.
//
// Follows the document: 12-bit register, comparator on r[11:8] against 0101,
// compression of Fig. 4. This design's own choices: uc is also required to see
// four equal pairs in r[7:0]; without it the last data bit 0 followed by 101 of
// the stop sequence would be taken for a start sequence and a wrong code would
// be written for a few clocks. Reset clears e to 0000 (output above the window),
// so the regulator does not raise the duty ratio before real data arrive.
module serial_rx
  import ctrl_pkg::*;
(
  input  logic clk,     // system clock, 16 x switching frequency
  input  logic rst_n,   // asynchronous active-low reset
  input  logic ser_in,  // serial data from the opto-coupler
  output err_t e,       // reconstructed error signal e[n]
  output logic uc_out   // compress register updated this cycle
);
  logic [RX_W-1:0] r_q;
  logic            uc;

  assign uc = (r_q[RX_W-1 -: 4] == START_SEQ) && pairs_consistent(r_q[EXT_W-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q    <= '0;
      e      <= '0;
      uc_out <= 1'b0;
    end else begin
      r_q    <= {r_q[RX_W-2:0], ser_in};
      uc_out <= uc;
      if (uc) e <= compress_err(r_q[EXT_W-1:0]);
    end
  end
endmodule
