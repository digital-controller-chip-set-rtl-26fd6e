`timescale 1ns/1ps
// err_window: forms the 4-bit digital error signal e[n] of the secondary-side IC.
//
// The A/D converter sample vad (8 bits) is compared with the digital reference
// vref. Inside the window vref-8 .. vref+7 LSB the error code falls by one per
// LSB of output voltage: e = vref + 7 - vad, so vad = vref-8 gives 1111 and
// vad = vref+7 gives 0000, and vad = vref gives 0111. Outside the window the code
// saturates: 0000 for higher voltages, 1111 for lower ones. This characteristic
// and its end points follow the document; the exact offset of the code at vref
// (0111) is this design's reading of the end points.
//
// Purely combinational; the serial transmitter registers the result.
module err_window
  import ctrl_pkg::*;
(
  input  logic [7:0] vad,   // A/D converter sample of the output voltage
  input  logic [7:0] vref,  // digital reference
  output err_t       e      // error code, 0 (too high) .. 15 (too low)
);
  logic signed [9:0] diff;  // vref + 7 - vad, range -248 .. 262

  always_comb begin
    diff = $signed({2'b00, vref}) + 10'sd7 - $signed({2'b00, vad});
    if (diff < 0)        e = 4'd0;
    else if (diff > 15)  e = 4'd15;
    else                 e = err_t'(diff[3:0]);
  end
endmodule
