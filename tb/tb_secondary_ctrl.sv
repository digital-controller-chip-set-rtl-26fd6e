`timescale 1ns/1ps
// tb_secondary_ctrl: secondary-side IC end to end. Output-voltage samples are
// held for two frames each; the frame received after the change must carry
// clamp(vref + 7 - vad, 0, 15), expanded and framed. Both saturation ends of
// the window are exercised, and frames must come every 16 clocks.
module tb_secondary_ctrl;
  import ctrl_pkg::*;
  logic clk_in = 1'b0, rst_n = 1'b1;
  logic [7:0] vad = 8'd128, vref = 8'd128;
  logic ser_out, frame_start;
  err_t e_tx;
  int checks = 0, failures = 0, n_sat_lo = 0, n_sat_hi = 0;
  logic [15:0] shreg;

  secondary_ctrl dut (.clk_in, .rst_n, .vad, .vref, .ser_out, .e_tx, .frame_start);

  always #78 clk_in = ~clk_in;   // 6.4 MHz system clock (400 kHz x 16)

  always @(posedge clk_in) shreg <= {shreg[14:0], ser_out};

  function automatic logic [15:0] ref_frame(input int v, input int r);
    int c;
    logic [3:0] x;
    c = r + 7 - v;
    if (c < 0) c = 0;
    if (c > 15) c = 15;
    x = 4'(c);
    return {4'b0101, x[3], x[3], x[2], x[2], x[1], x[1], x[0], x[0], 4'b1010};
  endfunction

  // assert the asynchronous reset just after time 0 so that it is an edge
  initial #0.001 rst_n = 1'b0;

  initial begin
    int v, r;
    repeat (3) @(posedge clk_in);
    rst_n = 1'b1;
    @(posedge frame_start);
    @(posedge clk_in);
    for (int k = 0; k < 120; k++) begin
      r = (k < 60) ? 128 : $urandom_range(20, 230);
      v = (k < 40) ? r - 10 + k / 2 : r + $urandom_range(0, 30) - 15;
      if (k == 100) v = 0;
      if (k == 101) v = 255;
      vad = 8'(v); vref = 8'(r);
      if (r + 7 - v <= 0) n_sat_lo++;
      if (r + 7 - v >= 15) n_sat_hi++;
      repeat (31) @(posedge clk_in);
      #1;
      checks++;
      if (shreg !== ref_frame(v, r)) begin
        failures++;
        if (failures < 10) $display("FAIL vad=%0d vref=%0d frame %b expected %b", v, r, shreg, ref_frame(v, r));
      end
      @(posedge clk_in);
    end
    checks++;
    if (n_sat_lo == 0 || n_sat_hi == 0) begin failures++; $display("FAIL window ends not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
