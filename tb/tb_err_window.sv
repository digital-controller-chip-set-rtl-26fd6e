`timescale 1ns/1ps
// tb_err_window: exhaustive check of the error window against a reference
// model: for every reference and every sample, e = clamp(vref + 7 - vad, 0, 15).
module tb_err_window;
  import ctrl_pkg::*;
  logic [7:0] vad, vref;
  err_t e;
  int checks = 0, failures = 0;

  err_window dut (.vad, .vref, .e);

  initial begin
    for (int r = 0; r < 256; r += 5) begin
      for (int v = 0; v < 256; v++) begin
        int exp;
        vref = 8'(r); vad = 8'(v);
        #1;
        exp = r + 7 - v;
        if (exp < 0) exp = 0;
        if (exp > 15) exp = 15;
        checks++;
        if (int'(e) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL vref=%0d vad=%0d e=%0d exp=%0d", r, v, e, exp);
        end
      end
    end
    // the end points named for the window
    vref = 8'd128; vad = 8'd120; #1; checks++; if (e != 4'b1111) failures++;
    vad = 8'd135; #1; checks++; if (e != 4'b0000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
