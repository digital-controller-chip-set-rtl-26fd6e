`timescale 1ns/1ps
// tb_serial_rx: drives the receiver with a continuous stream of 16-bit frames
// (0101, doubled error bits, 1010), one new random code per frame, and checks
// that e[n] takes each code exactly once per frame, 13 clocks after the first
// start bit (12 bits to fill the register plus the compress register), that
// codes ending in 0 do not cause extra updates, and that a stream without the
// start sequence never updates e.
module tb_serial_rx;
  import ctrl_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, ser_in = 1'b1;
  err_t e;
  logic uc_out;
  int checks = 0, failures = 0;
  int n_upd = 0;

  serial_rx dut (.clk, .rst_n, .ser_in, .e, .uc_out);

  always #5 clk = ~clk;
  always @(posedge clk) if (uc_out) n_upd++;

  function automatic logic [15:0] ref_frame(input err_t v);
    return {4'b0101, v[3], v[3], v[2], v[2], v[1], v[1], v[0], v[0], 4'b1010};
  endfunction

  // assert the asynchronous reset just after time 0 so that it is an edge
  initial #0.001 rst_n = 1'b0;

  initial begin
    err_t code;
    logic [15:0] fr;
    int upd_before;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    checks++; if (e != 4'd0) failures++;
    for (int k = 0; k < 80; k++) begin
      code = (k < 16) ? err_t'(k) : err_t'($urandom_range(0, 15));
      fr = ref_frame(code);
      upd_before = n_upd;
      for (int b = 15; b >= 0; b--) begin
        @(negedge clk) ser_in = fr[b];
        // 13th rising edge after the first start bit was applied: e must be new
        if (b == 3) begin
          @(posedge clk); #1;
          checks++;
          if (e !== code) begin
            failures++;
            if (failures < 10) $display("FAIL frame %0d: e=%b expected %b", k, e, code);
          end
        end
      end
      @(posedge clk); #1;
      if (k > 0) begin
        checks++;
        if (n_upd - upd_before != 1) begin
          failures++;
          $display("FAIL frame %0d: %0d updates", k, n_upd - upd_before);
        end
      end
    end
    // a stream without the start sequence (idle high, then low, then high)
    for (int b = 0; b < 16; b++) @(negedge clk) ser_in = 1'b1;
    upd_before = n_upd;
    for (int b = 0; b < 64; b++) @(negedge clk) ser_in = 1'b0;
    for (int b = 0; b < 64; b++) @(negedge clk) ser_in = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (n_upd != upd_before) begin failures++; $display("FAIL update without start sequence"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
