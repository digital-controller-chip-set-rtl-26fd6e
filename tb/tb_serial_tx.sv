`timescale 1ns/1ps
// tb_serial_tx: checks the serial transmitter. The bit stream on ser_out is
// collected on rising clock edges and cut at each frame start; every frame
// must be exactly 16 bits, equal to 0101, the doubled error bits, 1010, and
// carry the error code that was applied during the previous frame. Frame
// spacing of 16 clocks (one switching period) is checked for every frame,
// including error codes whose last bit is 0.
module tb_serial_tx;
  import ctrl_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  err_t e = '0;
  logic ser_out, word_load;
  int checks = 0, failures = 0;
  logic [15:0] shreg;
  int nbits = 0;
  int last_load = -1, cyc = 0;

  serial_tx dut (.clk, .rst_n, .e, .ser_out, .word_load);

  always #5 clk = ~clk;

  function automatic logic [15:0] ref_frame(input err_t v);
    return {4'b0101, v[3], v[3], v[2], v[2], v[1], v[1], v[0], v[0], 4'b1010};
  endfunction

  // collect serial bits on rising edges
  always @(posedge clk) if (rst_n) begin
    cyc++;
    shreg = {shreg[14:0], ser_out};
    nbits++;
  end

  // assert the asynchronous reset just after time 0 so that it is an edge
  initial #0.001 rst_n = 1'b0;

  initial begin
    err_t sent;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // align to a frame start: first time the last 16 bits form a valid frame
    for (int k = 0; k < 40; k++) begin
      e = err_t'(k % 16);
      repeat (16) @(posedge clk);
    end
    // now check frame by frame: hold e for a whole frame, check the next frame
    @(posedge word_load);
    @(posedge clk);   // first bit of the frame sampled here
    for (int k = 0; k < 64; k++) begin
      sent = err_t'($urandom_range(0, 15));
      if (k < 16) sent = err_t'(k);
      e = sent;
      repeat (15) @(posedge clk);
      // frame in progress carries the old value; next frame carries 'sent'
      repeat (16) @(posedge clk);
      #1;
      checks++;
      if (shreg !== ref_frame(sent)) begin
        failures++;
        if (failures < 10) $display("FAIL frame %0d: got %b expected %b", k, shreg, ref_frame(sent));
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // word_load must come exactly every 16 clocks
  always @(negedge clk) if (rst_n && word_load) begin
    if (last_load >= 0) begin
      checks++;
      if (cyc - last_load != 16) begin
        failures++;
        $display("FAIL frame spacing %0d clocks", cyc - last_load);
      end
    end
    last_load = cyc;
  end

  initial begin
    #200_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
