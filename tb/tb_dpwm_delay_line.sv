`timescale 1ns/1ps
// tb_dpwm_delay_line: checks the ring oscillator: after the start pulse, tap k
// rises k block delays after tap 0, every tap is one block delay wide less the flip-flop clock-to-output delay, only one
// tap is high at a time, and inc rises once per turn of 32 block delays, for
// every frequency selection; reset stops the ring.
module tb_dpwm_delay_line;
  localparam realtime TC = 1.3;
  localparam realtime TCQ = 0.05;
  logic rst_n = 1'b1, start = 1'b0;
  logic [1:0] fsel = '0;
  logic [31:0] tap;
  logic inc;
  int checks = 0, failures = 0;
  realtime t_tap[32];
  realtime t_fall0;

  dpwm_delay_line dut (.rst_n, .start, .fsel, .tap, .inc);

  function automatic bit close(input realtime a, input realtime b);
    return (a > b - 0.005) && (a < b + 0.005);
  endfunction

  for (genvar k = 0; k < 32; k++) begin : g_mon
    always @(posedge tap[k]) t_tap[k] = $realtime;
  end
  always @(negedge tap[0]) t_fall0 = $realtime;

  // one-hot (or idle) taps at all times
  bit launched = 1'b0;
  always @(tap) if (launched && $countones(tap) > 1) begin
    failures++;
    $display("FAIL %0d taps high at once at %0.3f: %h", $countones(tap), $realtime, tap);
  end

  // assert the asynchronous reset just after time 0 so that it is an edge
  initial #0.001 rst_n = 1'b0;

  initial begin
    realtime tb, ti0, ti1;
    int ncell;
    #1;
    for (int f = 0; f < 4; f++) begin
      launched = 1'b0;
      rst_n = 1'b0; fsel = 2'(f); #20;
      rst_n = 1'b1; #5;
      start = 1'b1; #0.5; start = 1'b0;
      launched = 1'b1;
      ncell = {30'd0, fsel[0], fsel[1]} + 1;
      tb = TC * ncell;
      repeat (3) @(posedge inc);
      @(posedge inc) ti0 = $realtime;
      @(posedge inc) ti1 = $realtime;
      checks++;
      if (!close(ti1 - ti0, 32 * tb)) begin failures++; $display("FAIL turn %0.3f", ti1 - ti0); end
      @(posedge tap[31]);
      #0.001;
      for (int k = 1; k < 32; k++) begin
        checks++;
        if (!close(t_tap[k] - t_tap[0], k * tb)) begin
          failures++; $display("FAIL fsel=%0d tap %0d at %0.3f", f, k, t_tap[k] - t_tap[0]);
        end
      end
      checks++;
      if (!close(t_fall0 - t_tap[0], tb - TCQ)) begin failures++; $display("FAIL tap width %0.3f", t_fall0 - t_tap[0]); end
    end
    launched = 1'b0;
    rst_n = 1'b0; #5;
    checks++;
    fork
      begin @(posedge inc); failures++; $display("FAIL ring runs in reset"); end
      begin #200; end
    join_any
    disable fork;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
