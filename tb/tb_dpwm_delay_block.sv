`timescale 1ns/1ps
// tb_dpwm_delay_block: checks that a delay block delays rising and falling
// edges by 1..4 cell delays, the count being {fsel[0], fsel[1]} + 1.
module tb_dpwm_delay_block;
  localparam realtime TC = 1.3;
  logic in = 1'b0;
  logic [1:0] fsel = '0;
  logic out;
  int checks = 0, failures = 0;

  dpwm_delay_block dut (.in, .fsel, .out);

  initial begin
    realtime t0, t1;
    int n;
    #20;
    for (int f = 0; f < 4; f++) begin
      fsel = 2'(f);
      n = int'({fsel[0], fsel[1]}) + 1;
      #20;
      t0 = $realtime; in = 1'b1;
      @(posedge out) t1 = $realtime;
      checks++;
      if (t1 - t0 < n * TC - 0.001 || t1 - t0 > n * TC + 0.001) begin
        failures++; $display("FAIL fsel=%0d rise delay %0.3f", f, t1 - t0);
      end
      #20;
      t0 = $realtime; in = 1'b0;
      @(negedge out) t1 = $realtime;
      checks++;
      if (t1 - t0 < n * TC - 0.001 || t1 - t0 > n * TC + 0.001) begin
        failures++; $display("FAIL fsel=%0d fall delay %0.3f", f, t1 - t0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
