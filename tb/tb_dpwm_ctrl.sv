`timescale 1ns/1ps
// tb_dpwm_ctrl: drives the DPWM control logic with an ideal ring made in the
// testbench: 32 tap pulses of 1 ns each per turn, the counter clock inc rising
// at the start of tap 0. Checks the output high time in slots (the command,
// clamped to 1003), zero output for a zero command, no pulse during the first
// period after reset, a period of 1024 slots, and that a new command only acts
// from the period after the counter wraps.
module tb_dpwm_ctrl;
  import ctrl_pkg::*;
  logic rst_n = 1'b1, inc = 1'b0;
  logic [31:0] tap = '0;
  duty_t duty_in = '0, duty_q;
  logic pwm;
  logic [4:0] cnt;
  int checks = 0, failures = 0;
  realtime t_rise = 0, t_fall = 0, t_prev_rise = 0;
  int n_rise = 0;
  bit running = 1'b0;

  dpwm_ctrl dut (.rst_n, .inc, .tap, .duty_in, .pwm, .cnt, .duty_q);

  // ideal ring: slot of 1 ns per tap
  // assert the asynchronous reset just after time 0 so that it is an edge
  initial #0.001 rst_n = 1'b0;

  initial begin
    wait (running);
    forever begin
      // per slot: previous tap falls, counter clock (slot 0 only), tap rises
      for (int k = 0; k < 32; k++) begin
        tap = '0;
        #0.02 inc = (k == 0);
        #0.03 tap = 32'd1 << k;
        #0.45 inc = 1'b0;
        #0.5;
      end
    end
  end

  always @(posedge pwm) begin t_prev_rise = t_rise; t_rise = $realtime; n_rise++; end
  always @(negedge pwm) t_fall = $realtime;

  task automatic one_case(input int d);
    int dexp;
    @(negedge cnt[4]);          // mid-period in counter terms (wrap 31 -> 0)
    duty_in = duty_t'(d);
    @(posedge cnt[4]);          // the command is latched at the next wrap
    @(posedge cnt[4]);
    @(negedge cnt[4]);          // one full period with the new command
    #100;
    dexp = (d > 1003) ? 1003 : d;
    if (d == 0) begin
      int r0 = n_rise;
      #1100;
      checks++;
      if (n_rise != r0 || pwm) begin failures++; $display("FAIL zero command pulses"); end
    end else begin
      @(negedge pwm);
      #0.1;
      checks++;
      if (t_fall - t_rise < dexp - 0.01 || t_fall - t_rise > dexp + 0.01) begin
        failures++;
        $display("FAIL duty %0d: high %0.2f ns expected %0d", d, t_fall - t_rise, dexp);
      end
      @(posedge pwm);
      checks++;
      if (t_rise - t_prev_rise < 1023.99 || t_rise - t_prev_rise > 1024.01) begin
        failures++;
        $display("FAIL period %0.2f", t_rise - t_prev_rise);
      end
    end
  endtask

  initial begin
    #10 rst_n = 1'b1;
    duty_in = 10'd300;
    running = 1'b1;
    // first, incomplete period after reset: no output pulse before the wrap
    #990;
    checks++;
    if (n_rise != 0) begin failures++; $display("FAIL pulse in first period"); end
    one_case(300);
    one_case(1);
    one_case(31);
    one_case(32);
    one_case(33);
    one_case(0);
    one_case(511);
    one_case(1023);
    one_case(1003);
    one_case(1004);
    for (int i = 0; i < 10; i++) one_case($urandom_range(1, 1023));
    // reset forces the output low at once
    wait (pwm);
    #0.2 rst_n = 1'b0;
    #0.1;
    checks++;
    if (pwm) begin failures++; $display("FAIL reset did not clear the output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
