`timescale 1ns/1ps
// tb_dpwm: self-checking test of the 10-bit DPWM with its ring oscillator.
// For each of the four frequency selections and a set of duty commands it
// measures, in simulated time, the switching period (expected 1024 block
// delays), the high time of the output (expected duty x block delay, with the
// command clamped to 1003), the system clock period (period / 16) and that a
// zero command keeps the output low. Expected values come from the cell delay
// and the frequency-select wiring, not from the design.
module tb_dpwm;
  import ctrl_pkg::*;
  localparam realtime TC = 1.3;

  logic       rst_n = 1'b1;
  logic       start = 1'b0;
  logic [1:0] fsel  = 2'b00;
  duty_t      duty_in = '0;
  logic       pwm, clk_sys;
  logic [3:0] phase;
  duty_t      duty_q;
  int checks = 0, failures = 0;

  dpwm dut (.rst_n, .start, .fsel, .duty_in, .pwm, .clk_sys, .phase, .duty_q);

  function automatic int cells(input logic [1:0] f);
    return int'({f[0], f[1]}) + 1;
  endfunction

  task automatic check_close(input string what, input realtime got, input realtime exp);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++;
      $display("FAIL %s: got %0.3f ns expected %0.3f ns", what, got, exp);
    end
  endtask

  // restart the ring with a given frequency selection
  task automatic restart(input logic [1:0] f);
    rst_n = 1'b0; fsel = f; #20;
    rst_n = 1'b1; #5;
    start = 1'b1; #0.5; start = 1'b0;
  endtask

  task automatic measure(input int d, input logic [1:0] f);
    realtime tb, t_rise, t_fall, t_next, t_c0, t_c1;
    int dexp;
    tb = TC * cells(f);
    duty_in = duty_t'(d);
    // let the command reach the running period
    repeat (2) @(posedge dut.u_ctrl.cnt[4]);
    @(negedge dut.u_ctrl.cnt[4]);
    if (d == 0) begin
      checks++;
      fork
        begin @(posedge pwm); failures++; $display("FAIL zero duty produced a pulse"); end
        begin #(2.0 * 1024 * tb); end
      join_any
      disable fork;
      return;
    end
    @(posedge pwm) t_rise = $realtime;
    @(negedge pwm) t_fall = $realtime;
    @(posedge pwm) t_next = $realtime;
    dexp = (d > 1003) ? 1003 : d;
    check_close($sformatf("period fsel=%0d", f), t_next - t_rise, 1024.0 * tb);
    check_close($sformatf("high time fsel=%0d duty=%0d", f, d), t_fall - t_rise, dexp * tb);
    @(posedge clk_sys) t_c0 = $realtime;
    @(posedge clk_sys) t_c1 = $realtime;
    check_close("system clock period", t_c1 - t_c0, 64.0 * tb);
  endtask

  // assert the asynchronous reset just after time 0 so that it is an edge
  initial #0.001 rst_n = 1'b0;

  initial begin
    // output stays low through reset and the first period
    #1;
    restart(2'b00);
    duty_in = 10'd512;
    checks++;
    fork
      begin @(posedge pwm); if ($realtime < 26 + 1024 * TC) begin failures++; $display("FAIL pulse in first period"); end end
      begin #(1024 * TC + 31); end
    join_any
    disable fork;
    for (int f = 0; f < 4; f++) begin
      restart(2'(f));
      measure(512, 2'(f));
      measure(1, 2'(f));
      measure(37, 2'(f));
      measure(1000, 2'(f));
      measure(1023, 2'(f));
      measure(0, 2'(f));
      measure(700, 2'(f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #4_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
