`timescale 1ns/1ps
// tb_primary_ctrl: primary-side IC with a testbench model of the secondary
// side. The model sends one 16-bit frame per switching period on the falling
// edge of clk_out, with a new random error code every frame. Checks: e_rx
// equals the code of the last complete frame at each regulator update; the
// duty command follows a reference model of the table regulator; each
// switching period the gate pulse lasts (duty of that period) x block delay;
// the clock is 16 x the switching frequency; a reprogrammed table word takes
// effect. Runs at the default cell delay with fsel = 10 (two cells per block).
module tb_primary_ctrl;
  import ctrl_pkg::*;
  localparam realtime TC = 1.3;
  localparam int KA = 112, KB = -128, KC = 32;
  logic rst_n = 1'b1, start = 1'b0;
  logic [1:0] fsel = 2'b10;
  logic ser_in = 1'b1;
  logic prog_we = 1'b0;
  lut_sel_e prog_sel = LUT_A;
  logic [3:0] prog_addr = '0;
  lut_word_t prog_data = '0;
  logic clk_out, d_out, e_upd;
  err_t e_rx;
  duty_t duty_cmd, duty_run;
  int checks = 0, failures = 0;
  int ta[16], tbl[16], tc[16];
  int u_ref = 0, e1 = 7, e2 = 7;
  int last_code = 0, n_periods = 0;
  realtime tb = 2 * TC;
  logic [15:0] frame;
  int bitn = 0;
  err_t cur_code = '0, prev_code = '0;

  primary_ctrl dut (.rst_n, .start, .fsel, .ser_in, .prog_we, .prog_sel, .prog_addr, .prog_data,
                    .clk_out, .d_out, .e_rx, .duty_cmd, .e_upd, .duty_run);

  // secondary-side model: frames back to back, MSB first, on the falling edge
  always @(negedge clk_out) if (rst_n) begin
    if (bitn == 0) begin
      prev_code = cur_code;
      cur_code  = err_t'($urandom_range(0, 15));
      if (n_periods < 40) cur_code = 4'd15;        // drive the duty up first
      frame = {4'b0101, cur_code[3], cur_code[3], cur_code[2], cur_code[2],
               cur_code[1], cur_code[1], cur_code[0], cur_code[0], 4'b1010};
    end
    ser_in = frame[15 - bitn];
    bitn = (bitn + 1) % 16;
  end

  // regulator reference model, evaluated at each update edge
  always @(posedge clk_out) if (rst_n && dut.u_reg.update) begin
    int s;
    #0.01;
    s = u_ref + ta[e_rx] + tbl[e1] + tc[e2];
    if (s < 0) s = 0;
    if (s > 16383) s = 16383;
    u_ref = s; e2 = e1; e1 = int'(e_rx);
    checks++;
    if (int'(duty_cmd) != (u_ref >> 4)) begin
      failures++;
      if (failures < 10) $display("FAIL duty_cmd=%0d expected %0d", duty_cmd, u_ref >> 4);
    end
    // e_rx is the code of the frame completed before this point
    checks++;
    if (n_periods > 2 && e_rx != prev_code && e_rx != cur_code) begin
      failures++;
      if (failures < 10) $display("FAIL e_rx=%0d, frames sent %0d and %0d", e_rx, prev_code, cur_code);
    end
  end

  // pulse width of every period against the duty of that period
  realtime t_r = 0, t_prev = 0;
  always @(posedge d_out) begin t_prev = t_r; t_r = $realtime; n_periods++; end
  always @(negedge d_out) if (rst_n) begin
    int dexp;
    dexp = int'(duty_run);
    checks++;
    if ($realtime - t_r < dexp * tb - 0.01 || $realtime - t_r > dexp * tb + 0.01) begin
      failures++;
      if (failures < 10) $display("FAIL high %0.2f ns for duty %0d at %0.3f cnt=%0d tap=%h", $realtime - t_r, dexp, $realtime, dut.u_dpwm.u_ctrl.cnt, dut.u_dpwm.tap);
    end
  end

  // assert the asynchronous reset just after time 0 so that it is an edge
  initial #0.001 rst_n = 1'b0;

  initial begin
    realtime c0, c1;
    for (int i = 0; i < 16; i++) begin
      ta[i] = KA * (i - 7); tbl[i] = KB * (i - 7); tc[i] = KC * (i - 7);
    end
    #20 rst_n = 1'b1;
    #5 start = 1'b1; #0.5 start = 1'b0;
    wait (n_periods == 60);
    checks++;
    if (t_r - t_prev < 1024 * tb - 0.01 || t_r - t_prev > 1024 * tb + 0.01) begin
      failures++; $display("FAIL period %0.2f", t_r - t_prev);
    end
    @(posedge clk_out) c0 = $realtime;
    @(posedge clk_out) c1 = $realtime;
    checks++;
    if (c1 - c0 < 64 * tb - 0.01 || c1 - c0 > 64 * tb + 0.01) begin failures++; $display("FAIL clock period"); end
    // reprogram table A, word 9, away from the update point
    @(posedge clk_out iff dut.u_dpwm.phase == 4'd2);
    @(negedge clk_out) begin prog_we = 1'b1; prog_sel = LUT_A; prog_addr = 4'd9; prog_data = 14'sd500; end
    @(negedge clk_out) prog_we = 1'b0;
    ta[9] = 500;
    wait (n_periods == 200);
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
