`timescale 1ns/1ps
// tb_chipset_top: the whole chip set in a closed voltage loop, at the design's
// default parameters. The opto-couplers are modelled as 20 ns delays; the
// power stage is an averaged first-order model, v += 0.3 (5 V x D - 10 mOhm x
// I_load - v) once per switching period, D being the measured duty ratio of
// d_out in that period; an ideal 8-bit A/D converter with a 16.5 mV step
// (0.5 % of 3.3 V) samples v once per period, the reference code is 200
// (3.3 V).
//
// Sequence: start-up from 0 V at fsel = 10 (about 375 kHz); load steps
// 25 -> 50 -> 25 -> 50 -> 75 % of 20 A; the A/D input forced from vref-1 LSB
// to 0 as in the communication test (e[n] must turn 1111 within two switching
// periods, and the duty ratio climbs to its 98 % limit); release; a table word
// reprogrammed; a switch to fsel = 00 (about 750 kHz). Checked: every gate
// pulse against the duty of its period, regulation to within one LSB after
// each disturbance, the transmission latency, the clamp, the period at both
// frequencies. Each mechanism is counted and must occur at least once.
module tb_chipset_top;
  import ctrl_pkg::*;
  localparam realtime TC = 1.3;
  localparam real LSB = 0.0165;

  logic p_rst_n = 1'b1, s_rst_n = 1'b1, p_start = 1'b0;
  logic [1:0] fsel = 2'b10;
  logic ser_in = 1'b1, clk_in = 1'b0;
  logic prog_we = 1'b0;
  lut_sel_e prog_sel = LUT_A;
  logic [3:0] prog_addr = '0;
  lut_word_t prog_data = '0;
  logic [7:0] vad = 8'd0, vref = 8'd200;
  logic clk_out, d_out, e_upd, ser_out, frame_start;
  err_t e_rx, e_tx;
  duty_t duty_cmd, duty_run;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_frames = 0, n_rx_upd = 0, n_reg_upd = 0, n_sat_lo = 0, n_sat_hi = 0;
  int n_clamp = 0, n_zero_periods = 0, n_load_steps = 0, n_prog = 0, n_fswitch = 0;

  chipset_top dut (
    .p_rst_n, .p_start, .fsel, .ser_in, .prog_we, .prog_sel, .prog_addr, .prog_data,
    .clk_out, .d_out, .e_rx, .duty_cmd, .e_upd, .duty_run,
    .s_rst_n, .clk_in, .vad, .vref, .ser_out, .e_tx, .frame_start);

  // opto-couplers
  always @(clk_out) clk_in <= #20 clk_out;
  always @(ser_out) ser_in <= #20 ser_out;

  initial #0.001 begin p_rst_n = 1'b0; s_rst_n = 1'b0; end

  // ---------------- power stage and A/D model ----------------
  real v = 0.0, i_load = 5.0;
  bit  force_zero = 1'b0;
  realtime t_rise = 0, hi_acc = 0, t_per = 0, per_len = 0;
  int  nclk = 0, n_per = 0;
  bit  check_width = 1'b1;

  always @(posedge d_out) t_rise = $realtime;
  always @(negedge d_out) if (p_rst_n) begin
    realtime w;
    int dexp;
    w = $realtime - t_rise;
    hi_acc += w;
    dexp = int'(duty_run);
    if (check_width) begin
      checks++;
      if (w < dexp * cur_tb() - 0.01 || w > dexp * cur_tb() + 0.01) begin
        failures++;
        if (failures < 10) $display("FAIL pulse %0.2f ns for duty %0d", w, dexp);
      end
    end
  end

  function automatic realtime cur_tb();
    return TC * ({30'd0, fsel[0], fsel[1]} + 1);
  endfunction

  // one switching period = 16 system clocks
  always @(posedge clk_out) if (p_rst_n) begin
    nclk++;
    if (nclk % 16 == 0) begin
      real d;
      per_len = $realtime - t_per;
      t_per = $realtime;
      d = (per_len > 0) ? hi_acc / per_len : 0.0;
      if (hi_acc == 0 && n_per > 0) n_zero_periods++;
      hi_acc = 0;
      v = v + 0.3 * (5.0 * d - 0.01 * i_load - v);
      if (v < 0) v = 0;
      if (force_zero) vad = 8'd0;
      else if (v / LSB > 255.0) vad = 8'd255;
      else vad = 8'($rtoi(v / LSB + 0.5));
      n_per++;
    end
  end

  // ---------------- mechanism monitors ----------------
  always @(posedge clk_in) if (s_rst_n && frame_start) n_frames++;
  always @(posedge clk_out) if (p_rst_n) begin
    if (e_upd) n_rx_upd++;
    if (dut.u_primary.u_reg.update) n_reg_upd++;
    if (duty_cmd > 10'd1003 && duty_run == 10'd1003) n_clamp++;
  end
  always @(e_tx) begin
    if (e_tx == 4'd0) n_sat_lo++;
    if (e_tx == 4'd15) n_sat_hi++;
  end

  task automatic wait_periods(input int n);
    int target;
    target = n_per + n;
    wait (n_per >= target);
  endtask

  task automatic check_regulated(input string what);
    checks++;
    if (int'(vad) < int'(vref) - 1 || int'(vad) > int'(vref) + 1) begin
      failures++;
      $display("FAIL %s: vad=%0d vref=%0d", what, vad, vref);
    end
  endtask

  task automatic load_step(input real amps, input string what);
    i_load = amps;
    n_load_steps++;
    wait_periods(80);
    check_regulated(what);
  endtask

  initial begin
    realtime t0, p_slow, p_fast;
    #20 p_rst_n = 1'b1; s_rst_n = 1'b1;
    #5 p_start = 1'b1; #0.5 p_start = 1'b0;
    // start-up, 25 % load
    wait_periods(150);
    check_regulated("start-up");
    p_slow = per_len;
    checks++;
    if (p_slow < 1024 * cur_tb() - 0.5 || p_slow > 1024 * cur_tb() + 0.5) begin
      failures++; $display("FAIL period %0.2f ns", p_slow);
    end
    load_step(10.0, "25->50 % load");
    load_step(5.0,  "50->25 % load");
    load_step(10.0, "25->50 % load again");
    load_step(15.0, "50->75 % load");
    // A/D input from vref-1 LSB to zero: e[n] must read 1111 within two periods
    force_zero = 1'b1;
    @(posedge clk_out iff vad == 8'd0);
    t0 = $realtime;
    wait (e_rx == 4'd15);
    checks++;
    if ($realtime - t0 >= 2 * per_len) begin
      failures++; $display("FAIL latency %0.1f ns, period %0.1f ns", $realtime - t0, per_len);
    end
    $display("A/D step to zero: e[n] = 1111 after %0.2f switching periods", ($realtime - t0) / per_len);
    wait_periods(150);
    checks++;
    if (duty_run != 10'd1003) begin failures++; $display("FAIL duty not clamped: %0d", duty_run); end
    force_zero = 1'b0;
    wait_periods(250);
    check_regulated("after A/D release");
    // reprogram table A word 8 (one LSB low) to a stronger value
    @(negedge clk_out) begin prog_we = 1'b1; prog_sel = LUT_A; prog_addr = 4'd8; prog_data = 14'sd160; end
    @(negedge clk_out) prog_we = 1'b0;
    n_prog++;
    checks++;
    if (dut.u_primary.u_reg.lut_a[8] != 14'sd160) begin failures++; $display("FAIL table write"); end
    load_step(5.0, "75->25 % load, new table");
    // switch to the highest frequency
    check_width = 1'b0;
    fsel = 2'b00;
    n_fswitch++;
    wait_periods(5);
    check_width = 1'b1;
    wait_periods(150);
    p_fast = per_len;
    checks++;
    if (p_fast < 1024 * cur_tb() - 0.5 || p_fast > 1024 * cur_tb() + 0.5) begin
      failures++; $display("FAIL fast period %0.2f ns", p_fast);
    end
    check_regulated("after frequency switch");
    $display("periods: %0.1f ns and %0.1f ns; frames %0d, rx updates %0d, regulator updates %0d",
             p_slow, p_fast, n_frames, n_rx_upd, n_reg_upd);
    $display("mechanisms: sat_lo %0d sat_hi %0d clamp %0d zero %0d steps %0d prog %0d fswitch %0d",
             n_sat_lo, n_sat_hi, n_clamp, n_zero_periods, n_load_steps, n_prog, n_fswitch);
    // every mechanism must have happened
    checks++; if (n_frames == 0)       begin failures++; $display("FAIL no frames"); end
    checks++; if (n_rx_upd == 0)       begin failures++; $display("FAIL no receiver updates"); end
    checks++; if (n_reg_upd == 0)      begin failures++; $display("FAIL no regulator updates"); end
    checks++; if (n_sat_hi == 0)       begin failures++; $display("FAIL window never saturated high"); end
    checks++; if (n_sat_lo == 0)       begin failures++; $display("FAIL window never saturated low"); end
    checks++; if (n_clamp == 0)        begin failures++; $display("FAIL 98 %% clamp never used"); end
    checks++; if (n_zero_periods == 0) begin failures++; $display("FAIL no zero-duty period"); end
    checks++; if (n_load_steps == 0)   begin failures++; $display("FAIL no load step"); end
    checks++; if (n_prog == 0)         begin failures++; $display("FAIL no table write"); end
    checks++; if (n_fswitch == 0)      begin failures++; $display("FAIL no frequency switch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
