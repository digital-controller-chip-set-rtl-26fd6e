`timescale 1ns/1ps
// tb_workload_400k: the chip set at the operating point of the 3.3 V, 20 A
// supply, 400 kHz switching with a 6.4 MHz system clock. At the default 1.3 ns
// cell the nearest rate is 375 kHz, so here the cell is 1.221 ns and fsel = 10
// (two cells per delay block): 1024 x 2 x 1.221 ns = 2.5006 us, 399.9 kHz.
//
// The opto-couplers are 20 ns delays and the power stage is the same averaged
// first-order model as in tb_chipset_top (v += 0.3 (5 V x D - 10 mOhm x I - v)
// per period, 8-bit A/D with a 16.5 mV step, reference code 200).
//
// Sequence: start-up at 25 % of 20 A, then the three load transients 25 ->
// 50 %, 50 -> 25 % and 50 -> 75 %, each followed by a check that the A/D code
// is back within one LSB of the reference within 80 periods (the peak
// deviation and the recovery time are printed). Then the link test: the A/D
// input is held at the reference minus one LSB (error code 1000), then
// stepped to zero; the received error code must read 1111 within two
// switching periods, and the frames on the serial line must carry the
// expanded code 1111 1111 between 0101 and 1010. Checked throughout: the
// switching period, the 16-clock system clock period and every gate pulse
// width against the duty of its period.
module tb_workload_400k;
  import ctrl_pkg::*;
  localparam realtime TC = 1.221;
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
  int n_steps = 0, n_frames_ok = 0;

  chipset_top #(.T_CELL(TC)) dut (
    .p_rst_n, .p_start, .fsel, .ser_in, .prog_we, .prog_sel, .prog_addr, .prog_data,
    .clk_out, .d_out, .e_rx, .duty_cmd, .e_upd, .duty_run,
    .s_rst_n, .clk_in, .vad, .vref, .ser_out, .e_tx, .frame_start);

  always @(clk_out) clk_in <= #20 clk_out;
  always @(ser_out) ser_in <= #20 ser_out;

  initial #0.001 begin p_rst_n = 1'b0; s_rst_n = 1'b0; end

  // ---------------- power stage, A/D and timing checks ----------------
  real v = 0.0, i_load = 5.0;
  bit  hold_ad = 1'b0;
  logic [7:0] ad_hold_val = 8'd0;
  realtime t_rise = 0, hi_acc = 0, t_per = 0, per_len = 0, t_clk = 0;
  int  nclk = 0, n_per = 0;
  int  max_dev = 0;

  always @(posedge d_out) t_rise = $realtime;
  always @(negedge d_out) if (p_rst_n) begin
    realtime w, wexp;
    int dexp;
    w = $realtime - t_rise;
    dexp = int'(duty_run);
    wexp = dexp * 2 * TC;
    hi_acc += w;
    checks++;
    if (w < wexp - 0.01 || w > wexp + 0.01) begin
      failures++;
      if (failures < 10) $display("FAIL pulse %0.2f ns for duty %0d", w, duty_run);
    end
  end

  always @(posedge clk_out) if (p_rst_n) begin
    // system clock: 16 x 400 kHz = 6.4 MHz, period 156.25 ns
    if (nclk > 2) begin
      checks++;
      if ($realtime - t_clk < 156.0 || $realtime - t_clk > 156.5) begin
        failures++;
        if (failures < 10) $display("FAIL system clock period %0.2f ns", $realtime - t_clk);
      end
    end
    t_clk = $realtime;
    nclk++;
    if (nclk % 16 == 0) begin
      real d;
      per_len = $realtime - t_per;
      t_per = $realtime;
      d = (per_len > 0) ? hi_acc / per_len : 0.0;
      hi_acc = 0;
      v = v + 0.3 * (5.0 * d - 0.01 * i_load - v);
      if (v < 0) v = 0;
      if (hold_ad) vad = ad_hold_val;
      else if (v / LSB > 255.0) vad = 8'd255;
      else vad = 8'($rtoi(v / LSB + 0.5));
      n_per++;
    end
  end

  // the serial line, sampled by an independent 16-bit shifter on the
  // secondary clock: a frame is 0101, four copies of e[n] bit by bit, 1010
  logic [15:0] line_sr = '0;
  always @(posedge clk_in) if (s_rst_n) line_sr <= {line_sr[14:0], ser_out};

  task automatic wait_periods(input int n);
    int target;
    target = n_per + n;
    wait (n_per >= target);
  endtask

  task automatic transient(input real amps, input string what);
    int first_ok;
    i_load = amps;
    n_steps++;
    max_dev = 0;
    first_ok = -1;
    for (int k = 0; k < 80; k++) begin
      int dev;
      wait_periods(1);
      dev = int'(vad) - int'(vref);
      if (dev < 0) dev = -dev;
      if (dev > max_dev) max_dev = dev;
      if (dev > 1) first_ok = -1;
      else if (first_ok < 0) first_ok = k + 1;
    end
    checks++;
    if (first_ok < 0) begin
      failures++; $display("FAIL %s: vad=%0d vref=%0d", what, vad, vref);
    end else
      $display("%s: peak deviation %0d LSB (%0.1f mV), within 1 LSB after %0d periods",
               what, max_dev, max_dev * LSB * 1000.0, first_ok);
  endtask

  initial begin
    realtime t0;
    #20 p_rst_n = 1'b1; s_rst_n = 1'b1;
    #5 p_start = 1'b1; #0.5 p_start = 1'b0;
    wait_periods(150);
    checks++;
    if (int'(vad) < int'(vref) - 1 || int'(vad) > int'(vref) + 1) begin
      failures++; $display("FAIL start-up: vad=%0d", vad);
    end
    checks++;
    if (per_len < 2499.0 || per_len > 2501.0) begin
      failures++; $display("FAIL switching period %0.2f ns", per_len);
    end
    $display("switching period %0.2f ns (%0.1f kHz)", per_len, 1.0e6 / per_len);
    transient(10.0, "25 -> 50 % load");
    transient(5.0,  "50 -> 25 % load");
    transient(10.0, "25 -> 50 % load (set-up)");
    transient(15.0, "50 -> 75 % load");
    // link test: reference minus one LSB, then zero
    ad_hold_val = vref - 8'd1;
    hold_ad = 1'b1;
    wait_periods(4);
    checks++;
    if (e_rx != 4'd8) begin failures++; $display("FAIL e[n] %b at vref-1, expected 1000", e_rx); end
    ad_hold_val = 8'd0;
    @(posedge clk_out iff vad == 8'd0);
    t0 = $realtime;
    wait (e_rx == 4'd15);
    checks++;
    if ($realtime - t0 >= 2 * per_len) begin
      failures++; $display("FAIL latency %0.1f ns", $realtime - t0);
    end
    $display("A/D step to zero: e[n] = 1111 after %0.1f ns (%0.2f periods)",
             $realtime - t0, ($realtime - t0) / per_len);
    // the next frames on the line must carry 1111 1111
    repeat (3) begin
      @(posedge clk_in iff (s_rst_n && line_sr[15:12] == 4'b0101 && line_sr[3:0] == 4'b1010));
      checks++;
      if (line_sr[11:4] != 8'hFF) begin
        failures++; $display("FAIL frame %b", line_sr);
      end else n_frames_ok++;
    end
    hold_ad = 1'b0;
    wait_periods(250);
    checks++;
    if (int'(vad) < int'(vref) - 1 || int'(vad) > int'(vref) + 1) begin
      failures++; $display("FAIL after link test: vad=%0d", vad);
    end
    checks++; if (n_steps != 4)     begin failures++; $display("FAIL load steps %0d", n_steps); end
    checks++; if (n_frames_ok == 0) begin failures++; $display("FAIL no 1111 frame seen"); end
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
