`timescale 1ns/1ps
// tb_lut_regulator: checks the table regulator against a reference model of
// u[n] = sat(u[n-1] + A(e[n]) + B(e[n-1]) + C(e[n-2])), duty = u >> 4, with the
// default tables, after random reprogramming of all three tables, with both
// saturation limits reached, and that nothing changes without update.
module tb_lut_regulator;
  import ctrl_pkg::*;
  localparam int KA = 112, KB = -128, KC = 32;
  logic clk = 1'b0, rst_n = 1'b1, update = 1'b0;
  err_t e = 4'd7;
  logic prog_we = 1'b0;
  lut_sel_e prog_sel = LUT_A;
  logic [3:0] prog_addr = '0;
  lut_word_t prog_data = '0;
  duty_t duty;
  int checks = 0, failures = 0;
  int ta[16], tbl[16], tc[16];
  int u_ref = 0, e1 = 7, e2 = 7;
  int n_sat_hi = 0, n_sat_lo = 0;

  lut_regulator dut (
    .clk, .rst_n, .update, .e, .prog_we, .prog_sel, .prog_addr, .prog_data, .duty);

  always #5 clk = ~clk;

  task automatic step(input int ev);
    int s;
    @(negedge clk) begin e = err_t'(ev); update = 1'b1; end
    @(negedge clk) update = 1'b0;
    s = u_ref + ta[ev] + tbl[e1] + tc[e2];
    if (s < 0) begin s = 0; n_sat_lo++; end
    if (s > 16383) begin s = 16383; n_sat_hi++; end
    u_ref = s; e2 = e1; e1 = ev;
    checks++;
    if (int'(duty) != (u_ref >> 4)) begin
      failures++;
      if (failures < 10) $display("FAIL e=%0d duty=%0d expected %0d", ev, duty, u_ref >> 4);
    end
  endtask

  task automatic prog_word(input lut_sel_e sel, input int addr, input int val);
    @(negedge clk) begin prog_we = 1'b1; prog_sel = sel; prog_addr = 4'(addr); prog_data = lut_word_t'(val); end
    @(negedge clk) prog_we = 1'b0;
    case (sel)
      LUT_A: ta[addr] = val;
      LUT_B: tbl[addr] = val;
      default: tc[addr] = val;
    endcase
  endtask

  // assert the asynchronous reset just after time 0 so that it is an edge
  initial #0.001 rst_n = 1'b0;

  initial begin
    for (int i = 0; i < 16; i++) begin
      ta[i] = KA * (i - 7); tbl[i] = KB * (i - 7); tc[i] = KC * (i - 7);
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    checks++; if (duty != 0) failures++;
    // default tables: drive up hard (low output voltage), then down hard
    for (int k = 0; k < 120; k++) step(15);
    for (int k = 0; k < 150; k++) step(0);
    for (int k = 0; k < 200; k++) step($urandom_range(5, 10));
    // reprogram every word with random values, check again
    for (int i = 0; i < 16; i++) begin
      prog_word(LUT_A, i, $urandom_range(0, 1200) - 600);
      prog_word(LUT_B, i, $urandom_range(0, 1200) - 600);
      prog_word(LUT_C, i, $urandom_range(0, 8190) - 4095);
    end
    for (int k = 0; k < 400; k++) step($urandom_range(0, 15));
    // extreme table words
    prog_word(LUT_A, 3, 8191);
    prog_word(LUT_A, 4, -8192);
    for (int k = 0; k < 30; k++) step(3);
    for (int k = 0; k < 30; k++) step(4);
    // no update: duty holds
    begin
      duty_t d0;
      d0 = duty;
      @(negedge clk) e = 4'd15;
      repeat (10) @(negedge clk);
      checks++;
      if (duty != d0) begin failures++; $display("FAIL duty changed without update"); end
    end
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) begin
      failures++; $display("FAIL saturation not reached (%0d high, %0d low)", n_sat_hi, n_sat_lo);
    end
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
