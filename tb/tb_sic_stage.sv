// tb_sic_stage: one cancellation stage with two users (the stage's user 6 dB stronger, two
// paths each) plus noise, two slots plus the stage latency, with a downstream link model that
// raises out_afull at random. Checked: the user's bits; every residual sample from 4096 on
// against r' - r'_0 (error energy under 3 % of the user's energy); one residual per accepted
// sample beyond LAT, in order, with the frame flag on the first; residual u leaves four cycles
// after received sample u + LAT is taken; and that the stage really stalled. From residual
// NOFF on, cancel_en is low and every residual must equal the received sample exactly.
`timescale 1ns/1ps
module tb_sic_stage;
  import sic_pkg::*;
  import tb_wcdma_pkg::*;
  localparam int L = 4, SF = 16;
  localparam int LAT = CHIPS_PER_PAIR * 4 + D_MAX + 256;
  localparam int NSMP = 4 * 5120 + LAT + 64;
  localparam int NOFF = 4 * 4096;
  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0, in_ready;
  cplx_s_t in_sample, out_sample;
  logic out_valid, out_sof, out_afull;
  logic [TAU_W-1:0] tau [L];
  logic [L-1:0] finger_en;
  logic [23:0] code_num;
  logic [7:0] w_coef;
  logic [11:0] gain;
  logic cancel_en;
  logic bit_valid, bit_neg, est_update, est_hold;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  sic_stage dut (.*);

  user_model u0, u1;
  bit pil [150];
  real r_re [], r_im [], r0_re [], r0_im [];
  int acc_cyc [NSMP];
  int nin = 0, nout = 0, nbits = 0, nerr = 0, nstall = 0, cyc = 0, npass = 0;
  real e_err = 0.0, e_u0 = 0.0;

  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && in_ready) begin acc_cyc[nin] = cyc; nin++; end
    if (in_valid && !in_ready) nstall++;
    if (bit_valid) begin if (bit_neg != u0.dbits[nbits]) nerr++; nbits++; end
    if (out_valid) begin
      if (nout == 0) check(out_sof, "frame flag on first residual");
      if (cyc != acc_cyc[nout + LAT] + 4) begin
        failures++; checks++;
        if (failures < 10) $display("FAIL: residual %0d at cycle %0d, input at %0d", nout, cyc, acc_cyc[nout + LAT]);
      end
      if (nout >= NOFF + 4) begin
        npass++;
        if (out_sample.re != 16'($rtoi(r_re[nout])) || out_sample.im != 16'($rtoi(r_im[nout]))) begin
          failures++; checks++;
          if (failures < 10) $display("FAIL: residual %0d with cancellation off", nout);
        end
      end else if (nout >= 4096 && nout < NOFF) begin
        real dr, di;
        dr = real'(out_sample.re) - (r_re[nout] - r0_re[nout]);
        di = real'(out_sample.im) - (r_im[nout] - r0_im[nout]);
        e_err += dr * dr + di * di;
        e_u0 += r0_re[nout] ** 2 + r0_im[nout] ** 2;
      end
      nout++;
    end
  end

  // downstream link model: pops at random, almost full at 8 of 16
  int lvl = 0;
  always @(posedge clk) begin
    lvl = lvl + (out_valid ? 1 : 0) - ((lvl > 0 && $urandom % 8 < 7) ? 1 : 0);
    if (lvl > 16) begin failures++; $display("FAIL: link overflow"); end
  end
  always_comb cancel_en = (nout < NOFF);
  always_comb out_afull = (lvl >= 8) || ((cyc / 3000) % 2 == 1 && (cyc % 7) < 3);

  initial begin
    real ar, ai;
    foreach (pil[i]) pil[i] = 1'b0;
    code_num = 24'd31337;
    u0 = new(SF, NSMP / 4 + 8, code_num, 1600.0, 1600.0 * 8.0 / 15.0, 6, pil);
    u1 = new(SF, NSMP / 4 + 8, 24'd5, 800.0, 800.0 * 8.0 / 15.0, 6, pil);
    u0.add_path(5, 0.9, 0.5); u0.add_path(21, 0.4, -1.9);
    u1.add_path(0, 0.8, 2.2); u1.add_path(11, 0.5, 0.1);
    tau[0] = 9'd5; tau[1] = 9'd21; tau[2] = '0; tau[3] = '0;
    finger_en = 4'b0011; w_coef = 8'd128; gain = 12'd480;
    r_re = new[NSMP]; r_im = new[NSMP]; r0_re = new[NSMP]; r0_im = new[NSMP];
    for (int m = 0; m < NSMP; m++) begin
      u0.rx(m, ar, ai); r0_re[m] = ar; r0_im[m] = ai;
      u1.rx(m, ar, ai);
      r_re[m] = r0_re[m] + ar + real'(int'($urandom % 11) - 5);
      r_im[m] = r0_im[m] + ai + real'(int'($urandom % 11) - 5);
    end
    in_sample = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int m = 0; m < NSMP; ) begin
      @(negedge clk);
      if (in_valid && in_ready) m++;
      if (m < NSMP) begin
        in_valid = 1; in_sof = (m == 0);
        in_sample.re = 16'($rtoi(r_re[m])); in_sample.im = 16'($rtoi(r_im[m]));
      end else in_valid = 0;
    end
    repeat (50) @(posedge clk);
    $display("bits %0d errors %0d, in %0d out %0d, stalls %0d, residual error %.4f", nbits, nerr,
             nin, nout, nstall, e_err / e_u0);
    check(nbits >= 320 && nerr == 0, "user bits");
    check(nout == nin - LAT, "one residual per sample beyond the latency");
    check(e_err < 0.03 * e_u0, "cancellation residual");
    check(nstall > 0, "the stage never stalled");
    check(npass > 1000, "too few residuals with cancellation off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
