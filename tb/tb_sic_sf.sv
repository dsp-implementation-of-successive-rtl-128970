// tb_sic_sf: one cancellation stage at the two ends of the data spreading-factor range, SF 4 and
// SF 256 (LOG2_SF = 2 and 8), side by side. Each stage's user (two paths) is received together
// with an SF-16 interferer 6 dB weaker and light noise, over two slots plus the stage latency.
// Checked for each: every detected data bit, at least the number of bits the two slots carry
// minus the pipeline's lag, and the residual after cancellation against r' - r'_user (error
// energy under 3 % of the user's energy). Both stages take a sample every cycle.
`timescale 1ns/1ps
module tb_sic_sf;
  import sic_pkg::*;
  import tb_wcdma_pkg::*;
  localparam int L = 4;
  localparam int LAT = CHIPS_PER_PAIR * 4 + D_MAX + 256;
  localparam int NSMP = 4 * 5120 + LAT + 64;
  localparam int NS = 2;
  localparam int SFV [NS] = '{4, 256};

  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0;
  always #5 clk = ~clk;
  cplx_s_t in_sample [NS], out_sample [NS];
  logic [NS-1:0] in_ready, out_valid, out_sof, bit_valid, bit_neg, est_update, est_hold;
  logic [TAU_W-1:0] tau [L];
  logic [L-1:0] finger_en;
  logic [23:0] code_num;
  logic [7:0] w_coef;
  logic [11:0] gain;

  for (genvar i = 0; i < NS; i++) begin : g_st
    sic_stage #(.LOG2_SF($clog2(SFV[i]))) u_st (
      .clk, .rst_n, .in_valid, .in_sof, .in_sample(in_sample[i]), .in_ready(in_ready[i]),
      .out_valid(out_valid[i]), .out_sof(out_sof[i]), .out_sample(out_sample[i]),
      .out_afull(1'b0), .tau, .finger_en, .code_num, .w_coef, .gain, .cancel_en(1'b1),
      .bit_valid(bit_valid[i]), .bit_neg(bit_neg[i]), .est_update(est_update[i]),
      .est_hold(est_hold[i]));
  end

  int checks = 0, failures = 0;
  user_model ua [NS];
  user_model ui;
  bit pil [150];
  real r_re [NS][], r_im [NS][], a_re [NS][], a_im [NS][];
  int nbits [NS], nerr [NS], nout [NS];
  real e_err [NS], e_u [NS];

  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NS; i++) begin
      if (bit_valid[i]) begin
        if (bit_neg[i] != ua[i].dbits[nbits[i]]) nerr[i]++;
        nbits[i]++;
      end
      if (out_valid[i]) begin
        if (nout[i] >= 4096) begin
          real dr, di;
          dr = real'(out_sample[i].re) - (r_re[i][nout[i]] - a_re[i][nout[i]]);
          di = real'(out_sample[i].im) - (r_im[i][nout[i]] - a_im[i][nout[i]]);
          e_err[i] += dr * dr + di * di;
          e_u[i] += a_re[i][nout[i]] ** 2 + a_im[i][nout[i]] ** 2;
        end
        nout[i]++;
      end
    end
  end

  initial begin
    real ar, ai;
    foreach (pil[i]) pil[i] = 1'b0;
    code_num = 24'd4242;
    ui = new(16, NSMP / 4 + 8, 24'd99, 800.0, 800.0 * 8.0 / 15.0, 6, pil);
    ui.add_path(0, 0.8, 1.0);
    for (int i = 0; i < NS; i++) begin
      ua[i] = new(SFV[i], NSMP / 4 + 8, code_num, 1600.0, 1600.0 * 8.0 / 15.0, 6, pil);
      ua[i].add_path(3, 0.9, 0.4); ua[i].add_path(17, 0.5, -1.2);
      r_re[i] = new[NSMP]; r_im[i] = new[NSMP]; a_re[i] = new[NSMP]; a_im[i] = new[NSMP];
      nbits[i] = 0; nerr[i] = 0; nout[i] = 0; e_err[i] = 0.0; e_u[i] = 0.0;
    end
    tau[0] = 9'd3; tau[1] = 9'd17; tau[2] = '0; tau[3] = '0;
    finger_en = 4'b0011; w_coef = 8'd128; gain = 12'd480;
    for (int m = 0; m < NSMP; m++) begin
      real nr, ni;
      ui.rx(m, ar, ai);
      nr = ar + real'(int'($urandom % 11) - 5);
      ni = ai + real'(int'($urandom % 11) - 5);
      for (int i = 0; i < NS; i++) begin
        real ur, uim;
        ua[i].rx(m, ur, uim);
        a_re[i][m] = ur; a_im[i][m] = uim;
        r_re[i][m] = ur + nr; r_im[i][m] = uim + ni;
      end
    end
    foreach (in_sample[i]) in_sample[i] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int m = 0; m < NSMP; m++) begin
      @(negedge clk);
      in_valid = 1; in_sof = (m == 0);
      for (int i = 0; i < NS; i++) begin
        in_sample[i].re = 16'($rtoi(r_re[i][m])); in_sample[i].im = 16'($rtoi(r_im[i][m]));
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (50) @(posedge clk);
    for (int i = 0; i < NS; i++) begin
      int need;
      need = (5120 - CHIPS_PER_PAIR) / SFV[i];
      $display("SF %0d: bits %0d errors %0d, residual error %.4f", SFV[i], nbits[i], nerr[i],
               e_err[i] / e_u[i]);
      check(in_ready[i], $sformatf("SF %0d: stage stalled without back-pressure", SFV[i]));
      check(nbits[i] >= need, $sformatf("SF %0d: only %0d bits, want %0d", SFV[i], nbits[i], need));
      check(nerr[i] == 0, $sformatf("SF %0d: %0d bit errors", SFV[i], nerr[i]));
      check(nout[i] == NSMP - LAT, $sformatf("SF %0d: %0d residual samples", SFV[i], nout[i]));
      check(e_err[i] < 0.03 * e_u[i], $sformatf("SF %0d: cancellation residual", SFV[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
