// tb_rake_receiver: one user over a two-path channel (delays 3 and 170 quarter chips) plus a
// weaker second user and noise, two slots long, one sample per cycle. Checked: every data
// decision; the DPCCH bits of every pair (pilots as known, the others as sent); each path's
// estimate against its expected value 1024 * beta_c * alpha (within 25 %: the weaker path
// sees the stronger one as interference); that the pair results
// come out within NB + 12 cycles after the pair's last chip sample; and that estimates were both
// refreshed and held.
`timescale 1ns/1ps
module tb_rake_receiver;
  import sic_pkg::*;
  import tb_wcdma_pkg::*;
  localparam int L = 4, SF = 16, NB = 32;
  localparam int NSMP = 4 * 5120 + D_MAX + 400;
  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0;
  cplx_s_t in_sample;
  logic [TAU_W-1:0] tau [L];
  logic [L-1:0] finger_en;
  logic [23:0] code_num;
  logic [7:0] w_coef;
  logic bit_valid, bit_neg, pair_valid, pair_bank, est_update, est_hold;
  logic [NB-1:0] pair_bits;
  logic [1:0] pair_ctrl;
  cplx_alpha_t pair_alpha [L];
  int checks = 0, failures = 0;
  int t = 0, nbits = 0, nerr = 0, npair = 0, nupd = 0, nhold = 0;
  user_model u, v;
  bit pil [150];
  always #5 clk = ~clk;
  localparam logic [89:0] PIL = 90'h2A5_F0C3_1B7E_9D40_66AA_C35;
  rake_receiver #(.PILOT_NEG(PIL)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid) t++;
    if (bit_valid) begin
      if (bit_neg != u.dbits[nbits]) nerr++;
      nbits++;
    end
    nupd += est_update; nhold += est_hold;
    if (pair_valid) begin
      int lat;
      lat = t - 1 - (2048 * npair + 2044 + D_MAX);
      check(lat >= 1 && lat <= NB + 12, $sformatf("pair %0d latency %0d cycles", npair, lat));
      check(pair_ctrl[0] == u.cbits[2 * npair] && pair_ctrl[1] == u.cbits[2 * npair + 1],
            $sformatf("pair %0d DPCCH bits", npair));
      check(pair_bank == npair[0], "pair bank");
      if (npair >= 1)
        for (int l = 0; l < 2; l++) begin
          real er, ei, e;
          logic signed [ALPHA_W-1:0] gr, gi;
          gr = pair_alpha[l].re; gi = pair_alpha[l].im;
          er = 1024.0 * u.bc * u.a_re[l]; ei = 1024.0 * u.bc * u.a_im[l];
          e = (real'(gr) - er) ** 2 + (real'(gi) - ei) ** 2;
          // the weaker path sees the stronger one as interference: about 15 % estimate error
          check(e < 0.0625 * (er * er + ei * ei), $sformatf("pair %0d alpha %0d: %0d,%0d want %.0f,%.0f",
                npair, l, gr, gi, er, ei));
        end
      check(pair_alpha[2] == '0 && pair_alpha[3] == '0, "disabled fingers carry an estimate");
      npair++;
    end
  end

  initial begin
    foreach (pil[i]) pil[i] = ((i % 10) < 6) ? PIL[(i / 10) * 6 + i % 10] : 1'b0;
    code_num = 24'd4242;
    u = new(SF, NSMP / 4 + 8, code_num, 1500.0, 800.0, 6, pil);
    v = new(SF, NSMP / 4 + 8, 24'd99, 700.0, 373.0, 6, pil);
    u.add_path(3, 0.9, 0.8); u.add_path(170, 0.5, -2.0);
    v.add_path(9, 0.8, 1.5);
    tau[0] = 9'd3; tau[1] = 9'd170; tau[2] = 9'd0; tau[3] = 9'd0;
    finger_en = 4'b0011; w_coef = 8'd128;
    in_sample = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int m = 0; m < NSMP; m++) begin
      real ar, ai, br, bi;
      u.rx(m, ar, ai); v.rx(m, br, bi);
      @(negedge clk);
      in_valid = 1; in_sof = (m == 0);
      in_sample.re = 16'($rtoi(ar + br) + int'($urandom % 31) - 15);
      in_sample.im = 16'($rtoi(ai + bi) + int'($urandom % 31) - 15);
    end
    @(negedge clk) in_valid = 0;
    repeat (200) @(posedge clk);
    $display("%0d bits, %0d errors, %0d pairs, %0d updates, %0d holds", nbits, nerr, npair, nupd, nhold);
    check(nbits == npair * NB && npair >= 10, "bit count");
    check(nerr == 0, "bit errors");
    check(nupd > 0 && nhold > 0, "estimate update and hold both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
