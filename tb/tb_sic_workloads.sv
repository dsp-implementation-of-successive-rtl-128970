// tb_sic_workloads: the three-user receiver on the channel conditions it is meant for.
//
// Each run builds three users at SF 16 (U0 6 dB and U1 3 dB above U2), passes them through a
// channel, adds white Gaussian noise and streams the sum through sic_receiver. Plain RAKEs for
// U1 and U2 on the raw signal run alongside, so each run reports bit-error rates with and without
// cancellation. Runs:
//  - AWGN, one path per user, Eb/N0 = 7 dB for U2 (two frames),
//  - single-path Rayleigh fading at 50 km/h, Eb/N0 = 10 dB,
//  - the multipath cases 1 to 6 (path delays and average powers below, each path Rayleigh
//    fading at the case's speed), Eb/N0 = 10 dB,
//  - AWGN at 7 dB again with cancellation switched off (cancel_en low: RAKE only).
// The pulse is the cascade of 33-tap transmit and receive root-raised-cosine filters, so neither
// regeneration filter matches it exactly. Eb/N0 counts the data bit energy summed over a user's
// paths. A fading path is a sum of eight
// rays with random phases and Doppler shifts, at a 1.95 GHz carrier.
// A second receiver with 33-tap regeneration filters runs on the same signal.
// Checked: every run delivers all bits of every user; in AWGN the SIC error rate of U2 stays
// within 4 times the single-user bound Q(sqrt(2 Eb/N0)); cancellation lowers U2's error count
// in AWGN and at least halves it over all runs together, with either filter; the two filters'
// totals are within a factor of two of each other; no run's SIC error rate for U2 exceeds 10 %; with
// cancellation off, U1 and U2 make exactly the errors of the plain RAKEs.
`timescale 1ns/1ps
module tb_sic_workloads;
  import sic_pkg::*;
  import tb_wcdma_pkg::*;

  localparam int K = 3, L = 4, SF = 16, NB_FRAME = CHIPS_PER_FRAME / SF;
  localparam int LATS = CHIPS_PER_PAIR * 4 + D_MAX + 256;
  localparam int NTAIL = 2 * LATS + 4096;
  localparam int MAXF = 2;
  localparam int MAXSMP = CHIPS_PER_FRAME * 4 * MAXF + NTAIL;
  localparam real FS = 15.36e6;          // sample rate
  localparam real FC = 1.95e9;           // carrier

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rx_valid, rx_sof, rx_ready;
  cplx_s_t rx_sample;
  logic [TAU_W-1:0] tau [K][L];
  logic [L-1:0] finger_en [K];
  logic [23:0] code_num [K];
  logic [11:0] gain [K];
  logic [W_FRAC-1:0] w_coef;
  logic [K-2:0] cancel_en = '1;
  logic [K-1:0] bit_valid, bit_neg, est_update, est_hold;
  logic [K-2:0] cancel_active;
  logic res_valid, res_sof;
  cplx_s_t res_sample;
  logic ber_clr = 0;
  logic [K-1:0] ref_we = '0;
  logic [$clog2(2400)-1:0] ref_addr = '0;
  logic ref_bit = 0;
  logic [$clog2(2400):0] ref_len = 13'd2400;
  logic [31:0] bit_count [K], err_count [K];

  sic_receiver dut (.*);

  // the same receiver with 33-tap regeneration filters
  logic [K-1:0] b33_valid, b33_neg, eu33, eh33;
  logic [K-2:0] ca33;
  logic rv33, rs33, ready33;
  cplx_s_t rsmp33;
  logic [31:0] bc33 [K], ec33 [K];
  sic_receiver #(.RC_TAPS(33)) dut33 (.clk, .rst_n, .rx_valid(rx_valid && rx_ready),
    .rx_sof, .rx_sample, .rx_ready(ready33), .tau, .finger_en, .code_num, .gain, .w_coef,
    .cancel_en, .bit_valid(b33_valid), .bit_neg(b33_neg), .res_valid(rv33), .res_sof(rs33),
    .res_sample(rsmp33), .ber_clr, .ref_we, .ref_addr, .ref_bit, .ref_len, .bit_count(bc33),
    .err_count(ec33), .est_update(eu33), .est_hold(eh33), .cancel_active(ca33));

  // plain RAKEs for U1 and U2 on the raw received signal
  logic [1:0] raw_bv, raw_bn, raw_pv, raw_pb, raw_eu, raw_eh;
  logic [31:0] raw_pbits [2];
  logic [1:0] raw_pctrl [2];
  cplx_alpha_t raw_palpha [2][L];
  for (genvar r = 0; r < 2; r++) begin : g_raw
    rake_receiver u_raw (.clk, .rst_n, .in_valid(rx_valid && rx_ready), .in_sof(rx_sof),
      .in_sample(rx_sample), .tau(tau[r+1]), .finger_en(finger_en[r+1]),
      .code_num(code_num[r+1]), .w_coef, .bit_valid(raw_bv[r]), .bit_neg(raw_bn[r]),
      .pair_valid(raw_pv[r]), .pair_bank(raw_pb[r]), .pair_bits(raw_pbits[r]),
      .pair_ctrl(raw_pctrl[r]), .pair_alpha(raw_palpha[r]), .est_update(raw_eu[r]),
      .est_hold(raw_eh[r]));
  end

  int checks = 0, failures = 0;
  user_model u [K];
  bit pil [150];
  real r_re [], r_im [];
  int nbits [K], nerr [K], rbits [2], rerr [2];
  int tot_sic = 0, tot_raw = 0, tot_33 = 0;
  int n33 [K], e33 [K];
  bit dec [2][$], rdec [2][$];   // U1/U2 decisions of the chain and of the plain RAKEs

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < K; k++) if (bit_valid[k]) begin
      if (bit_neg[k] != u[k].dbits[nbits[k] % NB_FRAME]) nerr[k]++;
      if (k > 0) dec[k-1].push_back(bit_neg[k]);
      nbits[k]++;
    end
    for (int k = 0; k < K; k++) if (b33_valid[k]) begin
      if (b33_neg[k] != u[k].dbits[n33[k] % NB_FRAME]) e33[k]++;
      n33[k]++;
    end
    for (int r = 0; r < 2; r++) if (raw_bv[r]) begin
      if (raw_bn[r] != u[r+1].dbits[rbits[r] % NB_FRAME]) rerr[r]++;
      rdec[r].push_back(raw_bn[r]);
      rbits[r]++;
    end
  end

  function automatic real qfunc(real x);
    // Q(x) by a series-free approximation (Borjesson-Sundberg), good to about 1 %
    return $exp(-x * x / 2.0) / ((0.339 * x + 0.661 * $sqrt(x * x + 5.51)) * 2.50662827463);
  endfunction

  // delays in ns and powers in dB of one path of a multipath case
  function automatic int case_npath(int c);
    case (c)
      1, 5: return 2;
      2: return 3;
      3, 6: return 4;
      default: return 2;
    endcase
  endfunction
  function automatic real case_delay(int c, int p);
    real d [4];
    case (c)
      1, 5, 4: d = '{0.0, 976.0, 0.0, 0.0};
      2: d = '{0.0, 976.0, 20000.0, 0.0};
      default: d = '{0.0, 260.0, 521.0, 781.0};
    endcase
    return d[p];
  endfunction
  function automatic real case_pdb(int c, int p);
    real d [4];
    case (c)
      1, 5: d = '{0.0, -10.0, 0.0, 0.0};
      2, 4: d = '{0.0, 0.0, 0.0, 0.0};
      default: d = '{0.0, -3.0, -6.0, -9.0};
    endcase
    return d[p];
  endfunction
  function automatic real case_kmh(int c);
    case (c)
      1, 2, 4: return 3.0;
      5: return 50.0;
      3: return 120.0;
      default: return 250.0;
    endcase
  endfunction

  // kind 0: AWGN; kind 1: single-path fading; kind 2: multipath case c
  task automatic run(input string name, input int kind, input int c, input int nframes,
                     input real ebn0_db);
    int nsmp, nchip, np;
    real amp [K], pw [4], ptot, fd, sigma, nr, ni, ber_s, ber_r1, ber_r2, bound;
    int offs [K];
    amp = '{560.0, 396.0, 280.0};
    offs = '{0, 3, 6};
    nsmp = CHIPS_PER_FRAME * 4 * nframes + NTAIL;
    nchip = nsmp / 4 + 8;
    np = (kind == 2) ? case_npath(c) : 1;
    ptot = 0.0;
    for (int p = 0; p < np; p++) begin
      pw[p] = (kind == 2) ? 10.0 ** (case_pdb(c, p) / 10.0) : 1.0;
      ptot += pw[p];
    end
    fd = ((kind == 2) ? case_kmh(c) : 50.0) / 3.6 * FC / 3.0e8 / FS;
    for (int k = 0; k < K; k++) begin
      u[k] = new(SF, nchip, code_num[k], amp[k], amp[k] * 8.0 / 15.0, 6, pil);
      u[k].use_rrc_cascade();
      finger_en[k] = '0;
      for (int l = 0; l < L; l++) tau[k][l] = '0;
      for (int p = 0; p < np; p++) begin
        int t;
        t = offs[k] + ((kind == 2) ? $rtoi(case_delay(c, p) * 3.84e-3 * 4.0 + 0.5) : 0);
        if (kind == 0) u[k].add_path(t, 1.0, real'($urandom % 628) / 100.0);
        else u[k].add_fading(t, pw[p] / ptot, fd, 8);
        tau[k][p] = TAU_W'(t);
        finger_en[k][p] = 1'b1;
      end
    end
    // noise per real dimension from U2's Eb/N0 = SF * beta_d^2 / sigma^2
    sigma = $sqrt(real'(SF) * amp[2] * amp[2] / (10.0 ** (ebn0_db / 10.0)));
    for (int m = 0; m < nsmp; m++) begin
      r_re[m] = gauss(sigma); r_im[m] = gauss(sigma);
      for (int k = 0; k < K; k++) begin
        u[k].rx(m, nr, ni);
        r_re[m] += nr; r_im[m] += ni;
      end
    end
    for (int r = 0; r < 2; r++) begin dec[r].delete(); rdec[r].delete(); end
    n33 = '{0, 0, 0}; e33 = '{0, 0, 0};
    nbits = '{0, 0, 0}; nerr = '{0, 0, 0}; rbits = '{0, 0}; rerr = '{0, 0};
    rx_valid = 0; rx_sof = 0;
    @(negedge clk) rst_n = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < nsmp; ) begin
      @(negedge clk);
      if (rx_valid && rx_ready) m++;
      if (m < nsmp) begin
        rx_valid = 1'b1;
        rx_sof = (m % (CHIPS_PER_FRAME * 4) == 0);
        rx_sample.re = SAMPLE_W'($rtoi(r_re[m] + (r_re[m] >= 0 ? 0.5 : -0.5)));
        rx_sample.im = SAMPLE_W'($rtoi(r_im[m] + (r_im[m] >= 0 ? 0.5 : -0.5)));
      end else rx_valid = 0;
    end
    repeat (2000) @(posedge clk);
    ber_s = real'(nerr[2]) / real'(nbits[2]);
    ber_r1 = real'(rerr[0]) / real'(rbits[0]);
    ber_r2 = real'(rerr[1]) / real'(rbits[1]);
    $display("%-24s BER U0 %.4f | U1 %.4f (no SIC %.4f) | U2 %.4f (no SIC %.4f)  [%0d bits]",
             name, real'(nerr[0]) / real'(nbits[0]), real'(nerr[1]) / real'(nbits[1]), ber_r1,
             ber_s, ber_r2, nbits[2]);
    $display("%-24s 33-tap regeneration: U1 %.4f, U2 %.4f", "",
             real'(e33[1]) / real'(n33[1]), real'(e33[2]) / real'(n33[2]));
    check(ready33 || rx_valid == 1'b0, "33-tap receiver fell behind");
    for (int k = 0; k < K; k++)
      check(nbits[k] >= NB_FRAME * nframes,
            $sformatf("%s: U%0d delivered only %0d bits", name, k, nbits[k]));
    if (cancel_en != '0) check(ber_s <= 0.10, $sformatf("%s: U2 error rate %.4f with SIC", name, ber_s));
    if (cancel_en == '0) begin
      int ndiff;
      ndiff = 0;
      for (int r = 0; r < 2; r++)
        for (int i = 0; i < dec[r].size() && i < rdec[r].size(); i++)
          if (dec[r][i] != rdec[r][i]) ndiff++;
      check(ndiff == 0, $sformatf("%s: RAKE-only chain differs from the plain RAKEs in %0d bits",
                                  name, ndiff));
    end else if (kind == 0) begin
      bound = qfunc($sqrt(2.0 * 10.0 ** (ebn0_db / 10.0)));
      $display("%-24s single-user bound %.5f", "", bound);
      check(ber_s <= 4.0 * bound, $sformatf("%s: U2 error rate %.4f above 4x bound", name, ber_s));
      check(nerr[2] < rerr[1], $sformatf("%s: cancellation did not help U2", name));
    end
    if (cancel_en != '0) begin
      tot_33 += e33[2];
      tot_sic += nerr[2];
      tot_raw += rerr[1];
    end
  endtask

  initial begin
    foreach (pil[i]) pil[i] = 1'b0;
    code_num = '{24'd11, 24'd523, 24'd70001};
    gain = '{12'd480, 12'd480, 12'd480};
    w_coef = 8'd128;
    r_re = new[MAXSMP]; r_im = new[MAXSMP];
    run("AWGN 7 dB", 0, 0, 2, 7.0);
    run("single-path fading", 1, 0, 1, 10.0);
    for (int c = 1; c <= 6; c++) run($sformatf("multipath case %0d", c), 2, c, 1, 10.0);
    cancel_en = '0;
    run("AWGN 7 dB, RAKE only", 0, 0, 1, 7.0);
    $display("all runs: U2 errors %0d with SIC, %0d without", tot_sic, tot_raw);
    check(tot_sic < tot_raw, "cancellation did not lower U2's errors over all runs");
    $display("all runs: U2 errors with 33-tap regeneration %0d", tot_33);
    check(2 * tot_sic < tot_raw && 2 * tot_33 < tot_raw,
          "cancellation did not halve U2's errors with both filters");
    check(2 * tot_33 > tot_sic && 2 * tot_sic > tot_33,
          "9-tap and 33-tap regeneration differ by more than a factor of two");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
