// tb_sic_receiver: end-to-end test of the three-user SIC receiver at its default size.
//
// Three users with different codes, powers and multipath channels (two paths 3.75 chips apart;
// four paths one chip apart; three paths up to 76.75 chips apart) are transmitted one after
// another as continuous frames and summed with a little noise. One full frame plus the chain's
// latency is streamed through the receiver. Checked:
//  - every detected data bit of every user against the transmitted bits (no errors allowed),
//  - the bit-error checkers' counts against the testbench's own count,
//  - the residual after stage U0 against r' - r'_0 (the received signal without user U0):
//    the residual error energy must be under 3 % of U0's energy,
//  - that cancellation matters: a plain RAKE for U2 on the raw signal makes errors,
//  - the bit rate: 2400 bits per user per frame at SF 16,
//  - that estimates were both refreshed (pilot pairs) and held (non-pilot pairs), that both
//    stages cancelled, and that a stage waited on an empty input link,
//  - the cancellation switch: once U2 has all bits of the frame, cancel_en goes low; from then on
//    stage U0 must pass the received samples on unchanged (bits detected after the switch are
//    not held to zero errors).
`timescale 1ns/1ps
module tb_sic_receiver;
  import sic_pkg::*;
  import tb_wcdma_pkg::*;

  localparam int K = 3, L = 4, SF = 16, NB_FRAME = CHIPS_PER_FRAME / SF;
  localparam int LATS = CHIPS_PER_PAIR * 4 + D_MAX + 256;
  localparam int NSMP = CHIPS_PER_FRAME * 4 + 2 * LATS + 4096 + 2048;
  localparam int NCHIP = NSMP / 4 + 8;

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
  int sw_idx = -1, n_pass = 0, nerr_all [K];
  logic [K-1:0] bit_valid, bit_neg, est_update, est_hold;
  logic [K-2:0] cancel_active;
  logic res_valid, res_sof;
  cplx_s_t res_sample;
  logic ber_clr;
  logic [K-1:0] ref_we;
  logic [$clog2(2400)-1:0] ref_addr;
  logic ref_bit;
  logic [$clog2(2400):0] ref_len;
  logic [31:0] bit_count [K], err_count [K];

  sic_receiver dut (.*);

  // plain RAKE for U2 on the raw received signal, for comparison
  logic raw_bv, raw_bn, raw_pv, raw_pb, raw_eu, raw_eh;
  logic [31:0] raw_pbits;
  logic [1:0] raw_pctrl;
  cplx_alpha_t raw_palpha [L];
  rake_receiver u_raw (.clk, .rst_n, .in_valid(rx_valid && rx_ready), .in_sof(rx_sof),
    .in_sample(rx_sample), .tau(tau[2]), .finger_en(finger_en[2]), .code_num(code_num[2]),
    .w_coef, .bit_valid(raw_bv), .bit_neg(raw_bn), .pair_valid(raw_pv), .pair_bank(raw_pb),
    .pair_bits(raw_pbits), .pair_ctrl(raw_pctrl), .pair_alpha(raw_palpha),
    .est_update(raw_eu), .est_hold(raw_eh));

  int checks = 0, failures = 0;
  user_model u [K];
  bit pil [150];
  real r_re [], r_im [], r0_re [], r0_im [];
  int nbits [K], nerr [K], raw_bits = 0, raw_err = 0;
  int n_upd = 0, n_hold = 0, n_wait = 0, n_cancel0 = 0, n_cancel1 = 0;
  int res_idx = 0;
  real e_err = 0.0, e_u0 = 0.0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitors
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < K; k++) if (bit_valid[k]) begin
      int i;
      i = nbits[k] % NB_FRAME;
      if (bit_neg[k] != u[k].dbits[i]) begin
        nerr_all[k]++;
        if (sw_idx < 0) nerr[k]++;
      end
      nbits[k]++;
    end
    if (raw_bv) begin
      if (raw_bn != u[2].dbits[raw_bits % NB_FRAME]) raw_err++;
      raw_bits++;
    end
    n_upd  += est_update[1] ? 1 : 0;
    n_hold += est_hold[1] ? 1 : 0;
    if (dut.u_stage1.u_rake.started_q && !dut.l1_valid) n_wait++;
    n_cancel0 += cancel_active[0] ? 1 : 0;
    n_cancel1 += cancel_active[1] ? 1 : 0;
    if (sw_idx < 0 && nbits[2] >= NB_FRAME) begin
      cancel_en <= '0;
      sw_idx = res_idx;
    end
    // residual after U0, from the stage output
    if (dut.s0_ov) begin
      real dr, di;
      if (sw_idx >= 0 && res_idx >= sw_idx + 8) begin
        n_pass++;
        if (dut.s0_out.re != SAMPLE_W'($rtoi(r_re[res_idx] + (r_re[res_idx] >= 0 ? 0.5 : -0.5))) ||
            dut.s0_out.im != SAMPLE_W'($rtoi(r_im[res_idx] + (r_im[res_idx] >= 0 ? 0.5 : -0.5))))
          check(0, $sformatf("U0 output %0d not the received sample with cancellation off",
                             res_idx));
      end
      if (res_idx == 0 && !dut.s0_osof) check(0, "first U0 residual not marked as frame start");
      if (res_idx >= 4096 && res_idx < CHIPS_PER_FRAME * 4) begin
        dr = real'(dut.s0_out.re) - (r_re[res_idx] - r0_re[res_idx]);
        di = real'(dut.s0_out.im) - (r_im[res_idx] - r0_im[res_idx]);
        e_err += dr * dr + di * di;
        e_u0  += r0_re[res_idx] ** 2 + r0_im[res_idx] ** 2;
      end
      res_idx++;
    end
  end

  initial begin
    real nr, ni;
    foreach (pil[i]) pil[i] = 1'b0;
    code_num = '{24'd11, 24'd523, 24'd70001};
    // beta_c = 8/15, beta_d = 1: gain ratio 15/8 = 480/256
    u[0] = new(SF, NCHIP, code_num[0], 2000.0, 2000.0 * 8.0 / 15.0, 6, pil);
    u[1] = new(SF, NCHIP, code_num[1], 900.0, 900.0 * 8.0 / 15.0, 6, pil);
    u[2] = new(SF, NCHIP, code_num[2], 280.0, 280.0 * 8.0 / 15.0, 6, pil);
    // channels (delays in quarter chips)
    u[0].add_path(0, 0.95, 0.3);  u[0].add_path(15, 0.30, 2.0);
    u[1].add_path(2, 0.80, -1.0); u[1].add_path(6, 0.57, 0.7);
    u[1].add_path(10, 0.40, 2.5); u[1].add_path(14, 0.28, -2.2);
    u[2].add_path(1, 0.70, 1.2);  u[2].add_path(16, 0.70, -0.4); u[2].add_path(308, 0.70, 2.9);
    for (int k = 0; k < K; k++) begin
      finger_en[k] = '0;
      for (int l = 0; l < L; l++) tau[k][l] = '0;
      for (int l = 0; l < u[k].npath; l++) begin
        tau[k][l] = TAU_W'(u[k].tau[l]); finger_en[k][l] = 1'b1;
      end
      gain[k] = 12'd480;
    end
    w_coef = 8'd128;
    r_re = new[NSMP]; r_im = new[NSMP]; r0_re = new[NSMP]; r0_im = new[NSMP];
    for (int m = 0; m < NSMP; m++) begin
      u[0].rx(m, nr, ni);
      r0_re[m] = nr; r0_im[m] = ni;
      r_re[m] = nr; r_im[m] = ni;
      for (int k = 1; k < K; k++) begin
        u[k].rx(m, nr, ni);
        r_re[m] += nr; r_im[m] += ni;
      end
      r_re[m] += real'(int'($urandom % 17) - 8);
      r_im[m] += real'(int'($urandom % 17) - 8);
    end
    rx_valid = 0; rx_sof = 0; rx_sample = '0;
    ber_clr = 0; ref_we = '0; ref_addr = '0; ref_bit = 0; ref_len = 12'd2400;
    repeat (5) @(posedge clk);
    rst_n = 1;
    // load the transmitted bits into the checkers
    for (int k = 0; k < K; k++)
      for (int i = 0; i < NB_FRAME; i++) begin
        @(negedge clk);
        ref_we = '0; ref_we[k] = 1'b1; ref_addr = 12'(i); ref_bit = u[k].dbits[i];
      end
    @(negedge clk) ref_we = '0;
    ber_clr = 1; @(negedge clk) ber_clr = 0;
    // stream, with gaps once in a while so that downstream stages wait
    for (int m = 0; m < NSMP; ) begin
      @(negedge clk);
      if (rx_valid && rx_ready) m++;
      if (m < NSMP) begin
        rx_valid = ($urandom % 64) != 0;
        rx_sof = (m % (CHIPS_PER_FRAME * 4) == 0);
        rx_sample.re = SAMPLE_W'($rtoi(r_re[m] + (r_re[m] >= 0 ? 0.5 : -0.5)));
        rx_sample.im = SAMPLE_W'($rtoi(r_im[m] + (r_im[m] >= 0 ? 0.5 : -0.5)));
      end else rx_valid = 0;
    end
    @(negedge clk) rx_valid = 0;
    repeat (2000) @(posedge clk);

    for (int k = 0; k < K; k++) begin
      $display("user U%0d: %0d bits, %0d errors (checker %0d/%0d)", k, nbits[k], nerr[k],
               bit_count[k], err_count[k]);
      check(nbits[k] >= NB_FRAME, $sformatf("U%0d produced only %0d bits", k, nbits[k]));
      check(nerr[k] == 0, $sformatf("U%0d has %0d bit errors", k, nerr[k]));
      check(bit_count[k] == 32'(nbits[k]) && err_count[k] == 32'(nerr_all[k]),
            $sformatf("U%0d checker counts differ", k));
    end
    $display("raw RAKE U2: %0d bits, %0d errors", raw_bits, raw_err);
    check(raw_err > 0, "U2 without cancellation shows no errors: interference too weak to test");
    $display("U0 residual error energy %.4f of U0 energy", e_err / e_u0);
    check(e_err < 0.03 * e_u0, "U0 cancellation residual too large");
    // bit rate: U0 bits are complete for the frame about LAT samples after the frame
    check(nbits[0] <= NB_FRAME + 300, "U0 produced more bits than samples allow");
    $display("estimate updates %0d, holds %0d, U1 input waits %0d, cancellations %0d/%0d",
             n_upd, n_hold, n_wait, n_cancel0, n_cancel1);
    check(n_upd > 0, "no estimate update");
    check(n_hold > 0, "no estimate hold");
    check(n_wait > 0, "stage U1 never waited on its input link");
    check(n_cancel0 > 0 && n_cancel1 > 0, "a stage never cancelled");
    $display("cancellation switched off at U0 residual %0d; %0d samples passed on unchanged",
             sw_idx, n_pass);
    check(n_pass > 100, "cancellation was never switched off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
