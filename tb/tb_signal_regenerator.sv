// tb_signal_regenerator: feeds random decisions and random channel estimates pair by pair
// (each pair written while the previous one is being rebuilt) and checks every rebuilt sample
// for three pairs against r^'[u] = sum_l alpha_l[pair(u)] * x'[u - tau_l] / 2^26, computed in
// the testbench with exact integer arithmetic from chips it builds itself (reference scrambling
// code, code-tree OVSF, raised-cosine taps from the formula rounded to Q8). Also checked: the
// frame-start flag on sample 0, that sample u appears LAT steps after received sample u, and
// that every step yields one sample. A second instance with the 33-tap filter runs on the same
// inputs and is checked the same way against its own reference.
`timescale 1ns/1ps
module tb_signal_regenerator;
  import sic_pkg::*;
  import tb_wcdma_pkg::*;
  localparam int L = 4, SF = 16, NB = 32, NPAIR = 5;
  localparam int LAT = CHIPS_PER_PAIR * 4 + D_MAX + 256;
  localparam int NU = 3 * 2048;
  logic clk = 0, rst_n = 0, step = 0, sof = 0, pair_valid = 0, pair_bank = 0;
  logic [NB-1:0] pair_bits;
  logic [1:0] pair_ctrl;
  cplx_alpha_t pair_alpha [L];
  logic [TAU_W-1:0] tau [L];
  logic [11:0] gain;
  logic [23:0] code_num;
  logic rhat_valid, rhat_sof;
  logic signed [17:0] rhat_re, rhat_im;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  signal_regenerator dut (.*);
  logic rhat33_valid, rhat33_sof;
  logic signed [17:0] rhat33_re, rhat33_im;
  signal_regenerator #(.NTAPS(33)) dut33 (.clk, .rst_n, .step, .sof, .pair_valid, .pair_bank,
    .pair_bits, .pair_ctrl, .pair_alpha, .tau, .gain, .code_num, .rhat_valid(rhat33_valid),
    .rhat_sof(rhat33_sof), .rhat_re(rhat33_re), .rhat_im(rhat33_im));

  logic [NB-1:0] bits [NPAIR];
  logic [1:0] ctrl [NPAIR];
  longint ar [NPAIR][L], ai [NPAIR][L];
  longint z_re [], z_im [], w_re [], w_im [], w33_re [], w33_im [];
  int h8 [9], h33 [33];
  int nout33 = 0;
  int nout = 0, nstep = 0, cyc = 0;
  int step_cyc [LAT + NU + 16];
  always @(posedge clk) begin cyc++; if (step) step_cyc[nstep - 1] = cyc; end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && rhat_valid) begin
    if (nout < NU) begin
      longint er, ei;
      int p;
      p = nout / 2048;
      er = 0; ei = 0;
      for (int l = 0; l < L; l++) begin
        int q;
        q = nout + 4 - int'(tau[l]);
        if (q >= 0) begin
          er += ar[p][l] * w_re[q] - ai[p][l] * w_im[q];
          ei += ar[p][l] * w_im[q] + ai[p][l] * w_re[q];
        end
      end
      er = (er + (longint'(1) <<< 25)) >>> 26;
      ei = (ei + (longint'(1) <<< 25)) >>> 26;
      checks++;
      if (longint'(rhat_re) != er || longint'(rhat_im) != ei || rhat_sof != (nout == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL: u %0d got %0d,%0d want %0d,%0d", nout, rhat_re, rhat_im, er, ei);
      end
      // produced three cycles after step LAT + u
      checks++;
      if (cyc != step_cyc[LAT + nout] + 3) begin
        failures++; if (failures < 10) $display("FAIL: u %0d at cycle %0d, step at %0d", nout, cyc, step_cyc[LAT + nout]);
      end
    end
    nout++;
  end

  // the same with the 33-tap filter
  always @(posedge clk) if (rst_n && rhat33_valid) begin
    if (nout33 < NU) begin
      longint er, ei;
      int p;
      p = nout33 / 2048;
      er = 0; ei = 0;
      for (int l = 0; l < L; l++) begin
        int q;
        q = nout33 + 16 - int'(tau[l]);
        if (q >= 0) begin
          er += ar[p][l] * w33_re[q] - ai[p][l] * w33_im[q];
          ei += ar[p][l] * w33_im[q] + ai[p][l] * w33_re[q];
        end
      end
      er = (er + (longint'(1) <<< 25)) >>> 26;
      ei = (ei + (longint'(1) <<< 25)) >>> 26;
      checks++;
      if (longint'(rhat33_re) != er || longint'(rhat33_im) != ei || rhat33_sof != (nout33 == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL: 33 taps, u %0d got %0d,%0d want %0d,%0d", nout33, rhat33_re, rhat33_im, er, ei);
      end
      // produced three cycles after step LAT + u
      checks++;
      if (cyc != step_cyc[LAT + nout33] + 3) begin
        failures++; if (failures < 10) $display("FAIL: 33 taps, u %0d at cycle %0d, step at %0d", nout33, cyc, step_cyc[LAT + nout33]);
      end
    end
    nout33++;
  end

  initial begin
    scr_model scr;
    bit cr, ci;
    int nchip;
    for (int k = 0; k < 9; k++) h8[k] = int'($floor(rc_tap(k - 4) * 256.0 + 0.5));
    for (int k = 0; k < 33; k++) h33[k] = int'($floor(rc_tap(k - 16) * 256.0 + 0.5));
    code_num = 24'd777; gain = 12'd363;
    tau[0] = 9'd0; tau[1] = 9'd7; tau[2] = 9'd130; tau[3] = 9'd511;
    for (int p = 0; p < NPAIR; p++) begin
      for (int j = 0; j < NB; j++) bits[p][j] = 1'($urandom);
      ctrl[p] = 2'($urandom);
      for (int l = 0; l < L; l++) begin
        ar[p][l] = longint'($signed(21'($urandom))); ai[p][l] = longint'($signed(21'($urandom)));
      end
    end
    // reference chips and filter output
    nchip = NU / 4 + 8;
    z_re = new[nchip]; z_im = new[nchip];
    scr = new(code_num);
    for (int c = 0; c < nchip; c++) begin
      longint x, y;
      int p;
      p = c / 512;
      scr.next(cr, ci);
      x = (bits[p][(c % 512) / SF] ^ ovsf_neg(SF, SF / 4, c % SF)) ? -longint'(gain) : longint'(gain);
      y = ctrl[p][(c % 512) / 256] ? -256 : 256;
      z_re[c] = (cr ? -x : x) - (ci ? -y : y);
      z_im[c] = (ci ? -x : x) + (cr ? -y : y);
    end
    w_re = new[NU + 8]; w_im = new[NU + 8];
    for (int v = 0; v < NU + 8; v++) begin
      w_re[v] = 0; w_im[v] = 0;
      for (int k = 0; k < 9; k++)
        if (v - k >= 0 && (v - k) % 4 == 0) begin
          w_re[v] += h8[k] * z_re[(v - k) / 4]; w_im[v] += h8[k] * z_im[(v - k) / 4];
        end
    end
    w33_re = new[NU + 24]; w33_im = new[NU + 24];
    for (int v = 0; v < NU + 24; v++) begin
      w33_re[v] = 0; w33_im[v] = 0;
      for (int k = 0; k < 33; k++)
        if (v - k >= 0 && (v - k) % 4 == 0) begin
          w33_re[v] += h33[k] * z_re[(v - k) / 4]; w33_im[v] += h33[k] * z_im[(v - k) / 4];
        end
    end
    pair_bits = '0; pair_ctrl = '0; foreach (pair_alpha[l]) pair_alpha[l] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int p = 0; p < 2; p++) begin
      @(negedge clk);
      pair_valid = 1; pair_bank = p[0]; pair_bits = bits[p]; pair_ctrl = ctrl[p];
      for (int l = 0; l < L; l++) begin pair_alpha[l].re = ALPHA_W'(ar[p][l]); pair_alpha[l].im = ALPHA_W'(ai[p][l]); end
      @(negedge clk) pair_valid = 0;
    end
    for (int t = 0; t < LAT + NU + 8; t++) begin
      int v;
      @(negedge clk);
      v = t - (LAT - 4);
      if (v > 0 && v % 2048 == 100 && v / 2048 + 1 < NPAIR) begin
        int p;
        p = v / 2048 + 1;
        pair_valid = 1; pair_bank = p[0]; pair_bits = bits[p]; pair_ctrl = ctrl[p];
        for (int l = 0; l < L; l++) begin pair_alpha[l].re = ALPHA_W'(ar[p][l]); pair_alpha[l].im = ALPHA_W'(ai[p][l]); end
        @(negedge clk) pair_valid = 0;
      end
      step = 1; sof = (t == 0); nstep++;
      @(negedge clk) step = 0;
      if ($urandom % 3 == 0) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (nout != NU + 8) begin failures++; $display("FAIL: %0d outputs for %0d steps", nout, nstep); end
    checks++;
    if (nout33 != NU + 8) begin failures++; $display("FAIL: 33 taps: %0d outputs", nout33); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
