// tb_rc_filter: the 9-tap and the 33-tap raised-cosine filters side by side. Impulse responses
// against the formula (to Q8 rounding), then random complex input against a direct convolution
// with the same Q8 taps derived from the formula. Also checks the reason for the short filter:
// the nine built taps hold 94 to 95 % of the energy of the cascade of two 33-tap
// root-raised-cosine filters (roll-off 0.22, four samples per chip), computed here from the
// RRC formula.
`timescale 1ns/1ps
module tb_rc_filter;
  import tb_wcdma_pkg::*;
  logic clk = 0, rst_n = 0, in_en = 0;
  logic signed [13:0] in_re = '0, in_im = '0;
  logic signed [24:0] out_re, out_im, o33_re, o33_im;
  int checks = 0, failures = 0;
  int h [9], h33 [33];
  int xr [$], xi [$];
  always #5 clk = ~clk;
  rc_filter dut (.*);
  rc_filter #(.NTAPS(33)) dut33 (.clk, .rst_n, .in_en, .in_re, .in_im, .out_re(o33_re),
                                 .out_im(o33_im));
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real g [33], c [65], e_all, e_9, frac;
    for (int k = 0; k < 9; k++) h[k] = int'($floor(rc_tap(k - 4) * 256.0 + 0.5));
    for (int k = 0; k < 33; k++) h33[k] = int'($floor(rc_tap(k - 16) * 256.0 + 0.5));
    // energy share of the nine centre taps of the RRC cascade
    for (int k = 0; k < 33; k++) g[k] = rrc(real'(k - 16) / 4.0);
    e_all = 0.0; e_9 = 0.0;
    for (int n = 0; n < 65; n++) begin
      c[n] = 0.0;
      for (int i = 0; i < 33; i++) if (n - i >= 0 && n - i < 33) c[n] += g[i] * g[n - i];
      e_all += c[n] * c[n];
      if (n >= 28 && n <= 36) e_9 += c[n] * c[n];
    end
    frac = e_9 / e_all;
    $display("energy of the 9 centre taps in the 65-tap RRC cascade: %.4f", frac);
    checks++;
    if (frac < 0.94 || frac > 0.95) begin failures++; $display("FAIL: energy share %.4f", frac); end

    repeat (3) @(posedge clk); rst_n = 1;
    // impulse of 1000
    for (int n = 0; n < 36; n++) begin
      @(negedge clk); in_en = 1; in_re = (n == 0) ? 14'sd1000 : 14'sd0; in_im = (n == 0) ? -14'sd1000 : 14'sd0;
      @(negedge clk); in_en = 0;
      checks++;
      if (n < 9 && (out_re != 1000 * h[n] || out_im != -1000 * h[n])) begin
        failures++; $display("FAIL: impulse tap %0d got %0d want %0d", n, out_re, 1000 * h[n]);
      end
      if (n >= 9 && (out_re != 0 || out_im != 0)) begin failures++; $display("FAIL: tail %0d", n); end
      checks++;
      if (n < 33 && (o33_re != 1000 * h33[n] || o33_im != -1000 * h33[n])) begin
        failures++; $display("FAIL: 33-tap impulse tap %0d got %0d want %0d", n, o33_re, 1000 * h33[n]);
      end
      if (n >= 33 && (o33_re != 0 || o33_im != 0)) begin failures++; $display("FAIL: 33-tap tail %0d", n); end
    end
    for (int n = 0; n < 2000; n++) begin
      int er, ei;
      @(negedge clk);
      in_en = 1; in_re = 14'($urandom % 16384); in_im = 14'($urandom % 16384);
      xr.push_front(int'(in_re)); xi.push_front(int'(in_im));
      if (xr.size() > 33) begin void'(xr.pop_back()); void'(xi.pop_back()); end
      @(negedge clk); in_en = 0;
      if (n >= 32) begin
        er = 0; ei = 0;
        for (int k = 0; k < 9; k++) begin er += h[k] * xr[k]; ei += h[k] * xi[k]; end
        checks++;
        if (out_re != er || out_im != ei) begin failures++; $display("FAIL: n %0d", n); end
        er = 0; ei = 0;
        for (int k = 0; k < 33; k++) begin er += h33[k] * xr[k]; ei += h33[k] * xi[k]; end
        checks++;
        if (o33_re != er || o33_im != ei) begin failures++; $display("FAIL: 33-tap n %0d", n); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
