// tb_rake_finger: random chip samples, scrambling and channelization chips go into one finger
// with SF = 16; the DPDCH symbol after every 16 chips and the DPCCH sum after every 256 chips
// are compared with sums the testbench forms from the descrambled values, and each output must
// appear exactly one cycle after the chip that completes it.
`timescale 1ns/1ps
module tb_rake_finger;
  import sic_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, chip_en = 0;
  cplx_s_t sample;
  logic cs_re_neg, cs_im_neg, cd_neg, last_dchip, last_cchip;
  logic q_valid, pacc_valid;
  cplx_acc_t q, pacc;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  rake_finger dut (.*);
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    longint dr, di, cr, ci;
    sample = '0; {cs_re_neg, cs_im_neg, cd_neg, last_dchip, last_cchip} = '0;
    dr = 0; di = 0; cr = 0; ci = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4096; n++) begin
      longint a, b, pr, pi, sr, si;
      @(negedge clk);
      chip_en = 1;
      sample.re = 16'($urandom); sample.im = 16'($urandom);
      cs_re_neg = 1'($urandom); cs_im_neg = 1'($urandom); cd_neg = 1'($urandom);
      last_dchip = (n % 16 == 15); last_cchip = (n % 256 == 255);
      a = longint'(sample.re); b = longint'(sample.im);
      sr = cs_re_neg ? -1 : 1; si = cs_im_neg ? -1 : 1;
      // p = r * conj(c)
      pr = a * sr + b * si; pi = b * sr - a * si;
      dr += cd_neg ? -pr : pr; di += cd_neg ? -pi : pi;
      cr += pr; ci += pi;
      @(negedge clk);
      chip_en = 0;
      checks++;
      if (q_valid !== last_dchip || pacc_valid !== last_cchip) begin
        failures++; $display("FAIL: output strobe at chip %0d", n);
      end
      if (last_dchip) begin
        checks++;
        if (longint'(q.re) != dr || longint'(q.im) != di) begin failures++; $display("FAIL: q at chip %0d", n); end
        dr = 0; di = 0;
      end
      if (last_cchip) begin
        checks++;
        if (longint'(pacc.re) != cr || longint'(pacc.im) != ci) begin failures++; $display("FAIL: pacc at chip %0d", n); end
        cr = 0; ci = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
