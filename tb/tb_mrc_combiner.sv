// tb_mrc_combiner: random finger symbols, estimates and finger enables; the registered decision
// and metric must equal sum over enabled fingers of Re(q * conj(alpha)), one cycle later.
`timescale 1ns/1ps
module tb_mrc_combiner;
  import sic_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  cplx_acc_t q [4];
  cplx_alpha_t alpha [4];
  logic [3:0] en;
  logic out_valid, bit_neg;
  logic signed [ACC_W+ALPHA_W+3:0] metric;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  mrc_combiner dut (.*);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    longint s;
    foreach (q[i]) begin q[i] = '0; alpha[i] = '0; end
    en = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = 1; en = 4'($urandom);
      s = 0;
      for (int l = 0; l < 4; l++) begin
        q[l].re = ACC_W'($signed(22'($urandom))); q[l].im = ACC_W'($signed(22'($urandom)));
        alpha[l].re = ALPHA_W'($signed(24'($urandom))); alpha[l].im = ALPHA_W'($signed(24'($urandom)));
        if (en[l]) s += longint'(q[l].re) * longint'(alpha[l].re) + longint'(q[l].im) * longint'(alpha[l].im);
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || longint'(metric) != s || bit_neg != (s < 0)) begin
        failures++; $display("FAIL: n %0d metric %0d want %0d", n, metric, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
