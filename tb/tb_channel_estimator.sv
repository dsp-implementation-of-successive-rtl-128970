// tb_channel_estimator: drives random DPCCH accumulations over slots of 10 bits (6 pilots,
// random known pilot values) and checks the estimate after every pair against the ARMA filter
// alpha^[m] = W alpha^[m-2] + (1-W)(alpha~[m] + alpha~[m-1]) computed in the testbench with
// alpha~ = -j b_p p_acc, including the initial load and the hold over non-pilot pairs.
`timescale 1ns/1ps
module tb_channel_estimator;
  import sic_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, pacc_valid = 0, is_pilot = 0, pilot_neg = 0, second = 0;
  cplx_acc_t pacc;
  logic [7:0] w_coef;
  cplx_alpha_t alpha;
  logic alpha_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  channel_estimator dut (.*);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    longint er, ei, fr, fi, tr, ti;
    bit init;
    init = 1; er = 0; ei = 0; fr = 0; fi = 0;
    pacc = '0; w_coef = 8'd200;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int m = 0; m < 400; m++) begin
      @(negedge clk);
      if (m == 200) w_coef = 8'd64;
      pacc_valid = 1;
      pacc.re = ACC_W'($signed(20'($urandom)));
      pacc.im = ACC_W'($signed(20'($urandom)));
      is_pilot = (m % 10) < 6;
      pilot_neg = 1'($urandom);
      second = m % 2;
      tr = pilot_neg ? -longint'(pacc.im) : longint'(pacc.im);
      ti = pilot_neg ? longint'(pacc.re) : -longint'(pacc.re);
      if (!second) begin fr = tr; fi = ti; end
      else if (is_pilot) begin
        if (init) begin er = fr + tr; ei = fi + ti; init = 0; end
        else begin
          er = (longint'(w_coef) * er + (256 - longint'(w_coef)) * (fr + tr)) >>> 8;
          ei = (longint'(w_coef) * ei + (256 - longint'(w_coef)) * (fi + ti)) >>> 8;
        end
      end
      @(negedge clk);
      pacc_valid = 0;
      checks++;
      if (alpha_valid !== second) begin failures++; $display("FAIL: alpha_valid at bit %0d", m); end
      if (second) begin
        checks++;
        if (longint'(alpha.re) != er || longint'(alpha.im) != ei) begin
          failures++; $display("FAIL: bit %0d got %0d,%0d want %0d,%0d", m, alpha.re, alpha.im, er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
