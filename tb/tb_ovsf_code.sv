// tb_ovsf_code: checks every chip of every OVSF code of spreading factors 16 and 256 against
// the recursive code-tree construction.
`timescale 1ns/1ps
module tb_ovsf_code;
  import tb_wcdma_pkg::*;
  logic [3:0] k16, n16; logic c16;
  logic [7:0] k256, n256; logic c256;
  int checks = 0, failures = 0;
  ovsf_code #(.LOG2_SF(4)) dut16 (.code_idx(k16), .chip_idx(n16), .chip_neg(c16));
  ovsf_code #(.LOG2_SF(8)) dut256 (.code_idx(k256), .chip_idx(n256), .chip_neg(c256));
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int k = 0; k < 16; k++) for (int n = 0; n < 16; n++) begin
      k16 = 4'(k); n16 = 4'(n); #1;
      checks++; if (c16 !== ovsf_neg(16, k, n)) begin failures++; $display("FAIL sf16 k%0d n%0d", k, n); end
    end
    for (int k = 0; k < 256; k += 3) for (int n = 0; n < 256; n++) begin
      k256 = 8'(k); n256 = 8'(n); #1;
      checks++; if (c256 !== ovsf_neg(256, k, n)) begin failures++; $display("FAIL sf256 k%0d n%0d", k, n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
