// tb_ber_checker: loads 100 reference bits, sends 350 detected bits (three and a half passes
// over the reference) with errors injected at random, and checks the bit and error counts,
// then the clear.
`timescale 1ns/1ps
module tb_ber_checker;
  logic clk = 0, rst_n = 0, clr = 0, ref_we = 0, ref_bit = 0, det_valid = 0, det_neg = 0;
  logic [11:0] ref_addr = '0;
  logic [12:0] ref_len = 13'd100;
  logic [31:0] bit_count, err_count;
  int checks = 0, failures = 0;
  bit refb [100];
  always #5 clk = ~clk;
  ber_checker dut (.*);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int nerr;
    nerr = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      refb[i] = 1'($urandom);
      @(negedge clk); ref_we = 1; ref_addr = 12'(i); ref_bit = refb[i];
    end
    @(negedge clk) ref_we = 0;
    for (int i = 0; i < 350; i++) begin
      bit e;
      e = ($urandom % 7) == 0;
      nerr += e;
      @(negedge clk); det_valid = 1; det_neg = refb[i % 100] ^ e;
      @(negedge clk); det_valid = 0;
      checks++;
      if (bit_count != 32'(i + 1) || err_count != 32'(nerr)) begin
        failures++; $display("FAIL: bit %0d counts %0d/%0d want %0d", i, bit_count, err_count, nerr);
      end
    end
    @(negedge clk) clr = 1; @(negedge clk) clr = 0;
    checks++;
    if (bit_count != 0 || err_count != 0) begin failures++; $display("FAIL: clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
