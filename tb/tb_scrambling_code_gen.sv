// tb_scrambling_code_gen: compares the long scrambling code generator with a reference built
// from the code's definition (second sequence by a real 16777232-chip advance), over 6000 chips
// for two code numbers, including a reload in the middle of a run. One chip per step.
`timescale 1ns/1ps
module tb_scrambling_code_gen;
  import tb_wcdma_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [23:0] code_num = '0;
  logic cs_re_neg, cs_im_neg;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  scrambling_code_gen dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    scr_model ref_m;
    bit er, ei;
    bit [23:0] codes [2] = '{24'd0, 24'd1234567};
    repeat (3) @(posedge clk); rst_n = 1;
    foreach (codes[c]) begin
      ref_m = new(codes[c]);
      @(negedge clk) begin load = 1; code_num = codes[c]; end
      @(negedge clk) load = 0;
      for (int n = 0; n < 3000 * (c + 1); n++) begin
        ref_m.next(er, ei);
        checks++;
        if (cs_re_neg !== er || cs_im_neg !== ei) begin
          failures++;
          if (failures < 10) $display("FAIL: code %0d chip %0d got %b%b want %b%b", codes[c], n, cs_re_neg, cs_im_neg, er, ei);
        end
        step = 1; @(negedge clk); step = 0;
        if ($urandom % 4 == 0) @(negedge clk);   // idle cycles hold the code
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
