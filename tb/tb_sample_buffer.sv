// tb_sample_buffer: writes random samples (with idle cycles) and reads them back through four
// taps at random delays, one cycle after capturing the write address, against a model array.
`timescale 1ns/1ps
module tb_sample_buffer;
  import sic_pkg::*;
  localparam int DEPTH = 1024, AW = 10;
  logic clk = 0, rst_n = 0, wr_en = 0;
  cplx_s_t wr_data;
  logic [AW-1:0] wr_ptr, base;
  logic [AW-1:0] rd_delay [4];
  cplx_s_t rd_data [4];
  int checks = 0, failures = 0;
  cplx_s_t hist [$];
  always #5 clk = ~clk;
  sample_buffer #(.DEPTH(DEPTH), .NTAPS(4)) dut (.*);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    wr_data = '0; base = '0; foreach (rd_delay[i]) rd_delay[i] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      wr_en = ($urandom % 3) != 0;
      wr_data = cplx_s_t'($urandom);
      base = wr_ptr;
      if (wr_en) hist.push_back(wr_data);
      @(negedge clk);
      wr_en = 0;
      if (hist.size() > 600) begin
        for (int i = 0; i < 4; i++) rd_delay[i] = AW'($urandom % 512);
        #1;
        if (base == wr_ptr - 1'b1)
          for (int i = 0; i < 4; i++) begin
            int idx;
            cplx_s_t want;
            idx = hist.size() - 1 - int'(rd_delay[i]);
            want = hist[idx];
            checks++;
            if (rd_data[i] !== want) begin
              failures++; $display("FAIL: delay %0d", rd_delay[i]);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
