// tb_fifo_link: random pushes and pops against a queue model: data order, the valid, full and
// almost-full flags and the count, including runs to full and to empty.
`timescale 1ns/1ps
module tb_fifo_link;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [31:0] push_data = '0, pop_data;
  logic full, afull, pop_valid;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [31:0] model [$];
  always #5 clk = ~clk;
  fifo_link #(.WIDTH(32), .DEPTH(16), .AF_MARGIN(4)) dut (.*);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int bias;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      bias = (n / 500) % 2 ? 3 : 1;
      checks++;
      if (pop_valid != (model.size() != 0) || full != (model.size() == 16) ||
          afull != (model.size() >= 12) || int'(count) != model.size()) begin
        failures++; $display("FAIL: flags at %0d (size %0d count %0d)", n, model.size(), count);
      end
      if (model.size() != 0) begin
        checks++;
        if (pop_data !== model[0]) begin failures++; $display("FAIL: data at %0d", n); end
      end
      push = !full && ($urandom % 4) < bias;
      pop  = ($urandom % 4) < 4 - bias;
      push_data = $urandom;
      @(posedge clk);
      if (pop && model.size() != 0) void'(model.pop_front());
      if (push) model.push_back(push_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
