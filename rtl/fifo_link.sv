// fifo_link: FIFO-buffered point-to-point link between processing stages.
//
// A synchronous first-in first-out buffer of DEPTH words. The producer pushes when `push` is
// high (it must not push while `full`); the consumer sees the oldest word on pop_data whenever
// pop_valid is high and takes it with `pop`. A consumer therefore simply waits while the link
// is empty, which is the event-driven hand-off between stages. `afull` rises when fewer than
// AF_MARGIN words are free, for producers with words still in flight. Words are 32 bits as in
// the document's links; depth, margin and the valid/ready style are this design's choices.
module fifo_link #(
  parameter int unsigned WIDTH     = 32,
  parameter int unsigned DEPTH     = 64,
  parameter int unsigned AF_MARGIN = 8,
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] push_data,
  output logic             full,
  output logic             afull,
  output logic             pop_valid,
  input  logic             pop,
  output logic [WIDTH-1:0] pop_data,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp_q, rp_q;
  logic             do_push, do_pop;

  assign full      = (count == (AW+1)'(DEPTH));
  assign afull     = (count >= (AW+1)'(DEPTH - AF_MARGIN));
  assign pop_valid = (count != '0);
  assign pop_data  = mem[rp_q];
  assign do_push   = push && !full;
  assign do_pop    = pop && pop_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q <= '0; rp_q <= '0; count <= '0;
    end else begin
      if (do_push) wp_q <= AW'(wp_q + 1'b1);
      if (do_pop)  rp_q <= AW'(rp_q + 1'b1);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) if (do_push) mem[wp_q] <= push_data;

  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
endmodule
