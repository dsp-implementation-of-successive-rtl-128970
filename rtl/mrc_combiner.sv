// mrc_combiner: maximal-ratio combining and hard decision over the RAKE fingers.
//
// For one symbol the finger outputs q_l are weighted by the conjugate channel estimates and the
// real parts summed: metric = sum_l Re(q_l * conj(alpha_l)) = sum_l (q_re*a_re + q_im*a_im).
// Fingers whose `en` bit is clear do not contribute. The decision is the sign of the metric
// (bit_neg = 1 for a negative metric). One symbol per cycle; output registered, one cycle
// latency. Follows the document's combining rule; the widths are this design's.
module mrc_combiner
  import sic_pkg::*;
#(
  parameter int unsigned L = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  cplx_acc_t   q     [L],
  input  cplx_alpha_t alpha [L],
  input  logic [L-1:0] en,
  output logic        out_valid,
  output logic        bit_neg,
  output logic signed [ACC_W+ALPHA_W+3:0] metric
);
  localparam int unsigned MW = ACC_W + ALPHA_W + 4;
  logic signed [MW-1:0] sum;
  always_comb begin
    sum = '0;
    for (int l = 0; l < int'(L); l++)
      if (en[l]) sum += MW'(q[l].re) * MW'(alpha[l].re) + MW'(q[l].im) * MW'(alpha[l].im);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; bit_neg <= 1'b0; metric <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        metric  <= sum;
        bit_neg <= sum[MW-1];
      end
    end
  end
endmodule
