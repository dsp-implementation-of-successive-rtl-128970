// rake_finger: one RAKE finger: descrambling, DPDCH despreading and DPCCH accumulation.
//
// For every chip strobe the finger takes the chip-rate sample r'[4n + tau] picked for its path,
// multiplies it by the conjugate scrambling chip, p = r' * conj(C_s) (C_s is +-1 +-j, so this is
// two additions), and keeps two running sums:
//   q     = sum of p * C_d over the SF chips of one DPDCH bit         (despread data symbol)
//   p_acc = sum of p over the 256 chips of one DPCCH bit              (C_c is all ones)
// On the last chip of a data bit, q_valid pulses for one cycle with q; on the last chip of a
// DPCCH bit, pacc_valid pulses with p_acc. Both outputs are registered and appear the cycle after
// the chip strobe. `clr` empties both sums (frame restart). The algorithm is the document's; the
// interface and the one-cycle timing are this design's.
module rake_finger
  import sic_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clr,
  input  logic      chip_en,      // one chip arrives
  input  cplx_s_t   sample,       // r'[4n + tau]
  input  logic      cs_re_neg,    // scrambling chip, sign flags
  input  logic      cs_im_neg,
  input  logic      cd_neg,       // DPDCH channelization chip
  input  logic      last_dchip,   // last chip of a DPDCH bit
  input  logic      last_cchip,   // last chip of a DPCCH bit
  output logic      q_valid,
  output cplx_acc_t q,
  output logic      pacc_valid,
  output cplx_acc_t pacc
);
  logic signed [ACC_W-1:0] a, b, p_re, p_im, d_re, d_im;
  cplx_acc_t dacc_q, cacc_q;

  always_comb begin
    a = ACC_W'(sample.re);
    b = ACC_W'(sample.im);
    // (a + jb)(cr - j ci) = (a cr + b ci) + j(b cr - a ci)
    p_re = (cs_re_neg ? -a : a) + (cs_im_neg ? -b : b);
    p_im = (cs_re_neg ? -b : b) - (cs_im_neg ? -a : a);
    d_re = cd_neg ? -p_re : p_re;
    d_im = cd_neg ? -p_im : p_im;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dacc_q <= '0; cacc_q <= '0;
      q_valid <= 1'b0; pacc_valid <= 1'b0;
      q <= '0; pacc <= '0;
    end else begin
      q_valid    <= 1'b0;
      pacc_valid <= 1'b0;
      if (clr) begin
        dacc_q <= '0; cacc_q <= '0;
      end else if (chip_en) begin
        if (last_dchip) begin
          q.re <= dacc_q.re + d_re;
          q.im <= dacc_q.im + d_im;
          q_valid <= 1'b1;
          dacc_q <= '0;
        end else begin
          dacc_q.re <= dacc_q.re + d_re;
          dacc_q.im <= dacc_q.im + d_im;
        end
        if (last_cchip) begin
          pacc.re <= cacc_q.re + p_re;
          pacc.im <= cacc_q.im + p_im;
          pacc_valid <= 1'b1;
          cacc_q <= '0;
        end else begin
          cacc_q.re <= cacc_q.re + p_re;
          cacc_q.im <= cacc_q.im + p_im;
        end
      end
    end
  end
endmodule
