// channel_estimator: pilot-aided channel estimate of one path, ARMA-smoothed.
//
// Each DPCCH bit period delivers the accumulated descrambled signal p_acc. For a pilot bit b_p
// the raw estimate is alpha~[m] = -j * b_p * p_acc. Once every two pilot bits (on the second bit
// of a pair) the estimate is updated as
//   alpha^[m] = W * alpha^[m-2] + (1 - W) * (alpha~[m] + alpha~[m-1]),
// with W = w_coef / 256 and an arithmetic right shift. Over pairs of non-pilot DPCCH bits the
// estimate is held. alpha_valid pulses, one cycle after the second bit's p_acc, at the end of
// every pair whether the estimate changed or not. The first pilot pair after `clr` loads
// alpha~[m] + alpha~[m-1] directly, so the filter does not start from zero; that start-up rule,
// the Q8 weight and the widths are this design's, the filter itself is the document's.
// The steady-state gain is 2 * 512 = 1024 times the path gain times beta_c.
module channel_estimator
  import sic_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         pacc_valid,
  input  cplx_acc_t    pacc,
  input  logic         is_pilot,    // this DPCCH bit is a pilot bit
  input  logic         pilot_neg,   // known pilot value is -1
  input  logic         second,      // second bit of a pair
  input  logic [W_FRAC-1:0] w_coef, // W in units of 1/256
  output cplx_alpha_t  alpha,
  output logic         alpha_valid
);
  localparam int unsigned PW = ALPHA_W + W_FRAC + 2;
  logic signed [ALPHA_W-1:0] raw_re, raw_im, first_re_q, first_im_q, sum_re, sum_im;
  logic signed [PW-1:0] upd_re, upd_im, w_s, wn_s;
  logic init_q;

  always_comb begin
    // -j * (x + jy) = y - jx, then the pilot sign
    raw_re = pilot_neg ? -ALPHA_W'(pacc.im) :  ALPHA_W'(pacc.im);
    raw_im = pilot_neg ?  ALPHA_W'(pacc.re) : -ALPHA_W'(pacc.re);
    sum_re = first_re_q + raw_re;
    sum_im = first_im_q + raw_im;
    w_s  = PW'({1'b0, w_coef});
    wn_s = PW'(1 << W_FRAC) - w_s;
    upd_re = (w_s * PW'(alpha.re) + wn_s * PW'(sum_re)) >>> W_FRAC;
    upd_im = (w_s * PW'(alpha.im) + wn_s * PW'(sum_im)) >>> W_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alpha <= '0; alpha_valid <= 1'b0; init_q <= 1'b1;
      first_re_q <= '0; first_im_q <= '0;
    end else begin
      alpha_valid <= 1'b0;
      if (clr) begin
        alpha <= '0; init_q <= 1'b1;
      end else if (pacc_valid) begin
        if (!second) begin
          first_re_q <= raw_re;
          first_im_q <= raw_im;
        end else begin
          alpha_valid <= 1'b1;
          if (is_pilot) begin
            init_q <= 1'b0;
            if (init_q) begin
              alpha.re <= sum_re;
              alpha.im <= sum_im;
            end else begin
              alpha.re <= ALPHA_W'(upd_re);
              alpha.im <= ALPHA_W'(upd_im);
            end
          end
        end
      end
    end
  end
endmodule
