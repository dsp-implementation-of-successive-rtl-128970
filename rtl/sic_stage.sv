// sic_stage: one successive-interference-cancellation stage (one user).
//
// The stage detects its user with a RAKE receiver, rebuilds that user's contribution to the
// received signal with the signal regenerator, and subtracts it from a delayed copy of the
// received signal: e'[u] = r'[u] - r^'[u]. The received samples wait in a 4096-sample buffer
// until the rebuilt samples are ready, LAT samples later; the residual e' is the input of the
// next stage. Input and output are streams of complex samples at four times the chip rate with a
// start-of-frame flag. The stage takes a sample whenever `out_afull` (the downstream link is
// nearly full) is low, so it stalls only through its output link. The residual of sample u
// leaves about four cycles after received sample u + LAT is taken; the residual is saturated to
// 16 bits. Detected data bits of the user leave on bit_valid/bit_neg. With cancel_en low the
// stage still detects its user but subtracts nothing, passing r' on with the same latency, so
// later stages need no retiming (cancellation switched off once interference is low enough).
// RC_TAPS (9 or 33) is the length of the regenerator's raised-cosine filter.
// Document: Eq. (5), the per-user stage structure and the option to omit a cancellation. This
// design's own: the buffering scheme, the stall rule, the saturation and the enable input.
module sic_stage
  import sic_pkg::*;
#(
  parameter int unsigned L       = 4,
  parameter int unsigned LOG2_SF = 4,
  parameter int unsigned NPILOT  = 6,
  parameter logic [15*NPILOT-1:0] PILOT_NEG = '0,
  parameter int unsigned LAT     = CHIPS_PER_PAIR * 4 + D_MAX + 256,
  parameter int unsigned RC_TAPS = 9        // regenerator's raised-cosine filter: 9 or 33
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_sof,
  input  cplx_s_t           in_sample,
  output logic              in_ready,
  output logic              out_valid,
  output logic              out_sof,
  output cplx_s_t           out_sample,
  input  logic              out_afull,
  input  logic [TAU_W-1:0]  tau [L],
  input  logic [L-1:0]      finger_en,
  input  logic [23:0]       code_num,
  input  logic [W_FRAC-1:0] w_coef,
  input  logic [11:0]       gain,
  input  logic              cancel_en,
  output logic              bit_valid,
  output logic              bit_neg,
  output logic              est_update,
  output logic              est_hold
);
  localparam int unsigned NB  = CHIPS_PER_PAIR / (1 << LOG2_SF);
  localparam int unsigned BAW = 12;
  localparam int unsigned RW  = SAMPLE_W + 2;

  logic in_fire;
  assign in_ready = !out_afull;
  assign in_fire  = in_valid && in_ready;

  logic          pair_valid, pair_bank;
  logic [NB-1:0] pair_bits;
  logic [1:0]    pair_ctrl;
  cplx_alpha_t   pair_alpha [L];

  rake_receiver #(.L(L), .LOG2_SF(LOG2_SF), .NPILOT(NPILOT), .PILOT_NEG(PILOT_NEG)) u_rake (
    .clk, .rst_n, .in_valid(in_fire), .in_sof, .in_sample, .tau, .finger_en, .code_num, .w_coef,
    .bit_valid, .bit_neg, .pair_valid, .pair_bank, .pair_bits, .pair_ctrl, .pair_alpha,
    .est_update, .est_hold);

  logic rhat_valid, rhat_sof;
  logic signed [RW-1:0] rhat_re, rhat_im;

  signal_regenerator #(.L(L), .LOG2_SF(LOG2_SF), .LAT(LAT), .NTAPS(RC_TAPS)) u_regen (
    .clk, .rst_n, .step(in_fire), .sof(in_sof), .pair_valid, .pair_bank, .pair_bits, .pair_ctrl,
    .pair_alpha, .tau, .gain, .code_num, .rhat_valid, .rhat_sof, .rhat_re, .rhat_im);

  // received-signal delay: read pointer starts at the frame's first sample and advances once
  // per regenerated sample
  logic [BAW-1:0] wr_ptr, rd_ptr_q;
  logic           started_q;
  logic [BAW-1:0] zero_delay [1];
  cplx_s_t        rd_sample  [1];
  assign zero_delay[0] = '0;

  sample_buffer #(.DEPTH(1 << BAW), .NTAPS(1)) u_rxbuf (
    .clk, .rst_n, .wr_en(in_fire), .wr_data(in_sample), .wr_ptr(wr_ptr),
    .base(rd_ptr_q), .rd_delay(zero_delay), .rd_data(rd_sample));

  function automatic logic signed [SAMPLE_W-1:0] sub_sat(input logic signed [SAMPLE_W-1:0] a,
                                                         input logic signed [RW-1:0] b);
    logic signed [RW:0] d;
    d = (RW+1)'(a) - (RW+1)'(b);
    if (d > (RW+1)'(2 ** (SAMPLE_W - 1) - 1)) return SAMPLE_W'(2 ** (SAMPLE_W - 1) - 1);
    if (d < -(RW+1)'(2 ** (SAMPLE_W - 1)))     return SAMPLE_W'(-(2 ** (SAMPLE_W - 1)));
    return SAMPLE_W'(d);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr_q <= '0; started_q <= 1'b0;
      out_valid <= 1'b0; out_sof <= 1'b0; out_sample <= '0;
    end else begin
      if (in_fire && in_sof && !started_q) begin
        started_q <= 1'b1;
        rd_ptr_q  <= wr_ptr;
      end
      out_valid <= rhat_valid;
      if (rhat_valid) begin
        rd_ptr_q <= rd_ptr_q + 1'b1;
        out_sof  <= rhat_sof;
        out_sample.re <= sub_sat(rd_sample[0].re, cancel_en ? rhat_re : '0);
        out_sample.im <= sub_sat(rd_sample[0].im, cancel_en ? rhat_im : '0);
      end
    end
  end
endmodule
