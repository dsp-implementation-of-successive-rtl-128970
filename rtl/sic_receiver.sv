// sic_receiver: three-user successive interference cancellation receiver, WCDMA uplink.
//
// The received signal (complex samples at four times the chip rate, 16-bit I and Q, with a
// start-of-frame flag) enters through a FIFO link. Stage U0 detects the first user and
// subtracts its rebuilt contribution; the residual travels over a second FIFO link to stage U1,
// which does the same for the second user; the residual after U1 goes over a third link to a
// plain RAKE receiver for the last user U2, whose contribution need not be rebuilt. Each link
// carries 32-bit samples plus the frame flag; a stage waits while its input link is empty and
// stops taking samples while its output link is nearly full. Each user's detected data bits are
// compared with transmitted bits loaded into a bit-error checker. Path delays and finger enables
// come in as ports (from a path searcher outside this design), as do scrambling code numbers,
// the estimator weight and the gain ratios beta_d/beta_c. cancel_en switches each stage's
// subtraction off (RAKE-only detection) without changing the chain's timing. RC_TAPS selects the
// regenerators' raised-cosine filter: 9 taps (the design) or 33 taps (the longer reference).
// Timing: each cancelling stage delays the stream by LAT samples; U2's bits follow about
// 2*LAT + 2048 + D_MAX samples after the corresponding received samples.
// Document: the three-stage chain of Fig. 2 / Fig. 5 with one stage per user, and the bit
// comparison. This design's own: link depths, link word layout and the port set.
module sic_receiver
  import sic_pkg::*;
#(
  parameter int unsigned K       = 3,       // users; this chain is built for 3
  parameter int unsigned L       = 4,
  parameter int unsigned LOG2_SF = 4,
  parameter int unsigned NPILOT  = 6,
  parameter logic [15*NPILOT-1:0] PILOT_NEG = '0,
  parameter int unsigned LINK_DEPTH = 64,
  parameter int unsigned NREF    = 2400,
  parameter int unsigned RC_TAPS = 9        // regenerators' raised-cosine filter: 9 or 33
) (
  input  logic              clk,
  input  logic              rst_n,
  // received signal
  input  logic              rx_valid,
  input  logic              rx_sof,
  input  cplx_s_t           rx_sample,
  output logic              rx_ready,
  // per-user configuration (from the path searcher and the system)
  input  logic [TAU_W-1:0]  tau       [K][L],
  input  logic [L-1:0]      finger_en [K],
  input  logic [23:0]       code_num  [K],
  input  logic [11:0]       gain      [K],
  input  logic [W_FRAC-1:0] w_coef,
  input  logic [K-2:0]      cancel_en,     // per cancelling stage; low: RAKE only, no subtraction
  // detected bits
  output logic [K-1:0]      bit_valid,
  output logic [K-1:0]      bit_neg,
  // residual after the last cancellation (input of the U2 RAKE)
  output logic              res_valid,
  output logic              res_sof,
  output cplx_s_t           res_sample,
  // bit-error checking
  input  logic              ber_clr,
  input  logic [K-1:0]      ref_we,
  input  logic [$clog2(NREF)-1:0] ref_addr,
  input  logic              ref_bit,
  input  logic [$clog2(NREF):0]   ref_len,
  output logic [31:0]       bit_count [K],
  output logic [31:0]       err_count [K],
  // activity
  output logic [K-1:0]      est_update,
  output logic [K-1:0]      est_hold,
  output logic [K-2:0]      cancel_active
);
  localparam int unsigned LW = 2 * SAMPLE_W + 1;    // sample word plus frame flag
  localparam int unsigned CW = $clog2(LINK_DEPTH) + 1;

  logic [LW-1:0] l0_data, l1_data, l2_data;
  logic          l0_full, l0_afull, l0_valid, l1_full, l1_afull, l1_valid;
  logic          l2_full, l2_afull, l2_valid;
  logic [CW-1:0] l0_cnt, l1_cnt, l2_cnt;
  logic          s0_ready, s1_ready;
  logic          s0_ov, s0_osof, s1_ov, s1_osof;
  cplx_s_t       s0_out, s1_out;

  // input link
  assign rx_ready = !l0_full;
  fifo_link #(.WIDTH(LW), .DEPTH(LINK_DEPTH)) u_link0 (
    .clk, .rst_n, .push(rx_valid && !l0_full), .push_data({rx_sof, rx_sample}), .full(l0_full),
    .afull(l0_afull), .pop_valid(l0_valid), .pop(s0_ready), .pop_data(l0_data), .count(l0_cnt));

  sic_stage #(.L(L), .LOG2_SF(LOG2_SF), .NPILOT(NPILOT), .PILOT_NEG(PILOT_NEG),
              .RC_TAPS(RC_TAPS)) u_stage0 (
    .clk, .rst_n, .in_valid(l0_valid), .in_sof(l0_data[LW-1]), .in_sample(l0_data[LW-2:0]),
    .in_ready(s0_ready), .out_valid(s0_ov), .out_sof(s0_osof), .out_sample(s0_out),
    .out_afull(l1_afull), .tau(tau[0]), .finger_en(finger_en[0]), .code_num(code_num[0]),
    .w_coef, .gain(gain[0]), .cancel_en(cancel_en[0]), .bit_valid(bit_valid[0]),
    .bit_neg(bit_neg[0]), .est_update(est_update[0]), .est_hold(est_hold[0]));

  fifo_link #(.WIDTH(LW), .DEPTH(LINK_DEPTH)) u_link1 (
    .clk, .rst_n, .push(s0_ov), .push_data({s0_osof, s0_out}), .full(l1_full),
    .afull(l1_afull), .pop_valid(l1_valid), .pop(s1_ready), .pop_data(l1_data), .count(l1_cnt));

  sic_stage #(.L(L), .LOG2_SF(LOG2_SF), .NPILOT(NPILOT), .PILOT_NEG(PILOT_NEG),
              .RC_TAPS(RC_TAPS)) u_stage1 (
    .clk, .rst_n, .in_valid(l1_valid), .in_sof(l1_data[LW-1]), .in_sample(l1_data[LW-2:0]),
    .in_ready(s1_ready), .out_valid(s1_ov), .out_sof(s1_osof), .out_sample(s1_out),
    .out_afull(l2_afull), .tau(tau[1]), .finger_en(finger_en[1]), .code_num(code_num[1]),
    .w_coef, .gain(gain[1]), .cancel_en(cancel_en[1]), .bit_valid(bit_valid[1]),
    .bit_neg(bit_neg[1]), .est_update(est_update[1]), .est_hold(est_hold[1]));

  fifo_link #(.WIDTH(LW), .DEPTH(LINK_DEPTH)) u_link2 (
    .clk, .rst_n, .push(s1_ov), .push_data({s1_osof, s1_out}), .full(l2_full),
    .afull(l2_afull), .pop_valid(l2_valid), .pop(1'b1), .pop_data(l2_data), .count(l2_cnt));

  assign res_valid  = l2_valid;
  assign res_sof    = l2_data[LW-1];
  assign res_sample = l2_data[LW-2:0];
  assign cancel_active = {s1_ov, s0_ov} & cancel_en;

  localparam int unsigned NB = CHIPS_PER_PAIR / (1 << LOG2_SF);
  logic          u2_pv, u2_pb;
  logic [NB-1:0] u2_pbits;
  logic [1:0]    u2_pctrl;
  cplx_alpha_t   u2_palpha [L];

  rake_receiver #(.L(L), .LOG2_SF(LOG2_SF), .NPILOT(NPILOT), .PILOT_NEG(PILOT_NEG)) u_rake2 (
    .clk, .rst_n, .in_valid(l2_valid), .in_sof(l2_data[LW-1]), .in_sample(l2_data[LW-2:0]),
    .tau(tau[2]), .finger_en(finger_en[2]), .code_num(code_num[2]), .w_coef,
    .bit_valid(bit_valid[2]), .bit_neg(bit_neg[2]), .pair_valid(u2_pv), .pair_bank(u2_pb),
    .pair_bits(u2_pbits), .pair_ctrl(u2_pctrl), .pair_alpha(u2_palpha),
    .est_update(est_update[2]), .est_hold(est_hold[2]));

  for (genvar k = 0; k < K; k++) begin : g_ber
    ber_checker #(.NREF(NREF)) u_ber (
      .clk, .rst_n, .clr(ber_clr), .ref_we(ref_we[k]), .ref_addr, .ref_bit, .ref_len,
      .det_valid(bit_valid[k]), .det_neg(bit_neg[k]),
      .bit_count(bit_count[k]), .err_count(err_count[k]));
  end

  initial assert (K == 3) else $error("sic_receiver is built for three users");
endmodule
