// signal_regenerator: rebuilds one user's contribution to the received signal.
//
// From the RAKE's decisions it re-creates the transmitted chips without the DPCCH gain,
//   s^[n] = (b^[n] C_d[n] G + j b^_p[n]) C_s[n],   G = beta_d/beta_c (gain, Q8),
// upsamples them four times by zero insertion, shapes them with the raised-cosine filter
// (NTAPS = 9 taps over +-1 chip as built, or 33 taps over +-4 chips for comparison),
// and sends the result through the estimated channel:
//   r^'[u] = sum_l alpha^_l[pair(u)] * x'[u - tau_l] / 2^26,
// where x' is the filter output (centred) and 2^26 removes the Q8 symbol scale, the Q8 filter
// scale and the estimator gain of 1024. The filtered chips go into a circular buffer, so every
// path is a read tap at its own delay.
// Timing: the block advances one sample per `step` (each sample the SIC stage accepts). It runs
// LAT samples behind the received stream: at the step of received sample t it produces r^'[t-LAT]
// (internally it generates chips (NTAPS-1)/2 samples ahead, as the filter is centred). LAT covers
// the path delays, one pair of DPCCH bits (2048 samples) and the RAKE's combining time, so the
// decisions and estimates of a pair are always in place before the first of its chips is rebuilt.
// Results leave on rhat_valid three cycles after the step; rhat_sof marks sample 0 of a frame.
// Decisions arrive per pair on pair_valid and are kept in two banks.
// Document: Eq. (11), (12), Fig. 4 and the 9-tap RC filter (33 taps as its comparison). This
// design's own: the fixed latency schedule, the bank scheme, the fixed-point scaling and the
// output width.
module signal_regenerator
  import sic_pkg::*;
#(
  parameter int unsigned L       = 4,
  parameter int unsigned LOG2_SF = 4,
  parameter int unsigned LAT     = CHIPS_PER_PAIR * 4 + D_MAX + 256,
  parameter int unsigned NTAPS   = 9,
  localparam int unsigned SF     = 1 << LOG2_SF,
  localparam int unsigned NB     = CHIPS_PER_PAIR / SF,
  localparam int unsigned RW     = SAMPLE_W + 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               step,
  input  logic               sof,
  input  logic               pair_valid,
  input  logic               pair_bank,
  input  logic [NB-1:0]      pair_bits,
  input  logic [1:0]         pair_ctrl,
  input  cplx_alpha_t        pair_alpha [L],
  input  logic [TAU_W-1:0]   tau [L],
  input  logic [11:0]        gain,          // beta_d / beta_c, units of 1/256
  input  logic [23:0]        code_num,
  output logic               rhat_valid,
  output logic               rhat_sof,
  output logic signed [RW-1:0] rhat_re,
  output logic signed [RW-1:0] rhat_im
);
  localparam int unsigned ZW  = 14;
  localparam int unsigned FW  = ZW + 11;
  localparam int unsigned WAW = 10;
  localparam int unsigned PRW = ALPHA_W + FW + 4;
  localparam int unsigned SHIFT = 26;
  localparam int unsigned JW  = (NB > 1) ? $clog2(NB) : 1;
  localparam int unsigned FRAME_SMP = CHIPS_PER_FRAME * 4;
  localparam int unsigned LEAD = (NTAPS - 1) / 2;   // filter centre delay, samples
  localparam int unsigned VW   = $clog2(LEAD + 1);

  // ---------------- decision banks ----------------
  logic [NB-1:0] bits_bank  [2];
  logic [1:0]    ctrl_bank  [2];
  cplx_alpha_t   alpha_bank [2][L];
  logic [1:0]    fill_q;

  always_ff @(posedge clk) begin
    if (pair_valid) begin
      bits_bank[pair_bank] <= pair_bits;
      ctrl_bank[pair_bank] <= pair_ctrl;
      for (int l = 0; l < int'(L); l++) alpha_bank[pair_bank][l] <= pair_alpha[l];
    end
  end

  // ---------------- timing: start LAT-LEAD samples after the frame start ----------------
  logic        started_q, active_q;
  logic [15:0] t_q;
  logic        go;
  assign go = step && (active_q || (started_q && t_q == 16'(LAT - LEAD)) ||
                       (sof && !started_q && LAT == LEAD));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started_q <= 1'b0; active_q <= 1'b0; t_q <= '0;
    end else if (step) begin
      if (sof && !started_q) begin
        started_q <= 1'b1; t_q <= 16'd1; active_q <= (LAT == LEAD);
      end else if (started_q && !active_q) begin
        if (t_q == 16'(LAT - LEAD)) active_q <= 1'b1;
        else t_q <= t_q + 1'b1;
      end
    end
  end

  // ---------------- chip generation (v = u + LEAD) ----------------
  logic [1:0]  ph_q;
  logic [15:0] chip_q;
  logic        bank_v_q;
  logic        cs_re_neg, cs_im_neg, cd_neg;
  logic        chip_end, frame_end, load_code;
  logic [JW-1:0] j;
  logic        dneg, cneg;
  logic signed [ZW-1:0] xs, ys, z_re, z_im;

  assign chip_end  = go && (ph_q == 2'd3);
  assign frame_end = (chip_q == 16'(CHIPS_PER_FRAME - 1));
  assign load_code = (step && sof && !started_q) || (chip_end && frame_end);

  scrambling_code_gen u_scr (
    .clk, .rst_n, .load(load_code), .code_num, .step(chip_end && !frame_end),
    .cs_re_neg, .cs_im_neg);

  ovsf_code #(.LOG2_SF(LOG2_SF)) u_ovsf (
    .code_idx(LOG2_SF'(SF / 4)), .chip_idx(chip_q[LOG2_SF-1:0]), .chip_neg(cd_neg));

  always_comb begin
    j    = JW'(chip_q[8:0] >> LOG2_SF);
    dneg = bits_bank[bank_v_q][j];
    cneg = ctrl_bank[bank_v_q][chip_q[8]];
    xs   = (dneg ^ cd_neg) ? -ZW'(gain) : ZW'(gain);
    ys   = cneg ? -ZW'(256) : ZW'(256);
    // (x + jy)(cr + j ci) = (x cr - y ci) + j(x ci + y cr)
    z_re = (cs_re_neg ? -xs : xs) - (cs_im_neg ? -ys : ys);
    z_im = (cs_im_neg ? -xs : xs) + (cs_re_neg ? -ys : ys);
    if (ph_q != 2'd0) begin z_re = '0; z_im = '0; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_q <= '0; chip_q <= '0; bank_v_q <= 1'b0; fill_q <= '0;
    end else begin
      if (go) begin
        ph_q <= ph_q + 1'b1;
        if (chip_end) begin
          chip_q <= frame_end ? '0 : chip_q + 1'b1;
          if (chip_q[8:0] == 9'h1FF) begin
            bank_v_q <= ~bank_v_q;
            fill_q[bank_v_q] <= 1'b0;
          end
        end
      end
      if (pair_valid) fill_q[pair_bank] <= 1'b1;
    end
  end

  // decisions of a pair are in place before its first chip is rebuilt
  assert property (@(posedge clk) disable iff (!rst_n) (go && ph_q == 2'd0) |-> fill_q[bank_v_q]);

  logic signed [FW-1:0] f_re, f_im;
  rc_filter #(.IN_W(ZW), .OUT_W(FW), .NTAPS(NTAPS)) u_rc (
    .clk, .rst_n, .in_en(go), .in_re(z_re), .in_im(z_im), .out_re(f_re), .out_im(f_im));

  // ---------------- output index u = v - LEAD ----------------
  logic [VW-1:0] vpre_q;               // counts the first LEAD steps
  logic [10:0] u_in_pair_q;
  logic        bank_u_q;
  logic [17:0] u_frame_q;
  logic        p1_q, p1_bank_q, p1_sof_q;
  logic        p2_bank_q, p2_sof_q;
  logic [WAW-1:0] wp_q, p2_base_q;
  logic [WAW:0]   wcnt_q;              // filter outputs stored so far (saturating)
  logic signed [FW-1:0] wmem_re [1 << WAW];
  logic signed [FW-1:0] wmem_im [1 << WAW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vpre_q <= '0; u_in_pair_q <= '0; bank_u_q <= 1'b0; u_frame_q <= '0;
      p1_q <= 1'b0; p1_bank_q <= 1'b0; p1_sof_q <= 1'b0;
      p2_bank_q <= 1'b0; p2_sof_q <= 1'b0;
      wp_q <= '0; p2_base_q <= '0; wcnt_q <= '0;
    end else begin
      p1_q <= 1'b0;
      if (go) begin
        if (vpre_q != VW'(LEAD)) vpre_q <= vpre_q + 1'b1;
        p1_q <= 1'b1;
        p1_bank_q <= bank_u_q;
        p1_sof_q  <= (vpre_q == VW'(LEAD)) && (u_frame_q == '0);
        if (vpre_q == VW'(LEAD)) begin
          u_in_pair_q <= u_in_pair_q + 1'b1;
          if (u_in_pair_q == 11'h7FF) bank_u_q <= ~bank_u_q;
          u_frame_q <= (u_frame_q == 18'(FRAME_SMP - 1)) ? '0 : u_frame_q + 1'b1;
        end
      end
      // stage 1: store the filter output
      if (p1_q) begin
        wp_q <= wp_q + 1'b1;
        if (wcnt_q != (WAW+1)'(1 << WAW)) wcnt_q <= wcnt_q + 1'b1;
        p2_base_q <= wp_q;
        p2_bank_q <= p1_bank_q;
        p2_sof_q  <= p1_sof_q;
      end
    end
  end

  // p1 of a step belongs to an output only once LEAD steps are behind; track it exactly
  logic p1_out_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p1_out_q <= 1'b0;
    else if (go) p1_out_q <= (vpre_q == VW'(LEAD));
    else p1_out_q <= 1'b0;
  end

  always_ff @(posedge clk) begin
    if (p1_q) begin
      wmem_re[wp_q] <= f_re;
      wmem_im[wp_q] <= f_im;
    end
  end

  // stage 2: multipath weighting and sum
  logic signed [PRW-1:0] acc_re, acc_im, ar, ai, wr, wi;
  logic [WAW-1:0] addr;
  logic p2_out_q;
  always_comb begin
    acc_re = '0; acc_im = '0;
    for (int l = 0; l < int'(L); l++) begin
      addr = p2_base_q - WAW'(tau[l]);
      ar = PRW'(alpha_bank[p2_bank_q][l].re);
      ai = PRW'(alpha_bank[p2_bank_q][l].im);
      // taps reaching back before the first stored output read as zero
      wr = ((WAW+1)'(tau[l]) < wcnt_q) ? PRW'(wmem_re[addr]) : '0;
      wi = ((WAW+1)'(tau[l]) < wcnt_q) ? PRW'(wmem_im[addr]) : '0;
      acc_re += ar * wr - ai * wi;
      acc_im += ar * wi + ai * wr;
    end
    acc_re = (acc_re + (PRW'(1) <<< (SHIFT - 1))) >>> SHIFT;
    acc_im = (acc_im + (PRW'(1) <<< (SHIFT - 1))) >>> SHIFT;
  end

  function automatic logic signed [RW-1:0] sat(input logic signed [PRW-1:0] v);
    if (v > PRW'(2 ** (RW - 1) - 1)) return RW'(2 ** (RW - 1) - 1);
    if (v < -PRW'(2 ** (RW - 1)))     return -RW'(2 ** (RW - 1));
    return RW'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p2_out_q <= 1'b0;
      rhat_valid <= 1'b0; rhat_sof <= 1'b0; rhat_re <= '0; rhat_im <= '0;
    end else begin
      p2_out_q   <= p1_q && p1_out_q;
      rhat_valid <= p2_out_q;
      if (p2_out_q) begin
        rhat_sof <= p2_sof_q;
        rhat_re  <= sat(acc_re);
        rhat_im  <= sat(acc_im);
      end
    end
  end
endmodule
