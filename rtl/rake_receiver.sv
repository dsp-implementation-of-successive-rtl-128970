// rake_receiver: L-finger RAKE receiver for one WCDMA uplink user (DPDCH on I, DPCCH on Q).
//
// Received samples at four times the chip rate enter one per `in_valid`; `in_sof` marks sample
// 0 of a frame. They are stored in a sample buffer, and D_MAX samples later the chip strobe
// starts: for chip n every finger l reads r'[4n + tau_l] from the buffer, so all fingers work on
// the same chip index and share one scrambling code generator and one OVSF generator. Each
// finger despreads the DPDCH over SF chips and accumulates the DPCCH over 256 chips; a channel
// estimator per finger turns the pilot accumulations into ARMA-smoothed estimates.
// Decisions are made per pair of DPCCH bits (512 chips): the despread data symbols of a pair are
// kept in one bank of a two-bank buffer while the next pair fills the other. When a pair ends
// and the estimates are updated, the MRC combiner walks through the NB = 512/SF data symbols and
// the two DPCCH symbols of the pair, one per cycle. Data decisions leave on bit_valid/bit_neg in
// order; then pair_valid pulses with all decisions of the pair, the DPCCH bits (known pilot
// values at pilot positions, decisions elsewhere) and the estimates used, for the regenerator.
// Timing: a pair's decisions end about NB+6 cycles after the pair's last chip sample
// (sample 4*(512P+511) + D_MAX). At most one sample per cycle.
// Document: Eq. (6)-(10), Fig. 3. This design's own: two-bank buffering so that each pair's
// bits are combined with the estimate of that same pair, DPCCH control-bit detection (needed
// by the regenerator), the pilot pattern parameter, widths and timing.
module rake_receiver
  import sic_pkg::*;
#(
  parameter int unsigned L        = 4,
  parameter int unsigned LOG2_SF  = 4,                      // SF = 16
  parameter int unsigned NPILOT   = 6,                      // pilot bits per slot (even)
  parameter logic [15*NPILOT-1:0] PILOT_NEG = '0,           // bit s*NPILOT+i: slot s, pilot i
  localparam int unsigned SF      = 1 << LOG2_SF,
  localparam int unsigned NB      = CHIPS_PER_PAIR / SF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_sof,
  input  cplx_s_t          in_sample,
  input  logic [TAU_W-1:0] tau [L],          // path delays, quarter chips
  input  logic [L-1:0]     finger_en,
  input  logic [23:0]      code_num,         // user's scrambling code number
  input  logic [W_FRAC-1:0] w_coef,          // ARMA weight
  output logic             bit_valid,
  output logic             bit_neg,
  output logic             pair_valid,
  output logic             pair_bank,
  output logic [NB-1:0]    pair_bits,        // bit j: data bit j of the pair is -1
  output logic [1:0]       pair_ctrl,        // DPCCH bits of the pair
  output cplx_alpha_t      pair_alpha [L],
  output logic             est_update,       // pulses when a pilot pair refreshed the estimates
  output logic             est_hold          // pulses when a non-pilot pair held them
);
  localparam int unsigned BAW = 10;          // sample buffer: 1024 > D_MAX + 2
  localparam int unsigned JW  = (NB > 1) ? $clog2(NB) : 1;

  // ---------------- input timing ----------------
  logic             started_q, running_q;
  logic [TAU_W:0]   nxt_idx_q;
  logic [1:0]       ph_q;
  logic             chip_go_q;               // chip strobe (cycle after the sample write)
  logic [BAW-1:0]   wr_ptr, chip_base_q;
  logic             is_chip_smp;

  always_comb begin
    is_chip_smp = 1'b0;
    if (in_valid) begin
      if (in_sof && !started_q) is_chip_smp = (D_MAX == 0);
      else if (started_q && !running_q) is_chip_smp = (nxt_idx_q == (TAU_W+1)'(D_MAX));
      else if (running_q) is_chip_smp = (ph_q == 2'd0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started_q <= 1'b0; running_q <= 1'b0; nxt_idx_q <= '0; ph_q <= '0;
      chip_go_q <= 1'b0; chip_base_q <= '0;
    end else begin
      chip_go_q <= is_chip_smp;
      if (is_chip_smp) chip_base_q <= wr_ptr;
      if (in_valid) begin
        if (in_sof && !started_q) begin
          started_q <= 1'b1;
          nxt_idx_q <= 1;
          running_q <= (D_MAX == 0);
          ph_q      <= 2'd1;
        end else if (started_q && !running_q) begin
          if (is_chip_smp) begin running_q <= 1'b1; ph_q <= 2'd1; end
          else nxt_idx_q <= nxt_idx_q + 1'b1;
        end else if (running_q) begin
          ph_q <= ph_q + 1'b1;
        end
      end
    end
  end

  // ---------------- sample buffer and finger taps ----------------
  logic [BAW-1:0] rd_delay [L];
  cplx_s_t        tap      [L];
  always_comb
    for (int l = 0; l < int'(L); l++) rd_delay[l] = BAW'(D_MAX) - BAW'(tau[l]);

  sample_buffer #(.DEPTH(1 << BAW), .NTAPS(L)) u_buf (
    .clk, .rst_n, .wr_en(in_valid), .wr_data(in_sample), .wr_ptr(wr_ptr),
    .base(chip_base_q), .rd_delay(rd_delay), .rd_data(tap));

  // ---------------- chip position ----------------
  logic [15:0] chip_q;        // chip index in frame
  logic [3:0]  cbit_q;        // DPCCH bit in slot, 0..9
  logic [3:0]  slot_q;        // 0..14
  logic        bank_q;        // pair bank
  logic        last_dchip, last_cchip, last_pair_chip, frame_end;
  logic        cs_re_neg, cs_im_neg, cd_neg;
  logic        load_code;

  assign last_dchip     = (chip_q[LOG2_SF-1:0] == '1);
  assign last_cchip     = (chip_q[7:0] == 8'hFF);
  assign last_pair_chip = last_cchip && chip_q[8];
  assign frame_end      = (chip_q == 16'(CHIPS_PER_FRAME - 1));
  assign load_code      = (in_valid && in_sof && !started_q) || (chip_go_q && frame_end);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chip_q <= '0; cbit_q <= '0; slot_q <= '0; bank_q <= 1'b0;
    end else if (chip_go_q) begin
      chip_q <= frame_end ? '0 : chip_q + 1'b1;
      if (last_cchip) begin
        if (cbit_q == 4'd9) begin
          cbit_q <= '0;
          slot_q <= (slot_q == 4'd14) ? '0 : slot_q + 1'b1;
        end else cbit_q <= cbit_q + 1'b1;
      end
      if (last_pair_chip) bank_q <= ~bank_q;
    end
  end

  scrambling_code_gen u_scr (
    .clk, .rst_n, .load(load_code), .code_num, .step(chip_go_q && !frame_end),
    .cs_re_neg, .cs_im_neg);

  ovsf_code #(.LOG2_SF(LOG2_SF)) u_ovsf (
    .code_idx(LOG2_SF'(SF / 4)), .chip_idx(chip_q[LOG2_SF-1:0]), .chip_neg(cd_neg));

  // ---------------- fingers and estimators ----------------
  logic        q_valid    [L];
  cplx_acc_t   q          [L];
  logic        pacc_valid [L];
  cplx_acc_t   pacc       [L];
  cplx_alpha_t alpha      [L];
  logic        alpha_valid[L];

  // DPCCH bit attributes registered with the chip strobe, for the finger outputs one cycle later
  logic        t_pilot_q, t_pneg_q, t_second_q, t_bank_q;
  logic [JW-1:0] t_j_q;
  logic        cur_pilot, cur_pneg;
  assign cur_pilot = (cbit_q < 4'(NPILOT));
  assign cur_pneg  = cur_pilot ? PILOT_NEG[32'(slot_q) * NPILOT + 32'(cbit_q)] : 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_pilot_q <= 1'b0; t_pneg_q <= 1'b0; t_second_q <= 1'b0; t_bank_q <= 1'b0; t_j_q <= '0;
    end else if (chip_go_q) begin
      t_pilot_q  <= cur_pilot;
      t_pneg_q   <= cur_pneg;
      t_second_q <= chip_q[8];
      t_bank_q   <= bank_q;
      t_j_q      <= JW'(chip_q[8:0] >> LOG2_SF);
    end
  end

  for (genvar l = 0; l < L; l++) begin : g_finger
    rake_finger u_finger (
      .clk, .rst_n, .clr(1'b0), .chip_en(chip_go_q), .sample(tap[l]),
      .cs_re_neg, .cs_im_neg, .cd_neg, .last_dchip, .last_cchip,
      .q_valid(q_valid[l]), .q(q[l]), .pacc_valid(pacc_valid[l]), .pacc(pacc[l]));
    channel_estimator u_est (
      .clk, .rst_n, .clr(1'b0), .pacc_valid(pacc_valid[l]), .pacc(pacc[l]),
      .is_pilot(t_pilot_q), .pilot_neg(t_pneg_q), .second(t_second_q), .w_coef,
      .alpha(alpha[l]), .alpha_valid(alpha_valid[l]));
  end

  // ---------------- pair buffers ----------------
  cplx_acc_t qbuf [2][NB][L];
  cplx_acc_t cbuf [2][2][L];                 // -j * p_acc of the two DPCCH bits
  logic [1:0] cpil_q [2];                    // pilot flags of the two DPCCH bits
  logic [1:0] cpneg_q [2];                   // known pilot values

  always_ff @(posedge clk) begin
    for (int l = 0; l < int'(L); l++) begin
      if (q_valid[l]) qbuf[t_bank_q][t_j_q][l] <= q[l];
      if (pacc_valid[l]) begin
        cbuf[t_bank_q][t_second_q][l].re <= pacc[l].im;
        cbuf[t_bank_q][t_second_q][l].im <= -pacc[l].re;
      end
    end
    if (pacc_valid[0]) begin
      cpil_q[t_bank_q][t_second_q]  <= t_pilot_q;
      cpneg_q[t_bank_q][t_second_q] <= t_pneg_q;
    end
  end

  // ---------------- MRC sequencing ----------------
  logic           run_q, run_bank_q;
  logic [JW:0]    run_idx_q;                 // 0..NB-1 data, NB and NB+1 DPCCH
  logic           out_is_ctrl_q, out_last_q;
  logic [JW:0]    out_idx_q;
  cplx_acc_t      mrc_q [L];
  cplx_alpha_t    alpha_m [L];
  logic           mrc_valid, mrc_neg;
  logic signed [ACC_W+ALPHA_W+3:0] mrc_metric;

  always_comb begin
    for (int l = 0; l < int'(L); l++) begin
      if (run_idx_q < (JW+1)'(NB)) mrc_q[l] = qbuf[run_bank_q][run_idx_q[JW-1:0]][l];
      else                         mrc_q[l] = cbuf[run_bank_q][run_idx_q[0]][l];
      alpha_m[l] = finger_en[l] ? alpha[l] : '0;
    end
  end

  mrc_combiner #(.L(L)) u_mrc (
    .clk, .rst_n, .in_valid(run_q), .q(mrc_q), .alpha(alpha_m), .en(finger_en),
    .out_valid(mrc_valid), .bit_neg(mrc_neg), .metric(mrc_metric));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q <= 1'b0; run_bank_q <= 1'b0; run_idx_q <= '0;
      out_is_ctrl_q <= 1'b0; out_last_q <= 1'b0; out_idx_q <= '0;
      bit_valid <= 1'b0; bit_neg <= 1'b0; pair_valid <= 1'b0; pair_bank <= 1'b0;
      pair_bits <= '0; pair_ctrl <= '0; est_update <= 1'b0; est_hold <= 1'b0;
      for (int l = 0; l < int'(L); l++) pair_alpha[l] <= '0;
    end else begin
      bit_valid <= 1'b0; pair_valid <= 1'b0; est_update <= 1'b0; est_hold <= 1'b0;
      if (alpha_valid[0]) begin
        run_q <= 1'b1; run_bank_q <= t_bank_q; run_idx_q <= '0;
        est_update <= t_pilot_q;
        est_hold   <= !t_pilot_q;
      end else if (run_q) begin
        if (run_idx_q == (JW+1)'(NB + 1)) run_q <= 1'b0;
        run_idx_q <= run_idx_q + 1'b1;
      end
      out_is_ctrl_q <= (run_idx_q >= (JW+1)'(NB));
      out_last_q    <= run_q && (run_idx_q == (JW+1)'(NB + 1));
      out_idx_q     <= run_idx_q;
      if (mrc_valid) begin
        if (!out_is_ctrl_q) begin
          bit_valid <= 1'b1;
          bit_neg   <= mrc_neg;
          pair_bits[out_idx_q[JW-1:0]] <= mrc_neg;
        end else begin
          pair_ctrl[out_idx_q[0]] <= cpil_q[run_bank_q][out_idx_q[0]] ?
                                     cpneg_q[run_bank_q][out_idx_q[0]] : mrc_neg;
        end
        if (out_last_q) begin
          pair_valid <= 1'b1;
          pair_bank  <= run_bank_q;
          for (int l = 0; l < int'(L); l++) pair_alpha[l] <= alpha_m[l];
        end
      end
    end
  end

  // a new pair must not end while the previous one is still being combined
  assert property (@(posedge clk) disable iff (!rst_n) alpha_valid[0] |-> !run_q);
endmodule
