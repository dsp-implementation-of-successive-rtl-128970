// rc_filter: raised-cosine pulse-shaping FIR at four samples per chip.
//
// An NTAPS-tap FIR on complex input: y[v] = sum_{k=0..NTAPS-1} h[k] * x[v-k]. The taps are the
// raised-cosine pulse with roll-off 0.22 sampled at quarter-chip spacing,
//   h[k] = round(256 * sinc(t) * cos(pi*0.22*t) / (1 - (0.44*t)^2)),  t = (k-(NTAPS-1)/2)/4,
// Q8 with peak 1.0. NTAPS = 9 spans +-1 chip: 0, 75, 161, 230, 256, 230, 161, 75, 0. That short
// filter stands in for the cascade of the transmit and receive root-raised-cosine filters; its
// nine taps hold about 94 % of the energy of the 65-tap cascade of two 33-tap RRC filters.
// NTAPS = 33 spans +-4 chips and serves as the longer reference it is compared with. The output
// is centred (NTAPS-1)/2 samples after the input. `in_en` shifts one sample in; the output is
// combinational from the registered taps, so it shows y for the latest input from the cycle
// after `in_en`. Tap counts and roll-off are the document's, the Q8 quantisation is this
// design's.
module rc_filter #(
  parameter int unsigned IN_W  = 14,
  parameter int unsigned OUT_W = IN_W + 11,
  parameter int unsigned NTAPS = 9                 // 9 or 33
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_en,
  input  logic signed [IN_W-1:0]   in_re,
  input  logic signed [IN_W-1:0]   in_im,
  output logic signed [OUT_W-1:0]  out_re,
  output logic signed [OUT_W-1:0]  out_im
);
  localparam int unsigned TAPS = NTAPS;
  // the 33-tap pulse; the 9-tap one is its centre
  localparam logic signed [9:0] H33 [33] = '{
    10'sd0, -10'sd8, -10'sd13, -10'sd11, 10'sd0, 10'sd15, 10'sd24, 10'sd20, 10'sd0, -10'sd29,
    -10'sd49, -10'sd43, 10'sd0, 10'sd75, 10'sd161, 10'sd230, 10'sd256, 10'sd230, 10'sd161,
    10'sd75, 10'sd0, -10'sd43, -10'sd49, -10'sd29, 10'sd0, 10'sd20, 10'sd24, 10'sd15, 10'sd0,
    -10'sd11, -10'sd13, -10'sd8, 10'sd0};
  function automatic logic signed [9:0] tap(input int k);
    return H33[k + 16 - int'(TAPS - 1) / 2];
  endfunction

  logic signed [IN_W-1:0] sr_re [TAPS];
  logic signed [IN_W-1:0] sr_im [TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(TAPS); k++) begin sr_re[k] <= '0; sr_im[k] <= '0; end
    end else if (in_en) begin
      sr_re[0] <= in_re; sr_im[0] <= in_im;
      for (int k = 1; k < int'(TAPS); k++) begin sr_re[k] <= sr_re[k-1]; sr_im[k] <= sr_im[k-1]; end
    end
  end

  always_comb begin
    out_re = '0; out_im = '0;
    for (int k = 0; k < int'(TAPS); k++) begin
      out_re += OUT_W'(sr_re[k]) * OUT_W'(tap(k));
      out_im += OUT_W'(sr_im[k]) * OUT_W'(tap(k));
    end
  end
  initial assert (NTAPS == 9 || NTAPS == 33) else $error("rc_filter: NTAPS must be 9 or 33");
endmodule
