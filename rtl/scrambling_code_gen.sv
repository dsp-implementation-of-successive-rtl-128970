// scrambling_code_gen: 3GPP WCDMA uplink long complex scrambling code C_s[n].
//
// Two 25-bit m-sequence generators run one step per chip: x with polynomial X^25+X^3+1, loaded
// with the 24-bit code number and a 1 in its top stage, and y with X^25+X^3+X^2+X+1, loaded with
// all ones. c1 = x(0)^y(0). The second sequence c2, the first shifted by 16777232 chips, is taken
// from the shift masks x(4)^x(7)^x(18)^y(4)^y(6)^y(17). The complex code is
// C_s[n] = c1[n] * (1 + j*(-1)^n * c2[2*floor(n/2)]), returned as two sign flags (1 = -1).
// The generator is reloaded by `load` (frame start, chip 0 is then presented) and advanced by
// `step`; the outputs always show the code of the current chip. The document only names this
// block; its construction is taken from the 3GPP spreading specification.
module scrambling_code_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,      // restart at chip 0 of a frame
  input  logic [23:0] code_num,  // scrambling code number n
  input  logic        step,      // advance to the next chip
  output logic        cs_re_neg, // real part of C_s is -1
  output logic        cs_im_neg  // imaginary part of C_s is -1
);
  logic [24:0] x_q, y_q;
  logic        odd_q;            // current chip index is odd
  logic        c2_even_q;        // c2 of the preceding even chip
  logic        c1, c2, c2_use;

  assign c1 = x_q[0] ^ y_q[0];
  assign c2 = x_q[4] ^ x_q[7] ^ x_q[18] ^ y_q[4] ^ y_q[6] ^ y_q[17];
  assign c2_use    = odd_q ? c2_even_q : c2;
  assign cs_re_neg = c1;
  // imaginary sign: c1 * (-1)^n * c2
  assign cs_im_neg = c1 ^ odd_q ^ c2_use;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= {1'b1, 24'd0};
      y_q <= '1;
      odd_q <= 1'b0;
      c2_even_q <= 1'b0;
    end else if (load) begin
      x_q <= {1'b1, code_num};
      y_q <= '1;
      odd_q <= 1'b0;
      c2_even_q <= 1'b0;
    end else if (step) begin
      x_q <= {x_q[3] ^ x_q[0], x_q[24:1]};
      y_q <= {y_q[3] ^ y_q[2] ^ y_q[1] ^ y_q[0], y_q[24:1]};
      odd_q <= ~odd_q;
      if (!odd_q) c2_even_q <= c2;
    end
  end
endmodule
