// ber_checker: counts bit errors of one user against stored transmitted bits.
//
// The transmitted bits are loaded beforehand through the write port (ref_we/ref_addr/ref_bit)
// into a memory of NREF bits. Detected bits then arrive in order on det_valid/det_neg; bit k is
// compared with stored bit k mod ref_len, and bit_count and err_count advance (registered,
// saturating at their top value). `clr` zeroes both counters and the read position. The
// comparison on the receiver itself is the document's; memory size and ports are this design's.
module ber_checker #(
  parameter int unsigned NREF = 2400,                 // one frame of bits at SF = 16
  localparam int unsigned AW  = $clog2(NREF)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          ref_we,
  input  logic [AW-1:0] ref_addr,
  input  logic          ref_bit,                      // 1 = -1
  input  logic [AW:0]   ref_len,                      // bits in use, 1..NREF
  input  logic          det_valid,
  input  logic          det_neg,
  output logic [31:0]   bit_count,
  output logic [31:0]   err_count
);
  logic          refmem [NREF];
  logic [AW-1:0] rd_q;

  always_ff @(posedge clk) if (ref_we) refmem[ref_addr] <= ref_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q <= '0; bit_count <= '0; err_count <= '0;
    end else if (clr) begin
      rd_q <= '0; bit_count <= '0; err_count <= '0;
    end else if (det_valid) begin
      rd_q <= ((AW+1)'(rd_q) + 1'b1 >= ref_len) ? '0 : rd_q + 1'b1;
      if (bit_count != '1) bit_count <= bit_count + 1'b1;
      if (det_neg != refmem[rd_q] && err_count != '1) err_count <= err_count + 1'b1;
    end
  end
endmodule
