// sample_buffer: circular buffer of received complex samples with delayed read taps.
//
// Each `wr_en` stores one sample at the write pointer. `base` is the write address of a chosen
// sample (normally the one just written, captured by the user); read tap i returns the sample
// written rd_delay[i] writes before that one. The reads are combinational from the array, so a
// tap addressed one cycle after the write sees the stored word. DEPTH must exceed the largest
// delay plus the writes that can happen between capturing `base` and reading. The RAKE fingers
// use it to pick r'[4n + tau_l] for each path and the SIC stage uses it to hold the received
// signal until the regenerated copy is ready; the document keeps these samples in DSP memory.
module sample_buffer
  import sic_pkg::*;
#(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned NTAPS  = 4,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_en,
  input  cplx_s_t             wr_data,
  output logic [AW-1:0]       wr_ptr,                // address the next write goes to
  input  logic [AW-1:0]       base,
  input  logic [AW-1:0]       rd_delay [NTAPS],
  output cplx_s_t             rd_data  [NTAPS]
);
  cplx_s_t mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wr_ptr <= '0;
    else if (wr_en) wr_ptr <= wr_ptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= wr_data;
  end

  always_comb begin
    for (int i = 0; i < int'(NTAPS); i++) rd_data[i] = mem[AW'(base - rd_delay[i])];
  end
endmodule
