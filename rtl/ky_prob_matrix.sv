// ky_prob_matrix: transposed probability matrix of the Knuth-Yao sampler.
//
// The sampler walks the probability matrix column by column, so the matrix
// is stored transposed: COLS words of ROWS bits, word c holding column c.
// Bit r of column c is bit c of probability p_r counted from the binary
// point, i.e. bit (COLS-1-c) of p_r written as a COLS-bit fraction; column 0
// is the 1/2 weight. In a mode with groups of 2^l rows, distribution g owns
// rows [g*2^l +: 2^l] and its unused rows must be zero.
//
// One write port (a whole column per write) and one combinational read port
// addressed by the sampler's column counter. No reset: the matrix must be
// written before sampling. The transposed storage and the 32 x 64 size
// follow the published design; the port arrangement is this design's own.
module ky_prob_matrix #(
  parameter int unsigned ROWS = 64,
  parameter int unsigned COLS = 32
) (
  input  logic                        clk,
  input  logic                        wr_en,
  input  logic [$clog2(COLS)-1:0]     wr_col,
  input  logic [ROWS-1:0]             wr_data,
  input  logic [$clog2(COLS)-1:0]     rd_col,
  output logic [ROWS-1:0]             rd_data
);

  logic [ROWS-1:0] mem [COLS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_col] <= wr_data;
  end

  assign rd_data = mem[rd_col];

endmodule
