// cdt_regfile: register file holding the CDF tables of the CDT sampler.
//
// DEPTH entries of WIDTH bits, one write port and all entries read in
// parallel, because the parallel search compares every entry in the same
// cycle. In a mode with groups of 2^l entries, group g owns entries
// [g*2^l +: 2^l] and stores F[0..R-2] of its distribution (range R); the
// last CDF value is always 1.0 and is not stored. Entries a distribution
// does not use must hold all ones, so reset fills the file with all ones.
//
// Timing: a write is visible on f from the clock edge that performs it.
module cdt_regfile #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          wr_en,
  input  logic [$clog2(DEPTH)-1:0]      wr_addr,
  input  logic [WIDTH-1:0]              wr_data,
  output logic [DEPTH-1:0][WIDTH-1:0]   f
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f <= '1;
    end else if (wr_en) begin
      f[wr_addr] <= wr_data;
    end
  end

endmodule
