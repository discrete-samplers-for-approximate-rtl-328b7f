// ky_sample_encoder: reconfigurable sample encoder of the KY sampler.
//
// For every group g it finds the row, counted within the group, of the
// n[g]-th one of the current probability-matrix column, which is the
// sample once the group's distance went negative. Three parts:
//   1. the configurable parallel prefix adder: inclusive prefix sums of the
//      column restarted at every group boundary;
//   2. N comparators: c[r] = prefix[r] < n[group of r];
//   3. the configurable thermometer-to-binary encoder: c is a thermometer
//      code within each group, and its count (level `level` of a
//      reconfigurable adder tree) is the row of the n-th one.
// row[g] is meaningful for g < N >> level and only when n[g] is at most the
// group's Hamming weight. Purely combinational. The three parts follow the
// published encoder; the per-row mux that selects the group's n is this
// design's own.
module ky_sample_encoder
  import sampler_pkg::*;
#(
  parameter int unsigned N     = MAX_RANGE,
  parameter int unsigned LOG_N = $clog2(N)
) (
  input  logic [N-1:0]                  col_bits,
  input  level_t                        level,
  input  logic [N/2-1:0][LOG_N+1:0]     n,
  output logic [N/2-1:0][LOG_N-1:0]     row
);

  logic [N-1:0][LOG_N:0]          prefix;
  logic [N-1:0]                   c;
  logic [LOG_N:0][N-1:0][LOG_N:0] cnt;

  ky_prefix_adder #(.N(N)) u_prefix (.bits(col_bits), .level, .prefix);

  // Comparator r uses the index of its own group: a mux over the levels,
  // like the random-word routing of the CDT sampler.
  always_comb begin
    for (int unsigned r = 0; r < N; r++) begin
      logic [LOG_N+1:0] nr;
      nr = n[0];
      for (int unsigned l = 1; l <= LOG_N; l++) begin
        if (level == level_t'(l)) nr = n[r >> l];
      end
      c[r] = (LOG_N+2)'(prefix[r]) < nr;
    end
  end

  recfg_adder_tree #(.N(N)) u_t2b (.bits(c), .lvl_sum(cnt));

  always_comb begin
    row = '0;
    for (int unsigned l = 1; l <= LOG_N; l++) begin
      if (level == level_t'(l)) begin
        for (int unsigned g = 0; g < N/2; g++) row[g] = cnt[l][g][LOG_N-1:0];
      end
    end
  end

endmodule
