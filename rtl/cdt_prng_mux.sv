// cdt_prng_mux: PRNG multiplexer of the reconfigurable CDT sampler.
//
// In a mode of level l the comparators form N >> l groups of 2^l, one per
// distribution, and all comparators of group g must compare against the
// same uniform random word. Comparator i therefore receives rn[i >> l]. For
// level 0 (64 distributions of range 2) every comparator gets its own word;
// for level 6 (one distribution of range up to 65) all get rn[0]. Each
// output is a mux over the LOG_N+1 candidate words i >> l.
//
// Purely combinational. Which word goes to which group is this design's
// choice; the structure (one mux per comparator) follows the sampler
// diagram.
module cdt_prng_mux
  import sampler_pkg::*;
#(
  parameter int unsigned N     = MAX_RANGE,
  parameter int unsigned WIDTH = PRECISION,
  parameter int unsigned LOG_N = $clog2(N)
) (
  input  level_t                     level,
  input  logic [N-1:0][WIDTH-1:0]    rn,
  output logic [N-1:0][WIDTH-1:0]    u
);

  for (genvar i = 0; i < N; i++) begin : g_cmp
    always_comb begin
      u[i] = rn[i];
      for (int unsigned l = 0; l <= LOG_N; l++) begin
        if (level == level_t'(l)) u[i] = rn[i >> l];
      end
    end
  end

endmodule
