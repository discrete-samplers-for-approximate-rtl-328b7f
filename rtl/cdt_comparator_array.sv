// cdt_comparator_array: the parallel search of the CDT sampler.
//
// N unsigned WIDTH-bit comparators; lt[i] = (f[i] < u[i]). Within one
// distribution the CDF entries rise, so the ones in a group of lt form a
// thermometer code whose count is the sample: the number of stored CDF
// entries below the random number. Unused entries hold all ones and never
// compare below. Purely combinational. The 64 parallel 32-bit comparators
// follow the published sampler; the strict F < U direction is this design's
// reading of "the largest entry that is smaller than the random number".
module cdt_comparator_array #(
  parameter int unsigned N     = 64,
  parameter int unsigned WIDTH = 32
) (
  input  logic [N-1:0][WIDTH-1:0]  f,
  input  logic [N-1:0][WIDTH-1:0]  u,
  output logic [N-1:0]             lt
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++) lt[i] = (f[i] < u[i]);
  end

endmodule
