// sampler_pkg: constants and types shared by the discrete samplers.
//
// Both samplers are sized for a largest random-variable range of 64 and a
// fixed-point precision of 32 bits, the sizes used for the benchmarked
// samplers. A probability or CDF value is a 32-bit unsigned fraction
// (value / 2^32).
//
// The sampling mode is given everywhere as a "level" l: the samplers split
// their 64 rows (CDT: comparators, KY: probability-matrix rows) into
// 64 >> l independent groups of 2^l rows, one distribution per group.
//   CDT sampler: l = 0..6  -> 64D, 32D, 16D, 8D, 4D, 2D, 1D, range <= 2^l + 1
//   KY  sampler: l = 1..6  -> 32D, 16D, 8D, 4D, 2D, 1D,      range <= 2^l
// The level encoding is this design's own choice.
package sampler_pkg;

  localparam int unsigned MAX_RANGE = 64;   // rows / comparators
  localparam int unsigned PRECISION = 32;   // bits per probability / CDF entry

  typedef logic [2:0] level_t;              // mode level, see above

endpackage
