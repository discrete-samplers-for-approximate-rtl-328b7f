// ky_prefix_adder: configurable parallel prefix adder of the KY encoder.
//
// Computes, for every row r of an N-bit column, the number of ones in the
// column from the first row of r's group up to and including r (the
// inclusive prefix sum restarted at every group boundary). Groups are
// aligned blocks of 2^level rows.
//
// Structure: a work-efficient Brent-Kung prefix network, 2*log2(N)-1 adder
// stages and 2N-2-log2(N) adders.
//   Up-sweep, stage t = 0..log2(N)-1: row i = m*2^(t+1) - 1 adds row
//     i - 2^t, building the sums of aligned blocks of 2^(t+1) rows.
//   Down-sweep, t = log2(N)-2..0: row i = k*2^(t+1) + 2^t - 1 (k >= 1) adds
//     row k*2^(t+1) - 1, the prefix up to the block boundary B = k*2^(t+1).
// An adder that would add across a group boundary is skipped (passes its
// row through): an up-sweep adder of stage t when 2^(t+1) > 2^level, a
// down-sweep adder when its boundary B is a multiple of 2^level. With
// level = log2(N) it is the plain prefix adder of the column-wise sampler.
// Purely combinational. A work-efficient, logarithmic-depth prefix adder
// whose adders are skipped per mode is what the architecture calls for;
// the Brent-Kung form is this design's choice.
module ky_prefix_adder
  import sampler_pkg::*;
#(
  parameter int unsigned N     = MAX_RANGE,
  parameter int unsigned LOG_N = $clog2(N)
) (
  input  logic [N-1:0]              bits,
  input  level_t                    level,
  output logic [N-1:0][LOG_N:0]     prefix
);

  localparam int unsigned STAGES = 2 * LOG_N - 1;

  // Trailing zeros of a non-zero boundary index.
  function automatic int unsigned tz(input int unsigned b);
    int unsigned z;
    z = 0;
    while (z < 31 && ((b >> z) & 1) == 0) z++;
    return z;
  endfunction

  logic [STAGES:0][N-1:0][LOG_N:0] s;

  for (genvar i = 0; i < N; i++) begin : g_in
    assign s[0][i] = (LOG_N+1)'(bits[i]);
  end

  // up-sweep
  for (genvar t = 0; t < LOG_N; t++) begin : g_up
    for (genvar i = 0; i < N; i++) begin : g_row
      if (((i + 1) % (2 ** (t + 1))) == 0) begin : g_add
        assign s[t+1][i] = (level > level_t'(t)) ? s[t][i] + s[t][i - 2**t] : s[t][i];
      end else begin : g_pass
        assign s[t+1][i] = s[t][i];
      end
    end
  end

  // down-sweep: stage index LOG_N + j handles t = LOG_N-2-j
  for (genvar j = 0; j < LOG_N - 1; j++) begin : g_down
    localparam int unsigned T = LOG_N - 2 - j;
    for (genvar i = 0; i < N; i++) begin : g_row
      if (i >= 2**(T+1) && ((i + 1) % (2 ** (T + 1))) == 2**T) begin : g_add
        localparam int unsigned B = i + 1 - 2**T;
        assign s[LOG_N+j+1][i] = (level > level_t'(tz(B))) ? s[LOG_N+j][i] + s[LOG_N+j][B-1]
                                                           : s[LOG_N+j][i];
      end else begin : g_pass
        assign s[LOG_N+j+1][i] = s[LOG_N+j][i];
      end
    end
  end

  assign prefix = s[STAGES];

endmodule
