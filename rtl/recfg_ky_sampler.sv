// recfg_ky_sampler: range-reconfigurable column-wise Knuth-Yao sampler.
//
// Knuth-Yao sampling walks the discrete distribution generating (DDG) tree
// of a distribution one level per random bit; level c of the tree is column
// c of the N x K probability matrix. This sampler processes one column per
// clock for up to N/2 distributions at once:
//   - the transposed matrix delivers column `col` (N bits);
//   - the reconfigurable adder tree gives the Hamming weight of the column
//     for every group of 2^level rows;
//   - the distance computing tree updates d <- 2d + !rb - H for each group
//     of the selected level with one fresh random bit per group;
//   - a group whose d goes negative is sampled in that cycle: the sample
//     encoder returns the row of its (2d + !rb + 1)-th one, which is kept in
//     the result buffer;
//   - when every group of the mode has a sample, the whole batch is
//     presented with sample_valid and the next batch starts at column 0 in
//     the following cycle.
// A batch therefore takes as many cycles as its deepest DDG leaf, i.e. the
// sampler uses only the precision each draw needs. The 1D mode (level 6)
// is the plain column-wise Knuth-Yao sampler.
//
// Interface:
//   wr_en/wr_col/wr_data  load one column of the transposed matrix
//   level                 mode level 1..6: 64 >> level distributions of
//                         range up to 2^level (32D ... 1D)
//   run                   process one column this cycle; also the PRNG
//                         advance request
//   rb                    random bits, bit g for distribution g
//   sample_valid/samples  registered, one cycle after the last column of a
//                         batch; samples[g] valid for g < 64 >> level
//   restart               pulses when the last column is used without every
//                         distribution finished (only possible if a
//                         distribution sums to less than one); those
//                         distributions start over at column 0
//   idle                  at a batch boundary: level and matrix may change
// The datapath follows the design description; the batch control, restart
// and port protocol are this design's own choices. Every distribution must
// sum to exactly one in K-bit fixed point; rows a distribution does not use
// must be zero.
// rst_n also disables the assertions (disable iff), which lint reports as a
// reset used both synchronously and asynchronously; the logic uses it only
// as an asynchronous reset.
module recfg_ky_sampler
  import sampler_pkg::*;
#(
  parameter int unsigned N     = MAX_RANGE,
  parameter int unsigned K     = PRECISION,
  parameter int unsigned LOG_N = $clog2(N),
  parameter int unsigned LOG_K = $clog2(K)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          wr_en,
  input  logic [LOG_K-1:0]              wr_col,
  input  logic [N-1:0]                  wr_data,
  input  level_t                        level,
  input  logic                          run,
  input  logic [N/2-1:0]                rb,
  output logic                          rn_en,
  output logic                          sample_valid,
  output logic [N/2-1:0][LOG_N-1:0]     samples,
  output logic                          restart,
  output logic                          idle
);

  logic [LOG_K-1:0]                col_q;
  logic [N-1:0]                    col_bits;
  logic [LOG_N:0][N-1:0][LOG_N:0]  h_tree;
  logic [N/2-1:0][LOG_N+1:0]       n;
  logic [N/2-1:0]                  hit;
  logic [N/2-1:0]                  done;
  logic [N/2-1:0]                  active;
  logic [N/2-1:0][LOG_N-1:0]       row;
  logic [N/2-1:0][LOG_N-1:0]       result_q;
  logic [N/2-1:0][LOG_N-1:0]       result_next;
  logic                            all_done;
  logic                            last_col;

  ky_prob_matrix #(.ROWS(N), .COLS(K)) u_matrix (
    .clk, .wr_en, .wr_col, .wr_data, .rd_col(col_q), .rd_data(col_bits)
  );

  recfg_adder_tree #(.N(N)) u_hw (.bits(col_bits), .lvl_sum(h_tree));

  ky_dc_tree #(.N(N)) u_dc (
    .clk, .rst_n, .level,
    .en      (run),
    .clear   (run && all_done),
    .restart (restart),
    .rb, .h_tree, .n, .hit, .done, .active
  );

  ky_sample_encoder #(.N(N)) u_enc (.col_bits, .level, .n, .row);

  always_comb begin
    for (int unsigned g = 0; g < N/2; g++) begin
      result_next[g] = hit[g] ? row[g] : result_q[g];
    end
  end

  assign all_done = &(done | hit | ~active);
  assign last_col = (col_q == LOG_K'(K-1));
  assign restart  = run && !all_done && last_col;
  assign rn_en    = run;
  assign idle     = (col_q == '0) && ((done & active) == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q        <= '0;
      result_q     <= '0;
      sample_valid <= 1'b0;
      samples      <= '0;
    end else begin
      sample_valid <= run && all_done;
      if (run) begin
        result_q <= result_next;
        if (all_done || last_col) col_q <= '0;
        else                      col_q <= col_q + LOG_K'(1);
        if (all_done) begin
          for (int unsigned g = 0; g < N/2; g++) begin
            samples[g] <= active[g] ? result_next[g] : '0;
          end
        end
      end
    end
  end

  initial begin
    assert (N == (1 << LOG_N) && K == (1 << LOG_K))
      else $error("recfg_ky_sampler: N and K must be powers of two");
  end

  a_level_legal: assert property (@(posedge clk) disable iff (!rst_n)
    run |-> (level >= level_t'(1) && level <= level_t'(LOG_N)));

  // Mode and matrix may only change at a batch boundary.
  a_level_stable: assert property (@(posedge clk) disable iff (!rst_n)
    !idle |-> $stable(level));
  a_write_idle: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> idle);

  // A sample is only taken from a row that holds a one in the column.
  for (genvar g = 0; g < N/2; g++) begin : g_chk
    a_hit_on_one: assert property (@(posedge clk) disable iff (!rst_n)
      (run && hit[g]) |-> col_bits[(32'(g) << level) + 32'(row[g])]);
  end

endmodule
