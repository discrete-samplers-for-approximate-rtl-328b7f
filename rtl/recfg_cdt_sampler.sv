// recfg_cdt_sampler: range-reconfigurable CDT sampler with parallel search.
//
// The CDF tables sit in a 64 x 32-bit register file. Every cycle with run = 1
// each of the 64 comparators compares its CDF entry with the random word of
// its distribution (chosen by the PRNG mux), and the reconfigurable adder
// tree counts the comparator outputs per group: level l of the tree is the
// sample vector of the mode with groups of 2^l entries. The mode level l
// gives 64 >> l distributions of range up to 2^l + 1 (64D ... 1D), all
// sampled in the same cycle.
//
// Interface:
//   wr_en/wr_addr/wr_data  load CDF entries (F[j] as 32-bit fractions); a
//                          group's unused entries must stay all ones
//   level                  mode level, 0..6
//   run                    sample this cycle; also the PRNG advance request
//   rn                     64 uniform 32-bit words from the PRNG bank
//   sample_valid, samples  registered: samples[g] is the sample of
//                          distribution g, g < 64 >> level, one cycle after
//                          the cycle with run = 1; higher entries are zero
// Throughput is 64 >> level samples per cycle, latency one cycle.
// The structure follows the sampler description; the registered output, the
// comparison direction and the port protocol are this design's choices.
// rst_n also disables the assertions (disable iff), which lint reports as a
// reset used both synchronously and asynchronously; the logic uses it only
// as an asynchronous reset.
module recfg_cdt_sampler
  import sampler_pkg::*;
#(
  parameter int unsigned N     = MAX_RANGE,
  parameter int unsigned WIDTH = PRECISION,
  parameter int unsigned LOG_N = $clog2(N)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        wr_en,
  input  logic [LOG_N-1:0]            wr_addr,
  input  logic [WIDTH-1:0]            wr_data,
  input  level_t                      level,
  input  logic                        run,
  input  logic [N-1:0][WIDTH-1:0]     rn,
  output logic                        rn_en,
  output logic                        sample_valid,
  output logic [N-1:0][LOG_N:0]       samples
);

  logic [N-1:0][WIDTH-1:0]       f;
  logic [N-1:0][WIDTH-1:0]       u;
  logic [N-1:0]                  lt;
  logic [LOG_N:0][N-1:0][LOG_N:0] lvl_sum;

  cdt_regfile #(.DEPTH(N), .WIDTH(WIDTH)) u_regfile (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .f
  );

  cdt_prng_mux #(.N(N), .WIDTH(WIDTH)) u_mux (.level, .rn, .u);

  cdt_comparator_array #(.N(N), .WIDTH(WIDTH)) u_cmp (.f, .u, .lt);

  recfg_adder_tree #(.N(N)) u_enc (.bits(lt), .lvl_sum);

  logic [N-1:0][LOG_N:0] sel;
  always_comb begin
    sel = '0;
    for (int unsigned l = 0; l <= LOG_N; l++) begin
      if (level == level_t'(l)) sel = lvl_sum[l];
    end
  end

  assign rn_en = run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample_valid <= 1'b0;
      samples      <= '0;
    end else begin
      sample_valid <= run;
      if (run) samples <= sel;
    end
  end

  initial begin
    assert (N == (1 << LOG_N)) else $error("recfg_cdt_sampler: N must be 2**LOG_N");
  end

  // A sampling cycle needs a legal mode level.
  property p_level_legal;
    @(posedge clk) disable iff (!rst_n) run |-> (level <= level_t'(LOG_N));
  endproperty
  a_level_legal: assert property (p_level_legal);

endmodule
