// sampler_top: the two reconfigurable discrete samplers side by side.
//
// A range-reconfigurable parallel-search CDT sampler and a range-
// reconfigurable column-wise Knuth-Yao sampler, each with its own LFSR PRNG
// bank sized for its worst-case random-bit demand: 64 lanes of 32 bits per
// cycle for the CDT sampler (64 distributions of range 2 in one cycle) and
// one 32-bit lane for the KY sampler (32 distributions of range 2, one bit
// each per cycle). A PRNG bank advances in every cycle its sampler runs.
// The two samplers share only clock and reset; their ports are brought out
// with cdt_ and ky_ prefixes and behave as described in recfg_cdt_sampler
// and recfg_ky_sampler.
module sampler_top
  import sampler_pkg::*;
#(
  parameter int unsigned N        = MAX_RANGE,
  parameter int unsigned K        = PRECISION,
  parameter logic [31:0] CDT_SEED = 32'hC0FF_EE01,
  parameter logic [31:0] KY_SEED  = 32'h5EED_0042
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // CDT sampler
  input  logic                            cdt_wr_en,
  input  logic [$clog2(N)-1:0]            cdt_wr_addr,
  input  logic [K-1:0]                    cdt_wr_data,
  input  level_t                          cdt_level,
  input  logic                            cdt_run,
  output logic                            cdt_sample_valid,
  output logic [N-1:0][$clog2(N):0]       cdt_samples,
  // KY sampler
  input  logic                            ky_wr_en,
  input  logic [$clog2(K)-1:0]            ky_wr_col,
  input  logic [N-1:0]                    ky_wr_data,
  input  level_t                          ky_level,
  input  logic                            ky_run,
  output logic                            ky_sample_valid,
  output logic [N/2-1:0][$clog2(N)-1:0]   ky_samples,
  output logic                            ky_restart,
  output logic                            ky_idle
);

  logic [N-1:0][K-1:0] cdt_rn;
  logic                cdt_rn_en;
  logic [0:0][N/2-1:0] ky_rn;
  logic                ky_rn_en;

  lfsr_prng #(.LANES(N), .WIDTH(K), .SEED(CDT_SEED)) u_cdt_prng (
    .clk, .rst_n, .en(cdt_rn_en), .rn(cdt_rn)
  );

  recfg_cdt_sampler #(.N(N), .WIDTH(K)) u_cdt (
    .clk, .rst_n,
    .wr_en   (cdt_wr_en),
    .wr_addr (cdt_wr_addr),
    .wr_data (cdt_wr_data),
    .level   (cdt_level),
    .run     (cdt_run),
    .rn      (cdt_rn),
    .rn_en   (cdt_rn_en),
    .sample_valid (cdt_sample_valid),
    .samples (cdt_samples)
  );

  lfsr_prng #(.LANES(1), .WIDTH(N/2), .SEED(KY_SEED)) u_ky_prng (
    .clk, .rst_n, .en(ky_rn_en), .rn(ky_rn)
  );

  recfg_ky_sampler #(.N(N), .K(K)) u_ky (
    .clk, .rst_n,
    .wr_en   (ky_wr_en),
    .wr_col  (ky_wr_col),
    .wr_data (ky_wr_data),
    .level   (ky_level),
    .run     (ky_run),
    .rb      (ky_rn[0]),
    .rn_en   (ky_rn_en),
    .sample_valid (ky_sample_valid),
    .samples (ky_samples),
    .restart (ky_restart),
    .idle    (ky_idle)
  );

endmodule
