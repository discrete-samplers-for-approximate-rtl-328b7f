// ky_dc_tree: distance computing tree of the reconfigurable KY sampler.
//
// One ky_dc_unit per distribution of every mode: level l (groups of 2^l
// rows, l = 1..LOG_N) has N >> l units of width l+2, 32+16+8+4+2+1 = 63
// units for N = 64. Only the units of the selected level are enabled; the
// others hold their state. Unit g of level l takes the random bit rb[g] and
// the Hamming weight h_tree[l][g] of its group from the reconfigurable adder
// tree, so the PRNG bandwidth is N >> level bits per cycle.
//
// The outputs are per group g < N/2, taken from the selected level:
// n[g] (1-based position of the sampled one), hit[g] (the group reaches a
// leaf this cycle), done[g] (registered: the group already has its sample)
// and active[g] (g < N >> level). Combinational apart from the unit
// registers; clear and restart go to every unit. Level 0 of h_tree (single
// rows) is not read: the KY sampler has no range-1 mode. One unit per distribution
// of every mode, with per-mode activation, follows the published DC tree;
// the per-level widths and the output muxing are this design's choices.
module ky_dc_tree
  import sampler_pkg::*;
#(
  parameter int unsigned N     = MAX_RANGE,
  parameter int unsigned LOG_N = $clog2(N)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  level_t                           level,
  input  logic                             en,
  input  logic                             clear,
  input  logic                             restart,
  input  logic [N/2-1:0]                   rb,
  input  logic [LOG_N:0][N-1:0][LOG_N:0]   h_tree,
  output logic [N/2-1:0][LOG_N+1:0]        n,
  output logic [N/2-1:0]                   hit,
  output logic [N/2-1:0]                   done,
  output logic [N/2-1:0]                   active
);

  // Per-level results widened to the common width; entries past the level's
  // unit count are zero.
  logic [LOG_N:1][N/2-1:0][LOG_N+1:0] n_l;
  logic [LOG_N:1][N/2-1:0]            hit_l;
  logic [LOG_N:1][N/2-1:0]            done_l;

  for (genvar l = 1; l <= LOG_N; l++) begin : g_lvl
    localparam int unsigned W     = l + 2;
    localparam int unsigned UNITS = N >> l;
    for (genvar g = 0; g < N/2; g++) begin : g_unit
      if (g < UNITS) begin : g_dc
        logic [W-1:0] n_u;
        ky_dc_unit #(.W(W)) u_dc (
          .clk, .rst_n,
          .en      (en && level == level_t'(l)),
          .clear,
          .restart,
          .rb      (rb[g]),
          .h       (W'(h_tree[l][g])),
          .n       (n_u),
          .hit     (hit_l[l][g]),
          .done    (done_l[l][g])
        );
        assign n_l[l][g] = (LOG_N+2)'(n_u);
      end else begin : g_none
        assign n_l[l][g]    = '0;
        assign hit_l[l][g]  = 1'b0;
        assign done_l[l][g] = 1'b0;
      end
    end
  end

  always_comb begin
    n      = '0;
    hit    = '0;
    done   = '0;
    active = '0;
    for (int unsigned l = 1; l <= LOG_N; l++) begin
      if (level == level_t'(l)) begin
        n    = n_l[l];
        hit  = hit_l[l];
        done = done_l[l];
        for (int unsigned g = 0; g < N/2; g++) active[g] = (g < (N >> l));
      end
    end
  end

endmodule
