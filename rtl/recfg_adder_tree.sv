// recfg_adder_tree: reconfigurable adder tree (popcount with every level out).
//
// A binary tree of adders over N one-bit inputs. Level 0 is the inputs
// themselves; level l holds N >> l sums, entry j being the number of ones in
// bits [j*2^l +: 2^l]. Every level is brought out, so the same tree serves
// every sampling mode: a mode that splits the N bits into aligned groups of
// 2^l simply reads level l. The samplers use it as the configurable
// thermometer-to-binary encoder (counting comparator outputs) and as the
// Hamming-weight tree over a probability-matrix column.
//
// Interface: lvl_sum[l][j] is (LOG_N+1) bits wide; entries j >= N >> l are
// tied to zero. Purely combinational. Taking each mode's results from one
// level of a single tree follows the published encoder; sharing one module
// for all three trees is this design's choice.
module recfg_adder_tree #(
  parameter int unsigned N     = 64,
  parameter int unsigned LOG_N = $clog2(N)
) (
  input  logic [N-1:0]                        bits,
  output logic [LOG_N:0][N-1:0][LOG_N:0]      lvl_sum
);

  for (genvar l = 0; l <= LOG_N; l++) begin : g_lvl
    for (genvar j = 0; j < N; j++) begin : g_ent
      if (j < (N >> l)) begin : g_used
        if (l == 0) begin : g_leaf
          assign lvl_sum[l][j] = (LOG_N+1)'(bits[j]);
        end else begin : g_add
          assign lvl_sum[l][j] = lvl_sum[l-1][2*j] + lvl_sum[l-1][2*j+1];
        end
      end else begin : g_unused
        assign lvl_sum[l][j] = '0;
      end
    end
  end

  initial begin
    assert (N == (1 << LOG_N)) else $error("recfg_adder_tree: N must be 2**LOG_N");
  end

endmodule
