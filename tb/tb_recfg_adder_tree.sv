// tb_recfg_adder_tree: every level of the tree against slice popcounts.
module tb_recfg_adder_tree;
  localparam int unsigned N = 64;
  localparam int unsigned LOG_N = 6;
  logic [N-1:0] bits;
  logic [LOG_N:0][N-1:0][LOG_N:0] lvl_sum;
  int unsigned checks = 0, failures = 0;

  recfg_adder_tree #(.N(N)) dut (.bits, .lvl_sum);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      case (t)
        0: bits = '0;
        1: bits = '1;
        default: bits = {$urandom, $urandom} & {$urandom, $urandom} | ((t % 3 == 0) ? {$urandom, $urandom} : '0);
      endcase
      #1;
      for (int l = 0; l <= LOG_N; l++) begin
        for (int j = 0; j < N; j++) begin
          int want;
          want = 0;
          if (j < (N >> l)) for (int b = j << l; b < (j + 1) << l; b++) want += bits[b];
          checks++;
          if (lvl_sum[l][j] != want) begin
            failures++;
            if (failures < 10) $display("level %0d entry %0d: got %0d want %0d", l, j, lvl_sum[l][j], want);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
