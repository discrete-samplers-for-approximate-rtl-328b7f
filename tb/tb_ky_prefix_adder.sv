// tb_ky_prefix_adder: segmented inclusive prefix sums for every level,
// against a sequential scan that restarts at each group boundary.
module tb_ky_prefix_adder;
  import sampler_pkg::*;
  logic [63:0] bits;
  logic [2:0] level;
  logic [63:0][6:0] prefix;
  int unsigned checks = 0, failures = 0;

  ky_prefix_adder #(.N(64)) dut (.bits, .level, .prefix);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 210; t++) begin
      bits  = (t < 7) ? '1 : {$urandom, $urandom};
      level = 3'(t % 7);
      #1;
      begin
        int run_sum;
        run_sum = 0;
        for (int r = 0; r < 64; r++) begin
          if (r % (1 << level) == 0) run_sum = 0;
          run_sum += bits[r];
          checks++;
          if (prefix[r] != run_sum) begin
            failures++;
            if (failures < 10) $display("level %0d row %0d: got %0d want %0d", level, r, prefix[r], run_sum);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
