// tb_ky_sample_encoder: for random columns and every level, the returned
// row of each group must be the position of its n-th one, found by a scan.
module tb_ky_sample_encoder;
  import sampler_pkg::*;
  logic [63:0] col_bits;
  logic [2:0] level;
  logic [31:0][7:0] n;
  logic [31:0][5:0] row;
  int unsigned checks = 0, failures = 0;

  ky_sample_encoder #(.N(64)) dut (.col_bits, .level, .n, .row);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int gsize, ngroups;
      int hw [32];
      col_bits = {$urandom, $urandom} | ((t % 2) ? {$urandom, $urandom} : '0);
      level    = 3'(1 + t % 6);
      gsize    = 1 << level;
      ngroups  = 64 >> level;
      n = '0;
      for (int g = 0; g < ngroups; g++) begin
        hw[g] = 0;
        for (int r = 0; r < gsize; r++) hw[g] += col_bits[g * gsize + r];
        n[g] = (hw[g] > 0) ? 8'(1 + $urandom % hw[g]) : 8'd1;
      end
      #1;
      for (int g = 0; g < ngroups; g++) begin
        int seen, want;
        if (hw[g] == 0) continue;
        seen = 0; want = -1;
        for (int r = 0; r < gsize && want < 0; r++) begin
          if (col_bits[g * gsize + r]) begin
            seen++;
            if (seen == n[g]) want = r;
          end
        end
        checks++;
        if (row[g] != want) begin
          failures++;
          if (failures < 10) $display("level %0d group %0d n=%0d: got %0d want %0d", level, g, n[g], row[g], want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
