// tb_uniform_workload: clock cycles per sample on discrete uniform
// distributions, for ranges 2..64, on the full-size top.
//
// For each range N the CDT sampler is set to the smallest mode that holds
// range N (level ceil(log2(N-1))) with every group loaded with the uniform
// CDF F[j] = floor((j+1) * 2^32 / N), and the KY sampler to level
// ceil(log2 N) with every group loaded with the uniform PMF (2^32 / N
// rounded so that the rows sum to exactly 2^32). The testbench measures
// cycles per sample and checks:
//   CDT: exactly 2^(ceil(log2(N-1)) - 6) cycles per sample;
//   KY : for N a power of two every batch takes exactly log2 N cycles;
//        otherwise the mean batch length is at least the entropy log2 N
//        and, as a batch waits for the slowest of its D = 64 >> level
//        draws, at most ceil(log2 N) + log2 D + 3; in the 1D mode, with a
//        single draw per batch, at most log2 N + 2;
//   both: no sample outside 0..N-1 and every outcome drawn at least once.
module tb_uniform_workload;
  import sampler_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cdt_wr_en = 1'b0;
  logic [5:0] cdt_wr_addr = '0;
  logic [31:0] cdt_wr_data = '0;
  logic [2:0] cdt_level = '0;
  logic cdt_run = 1'b0;
  logic cdt_sample_valid;
  logic [63:0][6:0] cdt_samples;
  logic ky_wr_en = 1'b0;
  logic [4:0] ky_wr_col = '0;
  logic [63:0] ky_wr_data = '0;
  logic [2:0] ky_level = 3'd6;
  logic ky_run = 1'b0;
  logic ky_sample_valid, ky_restart, ky_idle;
  logic [31:0][5:0] ky_samples;
  int unsigned checks = 0, failures = 0;

  sampler_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clog2i(input int v);
    int r;
    r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  task automatic cdt_uniform(input int n);
    int lvl, gs, samples, cycles, hist [65];
    real cps, want;
    lvl = clog2i(n - 1);
    gs = 1 << lvl;
    for (int i = 0; i <= 64; i++) hist[i] = 0;
    for (int g = 0; g < (64 >> lvl); g++) begin
      for (int j = 0; j < gs; j++) begin
        @(negedge clk);
        cdt_wr_en = 1'b1; cdt_wr_addr = 6'(g * gs + j);
        cdt_wr_data = (j < n - 1) ? 32'((longint'(j + 1) << 32) / n) : '1;
      end
    end
    @(negedge clk) cdt_wr_en = 1'b0;
    cdt_level = 3'(lvl);
    samples = 0; cycles = 0;
    while (samples < 20 * n) begin
      @(negedge clk);
      cdt_run = 1'b1;
      cycles++;
      if (cdt_sample_valid) begin
        for (int g = 0; g < (64 >> lvl); g++) begin
          hist[cdt_samples[g]]++;
          samples++;
        end
      end
    end
    cdt_run = 1'b0;
    // the first cycle only starts the pipeline
    cps = real'(cycles - 1) / real'(samples);
    want = 2.0 ** (lvl - 6);
    checks++;
    if (cps > want * 1.0001 || cps < want * 0.9999) begin
      failures++;
      $display("CDT N=%0d: %f cycles/sample, expected %f", n, cps, want);
    end
    for (int i = 0; i <= 64; i++) begin
      checks++;
      if ((i < n && hist[i] == 0) || (i >= n && hist[i] != 0)) begin
        failures++;
        $display("CDT N=%0d: outcome %0d drawn %0d times", n, i, hist[i]);
      end
    end
    $display("CDT N=%0d mode level %0d: %f cycles/sample", n, lvl, cps);
    @(negedge clk);
  endtask

  task automatic ky_uniform(input int n);
    int lvl, gs, batches, cycles, len, samples, hist [64];
    longint unsigned p [64];
    real mean, h;
    bit bad_len;
    lvl = (n <= 2) ? 1 : clog2i(n);
    gs = 1 << lvl;
    for (int i = 0; i < 64; i++) hist[i] = 0;
    for (int g = 0; g < (64 >> lvl); g++) begin
      for (int r = 0; r < gs; r++) begin
        if (r < n) p[g * gs + r] = ((64'd1 << 32) / n) + ((r < ((64'd1 << 32) % n)) ? 1 : 0);
        else p[g * gs + r] = 0;
      end
    end
    for (int c = 0; c < 32; c++) begin
      @(negedge clk);
      ky_wr_en = 1'b1; ky_wr_col = 5'(c);
      for (int r = 0; r < 64; r++) ky_wr_data[r] = p[r][31 - c];
    end
    @(negedge clk) ky_wr_en = 1'b0;
    ky_level = 3'(lvl);
    batches = 0; cycles = 0; len = 0; samples = 0; bad_len = 0;
    while (samples < 20 * n) begin
      @(negedge clk);
      if (ky_sample_valid) begin
        batches++;
        if ((1 << lvl) == n && len != lvl) bad_len = 1;
        len = 0;
        for (int g = 0; g < (64 >> lvl); g++) begin
          hist[ky_samples[g]]++;
          samples++;
        end
      end
      if (samples < 20 * n) begin
        ky_run = 1'b1;
        cycles++;
        len++;
      end else ky_run = 1'b0;
    end
    ky_run = 1'b0;
    mean = real'(cycles) / real'(batches);
    h = $ln(real'(n)) / $ln(2.0);
    checks += 2;
    if (bad_len) begin failures++; $display("KY N=%0d: a batch did not take %0d cycles", n, lvl); end
    if (mean < h - 0.01 || mean > real'(clog2i(n) + 6 - lvl) + 3.0 || (lvl == 6 && mean > h + 2.0)) begin
      failures++;
      $display("KY N=%0d: mean batch length %f out of bounds", n, mean);
    end
    for (int i = 0; i < 64; i++) begin
      checks++;
      if ((i < n && hist[i] == 0) || (i >= n && hist[i] != 0)) begin
        failures++;
        $display("KY N=%0d: outcome %0d drawn %0d times", n, i, hist[i]);
      end
    end
    $display("KY  N=%0d mode level %0d: %f cycles/batch, %f cycles/sample (entropy %f)",
             n, lvl, mean, mean / real'(64 >> lvl), h);
    @(negedge clk);
  endtask

  int ranges [14] = '{2, 3, 4, 5, 8, 9, 12, 16, 17, 24, 32, 33, 48, 64};

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    foreach (ranges[i]) begin
      cdt_uniform(ranges[i]);
      ky_uniform(ranges[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
