// tb_sampler_top: end-to-end run of both samplers at full size.
//
// The CDT and KY samplers run at the same time, each fed by its own LFSR
// bank inside the top. The testbench reads the random words the banks
// deliver in each cycle (hierarchically, from the top's PRNG nets) and
// checks every sample with independent reference models: a linear CDF
// search and the bit-serial Knuth-Yao walk. Each sampler goes through all of
// its modes with random distributions. Counted and required at least once:
// every CDT mode, every KY mode, a KY batch in which some distribution
// finished early and waited in the result buffer, and KY batches of
// different lengths (draws that stop at different precisions).
module tb_sampler_top;
  import sampler_pkg::*;
  import sampler_tb_pkg::*;

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
  int unsigned cdt_mode_used [7];
  int unsigned ky_mode_used [7];
  int unsigned ky_buffered = 0;
  int unsigned ky_len_seen [33];

  sampler_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- CDT side ----------------
  logic [31:0] f [64];

  task automatic cdt_load(input int lvl);
    int gs;
    gs = 1 << lvl;
    for (int g = 0; g < (64 >> lvl); g++) begin
      pmf_t p;
      int m;
      longint unsigned acc;
      m = 2 + ($urandom % gs);
      make_pmf(m, 1 + $urandom % 32, p);
      acc = 0;
      for (int j = 0; j < gs; j++) begin
        @(negedge clk);
        cdt_wr_en = 1'b1; cdt_wr_addr = 6'(g * gs + j);
        if (j < m - 1) begin acc += p[j]; cdt_wr_data = 32'(acc); end
        else cdt_wr_data = '1;
        f[g * gs + j] = cdt_wr_data;
      end
    end
    @(negedge clk) cdt_wr_en = 1'b0;
  endtask

  task automatic cdt_test(input int lvl, input int cycles);
    logic [31:0] u_prev [64];
    bit prev;
    prev = 0;
    cdt_level = 3'(lvl);
    for (int t = 0; t <= cycles; t++) begin
      @(negedge clk);
      checks++;
      if (cdt_sample_valid !== prev) failures++;
      if (prev) begin
        cdt_mode_used[lvl]++;
        for (int g = 0; g < (64 >> lvl); g++) begin
          checks++;
          if (cdt_samples[g] != cdt_ref(f, g << lvl, 1 << lvl, u_prev[g])) begin
            failures++;
            if (failures < 10) $display("CDT level %0d group %0d: got %0d", lvl, g, cdt_samples[g]);
          end
        end
      end
      cdt_run = (t < cycles) && (($urandom % 4) != 0);
      prev = cdt_run;
      // words the bank presents this cycle, routed to group g as word g
      for (int g = 0; g < 64; g++) u_prev[g] = dut.cdt_rn[g];
    end
    cdt_run = 1'b0;
  endtask

  // ---------------- KY side ----------------
  pmf_t kp;

  task automatic ky_load(input int lvl);
    int gs;
    gs = 1 << lvl;
    for (int r = 0; r < 64; r++) kp[r] = 0;
    for (int g = 0; g < (64 >> lvl); g++) begin
      pmf_t q;
      make_pmf(2 + $urandom % (gs - 1), 1 + $urandom % 32, q);
      for (int r = 0; r < gs; r++) kp[g * gs + r] = q[r];
    end
    for (int c = 0; c < 32; c++) begin
      @(negedge clk);
      ky_wr_en = 1'b1; ky_wr_col = 5'(c);
      for (int r = 0; r < 64; r++) ky_wr_data[r] = kp[r][31 - c];
    end
    @(negedge clk) ky_wr_en = 1'b0;
  endtask

  task automatic ky_test(input int lvl, input int nb);
    logic [31:0] log_q [$];
    int got;
    got = 0;
    ky_level = 3'(lvl);
    checks++;
    if (!ky_idle) failures++;
    while (got < nb) begin
      @(negedge clk);
      if (ky_sample_valid) begin
        int worst, early;
        worst = 0; early = 0;
        for (int g = 0; g < (64 >> lvl); g++) begin
          int row, steps;
          ky_ref(kp, g << lvl, 1 << lvl, g, log_q, 32, row, steps);
          checks++;
          if (ky_samples[g] != row) begin
            failures++;
            if (failures < 10) $display("KY level %0d group %0d: got %0d want %0d", lvl, g, ky_samples[g], row);
          end
          if (steps > worst) worst = steps;
        end
        for (int g = 0; g < (64 >> lvl); g++) begin
          int row, steps;
          ky_ref(kp, g << lvl, 1 << lvl, g, log_q, 32, row, steps);
          if (steps < worst) early++;
        end
        if (early > 0) ky_buffered++;
        checks++;
        if (worst != log_q.size()) failures++;
        if (log_q.size() <= 32) ky_len_seen[log_q.size()]++;
        ky_mode_used[lvl]++;
        log_q.delete();
        got++;
        if (got == nb) begin ky_run = 1'b0; break; end
      end
      ky_run = ($urandom % 6) != 0;
      if (ky_run) log_q.push_back(dut.ky_rn[0]);
    end
    @(negedge clk);
  endtask

  initial begin
    int lengths;
    for (int i = 0; i < 64; i++) f[i] = '1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    fork
      for (int lvl = 0; lvl <= 6; lvl++) begin
        cdt_load(lvl);
        cdt_test(lvl, 60);
      end
      for (int lvl = 1; lvl <= 6; lvl++) begin
        ky_load(lvl);
        ky_test(lvl, 40);
      end
    join
    for (int l = 0; l <= 6; l++) begin
      checks++;
      if (cdt_mode_used[l] == 0) begin failures++; $display("CDT mode level %0d never ran", l); end
    end
    for (int l = 1; l <= 6; l++) begin
      checks++;
      if (ky_mode_used[l] == 0) begin failures++; $display("KY mode level %0d never ran", l); end
    end
    lengths = 0;
    for (int i = 0; i <= 32; i++) if (ky_len_seen[i] > 0) lengths++;
    checks += 2;
    if (ky_buffered == 0) begin failures++; $display("no KY batch buffered an early result"); end
    if (lengths < 2) begin failures++; $display("KY batches all had the same length"); end
    $display("CDT batches per level: %0d %0d %0d %0d %0d %0d %0d", cdt_mode_used[0], cdt_mode_used[1],
             cdt_mode_used[2], cdt_mode_used[3], cdt_mode_used[4], cdt_mode_used[5], cdt_mode_used[6]);
    $display("KY batches per level: %0d %0d %0d %0d %0d %0d, buffered early results in %0d, %0d batch lengths",
             ky_mode_used[1], ky_mode_used[2], ky_mode_used[3], ky_mode_used[4], ky_mode_used[5],
             ky_mode_used[6], ky_buffered, lengths);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
