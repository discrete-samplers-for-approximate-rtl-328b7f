// tb_recfg_ky_sampler: the reconfigurable Knuth-Yao sampler in all modes.
//
// For each mode (levels 1..6) one random PMF per group is loaded into the
// transposed matrix, at a random precision of 1..32 bits, and batches are
// drawn with random bits. Every batch is checked against the bit-serial
// Knuth-Yao walk: each sample, and the batch length, which must equal the
// deepest leaf reached by any group (one column per cycle). Directed parts:
//  - the worked example Sunny/Cloudy/Rain = 0.125/0.375/0.5: random bits
//    0,0,0 give Cloudy (row 1) after 3 columns, bits 0,0,1 give Sunny;
//  - a distribution summing to 1 - 2^-31 with all-zero random bits never
//    reaches a leaf: restart must pulse after 32 columns.
// Also counts how often a group finished before the rest of its batch (its
// sample held in the result buffer) and requires that to happen.
module tb_recfg_ky_sampler;
  import sampler_pkg::*;
  import sampler_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0;
  logic [4:0] wr_col = '0;
  logic [63:0] wr_data = '0;
  logic [2:0] level = 3'd6;
  logic run = 1'b0;
  logic [31:0] rb = '0;
  logic rn_en, sample_valid, restart, idle;
  logic [31:0][5:0] samples;
  int unsigned checks = 0, failures = 0;
  int unsigned batches = 0, buffered = 0, restarts = 0;

  recfg_ky_sampler dut (.clk, .rst_n, .wr_en, .wr_col, .wr_data, .level, .run, .rb,
                        .rn_en, .sample_valid, .samples, .restart, .idle);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (restart) restarts++;

  pmf_t p;

  task automatic load_matrix();
    for (int c = 0; c < 32; c++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_col = 5'(c);
      for (int r = 0; r < 64; r++) wr_data[r] = p[r][31 - c];
    end
    @(negedge clk) wr_en = 1'b0;
  endtask

  task automatic load_mode(input int lvl);
    int gs;
    gs = 1 << lvl;
    for (int r = 0; r < 64; r++) p[r] = 0;
    for (int g = 0; g < (64 >> lvl); g++) begin
      pmf_t q;
      make_pmf(2 + $urandom % (gs - 1), 1 + $urandom % 32, q);
      for (int r = 0; r < gs; r++) p[g * gs + r] = q[r];
    end
    load_matrix();
  endtask

  // Draws `nb` batches with the bit source `mode` (0 random, 1 all ones,
  // 2 all zeros, 3 from `fixed`) and checks them.
  task automatic draw(input int lvl, input int nb, input int mode, input logic [31:0] fixed [$]);
    logic [31:0] log_q [$];
    int got;
    level = 3'(lvl);
    got = 0;
    checks++;
    if (!idle) begin failures++; $display("not idle before level %0d", lvl); end
    while (got < nb) begin
      @(negedge clk);
      if (sample_valid) begin
        int worst, nfirst;
        worst = 0; nfirst = 0;
        for (int g = 0; g < (64 >> lvl); g++) begin
          int row, steps;
          ky_ref(p, g << lvl, 1 << lvl, g, log_q, 32, row, steps);
          checks++;
          if (samples[g] != row) begin
            failures++;
            if (failures < 10) $display("level %0d group %0d: got %0d want %0d", lvl, g, samples[g], row);
          end
          if (steps > worst) worst = steps;
        end
        for (int g = 0; g < (64 >> lvl); g++) begin
          int row, steps;
          ky_ref(p, g << lvl, 1 << lvl, g, log_q, 32, row, steps);
          if (steps < worst) nfirst++;
        end
        if (nfirst > 0) buffered++;
        checks++;
        if (worst != log_q.size()) begin
          failures++;
          if (failures < 10) $display("level %0d: batch took %0d cycles, reference %0d", lvl, log_q.size(), worst);
        end
        log_q.delete();
        got++;
        batches++;
        if (got == nb) begin run = 1'b0; break; end
      end
      run = ($urandom % 8) != 0;
      case (mode)
        0: rb = $urandom;
        1: rb = '1;
        2: rb = '0;
        default: rb = (log_q.size() < fixed.size()) ? fixed[log_q.size()] : $urandom;
      endcase
      if (run) log_q.push_back(rb);
    end
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] bits [$];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // worked example, level 2 (range 4): Sunny, Cloudy, Rain, unused
    for (int r = 0; r < 64; r++) p[r] = 0;
    p[0] = 64'h2000_0000; p[1] = 64'h6000_0000; p[2] = 64'h8000_0000;
    for (int g = 1; g < 16; g++) begin p[4 * g] = 64'h8000_0000; p[4 * g + 1] = 64'h8000_0000; end
    load_matrix();
    bits = '{32'h0, 32'h0, 32'h0};
    draw(2, 1, 3, bits);
    checks++;
    if (samples[0] != 1) begin failures++; $display("example 0,0,0: got %0d want 1", samples[0]); end
    bits = '{32'h0, 32'h0, 32'h1};
    draw(2, 1, 3, bits);
    checks++;
    if (samples[0] != 0) begin failures++; $display("example 0,0,1: got %0d want 0", samples[0]); end

    // restart: level 1, every group 0.5 - 2^-32 twice
    for (int r = 0; r < 64; r++) p[r] = 64'h7FFF_FFFF;
    load_matrix();
    level = 3'd1;
    for (int t = 0; t < 32; t++) begin
      @(negedge clk);
      run = 1'b1; rb = '0;
      #1;
      checks++;
      if (restart !== (t == 31)) begin failures++; $display("restart at column %0d = %b", t, restart); end
    end
    @(negedge clk) run = 1'b0;
    // finish the interrupted batch with random bits: rows are then 50/50
    begin
      logic [31:0] zeros [$];
      for (int t = 0; t < 32; t++) zeros.push_back('0);
      // the reference replays the 32 all-zero columns, then the new bits
      begin
          int got_valid;
          got_valid = 0;
          while (!got_valid) begin
            @(negedge clk);
            if (sample_valid) got_valid = 1;
            else begin run = 1'b1; rb = $urandom; zeros.push_back(rb); end
          end
          run = 1'b0;
          for (int g = 0; g < 32; g++) begin
            int row, steps;
            ky_ref(p, 2 * g, 2, g, zeros, 32, row, steps);
            checks++;
            if (samples[g] != row) begin failures++; $display("after restart group %0d: got %0d want %0d", g, samples[g], row); end
          end
        end
    end
    @(negedge clk);

    for (int lvl = 1; lvl <= 6; lvl++) begin
      load_mode(lvl);
      draw(lvl, 60, 0, bits);
      draw(lvl, 3, 1, bits);
    end
    checks++;
    if (restarts != 1) begin failures++; $display("restarts = %0d, expected 1", restarts); end
    checks++;
    if (buffered == 0) begin failures++; $display("no batch held an early result"); end
    $display("batches=%0d buffered=%0d restarts=%0d", batches, buffered, restarts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
