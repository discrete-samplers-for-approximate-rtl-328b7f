// tb_recfg_cdt_sampler: the reconfigurable CDT sampler in all seven modes.
//
// For every mode the testbench loads one random CDF per group (ranges from
// 2 up to the mode's maximum, unused entries left all ones), runs it with
// random words and compares every sample with a linear search. It also
// checks the one-cycle latency, one batch per cycle, and the worked example
// P(W | R = True) = [0.125, 0.375, 0.5] with U = 0.2, which must give 1.
module tb_recfg_cdt_sampler;
  import sampler_pkg::*;
  import sampler_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0;
  logic [5:0] wr_addr = '0;
  logic [31:0] wr_data = '0;
  logic [2:0] level = '0;
  logic run = 1'b0;
  logic [63:0][31:0] rn = '0;
  logic rn_en, sample_valid;
  logic [63:0][6:0] samples;
  int unsigned checks = 0, failures = 0;

  recfg_cdt_sampler dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .level, .run, .rn,
                         .rn_en, .sample_valid, .samples);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] f [64];

  task automatic load_entry(input int a, input logic [31:0] v);
    @(negedge clk);
    wr_en = 1'b1; wr_addr = 6'(a); wr_data = v;
    f[a] = v;
    @(negedge clk) wr_en = 1'b0;
  endtask

  task automatic load_mode(input int lvl);
    int gs;
    gs = 1 << lvl;
    for (int g = 0; g < (64 >> lvl); g++) begin
      pmf_t p;
      int m;
      longint unsigned acc;
      m = 2 + ($urandom % gs);            // range 2 .. gs+1
      make_pmf(m, 1 + $urandom % 32, p);
      acc = 0;
      for (int j = 0; j < gs; j++) begin
        if (j < m - 1) begin acc += p[j]; load_entry(g * gs + j, 32'(acc)); end
        else load_entry(g * gs + j, '1);
      end
    end
  endtask

  // Applies `cycles` cycles of random words and checks each result one
  // cycle later.
  task automatic run_mode(input int lvl, input int cycles);
    logic [31:0] u_prev [64];
    bit prev_run;
    prev_run = 0;
    level = 3'(lvl);
    for (int t = 0; t <= cycles; t++) begin
      @(negedge clk);
      checks++;
      if (sample_valid !== prev_run) begin
        failures++;
        $display("level %0d: sample_valid %b, expected %b", lvl, sample_valid, prev_run);
      end
      if (prev_run) begin
        for (int g = 0; g < 64; g++) begin
          int want;
          want = (g < (64 >> lvl)) ? cdt_ref(f, g << lvl, 1 << lvl, u_prev[g]) : 0;
          checks++;
          if (samples[g] != want) begin
            failures++;
            if (failures < 10) $display("level %0d group %0d: got %0d want %0d", lvl, g, samples[g], want);
          end
        end
      end
      if (t < cycles) begin
        run = ($urandom % 5) != 0;
        for (int i = 0; i < 64; i++) rn[i] = $urandom;
        checks++;
        #1 if (rn_en !== run) failures++;
        for (int i = 0; i < 64; i++) u_prev[i] = rn[i];
        prev_run = run;
      end else begin
        run = 0;
        prev_run = 0;
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) f[i] = '1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // worked example in the 32D mode (groups of two entries, range 3)
    load_entry(0, 32'h2000_0000);            // F = 0.125
    load_entry(1, 32'h8000_0000);            // F = 0.5
    @(negedge clk);
    level = 3'd1; run = 1'b1;
    for (int i = 0; i < 64; i++) rn[i] = 32'h3333_3333;   // U = 0.2
    @(negedge clk) run = 1'b0;
    checks++;
    if (!(sample_valid && samples[0] == 1)) begin
      failures++;
      $display("worked example: got %0d, want 1 (Cloudy)", samples[0]);
    end
    for (int lvl = 0; lvl <= 6; lvl++) begin
      load_mode(lvl);
      run_mode(lvl, 150);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
