// tb_toy_bn_forward: forward sampling of a four-node Bayesian network on
// the full-size top.
//
// Network: Rain -> WeatherForecast -> Sprinkler, and (Rain, Sprinkler) ->
// WetGrass, with the conditional tables below (probabilities rounded to
// 32-bit fractions, the last outcome taking the remainder so each table
// row sums to exactly one).
//
// All conditional distributions are loaded at once, several copies each:
//   CDT sampler, 64D mode (range 2): groups 0-7 P(R), 8-31 P(S|W) for the
//     three forecasts, 32-63 P(WG|R,S) for the four parent combinations;
//   KY sampler, 16D mode (range up to 4): groups 0-7 P(W|R=T), 8-15
//     P(W|R=F).
// Both samplers run side by side and their samples fill one pool per
// conditional distribution. The testbench then draws NS forward samples in
// topological order, taking each node's value from the pool selected by its
// parents, and compares the marginals P(R=T), P(W=.), P(S=T), P(WG=T) with
// the exact values computed by enumeration (tolerance 0.02, about six
// standard deviations at NS = 20000).
module tb_toy_bn_forward;
  import sampler_pkg::*;

  localparam int NS = 20000;

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
  logic [2:0] ky_level = 3'd2;
  logic ky_run = 1'b0;
  logic ky_sample_valid, ky_restart, ky_idle;
  logic [31:0][5:0] ky_samples;
  int unsigned checks = 0, failures = 0;

  sampler_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Conditional tables. Outcome 0 is True / Sunny.
  real p_r = 0.9;                                         // P(R=T)
  real p_w [2][3] = '{'{0.125, 0.375, 0.5}, '{0.5, 0.4, 0.1}};   // P(W|R=T), P(W|R=F)
  real p_s [3] = '{0.1, 0.5, 0.8};                       // P(S=T|W)
  real p_wg [4] = '{0.9, 0.5, 0.7, 0.0};                 // P(WG=T|R,S): TT, TF, FT, FF

  function automatic longint unsigned fx(input real p);
    return longint'(p * 4294967296.0 + 0.5);
  endfunction

  // pools: 0 R, 1-3 S|W, 4-7 WG|R,S, 8-9 W|R
  int pool [10][$];

  task automatic load_cdt();
    for (int g = 0; g < 64; g++) begin
      real p;
      if (g < 8) p = p_r;
      else if (g < 32) p = p_s[(g - 8) / 8];
      else p = p_wg[(g - 32) / 8];
      @(negedge clk);
      cdt_wr_en = 1'b1; cdt_wr_addr = 6'(g); cdt_wr_data = 32'(fx(p));
    end
    @(negedge clk) cdt_wr_en = 1'b0;
  endtask

  task automatic load_ky();
    longint unsigned p [64];
    for (int r = 0; r < 64; r++) p[r] = 0;
    for (int g = 0; g < 16; g++) begin
      int cond;
      cond = g / 8;
      p[4 * g]     = fx(p_w[cond][0]);
      p[4 * g + 1] = fx(p_w[cond][1]);
      p[4 * g + 2] = (64'd1 << 32) - p[4 * g] - p[4 * g + 1];
    end
    for (int c = 0; c < 32; c++) begin
      @(negedge clk);
      ky_wr_en = 1'b1; ky_wr_col = 5'(c);
      for (int r = 0; r < 64; r++) ky_wr_data[r] = p[r][31 - c];
    end
    @(negedge clk) ky_wr_en = 1'b0;
  endtask

  function automatic int take(input int k);
    return pool[k].pop_front();
  endfunction

  initial begin
    int n_r, n_s, n_wg, n_w [3];
    real e_r, e_w [3], e_s, e_wg;
    real prs [2][2];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    load_cdt();
    load_ky();
    cdt_level = 3'd0;
    ky_level  = 3'd2;
    // fill the pools; both samplers run in the same cycles
    while (pool[0].size() < NS || pool[8].size() < NS || pool[9].size() < NS) begin
      @(negedge clk);
      if (cdt_sample_valid) begin
        for (int g = 0; g < 64; g++) begin
          int k;
          k = (g < 8) ? 0 : (g < 32) ? 1 + (g - 8) / 8 : 4 + (g - 32) / 8;
          pool[k].push_back(int'(cdt_samples[g]));
        end
      end
      if (ky_sample_valid) begin
        for (int g = 0; g < 16; g++) begin
          checks++;
          if (ky_samples[g] > 2) failures++;
          pool[8 + g / 8].push_back(int'(ky_samples[g]));
        end
      end
      cdt_run = pool[0].size() < NS + 64;
      ky_run  = pool[8].size() < NS || pool[9].size() < NS;
    end
    cdt_run = 1'b0; ky_run = 1'b0;

    // forward sampling
    n_r = 0; n_s = 0; n_wg = 0; n_w = '{0, 0, 0};
    for (int i = 0; i < NS; i++) begin
      int r, w, s, wg;
      r  = take(0);                    // 0 = True
      w  = take(8 + r);
      s  = take(1 + w);
      wg = take(4 + 2 * r + s);
      if (r == 0) n_r++;
      n_w[w]++;
      if (s == 0) n_s++;
      if (wg == 0) n_wg++;
    end

    // exact marginals by enumeration
    e_r = p_r;
    e_s = 0; e_wg = 0;
    for (int w = 0; w < 3; w++) e_w[w] = p_r * p_w[0][w] + (1.0 - p_r) * p_w[1][w];
    for (int r = 0; r < 2; r++) begin
      real pr;
      pr = (r == 0) ? p_r : 1.0 - p_r;
      prs[r][0] = 0;
      for (int w = 0; w < 3; w++) prs[r][0] += pr * p_w[r][w] * p_s[w];
      prs[r][1] = pr - prs[r][0];
      e_s += prs[r][0];
      for (int s = 0; s < 2; s++) e_wg += prs[r][s] * p_wg[2 * r + s];
    end

    begin
      real got [6], want [6];
      string name [6] = '{"P(R=T)", "P(W=Sunny)", "P(W=Cloudy)", "P(W=Rain)", "P(S=T)", "P(WG=T)"};
      got  = '{real'(n_r) / NS, real'(n_w[0]) / NS, real'(n_w[1]) / NS, real'(n_w[2]) / NS,
               real'(n_s) / NS, real'(n_wg) / NS};
      want = '{e_r, e_w[0], e_w[1], e_w[2], e_s, e_wg};
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (got[i] - want[i] > 0.02 || want[i] - got[i] > 0.02) failures++;
        $display("%-12s sampled %f exact %f", name[i], got[i], want[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
