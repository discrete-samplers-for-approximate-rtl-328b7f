// tb_ky_dc_tree: the 63 distance units of all levels against a model.
//
// Each cycle a random level is selected (it is kept for stretches of
// cycles) and random Hamming weights and random bits are applied. The model
// holds d and done for every unit of every level, updates only the
// selected level, and checks n, hit, done and active per group.
module tb_ky_dc_tree;
  import sampler_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] level = 3'd1;
  logic en = 0, clear = 0, restart = 0;
  logic [31:0] rb = '0;
  logic [6:0][63:0][6:0] h_tree = '0;
  logic [31:0][7:0] n;
  logic [31:0] hit, done, active;
  int unsigned checks = 0, failures = 0, hits = 0;

  ky_dc_tree #(.N(64)) dut (.clk, .rst_n, .level, .en, .clear, .restart, .rb, .h_tree,
                            .n, .hit, .done, .active);

  always #5 clk = ~clk;

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int d_m [7][32];
  bit done_m [7][32];

  initial begin
    for (int l = 0; l < 7; l++) for (int g = 0; g < 32; g++) begin d_m[l][g] = 0; done_m[l][g] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      int w, mask;
      @(negedge clk);
      if (t % 40 == 0) level = 3'(1 + $urandom % 6);
      en      = ($urandom % 6) != 0;
      clear   = ($urandom % 10) == 0;
      restart = !clear && ($urandom % 25) == 0;
      rb      = $urandom;
      h_tree  = '0;
      for (int g = 0; g < (64 >> level); g++) h_tree[level][g] = 7'($urandom % ((1 << level) + 1));
      #1;
      w = level + 2;
      mask = (1 << w) - 1;
      for (int g = 0; g < 32; g++) begin
        bit act, hit_m;
        int two_d, dn;
        act = g < (64 >> level);
        checks++;
        if (active[g] !== act) failures++;
        if (!act) continue;
        two_d = (2 * d_m[level][g] + (rb[g] ? 0 : 1)) & mask;
        dn    = (two_d - int'(h_tree[level][g])) & mask;
        hit_m = en && !done_m[level][g] && ((dn >> (w - 1)) & 1);
        checks += 3;
        if (hit[g] !== hit_m) begin failures++; if (failures < 10) $display("t=%0d l=%0d g=%0d hit %b want %b", t, level, g, hit[g], hit_m); end
        if (n[g] != ((two_d + 1) & mask)) begin failures++; if (failures < 10) $display("t=%0d l=%0d g=%0d n %0d want %0d", t, level, g, n[g], (two_d + 1) & mask); end
        if (done[g] !== done_m[level][g]) begin failures++; if (failures < 10) $display("t=%0d l=%0d g=%0d done %b", t, level, g, done[g]); end
        if (hit_m) hits++;
      end
      @(posedge clk);
      for (int l = 1; l <= 6; l++) for (int g = 0; g < (64 >> l); g++) begin
        int ww, mm, td, dn;
        ww = l + 2; mm = (1 << ww) - 1;
        if (clear) begin d_m[l][g] = 0; done_m[l][g] = 0; end
        else if (restart) d_m[l][g] = 0;
        else if (en && l == level && !done_m[l][g]) begin
          td = (2 * d_m[l][g] + (rb[g] ? 0 : 1)) & mm;
          dn = (td - int'(h_tree[l][g])) & mm;
          d_m[l][g] = dn;
          done_m[l][g] = (dn >> (ww - 1)) & 1;
        end
      end
    end
    checks++;
    if (hits < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
