// tb_ky_dc_unit: the distance update against an integer model.
//
// Random en/rb/h/clear/restart are applied to a W = 5 unit. The model keeps
// d as an integer wrapped to W bits and checks n, hit and done each cycle.
module tb_ky_dc_unit;
  localparam int unsigned W = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 0, clear = 0, restart = 0, rb = 0;
  logic [W-1:0] h = '0, n;
  logic hit, done;
  int unsigned checks = 0, failures = 0;
  int unsigned hits = 0;

  ky_dc_unit #(.W(W)) dut (.clk, .rst_n, .en, .clear, .restart, .rb, .h, .n, .hit, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int d_m;
  bit done_m;

  initial begin
    d_m = 0; done_m = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      int two_d, dn, n_m;
      bit hit_m;
      @(negedge clk);
      en      = ($urandom % 8) != 0;
      clear   = ($urandom % 12) == 0;
      restart = !clear && ($urandom % 16) == 0;
      rb      = 1'($urandom);
      h       = W'($urandom % 6);
      #1;
      two_d = (2 * d_m + (rb ? 0 : 1)) % (1 << W);
      dn    = (two_d - int'(h)) & ((1 << W) - 1);
      n_m   = (two_d + 1) & ((1 << W) - 1);
      hit_m = en && !done_m && dn[W-1];
      checks += 2;
      if (hit !== hit_m) begin failures++; if (failures < 10) $display("t=%0d hit %b want %b", t, hit, hit_m); end
      if (n !== W'(n_m)) begin failures++; if (failures < 10) $display("t=%0d n %0d want %0d", t, n, n_m); end
      if (hit_m) hits++;
      @(posedge clk);
      if (clear) begin d_m = 0; done_m = 0; end
      else if (restart) d_m = 0;
      else if (en && !done_m) begin d_m = dn; done_m = dn[W-1]; end
      #1;
      checks++;
      if (done !== done_m) begin failures++; if (failures < 10) $display("t=%0d done %b want %b", t, done, done_m); end
    end
    checks++;
    if (hits < 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
