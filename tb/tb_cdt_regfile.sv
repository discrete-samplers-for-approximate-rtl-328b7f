// tb_cdt_regfile: reset to all ones, then random writes against a model.
module tb_cdt_regfile;
  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0;
  logic [5:0] wr_addr = '0;
  logic [31:0] wr_data = '0;
  logic [63:0][31:0] f;
  logic [31:0] model [64];
  int unsigned checks = 0, failures = 0;

  cdt_regfile #(.DEPTH(64), .WIDTH(32)) dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .f);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < 64; i++) begin
      checks++;
      if (f[i] !== model[i]) begin
        failures++;
        if (failures < 10) $display("entry %0d: got %h want %h", i, f[i], model[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) model[i] = '1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    compare();
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      wr_en   = ($urandom % 3) != 0;
      wr_addr = 6'($urandom);
      wr_data = $urandom;
      @(posedge clk);
      if (wr_en) model[wr_addr] = wr_data;
      #1 compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
