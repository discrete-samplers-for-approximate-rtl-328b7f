// tb_ky_prob_matrix: column writes and column reads against a model.
module tb_ky_prob_matrix;
  logic clk = 1'b0, wr_en = 1'b0;
  logic [4:0] wr_col = '0, rd_col = '0;
  logic [63:0] wr_data = '0, rd_data;
  logic [63:0] model [32];
  int unsigned checks = 0, failures = 0;

  ky_prob_matrix #(.ROWS(64), .COLS(32)) dut (.clk, .wr_en, .wr_col, .wr_data, .rd_col, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every column first
    for (int c = 0; c < 32; c++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_col = 5'(c); wr_data = {$urandom, $urandom};
      model[c] = wr_data;
    end
    @(negedge clk) wr_en = 1'b0;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      rd_col = 5'($urandom);
      #1;
      checks++;
      if (rd_data !== model[rd_col]) begin
        failures++;
        if (failures < 10) $display("column %0d: got %h want %h", rd_col, rd_data, model[rd_col]);
      end
      wr_en = ($urandom % 2) == 0; wr_col = 5'($urandom); wr_data = {$urandom, $urandom};
      @(posedge clk);
      if (wr_en) model[wr_col] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
