// tb_cdt_comparator_array: lt[i] = f[i] < u[i], unsigned, including ties
// and the all-ones padding value.
module tb_cdt_comparator_array;
  logic [63:0][31:0] f, u;
  logic [63:0] lt;
  int unsigned checks = 0, failures = 0;

  cdt_comparator_array #(.N(64), .WIDTH(32)) dut (.f, .u, .lt);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 64; i++) begin
        u[i] = $urandom;
        case ($urandom % 5)
          0: f[i] = u[i];
          1: f[i] = '1;
          2: f[i] = u[i] + 1;
          3: f[i] = u[i] - 1;
          default: f[i] = $urandom;
        endcase
      end
      #1;
      for (int i = 0; i < 64; i++) begin
        longint unsigned a, b;
        a = f[i]; b = u[i];
        checks++;
        if (lt[i] !== (b - a > 0 && b > a)) begin
          failures++;
          if (failures < 10) $display("cmp %0d: f=%h u=%h lt=%b", i, f[i], u[i], lt[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
