// tb_cdt_prng_mux: comparator i must get the word of its distribution,
// rn[i / 2^level], in every mode.
module tb_cdt_prng_mux;
  import sampler_pkg::*;
  logic [2:0] level;
  logic [63:0][31:0] rn, u;
  int unsigned checks = 0, failures = 0;

  cdt_prng_mux #(.N(64), .WIDTH(32)) dut (.level, .rn, .u);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 70; t++) begin
      for (int i = 0; i < 64; i++) rn[i] = $urandom;
      level = 3'(t % 7);
      #1;
      for (int i = 0; i < 64; i++) begin
        int grp_size, grp;
        grp_size = 1 << level;
        grp = i / grp_size;
        checks++;
        if (u[i] !== rn[grp]) begin
          failures++;
          if (failures < 10) $display("level %0d comparator %0d: got %h want %h", level, i, u[i], rn[grp]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
