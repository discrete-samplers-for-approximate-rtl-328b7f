// tb_lfsr_prng: checks the LFSR bank against a bit-serial reference.
//
// A three-lane bank is compared every cycle with a software Galois LFSR
// (x^32 + x^22 + x^2 + x + 1, 32 single steps per enabled cycle), seeded
// the way the bank seeds its lanes. Cycles with en = 0 must hold the state.
module tb_lfsr_prng;
  localparam int unsigned LANES = 3;
  localparam logic [31:0] SEED  = 32'hDEAD_BEEF;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic [LANES-1:0][31:0] rn;
  int unsigned checks = 0, failures = 0;

  lfsr_prng #(.LANES(LANES), .WIDTH(32), .SEED(SEED)) dut (.clk, .rst_n, .en, .rn);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] model [LANES];

  function automatic logic [31:0] step1(input logic [31:0] s);
    logic fb;
    fb = s[0];
    s = {1'b0, s[31:1]};
    if (fb) begin
      s[31] ^= 1'b1; s[21] ^= 1'b1; s[1] ^= 1'b1; s[0] ^= 1'b1;
    end
    return s;
  endfunction

  initial begin
    for (int i = 0; i < LANES; i++) begin
      model[i] = SEED ^ (32'h9E37_79B9 * (i + 1)) ^ (32'h85EB_CA6B * i);
      if (model[i] == 0) model[i] = 1;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < LANES; i++) begin
        checks++;
        if (rn[i] !== model[i]) begin
          failures++;
          if (failures < 10) $display("cycle %0d lane %0d: got %h want %h", cyc, i, rn[i], model[i]);
        end
      end
      en = ($urandom % 4) != 0;
      if (en) for (int i = 0; i < LANES; i++) for (int k = 0; k < 32; k++) model[i] = step1(model[i]);
    end
    // lanes differ from one another
    checks++;
    if (rn[0] == rn[1] || rn[1] == rn[2]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
