// lfsr_prng: bank of LANES independent 32-bit Galois LFSRs.
//
// Each lane is a maximal-length Galois LFSR with the feedback polynomial
// x^32 + x^22 + x^2 + x + 1 (right-shifting form, toggle mask 32'h8020_0003).
// A lane is advanced WIDTH single-bit steps per enabled clock, unrolled in
// combinational logic, so every cycle delivers WIDTH bits the lane has not
// shown before. Lane i is seeded with SEED scrambled by the lane index (and
// forced non-zero) on reset.
//
// Interface: rn[i] is the current state of lane i (registered output, valid
// from the first cycle after reset); it changes on each clock with en = 1.
//
// The samplers are fed by LFSR PRNGs; the polynomial, the unrolling, the
// seeding and the per-lane width are this design's own choices.
module lfsr_prng #(
  parameter int unsigned LANES = 1,
  parameter int unsigned WIDTH = 32,
  parameter logic [31:0] SEED  = 32'h1234_5678
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  output logic [LANES-1:0][WIDTH-1:0]  rn
);

  localparam logic [31:0] MASK = 32'h8020_0003;

  function automatic logic [31:0] lane_seed(input int unsigned idx);
    logic [31:0] s;
    s = SEED ^ (32'h9E37_79B9 * (idx + 1)) ^ (32'h85EB_CA6B * idx);
    if (s == '0) s = 32'h0000_0001;
    return s;
  endfunction

  function automatic logic [31:0] advance(input logic [31:0] s_in);
    logic [31:0] s;
    s = s_in;
    for (int unsigned k = 0; k < WIDTH; k++) begin
      if (s[0]) s = (s >> 1) ^ MASK;
      else      s = s >> 1;
    end
    return s;
  endfunction

  logic [LANES-1:0][31:0] state_q;

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  state_q[i] <= lane_seed(i);
      else if (en) state_q[i] <= advance(state_q[i]);
    end
    assign rn[i] = state_q[i][WIDTH-1:0];
  end

  initial begin
    assert (WIDTH >= 1 && WIDTH <= 32) else $error("lfsr_prng: WIDTH must be 1..32");
  end

endmodule
