// ky_dc_unit: distance computing (DC) module of the Knuth-Yao sampler.
//
// Holds the distance d of one distribution: the index, counted from the
// right, of the current internal node of the discrete distribution
// generating (DDG) tree. Each enabled cycle it computes, in W-bit two's
// complement with the carry dropped,
//     d_next = 2*d + !rb - h
// where rb is the random bit of this cycle and h the Hamming weight of the
// distribution's current probability-matrix column. d_next < 0 (its MSB set)
// means a leaf was reached: hit pulses, the unit reports
//     n = 2*d + !rb + 1  (= d_next + h + 1)
// the 1-based position of the one in the column that is the sample, and it
// stops (done) until clear. restart sets d back to zero but keeps done; the
// sampler uses it when a distribution ran out of columns.
//
// Timing: d_next, hit and n are combinational in the cycle of the update;
// d and done are registered. W must cover 2*(range)-1, so W = log2(range)+2.
// The MSB of the stored d is never read: 2d drops it, as the carry of a
// two's-complement update is discarded (d is non-negative while updating).
// The update rule and the sign test follow the design description; done,
// clear and restart are this design's control choices.
module ky_dc_unit #(
  parameter int unsigned W = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          clear,
  input  logic          restart,
  input  logic          rb,
  input  logic [W-1:0]  h,
  output logic [W-1:0]  n,
  output logic          hit,
  output logic          done
);

  logic [W-1:0] d_q;
  logic [W-1:0] d_next;
  logic [W-1:0] two_d_rb;

  assign two_d_rb = {d_q[W-2:0], ~rb};
  assign d_next   = two_d_rb - h;
  assign n        = two_d_rb + W'(1);
  assign hit      = en && !done && d_next[W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q  <= '0;
      done <= 1'b0;
    end else if (clear) begin
      d_q  <= '0;
      done <= 1'b0;
    end else if (restart) begin
      d_q  <= '0;
    end else if (en && !done) begin
      d_q  <= d_next;
      done <= d_next[W-1];
    end
  end

endmodule
