// sampler_tb_pkg: stimulus generation and reference models shared by the
// sampler testbenches.
//
//  - make_pmf builds a random PMF of m outcomes as 32-bit fractions that
//    sum to exactly 2^32 (1.0), optionally quantised to `prec` bits.
//  - cdt_ref is a linear CDF search: the first stored entry that is not
//    below the random word, or the group size when none is.
//  - ky_ref is the bit-serial Knuth-Yao walk over a probability matrix
//    (row scan inside each column), the textbook form of the algorithm,
//    including a restart from column 0 after the last column.
package sampler_tb_pkg;

  typedef longint unsigned pmf_t [64];

  // m outcomes (m >= 2) with probability quantum 2^(32-prec).
  function automatic void make_pmf(input int m, input int prec, output pmf_t p);
    longint unsigned cuts [$];
    longint unsigned q, steps;
    q = 64'd1 << (32 - prec);
    steps = 64'd1 << prec;
    for (int i = 0; i < 64; i++) p[i] = 0;
    cuts.push_back(0);
    for (int i = 0; i < m - 1; i++) begin
      longint unsigned c;
      c = (steps > 1) ? (1 + ({$urandom, $urandom} % (steps - 1))) * q : q;
      cuts.push_back(c);
    end
    cuts.push_back(64'd1 << 32);
    cuts.sort();
    for (int i = 0; i < m; i++) p[i] = cuts[i + 1] - cuts[i];
  endfunction

  function automatic int cdt_ref(input logic [31:0] f [64], input int base, input int size,
                                 input logic [31:0] u);
    for (int j = 0; j < size; j++) begin
      if (u <= f[base + j]) return j;
    end
    return size;
  endfunction

  // rbs[t][g] is the random bit of group g in the t-th column step of the
  // batch. Returns the row (relative to the group) and the steps used;
  // row = -1 when the bits run out first.
  function automatic void ky_ref(input pmf_t p, input int base, input int size, input int g,
                                 input logic [31:0] rbs [$], input int k,
                                 output int row, output int steps);
    int d;
    d = 0;
    row = -1;
    steps = 0;
    for (int t = 0; t < rbs.size(); t++) begin
      int col;
      col = t % k;
      if (col == 0) d = 0;
      d = 2 * d + (rbs[t][g] ? 0 : 1);
      for (int r = 0; r < size; r++) begin
        d = d - int'((p[base + r] >> (31 - col)) & 1);
        if (d == -1) begin
          row = r;
          steps = t + 1;
          return;
        end
      end
    end
  endfunction

endpackage
