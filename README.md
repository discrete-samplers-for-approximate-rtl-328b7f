# Reconfigurable discrete samplers for probabilistic inference

Sampling-based inference in Bayesian networks and other probabilistic models
draws random values millions of times. Each draw comes from a discrete
distribution: "given the parents' values, this variable takes value i with
probability p_i". The hardware that turns uniform random bits into such a draw
dominates the cost of an inference accelerator. This RTL provides two samplers
that handle any discrete distribution of up to 64 outcomes at 32-bit
fixed-point precision. Both can be **reconfigured by range**: when the
distributions are small, the same hardware samples many of them at once
instead of wasting most of its width on one.

* **Reconfigurable CDT sampler.** It searches the cumulative distribution
  table (CDT) with 64 comparators working in parallel. Every cycle it draws
  one batch: 64 distributions of range 2, 32 of range 3, and so on down to 1
  distribution of range 65.
* **Reconfigurable Knuth-Yao (KY) sampler.** It walks the distribution's
  binary expansion one bit column per cycle. A draw stops as soon as it
  reaches a leaf, so it uses only the random bits and precision it needs.
  Each batch holds 32 distributions of range 2, 16 of range 4, and so on down
  to 1 distribution of range 64. It needs far less random-number bandwidth
  than the CDT sampler.

`sampler_top` places the two samplers side by side. Each has its own LFSR
random-number bank.

## Modes: the "level"

Both samplers split their 64 rows into aligned groups of 2^l rows, one
distribution per group. The integer l is the mode **level**, a 3-bit input.

| level | groups (distributions) | CDT range up to | KY range up to | KY random bits/cycle |
|------:|-----------------------:|----------------:|---------------:|---------------------:|
| 0 | 64 (64D) | 2  | –  | – |
| 1 | 32 (32D) | 3  | 2  | 32 |
| 2 | 16 (16D) | 5  | 4  | 16 |
| 3 | 8 (8D)   | 9  | 8  | 8 |
| 4 | 4 (4D)   | 17 | 16 | 4 |
| 5 | 2 (2D)   | 33 | 32 | 2 |
| 6 | 1 (1D)   | 65 | 64 | 1 |

A CDT group of 2^l entries covers one more outcome than a KY group. The CDT
leaves out the last CDF value, which is always 1.0.

Mixed ranges need some care. A distribution with fewer outcomes than its
group simply leaves the extra rows empty:

* CDT: fill the extra entries with all ones.
* KY: fill the extra rows with zeros.

Every group of a mode samples in the same batch. To sample one distribution
many times, load copies of it into every group.

## Why one adder tree serves every mode

Both samplers end with the same operation: count the ones in each aligned
group of bits. `recfg_adder_tree` is a binary adder tree over 64 bits that
brings out **every level**. Level l, entry j is the number of ones in bits
`[j*2^l +: 2^l]`. So in the mode of level l, the results are just tree level
l, with no extra logic per mode. The design uses this tree three times:

* as the CDT sampler's thermometer-to-binary encoder;
* as the KY sampler's Hamming-weight tree over a matrix column;
* as the KY sampler's thermometer-to-binary encoder.

## CDT sampler (`recfg_cdt_sampler`)

```
 rn[0..63] --> PRNG mux --> U per comparator --+
                                               v
 CDF register file F[0..63] --------------> 64 x (F[i] < U) --> adder tree --> level mux --> samples
```

* **Register file** (`cdt_regfile`): 64 x 32 bits. Group g stores the CDF
  entries F[0..R-2] of its distribution as 32-bit fractions, where
  F[j] = round-down(2^32 x (p_0 + ... + p_j)). Reset fills the file with all
  ones.
* **PRNG mux** (`cdt_prng_mux`): comparator i receives random word
  `rn[i >> level]`. All comparators of a distribution therefore see the same
  uniform number, and each distribution has its own number.
* **Comparators** (`cdt_comparator_array`): lt[i] = F[i] < U. Within a group
  the ones form a thermometer code.
* **Encoder**: the count of ones in a group is the sample, which is the
  number of CDF entries below U. All-ones padding never counts.

P(sample = 0) is (F[0]+1)/2^32 rather than exactly F[0]/2^32. The difference
comes from the strict comparison and is 2^-32 per outcome.

Timing: one batch per cycle with `run` = 1. `sample_valid` and `samples` are
registered and appear one cycle later. The sampler therefore needs
2^(level-6) cycles per sample. `rn_en` (= `run`) advances the PRNG bank, so
every batch uses fresh words. In the worst case (64 distributions of range 2)
the sampler consumes 64 x 32 = 2048 random bits per cycle.

## KY sampler (`recfg_ky_sampler`)

### The algorithm in hardware form

Write each probability p_r as a 32-bit binary fraction. Stack the
probabilities as rows: the result is a 64 x 32 bit matrix P. Column c holds
the bits of weight 2^-(c+1). Knuth-Yao sampling walks a binary tree whose
depth-c nodes correspond to column c. The distance d is the walk's position,
counted among the internal nodes of the current depth. Each step consumes
one random bit rb:

```
d <- 2*d + !rb - H[c]          H[c] = number of ones in column c
if d < 0: sample = row of the (2*d_old + !rb + 1)-th one in column c
```

The plain form of the algorithm scans the rows one at a time. Here a whole
column is handled per clock: one adder tree computes H[c], one add/subtract
updates d, and a parallel encoder finds the n-th one. Because the memory is
read column by column, the matrix is stored **transposed**: 32 words of 64
bits (`ky_prob_matrix`). Bit r of word c is bit (31-c) of p_r.

### Datapath, one column per clock

1. The **column counter** addresses the matrix (`ky_prob_matrix`).
2. The **Hamming-weight tree** (`recfg_adder_tree`) gives H for every group
   at every level.
3. The **distance-computing tree** (`ky_dc_tree`) holds 63 units
   (`ky_dc_unit`): 32 + 16 + 8 + 4 + 2 + 1, one per distribution of each
   mode. Only the units of the selected level are enabled. Unit g takes
   random bit `rb[g]`. A unit works in two's complement at width level+2,
   drops the carry, and reads the sign from the MSB. When d turns negative,
   the unit raises `hit` and reports n = 2d + !rb + 1, the 1-based index of
   the sampled one. The unit then stops.
4. The **sample encoder** (`ky_sample_encoder`) turns n into a row in three
   steps:
   * `ky_prefix_adder` computes prefix sums that restart at group
     boundaries. It is a Brent-Kung network whose adders that would cross a
     boundary are bypassed for the current level.
   * 64 comparators compute prefix[r] < n of r's group.
   * The adder tree counts those comparator outputs per group. That count is
     the row of the n-th one.
5. The **result buffer** captures a group's row in the cycle it hits.

### Batches

A batch starts at column 0 with every d = 0. It ends in the cycle in which
the last active group hits. In the next cycle:

* `sample_valid` rises;
* `samples` holds every group's row;
* the next batch begins at column 0.

A batch therefore lasts as long as its deepest draw. That depth is between
H(p) and H(p)+2 bits on average for one distribution, where H(p) is the
entropy. With many groups, the batch waits for the slowest group. Groups that
finish early hold their result in the buffer.

Measured on uniform distributions (`tb_uniform_workload`):

* range 64 takes 6 cycles per sample;
* a power-of-two range 2^m always takes exactly m cycles per batch;
* range 3 in the 16-group mode averages about 6.5 cycles per batch, because
  each batch waits for the slowest of its 16 draws.

`run` = 0 pauses the sampler without losing state. Change `level` or the
matrix only when `idle` is high, which means a batch boundary.

**Requirement:** each distribution must sum to exactly 1 (2^32 in fixed
point). If a distribution falls short, a draw can pass the last column. The
sampler then starts that group over at column 0 (rejection) and pulses
`restart`. The distance registers are sized for a shortfall of at most about
one unit in the last place per row. A larger shortfall can overflow d.

## Random numbers (`lfsr_prng`)

Each lane is a 32-bit Galois LFSR with polynomial x^32 + x^22 + x^2 + x + 1.
A lane advances 32 single-bit steps per enabled cycle, so every cycle gives
32 new bits. The CDT sampler uses 64 lanes. The KY sampler uses 1 lane, whose
bit g feeds distribution g. Lanes are seeded from a parameter on reset. An
LFSR is adequate for inference workloads. It is not a cryptographic source,
and neighbouring bits of one lane are correlated over time.

## Interfaces

All ports are plain signals. Packed arrays are indexed by group.

| sampler | load | control | results |
|---|---|---|---|
| CDT | `wr_en`, `wr_addr[5:0]`, `wr_data[31:0]`, one entry per cycle | `level` (0..6), `run` | `sample_valid`, `samples[64][7]` |
| KY  | `wr_en`, `wr_col[4:0]`, `wr_data[63:0]`, one column per cycle | `level` (1..6), `run` | `sample_valid`, `samples[32][6]`, `restart`, `idle` |

In `sampler_top` the ports carry a `cdt_` or `ky_` prefix. `samples[g]` is
meaningful for g < 64 >> level and reads zero above that. Neither sampler
has back-pressure: a consumer must take each batch in the cycle it is valid,
or hold `run` low. Reset is asynchronous and active low.

Assertions check these rules:

* `run` needs a legal level;
* the KY sampler's `level` and matrix change only while `idle` is high;
* the KY sampler only reports a row that holds a one in the current column.

## Where this design makes its own choices

The datapaths follow the published architecture. The following are this
design's own choices:

* the level encoding of the modes;
* the run/valid protocol;
* the one-cycle output register of the CDT sampler;
* batch control and the restart on running out of columns;
* the LFSR polynomial, unrolling and seeding;
* the distance width (level + 2 bits);
* the Brent-Kung form of the prefix adder.

Other points to know:

* **Separate Hamming-weight tree.** The KY Hamming weights come from their
  own adder tree. They are not reused from the prefix adder.
* **Random-bit direction.** A random bit of 0 adds 1 to 2d, as in the
  algorithm's usual hardware form. Under this rule, a worked example that
  draws "Cloudy" from Sunny/Cloudy/Rain = 0.125/0.375/0.5 with bits 0,0,1
  gives Sunny here; bits 0,0,0 give Cloudy. The sampled distribution is the
  same either way.
* **Encoder is not gated.** The encoder evaluates every cycle rather than
  only when a unit hits. Gating it would save power, not change results.
* **Column-wise sampler.** The single-distribution column-wise KY sampler is
  the KY sampler at level 6. It is not a separate module.
* **Not modelled.** Area, power and frequency figures (32 nm library,
  100 MHz) are not reproduced by RTL. The Bayesian-network benchmarks were
  not simulated because their probability tables are not part of this
  design.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The
reference models are written independently of the RTL (`tb/sampler_tb_pkg.sv`):

* a linear CDF search;
* the bit-serial, row-scanning Knuth-Yao walk;
* a bit-serial LFSR.

The testbenches cover the following:

* **`tb_recfg_cdt_sampler`, `tb_recfg_ky_sampler`**: every mode, with
  random distributions at random precisions. The KY testbench also checks
  each batch's length in cycles, the worked examples, and the restart path.
* **`tb_sampler_top`**: runs both samplers at the same time at full size
  (no parameter overrides), reading the top's PRNG outputs. It requires that
  every mode ran, that some KY batch held an early result in its buffer, and
  that KY batches of different lengths occurred.
* **`tb_toy_bn_forward`**: forward-samples a four-node network (Rain,
  WeatherForecast, Sprinkler, WetGrass). All nine conditional distributions
  are loaded at once, spread over the groups of both samplers. The 20000
  sampled marginals must lie within 0.02 of the exact values.
* **`tb_uniform_workload`**: measures cycles per sample on uniform
  distributions of range 2 to 64 and checks them against the expected
  values.

To simulate one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/sampler_pkg.sv tb/sampler_tb_pkg.sv tb/tb_sampler_top.sv \
  --top-module tb_sampler_top -o sim && ./obj_dir/sim
```

Simulations run in well under a second. For a lint pass, use
`verilator --lint-only -Wall -Irtl -y rtl rtl/sampler_pkg.sv rtl/sampler_top.sv`.

## Changing the size

`N` (rows, a power of two) and `K` / `WIDTH` (precision, a power of two for
the KY sampler) are parameters throughout, with defaults of 64 and 32 from
`sampler_pkg`. The number of levels follows from N as log2(N). Output widths
follow automatically: log2(N)+1 bits for CDT samples and log2(N) bits for KY
samples. The level port stays 3 bits wide, so N is limited to 128. In
`sampler_top`, an LFSR lane is at most 32 bits wide. The KY sampler's single
lane gives N/2 bits, so the top as written supports N <= 64 and K <= 32.
Going larger means adding lanes.
