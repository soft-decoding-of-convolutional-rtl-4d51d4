# Iterative soft decoder for convolutional product codes

A convolutional product code protects a square block of data twice. The N x N
data matrix is first encoded row by row with a rate-1/2 recursive systematic
convolutional (RSC) code, and the resulting N x 2N matrix is then encoded
column by column with the same code. That gives a 2N x 2N codeword with an
overall rate of 1/4 (no trellis termination). The decoder works like a turbo
decoder. Soft-in/soft-out log-MAP decoders first decode all columns in
parallel, then all rows in parallel, and each pass hands its extrinsic
information to the next one as a priori knowledge. Every extra iteration
removes more errors.

This RTL implements the complete decoder, which is the main block:
- a received-data RAM;
- 2N column and N row log-MAP decoders working in lock step;
- the extrinsic-information loop.

A small hardware product encoder sits next to it. It produces codewords for
test and demonstration. The default size is N = 5 (25 data bits in a 10 x 10
codeword) with 14-bit soft values. At 150 MHz the decoder needs 197 clock
edges for two iterations, counting the start edge (19.0 Mbit/s). A single MAP decoder block needs
3N+8 = 23 cycles (32.6 Mbit/s).

## The constituent code

The code is the (1, 5/7) RSC code:
- feedback polynomial 1 + D + D²;
- feed-forward polynomial 1 + D²;
- the data bit itself is sent as the systematic output.

The state is the register pair s1 s2, numbered 2·s1 + s2. With input u:

    a      = u ^ s1 ^ s2          (feedback node)
    parity = a ^ s2
    next   = (s1, s2) <- (a, s1)

For example, the data block 10101 encodes to 11 01 10 01 11. `cpc_pkg` holds
`next_state()` and `parity_bit()`, and every module derives its trellis
connections from these two functions.

## Number format

Every soft quantity is a signed W-bit integer that counts tenths (the real
value times 10). This covers channel samples, branch metrics, state metrics
and LLRs. With W = 14 the range is clipped to ±8000 (±800.0), and −8000 also
stands for log 0.

Intermediate sums are computed two bits wider than W and clipped to ±8000
when they are stored. The channel factor K = 1/σ² is an unsigned 16-bit input
with 10 fractional bits (5.0 = 5120). K·y is rounded to the nearest tenth.

The log-MAP operation is

    max*(a, b) = max(a, b) + ln(1 + e^-|a-b|)

The correction term comes from an 8-entry table indexed by |a − b| in tenths.
Entry i is round(10·ln(1 + e^(−i/10))) = 7 6 6 6 5 5 4 4, and the term is 0
for |a − b| ≥ 0.8. Each `max2` is one registered stage. A `max4` is a tree of
three `max2` and takes two cycles.

## One MAP decoder (`map_decoder`)

A block is N pairs (y_k, yp_k) plus an a priori LLR per data bit. The decoder
runs a fixed schedule of 3N + 8 clock edges, counted from the start edge
inclusive:

| phase | edges | what happens |
|---|---|---|
| branch metrics | 3 | N `bm_unit`s in parallel: multiply K·y and K·yp, round, then the 8 sums |
| α/β recursion | 3(N−1) | α_1..α_{N−1} and β_{N−1}..β_1 at the same time, 3 edges per step |
| LL | 3 | N `ll_unit`s compute LL(k) for every data bit at once |
| LLp | 3 | the same units compute LL of every parity bit |
| decisions | 2 | DecDat = LL > 0, then DecDatP = LLp > 0 |

Branch metric from state m with input u (BPSK: bit 1 → +1, bit 0 → −1):

    BM[m][u] = K·(y·x_d + yp·x_p) + (u ? +apr/2 : −apr/2)

The eight metrics of a step differ only in sign, so each `bm_unit` needs just
two multipliers.

Recursion step (`metric_recursion`):
- 8 adders feed 4 `max2`s, which takes one edge.
- A `max4` then forms the normaliser nonterm = max*(all four), which takes two
  edges.
- The normalised metrics are raw − nonterm. This subtraction is
  combinational at the output.

α and β use separate instances so that both run at the same time. α_0 starts
at (0, −∞, −∞, −∞). β_N starts at the same vector when the block is
terminated (`TERMINATED = 1`) and at all zeros otherwise.

**The three-edge step is the subtle part.** Each step's result is available
on the subtractor outputs during the step's third cycle. The next step's
first edge does two things at once:
- it writes that result into the α/β storage;
- it feeds the same value straight into the recursion's adders (`first_edge`
  in the RTL).

Storing the result therefore costs no cycle. The last step hands its metrics
to the LL units in the same way: on the first LL edge, α_{N−1} and β_1 are
taken from the subtractors rather than from storage. Without this forwarding
the schedule would be N−1 cycles longer than 3N+8.

LL (`ll_unit`): every trellis branch gets the path metric
α_{k−1}(m′) + BM_k[m′][u] + β_k(m). The branches are split into the four with
bit value 1 and the four with bit value 0. Each group of four goes through a
`max4`, and the unit computes LL = sum1 − sum0. The split uses u for the data
bit and the branch's parity bit for the parity LLR. The same adders and
`max4`s compute both.

Interface: pulse `start` with `y`, `apr` and `k` valid. Those inputs are
sampled only on that edge. `done` pulses when `ll`, `llp`, `dec_dat` and
`dec_par` are valid. They then hold until the next start. An assertion flags
a start while busy.

## The product decoder (`conv_product_decoder`)

The received matrix is 2N x 2N, written to the RAM row-major at address
r·2N + c. Row r of the row code reads d1 p1 d2 p2 … along the row. Column c
of the column code reads d1 p1 d2 p2 … downward. Even rows and columns
therefore hold data positions, and odd ones hold parity.

Each iteration runs the loop below:

    y_c (2N x 2N)  --columns-->  2N column decoders, a priori p (N x 2N)
                                 LL_col (N x 2N)
    y_r = LL_col - p             (extrinsic part, N x 2N)
    y_r  --rows-->  N row decoders, a priori 0, K = K_ROW
                                 o_r = (LL, LLp) of every row position (N x 2N)
    p   = o_r - y_r              (new a priori for the columns)

The row decoders receive LLRs rather than channel samples. A fixed factor
`K_ROW = 512` (0.5) turns their branch metrics into the same
"K·y = half an LLR" form that the column decoders use. p starts at zero.
Both subtractions are clipped to ±SAT. All decoders of the product decoder
start β from all-zero metrics, because the product code is not terminated.
`dec_data` holds the row decoders' data decisions.

Timing: after `start` the decoder does the following:
1. it reads the 4N² words from the RAM into the y_c registers, one per cycle;
2. each iteration then takes 3N+8 cycles for the column pass, plus one cycle
   to form y_r;
3. it takes another 3N+8 cycles for the row pass, plus one cycle to form p.

The total is 6N + 18 cycles per iteration. `done` comes
1 + 4N² + m(6N+18) edges after the start edge, where m is the iteration count.
The extra edge at the start issues the first RAM read. `iter_done` pulses at
the end of every iteration, and `iters = 0` counts as one iteration. Host
writes to the RAM are accepted only while the decoder is idle.

## Encoder (`rsc_encoder`, `product_encoder`)

`rsc_encoder` is the bit-serial circuit of the code above. `product_encoder`
works in two passes:
1. N row encoders run for N cycles and build the interleaved N x 2N rows;
2. 2N column encoders run for N cycles and build the 2N x 2N codeword.

`done` comes 2N + 1 edges after the start edge.

## Top (`cpc_top`)

The top places the encoder and the decoder side by side, each with its own
ports, and both share only clock and reset. Clock and reset are plain ports.
The reset is asynchronous and active high throughout.

| port | dir | width | meaning |
|---|---|---|---|
| enc_start, enc_data | in | 1, N x N | start encoding this data matrix |
| enc_busy, enc_done, enc_code | out | 1, 1, 2N x 2N | encoder status and codeword |
| ram_we, ram_addr, ram_din | in | 1, AW, W | load received samples (tenths) |
| dec_start, dec_iters, dec_k | in | 1, 8, 16 | start, iteration count, K |
| dec_busy, dec_iter_done, dec_done | out | 1 each | decoder status |
| dec_o_r, dec_data | out | N x 2N x W, N x N | row-decoder LLRs and data decisions |

Size at the defaults: about 36k flip-flop bits. Most of them are the fifteen
MAP decoders' metric registers. The logic is dominated by the 150
multipliers of the branch-metric units: 2 per unit, N units per decoder and
15 decoders.

## Where this design departs from, or adds to, the original

- The source design loads the received data into RAM from a host and has no
  encoder in hardware. The encoder here is an addition for testing.
- The "Single-Port Block Memory" vendor core is replaced by an inferred array
  with one-cycle read latency.
- Branch metrics use 2 multipliers per trellis step, not 2 per metric. The
  results are the same.
- The parity LLR groups the eight trellis branches by their parity bit,
  taken directly from the code trellis (`parity_bit()`).
- The a priori term is ±apr/2, so the 0 and 1 terms are each other's
  negatives. This is the form the original's register count relies on.
- o_r is N x 2N (LL and LLp of every row position), and the column decoders
  take p as a priori input, as in the original block diagram.
- These points are this design's own choices:
  - the K format;
  - K_ROW;
  - the matrix layout;
  - the start/busy/done handshake;
  - the iteration-count port;
  - the reset polarity;
  - the extra start edge.
- Not built:
  - the FPGA platform itself (clock source, serial transceivers, processor);
  - the 9-bit and 4-bit number formats of the original error-rate study,
    which change the scaling of the values and the correction table (the
    11-bit format is simply `W = 11`, `SAT = 800`);
  - trellis termination inside the product code;
  - the double-buffered input suggested as a possible future improvement.

## How far it has been checked

`tb/cpc_ref_pkg.sv` is an integer reference model written separately from
the RTL. It covers max*, the MAP decoder, the product decoder and the
encoders. Each block's testbench compares the block with this model bit for
bit on random and corner-case inputs (saturation, −∞ metrics). Where a cycle
count is defined, the testbench checks it too.

- The worked single-decoder example (data 10101, K = 5) decodes correctly.
  Its LLRs are 46.0, −46.0, 46.0, −53.0, 53.0, against 45.60, −45.60,
  45.60, −52.36, 52.36 in floating point. The difference comes from the 0.1
  quantisation and the correction table.
- The published noisy 10 x 10 example leaves one data error after the first
  iteration and none after the second, as reported for the original
  hardware.
- `tb_cpc_top` runs the whole codec at default parameters. It covers
  encoding, loading, up to 4 iterations at low SNR and saturated inputs. It
  counts each mechanism and fails if one never occurs: load, column pass, row
  pass, p refresh, an error corrected by a later iteration, LLR saturation,
  and iters = 0.

- `tb_map_ber` sends 10000 noisy blocks per point through one MAP decoder
  at Eb/N0 = 1 to 6 dB. Each block holds 3 data bits and 2 tail bits. In a
  typical run, log10(BER) is −1.87, −2.22, −2.86 and −3.38 at 1 to 4 dB, with no
  errors at 5 and 6 dB. A second decoder with 11-bit words (`W = 11`,
  `SAT = 800`) decodes the same samples. In these runs its decisions match
  the 14-bit decoder's. The testbench checks both decoders bit for bit
  against the reference model, and checks the coding gain over raw hard
  decisions.
- `tb_cpc_ber` runs the full codec with 12 iterations at the same Eb/N0
  points, with K = 0.5·10^(Eb/N0/10) for the rate-1/4 code. A typical run
  gives log10(BER) from −1.2 at 1 dB to about −3.6 at 6 dB. Iterating clearly
  helps: at 3 dB, 138 errors after one iteration drop to 69 after twelve.
  The original study used a larger 20 x 20 code and reports lower error
  rates; the testbench prints them for comparison.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops through
a watchdog if the design hangs.

## Simulating

Each testbench is a top module with no ports. With Verilator 5:

    verilator --binary --timing --top-module tb_cpc_top -Mdir obj \
        rtl/cpc_pkg.sv tb/cpc_ref_pkg.sv -y rtl +libext+.sv tb/tb_cpc_top.sv
    ./obj/Vtb_cpc_top

Replace `tb_cpc_top` with any other `tb_<block>`. Block testbenches that do
not use the reference model still compile with `tb/cpc_ref_pkg.sv` on the
command line. The full-size end-to-end run takes well under a second.

## Changing it

- `N` (on `cpc_top`, `conv_product_decoder`, `map_decoder`): the block
  length. The RAM depth (4N²) and address width follow. Logic grows with N²
  in the product decoder.
- `W` and `SAT`: word length and clip level. SAT must fit in W bits. The
  correction table assumes one LSB = 0.1.
- `K_ROW`: the row decoders' scaling of incoming LLRs.
- `TERMINATED` (`map_decoder` only): whether β starts from the known state 0.
