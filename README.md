# Soft information set decoder for binary block codes

This is a pipelined soft-decision decoder for a binary linear (n, k) block code.
It follows the hardware-friendly variant of Dorsch's information set decoding
published in the article "Hardware-Friendly Implementation of Soft Information
Set Decoders". The decoder does not search the 2^k codewords. It trusts the k
most reliable received bits that are linearly independent as columns of the
generator matrix G: they form an *information set*. From those bits it builds
one information word, plus the k words that differ from it in one bit. It
re-encodes these k+1 candidates and returns the one closest to the received soft
levels. The original article reports that this order-1 search comes within
0.1 dB of maximum-likelihood decoding for the (48,24,12) code.

Three things make it cheap in hardware:

* The information set is found by one pass of Gauss-Jordan elimination over
  the columns, taken in reliability order. A column that turns out to depend on
  the columns already chosen is simply skipped. The elimination never restarts,
  and it inspects at most n - dmin + 1 columns.
* The candidates differ from u0 in single bits, so producing them is a row of
  XOR gates.
* Every stage has a fixed or tightly bounded cycle count, so the whole decoder
  is a pipeline with a known worst-case latency.

The default configuration is the extended quadratic residue code (48,24,12)
with 3-bit channel levels. The same RTL is parameterized for any code whose
generator matrix fits in 80 x 40.

## Files

| file | contents |
|---|---|
| `rtl/sid_pkg.sv` | shared types (`gmat_t`), constant functions that build generator matrices |
| `rtl/sid_sorter.sv` | stage 1: hard decisions and reliability order (insertion sorter) |
| `rtl/sid_gauss.sv` | stage 2: reliability-ordered Gauss-Jordan elimination |
| `rtl/sid_candmsg.sv` | stage 3: u0 and the k one-bit-flipped candidate messages |
| `rtl/sid_candcw.sv` | stage 4: re-encoding of the k+1 candidates |
| `rtl/sid_select.sv` | stage 5: soft distance, one candidate per cycle, minimum kept |
| `rtl/sid_decoder.sv` | top level: the five stages chained with valid/ready |
| `tb/sid_ref_pkg.sv` | procedural reference model of every stage |
| `tb/tb_sid_*.sv` | one testbench per stage, plus system-level tests (below) |
| `tb/sid_code_harness.sv` | one decoder for one code, used by `tb_sid_codes` |

## Channel levels, hard decisions and reliability

Each received symbol is a QBITS-bit unsigned level (3 bits by default). Level 0
means "surely 0" and level L = 2^QBITS - 1 means "surely 1". The hard decision r
is the level's MSB. The reliability is the distance of the level from
mid-scale: the low QBITS-1 bits, inverted when the MSB is 0. With 3 bits,
levels 0 and 7 have reliability 3, and levels 3 and 4 have reliability 0. The
soft distance of a codeword to the received word adds, over all bits, L - x for
a code bit 1 and x for a code bit 0. With 3 bits this is the 7 - x / x metric of
the original.

## The pipeline and its cycle budget

```
 in_sym ──► [1 sorter] ──► [2 gauss] ──► [3 candmsg] ──► [4 candcw] ──► [5 select] ──► out_cw
  1/cycle    n cycles      g cycles       1 cycle         1 cycle       k+1 cycles
             r, x, order   Gr, Gr0        U (k+1 msgs)    C (k+1 cws)   winner, distance
```

Each stage holds one word, so up to five words are in flight. Every link is a
valid/ready pair. A stage takes a new word in the same cycle that its previous
result leaves, so no bubbles appear when nothing is stalled.

With the first symbol of a word accepted in cycle 0, the result is valid in
cycle

    latency = n + g + k + 3,     k <= g <= n - dmin + 1

Here g is the number of columns stage 2 inspected, which the top reports on
`out_ncols`. The terms are:

* n: the sorter. The last symbol is inserted in cycle n-1 and the sorted word
  is presented in cycle n.
* g: the elimination. Its first column is eliminated from the constant G in the
  same cycle that the sorted word is accepted, so no load cycle is lost.
* 1 + 1: the candidate message register and the candidate codeword register.
* k+1: one candidate scored per cycle. The winner is registered after the last
  candidate is scored.

At g = k this gives n + 2k + 3. At g = n - dmin + 1 it gives 2n - dmin + k + 4.
Both are the article's minimum and maximum, and for the four codes simulated
the worst case equals its latency column: 19, 36, 56 and 112 cycles for
(7,4,3), (15,7,5), (24,12,8) and (48,24,12).

**Throughput.** The sorter accepts one symbol per cycle, so a new word can enter
every n cycles. Every later stage needs at most n - dmin + 1 cycles (stage 2)
or k + 1 cycles (stage 5), and both are below n. So the steady-state rate is
one word per n cycles, and it does not depend on the noise. The original
article states that throughput is set by stage 2's worst case, n - dmin + 1
cycles (37 for the (48,24,12) code, instead of 48 here). That would need the
symbols of a word to arrive faster than one per cycle, which its own
description of the sorter does not provide. This RTL follows the sorter as
described and accepts the lower rate.

## Stage 1: insertion sorter (`sid_sorter`)

The sorter is a line of n cells. Each cell holds a (reliability, column index)
pair and a valid flag, with valid cells kept at the front in decreasing
reliability. When a symbol arrives, every cell computes `ahead[i]`: the new
entry belongs before it. That is the case when the cell is empty or the new
reliability is strictly greater. The first cell with `ahead` set takes the new
entry, cells behind it take their upper neighbour's entry, and cells in front
keep theirs. All cells update in the same cycle, so the list is sorted when the
last symbol has entered.

Because the comparison is strict, equal reliabilities stay in arrival order.
This makes the column order deterministic.

On the last symbol, the sorted indices, the n levels and their MSBs are copied
to an output register, and the cells are cleared for the next word. `in_ready`
drops only on a word's last symbol, and only while the previous word is still
waiting on the output (an assertion checks this).

## Stage 2: ordered Gauss-Jordan elimination (`sid_gauss`)

This is the core of the decoder. The k x n working matrix starts as G. Each
cycle takes the next column c in reliability order:

1. Candidate pivot rows are the rows not yet used as pivots that have a 1 in
   column c.
2. If there is one, the lowest-numbered candidate p becomes the pivot. Row p is
   XORed into every other row with a 1 in column c, which turns column c into a
   unit vector. Row p is marked used and column c is marked selected.
3. If there is none, column c lies in the span of the columns already selected.
   Nothing changes and the column is skipped. In the article's terms, the
   least reliable member of the tentative set is replaced by the next most
   reliable column.

Elimination stops at the k-th pivot. The result is:

* Gr, the working matrix. It generates the same code, and its selected columns
  are unit vectors.
* The selected-column mask.
* Gr0, which is Gr with unselected columns zeroed.
* g, the number of columns inspected.

**Why g is bounded.** Any n - dmin + 1 columns of G contain an information set.
If they did not, some nonzero message would give a codeword that is zero on all
of them, and that codeword would have weight below dmin. So g is at most
n - dmin + 1. No column among the first heft(G) = dmin(dual) - 1 is ever
skipped; for the self-dual (48,24,12) code that is the first 11 columns.

The datapath per cycle is a k-bit priority encoder and k row-wide XORs. The
same hardware serves the first column, which it reads from the constant G, and
the later ones, which it reads from the register. The sorted order is latched
when the word is accepted, which frees stage 1 after one cycle. The pivot
choice (lowest free row) only sets the order of Gr's rows, and with it the
order of the candidates. The set of rows is fixed by the information set.

## Stages 3 and 4: candidates (`sid_candmsg`, `sid_candcw`)

Row i of Gr0 has a single 1, at the pivot column of row i. So u0 = r x Gr0^T is
simply the hard decisions at the information set, in pivot-row order. The
stage forms it as one AND and a parity per row, without a matrix multiplier.
Candidate 0 is u0, and candidate j (1..k) is u0 with bit j-1 inverted.

Stage 4 forms all k+1 products c_j = u_j x Gr at once: each codeword is the XOR
of the rows of Gr that its message selects. Both stages are purely
combinational, each followed by one pipeline register. Stage 3 carries Gr and
stage 4 carries the levels, for the stages after them.

## Stage 5: selection (`sid_select`)

The stage reads the candidate list in place from stage 4's register. It scores
the candidate selected by its counter j in one cycle, with n small terms summed
by one adder tree, and keeps the running minimum. On the last candidate it
releases the list and registers the winner, its distance and its index. Equal
distances keep the earlier candidate, so u0 wins a tie.

## Generator matrices (`sid_pkg`)

G is the parameter `G` of type `sid_pkg::gmat_t`: 40 rows of 80 bits, where row
i, bits n-1..0, is row i of the k x n matrix and column j is bit j. The rest of
the container is ignored. The package builds matrices with constant functions:

* `qr_generator(p)` builds the extended binary quadratic residue code of
  length p+1, for a prime p of the form 8m-1. Its generator polynomial is
  g(x) = gcd(e(x), x^p + 1), where e(x) is the sum of x^q over the quadratic
  residues q mod p. It has degree (p-1)/2. p = 7 gives the (8,4,4) code,
  p = 23 the extended Golay (24,12,8) code and p = 47 the (48,24,12) default.
* `cyclic_generator(gpoly, n, ext)` builds the code generated by gpoly, with an
  optional overall parity column. It uses the first k shifts of the polynomial,
  then Gauss-Jordan elimination on columns 0..k-1, which is always possible for
  a cyclic code. The result is the systematic form [I | P]. For example:
  * the (7,4,3) Hamming code is `cyclic_generator(qr_poly(7), 7, 0)`;
  * the (15,7,5) BCH code is `cyclic_generator('h1d1, 15, 0)`, with
    g(x) = x^8 + x^7 + x^6 + x^4 + 1.

Because these matrices are systematic, `out_msg`, the first k bits of the
decoded codeword, is the decoded information word. With a non-systematic G,
use `out_cw` instead.

To decode another code, set N, K, DMIN and G. QBITS sets the level width. DMIN
only feeds the assertion that checks g <= n - dmin + 1, and the latency
formulas. G must have rank k; an assertion in `sid_gauss` fires otherwise.

## Top-level interface (`sid_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_ready` | in/out | 1 | symbol handshake; symbols of a word arrive in column order 0..n-1 |
| `in_sym` | in | QBITS | channel level |
| `out_valid`, `out_ready` | out/in | 1 | result handshake |
| `out_cw` | out | N | decoded codeword |
| `out_msg` | out | K | `out_cw[K-1:0]` (information bits for a systematic G) |
| `out_dist` | out | clog2(N(2^QBITS-1)+1) | soft distance of the winner |
| `out_ncols` | out | clog2(N)+1 | columns inspected by stage 2 for this word |
| `out_cand` | out | clog2(K+1) | winning candidate: 0 = u0, j = u0 with bit j-1 flipped |

At the default size the top synthesizes to about 6,200 flip-flop bits. The
largest parts are the 24 x 48 working matrix and the 25 x 48 candidate
register. For comparison, the original FPGA implementation of this code used
6,808 registers.

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it does |
|---|---|
| `tb_sid_sorter` | 300 words at n = 48, a third of them with nearly all-equal reliabilities. Compares the order against a stable sort. Checks n-cycle latency, and that output stalls block input only on a last symbol. |
| `tb_sid_gauss` | 400 orders, half built so that the zeros of a low-weight codeword come first. Compares Gr, Gr0, the mask and g with the model. Also checks independently that selected columns are unit vectors and rows are codewords. Checks g-cycle timing. Reaches the bound g = 37. |
| `tb_sid_candmsg`, `tb_sid_candcw`, `tb_sid_select` | Stage-level checks of u0 and the flips, the GF(2) product, and distances with ties and the k+1-cycle timing, each under backpressure. |
| `tb_sid_decoder` | Runs the default top, with no parameter overrides. 150 back-to-back noisy words check the exact latency n + g + k + 3, its bounds and the n-cycle input spacing. Then 150 words run with input gaps and long output stalls. It counts, and requires, each mechanism: skipped columns, an information set in the first k columns, a flipped candidate winning, corrected channel errors, input stalls, output stalls, overlapping words. |
| `tb_sid_codes` | (7,4,3), (15,7,5), (24,12,8) and (48,24,12) side by side, each with random and constructed worst-case words. Requires the worst-case latency to equal 19 / 36 / 56 / 112 cycles. |
| `tb_sid_awgn` | Runs the default top on a Gaussian channel: BPSK, Eb/N0 of 2 and 4 dB, 3-bit quantization with step 0.5, 4,000 words each, streamed back to back. Checks every word against the model. Prints the cumulative share of words whose information set was found within k, k+1, ... columns. It requires about 34 % within 24 columns, 64.5 % within 25 and over 98.5 % within 30, as in the original study; this run gives 34.6 %, 64.5 % and 99.3 % at 2 dB. It also prints word error rates: 8 % at 2 dB and 0.5 % at 4 dB, against over 93 % for hard decisions. |
| `tb_sid_exhaustive7` | All 2^21 received words of the (7,4,3) code, in about 15 M cycles. Every result matches the model. It also reports that each result has the maximum-likelihood distance. |

The reference model in `tb/sid_ref_pkg.sv` is written independently of the RTL:
selection sort, loop-based elimination, and u0 read directly at the pivot
columns. It uses the same tie rules (stable order, lowest free pivot row, first
minimum), so results are compared bit for bit. The stage-level and
`tb_sid_decoder` tests use a rough noise model, a sum of four uniform
variables. `tb_sid_awgn` uses a proper Gaussian channel. The article's
coding-gain curves against maximum-likelihood decoding are not reproduced:
maximum-likelihood decoding of a (48,24) code needs 2^24 correlations per word.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/sid_pkg.sv tb/sid_ref_pkg.sv rtl/sid_sorter.sv rtl/sid_gauss.sv \
  rtl/sid_candmsg.sv rtl/sid_candcw.sv rtl/sid_select.sv rtl/sid_decoder.sv \
  tb/tb_sid_decoder.sv --top-module tb_sid_decoder
./obj_dir/Vtb_sid_decoder
```

For `tb_sid_codes`, add `tb/sid_code_harness.sv`. For a stage testbench, the
two packages, the stage and its testbench are enough. `-Wno-fatal` is only
needed for width warnings in the testbenches.

## Where this RTL departs from, or goes beyond, the original

* **Throughput**: one word per n cycles, limited by the sorter, not
  n - dmin + 1 cycles (see above).
* **Generator matrix of the (48,24,12) code**: the article uses a specific
  matrix from the literature that is not reproduced there. This RTL builds the
  extended QR code from the quadratic residues mod 47, which has the same
  parameters. The (7,4) example matrix of the original is likewise unknown; the
  tests use the cyclic Hamming code.
* **Codes (66,33,12) and (78,39,14)**: these appear in the original's synthesis
  table. They fit the 80 x 40 container, but their generator matrices are not
  known here, so they are not tested.
* **Own choices where the original is silent**: the valid/ready handshakes, the
  asynchronous reset, the reliability formula, all tie rules (sort order, pivot
  row, equal distances), the candidate flip order, and the `out_ncols` and
  `out_cand` status outputs.
* **Distance**: the algorithm outline speaks of Euclidean distance. The RTL
  uses the quantized-level metric of the hardware description. Both metrics
  are, up to a constant, the sum over the codeword's 1s of L - 2x, so they rank
  candidates identically.
* **Reduced candidate lists**: the original also evaluates dropping the
  candidates that flip the most reliable bits, as a trade of coding gain for
  fewer candidates. This RTL always scores all k+1.

Verilator reports `SYNCASYNCNET` on `rst_n`. It appears because the assertions
use the reset synchronously in `disable iff` while the flip-flops use it
asynchronously. It does not affect the logic.
