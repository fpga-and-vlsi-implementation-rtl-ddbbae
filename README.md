# Information-set soft-decision decoder for short block codes

Maximum-likelihood decoding of an (n, k) binary block code compares the received
word with all 2^k codewords. An information-set decoder does far less work. It
trusts the k received symbols it is most sure of, builds the codeword that agrees
with them, and tries k more codewords in which one of those k bits is flipped.
The best of these k + 1 candidates, measured by soft distance to the received
samples, is the decoded word. Performance stays close to maximum likelihood while
only k + 1 candidates are compared.

This repository holds synthesizable SystemVerilog for such a decoder. By default
it decodes the binary C(7,4) code with generator matrix

    1000110
    0100011
    0010111
    0001101

(codeword position 0 on the left). The received samples are 3-bit quantized BPSK
values: 0 is a confident "0", 7 a confident "1", and 3 and 4 are the least
reliable.

## The algorithm on one word

Take the received word c* = [6,1,5,3,0,0,7].

1. **Hard decision.** A symbol of 4 or more is a 1: r = 1010001.
2. **Reliability.** Each symbol gets a level from 0 to 3, its distance from the
   mid-scale: 0 and 7 give 3, 1 and 6 give 2, 2 and 5 give 1, 3 and 4 give 0.
3. **Sort.** The positions are ordered by decreasing level. Here that gives
   s = [6,5,4,1,0,2,3]. Between equal levels the later position goes first.
4. **Information set (IS).** Take the first k entries of s. The k columns of G
   at those positions form the k x k matrix G_partial. If G_partial is singular,
   those positions cannot carry a codeword freely, so another set is chosen
   (see below). Here IS = (6,5,4,1).
5. **G_new = G_partial^-1 x G.** It generates the same code, and row j is the
   codeword with a 1 at IS position j and 0 at the other IS positions.
6. **Candidates.** r_partial[j] = r[IS_j] is the hard decision on the set. The
   candidates are c_0 = r_partial x G_new, and c_i = (r_partial with bit i-1
   flipped) x G_new for i = 1..k.
7. **Selection.** The soft distance of a candidate c is the sum over i of
   |c*_i - 7 c_i|. The smallest distance wins; on a tie the earlier candidate
   wins. Here the winner is c_0 = 1010001, at distance 7.

## Architecture

The decoder (`isd_decoder`) is a chain of four blocks. One word is in flight at
a time, and each block's one-cycle done pulse starts the next block.

| Block | Module | Job | Cycles (C(7,4)) |
|---|---|---|---|
| I | `isd_block1` | hard decision, reliability, insertion sort | N = 7 |
| II | `isd_block2` | IS choice and check, inversion, G_new, r_partial | 2K = 8, +K per rejected position |
| III | `isd_block3` | K+1 candidates, one per clock | K+1 = 5 |
| IV | `isd_block4` | soft distance, running minimum | result 1 clock after the last candidate |

From the edge that accepts a word (`in_valid && in_ready`) to the edge that
raises `out_valid` takes 7 + 1 + 8 + 1 + 5 = **22 clocks**. Each rejected IS
position adds K = 4 clocks. Each "+1" is the clock in which a done pulse is
registered and seen by the next block. `in_ready` stays low from acceptance
until one clock after `out_valid`. The outputs `codeword`, `message`,
`distance` and `best_idx` hold until the next result. The outputs `info_set`,
`ev_retry`, `ev_chk_swap` and `ev_inv_swap` show what Block II did.

### Block I: the insertion sorter

`insertion_sorter` is a chain of N registers. Each register holds a key (the
reliability level) and a payload (the position). In every clock where a new
element d is inserted, each cell compares d >= D_i at once:

- a cell whose comparison fails holds its value;
- the first cell whose comparison succeeds takes d;
- every cell after it takes its left neighbour's value.

The chain stays sorted from s_0 (largest key) to s_{N-1} (smallest). Because of
the `>=`, a new element goes ahead of equal keys, which gives the "later
position first" rule for ties. A cleared chain holds key 0 everywhere. After N
insertions it holds the N positions in order, and the empty entries have been
pushed out of the end.

`isd_block1` latches c* and feeds symbol i into the sorter on the (i+1)-th
clock, so the sort takes exactly N clocks. `hard_decision` derives both the
hard bit (the MSB) and the level (the low bits, inverted when the MSB is 0)
from each symbol.

### Block II: choosing and inverting G_partial

This is the heart of the design. Two GF(2) eliminations run one after the
other, each taking one clock per column.

**Check (`gpartial_check`).** G_partial is built from the IS: element (m, j) is
G[m][IS_j]. In the clock for column j:

1. If X(j,j) is 0, the first row below it with a 1 in column j is swapped in.
2. Every other row, above or below, with a 1 in column j is marked.
3. The pivot row is XORed into the marked rows.

If no row at or below j has a 1, column j is a combination of the earlier
columns, and the determinant is 0. After K clocks:

- **Determinant 1.** `done` is raised. It is combinational, in the cycle of the
  last step, so the inverter loads on that same edge.
- **Determinant 0.** `retry` is raised. The first dependent column is dropped,
  the later IS entries move up one place, and the next unused entry of s is
  appended. A new K-clock pass starts on the new set.

Repeating this gives the greedy result. The accepted set is the most reliable
set of K independent positions in sort order. For C(7,4), 7 of the 35 possible
4-position sets are singular. With a rank-K generator matrix, a set is always
found before s runs out, and an assertion guards this.

**Inversion (`gj_inverter`).** This uses the "shift left-up" form of
Gauss-Jordan elimination. The K x 2K matrix [G_partial | I] is loaded. Each
clock:

1. The pivot is always the top-left element. If it is 0, the first row with a
   1 in column 1 is swapped to the top. Only rows not yet used as pivots are
   searched; these are the upper K - t rows after t steps.
2. The top row is XORed into every other row with a 1 in column 1.
3. The whole matrix moves one place left and one place up. The finished column
   drops out, zeros come in on the right, and the pivot row wraps to the bottom.

After K clocks the pivot rows are back in order, and the left half holds
G_partial^-1.

**Product and r_partial.** `gf2_matmul` forms G_new = G_inv x G
combinationally from the inverter's register, one `gf2_vecmat` per row.
`rpartial_builder` picks r[IS_j] from the r latched at acceptance. Both are
stable once `out_valid` pulses, 2K clocks after acceptance when the first set
is invertible.

Example: for s = [6,0,5,4,1,3,2] the block returns these G_new rows (position 0
first) after 8 clocks:

    0111001
    1101000
    0011010
    0110100

### Blocks III and IV

`bitflip_gen` steps through the K+1 flip masks: 0, then bits 0, 1, ..., K-1
alone. `isd_block3` XORs each mask into the latched r_partial and multiplies by
the latched G_new, giving one candidate per clock with an index and a last flag.

`soft_distance` adds, over all positions, the symbol itself where the candidate
bit is 0 and 7 minus the symbol where it is 1. `best_select` keeps a running
minimum and takes candidate 0 unconditionally. `isd_block4` combines the two.
`message` is `codeword[K-1:0]`, which is the message because the default G is
systematic.

## Bit and index conventions

- A codeword, r, or a row of G or G_new is a packed `[N-1:0]` vector, and bit i
  is codeword position i. Text like `1000110` above lists position 0 first, so
  the literal in `isd_pkg` is bit-reversed: `7'b0110001`.
- `cstar[i]`, `s[i]`, `info_set[j]` and `g_new[j]` are packed arrays indexed
  from 0. `s[0]` is the most reliable position.
- `r_partial[j]` belongs to `info_set[j]`.
- Reset is synchronous and active low (`rst_n`) in every clocked module.

## Parameters

`isd_decoder #(N, K, Q, G)` defaults to N = 7, K = 4, Q = 3 and
`G = isd_pkg::G_C74`, packed as `[K-1:0][N-1:0]` with row m in `G[m]`. The RTL
is written for any (N, K, Q) and any rank-K G. The soft-distance width is
`$clog2(N*(2^Q-1)+1)` bits. The testbenches' reference model (`isd_ref_pkg`) is
fixed to C(7,4), so another code needs a matching reference before it can be
tested.

## Origin and fidelity

The four-block split, the insertion sorter, and the two column-per-clock
eliminations follow a published FPGA and 130 nm ASIC implementation of this
decoder. The same holds for the check-then-invert order and the latencies of
N clocks for Block I and at least 2K for Block II. That implementation gives
details and results only for Blocks I and II. Blocks III and IV here are built
directly from the decoding algorithm. Their internal structure is this
design's own, and so is everything in the list below. The G_new rows, the sort
order and the latencies published for Blocks I and II are reproduced exactly
by the testbenches.

## Design choices not fixed by the algorithm

These points are this implementation's own choices:

- The start/done chaining, `in_valid`/`in_ready`, and one word in flight at a
  time.
- `out_valid` is a pulse, and outputs are held until the next result.
- The reliability levels of the values 1, 2, 5 and 6. Only the extremes (0 and
  7 are most reliable, 3 and 4 least) come with the algorithm. These levels
  reproduce the sort order published for the original hardware:
  s = [6,0,5,4,1,3,2] for the input [7,5,4,3,2,1,0].
- Ties in the sort put the later position first. A strict "earlier first" rule
  would pick IS (4,5,6,0) instead of (6,5,4,1) for the example word above. The
  decoded codeword is the same.
- How a new IS is chosen after a singular G_partial: drop the first dependent
  column and append the next entry of s.
- The row-wrap and zero-fill reading of "shift left-up" in the inverter.
- Serial candidate generation in Block III, one per clock.
- The soft distance is a Manhattan distance to the ideal levels 0 and 7, and
  ties go to the earlier candidate.
- There is no early-stop criterion: all K+1 candidates are always evaluated.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model in
`tb/isd_ref_pkg.sv` is independent of the RTL and uses brute force instead of
elimination:

- the sort is a selection sort;
- independence is tested by trying every subset of the chosen columns;
- each G_new row and each candidate is found by searching all 16 messages for
  the codeword with the required pattern on the IS.

The checks include:

- **Block I.** The published test input [7,5,4,3,2,1,0] gives r = 1110000
  and s = [6,0,5,4,1,3,2]. The test also covers random words and the 7-clock
  latency.
- **Block II.** The G_new rows above, r_partial and the 8-clock latency. Random
  orderings are checked against 2K + K x (rejected positions).
- **Inverter.** 400 random invertible matrices, checked by inv x M = I and a
  K-clock latency.
- **Whole decoder.** `tb_isd_decoder` runs at the default parameters. It
  decodes the example word to 1010001 at distance 7, then 2000 random and noisy
  words. For each word it checks the codeword, distance, winning index,
  information set and 22 + 4 x (rejected positions) latency. It also counts,
  and fails if it never sees: sort ties, rejected G_partial, pivot exchanges in
  both eliminations, a flipped candidate that wins, and a word held off by
  `in_ready`.

To run one test with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
      rtl/isd_pkg.sv tb/isd_ref_pkg.sv tb/tb_isd_decoder.sv \
      --top-module tb_isd_decoder
    ./obj_dir/Vtb_isd_decoder

Replace `tb_isd_decoder` with any other `tb_*` module to test that block.

## Files

| File | Contents |
|---|---|
| `rtl/isd_pkg.sv` | default sizes and the C(7,4) generator matrix |
| `rtl/isd_decoder.sv` | top level, Blocks I-IV chained |
| `rtl/isd_block1.sv`, `hard_decision.sv`, `insertion_sorter.sv` | Block I |
| `rtl/isd_block2.sv`, `gpartial_check.sv`, `gj_inverter.sv`, `gf2_matmul.sv`, `rpartial_builder.sv` | Block II |
| `rtl/isd_block3.sv`, `bitflip_gen.sv`, `gf2_vecmat.sv` | Block III |
| `rtl/isd_block4.sv`, `soft_distance.sv`, `best_select.sv` | Block IV |
| `tb/isd_ref_pkg.sv` | reference model |
| `tb/tb_*.sv` | one testbench per module |
