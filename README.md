# Stochastic-binary dot-product array (16 × 128)

A stochastic multiplier is a single gate, but a stochastic *adder* (a MUX or an OR
gate) throws information away, so a purely stochastic dot-product needs bit streams
hundreds or thousands of bits long. This design keeps the one-gate multiplier and
drops the stochastic adder. Each product is one XNOR of two random bits, and the 128
product bits of a dot-product are counted with ordinary binary adders. No product bit
is discarded, so one clock cycle gives as much information as 128 cycles of a
MUX-based circuit, and short bit streams of 1 to 16 bits are enough.

The engine has 16 rows of 128 processing elements. Each row computes one 128-input
dot-product. A programmable adder then adds N rows into one result, where N is the
bit-stream length and can be any value from 1 to 16. So N trades accuracy against the
number of results:

| N (rows per result) | 1 | 2 | 3 | 4 | 5 | 8 | 9…16 |
|---|---|---|---|---|---|---|---|
| results per array pass, ⌊16/N⌋ | 16 | 8 | 5 | 4 | 3 | 2 | 1 |

When N does not divide 16, the 16 mod N rows that are left over are not used.

## Number representation

Operands are 8-bit unsigned codes. A converter compares a code `v` with a fresh random
number `r` each cycle and emits the bit `v > r`. The 8-bit LFSR gives every value from 1
to 255 once per period, so the bit is 1 with probability `p = (v-1)/255` (0 for `v = 0`).
The bits are read as *bipolar* numbers: a stream of all ones is +1, all zeros is −1, and
in general the value is `b = 2p − 1`. Code 128 is therefore close to 0, code 255 is +1
and codes 0 and 1 are −1.

The product of two bipolar streams is their XNOR. If `C` of the 128 XNOR outputs in a row
are 1, the row estimates

    sum_j b(w_j) * b(x_j)  ≈  2*C − 128

and a programmable-adder lane that adds N rows (sum `S`) estimates `(2*S − 128*N) / N`.
`C` lies between 0 and 128, so the 8-bit partial sums never overflow.

## How a dot-product moves through a row

This is the part that takes some care. A row (`sb_dp_row`) is a chain of 128 processing
elements (`sb_spe`). Each element holds an XNOR, an 8-bit adder and an 8-bit register.
The partial sum enters the first element as 0. Each element adds its product bit and
registers the sum, so the sum moves one element to the right per clock. The sum that
started at element 0 in cycle `s` is at element `j` in cycle `s+j`. It leaves the row as
`y_row[r]` after cycle `s+127`, which is 128 cycles after `s`.

Two wires feed each element, and they come from different directions:

* **Inputs run down the columns.** Column `j` carries one input bit, and the same bit goes
  to all 16 rows. The engine takes a whole input vector at once and skews it
  (`sb_input_skew`), so that element `j` of a vector presented at cycle `s` reaches
  column `j` at cycle `s+j`. This is exactly when that vector's partial sum passes
  column `j`. A new vector can enter every cycle, one diagonal behind the previous one.
* **Weights run along the rows.** Each row has one weight converter, and its bit is
  broadcast to all 128 elements of the row. The host streams a weight vector into a row
  one element per cycle. The value on `w_in[r]` in cycle `s+j` is multiplied with element
  `j` of the vector that entered at cycle `s`.

So a row computes a true dot-product W·X when the host starts vector X at cycle `s` and
streams W₀…W₁₂₇ in cycles `s…s+127`. A vector that enters one cycle later meets the same
stream shifted by one (W₁ at column 0, and so on). The hardware accepts that vector and
computes exactly what its wires carry. But it is the dot-product with a rotated weight
vector, which is useful only if the host arranges the data for it. With a fixed weight
vector per row, one aligned dot-product starts every 128 cycles. Back-to-back vectors
and arbitrary weight streams are fully supported and are checked bit for bit in the
testbench.

The pipeline keeps the number of random number generators (RNGs) small. There are 17 in
total: one per row for the weights, and one shared by all 128 input comparators. Every
column uses the same random number in a given cycle, but the skew means each column is
working on a different element at that moment.

## Accuracy

The workload testbench `tb_sb_dp_error` puts the same random weight vector into all 16
rows, runs 32 dot-products for each N from 1 to 16, and compares each result with the
exact bipolar dot-product. The error is the mean absolute error as a fraction of the
full scale of 128:

| N | 1 | 2 | 3 | 4 | 8 | 12 | 16 |
|---|---|---|---|---|---|---|---|
| mean abs. error | 6.6 % | 5.5 % | 4.9 % | 4.8 % | 4.7 % | 4.5 % | 4.1 % |

For N ≥ 9 each value rests on only 32 estimates, so single entries vary between about
3 % and 4.5 %. Adding rows lowers the error, but it levels off at about 4 %. The 16 rows use
independent weight bits but share the *same* input bit on each column. Adding rows
therefore averages out only the weight-side sampling noise. The input-side noise is one
Bernoulli sample per element, whatever N is. Designs that draw a fresh input sample for
every bit of the stream (N cycles of one dot-product circuit) reach lower errors at N=16,
about 1.5 % of full scale in published simulations of that arrangement. Here the input
bits are shared because that is how the array saves converters. Note this floor before
relying on N=16 accuracy.

## Blocks

| module | what it is |
|---|---|
| `sb_top` | the complete engine: skew, 17 converters, array, programmable adder, valid pipeline |
| `sb_pe_array` | 16 rows; own weight bit per row, shared input bit per column |
| `sb_dp_row` | one 128-element dot-product chain |
| `sb_spe` | processing element: XNOR, 8-bit adder, 8-bit register |
| `sb_input_skew` | input pipelining: column `j` delayed by `j` cycles |
| `sb_lfsr` | 8-bit maximal LFSR (x⁸+x⁶+x⁵+x⁴+1), one per row plus one for the inputs |
| `sb_b2s_cmp` | binary-to-stochastic comparator, `bit = value > rnd` |
| `sb_prog_adder` | adds groups of N rows; lanes 0…⌊16/N⌋−1 valid |
| `sb_pkg` | sizes, the `bslen_t` type for N, RNG seeds |

## Interface and timing of `sb_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `bslen` | in | `bslen_t` (5) | N, 1…16 (0 is read as 1, values above 16 as 16) |
| `x_valid` | in | 1 | an input vector is presented this cycle |
| `x_in` | in | 128 × 8 | input vector (unskewed) |
| `w_in` | in | 16 × 8 | this cycle's weight for each row |
| `y_row_valid`, `y_row` | out | 1, 16 × 8 | row counts `C`, 128 cycles after the vector |
| `y_out_valid`, `y_out_mask`, `y_out` | out | 1, 16, 16 × 12 | sums of N rows, 129 cycles after the vector |

For a vector presented at cycle `s`:

* `w_in[r]` in cycle `s+j` multiplies element `j`;
* `y_row` and `y_row_valid` appear after the clock edge that ends cycle `s+127`;
* the programmable adder samples `bslen` in cycle `s+128`, and `y_out` appears one clock
  later.

The adder groups rows `g*N … g*N+N−1` into lane `g`. Lanes at or above ⌊16/N⌋ read
zero, and their mask bit is clear.

After reset the RNGs step every cycle, so a result depends on the cycle in which it was
computed. The testbenches model this exactly.

## What follows the source architecture and what is this design's own

Taken from the architecture: the 16 × 128 array, the SPE contents (XNOR multiplier,
8-bit adder and register), the chained partial sums starting from 0, the weight broadcast
along rows, the input bits shared down columns, the staggered ("pipelined") inputs,
17 RNGs with digital comparators, and the output adder that forms ⌊16/N⌋ results from
groups of N rows for any N from 1 to 16.

This design's own choices:

* Operands are 8 bits wide.
* The RNGs are 8-bit LFSRs. Their polynomial and seeds are chosen here (row `r`:
  `((37r+11) mod 255)+1`; inputs: `0xB5`).
* The comparator is strict (`>`).
* When N does not divide 16, the leftover rows are dropped.
* The adder is a registered masked sum per lane, with a fixed lane layout.
* `valid` signals are added, and the reset is synchronous.
* The input skew is built as a register triangle in front of the input converters. The
  original arranges the data before the chip.

In the fabricated chip, the converters and the programmable adder are off-chip, and the
array is loaded through shift registers and buffers. That test-access logic is not
specified in enough detail to reproduce, so it is not included. Neural-network layers
wider than 128 inputs, such as a 784-input MLP layer, need several passes, and their
partial results must be added outside this design. A 128-input layer fits in one pass per
result. A single dot-product circuit that accumulates over N clock cycles, instead of
over N rows, is not included either.

## Size

After coarse synthesis the engine has about 16.7 k flip-flop bits. Most of them are the
2048 × 8-bit partial-sum registers. The input skew adds about 86 k bits of delay storage
(128·127/2 stages × 8 bits). This storage can be removed if the host supplies pre-skewed
inputs.

## Simulating

Every testbench checks itself and ends by printing `TB_RESULT checks=… failures=…`. The
top-level testbenches run at the full default size in a few seconds:

    verilator --binary --timing --assert -Irtl -Itb rtl/sb_pkg.sv tb/tb_sb_top.sv --top-module tb_sb_top
    ./obj_dir/Vtb_sb_top

* `tb_sb_top` uses a bit-exact reference model: 17 LFSRs, the skew and the comparators.
  It first runs pipelined random traffic with idle cycles, back-to-back vectors and
  every N from 1 to 16. It then runs isolated dot-products and checks their accuracy. It counts each of
  these situations and fails if any of them never occurs.
* `tb_sb_dp_error` sweeps N from 1 to 16 and prints the accuracy table above.
* `tb_sb_mlp_out` runs a 128-input, 10-output classification layer on synthetic data.
  The inputs are noisy copies of ten random prototypes, and the prototypes are the
  weights. At N=1 all ten neurons share one pass, which takes 129 cycles per input; the
  argmax agreed with exact arithmetic for 35 of 40 inputs. At N=16 each neuron takes its
  own pass, which is 1290 cycles per input; it agreed for 40 of 40.
* `tb_sb_pe_array`, `tb_sb_dp_row`, `tb_sb_spe`, `tb_sb_input_skew`, `tb_sb_prog_adder`,
  `tb_sb_lfsr` and `tb_sb_b2s_cmp` test one module each against independent reference
  models.

Replace `tb_sb_top` in the command with any of these names to run it. The testbenches use
only `$urandom`, with no constraint solver and no X/Z values.
