# Exact-accumulation systolic array for batched GEMM

This RTL computes a stream of independent matrix products C = A·B, one block after another,
on a grid of multiply-accumulate cells. It is built around two ideas:

* **No rounding inside a dot product.** Operands of any supported number format (IEEE-754
  binary16/32/64, Bfloat16, a tapered floating-point format without subnormals, and
  posit⟨N,es⟩) are first converted into one internal floating-point form, *S3*. Every
  processing element (PE) multiplies its two S3 operands exactly and adds the product into a
  wide two's-complement fixed-point accumulator. The sum is rounded once, to the output format,
  at the bottom of the array. With a wide enough accumulator (the default), the result is the
  correctly rounded exact dot product, independent of summation order.
* **Results leave without stalling the array.** The array is output-stationary: each PE owns
  one element of C. The finished sums sink down their column through a chain of registers,
  the *Half-Speed Sink Down* (HSSD) chain. Meanwhile the PEs already work on the next block, so
  blocks can be streamed back to back with no idle cycles.

The default build is an 8 × 7 array for IEEE-754 binary32 inputs and outputs, with a
586-bit exact accumulator in every PE.

## Block diagram

```
             b_in[0..COLS-1]  (row k of B, one word per column)
                  |  column j delayed j cycles
                  v  A2S3 (format -> S3)
a_in[i] --delay i--> A2S3 --> PE(0,0) -> PE(0,1) -> ... -> PE(0,COLS-1)      A moves right,
(column k of A)                  |          |                  |             B moves down,
sob, eob ----------------------> PE(1,0) -> ...                 |             SOB/EOB move down
                                 |                              |             (and right along row 0)
                                ...                            ...
                                 |                              |
                              PE(ROWS-1,0) ... ----------- PE(ROWS-1,COLS-1)
                                 | HSSD                         | HSSD
                                L2A (round once)               L2A
                                 | delay COLS-1                 | delay 0
                              c_word[0]                      c_word[COLS-1]
```

| Module | Role |
|---|---|
| `gemm_sa` | Top: input skew registers, A2S3 units, kernel, one L2A per column, output re-alignment |
| `sak` | Kernel: ROWS × COLS grid of `pe`, neighbour links only |
| `pe` | Forwards operands and control, contains an `s3fdp`, one stage of the HSSD chain |
| `s3fdp` | Exact product, alignment, carry-save accumulation, sticky NaN |
| `a2s3_ieee`, `a2s3_posit` | Input word → S3 quintuple |
| `l2a_ieee`, `l2a_posit` | Accumulator → rounded output word |
| `cs_resolve` | Adds the pending carries of the carry-save accumulator |
| `skew_delay` | Register chain used for the input skew and output re-alignment |
| `s3_pkg` | Format enum and constant functions for widths and biases |

## Stream protocol and timing

A block is `p` consecutive cycles. In cycle `k` of a block, `a_in[i]` carries A(i,k) and
`b_in[j]` carries B(k,j). `sob` is high in the first cycle of the block and `eob` in the last.
The next block may start in the very next cycle.

* **Latency.** Suppose `eob` is high in cycle `te`. Then the block's results appear in the
  `ROWS` cycles starting at `te + ROWS + COLS + 2`. `c_valid` is high on all columns in those
  cycles.
* **Row order.** The first of these cycles carries row `ROWS-1` of C, and the last carries row 0.
  `c_word[j]` is column `j`.
* **Throughput.** One block of `p` products per element every `p` cycles. There are no gaps
  between blocks.
* **Intermediate results.** SOB and EOB act independently. If EOB is raised and SOB is not
  raised in the next cycle, the running sums are sent out and the accumulation carries on. The
  same spacing rule applies: two EOBs must be at least ROWS cycles apart. `tb_pe` drives SOB and
  EOB at random, `tb_sak` places an extra EOB inside longer blocks, and `tb_gemm_sa` starts two
  blocks without SOB.
* **Limit: `p ≥ ROWS`.** Each column can emit only one sum per cycle, so a block must last at
  least as many cycles as the column has sums. Shorter blocks would collide in the HSSD chain.
  An assertion in `gemm_sa` reports EOBs that come closer than ROWS cycles, in simulation.

Inside the array, PE(i,j) sees each operand pair `i + j` cycles after PE(0,0) does. The input
skew registers (row `i` delayed `i` cycles, column `j` delayed `j` cycles) make this work. The
SOB/EOB pair enters PE(0,0) without delay. It travels down every column, and along row 0 it
also passes from each PE to its right neighbour. So every PE sees the control bits in the same
cycle as the operands they belong to, and no signal other than clock and reset is broadcast.

## The S3 format

An S3 value is the bus `{nan, sign, scale[WS-1:0], implicit, fraction[WF-1:0]}`, which is
`WS + WF + 3` bits wide. It stands for
(-1)^sign · implicit.fraction · 2^(scale − bias). Zero has a zero significand, and its scale
does not matter. `nan` marks anything that is not a real number.

| Format | WS | bias | WF | Notes |
|---|---|---|---|---|
| IEEE-754 / Bfloat16 (`we`, `wf`) | we | 2^(we−1)−1 | wf | subnormals: scale 1, implicit 0; ±∞ and NaN set `nan` |
| TFP (same layout) | we | 2^(we−1)−1 | wf | no subnormals: exponent 0 means zero |
| posit⟨N,es⟩ | clog2(2(N−2)·2^es+1) | (N−2)·2^es | N−3−es | NaR sets `nan` |

For example, posit⟨8,0⟩ gives WS = 4, bias 6 and WF = 5. The value 1.0 (0x40) becomes
`(0, 0, 0110, 1, 00000)`. Bfloat16 3.5 becomes `(0, 0, 10000000, 1, 1100000)`.

## Sizing the accumulator

Three parameters set the accumulator's range. Bit 0 weighs 2^LSB. Products are kept up to
weight 2^MSB. OVF guard bits above MSB absorb the growth of the sum. The width is
WLA = OVF + MSB − LSB + 1.

| Recipe | MSB | LSB | OVF | WLA | Use |
|---|---|---|---|---|---|
| exact (β), binary32 — **default** | 255 | −298 | 32 | 586 | every binary32 product fits without loss, including products of two subnormals |
| α, N-bit format | 5 | −(2N−1−5−2) | 2 | 2N | small, for values near 1 (e.g. neural networks) |
| γ | 40 | −50 | 9 | 100 | the same accumulator for every format |
| exact (β), binary64 | 2047 | −2148 | 32 | 4228 | the published adder width of the binary64 unit |
| exact, posit⟨8,0⟩ | 13 | −22 | (free) | 36 + OVF | used by one of the workload tests with OVF = 10 |
| exact, posit⟨4,0⟩ | 5 | −6 | (free) | 12 + OVF | OVF = 13 lets about 2^14 of the largest products accumulate |

For an exact accumulator, LSB is the weight of the smallest product, 2·(smallest scale − WF),
and MSB is the weight of the top bit of the largest product.

Two things happen to a product that falls outside the window:

* **Bits below LSB** are truncated toward zero (the magnitude is truncated before negation).
* **A nonzero product above MSB** sets the sticky NaN flag. The test looks at the position of
  the product's upper significand bit, the 2^1 digit of a product of two values in [1, 2). So a
  product with scale sum `s` needs `s + 1 ≤ MSB`, even when that bit is zero.

A sum that outgrows the OVF guard bits also sets the NaN flag (see below).

## Inside the fused dot product (`s3fdp`)

The unit works in three stages.

1. **Exact product.** An unsigned adder adds the two scales and an unsigned multiplier
   multiplies the significands. The product has `2·WF+2` bits. The product's sign is the XOR
   of the two signs.
2. **Alignment.** The scale sum gives a shift amount, plus the flags `too_small` and `too_big`.
   A barrel shifter places the product in the accumulator's MSB…LSB window. Zeros are padded
   above it, in the OVF bits and in the unused bits of the top chunk. A negative product is
   one's-complemented, and its "+1" enters as the carry-in of the lowest chunk.
3. **Carry-save accumulation.** The accumulator is cut into `NCH = ceil(WLA/K)` chunks of
   `K` bits. Each chunk has its own ripple-carry adder: fed-back sum + addend + the carry
   that the chunk below registered in the previous cycle. So the longest carry path is `K`
   bits, whatever the accumulator width. The state is held as `(sum, carries)`. The true value
   is `sum + Σ carry[i]·2^(K(i+1))`, taken modulo 2^WLA. The L2A units resolve it once per
   result.

**Overflow.** The unit checks for signed overflow of the addition in the top chunk, whose sign
bit is accumulator bit WLA−1. Carries from the chunk below arrive a cycle late. So the check can
err only within about two top-chunk units (2^(K·(NCH−1)+LSB) each) of the range limit: there it
may flag a sum just inside the range or miss one just outside. Everywhere else it is exact.

`ftz` is driven by SOB. It replaces the fed-back sum, carries and NaN flag by zero, so the
operand pair of that cycle starts a new dot product. `eob_q` is EOB delayed one cycle. When it
is high, the accumulator holds the block's complete sum.

## The HSSD chain (the part that needs the most care)

Each PE has a 2:1 multiplexer and two registers, C1 and C2, in its column's output chain:

```
c_in (from PE above) ──┐
                       ├─ mux ── C1 ── C2 ── c_out (to PE below)
own accumulator ───────┘   select = eob_q (own sum finished)
```

The bundle on the chain is `{valid, nan, carries, sum}`.

Why two registers per PE? Within a column, PE(i+1,j) finishes one cycle after PE(i,j),
because operands reach it one cycle later. Suppose the chain moved one PE per cycle. Then the
sum of PE(i,j) would reach PE(i+1,j) in exactly the cycle in which PE(i+1,j) inserts its own
sum, and the two would collide. Moving at half speed, two cycles per PE, the upper sum arrives
one cycle *after* the lower PE has inserted its own.

Here is the schedule for one block whose `eob` is on the input in cycle `te`. EOB enters PE(0,0)
with no skew register in front.

* The sum of PE(i,j) is inserted in cycle `te + i + j + 1`.
* It reaches the bottom of column `j` in cycle `te + 2·ROWS + j + 1 − i`.
* A column therefore delivers its ROWS sums in ROWS consecutive cycles, bottom row first.

The next block's sums follow `p` cycles later, which is why `p ≥ ROWS` is required. The L2A
output register adds one cycle. The re-alignment registers delay column `j` by `COLS-1-j`
cycles. After that, all columns deliver the same row of C in the same cycle.

The chain's cost is two accumulator-wide registers and one multiplexer per PE. In return the
array needs no output bus, no global wiring and no stall of the inputs.

## Output units

* **`l2a_ieee`** handles IEEE-754 outputs and, with `SUBNORMALS = 0`, TFP outputs. It works
  in these steps:
  1. Resolve the carries.
  2. Take the sign and the magnitude.
  3. Count leading zeros and normalise, keeping a guard bit and a sticky bit.
  4. Round to nearest, ties to even.

  Exceptions are handled as follows:
  * A NaN flag gives the quiet NaN `0 11..1 10..0`.
  * A sum too large for the format gives ±∞.
  * A sum below the normal range gives a subnormal (IEEE) or signed zero (TFP).
  * An exact zero gives +0.
* **`l2a_posit`** first finds the scale of the leading one and splits it into a regime and
  an exponent. It then builds the long bit string regime | exponent | fraction and rounds it to
  N−1 bits, to nearest with ties to even on the encoding. Nonzero sums saturate at maxpos or
  minpos; they never round to zero or NaR. A NaN flag gives NaR.
* **Exact output** (`OUT_EXACT = 1`) skips rounding. Each column delivers
  `{nan, accumulator}`: WLA + 1 bits, two's complement, bit 0 of weight 2^LSB.

The output format is set separately from the input format, so the array can also widen or
narrow its results. For example, one test uses Bfloat16 in and binary32 out.

## Parameters of `gemm_sa`

| Parameter | Default | Meaning |
|---|---|---|
| `ROWS`, `COLS` | 8, 7 | array size: rows of C (= rows of A), columns of C |
| `IN_FMT` | `FMT_IEEE` | `FMT_IEEE`, `FMT_TFP` or `FMT_POSIT` (from `s3_pkg`) |
| `IN_WE`, `IN_WF` | 8, 23 | exponent and fraction width of IEEE/TFP input |
| `IN_PN`, `IN_PES` | 8, 0 | posit input width and es |
| `MSB`, `LSB`, `OVF` | 255, −298, 32 | accumulator range (see above) |
| `K` | 64 | carry-save chunk size; the accumulator must span at least two chunks |
| `OUT_EXACT` | 0 | 1: output the fixed-point accumulator |
| `OUT_FMT`, `OUT_WE`, `OUT_WF`, `OUT_PN`, `OUT_PES` | IEEE binary32 | output format |

Reset (`rst`) is synchronous and active high. It clears only the control and valid bits.
Datapath registers are not reset; they are always written before they are used.

## Array sizes per operand width

The natural array size depends on the operand width. These are the sizes the design was
evaluated at, on an FPGA at 250 MHz:

| Operand width | Array |
|---|---|
| 4-bit | 64 × 63 |
| 8-bit | 32 × 31 |
| 16-bit | 16 × 15 |
| 32-bit | 8 × 7 |
| 64-bit | 4 × 3 |

Each of these is a parameter setting of `gemm_sa`. The testbenches run the 4-bit, 8-bit,
16-bit, 32-bit and 64-bit sizes, with at least one number format each (see below).

## Simulating

All files are plain SystemVerilog (IEEE 1800-2017). The testbenches are self-checking and end
with a line `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/s3_pkg.sv tb/tb_fp_pkg.sv tb/tb_gemm_sa.sv --top-module tb_gemm_sa
./obj_dir/Vtb_gemm_sa
```

Replace `tb_gemm_sa` by any testbench below. The reference helpers are `tb/tb_fp_pkg.sv` and
the include files `tb/tb_posit_ref.svh` and `tb/tb_small_s3.svh`. The testbenches compute
their references from double-precision reals. Wherever an exact sum is needed, they choose
operands so that the sum is exact in a double.

| Testbench | What it establishes |
|---|---|
| `tb_gemm_sa` | Default build (8 × 7, binary32, exact accumulator). 14 back-to-back blocks (p = 8…40), all results and the latency checked. It also covers overflow to ∞, NaN propagation, a cancellation 2^100 + 3 − 2^100 = 3, subnormal inputs and results, ties to even, zero, intermediate results, and output overlapping input. |
| `tb_gemm_sa_posit4` | posit⟨4,0⟩ on the full 64 × 63 array (4032 PEs) with an exact 25-bit accumulator; saturation at maxpos/minpos, NaR propagation |
| `tb_gemm_sa_posit8` | posit⟨8,0⟩ on 32 × 31 with an exact accumulator; NaR propagation |
| `tb_gemm_sa_bf16` | Bfloat16 on 16 × 15 with the α (32-bit) accumulator and binary32 output, including truncation below LSB and a sum that overflows the accumulator into NaN |
| `tb_gemm_sa_ieee64` | binary64 on 4 × 3 with the exact 4228-bit accumulator and binary64 output; cancellation 2^1000 + 2^-1000 − 2^1000, subnormal and overflowing results, NaN |
| `tb_gemm_sa_tfp64` | TFP64 on 4 × 3 with the γ (100-bit) accumulator and exact fixed-point output; zero-exponent TFP words read as zero |
| `tb_sak` | 3 × 3 kernel: every sum, final or intermediate, leaves in exactly its predicted cycle, with nothing else marked valid |
| `tb_pe` | Forwarding delays, HSSD select and pass-through, accumulated values |
| `tb_s3fdp` | Random dot products on the default accumulator; a small 18-bit accumulator (5 chunks of 4 bits) for carries, `too_small`, `too_big`, overflow in both directions and FTZ |
| `tb_a2s3_ieee`, `tb_a2s3_posit` | Random IEEE / binary16 / TFP words; every pattern of posit⟨4,0⟩, ⟨8,0⟩, ⟨8,2⟩, ⟨16,1⟩ and ⟨16,2⟩; random posit⟨32,2⟩ and ⟨64,3⟩ words |
| `tb_l2a_ieee`, `tb_l2a_posit` | Rounding of random accumulator values to binary32, binary16, TFP16, posit⟨4,0⟩, ⟨8,0⟩, ⟨8,2⟩ and ⟨16,1⟩, over the normal, subnormal, overflow and saturation ranges |

The full default configuration simulates in well under a second. The largest one, 64 × 63 PEs,
takes about a minute and 1 GB of memory to build.

## Where this design fills in or departs from the published one

The arithmetic datapath follows the published structure: the S3 quintuple; the fused dot
product with its scale adder, multiplier, shift-value generator, barrel shifter, sign handling
and radix-2^K carry-save adder; the PE with its A, B, SOB, EOB, C1 and C2 registers and HSSD
multiplexer; and the array with skew registers, A2S3 units, L2A units and output registers.
The rest is this design's own choice:

* **Framing and timing of the stream, and the `valid` bit in the HSSD bundle.** Only the role of
  SOB/EOB is given.
* **Control distribution along row 0.** Only the entry of SOB/EOB at the corner PE is shown.
* **The `p ≥ ROWS` limit.** The published results report full throughput for blocks as short
  as p = 2 with HSSD. This implementation cannot do that: it follows from one output per
  column per cycle.
* **The scaling factors α and β of C ← αAB + βC are not implemented.** The array returns A·B.
* **Rounding mode.** Round to nearest, ties to even, for IEEE/TFP and posit. The source leaves
  the rounding scheme open.
* **L2A normalisation.** The L2A takes the magnitude and then counts leading zeros. It does not
  count leading zeros or ones on the two's-complement value directly. The result is the same.
* **TFP bit layout.** It is taken to be IEEE-like: all-zero exponent = zero, all-ones = NaN.
* **Accumulator parameters.** The chunk size `K = 64` is a fixed default; the original flow
  picks it from timing analysis. The guard-bit count of the exact accumulators is not published.
  The published adder width of the exact binary64 unit is 4228 bits, 32 more than the product
  range needs. So `OVF = 32` is used for binary32 as well.
* **Pipelining.** There is one pipeline stage per unit, with no timing-driven pipelining.
* **Accumulator overflow.** Overflow past the OVF guard bits turns the result into NaN, as in
  the source. How it is detected (top-chunk signed overflow, approximate within two top-chunk
  units of the limit) is this design's own choice.
* **Not included.** The host side is outside this RTL: the host processor, the coherent PCIe
  link, its framework and the DMA engines. `gemm_sa` exposes the raw operand and result streams
  in their place.
