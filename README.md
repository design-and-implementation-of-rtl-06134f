# Hybrid carry multiplier (32 x 32 -> 64 bits)

A multiplier spends most of its time and area adding partial products. With
carry-propagate adders, each of those additions waits for a carry to travel the
whole word. This design keeps carries local while partial products pile up. It
then pays for one fast carry-propagate addition at a point where the result has
to be a plain binary number. "Hybrid carry" names that split:

* **Carry-save** (3:2) rows of full adders add partial products. They produce a
  sum word and a carry word. No carry moves along the word.
* **Carry-lookahead** addition turns the sum/carry pair back into one binary
  partial sum. It runs once per step, not once per partial product.

The multiplier comes in two forms. Both are instantiated side by side in the
top module `hybrid_carry_multiplier`, each with its own ports:

| form | module | per clock | latency | throughput |
|---|---|---|---|---|
| pipelined | `hc_pipe_mult` | each of 8 stages adds 4 partial products | 8 clocks | 1 product / clock |
| iterative | `hc_seq_mult` | one partial product into a 32-bit CLA adder, then shift | 32 clocks | 1 product / 32 clocks |

Operands are unsigned. The product is exact: 32 x 32 bits never needs more than
64 bits.

## The pipelined form

Think of the 32-bit multiplier `b` as eight 4-bit digits. Stage *k* (k = 1..8)
handles digit *k*:

```
            in_psum (64 b, from stage k-1; zero for stage 1)
               |
   a, b ----> pp_gen: 4 rows  a*b[4(k-1)+j] << (4(k-1)+j),  j = 0..3
               |
            csa_array: 5 words -> sum, carry      (3 carry-save rows, no carry chain)
               |
            cla_adder (64 b): sum + carry -> new partial sum
               |
            register  -> s_k   (a, b and valid are registered alongside)
```

After stage *k*, register `s_k` holds exactly `a * (b mod 2^(4k))`. That is the
product of the multiplier bits used so far. `s8` is the full product and drives
`c`. The testbenches check every `s_k` against this rule on every clock.

Each stage shifts its partial products to the weights of its own multiplier bits
(`OFFSET = 4(k-1)`). The partial sum therefore never has to be moved. The
"shift to line up with the next partial product" is folded into the wiring of
`pp_gen`.

A stage passes `a` and `b` on in registers together with the partial sum. Each
stage therefore works on a different operand pair, so a new pair can enter on
every clock. `in_valid` travels with the data as `out_valid`. A clock without
`in_valid` becomes a bubble that comes out eight clocks later. Nothing can
stall: the pipeline has no back-pressure input.

The low stages have constant-zero upper bits. `s1` can never exceed 36
significant bits, `s2` 40, and so on. Synthesis removes those flip-flops.

`cout` is the registered carry out of the last stage's CLA adder. It is 0 for
every product, and an assertion in `hc_pipe_mult` checks this. It exists only so
the adder's carry can be watched at the output.

### Timing of the pipelined form

```
edge 0: a/b/in_valid sampled, s1 <= a*b[3:0]
edge 1: s2 <= s1 + a*b[7:4]<<4
...
edge 7: s8 = c <= full product, out_valid = 1
```

The critical path of one stage has three parts: the AND gates of `pp_gen`,
three full-adder delays in the carry-save rows, and one 64-bit carry-lookahead
addition.

## The iterative form

`hc_seq_mult` uses one 32-bit adder and cycles it 32 times. It has a 64-bit
accumulator:

* `acc[63:32]` holds the running sum.
* `acc[31:0]` starts as the multiplier `b`.

On every step clock:

1. The CLA adder computes `acc[63:32] + (acc[0] ? a : 0)`.
2. The register loads `{carry_out, sum, acc[31:1]}`. This is a right shift by
   one, with the adder's carry entering at the top.

The right shift moves the running sum down to the weight of the next multiplier
bit. It also shifts out the multiplier bit just used. After 32 steps, `acc`
holds `a*b`.

Handshake:

* `start` is sampled when `busy` is low. `a` and `b` are captured on that edge.
* `busy` stays high for the 32 step clocks.
* `done` pulses for one clock, 32 clocks after the edge that took `start`.
* `p` then holds the product until the next `start`.
* A `start` while `busy` is ignored.

## The adders

* `full_adder`: the sum is `a^b^cin` and the carry out is the majority of the
  three inputs.
* `csa_row`: WIDTH full adders side by side. The carry word comes out already
  shifted left by one. The carry out of the top bit is dropped, so
  `sum + carry == x + y + z (mod 2^WIDTH)`. A product that fits in the word
  loses nothing this way.
* `csa_array`: reduces N words to two through a linear chain of N-2 `csa_row`s.
  With 5 operands that is 3 rows, about as deep as a Wallace tree for so few
  inputs.
* `cla_group4`: a 4-bit lookahead group. Every internal carry is computed
  directly from `cin` and the bit generate/propagate signals. The group exports
  its own generate/propagate.
* `cla_adder`: WIDTH/4 groups, where WIDTH must be a multiple of 4. The carry
  into group k+1 is `G_k | P_k & c_k`: one AND-OR per 4 bits. The carry between
  groups is not looked ahead further.

## Interfaces

`hybrid_carry_multiplier` has parameters `WIDTH = 32` and `STAGES = 8`, taken
from `hc_pkg`. `WIDTH` must be a multiple of `STAGES`. `WIDTH/STAGES` bits per
stage is the number of partial products per stage.

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; synchronous active-low reset, clears every register |
| in_valid, a, b | in | 1, 32, 32 | operand pair for the pipeline |
| out_valid, c | out | 1, 64 | product, 8 clocks after its operands |
| cout | out | 1 | carry out of the last stage adder (always 0) |
| s | out | 8 x 64 | stage registers s1..s8 (`s[0]` is s1) |
| seq_start, seq_a, seq_b | in | 1, 32, 32 | start the iterative form |
| seq_busy, seq_done, seq_p | out | 1, 1, 64 | iterative status and product |

## How far it follows the published design, and where it departs

The following points come from the published design:

* 32-bit operands, a 64-bit product and eight 64-bit partial sums s1..s8.
* Partial products generated per step, added to an accumulated partial sum and
  realigned by shifting.
* The accumulating adder is a carry-lookahead adder.
* A single n-bit adder cycled m times (the iterative form).
* Registers between cascaded stages (the pipelined form).
* Carry-save adders built from full adders.

The following are choices of this implementation:

* **Four multiplier bits per stage.** The published design shows eight partial
  sums but not which multiplier bits feed which one. Its example waveform
  (a = 8, b = 2) shows s1 and s2 at zero while s3..s8 and c hold 16. With the
  assignment used here, bit 1 of b belongs to stage 1, so s1 carries 16 first.
  The final product is the same.
* **Linear carry-save array and 4-bit CLA groups.** The tree shape and the
  grouping are not specified.
* **Unsigned operands, synchronous active-low reset, the valid bit and the
  start/busy/done handshake.** None of these is specified.
* **Both forms built.** Both forms are described. The top instantiates both
  rather than choosing one.
* **Full adders are logic, not transistors.** The published design prefers a
  ten-transistor full-adder circuit. That is a cell-level choice. Here
  `full_adder` gives its logic only.
* **Baseline not built.** The published comparison is against an add-multiply
  unit with a carry-lookahead adder in front of a Booth-recoded multiplier. That
  baseline is not part of this RTL. Nor are its synthesis delay and tool-memory
  figures, which depend on an unnamed synthesis flow.

## Files

| file | content |
|---|---|
| `rtl/hc_pkg.sv` | shared constants: width 32, 8 stages, CLA group 4 |
| `rtl/full_adder.sv`, `rtl/csa_row.sv`, `rtl/csa_array.sv` | carry-save part |
| `rtl/cla_group4.sv`, `rtl/cla_adder.sv` | carry-lookahead adder |
| `rtl/pp_gen.sv` | aligned partial products of one step |
| `rtl/hc_stage.sv` | one pipeline stage |
| `rtl/hc_pipe_mult.sv` | 8-stage pipelined multiplier |
| `rtl/hc_seq_mult.sv` | iterative multiplier |
| `rtl/hybrid_carry_multiplier.sv` | top |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops itself, with a watchdog in case of a
hang. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/hc_pkg.sv \
    tb/tb_hybrid_carry_multiplier.sv --top-module tb_hybrid_carry_multiplier
./obj_dir/Vtb_hybrid_carry_multiplier
```

Replace the testbench name to run another one. `-Irtl` lets Verilator find each
module in `rtl/<module>.sv`.

What the testbenches check:

* **Adders.** `tb_full_adder` is exhaustive. `tb_csa_row`, `tb_csa_array` and
  `tb_cla_adder` use corner cases (all ones, carries through every group) and
  random words.
* **`tb_pp_gen` and `tb_hc_stage`.** They run a stage at a non-zero offset and
  check the one-clock latency.
* **`tb_hc_pipe_mult`.** It streams about 2,200 products with random bubbles. It
  checks each `s_k` on every clock and each product's 8-clock latency.
* **`tb_hc_seq_mult`.** It checks the 32-clock latency, the held product and the
  ignored start.
* **`tb_hybrid_carry_multiplier`.** It runs the whole design at its default
  size and drives both forms at once. It starts with the 8 x 2 example and
  compares every result with `a*b`. It also counts back-to-back products,
  bubbles, a full pipeline (8 products in flight), iterative products, ignored
  starts and clocks with both forms busy. It fails if any of these never
  happens.

## Changing it

* **Pipeline depth or width.** Change `HC_WIDTH`/`HC_STAGES` in `hc_pkg` or the
  top's parameters. For example, `STAGES = 4` gives 8 partial products per stage
  and 7 carry-save rows. `STAGES = 32` gives one partial product per stage, a
  fully unrolled version of the iterative form. `WIDTH` must be divisible by
  `STAGES` and by 4.
* **Signed operands.** They would need sign-extended partial products, or Booth
  recoding in `pp_gen`, and a signed reference in the testbenches.
