# Hybrid bit-parallel / bit-serial flexible-precision PE

This is a multiply-accumulate processing element (PE) for neural-network accelerators
that works on numbers of any precision up to a register width: floats with
any split of exponent and mantissa bits (FP16, BF16, the two FP8 variants,
FP6, FP4, ...) and signed or unsigned integers, with activation and weight
allowed to use different formats. The PE computes a dot product
`sum_i act[i] * wt[i]` and adds it into a stored partial sum.

The main idea is the trade-off between area and speed inside one PE. The
datapath is cut into eight sub-blocks, and each one exists in two versions
behind the same start/done interface:

* **bit-parallel**: the whole operation is one wide piece of combinational
  logic and finishes in one cycle;
* **bit-serial**: a small FSM runs a narrow datapath one bit (or one
  primitive, or one column) per cycle, so the block is much smaller but takes
  a number of cycles that grows with the operand width.

An 8-bit compile-time vector, `CONFIG`, picks the version of each sub-block.
This gives 256 PE variants from one source. They all compute the same result
and differ only in area, power and latency. A designer can make the blocks
that dominate area serial and keep the ones that dominate latency parallel.

## Data flow through the PE

```
 activation buffer     weight buffer
        |                    |
        +---- separator -----+        (sign, exponent, mantissa of each operand)
          |        |        |
          SA       PG       Add       (sign, primitives, exponent sum)
          |        |        |
          |       IOrg      |         (primitives sorted into columns)
          |        |        |
          |       Mul       |         (mantissa product)
          |        |        |
          +--- truncation --+         (normalized, truncated product)
                   |
   partial sum --> EN                 (common exponent, alignment shifts)
   (buffer)        |
                  CST                 (align both mantissas)
                   |
                  Accu  ---> partial-sum buffer
```

For one product the steps are:

1. **Separator** (`sem_separator`). Splits each word, using its run-time
   format, into a sign, an effective biased exponent and a mantissa. For floats
   the mantissa includes the implicit leading one. It also gives the mantissa
   length `man_len`, which tells the serial blocks how much work there is.
2. **Sign analyzer, SA** (`sign_analyzer_dual`). The product sign is the XOR
   of the two signs.
3. **Primitive generator, PG** (`primitive_generator_dual`). Forms every
   cross-product bit `prim[i][j] = a[i] & b[j]`, one AND per pair.
4. **Input organizer, IOrg** (`input_organizer_dual`). Sorts the primitives by
   weight into columns `col[i+j][i] = prim[i][j]`, so that column `k` holds all
   the bits of weight `2^k`.
5. **Multiplier, Mul** (`mantissa_mult_dual`). Reduces the columns. The
   parallel form computes `product = sum_k popcount(col[k]) << k`. The serial
   form is a shift-and-add that adds one partial-product row per weight bit.
6. **Exponent adder, Add** (`exponent_adder_dual`). Computes
   `ea + eb + offset`, with `offset = -(bias_a + bias_w + frac_a + frac_w)`.
   Here `frac` is the number of fraction bits. The result is the binary
   exponent of the integer product, so `product * 2^sum` is the exact value.
7. **Mantissa truncation** (`mantissa_truncation`). Normalizes the product so
   its leading one sits on bit `ACC_W-1`, truncates the bits below, and
   corrects the exponent. This block is combinational and has no serial form.
8. **Exponent normalizer, EN** (`exponent_normalizer_dual`). Compares the
   product's exponent with the stored partial sum's and keeps the larger one.
   It gives the other operand a right shift equal to the difference, saturated
   at `ACC_W`. A zero operand never decides the exponent.
9. **Concat-shift tree, CST** (`concat_shift_tree_dual`). Shifts the two
   mantissas right by their amounts, so both are at the common exponent.
10. **Accumulator, Accu** (`accumulator_dual`). Adds the two sign-magnitude
    values. On a carry-out it shifts right by one and increments the exponent.
    The result goes back into the partial-sum buffer.

The multiplier path is exact. Precision is lost in two places only: the
truncation of the product to `ACC_W` bits, and the bits shifted out during
alignment. Nothing is rounded; every loss truncates toward zero.

## Number formats

The format of each operand is a run-time input of type `fmt_t`
(`hybrid_pkg`): `{sign_en, exp_bits[5:0], man_bits[5:0]}`. The fields are
packed `{sign, exponent, mantissa}` from the MSB down and right-aligned in the
`REGISTER_WIDTH`-bit word. The rules are:

* `exp_bits > 0` is a float.
  * The bias is `2^(exp_bits-1) - 1`.
  * A normal number has an implicit leading one.
  * An exponent field of 0 is a subnormal (effective exponent 1, no implicit one).
  * All-ones exponents are ordinary numbers: there are no infinities or NaNs.
* `exp_bits = 0` is an integer.
  * With `sign_en = 1` it is sign-magnitude.
  * With `sign_en = 0` it is unsigned.

The format examples are:

| Example | sign_en | exp_bits | man_bits |
|---|---|---|---|
| FP16 | 1 | 5 | 10 |
| BF16 | 1 | 8 | 7 |
| E4M3 | 1 | 4 | 3 |
| INT8 (sign-magnitude) | 1 | 0 | 7 |
| UINT4 | 0 | 0 | 4 |

A partial sum is stored in an extended format. It has a sign, a signed
exponent of `XW = REGISTER_WIDTH + 6` bits and an `ACC_W`-bit magnitude, and
its value is `(-1)^sign * man * 2^exp`. With integer operands the exponent
stays 0 as long as the sum fits in `ACC_W` bits, so the sum is exact. A partial
sum that cancels to a small value is not shifted back left, so low bits of
later, smaller terms can be lost.

## The dual-mode blocks

Every `*_dual` module has a `PARALLEL` parameter and the same handshake:

* pulse `start` for one cycle with the inputs valid;
* the inputs are captured on that edge;
* `done` pulses for one cycle when the outputs are valid;
* the outputs then hold until the next `start`.

In parallel mode the result is registered on the start edge and `done`
follows one cycle later. In serial mode a four-state FSM runs:
`IDLE -> LOAD -> PROCESS (N cycles) -> DONE`. A serial run of N items takes
N + 2 cycles from `start` to `done`. A `start` while the FSM is busy violates
an assertion.

These are the serial latencies (`la`, `lb` are the mantissa lengths,
`XW = REGISTER_WIDTH + 6`):

| Block | one step per cycle | start-to-done cycles |
|---|---|---|
| SA | the sign bit | 3 |
| PG | one AND primitive | `la*lb + 2` |
| IOrg | one primitive into its column | `la*lb + 2` |
| Mul | one partial-product row (multiplicand gated by one weight bit) added at its shift | `lb + 2` (2 if a length is 0) |
| Add | one exponent bit, ripple carry held in a flip-flop | `XW + 2` |
| EN | one bit of the exponent difference (ripple borrow) | `XW + 3` |
| CST | one-bit shift of product, then of partial sum | `sh_p + sh_s + 2` |
| Accu | one magnitude bit, ripple carry held in a flip-flop | `ACC_W + 4` |

The serial PG and IOrg loops cover only the `la*lb` primitives that the
current formats can set. So a narrow format runs faster on the same hardware,
for example 4 primitives for FP4 (E2M1) against 121 for FP16.

## Configuration vector

| CONFIG bit | 7 | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|---|
| block | Mul | Add | Accu | CST | EN | IOrg | PG | SA |

A 1 builds the parallel version and a 0 the serial one. The default is
`8'b1010_0000`: a parallel multiplier and accumulator, with everything else
serial.

## Controller and timing (`pe_hybrid`)

One operation runs like this:

1. Write operands with the `act_*` and `wt_*` write ports.
2. Set `fmt_act`, `fmt_wt`, `op_len` (number of products), `op_psum_addr`
   (partial-sum entry) and `op_clear`.
3. Pulse `read_data` for one cycle while `busy` is low.
4. The PE processes entries `0 .. op_len-1` of both buffers.
5. `done_r` pulses for one cycle once the last product has been added.

A few rules apply:

* With `op_clear` set, the first product starts from zero instead of from the
  stored entry. Without it, the new dot product is added to what the entry holds.
* `read_data` while busy is ignored.
* `op_len = 0` only produces `done_r`.
* Results are read through `psum_raddr`, `psum_rsign`, `psum_rexp` and `psum_rman`.

The controller handles one product at a time:

1. It starts SA, PG and Add together and waits for all three.
2. It runs IOrg, Mul, EN, CST and Accu one after another. Each has a GO state
   (the start pulse) and a WAIT state (until done).
3. It writes the result back.

A product therefore takes

    1 + max(SA, PG, Add) + (1 + IOrg) + (1 + Mul) + (1 + EN) + (1 + CST) + (1 + Accu) + 1

cycles, where each block term is its start-to-done latency (1 when parallel).
That is 13 cycles with every block parallel. `done_r` comes one cycle after
the last product. For example, at the default configuration a 16-element FP16
dot product takes 4736 cycles, and a 16-element INT8 one about 2270.

Products are not overlapped. A second product does not enter the pipeline
while the first is still in it.

## Parameters (`pe_hybrid`)

| Parameter | Default | Meaning |
|---|---|---|
| `REGISTER_WIDTH` | 16 | operand word width, the largest format it can hold |
| `ACC_W` | 24 | partial-sum magnitude width (the FP32 significand width) |
| `CONFIG` | `8'b1010_0000` | parallel/serial choice per block |
| `BUF_DEPTH` | 16 | entries per operand buffer, the longest dot product |
| `PSUM_DEPTH` | 16 | partial-sum entries |

The widths of 1 to 16 bits that the design was explored over all fit
`REGISTER_WIDTH = 16`. Other widths and any `CONFIG` value are legal; the
ports size themselves from the parameters. Widths up to 32 bits are
simulated. 64 bits elaborates, but no testbench runs it, because the
reference model works with 64-bit integer products. The format fields are
6 bits wide, so a single field holds at most 63 bits.

## Where this design departs from, or goes beyond, its source

The block list, the order in which data flows through the blocks, the
dual-mode start/done wrapper with its IDLE/LOAD/PROCESS/DONE FSM, the 8-bit
configuration vector and its bit order, and the `read_data` / `done_r` names
come from the original description. The following are this design's own:

* **Mode is fixed at compile time.** The source describes the mode both as a
  compile-time parameter and, in its summary, as something switched at run
  time. Here it is a parameter only; a run-time switch would need both
  versions of every block.
* **One operand per word.** The original bit-parallel architecture packs
  several narrow operands into one word and works on them together. Here each
  buffer entry holds one operand of up to `REGISTER_WIDTH` bits. The
  carry-stopping "precision checkpoints" that packing needs in the serial
  accumulator are therefore not built.
* **Internals of the blocks.** The source describes most blocks by function
  only. The multiplier's reduction tree is a column-popcount sum. The exponent
  normalizer was read as the exponent comparison that aligns the product and
  the partial sum. The concat-shift tree is used as the alignment shifter.
  The serial multiplier is a shift-and-add over the weight bits. Its
  partial-product rows are taken from the organized primitives instead of
  from the raw operands.
* **Input organizer placement.** It sits between the primitive generator and
  the multiplier; the architecture drawing does not show where it goes.
* **Two drawn connections are not data paths here.** The sign analyzer feeds
  only the truncation stage, and the multiplier reaches the accumulator only
  through truncation, EN and CST.
* **Number handling.** The format encoding, subnormals, the missing
  inf/NaN handling, truncation instead of rounding, the partial-sum format
  and `ACC_W` are choices made here.
* **Parallel blocks register their result.** They give `done` one cycle after
  `start`, not combinationally, so both versions share one handshake.
* **No overlap between products.** The controller runs the blocks strictly
  one after another.
* **Sizes.** The buffer depths, the host write and read ports and the reset
  behaviour are not specified in the source.

The source mentions an array of PEs that share one configuration, but it
does not describe the array's size or dataflow, and it evaluates a single PE.
Only the PE is built here.

The source also names a "word-sliced" hybrid scheme, with some parts of a word
parallel and others serial, as a use of these results. It gives no detail, so
it is not built.

## Verification

Each block has a self-checking testbench in `tb/`. It compares against values
computed independently in the testbench and prints
`TB_RESULT checks=N failures=M`. The dual-mode testbenches build a parallel and
a serial copy side by side and check the results and the exact start-to-done
cycle count of both.

`tb_pe_hybrid` runs 28 dot products through four PEs (`CONFIG` = `0xA0`,
`0xFF`, `0x00`, `0x5F`). The formats are FP16, BF16, E4M3 x E5M2, FP6, FP4,
INT8, INT4 x UINT4, UINT16 and 1-bit numbers. A bit-exact reference model of
the arithmetic (`tb/tb_ref_pkg.sv`) computes the expected result, so the
truncation behaviour is checked too. The testbench counts how often each
mechanism occurs and fails if one never does:

* product or partial sum shifted, and shift saturated;
* product truncated;
* subnormal input, zero product, cancellation and exact zero;
* accumulator carry-out;
* clear and continue;
* mixed formats;
* empty operation;
* `read_data` ignored while busy.

It also checks that every block ran in both modes. The whole latency is
checked against the formula above.

`tb_pe_hybrid_sweep` builds the PE at operand widths 1, 2, 3, 4, 5, 8, 12,
16 and 32 bits. Each width gets four configurations: all serial, all parallel,
the default, and a mixed vector rotated per width. Every PE runs random dot
products in random formats that fit its width, including floats without
mantissa bits and 1-bit integers. Results and cycle counts are checked as
above. The lanes live in `tb/tb_pe_sweep_lane.sv`.

`tb_pe_hybrid_configs` runs 32 of the 256 configurations at a 3-bit width:

* all serial and all parallel;
* each block alone parallel, and each block alone serial;
* 14 mixed vectors.

It shows that every one of them gives the same bit-exact results, and that
their cycle counts match the formula. All 256 also pass, but compiling 256
PE variants takes several minutes.

`tb_pe_hybrid_full` runs the PE with every parameter at its default:

1. a 16-element FP16 dot product;
2. a 16-element INT8 dot product with clear;
3. a second INT8 dot product continuing the same partial sum.

## Simulating with Verilator

Compile the package first, then the reference package (testbenches only),
then the rest:

```
verilator --binary --timing --assert -Wno-fatal -y tb \
  rtl/hybrid_pkg.sv tb/tb_ref_pkg.sv \
  $(ls rtl/*.sv | grep -v hybrid_pkg) tb/tb_pe_hybrid.sv \
  --top-module tb_pe_hybrid
./obj_dir/Vtb_pe_hybrid
```

Replace `tb_pe_hybrid` with any other testbench name; `-y tb` lets Verilator
find the sweep's lane module. Block testbenches need
only `hybrid_pkg.sv`, the block's file(s) and the testbench. To try another
configuration, change the `CONFIG` value where `pe_hybrid` is instantiated.

## Files

* `rtl/hybrid_pkg.sv`: format type, CONFIG bit positions, serial FSM states
  and exponent helpers.
* `rtl/pe_hybrid.sv`: the top, with the controller.
* `rtl/*_dual.sv`: the eight dual-mode sub-blocks.
* `rtl/sem_separator.sv`, `rtl/mantissa_truncation.sv`: combinational
  glue.
* `rtl/operand_buffer.sv`, `rtl/psum_buffer.sv`: the buffers.
* `tb/tb_<block>.sv`: block testbenches.
* `tb/tb_pe_hybrid.sv`, `tb/tb_pe_hybrid_full.sv`, `tb/tb_pe_hybrid_sweep.sv`,
  `tb/tb_pe_hybrid_configs.sv` (the last two with `tb/tb_pe_sweep_lane.sv`):
  end-to-end tests.
* `tb/tb_ref_pkg.sv`: reference model.
