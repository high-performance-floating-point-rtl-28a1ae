# A mainframe-style FPU core: 5-cycle fused multiply-add and a 116-bit radix-4 SRT divider

This RTL models the fraction dataflow of a mainframe floating-point unit built around two ideas:

* a **fused multiply-add pipeline** (A*B + C with one rounding). It issues one operation per cycle and has five execution cycles. Denormalized inputs are handled without tags or prenormalization. The implied bit is assumed to be 1 and corrected afterwards.
* a **quad-width radix-4 SRT divide macro**. It produces 2 quotient bits per cycle over a 116-bit partial remainder. The remainder is kept in a *reduced* carry-save form that stores one carry bit for every four sum bits. This saves latches and power.

The original design (IBM zSeries FPU, "High Performance Floating-Point Unit with 116 bit wide Divider") supports six formats: binary and hexadecimal floating point, each in short, long and quad. This implementation has a narrower scope:

* The divide macro handles all of its formats (short/long/quad floating point, 32/64-bit integer).
* The top-level pipelines run end to end for **IEEE binary long (double)** only, for both multiply-add and divide.

Everything is synthesizable SystemVerilog with no vendor primitives.

## Block map

```
                    fetch_bus (loads)
                         |
            +------------v-------------+
            | fpr_file: 16 + 4 regs,   |  3 reads / 1 write per cycle
            | 5 load wrap registers    |  reads bypass from the wrap chain
            +--+---------+---------+---+
               | A       | B       | C
   +-----------v---------v---------v------------+     +----------------------------+
   | fpu_fma                                    |     | srt_divider                |
   | E0  A,B,C registers                        |     |  srt_table   (digit select)|
   | E1  shift_amount, booth_multiplier         |     |  srt_multiple (1x, 2x, inv)|
   |     (Booth + 4 levels of csa_tree)         |     |  srt_subtractor (3:2 + 4b) |
   | E2  aligner, csa_tree (4 levels), last 3:2 |     |  srt_quotient_reg (QPOS/NEG)|
   | E3  main_adder + his_select                |     +-------------+--------------+
   | E4  normalizer                             |                   | rem / quotient
   | E5  rounder                                |     main_adder -> normalizer -> rounder
   +--------------------+-----------------------+                   |
                        +------------- FPR write port <-------------+
```

`fpu_top` ties these together.

## The divide macro (`srt_divider` and its parts)

This is the least conventional part of the design. Most of this section explains it.

### Digit set and recurrence

Each iteration computes

    P(i+1) = 4*P(i) - q(i+1)*D,        q in {-3, -2, -1, 0, +1, +2, +3}

This is radix 4 with the *maximally redundant* digit set. The large redundancy makes the digit-selection table small and tolerant of estimate errors. The price is the ±3 multiple. This design never forms 3D. A digit is sent as three wires:

* `neg`: the sign;
* `one`: use a 1×D multiple;
* `two`: use a 2×D multiple.

So q = ±(one + 2·two). The subtractor adds both multiples together with the remainder in one 3:2 counter stage.

### Digit selection table (`srt_table`)

The table's inputs are:

* the top 5 bits of the shifted remainder 4P, read as a two's-complement value `xxxx.x`;
* the two divisor bits after the implied one.

The cell values come from the original design's printed P–D table. The table is asymmetric. The remainder estimate is made by truncating a carry-save value, so it can be too small by one unit but never too large. The original table leaves some cells unspecified. Here they are filled with +3 or −3, whichever matches the row's sign.

A table is valid when, for every divisor in an interval and every true 4P that maps onto a cell, |4P − qD| ≤ D still holds. Let P̂ be the value of the 5 table bits and D̂ the divisor's leading bits. The true remainder then lies in [P̂, P̂ + 1) and the divisor in [D̂, D̂ + 1/4). An exhaustive check over these intervals holds for estimate errors below one unit and breaks just above one unit. So the filled cells leave no margin to spare.

### Reduced carry-save remainder (`srt_subtractor`)

The remainder register holds:

* a **116-bit sum** part;
* a **28-bit carry** part: one carry bit for every 4 sum bits.

The top 6 sum bits have no carries. They are explicit, because the table reads them in the next cycle.

One iteration does the following:

1. Shift the sum left by 2. Expand the sparse carries back to their bit positions.
2. One 3:2 counter stage adds (4P sum, 4P carries, 1×D multiple). A second 3:2 stage adds the 2×D multiple.
3. Break the result into 4-bit carry-propagate groups. Each group keeps its 4 sum bits and passes on only its carry-out, which is the stored carry. The top 6 bits get a full carry-propagate adder, so they come out explicit.

The awkward part is that the remainder moves by 2 bits per iteration but the groups are 4 bits wide. A fixed group grid would leave the stored carries in the middle of a group on every other cycle. This design therefore **alternates the group boundaries between two phases**:

* even iterations: groups start at bit positions 4k;
* odd iterations: groups start at 4k−2, with a 2-bit group at the bottom.

Every stored carry then lands exactly on a group boundary of the next iteration. The `phase` input selects the grid. The original design states only the widths (28 carries, 4-bit CPAs, 6-bit explicit top). The alternating grid is this implementation's own way of making those widths consistent.

For subtraction the multiples are inverted. The two's-complement "+1" of each multiple (`inv1`, `inv2` from `srt_multiple`) goes into free carry-in slots: the lowest counter carry and the lowest CPA group carry-in.

### Quotient register and pointer (`srt_quotient_reg`)

There are two 116-bit registers:

* **QPOS** receives the positive digits;
* **QNEG** receives the magnitudes of the negative digits.

The quotient is QPOS − QNEG, formed later in the main adder. A pointer chooses which 2-bit digit position is written.

* Floating-point divides start at the top and run 14 (short), 28 (long) or 58 (quad) iterations.
* Integer divides compute the number of effective quotient bits first: n_Q = n_V − n_D, plus one when the normalized dividend is ≥ the normalized divisor. The count is rounded up to an even number (at least 2). The pointer starts at 116 − n_Q, so only the needed 1 to 32 iterations run. The dividend is pre-shifted so that the quotient's LSB lands at bit 0.

### Timing

* The cycle that `start` is sampled is followed by one load cycle.
* One cycle per iteration follows.
* `done` pulses in the cycle after the last iteration.

So a long divide takes `iters + 2` cycles from `start` to `done`. The final remainder (`rem_sum` plus expanded `rem_carry`) has |P| ≤ D. Its sign tells whether the quotient must be decremented by one unit.

### Divide in the top level

`fpu_top` reads both operands and runs the macro. It then reuses an adder, normalizer and rounder as the original design does with its main dataflow:

| step | cycles | action |
|---|---|---|
| read/start | 2 | operands from the register file, unpacked into the dividend and divisor |
| loops | 30 | load + 28 iterations + done |
| REM | 1 | remainder sum + carries; sign and non-zero (sticky) |
| QUO | 1 | QPOS − QNEG |
| CORR | 1 | minus one unit if the remainder is negative; leading zero count |
| NORM | 1 | normalize and adjust the exponent |
| ROUND | 1 | round to 53 bits (IEEE mode), pack |
| WB | 1+ | write the target register. Waits while a load or an FMA result holds the write port |

The total is 38 cycles for a double divide. The original quotes 39.

## The multiply-add pipeline (`fpu_fma`)

The pipeline has one operand stage and five execution stages:

| stage | work |
|---|---|
| E0 | A, B, C registers. 56-bit fractions; the implied bit is assumed 1. |
| E1 | Detect denormals. Compute the shift amount. Booth-recode Y and reduce 29 partial products with four levels of 3:2 counters to 7 vectors. The top partial product (see below) is delayed, giving 8 vectors. |
| E2 | Align C. Four more counter levels (8 → 2). A last 3:2 counter adds the aligned low part of C (inverted for an effective subtraction). The part of C above the product field goes to the **high-sum (HIS)** register. |
| E3 | True/complement adder with a leading zero count on 16-bit blocks. The HIS incrementer runs alongside. A select chooses HIS or HIS ± 1 and whether the result is shifted by 60 bits. |
| E4 | Normalize by the stored count. The count is exact, so no correction step is needed. The shift is limited so that the exponent never falls below 1, which leaves an underflowing result denormalized. |
| E5 | Round (IEEE modes), adjust the exponent, pack. The result is written to the register file at the end of E5. |

The result is visible on the pipeline outputs 6 cycles after issue, and the throughput is one per cycle.

### Dataflow layout

The product's radix point is fixed. The addend moves. The 176-bit dataflow is:

    | addend field: 60 bits | product field: 116 bits (2 integer bits, 110 fraction, 4 guard) |

The alignment shift is `SA = E_A + E_B − E_C + 59 + 2 − bias`. At `SA = 0` the addend's leading bit sits at the top of the addend field. If SA is negative, C is not shifted: the product lies far below it and contributes only a sticky bit. If SA is larger than the dataflow, C itself becomes a sticky bit.

The adder here is 118 bits wide: the 116-bit product field plus two extension bits. Its output is therefore the exact sum of the carry-save pair, and its carry (addition) or borrow (subtraction) into the high-sum is unambiguous. The original works with a 116-bit adder and guard-bit rules it does not spell out.

### Denormalized operands without prenormalization

A denormal is only known one cycle after E0, because the exponent must be checked for all zeros. So the pipeline assumes the implied bit is 1 and corrects afterwards:

* **Multiplicand X:** let X′ be X with the implied bit forced to 1. Then X·Y = X′·Y − Y·(not x0)·2^55. The second term is one extra partial product. That is why 56-bit operands need 29 partial products.
* **Multiplier Y:** the implied bit y0 lies inside the top Booth digits. Those digits are decoded both ways, for y0 = 1 and y0 = 0, and the right version is selected once y0 is known. The top digit enters the tree late, as the delayed partial product.
* **Exponents:** a denormal counts with exponent 1 instead of 0. The shift amount is computed for D, D+1, D−1 (and D+2 when both factors are denormal) and selected by the denormal flags.

### High-sum and the 60-bit select (`his_select`)

The addend bits above the product field skip the wide adder. Only a carry (addition) or a borrow (effective subtraction with a dominant addend) is applied to them.

If the high part is non-zero, the result is taken as {high part, upper 56 adder bits}. The lower 60 adder bits then only contribute to the sticky bit, and the exponent increases by 60. Otherwise the 116-bit adder result is used as it is.

For an effective subtraction with a non-zero high part, the addend dominates:

* the result sign is the addend's;
* the low part becomes the two's complement of (P − C_low) when a borrow is taken.

## Register file (`fpr_file`)

The register file has 16 architected and 4 work registers of 64 bits. It reads three operands and writes one register per cycle.

Loads do not write the array directly. A load enters a chain of **5 wrap registers** and moves one step per cycle, in step with the pipeline. It is written into the array when it leaves the last wrap register. Until then, any read of its target register gets the youngest matching wrap entry. So a dependent operation never waits for a load.

In the top level, a load and an FMA share one issue slot per cycle, and a load takes precedence. A load therefore writes the array exactly 5 cycles after issue, the same point at which an FMA writes its result. The two can never collide on the write port. A divide's write-back simply waits for a free cycle. While a divide waits, no FMA is issued, so the wait is at most 5 cycles.

The issuer must not read an FMA's target register within 6 cycles of issuing it. This model has no result bypass.

## What is not modelled

* Hexadecimal formats, and binary short/quad formats, in the multiply-add pipeline and in the top-level divide path. The divide macro supports them; the surrounding unpack and round logic is built for binary long only.
* Integer divide and square root at the top level. The divide macro does integer division; square root is not built.
* NaN and infinity operands (both paths) and zero operands of a divide raise `exc`. The multiply-add handles zero operands and exact-zero sums. Results that overflow raise `exc`. A divide result below the normal range raises `exc`. The multiply-add delivers such results denormalized (gradual underflow): E4 limits the normalization shift so that the exponent stays at 1. It raises `exc` only when the product itself lies below the dataflow's reach, which would need a right shift. No underflow-trap or pseudo-exception path is built.
* Operands from memory as the second multiplier input, and the result wrap-back bypass.
* Divide of denormalized operands, which needs a prior normalization pass.

## Files and interfaces

| file | module | notes |
|---|---|---|
| `rtl/fpu_pkg.sv` | package | widths, `qdigit_t`, `div_mode_e`, iteration counts |
| `rtl/fpu_top.sv` | top | loads, FMA and divide requests, results |
| `rtl/fpu_fma.sv` | multiply-add pipeline | `in_valid` → `out_valid` 6 cycles later |
| `rtl/booth_multiplier.sv`, `csa_tree.sv`, `shift_amount.sv`, `aligner.sv`, `his_select.sv` | FMA parts | combinational |
| `rtl/srt_divider.sv` | divide macro | `start` → `done` after `iters + 2` cycles |
| `rtl/srt_table.sv`, `srt_multiple.sv`, `srt_subtractor.sv`, `srt_quotient_reg.sv` | divider parts | |
| `rtl/fpr_file.sv` | register file | |
| `rtl/main_adder.sv`, `normalizer.sv`, `rounder.sv` | shared back end | combinational |

Each file starts with a header comment that gives its timing and port meanings.

## Verification

Every module has a self-checking testbench in `tb/<module>_tb.sv`. Each prints `TB_RESULT checks=N failures=M`. The main ones:

* **`srt_divider_tb`**: checks floating-point divides of all three widths with the exact identity 4ⁿ·P₀ = D·Q + Pₙ and the bound |Pₙ| ≤ D, using wide integer arithmetic. It checks integer divides against `/` and `%`, and also checks the iteration counts and the cycle count.
* **`srt_table_tb`**: checks the table cells against the reference table.
* **`fpu_fma_tb`**: issues 6000 back-to-back multiply-adds and compares them bit for bit with the simulator's double arithmetic. The factors are limited to 26 significant bits, so A·B is exact and A·B ± C is rounded only once. The test includes denormal factors and addends, results that underflow to denormals, cancellation, and addends far above or below the product. It counts each dataflow case and fails if one never occurs.
* **`fpu_top_tb`**: the end-to-end test at full size. Part 1 runs 200 double divides with operands read from the wrap registers and from the array. It covers write-back stalls and special operands, and the results must match the simulator's division. Part 2 runs 3000 cycles of mixed loads and FMAs, with a divide inside the stream. It fails if any counted mechanism never happens: bypass, negative-remainder correction, normalization shift, rounding increment, write-port stalls, denormal correction, 60-bit shift, complement result.

To simulate with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl rtl/fpu_pkg.sv tb/fpu_top_tb.sv --top-module fpu_top_tb -o sim
    ./obj_dir/sim

To run another testbench, replace `fpu_top_tb` with its name.

## Where this departs from the original

* Alternating 4-bit group grid in the divide subtractor. This is one consistent reading of the stated widths.
* Unspecified table cells filled with ±3.
* The FMA carry-save path and adder are 118 bits wide instead of 116.
* Sum and carry are registered after E2, instead of propagate/generate bits.
* The addend is inverted at the counter input rather than stored inverted.
* The divide uses its own adder, normalizer and rounder instances rather than the FMA's stages. Its latency is 38 cycles rather than 39.
* The register file has four work registers beyond the 16 architected ones.
* The issue-slot rule between loads and multiply-adds is this design's own.
