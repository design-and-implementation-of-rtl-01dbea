# A small single-precision FPU with a separate accumulator file

This is the floating point unit for a small dual-issue, in-order core, one of
many on a throughput-oriented accelerator chip. Every core pays for its own
FPU, so area matters more than full IEEE 754 conformance. It supports:

- binary32 add, subtract, multiply, compare and absolute value;
- conversion between float and 32-bit integer;
- a fused multiply-add (FMA).

The design centres on keeping the multiply-add unit busy on dot products: the
workload the chip is built for is dominated by `acc += a * b`.

It gives up some standard features to save area:

- Denormal numbers are not supported. Denormal operands read as zero, and
  results too small to be normal become a signed zero.
- Rounding is fixed when the design is built. It is either round-to-nearest-even
  (RNE, the default) or truncation; there is no rounding-mode register.
- There are no traps. Exceptions only set sticky flags, which software reads with
  an instruction.
- There is no divide and no square root.

All files are SystemVerilog; the RTL is in `rtl/` and the testbenches are in `tb/`.

## The units and their timing

| Unit | File | Latency | Issue rate |
|---|---|---|---|
| add / subtract | `fp_addsub` | 3 | 1/cycle |
| multiply | `fp_mul` | 3 | 1/cycle |
| integer → float | `fp_i2f` | 3 | 1/cycle |
| fused multiply-add | `fp_fmadd` | 4 (1 multiply + 3 add stages) | 1/cycle, 3 cycles between dependent accumulations |
| compare | `fp_cmp` | 1 | 1/cycle |
| absolute value | `fp_abs` | 1 | 1/cycle |
| float → integer | `fp_f2i` | 1 | 1/cycle |
| move to / from accumulator, read flags | in `fpu_top` | 0 / 1 / 1 | 1/cycle |

Latency is counted from the cycle in which the operation is accepted to the
cycle in which its result is on the writeback port.

How the latencies were chosen:

- Three cycles for add and multiply was the best trade between area and latency.
- Integer-to-float could be done in one cycle. It was given the adder's latency
  anyway, so that fewer distinct latencies compete for the writeback port.
- The one-cycle units produce results that the core can use in the next cycle,
  for example to resolve a branch on a compare.

Each arithmetic unit has the same shape:

1. One combinational block computes the whole result.
2. The result then passes through `LATENCY` output registers (`fp_pipe`).

A synthesis tool with register retiming spreads those registers through the
logic. That is why the latency is only a parameter here and not a set of
hand-placed pipeline stages.

## Arithmetic

**Adder (`fp_addsub`)** uses the single-path algorithm:

1. Fold the subtract operation into the sign of `b`.
2. Order the operands by magnitude, so that only the smaller one is ever
   complemented and the difference cannot go negative.
3. Shift the smaller significand right by the exponent difference, keeping a
   guard bit, a round bit and a sticky bit. The sticky bit is the OR of
   everything shifted out below the round bit.
4. Add (or subtract, using one's complement plus a carry-in) the 27-bit values.
5. Normalise: shift right once after a carry, or shift left by the leading-zero
   count.
6. Round.

A faster dual-path (near/far) adder was also possible, but it is larger and the
single path met timing.

**Multiplier (`fp_mul`)**:

- It adds the exponents, subtracts the bias, and multiplies the two 24-bit
  significands into a 48-bit product.
- The inputs are never denormal, so the product lies in [1, 4). Normalising
  therefore takes at most one right shift, and then the product is rounded.
- The significand multiply is written as `*`, which leaves the multiplier
  architecture to synthesis.

**Rounding and special values**, the same in every unit (`fpu_pkg::round_pack`):

- Overflow gives infinity under RNE and the largest finite value under
  truncation. It raises overflow and inexact.
- A result whose exponent is still ≤ 0 after rounding becomes ±0. It raises
  underflow and inexact.
- A NaN operand is returned with its own payload and the quiet bit set, the
  first NaN operand winning. Invalid is raised for a signalling NaN.
- Invalid is also raised for inf − inf and 0 × inf, which give the default NaN
  `0x7FC00000`.

**Compare (`fp_cmp`)**:

- The 31-bit magnitudes `{exp, man}` order like unsigned integers, so one
  unsigned comparator does the work:
  - when both operands are negative, its "less than" is inverted;
  - when the signs differ, the negative operand is smaller;
  - zeros of either sign compare equal.
- Only LT and EQ are computed. GT is NOR(LT, EQ).
- Because GT is derived that way, a comparison with a NaN reports GT = 1 and
  raises invalid, and software has to check the flag.
- Two equal infinities report EQ and also raise invalid.
- The core receives `{29'b0, gt, eq, lt}`.

**Conversions**:

- `fp_f2i`:
  1. Place the significand with its leading one at bit 31.
  2. Shift it right by d = 158 − exponent, truncating.
  3. If d ≤ 0 or the input is a NaN, return 0 with invalid. The only
     out-of-range value this flags is a magnitude of 2³¹ or more, which
     includes −2³¹ itself.
  4. If d ≥ 32, return 0.
  5. Negate if the sign is set. Inexact is raised when bits are lost.
- `fp_i2f`:
  1. Take the magnitude.
  2. Count its leading zeros d and shift them out.
  3. Keep the top 24 bits and round to nearest even on the 8 bits below.
  4. The exponent is 158 − d, plus one if rounding carries out.

## The multiply-add unit and the accumulator file

This is the part that needs the most care.

### Why a separate accumulator file

A multiply-add needs three source operands. If the accumulator `c` lives in the
general register file, an FMA needs three of the four register-file read ports.
It then cannot be dual-issued with most other instructions.

The alternative is a small **separate accumulator file** inside the FPU:

- An accumulate instruction reads its running sum from the file and writes it
  back there.
- It then needs only two register reads, and it frees the general registers
  from holding partial sums.
- The cost is explicit moves between the two files.

Both forms are built and share one unit:

- `OP_FMADD`: `rd = a * b + c`, with all three operands from the register file.
  The result goes through the writeback port.
- `OP_FMACC`: `acc[dst] = a * b + acc[src]`. The result stays in the accumulator
  file and does not use the writeback port.
- `OP_MTACC` / `OP_MFACC`: move a value into or out of an accumulator.

### Pipeline and bypass (`fp_fmadd`)

The unit has k = `MUL_STAGES` multiply cycles followed by n = `ADD_STAGES` add
cycles; by default k = 1 and n = 3, for 4 stages in total.

Multiply phase:

- It forms the exact 48-bit product and its exponent, and rounds nothing.

Add phase:

- It takes the addend **only when the product reaches it**, k cycles after issue.
- It adds product and addend with the same ordered single-path scheme as the
  adder, over a 51-bit window with guard, round and sticky bits.
- It rounds once, so the result equals a correctly rounded `a*b + c`.

Because the addend is read late, a dependent accumulation does not have to wait
for the whole 4-cycle latency:

- The addend multiplexer can take the value in the unit's own **output
  register** (the bypass) when the result leaving the unit in that cycle writes
  the accumulator being read.
- Otherwise it reads the accumulator file, or the `c` operand for `OP_FMADD`.

The timing with the defaults:

| Cycle | Accumulation #1 (issued at t) | Accumulation #2 on the same accumulator (issued at t+3) |
|---|---|---|
| t | multiply | |
| t+1 … t+3 | add stages 1–3 | |
| t+3 | | multiply |
| t+4 | result in output register → written to file at end of cycle | reads addend **from the bypass** |

So dependent accumulations can issue every n = 3 cycles; the back-to-back
latency depends only on the adder phase. If the second accumulation issues one
cycle later, the first result is already in the file.

### Why four accumulators

With a 3-cycle back-to-back latency, one accumulator can take only one
accumulation every three cycles. To issue one per cycle, software interleaves
independent sums. For example, a dot product split into partial sums on
accumulators 0, 1, 2, 3, 0, 1, … never waits. Four accumulators is the power of
two that covers the 3-cycle latency. The testbench checks both rates:

- a 64-term dot product over four accumulators takes 64 issue cycles;
- a chain on one accumulator issues exactly every 3 cycles.

### Hazard outputs

The unit tracks, for each operation still inside it, whether it writes an
accumulator and which one:

- `acc_hazard` marks accumulators whose pending write is **too young to be
  bypassed** to an operation issued now, i.e. issued fewer than n cycles ago.
  An `OP_FMACC` reading such an accumulator must wait.
- `acc_inflight` marks accumulators with **any** pending write.
  `OP_MTACC` and `OP_MFACC` wait on these, because moves do not go through the
  bypass.

## Issue, writeback and flags (`fpu_top`)

The core offers one operation per cycle on the issue port. It holds the
operation while `issue_ready` is low, and the operation is accepted in a cycle
where `issue_valid && issue_ready`. Operands are 32-bit buses; integer operands
and results use the same buses.

There is **one writeback port**, and units of different latency could finish in
the same cycle. The top keeps a reservation vector `wb_occ`, where bit k means
"a result will leave k cycles from now". An operation of latency L is accepted
only if slot L is free. Since an accepted operation of latency L occupies slot L
and then slides down by one each cycle, the port never sees two results at once
(an assertion checks this).

`issue_ready` is low for four reasons, each exercised by the end-to-end test:

| Stall | Cause |
|---|---|
| `stall_wb` | writeback slot already taken (e.g. a 4-cycle FMADD right after a 3-cycle ADD) |
| `stall_acc_raw` | FMACC reads an accumulator written by an FMACC issued < 3 cycles ago |
| `stall_acc_move` | MTACC/MFACC touches an accumulator with a write in flight |
| `stall_flags` | RDFLAGS while any operation is still in flight or completing |

**Exception status.** The exception flags of every completed operation,
accumulations included, are ORed into the sticky register `fp_status_reg`:

| Bit | Flag |
|---|---|
| 4 | invalid |
| 3 | divide-by-zero (never set) |
| 2 | overflow |
| 1 | underflow |
| 0 | inexact |

Without traps, software learns of exceptions by executing `OP_RDFLAGS`:

- It waits until nothing is in flight, so it sees every earlier operation.
- It returns the register and clears it.
- Flags that arrive in the clearing cycle are kept.

The `status` output shows the register at all times, and each writeback also
carries its own `wb_flags`.

`acc_bypass` pulses when an accumulation takes its addend from the bypass, for
performance counting.

### Operation encoding (`fpu_pkg::fpu_op_t`)

| Op | Code | Operands → result |
|---|---|---|
| ADD, SUB, MUL | 0, 1, 2 | a, b → rd |
| FMADD | 3 | a, b, c → rd |
| FMACC | 4 | a, b, acc[acc_src] → acc[acc_dst] |
| CMP | 5 | a, b → rd = {gt, eq, lt} |
| ABS | 6 | a → rd |
| F2I, I2F | 7, 8 | a → rd |
| MTACC | 9 | a → acc[acc_dst] |
| MFACC | 10 | acc[acc_src] → rd |
| RDFLAGS | 11 | → rd = status, status cleared |

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `ADD_LAT`, `MUL_LAT`, `I2F_LAT` | 3 | unit latencies |
| `FMA_MUL_STAGES`, `FMA_ADD_STAGES` | 1, 3 | multiply-add split; back-to-back latency = `FMA_ADD_STAGES` |
| `ACC_NUM` | 4 | accumulators |
| `RNE` | 1 | 1: round to nearest even, 0: truncate |
| `TAG_W` | 5 | destination register tag (32 registers) |

The hazard logic follows the parameters, so the other back-to-back latencies
are one parameter change each. To keep one accumulation per cycle, a 2-cycle
design needs 2 accumulators and a 5-cycle design 8. `tb_fp_fmadd_configs`
checks the multiply-add unit in three such configurations:

- 2 + 2 stages with 2 accumulators;
- 2 + 4 stages with 4 accumulators;
- 1 + 5 stages with 8 accumulators.

## What the design adds, and what it leaves out

Choices this design makes where the original description gives no detail:

- the issue handshake, the single writeback port and its reservation scheme;
- the operation encoding;
- clear-on-read for the flags;
- the move instructions' timing;
- the NaN rules (first NaN wins, payload kept);
- inexact on conversions;
- GT = 1 for unordered compares.

Integer-to-float: the original description speaks of dropping seven low bits
after normalisation. Going from 32 bits to 24 drops eight, and that is what
`fp_i2f` does.

Left out:

- **Divide and square root.** They were only foreseen as vendor IP blocks added
  later.
- **The pre-decoded result flags variant of the multiply-add.** It was a
  fallback in case of timing trouble.
- **The host core.** The core's issue and writeback signals are top-level ports;
  the testbench plays the core.

## Verification

Each unit has a self-checking testbench in `tb/` (`tb_<unit>.sv`). It compares
the unit against a reference model in `tb/fp_ref_pkg.sv`:

- The model works on exact 600-bit integers and rounds once. This is a different
  method from the hardware's fixed-width aligned datapaths.
- The arithmetic testbenches also check the exact latency of every result.
- The random operands are biased towards zeros, infinities, NaNs, denormals,
  near-overflow, near-underflow and equal or nearly equal values.

`tb_fpu_top` runs the whole FPU at default parameters. It acts as the core:

- It keeps an architectural model of registers, accumulators and flags, updated
  when each operation is accepted.
- Every writeback is checked for value, destination, flags and the exact cycle.
- Accumulators are checked through MFACC and flags through RDFLAGS.
- It checks the two throughput claims.
- It counts every stall kind, the bypass, each flag, the flag clear and each
  operation, and fails if any never occurs.

`tb_fpu_workloads` runs scaled-down versions of the kernels the FPU was sized
for, again at default parameters:

- a blocked matrix multiply with four dot products in parallel on the four
  accumulators, checked to sustain one accumulation per cycle;
- Sobel Gx/Gy filters, two pixels at a time;
- a 13×13 Gaussian convolution, four outputs at a time, 676 accumulations at
  one per cycle;
- scaled vector addition `F0*A + F1*B` with a multiply followed by a
  multiply-add;
- sine and cosine evaluated by Horner polynomials of multiply-adds.

Each writeback is checked bit-exactly against the model, and each kernel
result is also compared with a double precision computation.

To simulate with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fpu_top \
    -y rtl -y tb +libext+.sv rtl/fpu_pkg.sv tb/fp_ref_pkg.sv tb/tb_fpu_top.sv
./obj_dir/Vtb_fpu_top
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`. Substitute any
other `tb_*` name to run a unit test. The simulator treats values as two-state,
so every register that is read is reset or initialised.
