# Floating-point coprocessor with a configurable pipeline

A small processor that spends most of its life in a low-power, low-clock mode still needs a
deep pipeline in its floating-point units for the short bursts when it must run at full
speed. Pipeline flip-flops cost power: they and their clock tree toggle on every cycle. At a
low clock frequency the combinational logic is fast enough without them, so they only add
latency and burn clock power.

This design gives every pipeline register of the FP adder and the FP multiplier a **bypass**.
A multiplexer after each flip-flop selects either the registered value or the flip-flop's input.
When the bypass is on, the unit becomes purely combinational and its pipeline clock is gated
off: the registers are frozen and toggle nothing. When it is off, the unit is an ordinary
pipeline that accepts one operation per clock. The two modes give bit-identical results and
differ only in latency.

Software does not need to know which mode a unit is in. The coprocessor uses **register
locking**: issuing an instruction locks its destination register until the result is written
back, and any later instruction that reads a locked register waits. Because the latency of a
unit is never built into the issue logic, it can change at run time: 4 cycles or 0 for the
adder, 3 or 0 for the multiplier.

The RTL is a single-precision (IEEE-754 binary32) coprocessor. It decodes a subset of the RISC-V
F extension and contains:

| unit | module | latency (cycles from issue to result) | throughput |
|---|---|---|---|
| add / subtract | `fp_add` | 4 pipelined, 0 bypassed | 1 per clock |
| multiply | `fp_mul` | 3 pipelined, 0 bypassed | 1 per clock |
| divide | `fp_div` | 9 | 1 per clock |
| square root | `fp_sqrt` | 12 | 1 per clock |
| integer to float | `int2float` | 1 | 1 per clock |
| float to integer | `float2int` | 1 | 1 per clock |
| compare | `fp_cmp` | 1 | 1 per clock |
| register moves | in `fpu_top` | 1 | 1 per clock |

## Block diagram

```
             instr, int_rs1                         bypass_add_req  bypass_mul_req
                  |                                        |               |
             +----v-----+   rs1/rs2/rd   +----------+   +--v--------+  +---v-------+
             | fp_decode|--------------->| reg_lock |   |bypass_ctrl|  |bypass_ctrl|
             +----+-----+                +----+-----+   +--+--------+  +---+-------+
                  | unit, rd         hazard   |  ^ clear   | mode/pending  |
                  v                           v  |         |               |
   instr_ready <--+-- issue = valid & legal & !hazard & !pending(unit)     |
                  |                              |         |               |
             +----v-------+  rdata[0], rdata[1]  |         v               v
             | fp_regfile |---+----+----+----+---|----+ fp_add(4)       fp_mul(3)
             | 32 x 32    |   |    |    |    |   |    |  ranks of        ranks of
             |  6 write   |  div  sqrt f2i  cmp  |    |  bypass_reg      bypass_reg
             |  ports     |  (9)  (12) (1)  (1)  |    |  + clock_gate    + clock_gate
             +----^-------+   |    |    |    |   |    |       |               |
                  |           |    |    +----+---|----+-> int_wb_* (integer results)
                  +-----------+----+-------------+----------- +---------------+
                  write-back (one port per FP-result unit, also clears the lock)
```

## The configurable pipeline

`bypass_reg` is one pipeline rank: a flip-flop of width `W` and a 2:1 multiplexer,
`q = bypass ? d : ff`. The FP adder and multiplier cut their datapath into stages and end each
stage with one `bypass_reg` that carries a packed struct. The struct holds the stage's data, a
valid bit and the 5-bit destination tag, so control and data always see the same latency.

| stage | `fp_add` | `fp_mul` |
|---|---|---|
| 1 | special cases (NaN, infinity), swap so that \|a\| >= \|b\|, exponent difference | unpack with subnormals normalised, 24x24 significand product, exponent sum, special cases |
| 2 | align the smaller significand (guard, round, jammed sticky bit), add or subtract | normalise the 48-bit product to 27 bits + sticky |
| 3 | normalise (carry-out right shift, or leading-zero left shift) | round to nearest-even, pack |
| 4 | round to nearest-even, pack | - |

All ranks of a unit share one bypass signal. `clock_gate` feeds the ranks a gated clock,
`gclk = clk & en_latched`, with `en = !bypass`. The enable is captured by a latch that is
transparent while `clk` is low, so a change of `bypass` never truncates a clock pulse. Lint
reports the latch in `clock_gate`; it is intended. The flip-flops have an asynchronous reset,
so their valid bits are cleared even while the clock is gated.

In bypass mode the whole unit is one long combinational path. It is meant to be used with a
clock slow enough for that path: the full-speed clock is for pipelined mode. Nothing in the RTL
enforces the pairing of mode and clock frequency; it belongs to whoever sets the clock.

### Changing the mode safely

An operation inside the pipeline when the mode flips would either vanish (pipelined to bypassed)
or come out a second time from the frozen registers (bypassed to pipelined). `bypass_ctrl`
therefore works as follows:

1. `bypass_*_req` differs from the applied mode, so `pending` goes high.
2. The issue logic stops sending instructions to that unit. Other units keep running.
3. When the unit reports `busy = 0` (no valid bit in any rank), the new mode is applied at the
   next clock edge. In practice that is at most 4 cycles for the adder and 3 for the multiplier.

The applied modes are visible on `bypass_add` and `bypass_mul`. After reset both units are
pipelined.

## Register locking and issue

`reg_lock` keeps one lock bit per FP register:

* **issue** of an instruction with an FP destination sets the lock of `rd`;
* **write-back** of a result clears the lock of its register. Each FP-result unit has its own
  clear port and its own register-file write port;
* a lock that is set and cleared in the same cycle ends up clear. This is the case of a
  bypassed unit, which issues and writes back in the same cycle;
* the offered instruction is **stalled** (`instr_ready = 0`) if any FP register it reads,
  **or its FP destination**, is locked.

The destination check goes beyond "wait only for operands". A single lock bit cannot tell two
pending writes apart, and a fast unit could otherwise write a register before a slow unit that
was issued earlier. With this check at most one write to any register is ever in flight. As a
result:

* every FP-result unit can have its own register-file write port with no arbitration;
* no write-back is ever refused, so the units need no back-pressure.

Operands are read in the issue cycle and there is no forwarding. A dependent instruction is
accepted `latency + 1` cycles after its producer:

| producer | pipelined | bypassed |
|---|---|---|
| FADD/FSUB | 5 | 1 |
| FMUL | 4 | 1 |
| FDIV | 10 | - |
| FSQRT | 13 | - |
| FCVT.S.W, FMV.W.X | 2 | - |

Independent instructions issue one per clock. For example, the six products of a 3x3
determinant issue on six consecutive cycles in pipelined mode.

Integer results are not locked here: FCVT.W.S, FEQ/FLT/FLE and FMV.X.W all take one cycle and
leave on `int_wb_valid/int_wb_rd/int_wb_data` one cycle after issue. Writing them into the
integer register file, and the integer-side locking, belong to the integer pipeline.

## Number format

* IEEE-754 binary32, round to nearest, ties to even, for all arithmetic and for int-to-float.
* Subnormal operands and results are fully supported (gradual underflow). Overflow gives
  infinity.
* Every NaN result is the canonical quiet NaN `0x7FC00000`. Invalid operations give NaN:
  inf - inf, 0 x inf, 0/0, inf/inf, and the square root of a negative number.
* The square root of -0 is -0.
* Float-to-int truncates toward zero and saturates with the RISC-V values. NaN gives the
  largest positive integer. For the unsigned conversion, negative inputs give 0.
* Compares treat +0 and -0 as equal and are false whenever an operand is NaN.
* No exception flags are kept.

`fp_pkg::round_pack()` is the single rounding routine. It takes a 27-bit significand with its
leading one at bit 26 (the low three bits are guard, round and a jammed sticky bit), an extra
sticky flag, the sign and an unbiased exponent. Results below the normal range are
right-shifted into the subnormal range before rounding, so a carry from rounding can promote
a subnormal to the smallest normal number.

### Divider and square root

`fp_div` uses radix-2 restoring division:

* Stage 1 normalises the operands and resolves the special cases.
* Stages 2 to 8 each compute 4 quotient bits. The 28 bits give floor(ma * 2^27 / mb) for
  significands ma and mb.
* Stage 9 takes the sticky bit from the remainder, normalises the quotient, which lies in
  (1/2, 2), and rounds.

`fp_sqrt` uses a digit-by-digit integer square root:

* Stage 1 makes the exponent even by moving a factor of two into the significand. The
  radicand is then `man * 2^29` or `man * 2^30`.
* Stages 2 to 11 each compute 3 root bits, 30 in all. The low 27 bits form a root in
  [2^26, 2^27).
* Stage 12 takes the sticky bit from the final remainder and rounds.

Neither unit has a bypass. They accept one operation per clock.

## Instruction interface

An instruction is transferred in a cycle where `instr_valid` and `instr_ready` are both high.
`int_rs1` carries the integer operand of FCVT.S.W[U] and FMV.W.X. Words outside the supported
set are accepted, flagged on `illegal` for that cycle, and dropped. The rounding-mode field is
ignored.

| instruction | funct7 | rs2 | funct3 | unit |
|---|---|---|---|---|
| FADD.S / FSUB.S | 0000000 / 0000100 | rs2 | any | fp_add |
| FMUL.S | 0001000 | rs2 | any | fp_mul |
| FDIV.S | 0001100 | rs2 | any | fp_div |
| FSQRT.S | 0101100 | 0 | any | fp_sqrt |
| FEQ.S / FLT.S / FLE.S | 1010000 | rs2 | 010 / 001 / 000 | fp_cmp |
| FCVT.W.S / FCVT.WU.S | 1100000 | 0 / 1 | any | float2int |
| FCVT.S.W / FCVT.S.WU | 1101000 | 0 / 1 | any | int2float |
| FMV.X.W | 1110000 | 0 | 000 | move |
| FMV.W.X | 1111000 | 0 | 000 | move |

All use the major opcode 1010011. `busy` is high while any FP register is locked. `dbg_raddr`
and `dbg_rdata` are a side read port of the register file.

## What this design adds, and where it departs from its source

The source description is a master's project report on configurable pipelines for FP
accelerators. These points follow it:

* the set of units and their pipeline depths: adder 4, multiplier 3, divider 9, square root 12,
  conversions 1;
* a bypass multiplexer on every pipeline register of the adder and the multiplier, and a
  0-cycle latency when bypassed;
* the clock gated by the bypass signal;
* identical results in both modes;
* register locking of destination registers.

These are choices made here, where the source is silent:

* all arithmetic details: the stage contents, the algorithms, rounding, NaN handling and
  subnormal handling. Subnormals are handled because the source's examples compute with them;
* the RISC-V subset and its encoding, and the integer-side ports;
* the drain-then-switch mode protocol;
* the destination-register lock check;
* reset values and the compare unit's exact operations.

Known departures:

* **Pipeline depths.** The report gives the adder a 4-stage and the multiplier a 3-stage
  pipeline in its architecture chapter. Its simulation chapter quotes latencies of 3 and 4
  cycles respectively. This design follows the architecture chapter.
* **Square root of a negative number.** One of the report's example results returns the
  (negative) input unchanged. This design returns NaN, as IEEE-754 requires.
* **Destination check.** The report stalls "only" on source registers. This design also stalls
  on a locked destination, for the reason given above.
* **One clock for all units.** The report's wider context runs each accelerator in its own
  clock and voltage domain (DVFS, globally asynchronous). Here all units share one clock, and
  there are no clock-domain crossings or level shifters. A unit's speed setting shows up only
  through its pipeline mode.
* **Not included:** the integer RISC-V pipeline that hosts the coprocessor; FP loads and
  stores (FMV.W.X is used to fill registers); fused multiply-add, sign injection, min/max and
  exception flags; the supply and clock generation for voltage scaling.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>.sv`. Each ends with the
line `TB_RESULT checks=N failures=M`.

**Reference model.** `tb/fp_ref_pkg.sv` computes expected results independently of the RTL:

* binary32 operands are converted exactly to double precision;
* the operation is performed in double precision;
* the result is rounded back to binary32 with round to nearest, ties to even, and subnormals.

For +, -, x, / and square root this double rounding is exact, because 53 >= 2 x 24 + 2.

**Unit testbenches.**

* The arithmetic unit testbenches send 20,000 random operations back to back or with gaps.
  Operands are biased toward subnormals, infinities, NaNs, values near overflow and underflow,
  and close exponents, which cause cancellation.
* Each checks every result bit for bit, its tag, and its exact latency.
* The adder and multiplier testbenches also run in bypass mode. They check that the result
  appears in the same cycle and that the frozen registers do not change.

**Coprocessor testbench.** `tb_fpu_top` runs at full size:

* It checks the issue distances in the table above.
* It runs 20,000 random instructions. A few registers are shared, so stalls are frequent, and
  mode switches are requested at random while instructions are in flight.
* It compares every integer result, and the whole register file after each batch, with an
  in-order model (`tb/fpu_isa_pkg.sv`).
* It fails if a mechanism never occurred: lock stalls, mode-switch stalls, both switch
  directions for both units, same-cycle bypassed write-backs, several write-backs in one cycle,
  every unit, or an illegal instruction.

**Determinant testbench.** `tb_lda_det` runs the determinant of a 3x3 matrix in all four
pipeline configurations. This is the kernel of linear discriminant analysis: six products,
three differences, three products and two sums. It checks the determinant, and checks the
cycle in which every instruction is accepted against a schedule computed from the unit
latencies. Measured from the first register load to the last write-back, the kernel takes:

| adder | multiplier | cycles |
|---|---|---|
| pipelined | pipelined | 36 |
| bypassed | pipelined | 27 |
| pipelined | bypassed | 34 |
| bypassed | bypassed | 24 |

These are cycle counts, not time. In bypass mode the clock must be slower.

Assertions in the RTL check three rules:

* a write-back only to a locked register, and no double lock (`reg_lock`);
* no two write ports on one register (`fp_regfile`);
* no mode change while the unit is busy (`bypass_ctrl`).

### Running a testbench with Verilator

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/fpu_isa_pkg.sv tb/tb_fpu_top.sv \
    --top-module tb_fpu_top -o sim
./obj_dir/sim
```

Replace `tb_fpu_top` with any other testbench. Unit testbenches need only `rtl/fp_pkg.sv` and
`tb/fp_ref_pkg.sv` ahead of them, and the library path finds the rest. Every testbench
finishes in well under a second.

## Files

* `rtl/fp_pkg.sv`: shared types, instruction/unit enums, unpack and rounding helpers.
* `rtl/fpu_top.sv`: the coprocessor top.
* `rtl/fp_decode.sv`, `rtl/reg_lock.sv`, `rtl/fp_regfile.sv`, `rtl/bypass_ctrl.sv`: decode,
  locking, register file, mode control.
* `rtl/bypass_reg.sv`, `rtl/clock_gate.sv`: the configurable pipeline rank and its clock gate.
* `rtl/fp_add.sv`, `rtl/fp_mul.sv`, `rtl/fp_div.sv`, `rtl/fp_sqrt.sv`, `rtl/int2float.sv`,
  `rtl/float2int.sv`, `rtl/fp_cmp.sv`: execution units.
* `tb/`: testbenches, the double-precision reference (`fp_ref_pkg.sv`) and the in-order
  instruction model (`fpu_isa_pkg.sv`).
