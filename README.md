# Multicycle unsigned 32-bit multiplier/divider

This unit multiplies and divides 32-bit unsigned integers with one 32-bit
adder/subtractor, a 64-bit shift register and a counter. The work is spread over
many cycles, one bit per iteration. Multiply uses shift-and-add: each
iteration adds the multiplicand into the top half of the product register when
the current multiplier bit is 1, then shifts the register right. Divide uses
restoring division: each iteration shifts the register left, tries a
subtraction of the divisor from the top half, keeps it if there was no borrow,
and records the outcome as a quotient bit. Both operations use the same 64-bit
register. It starts as `{0, A}` and ends as `{hi, lo}` = product, or
`{remainder, quotient}`.

## Interface

| port     | dir | width | meaning |
|----------|-----|-------|---------|
| `clk`    | in  | 1  | clock, rising edge |
| `rst`    | in  | 1  | asynchronous reset, active high |
| `A`      | in  | 32 | multiplier (multiply) / dividend (divide) |
| `B`      | in  | 32 | multiplicand (multiply) / divisor (divide) |
| `muldiv` | in  | 1  | 0 = multiply, 1 = divide |
| `en`     | in  | 1  | one-cycle start pulse; `A`, `B` and `muldiv` are captured on this edge |
| `hi`     | out | 32 | upper product half / remainder |
| `lo`     | out | 32 | lower product half / quotient |
| `valid`  | out | 1  | result ready |

Timing, counted in rising edges from the edge that samples `en`:

* multiply: `valid` rises 65 edges later (2W + 1);
* divide: `valid` rises 67 edges later (2W + 3).

`valid` falls on the edge that accepts a new `en`. It stays high, with `hi`/`lo`
frozen, until then. While an operation runs, `hi` and `lo` show the working
register, and `en` is ignored. A new operation may start on any cycle in which
`valid` is high, or after reset. Dividing by zero is not trapped: the result is quotient
`0xFFFFFFFF` and remainder `A`.

Example (checked by the end-to-end testbench): `A=8, B=5, muldiv=0` gives
`hi=0, lo=40`. `A=15, B=6, muldiv=1` gives `hi=3, lo=2`.

## Blocks

```
A, B, muldiv, en --> muldiv_controller --> valid
                       | load/shift commands, shift_bit_in, hi_data, lo_data
                       v
                     hilo_shifter (2W bits) --> hi, lo
                       | hi
                       v
   B_reg, alu_op --> alu --> result, carryout --> muldiv_controller
 en_out, rst_out --> count6 --> count --> muldiv_controller
```

* `alu.sv` is the combinational W-bit adder/subtractor. Its `a` input is
  `hi` and its `b` input is `B_reg`. Subtraction is `a + ~b + 1`, so
  `carryout` is the carry of an add and "no borrow" (`a >= b`) of a subtract.
* `hilo_shifter.sv` is the 2W-bit register. It has separate load enables for
  `hi` and `lo`, a whole-register shift left (bit enters `lo[0]`), a
  whole-register shift right (bit enters `hi[W-1]`), and a right shift of `hi`
  alone (bit enters `hi[W-1]`). `shift_bit_in` is the entering bit in all
  three cases.
* `count6.sv` is a 6-bit iteration counter with enable and asynchronous
  reset.
* `muldiv_controller.sv` is the state machine. It holds `B_reg` and two
  one-bit flags, `bit_q` and `msb_q`.
* `muldiv_unit.sv` is the top level that wires the blocks together.
* `muldiv_pkg.sv` holds the ALU operation type and the state type.

## Multiply

The register is loaded with `{0, A}`, and `B` goes into `B_reg`. Each of the 32
iterations takes two cycles:

1. `MUL_ADD`: if `lo[0]` is 1, write `hi <= hi + B_reg` and keep the adder's
   carry out in `bit_q`. If `lo[0]` is 0, nothing is written and `bit_q` is 0.
2. `MUL_SHIFT`: shift the whole register right, entering `bit_q` at the top.
   Advance the counter.

The carry must be shifted back in because `hi + B_reg` can need 33 bits. That
33rd bit is exactly the bit that moves down into `hi[31]` on the next shift.
The add and the shift are in different cycles, so the carry is held in `bit_q`
for one cycle. By the shift cycle the adder already sees the new `hi`, so its
live carry out would be wrong.

Here is the trace for the same algorithm at W = 4, 1111 × 1111
(`tb_muldiv_4bit` checks every line):

| iteration | after add (carry, hi lo) | after shift (hi lo) |
|-----------|--------------------------|---------------------|
| 1 | 0 1111 1111 | 0111 1111 |
| 2 | 1 0110 1111 | 1011 0111 |
| 3 | 1 1010 0111 | 1101 0011 |
| 4 | 1 1100 0011 | 1110 0001 = 225 |

## Divide

The register is loaded with `{0, A}`, and then:

1. `DIV_PRE`: shift left once, entering 0. `hi` now holds the first dividend
   bit.
2. Repeat 32 times:
   * `DIV_SUB`: compute `hi - B_reg`. If the carry out is 1 (no borrow), write
     the difference into `hi`. Keep the carry out in `bit_q`: it is the next
     quotient bit.
   * `DIV_SHIFT`: shift left, entering `bit_q` at `lo[0]`. The next dividend
     bit moves from `lo[31]` into `hi[0]`. The bit pushed out of `hi[31]` is
     kept in `msb_q`. Advance the counter.
3. `DIV_FIX`: shift `hi` alone right once, entering `msb_q` at the top.

As the iterations go on, the quotient bits fill `lo` from the right while the
dividend bits leave it on the left. After the last iteration, `lo` holds the
complete quotient.

Why the extra steps:

* **The shift comes first.** Each iteration shifts before it enters its
  quotient bit. So the last shift also moves the final remainder one place
  left, and `DIV_FIX` undoes that.
* **`msb_q` exists for the final shift.** A remainder can be as large as
  `B - 1`, which needs up to 32 bits. The final left shift can push its top
  bit out of `hi`; `msb_q` catches that bit and `DIV_FIX` shifts it back in.
* **No 33-bit compare is needed.** At iteration k, the value under test is at
  most the top k bits of `A`, so it always fits in 32 bits. The carry out of
  the subtraction alone decides the compare.

## Counter and control details

* The counter is cleared through its asynchronous reset, by `rst` or by the
  controller's `rst_out`. `rst_out` is high in `IDLE` and `DONE`. It is decoded
  from the state register, so it changes only just after a clock edge, and at
  that moment the counter is not enabled. A designer who prefers no derived
  asynchronous reset can replace it with a synchronous clear inside `count6`.
* The controller pulses `en_out` once per iteration, in the shift cycle. The
  loop ends in the shift cycle where `count == W-1`.
* All controller outputs are combinational decodes of the current state and
  its inputs. Apart from the shift register, the only registers are the
  state, `B_reg`, `bit_q` and `msb_q`.
* Two concurrent assertions in the controller check two rules: at most one
  shift command per cycle, and `lo` is never written without `hi`.

## What is given and what is chosen

These parts follow the original specification of the unit:

* the top-level ports;
* the split into an adder/subtractor with a carry-out output, a 64-bit hi/lo
  shift register with the listed controls, a 6-bit counter and a
  state-machine controller;
* shift-and-add multiplication with the carry shifted in at the top.

These are this implementation's own choices:

* the states and their timing: two cycles per iteration, and therefore a
  fixed latency;
* holding the carry in a flip-flop for one cycle. The specification says to
  connect the ALU carry-out directly to the shifter's shift-in. That only works
  when the add and the shift happen in the same cycle, and this shift register
  cannot do both in one cycle.
* the restoring-division sequence, including the use of `shift_right_hi` for
  the remainder fix-up;
* the ALU operation encoding (`00` add, `01` subtract, others add). The ALU
  provides only add and subtract.
* command priority inside the shift register;
* reset values of zero;
* counter wrap-around;
* ignoring `en` while busy;
* the division-by-zero result.

The width is a parameter `W` (default 32). The counter width `CW` defaults to
`$clog2(W) + 1`, which is 6 for W = 32.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares against
values computed independently inside the testbench and prints
`TB_RESULT checks=N failures=M`.

* `tb_alu` tests corner cases and 2000 random add/subtract pairs against
  64-bit arithmetic.
* `tb_count6` runs a random enable pattern through wrap-around, and tests the
  asynchronous reset.
* `tb_hilo_shifter` issues 3000 random commands against a 64-bit arithmetic
  model. It also tests load/shift priority and the asynchronous reset.
* `tb_muldiv_controller` runs the controller against a behavioural datapath.
  It covers about 200 operations and checks results, latency, the held result
  and `en` while busy.
* `tb_muldiv_unit` is the end-to-end test at the default W = 32. It runs both
  timing-diagram examples, corner cases (all ones, divisors above 2^31,
  divide by zero, dividend 0) and 300 random operations. It also resets the
  unit in the middle of an operation. It checks the 65/67-cycle latencies. It
  counts how often each mechanism occurs and fails if any never does:
  carry-in on a shift, a skipped add, a taken and a refused subtraction, the
  remainder fix-up with its top bit restored, divide by zero, `en` while busy,
  back-to-back operations, and reset mid-operation.
* `tb_muldiv_4bit` builds the unit at W = 4. It checks the 15 × 15 trace above
  line by line, then several 4-bit divisions.

To simulate with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_muldiv_unit rtl/muldiv_pkg.sv tb/tb_muldiv_unit.sv
./obj_dir/Vtb_muldiv_unit
```

Use the same pattern for any other testbench, with the package listed first.
