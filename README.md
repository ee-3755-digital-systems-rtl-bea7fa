# AHPL register-transfer designs in SystemVerilog

AHPL (A Hardware Programming Language) describes a digital system as a
numbered sequence of control steps. Each step performs register transfers
(`A <- B`), drives outputs (`z = 1`), and names the step that follows
(`-> (cond)/(k)`). A design written this way splits into two parts:

* a **control part**, the *hardwired controller*, with one flip-flop per
  step. The flip-flop outputs are the control state lines CSL1, CSL2, ...,
  and exactly one of them is high at any time;
* a **data part**: registers, combinational logic units (CLUNITs such as
  adders and incrementers) and buses. The CSL lines decide which register
  loads and which source each bus takes.

This repository implements the classic teaching examples for that method:

| design | module | what it does | clocks per operation |
|---|---|---|---|
| data selector ("system B") | `data_selector` | forwards a 12-bit word unless the AND of its three nibbles is zero | 8 (dropped) / 10 (forwarded) |
| conditional-transfer system, 6 steps | `cond_seq6` | b/c-selected transfers on A, B, D after a start pulse | 4 or 5 from start to `z` |
| same system, 3 steps | `cond_seq3` | the same effect, using conditional transfers | 2 from start to `z` |
| unsigned multiplier, 5 steps | `unsigned_mult5` | 16x16 shift-and-add | 34 + (number of 1s in X) |
| unsigned multiplier, 3 steps | `unsigned_mult3` | 16x16, one add/shift per clock | 18 |
| Booth multiplier, 7 steps | `booth_mult7` | 16x16 two's complement, radix-2 Booth | 34 + 2 x (01/10 bit pairs) |
| Booth multiplier, 3 steps | `booth_mult3` | 16x16 Booth, one cycle per bit | 18 |
| CLUNITs | `ahpl_adder`, `ahpl_incrementer`, `ahpl_decrementer`, `ahpl_decoder`, `ahpl_comparator` | combinational building blocks | - |

`ahpl_top` places all of them side by side. The designs are independent.
They share only `clk` and `rst`, and each keeps its own ports, named with a
prefix (`ds_`, `c6_`, `c3_`, `u5_`, `u5a_`, `u3_`, `b7_`, `b3_`, `dcd_`,
`dec_`, `cmp_`).

## Reading the RTL: bit numbers and control lines

**Bit numbering.** AHPL numbers bits from the left: `X[0]` is the most
significant bit. Every vector here is declared with an ascending range,
such as `logic [0:15] x`. This keeps the indices the same as in the AHPL
descriptions: `A[0:15]` is the upper half of a 32-bit `A`, and `A[31]` is its
least significant bit. Verilator reports these declarations as ASCRANGE
style warnings. They are intended.

**Controllers.** Each sequential module has a vector `csl[1:K]` of one-hot
step flip-flops. Each flip-flop's next-state equation is the OR of the
conditions that lead to that step. For example, step 2 of the 5-step
multiplier is entered from step 1, or from step 4 while the count is not
finished:
`csl[2] <= csl[1] | (csl[4] & ~cnt_full)`. An assertion in every module checks
that `csl` stays one-hot. `csl` is also a module output. That is how a user,
or a testbench, knows when an output is valid.

**Transfers.** The classic drawings of this style AND each register's clock
with its CSL lines. Here every register is clocked by `clk` and has a clock
enable built from the same lines. A transfer with a condition on the left,
`A * f <- B`, becomes `if (csl[k] && f) a <= b;`. A condition on the right,
`A <- (B ! C) * (g, h)`, becomes a 2-way multiplexer.

**Outputs.** Outputs named in a step (`Z = A` in the last step of a
multiplier, `Z = OUTREG` in the data selector) are AND-gated by that step's
CSL line. They read 0 in every other clock.

**Reset.** A synchronous, active-high `rst` sets every controller to step 1
and clears the registers. The AHPL descriptions define no reset. This one is
added so that simulation and silicon start from a known state.

## The data selector

System B sits between a sender A and a receiver C. In step 1 it raises
`inready` for one clock. The sender must present the 12-bit word on `x` in
the next clock (step 2), when it is stored in `INREG`. Steps 3-4 AND the
three 4-bit fields together into `A[0:3]`. Steps 5-7 OR the four bits of `A`
into the flip-flop `S`, one step per bit. Step 8 branches:

* `S = 0`: the word is dropped and control returns to step 1. This takes
  8 clocks in total.
* `S = 1`: step 9 copies the word to `OUTREG` and raises `outready`. Step 10
  drives it on `z` for one clock. This takes 10 clocks in total.

## Conditional transfers: six steps versus three

The six-step system waits in step 1 for `a = 1`. It then tests `b` and `c` and
applies some of three transfers, in this order:

| b c | transfers |
|---|---|
| 0 x | `D <- A & B`, then `A <- X ^ B` |
| 1 0 | `B <- X \| B`, then `A <- X ^ B` |
| 1 1 | `B <- X \| B`, then `D <- A & B`, then `A <- X ^ B` |

Finally it raises `z` for one clock. `cond_seq3` performs all of this in one
clock. It feeds each later transfer the new value of `B`, `X | B`, instead
of the old one:

```
B * b          <- X | B
D * ~(b & ~c)  <- b ? A & (X | B) : A & B
A              <- b ? X ^ (X | B) : X ^ B
```

D keeps its value only for `b = 1, c = 0`. This follows the six-step
sequence, which skips `D <- A & B` in exactly that case. Three steps is the
minimum: one clock to see `a`, one to do the transfers and one for the `z`
pulse. `X`, `b` and `c` should be held from the `a` pulse until `z`.
`cond_seq6` samples them in steps 2, 3 and 5.

Both modules bring out `a_q`, `b_q` and `d_q`, the contents of A, B and D,
so that the result can be seen. The AHPL system itself has only `z` as
output.

## The multipliers

All four multipliers take `x` (the multiplier) and `y` (the multiplicand) in
step 1 and give the product on `z` while the last CSL line is high. They run
freely: step 1 follows the last step at once, so hold `x`/`y` stable, or
change them only while `csl[1]` is high. The register `A` holds the partial
product in its left half and the not-yet-used multiplier bits in its right
half. `CNT` (4 bits) counts the 16 cycles. The loop test looks at `CNT`
*before* it is incremented: the loop exits in the cycle where `CNT` is all
ones, which is the 16th.

**Unsigned, five steps (`unsigned_mult5`).**

```
1  c, A[0:15] <- 0;  A[16:31] <- X;  B <- Y;  CNT <- 0
2  goto (A[31] ? 3 : 4)
3  c, A[0:15] <- ADD(A[0:15]; B; 0)
4  c, A <- 0, c, A[0:30];  CNT <- CNT + 1;  goto (CNT == 1111 ? 5 : 2)
5  Z = A;  goto 1
```

The carry flip-flop `c` catches the adder's carry out, and the shift in
step 4 moves it into `A[0]`. Parameter `CNT_ON_ADDER = 1` selects a variant
that has no incrementer. In step 4, when the adder is otherwise idle, `CNT`
is counted through the main adder: `0...0,CNT + 0...01`, keeping the low
4 bits. Both variants behave identically clock for clock.

**Unsigned, three steps (`unsigned_mult3`).** Steps 2-4 are folded into one.
If `A[31] = 1`, the 17-bit sum `ADD(A[0:15]; B; 0)` is written one place to
the right, followed by `A[16:30]`. Otherwise `A` is only shifted. As a
result `c` is always 0: it is kept as a register but is not needed.

**Booth, seven steps (`booth_mult7`).** `A` has 33 bits. The extra bit
`A[32]` sits to the right of the multiplier and starts at 0. The pair
`A[31], A[32]` selects the operation:

| A[31] A[32] | action |
|---|---|
| 0 0, 1 1 | shift only |
| 0 1 | `A[0:15] <- A[0:15] + B` |
| 1 0 | `A[0:15] <- A[0:15] + ~B + 1` (subtract) |

Each cycle ends with an arithmetic right shift of all 33 bits
(`A <- A[0], A[0:31]`). The test (step 2), the choice between add and
subtract (step 3), the add (4), the subtract (5) and the shift (6) are
separate steps. A cycle therefore takes 2 clocks without an add and 4 with
one.

**Booth, three steps (`booth_mult3`).** In one clock the adder receives
`A[0:15]`, `B` or `~B`, and carry-in `A[31]`. When the pair differs, the
16-bit sum is written to `A[1:16]`, its sign bit is copied into `A[0]`, and
`A[16:31]` moves to `A[17:32]`. Together these form the arithmetic shift of
the new partial product.

**Known limitation: Booth with Y = -32768.** The Booth accumulator `A[0:15]`
is only 16 bits wide, so adding or subtracting the multiplicand -32768 can
overflow it. For example, 1 x -32768 computes 0 - (-32768) = +32768, which
does not fit. Both Booth modules therefore give a wrong product when
`y = 16'h8000` and `x` is non-zero. Every other pair of operands gives the
exact 32-bit product. A 17-bit accumulator would remove the limitation. That
would depart from the register sizes these designs are built around, so it
was not done.

## Combinational units

* `ahpl_adder #(N)`: `add[0:N] = a + b + cin`. `add[0]` is the carry out and
  `add[1:N]` is the sum.
* `ahpl_incrementer #(N)`: `x + 1` modulo 2^N. All ones wraps to zero.
* `ahpl_decrementer #(N)`: `x - 1` modulo 2^N. It is built as an adder with
  the all-ones vector and carry-in 0.
* `ahpl_decoder #(N)`: `dcd[i] = (x == i)`. `dcd[0]` is the leftmost line.
* `ahpl_comparator #(N)`: `comp[0:2]` is `100` when a > b, `010` when
  a = b and `001` when a < b. The operands are unsigned.

## Simulation

Every file in `rtl/` holds one module. Each `tb/tb_<module>.sv` is a
self-checking testbench. It computes the expected results itself, checks
values and clock counts, and prints `TB_RESULT checks=N failures=M`.
`tb_ahpl_top` runs all the designs at once at their default sizes. It also
counts each mechanism: words forwarded and dropped, every `b,c`
combination, add, subtract and shift-only cycles, and comparator outcomes.
It fails if any of these never happens.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    --top-module tb_ahpl_top tb/tb_ahpl_top.sv
./obj_dir/Vtb_ahpl_top
```

Replace `tb_ahpl_top` with any other testbench name to test one block. Each
run finishes in well under a second. For `y = 16'h8000` the Booth
testbenches compare the result with a bit-level model of the 16-bit
accumulator, because of the limitation described above. `tb_ahpl_top`
avoids that operand.

## Choices made in this implementation

* Gated register clocks are replaced by clock enables.
* The synchronous reset, the `csl` outputs and the register outputs of the
  conditional-transfer systems are additions.
* Branch conditions follow what each algorithm needs:
  * the unsigned multipliers add when `A[31] = 1`;
  * the Booth multipliers shift only when `A[31] = A[32]`, and subtract with
    `~B` and carry-in 1;
  * all loops run exactly 16 times.
* Default parameter values follow the problem statements: 16-bit
  multipliers, a 12-bit data selector and 8-bit conditional systems. The
  CLUNIT defaults (`N` = 16, 4, 4, 3 and 8) match where each unit is used in
  the top.
