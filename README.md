# Carry-select adder block with a single ripple carry adder ("combine-1")

A carry-select adder hides carry-propagation delay by computing each block's
result twice, once for carry-in 0 and once for carry-in 1. The real carry-in
then only has to pick one of them. The usual block pays for this with two
ripple carry adders (RCAs). This design keeps one RCA. It gets the carry-in 1
result from the carry-in 0 result with a small increment circuit called
*combine-1*. That circuit is built from first-zero detection and selective
complement.

The RTL is a four-bit block: combinational, synthesizable SystemVerilog with
no clock or reset. `{cout, sum} = a + b + cin`.

## Structure

```
 a, b ──► rca (carry-in 0) ──{c0,s0}──┬─────────────────────► d0 ┐
                                      └─► combine1 ─{c1,s1}─► d1 ├─ select_mux ─► {cout, sum}
                                                       cin ─► sel┘
```

| Module         | Role                                                              |
|----------------|-------------------------------------------------------------------|
| `csa_pkg`      | Package holding `CSA_WIDTH = 4`, the default block size.          |
| `full_adder`   | One-bit full adder (XOR sum, majority carry).                     |
| `rca`          | `WIDTH` full adders chained carry-to-carry.                       |
| `combine1`     | Forms `{c1,s1} = {c0,s0} + 1` without an adder.                   |
| `select_mux`   | One 2:1 multiplexer per bit. `sel = 1` passes `d1`.               |
| `csa_combine1` | Top: the block above. Parameter `WIDTH`, default 4.               |

Every module has a `WIDTH` parameter that defaults to `csa_pkg::CSA_WIDTH`.
`select_mux` defaults to `CSA_WIDTH + 1`, because it carries the sum bits and
the carry-out together.

## How combine-1 works

Adding one to a binary number flips every bit from the least significant bit
up to and including the first `0`. The bits above that `0` stay as they are.
Let `k` be the position of the lowest zero in `s0`. Then:

- `s1[t] = ~s0[t]` for `t` in `0..k`
- `s1[t] = s0[t]` for `t` in `k+1..WIDTH-1`

Example at six bits:

```
 1 0 0 | 1 1 1        first zero at bit 3 (bits 0..3 are inverted)
 1 0 1 | 0 0 0

 1 1 1 1 1 1          no zero at all: every bit is inverted
 0 0 0 0 0 0 and a carry out
```

In hardware, `combine1` builds a chain of AND gates:

- `run[0] = 1`
- `run[i+1] = run[i] & s0[i]`

So `run[i]` is 1 while every bit below `i` is 1. Each bit is XORed with its
own `run[i]`: `s1 = s0 ^ run[WIDTH-1:0]`.

`run[WIDTH]` is 1 only when `s0` is all ones. That is exactly when the
increment overflows, so it becomes the carry: `c1 = c0 | run[WIDTH]`.

In a real addition, `c0 = 1` and `s0 = all ones` cannot happen together: the
largest four-bit sum is 15 + 15 = 30 = `1_1110`. So the OR never has to
combine two carries, and `{c1, s1}` is always `a + b + 1`.

`combine1` also has an immediate assertion, active in simulation, that checks
`s1 == s0 + 1` modulo `2**WIDTH`.

## Timing

The path from the operands to the output is:

RCA ripple → AND chain of `WIDTH` gates → XOR → 2:1 multiplexer

From `cin`, the path is a single multiplexer.

The block has no registers. Its latency is zero cycles.

## Chaining blocks

A wider carry-select adder is built by feeding each block's `cout` into the
next block's `cin`. No such wider adder is included here. The design this RTL
follows evaluates a single four-bit block.

## What is not modelled

The design is a custom-transistor circuit. Its claims are about power at
supply voltages of 3 V, 2 V and 1.5 V, and about area given as a transistor
count (280 transistors, against 390 for a two-RCA block). RTL cannot carry
these figures. None of them is reproduced here.

The original circuit builds each multiplexer from a two-transistor
pass-transistor cell. That cell passes a strong `0` and a weak `1`. Here it is
a logic-level 2:1 multiplexer, and how it maps to gates is left to
synthesis.

## Choices made in this RTL

- **Full adder.** The gate form of the full adder is a choice of this RTL.
- **Detector.** The AND-chain form of the zero detector is a choice of this
  RTL.
- **Bits inverted.** The inverted range includes the first zero bit itself,
  which is what makes the result `s0 + 1`.
- **Carry rule.** The carry of the carry-in 1 result is `c0 | (all ones)`.
  This is read from the rule "when all sum bits are one the detector produces
  the carry".
- **Timing.** There is no clock, reset or pipelining.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench          | What it covers                                                                                                   |
|--------------------|------------------------------------------------------------------------------------------------------------------|
| `tb_full_adder`    | All 8 input combinations.                                                                                        |
| `tb_rca`           | All 512 operand/carry combinations at 4 bits.                                                                    |
| `tb_combine1`      | All valid 4-bit inputs. All 64 inputs at `WIDTH = 6`, including the two examples above. Each first-zero position is counted. |
| `tb_select_mux`    | Walking-one patterns and 200 random vectors.                                                                     |
| `tb_csa_combine1`  | The top at its default parameters. All 512 cases, compared with `a + b + cin`.                                   |

`tb_csa_combine1` also counts how often each mechanism was exercised, and
fails if any of them never happened:

- each select value
- each first-zero position
- the all-ones case, where the detector supplies the carry
- the adder's own carry passing through the carry-in 1 path

Example, with plain Verilator:

```
verilator --binary --timing --assert -y rtl +libext+.sv \
    rtl/csa_pkg.sv tb/tb_csa_combine1.sv --top-module tb_csa_combine1
./obj_dir/Vtb_csa_combine1
```

`-y rtl +libext+.sv` lets Verilator find the submodules by file name. To change the block size, set `CSA_WIDTH` in `csa_pkg.sv`, or
override `WIDTH` on `csa_combine1`.
