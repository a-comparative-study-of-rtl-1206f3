# Modified carry select adder with a binary to excess-1 converter

An 8-bit adder that gets most of the speed of a carry select adder while
using fewer gates than one. A carry select adder cuts the carry chain in two:
the lower half adds as usual, and the upper half is computed in advance for
both possible carries out of the lower half. When the lower carry arrives, a
multiplexer picks the right upper result. The carry then only has to cross
half the bits and a multiplexer, not the whole word.

The regular form of this adder has two ripple carry adders (RCAs) in the upper
half, one for a carry in of 0 and one for 1. This design keeps only the
carry-0 RCA. It gets the carry-1 result by adding one to the carry-0 result
with a binary to excess-1 converter (BEC), using `A + B + 1 = (A + B) + 1`.
An incrementer needs no full adders: each bit is flipped when every bit
below it is 1. That saves area for a small extra delay after the upper RCA.

## Structure

```
 a[3:0],b[3:0],cin ──► rca #(4) ──────────────────────────► sum[3:0]
                            │ c_lo (select)
                            ▼
 a[7:4],b[7:4],0 ──► rca #(4) ──{c0,s0}──┬────────────► d0 ┐
                                         └► bec #(5) ─► d1 ┤ csel_mux #(5) ─► {cout, sum[7:4]}
```

| Module       | File              | What it is |
|--------------|-------------------|------------|
| `mcsla`      | `rtl/mcsla.sv`    | Top: the WIDTH-bit modified carry select adder (default 8) |
| `rca`        | `rtl/rca.sv`      | N-bit ripple carry adder, a chain of `full_adder`s (default 4) |
| `full_adder` | `rtl/full_adder.sv` | `s = a^b^ci`, `co = ab + (a+b)ci` |
| `bec`        | `rtl/bec.sv`      | N-bit binary to excess-1 converter, `x = b + 1 mod 2^N` (default 4) |
| `csel_mux`   | `rtl/csel_mux.sv` | N-bit 2:1 select multiplexer (default 5) |

Everything is combinational. There is no clock, reset, register or
handshake: `sum` and `cout` are valid one propagation delay after `a`, `b`
and `cin` change.

## The excess-1 converter

For 4 bits the converter is

```
x0 = ~b0
x1 = b1 ^ b0
x2 = b2 ^ (b0 & b1)
x3 = b3 ^ (b0 & b1 & b2)
```

one inverter, two AND gates (the AND terms are chained, each reusing the
previous one) and three XOR gates. `bec` generalises this to N bits as
`x[i] = b[i] ^ (b[0] & ... & b[i-1])`.

The carry of the carry-1 path needs care. Adding one to the upper sum can
overflow, and when it does the carry out must become 1. This design feeds the
converter one bit more than the upper half, `{c0, s0}`, so that the carry out
is incremented together with the sum (`bec #(5)` in the 8-bit adder). The
result's top bit equals `c0 | (&s0)`. The wrap cannot go past bit 4: if `s0`
is all ones then `c0` is 0, because the two 4-bit operands summed to exactly
15.

## Parameters

`mcsla #(WIDTH)` splits the word at `LO = WIDTH/2`. The upper half gets
`HI = WIDTH - LO` bits, so odd widths put the extra bit in the upper half.
The converter and multiplexer are `HI+1` bits wide. WIDTH = 8 is the design
point. Larger widths work and are tested, but they keep the single two-block
split. They do not become a multi-stage (square-root) carry select adder.

## Where this RTL departs from, or adds to, the circuit it models

- The adder was designed as a transistor-level circuit, with the select
  multiplexers built from transmission gates. Here the multiplexer is its
  logic function, `y = sel ? d1 : d0`. Transistor counts, delay, supply
  voltage and clock rate depend on the circuit and process, and nothing in
  this RTL reproduces them.
- The `cin` input of the whole adder is an addition; the circuit takes only
  two operands. Tie `cin` to 0 for a plain `a + b`.
- The carry out of the carry-1 path comes from the widened converter
  described above. This is a choice of this RTL.
- Only the modified adder is given. The regular dual-RCA carry select adder
  it improves on is not included.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares outputs
with integer arithmetic, prints `TB_RESULT checks=N failures=M` and stops
itself with a watchdog.

| Testbench          | Coverage |
|--------------------|----------|
| `tb_full_adder`    | all 8 input combinations |
| `tb_rca`           | every input of the 4-bit RCA, 2000 random 16-bit additions |
| `tb_bec`           | every input of the 4-bit and 5-bit converters |
| `tb_csel_mux`      | 200 random vectors, both select values |
| `tb_mcsla`         | all 2^17 operand and carry-in combinations at the default 8 bits |
| `tb_mcsla_widths`  | 20000 random additions at 9, 16 and 32 bits, plus all-ones corner cases |

`tb_mcsla` also counts how often each path was taken. The carry-0 result was
selected 65536 times and the converter's result 65536 times. The converter's
increment carried into `cout` 4096 times. The test fails if any of these
counts is zero.

To run one, for example the end-to-end test:

```
verilator --binary --timing --assert -Wall --top-module tb_mcsla tb/tb_mcsla.sv rtl/*.sv
./obj_dir/Vtb_mcsla
```

All testbenches pass, and all modules lint cleanly with `verilator -Wall`.
The 8-bit adder synthesises to 53 gate-level cells in a generic flow
(18 AND, 14 OR, 19 XOR, 1 NOT, one 5-bit multiplexer).
