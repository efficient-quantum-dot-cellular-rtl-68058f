# A ripple-carry adder built from three- and five-input majority gates

In quantum-dot cellular automata (QCA), the basic logic element is not the
NAND gate but the **majority gate**: its output follows the value that most of
its inputs hold. The inverter is the only other primitive. AND and OR are
majority gates with one input tied to 0 or 1. An adder that needs fewer
majority gates needs fewer cells and less area.

This design uses a **five-input majority gate** to reduce the full adder to
three primitives: one three-input majority gate, one five-input majority gate
and one inverter. It chains 128 of these full adders into a 128-bit
ripple-carry adder. The adder is then used as the accumulation element of a
4-tap FIR filter and of a second-order IIR filter.

The RTL describes the logic of the majority-gate network. It does not describe
the QCA cell layout or its four-phase clocking. Synthesized for an FPGA or a
CMOS library, it is an ordinary 128-bit adder and two filters. Its structure
follows the gate-level description of the majority-gate design.

## The two majority gates

| module    | function |
|-----------|----------|
| `qca_mg3` | `y = ab + bc + ac`: 1 when at least two of three inputs are 1 |
| `qca_mg5` | `y` = OR of the ten three-input products of `a..e`: 1 when at least three of five inputs are 1 |

Tie one input of `qca_mg3` to 0 and it is an AND gate. Tie that input to 1
and it is an OR gate. `qca_mg5` depends only on how many of its inputs are 1:

| ones among a..e | 0 | 1 | 2 | 3 | 4 | 5 |
|-----------------|---|---|---|---|---|---|
| y               | 0 | 0 | 0 | 1 | 1 | 1 |

## The full adder (`qca_fa5`): why two gates are enough

```
cout = MG3(a, b, cin)
sum  = MG5(a, b, cin, ~cout, ~cout)
```

The carry is the majority of the three input bits. The sum needs a parity,
which a single majority gate cannot produce. The trick is to feed the
**inverted carry into two inputs** of the five-input gate, so that it counts
twice. Let `k = a + b + cin`:

| k | cout | ones seen by MG5 | sum |
|---|------|------------------|-----|
| 0 | 0    | 0 + 2 = 2        | 0   |
| 1 | 0    | 1 + 2 = 3        | 1   |
| 2 | 1    | 2 + 0 = 2        | 0   |
| 3 | 1    | 3 + 0 = 3        | 1   |

When `k` is 0 or 1, the doubled `~cout` adds two ones. This pushes `k = 1` over
the threshold of three but leaves `k = 0` below it. When `k` is 2 or 3, the
doubled `~cout` adds nothing, so only `k = 3` reaches the threshold. The result
is `sum = k mod 2`.

A single inverter drives both inputs. The cell therefore has three primitives,
compared with the three majority gates and two inverters of the best
three-input-gate full adders. Only the gate count comes from the source design.
This input assignment is the standard one for that count and is this
implementation's reading of it.

## The 128-bit adder (`qca_adder`)

`qca_adder #(WIDTH = 128)` is a chain of `WIDTH` `qca_fa5` cells. Carry
`i + 1` is the `cout` of cell `i`. The `cin` port feeds cell 0, and the `cout`
port is the carry out of cell `WIDTH-1`:

```
{cout, sum} = a + b + cin
```

The adder is purely combinational. Each bit adds one `qca_mg3` to the carry
path, and the last sum bit adds one `qca_mg5` after the final carry. In QCA the
clock zones would also pipeline this path. That clocking is physical and is not
modelled here, so the RTL has no adder latency and no registers. The
128-bit instance has 128 three-input gates, 128 five-input gates and 128
inverters.

## The filters

The 128-bit adder is also used inside a 4-tap FIR filter and an IIR filter. The
source gives the filters only by name, with the tap count for the FIR. Their
structure and coefficients are this implementation's choices. All filter
arithmetic is 128-bit two's complement and wraps modulo 2^128. The multiplier
coefficients are constant parameters, and each product is a constant
multiplication written with `*`. All additions go through `qca_adder`
instances, with carry in 0 and carry out unused.

**`qca_fir #(WIDTH = 128, TAPS = 4, COEF = '{1, 3, 3, 1})`**

```
y[n] = C0*x[n] + C1*x[n-1] + C2*x[n-2] + C3*x[n-3]
```

A delay line holds `x[n-1] .. x[n-3]`. The four products are summed by a chain
of `TAPS-1` = 3 majority-gate adders.

**`qca_iir #(WIDTH = 128, B = '{2, 1}, A = '{1, -1})`**: direct form I, second
order:

```
y[n] = B0*x[n] + B1*x[n-1] + A0*y[n-1] + A1*y[n-2]
```

The signs of the feedback coefficients are folded into `A`, so the recursion
needs only additions: three majority-gate adders. The "4-tap" of the source is
read here as four coefficients.

### Handshake and timing (both filters)

- A sample is accepted on a rising `clk` edge when `in_valid` is 1.
- On that edge the histories shift and `y_out` is loaded with the output for
  that sample.
- `out_valid` is 1 in the following cycle only. The latency is one cycle, and
  the filter can accept one sample per cycle.
- When `in_valid` is 0, all state holds, including `y_out`.
- `rst_n` is synchronous and active low. It clears the histories, `y_out` and
  `out_valid`.

The source specifies none of this handshake, reset or register placement.

## Top level (`qca_top`)

`qca_top #(WIDTH = 128)` places the three units side by side, as they are
evaluated: the stand-alone adder, the FIR filter and the IIR filter. Each has
its own ports. The two filters share `clk` and `rst_n`.

| ports | unit |
|-------|------|
| `add_a`, `add_b`, `add_cin` → `add_sum`, `add_cout` | combinational 128-bit adder |
| `fir_in_valid`, `fir_x` → `fir_out_valid`, `fir_y` | 4-tap FIR filter |
| `iir_in_valid`, `iir_x` → `iir_out_valid`, `iir_y` | second-order IIR filter |

Shared constants (adder width, tap counts, default coefficients) are in
`rtl/qca_pkg.sv`. To change a filter's response, pass new `COEF`, or new `B`
and `A`, arrays. All coefficients are signed `int` values and are
sign-extended to `WIDTH` bits. Any `WIDTH` of 1 or more works for the adder.
The FIR filter needs `TAPS >= 2` and stops elaboration with an error otherwise.

## Where this departs from, or goes beyond, the source design

- **Built as described:** the three- and five-input majority gates, the
  gate count of the full adder, the 128-bit width and the use of the adder in a
  4-tap FIR filter and in an IIR filter.
- **Own choices:** the input wiring of the five-input gate, the carry-in port,
  the filter structures, coefficients and sample width, the valid handshake,
  the reset and the one-cycle filter latency.
- **Not included:**
  - The QCA cells and the four-phase clock zones. These are physical and have no
    RTL counterpart.
  - The earlier three-input-majority-gate adder (2-bit carry modules). It serves
    only as the point of comparison.
- **Not reproduced:** the reported FPGA figures for peak tool memory, delay
  and power (for the adder alone: 8.946 ns and 3.202 W against 11.488 ns and
  3.314 W for the three-input-gate adder). They depend on a tool flow and
  device that are not part of this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench ends by
printing `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_qca_mg3`, `tb_qca_mg5`, `tb_qca_fa5` | all input patterns, against counts of ones or against `a + b + cin` |
| `tb_qca_adder` | 128-bit adder: corner cases (a carry rippling through all 128 bits, single-bit carries at every position) and 2000 random operand pairs, against a 129-bit sum |
| `tb_qca_fir`, `tb_qca_iir` | 3000 cycles of random samples with random idle cycles and a mid-run reset, against a reference model that keeps its own history; `out_valid` timing and output hold are checked every cycle; the IIR test also feeds zeros to exercise feedback alone |
| `tb_qca_top` | the whole top at its default 128-bit size for 4000 cycles, all three units at once |

`tb_qca_top` also counts each mechanism and fails if one never occurred:

- an adder carry out;
- a carry rippling through all 128 bits;
- idle (hold) cycles in both filters;
- FIR sums that wrapped past 2^128;
- IIR output driven by feedback alone;
- a reset.

Every test runs in well under a second.

To run a testbench with Verilator, for example the top-level one:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/qca_pkg.sv rtl/qca_mg3.sv rtl/qca_mg5.sv rtl/qca_fa5.sv \
  rtl/qca_adder.sv rtl/qca_fir.sv rtl/qca_iir.sv rtl/qca_top.sv \
  tb/tb_qca_top.sv --top-module tb_qca_top -o sim
./obj_dir/sim
```

For another block, replace the testbench file and `--top-module`. You can
leave out the RTL files that block does not use.
