# Approximate XOR gates and compressors for quantum-dot cellular automata

Quantum-dot cellular automata (QCA) compute with arrays of four-dot cells
whose polarisation (+1 or -1) encodes a bit. Their natural logic primitive is
not the NAND gate but the **three-input majority gate**, M(a, b, c) = ab + ac + bc,
plus an inverter. An exact three-input XOR costs several majority gates,
inverters and two-input XORs, and with them cells, area and clock zones.

The idea behind this design is to give up a little accuracy for a large saving:

* **Approximate three-input XOR** = NOT(M(a, b, c)). One majority gate and
  one inverter. It is wrong only for inputs 000 and 111, so 2 of the 8 patterns
  (25 % error rate, 75 % pass rate).
* **Approximate five-input XOR** = M(a, b, c, d, e). One five-input majority gate.
  It is wrong in 10 of the 32 patterns (31.25 %).
* These gates are then used to build an **approximate full adder (3-2
  compressor)** and an **approximate 4-2 compressor**. Compressors like these
  make up the partial-product reduction tree of a multiplier. That is where
  error-tolerant applications such as image filtering can absorb the error.

The RTL describes these circuits at the logic level. The majority gate and
the inverter are the leaf cells, so the netlist has the same gate structure as
the QCA layout. It synthesises to ordinary logic and can be simulated
alongside any other SystemVerilog.

## The majority-gate primitives

| module     | function                  | how it is built                              |
|------------|---------------------------|----------------------------------------------|
| `qca_maj3` | ab + ac + bc              | Boolean sum of products                      |
| `qca_inv`  | NOT a                     | complement                                   |
| `qca_and2` | a AND b                   | `qca_maj3` with third input fixed at 0       |
| `qca_or2`  | a OR b                    | `qca_maj3` with third input fixed at 1       |

Fixing one majority input to a constant cell is how QCA obtains AND and OR.
The two gate modules are built exactly that way. Logic 1 is polarisation +1
and logic 0 is polarisation -1.

## Approximate XORs and where they are wrong

`approx_xor3` is an inverter after a majority gate. With one or two inputs
high, "fewer than two ones" and odd parity agree. With zero or three high,
they disagree:

| a b c | exact XOR | approx_xor3 |
|-------|-----------|-------------|
| 000   | 0         | **1**       |
| 001, 010, 100 | 1 | 1          |
| 011, 101, 110 | 0 | 0          |
| 111   | 1         | **0**       |

`approx_xor5` outputs 1 when at least three of its five inputs are 1. Compared
with five-input parity:

* it is wrong for the 5 patterns with exactly one input high;
* it is wrong for the 5 patterns with exactly four inputs high;
* it is right for zero, two, three or five ones.

The original layout of the five-input majority gate is a particular cell
arrangement. The RTL writes it from its Boolean function instead.

## The approximate full adder

`approx_32_compressor` uses a single majority gate for two outputs:

```
carry = M(a, b, c)        exact carry, 0 % error
sum   = NOT(carry)        approximate XOR of a, b, c
```

In QCA the carry is tapped one clock zone before the inverter, so it is ready
before the sum. The weighted result sum + 2*carry is exact except for two
cases: 000 gives 1 (+1 too high) and 111 gives 2 (1 too low).

## The approximate 4-2 compressor

This is the most complex unit and the one the other gates exist to serve. It
takes five bits of equal weight: operands a, b, c, d and carry-in cin from the
neighbouring column. It returns:

* sum, of weight 1;
* carry, of weight 2;
* cout, of weight 2, which goes to the next column's cin.

Two approximate full adders are cascaded:

```
          a  b  c
          |  |  |
       +-----------+
       | approx FA |--- carry ---> cout
       +-----------+
             | sum (s1)
             |   d   cin
             |   |   |
          +-----------+
          | approx FA |--- carry ---> carry
          +-----------+
                |
               sum
```

cout depends only on a, b and c, never on cin. Columns therefore do not
ripple into each other.

Which inputs go to which stage is this design's reading of the block diagram.
It was chosen because it matches the published truth table in all 32 rows.
That table's outputs are encoded as bit masks in `tb/tb_approx_42_compressor.sv`.
Bit i of each mask belongs to input pattern i = {a, b, c, d, cin}:

```
sum   = 32'h7771_7111
carry = 32'h888e_8eee
cout  = 32'hfff0_f000
```

**Error rates.** The reference is an exact 4-2 compressor in which
cout = M(c, d, cin), sum is the parity of all five bits, and carry takes the
remaining weight-2 share. Against it the approximate outputs differ in:

* sum: 12 of 32 patterns;
* carry: 16 of 32 (50 %);
* cout: 12 of 32 (37.5 %).

The original publication's prose quotes 14 sum errors (43.75 %). Its own
truth table, and this RTL, give 12 (37.5 %). The table was followed.

## Timing

Every module is purely combinational: no clock, no reset, no state. All
outputs are valid in the same cycle as the inputs.

A QCA circuit is driven by a four-zone clock, and signals advance one zone
per quarter cycle. The published delays are therefore given in QCA clock
cycles:

* approximate XOR3 and full-adder sum: 0.75 cycle;
* approximate XOR5: 0.25 cycle;
* 4-2 compressor: cout in zone 0, carry after 0.5 cycle, sum after 0.75 cycle.

These are layout properties and are not modelled. To pipeline the
compressor in a synchronous design, register its outputs outside it.

## The top level

`qca_approx_top` places the independent units side by side, each with its
own ports:

* the 4-2 compressor on `cmp_*`;
* the approximate XOR3 on `x3_in` = {a, b, c}, with a in the most
  significant bit, and output `x3_y`;
* the approximate XOR5 on `x5_in` = {a, b, c, d, e} and output `x5_y`;
* the AND and OR gates, which share inputs `g_a` and `g_b`.

The units share no logic. The top has no parameters.

## What is not modelled

* The QCA cell itself, wires of cells and wire crossings: in RTL these are
  plain nets.
* The four-phase QCA clock: see Timing.
* Layout metrics from the original work do not apply to a logic netlist: cell
  counts, area in um2, and the cost figure Area x Delay x Complexity.
* The exact three-input XOR designs the approximate gates are compared with
  are reference designs, not part of this one.

## Files

`rtl/` holds one module per file:

* `qca_maj3.sv`, `qca_inv.sv`: the leaf primitives;
* `qca_and2.sv`, `qca_or2.sv`: majority-based AND and OR;
* `approx_xor3.sv`, `approx_xor5.sv`: the approximate XORs;
* `approx_32_compressor.sv`, `approx_42_compressor.sv`: the compressors;
* `qca_approx_top.sv`: the top level.

`tb/` holds one self-checking testbench per module, named `tb_<module>.sv`.
Each testbench:

* applies every input pattern;
* compares against values computed from integer arithmetic, or against the
  truth-table masks;
* checks the error counts above;
* prints `TB_RESULT checks=N failures=M`.

`tb_qca_approx_top` also drives all units at once with 1000 random vectors. It
fails if any of the five approximation errors never occurs: compressor sum,
carry, cout, XOR3 and XOR5.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
    --top-module tb_qca_approx_top tb/tb_qca_approx_top.sv
./obj_dir/Vtb_qca_approx_top
```

Replace the top module and file name to run any other testbench. Each run
finishes in well under a second.
