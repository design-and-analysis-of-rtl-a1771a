# Reversible ripple-carry adder / ripple-borrow subtractor

This is a word-wide adder/subtractor built only from *reversible* gates. In
a reversible gate, every output pattern comes from exactly one input
pattern. No information is erased, so the circuit has no lower bound on the
heat it must dissipate (Landauer's kT ln 2 per lost bit). The cost of this is
extra wiring: constant inputs (*ancillae*) and unused outputs (*garbage*)
keep the input count equal to the output count.

Each bit is one cell made of four gates: two Feynman (controlled-NOT) gates
and two Peres gates. A single `ctrl` line picks the mode: 0 adds and 1
subtracts. Chaining `WIDTH` cells gives a ripple-carry adder that is also a
ripple-borrow subtractor. The default is 64 bits.

| per bit | gates | constant inputs | garbage outputs | quantum cost |
|---|---|---|---|---|
| this cell | 2 Feynman + 2 Peres = 4 | 1 | 3 | 1+4+4+1 = 10 |
| 64-bit word | 256 | 64 | 192 | 640 |

In CMOS or on an FPGA, the RTL synthesizes to ordinary XOR/AND logic. Its
reversibility is a property of the netlist structure, which the testbenches
check. It does not change how a synthesis tool maps the logic.

## The gates

| gate | module | mapping | quantum cost |
|---|---|---|---|
| Feynman | `feynman` | p = a, q = a ^ b | 1 |
| Peres | `peres` | p = a, q = a ^ b, r = (a & b) ^ c | 4 |

A Peres gate whose `c` input is 0 is a reversible half adder: `q` is the sum
and `r` is the carry.

## The one-bit cell (`rev_fa_fs`)

This is the part that needs explaining. The signal flow is:

```
ctrl ─┬─ feynman1 ─ a' = a ^ ctrl
a  ───┘     │ p (copy of ctrl) ───────────────────────────┐
            │                                             │
a', b, 0 ─ peres1 ─ g1 = a'                               │
                    hs = a' ^ b   (half sum)              │
                    hc = a' & b   (half carry)            │
cin, hs, hc ─ peres2 ─ g2 = cin                           │
                       fs = cin ^ a' ^ b ──── feynman2 ───┘
                       cb = hc ^ cin&hs          │
                                                 ├─ g3 = ctrl
                                                 └─ sd = fs ^ ctrl = a ^ b ^ cin
```

- **Two cascaded half adders.** `peres1` adds `a'` and `b`. `peres2` adds
  `cin` to that half sum. The two half carries can never both be 1, so the
  XOR that `peres2` forms on its `r` line is the full carry.
- **How the mode works.** `feynman1` replaces `a` by `a' = a ^ ctrl`.
  - With `ctrl = 0`, `a' = a`, and the cell is a plain full adder.
  - With `ctrl = 1`, `a' = ~a`. The carry term `a'b + cin(a' ^ b)` becomes
    `~a·b + cin·~(a ^ b)`, which is exactly the borrow of `a - b - cin`.
  - `feynman2` XORs `ctrl` back into the sum line. This cancels the
    inversion, so `sd = a ^ b ^ cin` in both modes. That is both the sum
    and the difference.
- **Garbage outputs.**
  - `g1 = a ^ ctrl`
  - `g2 = cin`, the incoming carry/borrow
  - `g3 = ctrl`

  These three outputs, with `sd` and `cb`, form a one-to-one function of the
  five inputs (`ctrl, a, b, cin` and the constant 0). `rev_fa_fs_tb` checks
  this.

The gate list, the gate order, the constant 0 on the first Peres gate and
the three garbage outputs follow the published cell. The published schematic
shows which Peres pin each internal wire enters. The function above was
checked against that reading: with these connections the cell is a correct
full adder/subtractor.

## The word (`rev_rca_rbs`)

`WIDTH` cells share `ctrl`. The `cb` output of bit *i* drives the `cin`
input of bit *i+1*.

| `ctrl` | result |
|---|---|
| 0 | `{cbout, sd} = a + b + cin` |
| 1 | `sd = (a - b - cin) mod 2^WIDTH`; `cbout = 1` when `a < b + cin`, unsigned |

Ports:

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | WIDTH | operands (a is the minuend) |
| `cin` | in | 1 | carry/borrow into bit 0 (0 for a plain add/subtract) |
| `ctrl` | in | 1 | 0 = add, 1 = subtract |
| `sd` | out | WIDTH | sum / difference |
| `cbout` | out | 1 | carry / borrow out |
| `c` | out | [WIDTH:1] | ripple chain: `c[i]` is the carry/borrow out of bit i-1, so `c[WIDTH] == cbout` |
| `g1`, `g2`, `g3` | out | WIDTH | garbage outputs of each cell, bit i from cell i |

Two choices are this design's own:

- **Ripple-chain port.** The chain is brought out as `c`, with the index
  starting at 1 (`c1, c2, ...`).
- **Garbage outputs.** They are ports, so no output of a reversible gate is
  discarded. Leave them unconnected if only the arithmetic is wanted.

**Timing.** The circuit is purely combinational: no clock and no reset. The
worst-case path is the full ripple through all `WIDTH` cells, about two gate
levels per bit. For reference, the published FPGA implementation
(Zynq-7000) measured these delays:

| width | delay |
|---|---|
| 1 bit | 1.06 ns |
| 16 bits | 4.99 ns |
| 64 bits | 18.5 ns |

The parameter accepts any `WIDTH >= 1`. The sizes studied are 1, 8, 16, 32
and 64 bits.

## Departures and limits

- **Quantum cost, garbage and ancilla counts** describe a quantum or
  reversible-technology realisation. The RTL keeps the gate structure so
  these counts can be read off the netlist. A CMOS/FPGA flow is free to
  merge the gates.
- **Power and FPGA utilisation figures** were measured on an FPGA. The RTL
  can reproduce them only by re-running such a flow. They were not
  re-measured here.
- **Borrow convention.** Subtraction uses `cin` as a borrow in. The
  published 64-bit examples tie it to 0. Chaining words for wider
  arithmetic works the same way in both modes.
- **Gates left out.** The reversible-gate library often used alongside this
  design (NOT, Fredkin, Toffoli, DKG, WG, HNG, TR) is not included, because
  this adder/subtractor uses none of them. The same applies to the two
  earlier adder/subtractor cells it was compared against: one built from
  Feynman/Fredkin/TR gates and one built from a single WG gate.

## Files

| file | content |
|---|---|
| `rtl/feynman.sv` | Feynman gate |
| `rtl/peres.sv` | Peres gate |
| `rtl/rev_fa_fs.sv` | one-bit reversible full adder / full subtractor |
| `rtl/rev_rca_rbs.sv` | WIDTH-bit ripple adder/subtractor (top, `WIDTH = 64`) |
| `tb/feynman_tb.sv`, `tb/peres_tb.sv` | exhaustive truth tables, one-to-one check, self-inverse (Feynman) and half-adder (Peres) checks |
| `tb/rev_fa_fs_tb.sv` | all 16 input patterns: sum/difference, carry/borrow, garbage values, reversibility |
| `tb/rev_rca_rbs_tb.sv` | 64-bit top at default parameters, described below |
| `tb/rev_rca_rbs_widths_tb.sv` | 1-, 8-, 16- and 32-bit instances: exhaustive over 8 bits in all modes, random at 16/32 |

`tb/rev_rca_rbs_tb.sv` runs these cases:

- the published examples 123456789 + 987654321 = 1111111110 and
  65000 − 50000 = 15000
- carries and borrows that ripple through the whole word
- 20 000 random vectors

For every vector, it checks the ripple chain and the garbage outputs. It
also counts each mechanism and fails if any never happens: addition,
subtraction, carry out, borrow out, carry-in and full-length ripple.

Every testbench compares against integer arithmetic. Each one prints
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, for example the top-level test:

```
verilator --binary --timing --assert rtl/*.sv tb/rev_rca_rbs_tb.sv \
          --top-module rev_rca_rbs_tb -o sim
./obj_dir/sim
```

Replace the testbench file and `--top-module` to run any other test. Every
test runs in well under a second.
