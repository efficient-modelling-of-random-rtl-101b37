# A one-bit QCA-style RAM cell with set/reset, from two majority-gate multiplexers

Quantum-dot cellular automata (QCA) compute with cells whose two stable charge
arrangements stand for 0 and 1. The only logic primitives are the three-input
majority gate and the inverter, and a four-phase clock moves data forward
through the clocking zones. No memory element exists as such. A bit is stored by
sending it round a closed loop of cells, one full clock cycle per trip.

This RTL is a memory cell built that way. Two 2:1 multiplexers, each made of
three majority gates and one inverter, decide what goes into the storage loop:

```
            sel                      rd_wr
             |                         |
 set_reset --+-[ MUX-1 ]-- wr_val --+--[ MUX-2 ]--+--> loop (1 cycle) --+--> dout
 din --------+  s=0: set_reset       |  s=1: wr_val                     |
                s=1: din             +--s=0: loop value <---------------+
```

It has no crossing wires, and every operation completes in one clock cycle.

## Operations

| rd_wr | sel | set_reset | dout after the next clock edge | name        |
|:-----:|:---:|:---------:|:------------------------------:|-------------|
| 0     | x   | x         | unchanged                      | read / hold |
| 1     | 0   | 0         | 0                              | reset       |
| 1     | 0   | 1         | 1                              | set         |
| 1     | 1   | x         | din                            | write       |

- `rd_wr` is the enable. With `rd_wr = 0`, MUX-2 feeds the loop its own value, so the
  cell keeps its bit whatever the other inputs do. Reading is simply a hold: `dout` is
  the stored bit at all times. The conventional read is driven with `sel = 1`, `rd_wr = 0`.
- `sel` chooses the source of a write. With `sel = 0`, the bit comes from `set_reset`,
  which forces the cell to a known level. With `sel = 1`, it comes from the data input `din`.

## Timing: the loop is one register

In the QCA layout, a value takes one complete clock cycle (all four clocking
zones) to go from the inputs through the two multiplexers and round the loop.
The RTL models the loop as a single flip-flop. One period of `clk` stands for
one QCA clock cycle, and the majority gates and inverters are combinational.
This gives:

- **Latency of 1 cycle.** The inputs are sampled at a rising edge, and the new value is on
  `dout` right after that edge.
- **Write, then read, in 2 cycles.** A bit written in one cycle can be read in the next.
- **Aligned MUX-2 inputs.** The QCA layout delays `rd_wr` by extra clocking zones so that it
  reaches MUX-2 together with MUX-1's output. In synchronous logic both signals arrive in the
  same cycle, so there is no such delay here.

Inputs only need to meet the setup time before the rising edge. The testbench
changes them on the falling edge.

## Modules

| file | what it is |
|------|------------|
| `rtl/qca_maj3.sv` | three-input majority gate, `y = ab + bc + ca` |
| `rtl/qca_inv.sv` | inverter |
| `rtl/qca_mux2.sv` | 2:1 multiplexer `y = M(M(a, ~s, 0), M(b, s, 0), 1)`: two majority gates with a constant-0 input act as AND gates, one with a constant-1 input acts as OR |
| `rtl/qca_ram_cell.sv` | the cell (top): MUX-1, MUX-2 and the loop register, plus two assertions |

The top's ports are all one bit wide: `clk`, `rst_n`, `rd_wr`, `sel`, `set_reset`, `din`
in, and `dout` out. None of the modules has parameters.

`qca_ram_cell` asserts two rules of the cell:
- A cycle with `rd_wr = 0` leaves the stored bit unchanged.
- A cycle with `rd_wr = 1, sel = 0` stores `set_reset`.

## What follows the original design and what was chosen here

These parts follow the original design:
- the multiplexer arrangement: which signal selects which multiplexer, and which input is
  passed for which select value;
- the truth table above;
- a latency of one cycle;
- building the multiplexers from majority gates and inverters.

These are choices made for this RTL:
- **The gate structure of the multiplexer.** This is the standard majority-logic form. The
  original design reuses a previously published QCA multiplexer without spelling out its gates,
  but any correct form gives the same function.
- **`rst_n`.** A synchronous, active-low reset that clears the bit to 0. A QCA cell has no
  power-on state. Set/reset with `rd_wr = 1, sel = 0` is the cell's own way to force a level,
  and it works independently of `rst_n`.
- **The clock mapping.** Each four-phase QCA clock cycle, including the per-zone behaviour
  inside the gates, is collapsed into one `clk` period.

This is a logic model, not a physical one. The QCA clock field, the cell-level
layout, and the cell count, area and energy figures of a QCA implementation
have no counterpart in RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.

- `tb_qca_maj3`, `tb_qca_inv` and `tb_qca_mux2` run every input combination. They compare
  against truth tables written out independently of the RTL equations. `tb_qca_maj3` also checks
  the AND and OR uses of the gate.
- `tb_qca_ram_cell` is the end-to-end test of the top at its only configuration:
  - It first runs a directed sequence: reset, set, reads, holds with `sel = 0`, writes of 0
    and 1, a write that ignores `set_reset`, a reset that ignores `din`, and a reset in the
    middle of a write.
  - It then runs 4000 random operations against a reference that follows the truth table.
  - On every operation it checks that `dout` does not move before the sampling edge and holds
    the new value right after it.
  - It counts each kind of operation and fails if any never happened.

Run a test with plain Verilator 5:

```
verilator --binary --timing --assert -Wall -Irtl --top-module tb_qca_ram_cell tb/tb_qca_ram_cell.sv
./obj_dir/Vtb_qca_ram_cell
```

Replace `tb_qca_ram_cell` with another testbench name to run that test. Each one finishes in well under a second.
