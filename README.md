# A pipelined ALU built from half adders and switches (RSFQ, cycle-level RTL)

This is a cycle-level SystemVerilog model of a small superconducting ALU in
rapid single-flux-quantum (RSFQ) logic. The ALU was fabricated in a niobium
Josephson-junction process. Its main idea is to skip the usual arithmetic
logic unit, with its many gate types, and build every bit from just one
clocked **half adder** plus three DC-controlled **switches** and a
**merger**. The half adder always computes both `A xor B` (its S output) and
`A and B` (its C output). The switches pick which of the two reach the
block's outputs, and that choice sets the operation:

| switch | connects          | OR | AND | ADD | XOR |
|--------|-------------------|----|-----|-----|-----|
| a      | S → OUTPUT        | 1  | 0   | 1   | 1   |
| b      | C → OUTPUT (merge)| 1  | 1   | 0   | 0   |
| c      | C → CARRY         | 0  | 0   | 1   | 0   |

- **OR**: S merged with C, which is `(A^B) | (A&B) = A|B`.
- **AND**: C alone.
- **XOR**: S alone.
- **ADD**: S becomes the sum and C the carry.

A multi-bit ALU chains these blocks. Extra half adders ripple the carry from
bit to bit, and each added half adder is one more pipeline stage. The default
configuration is the 4-bit ALU. The RTL also has the on-chip test frame used
to measure a single 1-bit block at high speed, and the SFQ-to-DC output
monitors.

## How RSFQ pulses become RTL signals

An RSFQ circuit carries information as single picosecond voltage pulses, not
as levels. Clocked cells (the half adder, the D cell) store an arriving pulse
as a flux quantum and release a result when the next clock pulse arrives.
Unclocked cells (switches, mergers, transmission lines) simply pass pulses on.

This RTL models that at the clock-cycle level:

- One clock period is one **pulse slot**. A signal that is `1` during a period
  means that exactly one pulse travels on that line in that slot.
- Clocked cells are flip-flops on `clk`. Unclocked cells are combinational.
- The switch controls `a`, `b`, `c` and the test-frame input gates are DC
  levels. They are ordinary level signals.
- Every stored-flux cell has an asynchronous active-low reset `rst_n`. The
  superconducting circuit has no reset; this one exists so that a two-state
  simulator starts with the pipeline empty.

The model does not include pulse timing, junction delays, clock skew, bias
currents or operating margins. The circuit's forward-clocking and
counter-flow clocking schemes, which exist to avoid clock/data races, become a
single ideal clock here. A result here means the logic is right, not that the
circuit meets timing.

## The 1-bit block (`rsfq_alu_bit`)

```
 A ──┐                     ┌─[a]──────────┬──► OUTPUT
     ├─► half adder ─ S ───┘              │ (merger)
 B ──┘   (clocked)  ─ C ───┬─[b]──────────┘
                           └─[c]──────────────► CARRY
```

- **Latency**: one clock. The operands are sampled at clock edge *n*, and
  OUTPUT/CARRY are valid until edge *n+1*.
- **Throughput**: a new operand pair can enter on every clock.
- The half adder never fires S and C in the same slot, so the merger never
  gets two pulses at once. An assertion checks this.

## The multi-bit pipeline (`rsfq_alu_pipe`)

This is the least obvious part. Level 0 is one 1-bit block per bit, and all
blocks share the same switch settings. In ADD mode, bit *i* produces:

- a propagate pulse `p_i = A_i ^ B_i` on OUTPUT;
- a generate pulse `g_i = A_i & B_i` on CARRY.

The carry is then added in one bit per pipeline level. At level *k*
(*k* = 1 … WIDTH-1):

- A clocked half adder takes `p_k` and the carry out of bit *k-1*.
- Its S output is result bit *k*.
- Its C output is merged with `g_k` to give the carry out of bit *k*. `g_k`
  has been delayed by *k* D cells so that it arrives in the same slot.
- Every other bit passes through a D cell. This keeps all bits of one
  operation moving together down the pipeline.

Two-bit case:

```
 level 0              level 1
 bit0: p0 ──────────► D ───────────────────────► result[0]
       g0 ─────┐
 bit1: p1 ─────┴──► half adder ── S ───────────► result[1]
                              └─ C ─┐
       g1 ──────────► D ──────────(merge)─────► carry out
```

For WIDTH bits:

- The result and carry out appear **WIDTH clocks** after the operands enter
  (4 for the default).
- A new operation can enter on every clock.
- The merger inputs cannot coincide, because `p_k` and `g_k` exclude each
  other. An assertion in the RTL checks this.

In OR, AND and XOR, switch `c` is off, so every `g` is empty. The ripple half
adders then just pass `p` through, and the carry out stays silent.

**When the operation takes effect.** The switches sit after the level-0 half
adders. For operands sampled at edge *n*, the operation is the one in force
just before edge *n+1*, when the level-0 outputs pass the switches. After
that, an operation is carried by its pulses, and the settings can change
freely. Changing the operation on every clock is fine, and the testbenches do
it.

The two-bit construction matches the source circuit. The generalisation (one
ripple level per extra bit, D cells on everything else) is this RTL's reading
of how the blocks are chained. The source circuit's 4-bit layout is not
available at gate level. `WIDTH` is a parameter. The testbench also runs
WIDTH = 2 and 8; an 8-bit version was the stated next step for the circuit.

## Instruction decoder (`alu_op_decoder`)

The decoder implements the switch table above. It maps `alu_op_t`
(`OP_OR=0, OP_AND=1, OP_ADD=2, OP_XOR=3`; this encoding is this RTL's own) to
the `alu_sw_t` struct `{a, b, c}`. In the fabricated chips the three switches
are driven directly from DC pads. `rsfq_alu_pipe` and `rsfq_alu_bit` take the
switch struct, so they can be driven either way.

## High-speed test frame and SFQ-to-DC monitors

A 1-bit block running at tens of GHz cannot be driven by a slow pattern
generator. The test frame (`alu_bit_testframe`) builds the operands from the
clock itself ("data from clock"):

- The clock pulse train goes into two SFQ switches.
- Their DC controls `gate_a` and `gate_b` come from a slow pattern.
- A held gate therefore sends one pulse per clock into A or B.

The outputs are read by **TFF-type SFQ-to-DC converters** (`sfq_to_dc`). Each
pulse flips a DC level:

- An output that fires on every clock makes its monitor alternate every clock,
  which a slow oscilloscope shows as a single averaged line.
- A silent output leaves the monitor flat, which the oscilloscope shows as a
  "0"/"1" double line.

Sweeping the gates through all four combinations gives an eye-diagram-like
picture of each operation. `tb_alu_bit_testframe` repeats that sweep. The real
converter starts in a random state; here reset sets it to 0.

## Top level (`rsfq_alu_top`)

The top holds the two test circuits side by side, each with its own ports:

- **Pipelined ALU** (`WIDTH`, default 4)
  - inputs: `alu_op`, `alu_a`, `alu_b`
  - outputs: `alu_result` and `alu_carry` (pulses, WIDTH clocks later), and
    `alu_result_mon`, `alu_carry_mon` (monitor levels, one more clock later)
- **1-bit test frame**
  - inputs: `tf_op`, `tf_gate_a`, `tf_gate_b`
  - outputs: `tf_out`, `tf_carry` (one clock after the gates), and
    `tf_out_mon`, `tf_carry_mon`

Both share `clk` and `rst_n`.

## Files

| file | contents |
|------|----------|
| `rtl/rsfq_alu_pkg.sv` | `alu_op_t`, `alu_sw_t` |
| `rtl/sfq_switch.sv` | DC-controlled SFQ switch (gate) |
| `rtl/sfq_merger.sv` | merger (pulse OR) |
| `rtl/sfq_dff.sv` | D cell, one-clock delay |
| `rtl/rsfq_half_adder.sv` | clocked half adder |
| `rtl/sfq_to_dc.sv` | TFF-type output monitor |
| `rtl/alu_op_decoder.sv` | operation → switch settings |
| `rtl/rsfq_alu_bit.sv` | 1-bit ALU block |
| `rtl/rsfq_alu_pipe.sv` | WIDTH-bit pipelined ALU |
| `rtl/alu_bit_testframe.sv` | data-from-clock test frame of one block |
| `rtl/rsfq_alu_top.sv` | top level |
| `tb/alu_ref_pkg.sv` | reference model shared by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and stops itself, and it has a watchdog that ends a hung run. Example for the
end-to-end test at the default size:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/rsfq_alu_pkg.sv tb/alu_ref_pkg.sv tb/tb_rsfq_alu_top.sv \
  --top-module tb_rsfq_alu_top -o sim
./obj_dir/sim
```

To run another test, replace `tb_rsfq_alu_top` with that testbench's name.
Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/rsfq_alu_pkg.sv rtl/<module>.sv`.

Lint gives one kind of warning, `SYNCASYNCNET`. It appears because `rst_n` is
both the asynchronous reset of the cells and the `disable iff` condition of
the merger assertions.

## What the tests establish

- **`tb_rsfq_alu_pipe`**
  - Every 4-bit operand pair (256 per operation) for all four operations,
    back to back.
  - Then random streams in which the operation changes while earlier
    operations are still in flight, at WIDTH 2, 4 and 8.
  - Checks the exact WIDTH-clock latency.
  - Counts rippled carries and carry outs.
- **`tb_rsfq_alu_top`** (default parameters, end to end)
  - Random operand streams with operation switches in flight.
  - Forced bit-0 carries that ripple to the top bit.
  - Carry outs.
  - Every monitor toggling.
  - The full 16-combination eye-diagram sweep of the test frame.
  - Fails if any of these never happens.
- **Per-cell tests**
  - The switch test replays a repeated `1101` pattern under on/off control
    windows.
  - The half adder, D cell and monitor tests check their one-clock timing.

## Departures from the source circuit and open points

- **Abstraction**: cycle-level pulse slots only. Timing, margins and clock
  rates are not represented. The circuit was measured at 20 GHz for a 1-bit
  block and at 5 GHz for the 4-bit ALU; neither rate means anything here.
- **Multi-bit chaining**: the generalisation beyond two bits is reconstructed
  (see above). It is the natural ripple extension and computes correct sums.
  The fabricated 4-bit circuit's exact placement of D cells is unknown.
- **Reset**: added to every stored-flux cell and to the monitors.
- **Decoder**: the op encoding and the decoder itself are additions for
  convenience; the original switches are DC pads.
- **Merger collisions**: no switch setting in the table can make two pulses
  coincide in a merger. Settings outside the table (for example `b` and `c`
  both on) could, and that is flagged by the assertions. A real merger would
  then emit a single pulse; here the merger behaves as an OR.
- **Not modelled**:
  - DC/SFQ input converters and Josephson transmission lines (plain wires
    here).
  - The clock distribution network.
  - Bias lines, pads and junction-array test structures.
