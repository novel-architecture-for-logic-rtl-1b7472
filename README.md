# SCAhS — single-cycle-access scan with hold mode

Conventional scan testing shifts every test pattern through the whole scan
chain: to change or observe one register, every register in the chain toggles
for as many cycles as the chain is long. That costs test time and causes the
large shift power peaks that make scan test behave so differently from normal
operation.

SCAhS replaces the shift chain with a structure that is addressed like a
memory. The scan registers are arranged as a grid of *chains* (columns) and
*lines* (rows). A line address selects one line; in a single clock cycle the
tester writes a whole line from the scan inputs and reads it on the scan
outputs, while every other register in the design holds its value. The same
path also lets one line be watched continuously while the design runs at
speed, which makes it useful for debugging on a board as well.

The default configuration has 992 registers, arranged as 32 chains of 31
registers.

## The SCAh flip-flop

Each register is a standard scan flip-flop (a D flip-flop with a
functional/scan multiplexer in front, steered by `se[0]`) with two extra 2-to-1
multiplexers, both steered by `se[1]`:

* **hold multiplexer**: feeds the scan path either from `si` (`se[1]=1`) or
  from the flip-flop's own output (`se[1]=0`). A scan cycle on an unselected
  register therefore re-loads its own value instead of shifting.
* **scan-out multiplexer**: drives `so` with the stored value (`se[1]=1`), or
  passes `si` straight through (`se[1]=0`).

| se[0] | se[1] | next value at clk | so    | mode                      |
|-------|-------|-------------------|-------|---------------------------|
| 1     | 1     | si                | value | synchronous write / read  |
| 1     | 0     | unchanged         | si    | hold                      |
| 0     | 1     | di                | value | asynchronous read         |
| 0     | 0     | di                | si    | functional                |

`so` is combinational. The flip-flop has an asynchronous, active-high `reset`
that clears it to 0.

## How a line is accessed

A chain is a series of SCAh flip-flops: the `so` of each feeds the `si` of the
next. `se[0]` of every register is the global scan enable `gse`. `se[1]` of
every register in line *k*, across all chains, is the line select `ls[k]`,
driven by a 1-out-of-N decoder from the line address `add`.

At most one line is selected, so every other register in a chain is in a
bypass mode that routes `si` straight to `so`. Each chain therefore behaves as
a wire from its scan input to the selected register, and from that register
to its scan output:

* The selected register sees the chain's `si` as its own scan input.
  Under `gse=1` it loads that value on the next clock edge.
* The chain's `so` shows the selected register's value before the edge.

Across all 32 chains this is one 32-bit memory word per line. The word is read
combinationally and written at the clock edge. No shifting happens and no
other register toggles.

| gse | line selected? | effect                                                    |
|-----|----------------|-----------------------------------------------------------|
| 1   | yes (line k)   | `so[]` = line k now; line k ← `si[]` at clk; rest hold    |
| 1   | no             | every register holds; `so[]` = `si[]`                     |
| 0   | yes (line k)   | every register captures `func_d`; `so[]` shows line k     |
| 0   | no             | normal functional operation; `so[]` = `si[]`              |

Address 0 selects no line. Lines are numbered 1..31, so a 5-bit address covers
all of them. The decoder enable `en=0` also selects no line.

### Typical test sequence

1. With `gse=1`, write the pattern line by line: one line per cycle, 31 cycles
   for all 992 registers. If a pattern changes only a few lines, only those
   lines are written. Nothing else toggles.
2. Drop `gse` for one cycle to capture the response of the logic under test.
   This can be at speed, with no shift-related activity around it.
3. With `gse=1`, read each line on `so[]`. The cycle that reads a line can
   write that line's next pattern in the same edge.

For debug, hold `gse=0` and set `add` to the line of interest. The design then
runs normally while `so[]` streams that line's contents every cycle.

## Module hierarchy

```
scahs_top            decoder + register array; ports func_d/func_q go to the logic under test
├── scah_decoder     1-out-of-N line decoder (add, en -> ls[N:1])
│   └── scah_and_vec bus-wide AND with common enable (31 bits)
└── scah_chain_group CHAINS parallel chains sharing gse and ls
    └── scah_scan_chain  LINES SCAh flip-flops in series
        └── scah_ff      SCAh flip-flop
            ├── scah_mux2 (x3)
            └── scah_dff
scahs_pkg            default sizes, mode enum and a helper to name the mode
```

The combinational logic under test is not part of this RTL. `func_q[c][k]` is
the output of the register in chain `c`, line `k`, and goes to that logic.
`func_d[c][k]` is the value the logic returns to that register.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `CHAINS`  | 32      | parallel chains, i.e. bits per line |
| `LINES`   | 31      | lines, i.e. registers per chain |
| `ADDR_W`  | 5       | line-address width; needs `LINES+1 <= 2**ADDR_W` (checked when simulation starts) |

The 992-register total comes from the reference case the structure was
designed around. The 32 × 31 split is a choice made here: it uses a 5-bit
address fully, with address 0 left to mean "no line".

## What is this design's own choice

The flip-flop's structure and mode table, and the way the chains, line
selects, global scan enable and decoder connect, follow the published
architecture. The following are choices made here, where the source does not
say:

* How the 992 registers are split into chains and lines (32 × 31).
* Lines are numbered from 1, with address 0 meaning "no line".
* The decoder enable input `en`.
* Reset: asynchronous, active high, clearing to 0.
* Inside the decoder, each line compares the address and a 31-bit AND cell
  (`scah_and_vec`) gates the results with `en`. A bus AND cell of this width
  exists in the source design, but where it connects is not said.

The following are not included:

* A 30-bit sibling of that AND cell. No connection for it is known.
* The "page" grouping with a page-select signal that can save write cycles.
  The source names it but does not define it.
* The gated and partial variants of the structure.
* An address-driven BIST controller.
* Trigger or waveform-capture logic that would consume the `so[]` stream.

## Timing

* `so[]` is combinational from `add`, `en`, `si[]` and the stored values. In
  the worst case the path runs through the decoder and then through every
  bypass multiplexer of a chain, so its depth grows with `LINES`.
* Writes and functional captures happen at the rising edge of `clk`.
* Reading a line and writing it again can share one cycle: sample `so[]`
  before the edge and present the new word on `si[]`.

## Simulation

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Each runs with plain Verilator, for example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/scahs_pkg.sv tb/tb_scahs_top.sv --top-module tb_scahs_top
./obj_dir/Vtb_scahs_top
```

| testbench | what it checks |
|-----------|----------------|
| `tb_scahs_top` | Whole structure at its default size (992 registers), with a small XOR network standing in for the logic under test. It loads a full pattern in exactly 31 cycles, reads every line back, holds (no line selected, and decoder disabled), captures once and unloads, observes one line at speed, runs 400 random cycles and resets. It checks `so[]` and all 992 registers against a model every cycle, and fails if any of these mechanisms never occurred. |
| `tb_scah_chain_group` | 8 × 7 group, random operations against a word-per-line model |
| `tb_scah_scan_chain` | one 31-register chain, random operations |
| `tb_scah_decoder` | all 32 addresses with `en` = 0 and 1 |
| `tb_scah_ff` | random modes against the mode table; all four modes must occur |
| `tb_scah_and_vec`, `tb_scah_mux2`, `tb_scah_dff` | leaf cells |

Each testbench runs in well under a second. The simulator used has no X state
and starts registers at random values, so every testbench applies `reset`
before it checks anything.
