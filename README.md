# 16×4 two-phase SRAM — a cycle-accurate digital model

This is a 16-word by 4-bit single-port static RAM that does one access per
clock cycle and splits every cycle into two non-overlapping phases. In the
first phase (φ1) both bitlines of every column are precharged high while the
address, write enable and write data are captured in latches. In the second
phase (φ2) one word line rises and the access happens. On a write, tri-state
drivers force the data onto the bitlines and into the cells. On a read, each
selected cell pulls down one line of its column's pair. A delayed enable then
fires a latch-type sense amplifier whose result goes to a read latch.

The original circuit is transistor-level: 22 nm high-performance predictive
models at 0.8 V. It has 6T cells, a NOR-latch clock splitter and an isolated
latch-type sense amplifier. The SystemVerilog here keeps the circuit's blocks
and signal names. Its digital parts are written as RTL. Its analog parts
(cell, bitlines, sense amplifier, delay chains) are behavioural models that
keep what each part does and the order of its edges, but not its voltages.

## One cycle, two phases

Everything in the design follows from this schedule. `clk` high is φ1 and
`clk` low is φ2.

| phase | what happens | signals |
|---|---|---|
| φ1 (precharge) | `PCHb = ~φ1` is low, so both bitlines of each column go high. Address, `Wr` and data latches are transparent. Word lines are all low. The read latch holds. | `pchb=0`, `wl=0` |
| gap | φ1 has fallen and φ2 has not yet risen. Precharge switches off before any word line can rise. | `phi1=phi2=0` |
| φ2, before SAE | The input latches hold. One word line `WL[a] = dec[a] & φ2` rises. On a write, `WrEn = Wr & φ2` turns on the column drivers, which write `din` into the row. On a read, each cell discharges BL if it stores 0, or BLb if it stores 1. | `wl` one-hot |
| φ2, after SAE | On a read, `SAE = delayed(φ2 & ~Wr)` rises. The sense amplifiers isolate themselves from the bitlines and resolve. Their output drives the column's Q/D bus bit. The φ2 read latch passes it to `rd`. | `sae=1` |

Consequences for a user:

* **Input timing.** `addr`, `wr` and `din` are sampled when `clk` falls, at
  the end of φ1. Once φ2 has begun they may change freely. The testbench
  changes them in the middle of φ2 to prove this.
* **Read timing.** `rd` holds the word during φ2 of the same cycle and keeps
  it until the next read cycle. A write cycle does not change `rd`. The
  original circuit has `rd` valid 91.9 ps after φ2 rises (worst case,
  reading a 0 after a 1). The testbench checks `rd` at that point.
* **Rate.** One access per cycle. The original circuit was shown correct down
  to a 298 ps period (about 3.36 GHz) and was characterised at 320 ps. The
  model has no timing limits of its own, only the ordering above.

Two mechanisms keep the phases from overlapping:

1. **`two_phase_clock`.** Two cross-coupled NOR2 gates form a latch. One NOR
   sees the inverted clock and the other sees the clock through two
   inverters. Each NOR can rise only after the other has fallen, so φ1 and φ2
   are never high together. The gap between them is about one NOR delay. Each
   output is buffered by two inverters so its polarity is kept.
2. **`PCHb` is taken from φ1, not φ2.** It rises one gap before φ2. This
   means the precharge devices are already off when the write drivers turn
   on.

## The shared Q/D bus

Each column has one bus bit, `qd[i]`, with two drivers that take turns:

* The `rdwr` block drives it during writes (`Wr = 1`). Its source is the φ1
  latch on `din[i]`.
* The sense amplifier drives it during reads (`Wr = 0`). Its output tri-state
  is enabled by `~Wr`.

The same block reads the bus back into the φ2 latch that drives `rd[i]`, but
only when `Wr = 0`. The column driver writes the bus value onto the bitlines.
An always-on assertion in `sram16x4` checks that exactly one driver is enabled
on each bus bit.

Between reads, the sense amplifier's output follows the BL-side latch node.
That node tracks BL while SAE is low, so `qd` goes high during precharge
before the amplifier resolves.

## How nets that carry current both ways are modelled

The simulator has two states, so it has no high-Z and no weak or strong
drive. Each net that the circuit drives from both ends is therefore split
into a *drive* signal and a *level* signal:

* **Bitlines.** The column driver outputs what it forces: `drv`, and `bl_w`
  and `blb_w`, which are `d` and `~d`. The array returns what the cells pull
  down: `bl_pd` and `blb_pd`. `column_driver` then resolves the level the
  sense amplifier sees:
  1. During precharge, both lines are high.
  2. During a write, the lines take the driven values.
  3. Otherwise, each line is high unless a selected cell discharges it.
     The array's discharge is the OR over rows of `wl[r] & ~q` for BL and
     `wl[r] & q` for BLb.
* **Cells.** A cell changes only when its word line is high *and* the column
  driver forces complementary values. A cell that is only read never
  changes. This stands in for the cell's sizing: its pull-down is stronger
  than its access device, which is stronger than its pull-up.
* **Q/D bus.** Each driver gives a value and an enable, and `sram16x4` selects
  between them. The column driver takes its data from the `rdwr` block's
  drive of the bus rather than from the resolved bus. These are the same
  whenever the write driver is on, and this choice avoids a combinational
  loop through the sense amplifier.

Bitlines swing fully in the model. A read therefore gives a full difference
as soon as the word line rises, where the real circuit builds up about 50 mV
before SAE.

## Blocks

| module | kind | role |
|---|---|---|
| `sram_pkg` | package | sizes: 16 rows, 4 columns, 4 address bits; `addr_t`, `word_t`, `rows_t` |
| `sram16x4` | RTL (top) | Wires the blocks below together. Also holds the glue: `PCHb = ~φ1`, `~Wr`, `WrEn = Wr & φ2`, and the Q/D bus resolution. |
| `two_phase_clock` | behavioural, with `#` delays | NOR-latch φ1/φ2 generator. Its delays are `T_INV = 4 ps` and `T_NOR = 6 ps`. |
| `phase_latch` | RTL | Level-sensitive latch. One instance of `W = 4` holds the address. Width-1 instances hold `Wr`, each column's `din`, and each column's `rd`. |
| `decoder4to16` | RTL | Per row: NAND2, NAND2 and NOR2 give the one-hot select, then NAND2 with φ2 and an inverter drive the word line. |
| `sram_array` → `word_row` → `bitcell` | RTL / behavioural cell | 16 rows of 4 cells. The bitline discharge is a wired OR of the selected cells' pull-downs. |
| `column_driver` | behavioural | The precharge PMOS pair and the tri-state write buffers for `d` and `~d`, plus the bitline level resolution. |
| `sae_gen` | behavioural, with `#` delay | `SAE = φ2 & ~Wr` delayed by `T_SAE = 38 ps` on its rising edge, which is the measured φ2-to-SAE delay of the original circuit. It falls with φ2. |
| `sense_amp` | behavioural | Isolated latch sense amplifier. It decides on the rising edge of SAE (1 if BLb is the lower line), holds the decision while SAE is high, and follows BL otherwise. |
| `rdwr` | RTL | Per-column I/O block: the φ1 latch on `din` drives the bus when `Wr = 1`, and the φ2 latch fills `rd` from the bus when `Wr = 0`. |

The transistor-sized gate library of the original circuit is not a separate
set of modules. Each gate appears as an expression inside the block that uses
it: minimum, 4× and 8× inverters, NAND2, NOR2 and tri-state buffers.

`sram16x4` also brings internal nodes out as ports so they can be observed:
`cells`, `phi1`, `phi2`, `pchb`, `sae` and `wl`.

## Interface of `sram16x4`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | the single clock; a cycle starts on its rising edge |
| `wr` | in | 1 | write enable, active high |
| `addr` | in | 4 | word address; 0 selects word line 0 |
| `din` | in | 4 | write data, bit 3 first when written as a string (`4'b1001`) |
| `rd` | out | 4 | read data, held until the next read |
| `qd` | out | 4 | the per-column Q/D bus |
| `cells` | out | 16×4 | stored words |
| `phi1`, `phi2`, `pchb`, `sae`, `wl` | out | 1, 1, 1, 1, 16 | internal timing signals |

There is no reset. Like the real cells, the array powers up with arbitrary
contents.

## Simulating

All files use `` `timescale 1ps/1ps ``. The two behavioural timing blocks need
`--timing`. To build and run the end-to-end test:

```
verilator --binary --timing --assert -Irtl rtl/sram_pkg.sv tb/tb_sram16x4.sv \
          --top-module tb_sram16x4
./obj_dir/Vtb_sram16x4
```

Every block has a testbench `tb/tb_<module>.sv`, built the same way. Each
testbench prints `TB_RESULT checks=N failures=M`, and a watchdog ends it if
it hangs.

`tb_sram16x4` runs the top at its default size and keeps a reference copy of
the memory. It runs, in order:

1. Write 1111, read, write 0000 and read, all at address 0. This runs at a
   2000 ps period and again at 320 ps.
2. Write 1001 to address 0 and 0110 to address 15, then read both back, which
   checks that rows do not disturb each other. This runs at 320 ps and at
   298 ps.
3. The power-measurement pattern: four rounds of (0000 to every address, then
   1111 to every address). That is 128 write cycles, followed by a read of
   every word.
4. 400 random accesses.
5. Accesses whose inputs are changed in the middle of φ2.

It checks:

* `rd` 92 ps after φ2 rises and again at the end of the cycle;
* the cell contents after every write;
* that φ1 and φ2 never overlap;
* that a gap precedes every φ2;
* that no word line is high during precharge.

It also checks that a word line is high whenever SAE fires, that SAE is low
when precharge starts, and that the write drivers are off during reads.

It also counts each mechanism: precharge, gap, write drive, SAE firing and
mid-phase input change. If any of them never occurs, that counts as a
failure.

`tb_cell_column` runs a single cell with the periphery of its column at 2 ns
per cycle: write 1, read, write 0, read, then 40 random cycles. In every
access phase it checks the bitline pair, the Q/D bus and `rd`.

## What the model does not capture

The original circuit's figures of merit are analog quantities, and nothing
here reproduces them:

| quantity | value in the original circuit |
|---|---|
| worst-case read delay | 91.9 ps |
| worst-case write delay | 90.5 ps |
| minimum clock period | 298 ps |
| average power during the write pattern at 320 ps | 54.74 µW |
| cell area as the sum of transistor widths | 0.308 µm |
| FOM = 60·area·P·D² | 8.54×10⁻³⁰ m·W·s² |

Further departures of the model:

* **Gate delays are guesses.** The two-phase clock uses 4 ps per inverter and
  6 ps per NOR; the process has an FO4 delay of about 10 ps. The
  `two_phase_clock` and `sae_gen` delays are parameters.
* **The SAE delay follows measurement, not intent.** The circuit aimed for
  75–100 ps between φ2 and SAE and measured 38 ps. The model uses 38 ps.
  Because bitlines swing fully, any positive delay works in the model.
* **Read stability, write-ability and sense-amplifier offset are assumed
  perfect.** A driven write always wins, and a read never flips a cell. If
  there is no difference on the bitlines when SAE fires, the sense amplifier
  keeps its previous decision.
* **A two-way fight resolves in favour of precharge.** If precharge and a
  write were ever on together, which the phase scheme prevents, precharge
  wins in the model.
* **The `two_phase_clock` loop is intended.** Synthesis reports its
  cross-coupled NOR pair as a combinational loop. That loop is the latch that
  guarantees non-overlap. The model needs its `#` delays to produce a gap.
* **Some details are this design's choice.** The original circuit uses a
  latch on each address bit and on `Wr`, but the phase that clocks them is
  not shown; they are taken to be φ1 latches here. The address bit pairing
  inside the decoder's first NAND level, (A0,A1) and (A2,A3), is also a
  choice. Neither affects function.
