# Single-bit error correction for DRAM with a reconfigured signature analyzer

A testable DRAM chip often carries a parallel signature analyzer (PSA): a
register with one stage per bit line that compresses whole word lines
during memory test. This design reuses that register during normal operation.
With its flip-flops and feedback bypassed, the PSA becomes an XOR chain
across the selected word line. Each word line gets one extra parity cell, so
on every access the chip reports on its scan-out pin whether that word line
holds an odd number of upsets.

A memory of `W`-bit words is built from `W` one-bit-wide chips and one more
chip that stores the parity of each word. When a word is read, the
controller has two kinds of evidence:

* the **level-2** check: the XOR of the `W` data bits and the stored word
  parity (`h_l2_err`);
* the **level-1** check of every chip: its word-line parity, on its scan-out
  pin (`h_row_err`).

The word-line check covers every cell on the selected row, not only the one
addressed. A word is therefore a line through a block of `W+1` chips, and
every access checks the whole plane of `(W+1) x COLS` cells around it. One
extra chip gives single-error correction. A Hamming SEC/DED code would need
`log2(W)+2` extra chips: 6 for `W = 16`. The scheme also finds upsets in
cells that nobody is reading yet.

The repository also has behavioural models of two ganged-CMOS circuits.
They are unrelated to the memory and sit beside it in the top level (see
the last section).

## Reading a word: the decision table

`ecc_decoder` turns the `W+1` bits and the `W+1` word-line flags into one of
five outcomes (`psa_ecc_pkg::ecc_status_e`):

| level-2 check | word-line flags | status | what it means | what the controller does |
|---|---|---|---|---|
| pass | none | `ECC_OK` | error-free | nothing |
| pass | exactly chip *i* | `ECC_LATENT` | the word is good; another cell on chip *i*'s word line is upset | scrubs the word line |
| pass | two or more | `ECC_DOUBLE` | two single-bit errors: both in this word, or on the word lines | scrubs the word line (it fixes what it can locate) |
| fail | exactly chip *i* | `ECC_CORRECTED` | the bit from chip *i* is wrong | returns it complemented and restores the cell |
| fail | none, or two or more | `ECC_UNCORRECTABLE` | detected, cannot be located | nothing |

The key case is `ECC_CORRECTED`. The word parity says this word holds an
error, and exactly one chip says its word line holds one. The cell at the
crossing is the only one that explains both, so it is complemented. If
*i* = `W`, the upset is in the parity chip and the data are already right.

**Scrubbing.** On `ECC_LATENT` or `ECC_DOUBLE` the word just read is good,
but a word line holds an upset. The controller reads every column of that
row in all chips. At the upset column the level-2 check fails and the
chip's flag is set, so the decoder returns `ECC_CORRECTED` and the cell is
restored. This removes a single upset on a word line before a second one
can join it. Two upsets on one word line of one chip cancel in the word-line
parity, and the scheme cannot see them until one of them is read
(`ECC_UNCORRECTABLE`).

**Restoring a cell** uses a chip operation that does not touch the row
parity (`OP_FIX`). The parity already has the value from before the upset,
so a normal write (below) would spoil it.

## Keeping the word-line parity: the read before every write

All cells and parity cells start at 0. After that, a write that changes a
cell (a *transition write*) complements the row's parity cell. A write that
leaves the cell as it was leaves the parity alone. The XOR of a word line
and its parity cell is therefore always 0 in a healthy chip. To know whether
a write is a transition, the chip first reads the cell into its data-out
buffer and the parity cell into a parity buffer. `parity_update` XORs the
data-in with the data-out buffer and toggles the parity on a 1. The row is
then restored with the new cell and parity.

The controller stores the XOR of the data bits in the parity chip, which
keeps its own word-line parity in the same way.

## The signature analyzer (`psa`)

The analyzer has one stage per bit line (`M = COLS + 1`; the last stage sits
on the parity column). The chip pins `TEST`, `MODE` and `WRITE` (`test`,
`mode`, `wr`) set its function:

| TEST | MODE | WRITE | function on each step |
|---|---|---|---|
| 1 | 0 | 0 | scan: shift by one, stage 0 takes `scan_in` |
| 1 | 1 | 0 | signature: stage *j* ← bit line *j* XOR stage *j−1* XOR (tap *j* AND quotient); stage 0 ← bit line 0 XOR (tap 0 AND quotient) |
| 1 | 0 | 1 | write: stages hold and are written into the selected word line |
| 0 | – | – | parity checker: `scan_out` = XOR of all bit lines |

The *quotient* is the last stage. With `TEST = 1` it appears on `scan_out`.
The feedback polynomial is the parameter `TAPS`. Its default, `1`, feeds the
quotient back into stage 0 only (`x^M + 1`); use a primitive polynomial of
degree `M` for stronger compression. `PARITY_TREE` selects how the
normal-mode parity is built. `1` gives a balanced XOR tree with logarithmic
depth. `0` gives the stage-by-stage cascade, whose depth grows with the row
length. Both give the same value.

## The chip (`dram_chip`)

A chip holds `ROWS x COLS` data cells plus one parity column. It contains
`dram_array`, `psa` and `parity_update`. Every operation takes two cycles:

* **cycle 0**: `req` is taken while `ready` is high, and the word line is
  selected into the row latch;
* **cycle 1**: `done` is high, and `dout` and `scan_out` are valid. A write
  restores the row at the end of this cycle, and an analyzer step takes
  effect then.

`ready` returns in the next cycle. In normal mode (`test = 0`), `op` selects
`OP_READ`, `OP_WRITE` (parity-maintaining) or `OP_FIX`. In test mode, `req`
is one analyzer step on word line `row`. Hold `test`, `mode` and `psa_wr`
stable while an operation is in flight; an assertion checks this.

A write that did not keep the parity could finish in one cycle. The read in
front of each write costs about one extra cycle per write.

## The controller (`ecc_controller`) and the system (`psa_ecc_top`)

`psa_ecc_top` connects one `ecc_controller` to `W+1` chips. Chip *i* holds
bit *i* of every word, and chip `W` holds the word parity. A word address is
`(h_row, h_col)`, the same in every chip.

* **Reset and initialisation.** Reset clears the analyzers. The controller
  then writes every word line from the all-zero analyzer in write mode. This
  takes 2 cycles per row: 512 cycles at the default size, after which
  `init_done` goes high.
* **Host write.** The host raises `h_req` with `h_we = 1` while `h_ready` is
  high. The chips are busy for 2 cycles.
* **Host read.** `h_rvalid` comes one cycle after acceptance, together with
  the corrected `h_rdata`, `h_status`, `h_l2_err` and `h_row_err`. A restore
  keeps `h_ready` low for 2 more cycles. A scrub takes 2 cycles per column,
  plus 2 for each restored cell.
* **Test port.** While `t_test = 1` and the controller is idle, each `t_req`
  steps every chip's analyzer in the mode set by `t_mode`/`t_wr`. Each chip
  has its own scan-in and scan-out pin (`t_scan_in`, `t_scan_out`), and
  `t_done` ends the step. This is how memory tests run on the analyzers. For
  example, MSCAN (write 0s, read, write 1s, read) needs 4 row operations per
  word line instead of 4 per cell. The same port can overwrite a word line
  with any content, which the testbenches use to plant soft errors.
* **Events.** `ev_fix` pulses when a cell is restored, and `ev_scrub_start`
  pulses when a scrub begins.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `W` | 16 | data bits per word = data chips |
| `ROWS` | 256 | word lines per chip |
| `COLS` | 256 | data cells per word line |
| `TAPS` | 1 | analyzer feedback taps (`COLS+1` bits) |
| `PARITY_TREE` | 1 | word-line parity as a tree (1) or a cascade (0) |

The scheme works for any word width and chip size. `W = 16` with 64K-bit
chips (256 x 256) is this design's choice. The default system has 17 chips
of 256 x 257 cells, 1,118,464 bits in all.

## Where this RTL departs from, or adds to, the scheme

* The analyzer stage is a transistor-level dynamic circuit clocked by two
  non-overlapping phases. Here it is an edge-triggered register with a step
  enable and an asynchronous reset.
* The cell array is an ideal synchronous whole-row memory. Precharge,
  sensing and refresh are not modelled.
* The following are this design's own choices: the commands and two-cycle
  chip timing, `OP_FIX`, initialising through the analyzers, scrubbing in
  hardware, the host handshake, and the default feedback polynomial.
* A host write to a word line that already holds an upset is not guarded
  against. The parity toggle keeps the existing mismatch, so the row stays
  flagged. But a write to the upset cell itself moves the mismatch into the
  parity cell, and a scrub cannot locate it there. If this matters, read a
  word line (and let it be scrubbed) before writing to it.
* Faults that hit many cells are detected, not repaired. An inverted word
  line of one chip (a failed chip or word-line driver) flips 257 cells, an
  odd number, so the row is flagged and the first word read is corrected.
  Restoring that one cell leaves an even number inverted. After that, the
  level-2 check still reports words on the row as `ECC_UNCORRECTABLE`, but
  they are no longer located.
* No memory-test sequencer is included. Tests such as MSCAN, Column Bar,
  MATS, Marching, Walking 0/1 and GALPAT are run by an external tester
  through the test port.

## Ganged-CMOS models (`gcmos_gate`, `glad_adder`)

These are behavioural models of transistor circuits, not logic meant for
synthesis as is. In a ganged-CMOS gate, several inverters drive one shared
node and an encoding inverter buffers that node. The node settles at a
ratio set by how strongly the pulling-up and pulling-down transistors
fight. `gcmos_gate` computes that ratio from integer transistor strengths
(`KN`, `KP`) and gives the node level in per cent of VDD (`vg_pct`). Its
output is high when the node is below the encoding inverter's switching
point `VSW_PCT`. The sizing chooses the function:

* OR: strong n-transistors;
* AND: strong p-transistors;
* A·B+C: the C inverter twice as strong.

`glad_adder` is a full adder built from two such nodes. The carry node is a
3-input majority. The sum node adds the inverted carry at double weight:
`sum = (a + b + cin + 2·¬cout ≥ 3)`. This weighting is a reconstruction of
the circuit's function, not its published sizing. `psa_ecc_top` brings
three gates (`g_or`, `g_and`, `g_abc`) and one adder (`fa_*`) out to ports.

## Files

| file | contents |
|---|---|
| `rtl/psa_ecc_pkg.sv` | `chip_op_e`, `ecc_status_e` |
| `rtl/psa.sv` | signature analyzer / word-line parity checker |
| `rtl/parity_update.sv` | transition-write parity toggle |
| `rtl/dram_array.sv` | cell array with parity column |
| `rtl/dram_chip.sv` | testable DRAM chip |
| `rtl/ecc_decoder.sv` | decision table and bit correction |
| `rtl/ecc_controller.sv` | initialisation, read/write, restore, scrub, test port |
| `rtl/psa_ecc_top.sv` | the system and the ganged-CMOS examples |
| `rtl/gcmos_gate.sv`, `rtl/glad_adder.sv` | ganged-CMOS models |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For
example, the full-size system test:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_psa_ecc_top rtl/psa_ecc_pkg.sv tb/tb_psa_ecc_top.sv
./obj_dir/Vtb_psa_ecc_top
```

Replace the top module and file to run another testbench. Run them from the
folder that holds `rtl/` and `tb/`.

What the testbenches cover:

* `tb_psa_ecc_top` runs at the default size and finishes in well under a
  second. It checks the initialisation time and runs MSCAN and Column Bar
  on the analyzers, comparing every quotient bit and the final signature
  with a software model. It then mixes random writes (with and without
  transitions) and reads. Finally it plants soft errors, including a whole
  inverted word line, to produce each status. It counts each mechanism
  (restore, scrub, parity-chip fix, the three analyzer modes) and requires
  each to occur at least once.
* `tb_ecc_controller` runs the same sequence at 4+1 chips of 8 x 8 cells,
  with a two-tap polynomial. Its chips alternate between the tree and the
  cascade parity.
* The unit testbenches compare each module with an independent model:
  random traffic for the chip, array and analyzer, and exhaustive inputs for
  the parity update, gates and adder.

Every testbench is also known to fail on a deliberately broken copy of its
module.
