# 32x1 bit NOR ROM powered by address transitions

A small read-only memory uses power mostly in its array and decoders: long, heavily loaded
lines are pulled up all the time and discharged on every read. This design removes the
steady supply. An **address transition detector (ATD)** watches the five address bits. After
any of them changes, it emits one short pulse. That pulse is the only supply the row decoder and
the ROM array get. So the memory is alive for about 1.2 ns after each address change and
dark the rest of the time. The price is a read protocol: **the output is valid only while the
pulse is high, and is 0 at every other time.**

The memory holds 32 bits, arranged as 4 rows by 8 columns. It has no clock and no reset.

```
 addr[1:0] ──► a, ~a ──► row_decoder ──wl[3:0]──► rom_core ──bl[7:0]──► column_decoder ──► outbit
                              ▲                      ▲                      ▲
 addr[4:0] ──► atd ──precharge┴──────────────────────┘          addr[4:2] ──┘
                 └──► precharge (output)
```

## Read timing

| event | time after the address change |
|---|---|
| `precharge` rises, `outbit` shows the stored bit | 560 ps (`PULSE_DELAY_PS`) |
| `precharge` falls, `outbit` returns to 0 | 560 ps + 1.2 ns = 1.76 ns |
| earliest next address change | 2.5 ns (`MIN_TRANSITION_PS`, 0.4 GHz) |

Sample `outbit` while `precharge` is high, for example at its midpoint. An address that does not
change produces no pulse, so the same location cannot be read twice in a row without touching the
address. Several bits changing at once produce a single pulse, because the five per-bit pulses
overlap in the OR gate. If a bit toggles faster than the limit, an assertion in the
pulse-generator model fires.

The 1.2 ns width and the 0.4 GHz limit are properties of the original circuit. The 560 ps
edge-to-pulse delay is a modelling choice: the original circuit gives 0.56 ns as the latency of
the whole ROM. Because the decoders and the array are modelled without delay here, that latency
is placed in the pulse generator.

## Address map

`addr[i]` is address bit a*i*.

* `{a1,a0}` selects the row (word line 0..3).
* `{a4,a3,a2}` selects the column (bit line 0..7).

So addresses `00000`..`00111`, read as `a4..a0`, are not one row. To read the eight bits of
row 0 in order, step the column bits: `addr = col << 2`.

The default contents (`rom_pkg::TABLE_I_PATTERN = 32'h55AA55AA`) are a checkerboard. Rows 0 and 2
hold 0,1,0,1,0,1,0,1 on bit lines 0..7. Rows 1 and 3 hold the complement. In other words, the bit
at (row, col) is `row[0] ^ col[0]`. Stepping the column through row 0 therefore reads
0,1,0,1,0,1,0,1.

## The blocks

### `atd` and `dual_edge_pulse_gen`: where the supply comes from
The ATD has one dual-edge pulse generator per address bit, and a five-input OR of their outputs.

Each pulse generator gives a pulse after every rising edge and after every falling edge of its
input. In silicon it is a few transistors around two inverters. The output is high only while
the inverters still hold the old input level. `dual_edge_pulse_gen` is a **behavioural model**
of that function, built with `#` delays; it cannot be synthesized:

* the input is compared with a copy of itself delayed by `PULSE_WIDTH_PS`;
* the time during which the two differ, shifted by `PULSE_DELAY_PS`, is the pulse.

Replace this module with a custom cell for silicon. Everything else is ordinary combinational
logic.

The model's internal delayed copy starts from an arbitrary value. A pulse can therefore appear
at power-up. A real circuit behaves the same way.

### `row_decoder`: NOR 2:4 decoder
The decoder takes both true and complement address lines. The complements are made in the
top level by inverting a0 and a1.

Row line *i* is the NOR of the literals that must be 0 for row *i*, ANDed with `precharge`.
Outside the pulse all word lines are low. Row *i* answers address `{a1,a0} = i`.

### `rom_core`: NOR array
Every bit line has a pull-up supplied by `precharge`. Where the stored bit is 0, a pull-down
transistor, gated by that row's word line, connects the bit line to ground. The model works as
follows:

* A bit line is 1 when `precharge` is high and no active word line has a pull-down on it.
* With one word line active, the bit lines show that row.
* Outside the pulse every bit line is 0.

`ROM_DATA[row][col] = 1` means that location has no transistor.

### `column_decoder`: 8:1 tree
The column decoder is a binary tree of 2:1 selections, matching a pass-transistor tree:

* a2 picks within the pairs c0/c1, c2/c3, c4/c5 and c6/c7;
* a3 picks within pairs of those results;
* a4 makes the final choice.

A tree with 2^k inputs has 2^k + … + 1 nodes, which is 14 transistors for 8 inputs. The column
decoder is not gated by `precharge`. Its inputs are already 0 outside the pulse.

### `rom32x1_atd`: top level
The top level wires the four blocks as in the diagram above. It brings out `precharge` so that a
user can time the sample.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `ROW_BITS` | 2 | row address bits (4 word lines) |
| `COL_BITS` | 3 | column address bits (8 bit lines) |
| `ROM_DATA` | `32'h55AA55AA` | contents, `[row][col]`, row 3 in the top byte |
| `PULSE_WIDTH_PS` | 1200 | precharge pulse width |
| `PULSE_DELAY_PS` | 560 | address change to pulse start |
| `MIN_TRANSITION_PS` | 2500 | shortest allowed time between edges of one address bit |

Constants shared between modules live in `rom_pkg`. All files use `timescale 1ps/1ps`.

## How far to trust it, and where it departs from the original circuit

* **Kept:** the organisation, the contents, the block structure (a NOR row decoder, a NOR array,
  a tree column decoder, and an ATD built from per-bit dual-edge pulse generators and an OR),
  the gating of the decoder and the array by the pulse, the zero output outside the pulse, the
  1.2 ns pulse width, and the 0.4 GHz limit.
* **Chosen here:**
  * the 560 ps delay;
  * the active-high `precharge` polarity;
  * which address literal drives which row (natural binary order);
  * making the complement address lines with inverters in the top level.
* **Not modelled:** anything electrical. That includes transistor sizes, output swing without a
  sense amplifier, the power drawn and its dependence on contents and rate, and the drive
  strength of the OR gate.
* **Timing:** the pulse generator's timing is a fixed delay model, not a characterised cell. The
  decoders and the array are zero-delay.

## Simulating

The testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M`. The timing
model needs Verilator's `--timing`:

```
verilator --binary --timing --assert -y rtl rtl/rom_pkg.sv tb/tb_rom32x1_atd.sv \
          --top-module tb_rom32x1_atd
./obj_dir/Vtb_rom32x1_atd
```

| testbench | what it checks |
|---|---|
| `tb_dual_edge_pulse_gen` | one pulse per edge, 560 ps delay, 1.2 ns width, at 5 ns and 2.5 ns spacing |
| `tb_atd` | each bit alone and several bits at once give exactly one pulse; no change gives no pulse |
| `tb_row_decoder` | one-hot rows while precharged, none otherwise (exhaustive) |
| `tb_rom_core` | every word-line combination, both precharge levels, two different contents |
| `tb_column_decoder` | every select value against walking and random bit-line words |
| `tb_rom32x1_atd` | the whole ROM at default parameters: row 0 read in column order, all 32 locations at 200 MHz with multi-bit changes, 16 reads at 0.4 GHz; slot timing, zero outside the slot, and counts of each event |
| `tb_rom_workloads` | all-ones, checkerboard and all-zeros contents, each read completely at 50, 100, 200 and 400 MHz |

All of them finish in well under a second.
