# NOR-accelerated test logic for a 1T1R RRAM array

Testing a resistive memory one cell at a time is slow. It also misses the faults specific to RRAM, where a cell ends up in an *undefined* resistance between its two states, and a plain read of it returns random data. This design speeds up such a test and makes those faults detectable. It adds a few small pieces of logic to an ordinary 1T1R RRAM macro:

- **Multi-row NOR.** The row decoder can raise 2, 4, …, 256 wordlines at once. The bitline current is then the sum of the selected cells' currents. A sense amplifier set against a suitable reference answers "does any selected cell conduct like a SET cell?" (a NOR over the rows). One NOR replaces up to 256 "read 0" operations.
- **Binary search.** If the NOR over all rows fails, the faulty row can be found with log2(rows) NORs, each over half as many rows as the last, plus one read: 9 operations for 256 rows.
- **Configurable reference.** A small stack of SET "dummy" cells, weakened by PMOS bleeders on their wordlines, produces a reference current that follows the number of operands. Extra bleeders and one extra dummy cell can shift the reference down (`Test0`) or up (`Test1`).
- **Extended period and raised wordline voltage.** EMA pins stretch the wordline pulse so that small current differences still build up a readable voltage. Raising the wordline supply (`hr`) widens the ratio between good and faulty cells.

Combined in a march test, these turn a random read of an undefined cell into a deterministic one.

The RTL has two kinds of files. The digital control is synthesizable: the decoder, code generator, reference control, period control, search engine and march sequencer. The analog parts are behavioural models that compute with integer currents: the crossbar, the dummy cells and the sense amplifiers.

## Structure

```
rram_dft_top
├── march_controller          march sequencer (detection / detection + location)
│   └── binary_search_engine  log2(rows) NOR + 1 read fault locator
└── rram_cim_macro            memory macro, 256 x 256, MUX4, 64 sense amplifiers
    ├── ema_period_ctrl       wordline pulse length, sense tick
    ├── jc_3to8               step number -> Johnson mask TAA
    ├── row_addr_decoder      latched AA, A' = NAND(AA, TAA), wordlines
    ├── ref_gen_ctrl          dummy wordlines, MEN*, Tp, Tq
    ├── ref_current_model     (behavioural) dummy-cell reference current
    ├── rram_array_model      (behavioural) 1T1R crossbar, VDDW boost, defects
    └── sense_amp_model x64   (behavioural) latch SA with a minimum margin
```

`rram_dft_pkg` holds the shared types: the operation code, the cell states and defect classes of the model, and `xcfg_t`. An `xcfg_t` value is one reference/timing configuration: `test0`, `test1`, `itp`, `itq`, `ema` and `hr`.

## Selecting many rows at once

A normal decoder latches the row address `AA[7:0]` and forms true lines `A = AA` and complement lines `A'` with inverters. A row is raised when, for every bit, the line that matches the row number's bit is high.

Here each inverter is a NAND of the latched bit and a mask bit: `A'[i] = ~(AA[i] & TAA[i])`.

- With `TAA[i] = 1` the decoder is unchanged.
- With `TAA[i] = 0`, `A'[i]` is forced high. If `AA[i] = 1` as well, both lines of bit i are high, so bit i no longer restricts the row.
- With `AA = 11111111` and `TAA = 00000000`, all 256 rows are raised.

`TAA` comes from `jc_3to8`. In normal mode (`ten = 0`) it is all ones. In test mode a 3-bit step number `te` becomes a Johnson (thermometer) code: step *s* sets the *s* low bits. So step 0 raises 256 rows, step 1 raises 128, and so on down to step 7, which raises 2. The step counter sits in the search engine; `jc_3to8` is only the code conversion.

### The search, step by step

The search runs after "write 0 everywhere", so every NOR must return 1. A wrong NOR means a cell in the raised set conducts.

| step | operation | TAA | rows raised | decides |
|------|-----------|-----|-------------|---------|
| 0 | NOR^256 | 00000000 | all | is there a fault at all |
| s = 1..7 | NOR^(256>>s) | s low ones | rows equal to AA on bits s-1..0 | bit s-1 |
| 8 | read, `ten = 0` | 11111111 | row AA | bit 7 |

`AA` starts as all ones. At step *s* the bit under test, *s*-1, is still 1:

- If the NOR is wrong, the fault is in the raised half and the bit stays 1.
- If it is correct, the fault is in the other half and the bit is cleared.

After NOR^2 two rows remain; they differ only in bit 7. A single-row read of the row with bit 7 set decides that bit.

Example: a stuck-at-1 cell at row 215 = `11010111`. The outcomes are wrong, wrong, wrong, wrong, correct, wrong, correct, wrong, wrong. They leave AA = 11010111.

The search always runs all nine steps, so the test length does not depend on the data. `found` reports whether step 0 failed.

## Reference current versus number of operands

A NOR^N must separate two critical cases: all N cells RESET (N·I_OFF) and one cell SET (I_ON + (N−1)·I_OFF). With I_ON = 100·I_OFF, the sum of N small currents soon passes a reference fixed at I_ON/2. So `ref_gen_ctrl` picks dummy cells and bleeder settings for each N (MEN = 0 switches a bleeder on and weakens the cell):

| N | dummy cells on | MEN1 | MEN21:22 | MEN3 | reference (I_OFF) | critical currents |
|---|---|---|---|---|---|---|
| 1–8 | 1 | 0 | – | – | 50 | ≤8 / ≥100 |
| 16 | 1, 2 | 0 | 00 | – | 66 | 16 / 115 |
| 32 | 1, 2 | 0 | 01 | – | 82 | 32 / 131 |
| 64 | 1, 2 | 0 | 10 | – | 114 | 64 / 163 |
| 128 | 1, 2, 3 | 0 | 10 | 0 | 178 | 128 / 227 |
| 256 | 1, 2, 3 | 1 | 11 | 1 | 300 | 256 / 355 |

Per dummy cell: cell 1 gives 50 or 100; cell 2 gives 16, 32, 64 or 100; cell 3 gives 64 or 100 (all in I_OFF). The operand count reaches the macro as `nlog2` (0 = read).

For hard-to-detect faults the reference can be shifted:

- `Test1` raises dummy cell T, which adds `Tp × 5·I_OFF` (`Tp = Test1 & iTp`). This targets weak-1 cells.
- `Test0` enables the `Tq` bleeders, which remove `Tq × 5·I_OFF` (`Tq = Test0 & iTq`). This targets weak-0 cells.

p = q = 3 bits and the 5·I_OFF step are this design's choice.

## Why undefined cells need time, a shifted reference and a boost

The sense-amplifier model treats the developed voltage as |I_BL − I_ref| × pulse length. It resolves deterministically only above a threshold `K_MIN`, which stands for the 40 mV minimum margin; below that the latch output is random. Here is how it plays out in the model (currents in I_OFF/10):

| case | plain operation | extended time + shifted reference |
|------|-----------------|-----------------------------------|
| weak-1 cell (14 kΩ), read 1 | 626 vs 500 over 4 ticks: below the margin, random | `ema = 3` (16 ticks), `Test1`/`iTp = 6` (800): read 0, fault caught |
| weak-0 cell (40 kΩ) in NOR^256 | 2788 vs 3000 over 7 ticks: random | `ema = 3` (28 ticks), `Test0`/`iTq = 6` (2700): NOR gives 0, fault caught |

With `hr = 1` the access-transistor resistance drops from 2 to 1 kΩ. That raises the current of low-ohmic cells much more than of high-ohmic ones (SET 1002 → 1113, HRS unchanged). The same faults are then caught with the shorter `ema = 2` (3×) pulse.

One configuration is used for every step of a binary search, from NOR^256 down to the single read. The shift must therefore clear the margin for all operand counts, not just for 256. In the model, `iTq = 7` with `ema = 3` does so for a weak-0 cell, with or without `hr`. A smaller shift or a shorter pulse leaves some of the middle steps (NOR^16 to NOR^128) resolving at random.

The period of a read or NOR is base × (`ema` + 1), with bases of 4 (read), 7 (NOR) and 12 (write) ticks. These keep the ratio of 0.7 / 1.2 / 2 ns. Writes are never stretched.

## The march test

`march_controller` runs a MATS+-style march. The read-0 element is replaced by NORs over all rows, and every write is doubled to raise the chance of catching intermittent faults. For the four reference configurations x (`xcfg_nor[0..3]`, meant for the H, weak-0, weak-1 and L states):

```
detection:            up(w0 w0); x4(NOR_x 1); up(w1 w1); down(r_x1, w0); x4(NOR_x 1)
detection + location: each x4(NOR_x 1) becomes, per x, a binary search
                      (log2(rows) NORs + one read)
```

A NOR reaches one column group at a time (64 of the 256 columns), so each NOR element loops over the `MUX` column groups. N counts words: rows × MUX. The lengths are therefore:

- detection: 6N + 8·MUX = 6176 operations at full size
- detection + location: 6N + 8·MUX·(log2(rows) + 1) = 6432 operations

With `MUX = 1` these become the textbook 6N + 8 and 6N + 8·log2 N + 8. `tb_march_lengths` runs the sequencer that way over 256 rows against a fault-free memory and gets exactly 1544 and 1608 operations.

Results:

- `fail_count` counts failing reads and NORs, or searches that found a fault.
- `first_phase`, `first_addr` and `first_x` record the first failure. The phases are 0 = w0, 1 = first NOR element, 2 = w1, 3 = r1/w0, 4 = second NOR element.
- `loc_row`, `loc_col` and `loc_x` hold the last fault located.

## Interfaces and timing

**Macro operation port** (`rram_cim_macro`, also used by the sequencer):

- While `busy` is low, a one-tick `req` starts an operation.
- A read or NOR answers with `rsp_valid` and `rdata` *period* + 2 ticks later. *Period* is the EMA-scaled pulse: 4 / 7 ticks at `ema = 0`.
- A write is acknowledged after 14 ticks.
- `rdata` is the stored word for a read. For a NOR it is the NOR result: 1 means no selected cell conducts.
- `margin_ok` shows which amplifiers resolved above the margin.

**Top level:**

- `start` / `locate` / `done` run the test. `xcfg_nor[4]` and `xcfg_r1` set the test configurations.
- `ext_*` is a normal single-row read/write port. It is served only while the sequencer is idle.
- `inj_*` injects defects into the array model (simulation only). The classes are: stuck-at-0/1, a write of 0 or 1 that lands in W0/W1, and a write that lands in the deep states H/L.
- Reset is asynchronous and active low. It clears the array model to HRS with no defects.

## Where this RTL goes beyond, or departs from, the published scheme

- **Search bookkeeping.** The published address-selection table clears, after a correct NOR, one address bit higher than the bit that NOR tested. This RTL clears the tested bit, which is the only self-consistent reading. The decisions and the row found are therefore correct for every row, but the intermediate AA values differ from that table. The table also prints row 215 next to the binary pattern of row 235; the search testbench locates both (and every other row).
- **Logic values.** RESET/HRS is 0 and SET/LRS is 1, so a fault-free NOR over RESET cells gives 1.
- **Counting in the controller.** The step counter sits in the search engine, and `jc_3to8` only expands it. In the published circuit the Johnson counter itself increments.
- **Column groups.** NOR elements loop over the column groups, which adds `MUX` to the test length formulas.
- **Behavioural models.** All analog behaviour is modelled with integer currents: resistances of the undefined and deep states, the linear margin law, the Tp/Tq steps. These numbers were chosen to reproduce the qualitative results (random below the margin, caught with extended time and a shifted reference). They are not circuit data. The LRS is 8 kΩ so that I_ON ≈ 100·I_OFF, as the reference table assumes. The models cannot detect deep H/L states: the ±35·I_OFF reference shift is too small for them.
- **Own choices.** The EMA scale (linear, base × (EMA + 1)), the tick length, the operation handshake, p = q = 3, and the external port and its arbitration are this design's choices.
- **Not modelled.** The layout-level defect resistors and the transistor-level bleeders are represented only by their effect.

## Verification

Every module has a self-checking testbench in `tb/` that prints `TB_RESULT checks=… failures=…`:

- `tb_row_addr_decoder` compares the raised wordlines with an independent matching rule for all rows and random masks.
- `tb_ref_gen_ctrl` and `tb_ref_current_model` check the reference table, and that each reference lies between the two critical currents.
- `tb_ema_period_ctrl` measures every pulse length.
- `tb_binary_search_engine` locates a fault at each of the 256 rows in exactly 9 operations.
- `tb_march_controller` compares the full detection sequence with an independently built list and checks both test lengths.
- `tb_march_lengths` runs the sequencer with one column group over 256 rows and checks that no failure is reported. It also checks the exact lengths 6N + 8 and 6N + 8·log2 N + 8.
- `tb_rram_cim_macro` exercises reads, NORs, search selections and the hard-to-detect cases at full size.
- `tb_rram_dft_top` runs the full-size design end to end (about 13 s). It runs five detection and three location marches with stuck-at, weak-0 and weak-1 defects, and checks that every mechanism actually occurred: multi-row NOR, location, EMA, boost, both reference shifts, below-margin sensing, the test-to-normal switch and the normal port.

## Simulating

```
verilator --binary --timing --assert -Irtl -Itb rtl/rram_dft_pkg.sv \
    tb/tb_rram_dft_top.sv --top-module tb_rram_dft_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_rram_dft_top` with any other testbench to run it. The sense-amplifier model draws random bits below the margin, so `+verilator+seed+N` changes those outcomes; the checks allow for it. Parameters such as `ROWS`, `COLS` and `MUX` scale the whole design. `tb_march_controller` runs the sequencer at 16 rows × 2 column groups.
