# MS2005 muon sorter — main FPGA logic

In the CMS endcap muon trigger, twelve Sector Processors (SP) each find up
to three muon candidates every LHC bunch crossing (bx, 25 ns).  The muon
sorter has to pick the four best of those 36 candidates every bx, convert
them to the units of the Global Muon Trigger (GMT), and send them on four
cables in ranked order.  It also tells every SP which of its candidates won,
and it carries enough test buffers to exercise the whole chain — SP
backplane, sorter, GMT cables — without the neighbouring boards.

This repository is SystemVerilog RTL for the main FPGA of that board, plus
the small control PLD functions (board resets, JTAG enable) that sit next to
it.  It is synthesizable and every block has a self-checking testbench.

## Data flow in one bunch crossing

```
 SP1..SP12 ──┐                    ┌─> FIFO_C1..4 (sorter outputs)
 (2 frames   ├─ MUX ─> input ─> SORTER ─> LUTs + eta ─> GMT word ─┬─> FIFO_B1..4
  at 80 MHz) │  Test/   regs    4 of 36    (per muon)  formatting │
 FIFO_A1..12 ┘  Trigger              │                            ├─ MUX ─> gmt_out[0..3]
                                     └─> winner logic ─> SPs      │ CSR0[10]
                                                   RAM_1..4 ──────┘
                       gmt_out[0] ── cable loop-back ──> gmt_rx ──> FIFO_D
```

1. **Input.** Each SP sends 64 bits per bx as two 32-bit frames at 80 MHz.
   Frame 1 holds phi and eta of the three muons plus BC0 and SE; frame 2
   holds the 7-bit ranks, VC, C, HL plus BX0 and a spare bit.
   `ms_input_rx` keeps frame 1 and, in the frame-2 cycle, assembles the
   pattern.  In Test mode (`CSR0[0]=1`) the frames come from that SP's FIFO_A
   instead.  An SP whose CSR9 bit is set is replaced by zeros.
2. **Sorting.** `ms_sorter` ranks all 36 muons by their 7-bit rank; rank 0
   means "no muon".  When ranks are equal, the muon with the higher physical
   address wins.  The address is `3*(SP_ID-1) + muon number - 1`, so SP12
   beats SP1, and Muon_3 of an SP beats its Muon_1.
   - The sorter has no sorting network.  For each muon it counts how many of
     the other 35 beat it; pairwise comparisons make this a 36×36 matrix.
   - A muon that is beaten by exactly p others (p < 4) becomes output p.
   - The ordering is strict, so the four 36-bit "selected" vectors are
     one-hot.  They drive an AND-OR merge of the patterns and also go to the
     winner logic.
   - This is the largest block: about 6,500 cells.
3. **Conversion.** Each of the four outputs has its own `ms_out_lut`:
   - a 512×8 Rank LUT (rank → {Quality, Pt});
   - a 512×8 Phi LUT ({SP_ID, phi} → global phi);
   - an eta decoder: SP7–12 are the negative endcap, which sets bit 5.

   The default LUT contents are computed in the RTL:
   - The Rank LUT is the identity.
   - The Phi LUT adds `6 + 24·((SP_ID−1) mod 6)`.  Sector 1 starts at bin 6
     (15°), and each 60° sector is 24 bins of 2.5°.

   Both LUTs can be rewritten over VME.
4. **GMT word.** `ms_gmt_format` builds the 31-bit cable word:

   | bits | field |
   |---|---|
   | 7:0 | phi |
   | 12:8 | inverted Pt |
   | 15:13 | inverted Quality |
   | 21:16 | eta |
   | 22 | HL |
   | 23 | C |
   | 24 | VC |
   | 27:25 | Bx |
   | 28 | Bc0 |
   | 29 | SyncEr |
   | 30 | parity, 1 when bits 29:0 hold an even number of ones |

   - A slot with Pt = 0 is sent as the empty candidate: phi, Pt and quality
     all ones, and the other muon bits 0.
   - Bc0 is the OR of all SPs' BC0 bits.
   - Bx and SyncEr depend on the CSR0 masks; see "Synchronisation bits" below.
5. **Outputs.** A registered multiplexer sends either the four sorter words
   or the four RAM words (`CSR0[10]`) to `gmt_out`.

### Winner bits

Each SP has two winner lines, each carrying two 80 MHz frames:

| line | frame 1 | frame 2 |
|---|---|---|
| Wi[0] | Muon_1 selected | Muon_3 selected |
| Wi[1] | Muon_2 selected | 0 |

- The bits leave one bx after the sorter register.
- `CSR0[15:12]` adds 0–15 more bx, through a shift register of the 36
  "won" flags.
- In training mode, Wi[0] carries a 40 MHz square wave: 1 in frame 1, 0 in
  frame 2.  SPs use it to time their capture.
- The CCB Start Trigger command (06h) or a VME write selects winner mode.
  Stop Trigger (07h), a VME write or Soft_Reset selects training mode.
  After power-up the logic is in winner mode.

## Clocking and latency

There is one clock, `clk`, at 80 MHz.
- A flop toggles every cycle.  It is 0 in the frame-1 cycle and 1 in the
  frame-2 cycle; the first cycle after `rst` carries frame 1.
- Its value is also the 40 MHz clock enable `ce`.  Everything that runs
  once per bx is an 80 MHz flop enabled by `ce`: sorter, LUTs, FIFO_B/C/D
  writes, BXN and the winner delay line.
- On the real board, the clock managers place this clock inside the SP data
  window.  The DCM phase steps and the delay chip setting (CSR8) are only
  passed out to ports here.

Latency, counted from the edge that ends the frame-2 cycle of bx *n*:

| stage | available after |
|---|---|
| input register | bx *n* edge |
| sorter register, FIFO_C write | +1 bx |
| LUT register, FIFO_B write | +2 bx |
| `gmt_out` | +3 bx |
| winner frame 1 | +2 bx (+ programmed delay) |
| MS_L1A_Request | +2 bx |

The SP driver in the top-level testbench sees GMT words four bx after it
starts driving frame 1.

## Synchronisation bits

- **BXN** is a 16-bit bunch counter.
  - The CCB L1Reset (03h) and Bunch Counter Reset (32h) commands load it
    from CSR7 and stop it.
  - BC0 (01h), or the dedicated BC0 line, starts it counting from the next
    bx.
  - The comparison with the muons happens at the LUT stage, so CSR7 must
    include that pipeline offset.
- **Bx bits** (27:25):
  - MASKBXN (`CSR0[8]`) sends BXN[2:0].
  - Otherwise MASKER (`CSR0[7]`) sends the muon's own BX0 on bit 25, with
    the other two bits 0.
  - Otherwise all three bits are 0.
  - MASKBXN wins when both are set.
- **SyncEr** (bit 29) is the OR of two terms:
  - MASKSP (`CSR0[5]`) passes the SP's SE bit.
  - MASKCOMP (`CSR0[6]`) flags a valid muon whose BX0 differs from BXN[0].

## Test buffers

All buffers are 511 × 32 bits (`ms_fifo`).  Over VME, each buffer is two
16-bit registers:
- Writing the low half latches it; writing the high half pushes the whole
  word.
- Reading the low half peeks at the head word; reading the high half pops it.
- An empty FIFO reads as 0.

CSR1 shows the flags: FULL is the OR over a group, EMPTY the AND.
Soft_Reset empties every buffer.

| buffer | written by | condition |
|---|---|---|
| FIFO_A1..12 | VME | — ; played into the sorter in Test mode |
| FIFO_C1..4 | sorter outputs before the LUTs, with SP_ID | rank of the 1st best ≠ 0 |
| FIFO_B1..4 | GMT words, bit 31 = 0 | Pt/Quality of the 1st best ≠ 0 |
| FIFO_D | word received on `gmt_rx` | during RAM playback, received Pt/Quality ≠ 0 |

Because all four FIFO_B (and all four FIFO_C) buffers are written together,
they always hold the same number of words.  Empty slots are stored as zero
(FIFO_C) or as the empty-candidate word (FIFO_B).

**FIFO_A playback** (`ms_test_player`):
- Starts on a write to 70015Eh or the CCB Inject command (31h), in Test mode.
- All twelve FIFO_A buffers are read for 510 consecutive 80 MHz cycles, which
  is 255 patterns.
- Reads start in a frame-2 cycle, so the first word leaves the FIFO's output
  register in a frame-1 cycle.
- The last word loaded into every FIFO_A should be 0.  Reads past the end
  return 0, which is "no muon".

**RAM playback**:
- Four 512 × 32 RAMs share one 9-bit address counter, which does not
  auto-increment.
- CSR6 selects which 16-bit halves a VME access touches. Bit 2m selects
  RAM m+1 bits 15:0, and bit 2m+1 selects bits 31:16.  Writes go to every
  selected half; reads return the OR of the selected halves.
- With `CSR0[10]=1`, a write to 70017Eh or a pulse on the CCB bunch counter
  reset line plays addresses 0..511 to GMT, one word per bx.  That is 12.8 µs.
- Bits 29:0 are sent unchanged; the parity bit is computed.
- During that window, FIFO_D captures what comes back on the loop-back
  connector.

## Register map (A24, base = geographical address << 19; slot 14 → 700000h)

| offset | register |
|---|---|
| 010 | write: reset pulse to the VME JTAG controller |
| 012, 014 | CSR4 (JTAG enable, CCB reset enable), CSR3 (configuration done) |
| 016, 018 | write: 500 ns FPGA reload pulse; Soft_Reset |
| 100 + 4i | FIFO_A(i+1) low/high half |
| 130 + 4m, 140 + 4m, 150 | FIFO_B(m+1), FIFO_C(m+1), FIFO_D |
| 158, 15A, 15C | CSR0 (mode), CSR1 (FIFO flags), CSR2 (firmware date) |
| 15E | write: start FIFO_A playback |
| 160, 162, 164 | DCM1/DCM2 phase step (data bit 0 = increment), clear PSDONE |
| 166, 168 | CSR7 (BXN load value), CSR5 (DCM status, sticky PSDONE) |
| 16A, 16C | write: winner mode, training mode |
| 16E, 170 | CSR8 (clock delay chip), CSR9 (SP disable, bit i = SP i+1) |
| 172, 174 | write: reset DCM1, DCM2 |
| 178, 17A, 17C, 17E | RAM address, CSR6, RAM data, write: start RAM playback |
| 400 + 400h·m + 2a | LUT m+1, word a: {Rank LUT, Phi LUT} |

CSR0 bits:

| bit | function |
|---|---|
| 0 | Test mode |
| 5 | MASKSP |
| 6 | MASKCOMP |
| 7 | MASKER |
| 8 | MASKBXN |
| 9 | MS_L1A_Request enable |
| 10 | GMT source is the RAMs |
| 15:12 | winner delay |

The VME slave (`ms_vme_if`):
- answers AM 39h/3Dh word cycles whose A[23:19] match the slot's
  geographical address;
- passes AS/DS through two-flop synchronisers, then issues one strobe on an
  internal register bus;
- asserts DTACK about five clocks after the data strobes.

Each register block returns registered read data, and the top ORs them.
The CCB hard-reset commands and the MS_hard_reset line request an FPGA
reload only when CSR4[1] = 1.  The VME reload request is unconditional.

## Where this design departs from, or fills in, the specification

- **Filled in by this design:**
  - the single-clock scheme and the pipeline register placement;
  - the internal register bus;
  - the sorter structure and the tie-break between muons of the same SP;
  - the VME handshake timing and the order of the 16-bit halves in FIFO
    accesses;
  - the power-up winner mode;
  - treating a winner delay of 0 as "no extra delay";
  - MASKBXN taking priority over MASKER;
  - computing the parity bit during RAM playback, while RAM bits 29:0 go
    out unchanged.
- **Where the specification contradicts itself:**
  - The L1A request enable is bit 9 of CSR0, as in the CSR0 bit table; one
    passage names bit 7, which is MASKER.
  - 70015Eh starts the FIFO_A transmission and 70017Eh starts RAM playback,
    as in the address table; one passage gives 70015Eh for the RAM.
- **Outside the FPGA, and only brought out as ports:**
  - clock managers and delay chip;
  - GTLP/LVDS transceivers;
  - JTAG controller;
  - configuration memories;
  - the front-panel LEDs and their one-shots.  The logic behind them is
    here: `led_test`, `led_clk40` (bit 22 of a bx counter, 4.8 Hz),
    `fifo_flags` and `muon_valid`.

  All ports are active-high; the board transceivers are assumed to invert
  the active-low backplane and VME signals.
- CSR2 returns a firmware-date parameter (`FW_DATE`, default 1252).

## Files

Shared package:
- `rtl/ms_pkg.sv`: field layouts, register offsets, helper functions.

Datapath:
- `ms_input_rx`
- `ms_sorter`
- `ms_out_lut`
- `ms_gmt_format`
- `ms_winner`

Buffers and sequencing:
- `ms_fifo`
- `ms_out_ram`
- `ms_test_player`

Control:
- `ms_ccb_if`
- `ms_vme_if`
- `ms_csr`
- `ms_cpld_ctrl`

Top: `ms2005_top`, with no parameters; all sizes come from `ms_pkg`.

Every module has its interface and timing in its opening comment.

## Simulation

Each `tb/tb_<module>.sv` works the same way:
- It is self-checking against an independent model.
- It ends with a `TB_RESULT checks=N failures=M` line.
- It has a watchdog.

`tb/tb_ms2005_top.sv` runs the whole board at full size:
- random SP traffic in Trigger mode, checked word by word against a
  reference sort;
- the LUT defaults and the bit table;
- SyncEr and Bx masking, with BXN started by CCB commands;
- an SP disabled through CSR9;
- MS_L1A_Request;
- winner and training modes;
- FIFO_A playback started over VME and by CCB Inject, with FIFO_B/FIFO_C read
  back over VME;
- RAM playback looped back into FIFO_D, started over VME and by the CCB line;
- LUT rewrite and CSR2 read over VME;
- Soft_Reset, the JTAG-controller reset, the reload pulse and the CLK40 LED
  counter.

It counts each of these and fails if any never happened.  It takes well
under a second.

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/ms_pkg.sv \
    tb/tb_ms2005_top.sv --top-module tb_ms2005_top -Mdir obj_top
./obj_top/Vtb_ms2005_top
```

`-y rtl` lets Verilator find the other modules by name; only the package has
to be listed first.  For a unit testbench, replace the file and top module
name, e.g. `tb/tb_ms_sorter.sv` and `tb_ms_sorter`.  `-Wno-fatal` keeps the
unused-parameter style warnings from stopping the build.
