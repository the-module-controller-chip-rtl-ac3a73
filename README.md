# MCC — Module Controller Chip for a 16-chip pixel detector module

A pixel detector module carries 16 front-end (FE) chips. Each one digitises the hits of
its own pixel matrix and, for every accepted trigger, pushes them out on its own serial
line as soon as it can. The FE chips are not synchronised with each other, so their data
for one trigger arrive at different times, scrambled and in bursts. The Module Controller
Chip sits between these 16 chips and the off-detector read-out driver (ROD). It has three
jobs:

* **Event building.** Collect the 16 data streams, wait until every chip has finished a
  given trigger, and send that trigger's hits as one ordered event on a single 40 Mbit/s
  output line (DTO).
* **Trigger and timing control.** Pass triggers (LV1) and re-synchronisation (SYNC) from
  the ROD to all 16 chips. Hold back triggers when too many events are still waiting to be
  read out.
* **Configuration.** Decode the ROD's command stream (DCI). Keep a small register bank,
  and forward configuration bit streams to the FE chips, reading their answers back.

This repository holds synthesizable SystemVerilog for the demonstrator version of the chip:
electrical links, one 40 MHz clock, no bi-phase mark line coding. There are self-checking
testbenches for every block and for the whole chip with 16 behavioural FE chip models.

## Block structure

```
            DCI ──► command decoder ──► TTC (trigger/SYNC control) ──► LV1, SYNC to FEs
                        │   │                    ▲ event_done
                        │   └─► register bank    │
                        └─► DAO/LD/CCK to FEs    │
 DTI[0..15] ─► receiver channel ×16 ─► FIFOs ─► event builder ─► DTO
               (deserialiser + CTRL)            (score board, pending LV1s, transmitter)
 all FE-side pins pass through the front-end port (transparent-mode multiplexer)
```

| Module | Role |
|---|---|
| `mcc_top` | The chip: wires the blocks, merges the three DTO sources |
| `mcc_command_decoder` | Serial command decoder; drives the FE configuration lines |
| `mcc_register_bank` | 11 registers; register read-back on DTO |
| `mcc_ttc` | Trigger patterns, pending-event limit, SYNC |
| `mcc_rx_channel` | One FE input: `mcc_fe_rx` + FIFO control + `mcc_rx_fifo` |
| `mcc_fe_rx` | Deserialiser for the 18/26-bit FE words |
| `mcc_rx_fifo` | 32 × 25-bit FIFO with write, last and read pointers |
| `mcc_event_builder` | Score board, event order, output format |
| `mcc_scoreboard` | 16 trigger numbers × 16 FIFOs completion bits |
| `mcc_pending_lv1` | Queue of triggers not yet built; event counter |
| `mcc_transmitter` | Field-by-field serialiser for DTO |
| `mcc_fe_port` | Registered FE-side I/O and the transparent mode |
| `mcc_pkg` | Shared sizes, word layouts, command and register codes |

## From an FE line to a FIFO

An FE chip sends one word per hit, MSB first. A word is a `1` header bit, a 4-bit trigger
number (LV1#), an 8-bit row, a 5-bit column and, when time-over-threshold (ToT) is on, an
8-bit ToT. That is 18 bits, or 26 with ToT. Any number of zeros may separate words. Each
trigger ends with an end-of-event (EoE) word, which this design marks with row bits
`[7:4] = 1111`. Real rows go up to 159, so these codes are free. EoE row bit 0 is a warning
raised by the FE chip itself.

Each of the 16 channels keeps a FIFO of 32 words × 25 bits (LV1#, row, column, ToT) with
three pointers:

* **W.PTR** advances on each write.
* **L.PTR** ("last") is set to W.PTR whenever an EoE word is written. Everything below L.PTR
  is complete events.
* **R.PTR** is the builder's read pointer. It never passes L.PTR, so the builder can never
  read half an event.

The FIFO can overflow, because the FE chips push data without flow control. The control
logic keeps a count of EoE words still owed by the chip (one per trigger sent, minus EoEs
received). It stores a hit only if the FIFO still has more free words than that count, with
a minimum of one. This keeps room for every EoE word that is due. A hit that does not fit is
dropped, and the EoE that closes its event carries a FIFO overflow warning. The event is
still built, just incomplete.

Two cases are errors rather than warnings:
* An EoE whose LV1# is not the expected next number (the chip lost or gained a trigger). It
  is stored with an error flag, and an error is raised.
* An EoE that finds the FIFO full. This can only happen when a new trigger arrives while the
  FIFO is still full from an earlier overflow. The event can then never complete, an error is
  raised, and SYNC clears the module (see below).

## Score board and event order

Each time a channel stores an EoE it sets one bit in the score board: row = the event's
4-bit LV1#, column = the channel. A row is complete when all unmasked channels have set
their bit (masked channels count as set). Separately, `mcc_pending_lv1` queues the triggers
in the order they were sent and numbers them with an 8-bit counter. The builder always waits
for the oldest queued trigger, so events leave in trigger order even if a later one
completes first. Sixteen rows are enough because at most 15 events may be pending (see TTC).

## Event format on DTO

DTO idles at 0. An event is a chain of fields, each introduced by a sync bit `1`:

```
1 LLLLLLLL                      header bit + 8-bit event number (trigger count)
[1 1111 MMMM]                   module flags, only after a SYNC (M = 0001)
for each FE 0..15 with hits or flags:
  1 1110 FFFF                   FE number
  1 RRRRRRRR CCCCC [TTTTTTTT]   one per hit: row, column, ToT if enabled
  [1 1111 EEEE]                 FE flags, if any
1 00000000000000                trailer: 1 + 14 zeros (1 + 22 zeros with ToT)
```

FE flag bits:
* bit 0: warning from the FE chip
* bit 1: hits lost to a FIFO overflow
* bit 2: trigger number out of sequence

Every field starts with a `1`. A hit is 14 bits (22 with ToT), and no field holds 14
(or 22) consecutive zeros after its sync bit. A `1` followed by that many zeros therefore
cannot occur inside an event and marks its end. The receiver finds the start from the first
`1` on the idle line. An FE with no hits and no flags is left out, which shortens events at
low occupancy.

Every FIFO whose event is empty (a plain EoE at its head) is emptied in the clock the event
starts. Then the builder walks the remaining FIFOs in order. The transmitter holds one field
in reserve, so fields leave back to back with no idle bit inside an event.

## Trigger control (TTC) and SYNC

* **Trigger patterns.** One LV1 command from the ROD produces 1 to 16 triggers in
  consecutive clocks (register LV1CFG[7:4] + 1).
* **Pending-event limit.** A counter holds triggers sent minus events built. A trigger that
  would take it above the limit n (LV1CFG[3:0], 1..15) is not sent to the FE chips, and it
  is counted in the SUPPR register. This stops the FE chips' buffers and the MCC's FIFOs
  from filling up when the read-out falls behind.
* **SYNC.** SYNC comes from the ROD's command or, if CSR[1] is set, from any error. It first
  holds back new triggers. It then waits until all pending events are built and the builder
  is idle (at most 4096 clocks, in case an event can never complete). Finally it pulses SYNC
  to the FE chips and, in the same clock, clears all FIFOs, the score board, the pending
  queue and the event counter. The FE chips reset their own trigger counters on SYNC, so both
  sides restart from 0. The first event after a SYNC carries module flag `0001`.

The trigger path (decoder, TTC, output register) is a fixed pipeline of a few clocks, so
triggers reach the FE chips with the spacing the ROD gave them.

## Commands on DCI

| Bits (first bit first) | Command |
|---|---|
| `11101` | LV1 (trigger) |
| `10110 0001` | SYNC |
| `10110 0010` | Run: start/resume data taking (triggers are ignored before it) |
| `10110 0011 AAAA D×16` | Write register A |
| `10110 0100 AAAA` | Read register A: DTO sends `1` then 16 bits, MSB first |
| `10110 0101` + bits | Write FE: CMDLEN + DATALEN bits, each held 8 clocks on DCI |
| `10110 0110` + bits | Read FE: CMDLEN bits in, DATALEN bits read back |

Register and FE read/write commands take the module out of data taking until the next Run
(Data-Take) command, so the configuration cannot change under a running event. SYNC and
Run themselves do not.

## Registers

| Addr | Name | Content |
|---|---|---|
| 0 | CSR | [0] ToT on, [1] auto-SYNC on error, [2] running (read only) |
| 1 | LV1CFG | [3:0] pending limit n (0 acts as 1; reset 15), [7:4] pattern length − 1 |
| 2 | FEMASK | 1 = ignore this FE input |
| 3 | CMDLEN | Bit count of the command part of an FE stream |
| 4 | DATALEN | Bit count of the data part |
| 5 | WARN | Sticky per-FE warnings (cleared by SYNC) |
| 6 | ERR | Sticky per-FE errors (cleared by SYNC) |
| 7 | PENDING | Pending event count |
| 8 | LV1CNT | Triggers sent since the last SYNC |
| 9 | SUPPR | Triggers suppressed |
| 10 | FESEL | FE whose line is read back (FE read, transparent mode) |

Addresses 11–15 read as 0.

## FE configuration path

The FE chips are configured at 5 MHz: one bit per 8 clocks.
* CCK, the configuration clock, is high in clocks 4–7 of each 8-clock slot.
* DAO, the configuration data, changes at the start of each slot.
* LD is high for the first CMDLEN slots, which the FE chips read as the command and address
  part.

For a read, the selected FE drives its answer on its data line after each falling CCK edge.
The MCC samples it at the rising edge and repeats each bit on DTO for one slot, after a
one-slot start bit. The data receivers ignore their inputs during a transfer and for 15
clocks after it, so the answer is not mistaken for hits.

## Transparent mode

With the TM pin high, the FE control lines come straight from the pins LV1T, SYNCT, DCI,
LDT and CCKT, and DTO shows FE line FESEL. (In the source's drawing the line is picked by a
one-hot shift register loaded through the transparent-mode pins; since its loading is not
described, this design reuses the FESEL register, written beforehand over DCI.) All of these paths are combinational, so the FE
chips can be tested as if the MCC were not there. With TM low, all FE-side inputs and
outputs are registered.

## What is and is not here

These parts follow the source description directly:
* the sizes: 16 FE chips, 32 × 25 FIFOs, a 16 × 16 score board, 18/26-bit FE words
* the three-pointer FIFO rule
* score-board event building in FE order
* header/sync-bit/trailer framing with 8-bit event number and FE number fields
* the pending-event limit and contiguous trigger patterns
* SYNC from the ROD or on error
* 11 registers, including the mask and the two FE stream lengths
* 5 MHz configuration clock
* transparent mode

These are this design's own choices, because the description gives no detail:
* the command codes and their lengths
* the register map and register widths
* the EoE and FE#/flag field codes
* flag bit meanings
* the hit-reservation rule against FIFO overflow
* leaving out empty FEs
* the module flag after SYNC
* the SYNC wait and its time-out
* the read-back formats on DTO
* the trailer length: the source's text gives a 1 and 14 zeros while its format figure
  draws one zero fewer; this design follows the text, and with ToT uses 1 + 22 zeros so
  the trailer stays longer than any ToT hit

Not built:
* the LVDS pads and clock tree (physical)
* the scan-chain test mode (inserted by the test flow)
* the bi-phase mark encoder/decoder and the optical links (only in the optical version)
* the FE chips and the ROD, which exist only as testbench models
* the shift-register test pins of the transparent-mode figure
* a second event output line: the source's ROD interface can split the output over two
  lines (DTO1, DTO2) for bandwidth, but does not say how; this design has the one DTO line

## Simulation

Every block has a testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. Build one with plain Verilator, for example the whole chip:

```
verilator --binary --timing --assert --top-module tb_mcc_top -y rtl -y tb +libext+.sv \
  -Irtl -Itb rtl/mcc_pkg.sv tb/mcc_tb_pkg.sv tb/tb_mcc_top.sv
obj_dir/Vtb_mcc_top +verilator+rand+reset+2
```

`tb_mcc_top` runs the chip at its full size, with 16 `mcc_fe_model` chips and
`mcc_dto_monitor` parsing DTO. It compares every event, hit by hit and flag by flag, with a
reference built from the same deterministic hit generator (`mcc_tb_pkg`). It goes through
these phases, in order, and fails if any mechanism never occurred:
1. Plain data taking, including FIFO overflows.
2. Trigger patterns.
3. The pending limit with suppressed triggers.
4. Masked inputs and ToT.
5. SYNC from the ROD.
6. A trigger-number error that triggers an automatic SYNC.
7. Register read-back.
8. FE write and FE read-back.
9. Transparent mode.
10. A trigger sent while a FIFO is full from an overflow: its end-of-event word is lost, the
    event never completes, and the automatic SYNC recovers the module after its time-out.

It takes well under a second.

Limits of the verification:
* The overflow case is checked only for the affected FE: its hits must be a subsequence of
  what the chip sent, with the overflow flag set.
* Apart from the lost end-of-event in phase 10, the chip-level test leaves time after each
  overflowing event, so events that overlap an overflow are only checked in the channel's
  own testbench.
