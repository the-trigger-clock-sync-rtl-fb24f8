# Trigger, clock and SYNC distribution for a pipelined DAQ

A large data-acquisition system has one trigger decision and up to 128
front end crates. The crates sit behind optical fibres of very different
lengths, from a few metres to 150 m. Every front end module must receive
each readout trigger in the *same* 4 ns clock, with the right event type.
The crates must also be able to slow the trigger down before any buffer
overflows. This RTL builds that distribution network:

* one **Trigger Supervisor (TS)** forms triggers from 75 level-one inputs
  and sends them as a 16-bit word every 16 ns. It also sends 4-bit
  commands on a separate SYNC line, throttles triggers on feedback, and
  keeps a record of every trigger;
* a **Signal Distribution (SD)** board fans the TS signals out to 16
  slots and merges what comes back;
* up to 16 **Trigger Distribution (TD)** boards each drive 8 fibre links;
* one **Trigger Interface (TI)** per crate measures its fibre and
  delays the SYNC line to match. It replays the trigger words through a
  FIFO so that all TIs fire together, keeps event records for the
  crate's readout controller (ROC), and reports BUSY back;
* a front end SD in each crate fans the TI's trigger and reset out to
  16 modules and merges their BUSY.

The central idea is that **SYNC is delay-compensated and the trigger
link is not**. Each TI delays its SYNC line so that every TI decodes a
command in the same clock. The trigger words are written into a FIFO as
they arrive, early or late. Reading starts on the compensated "trigger
start" SYNC command and then takes one word per 16 ns slot. Every TI
therefore reads the same word in the same clock, whatever its fibre.

```
 L1 inputs ─► ts_core ──tlink,SYNC──► sd_fanout ─► td_core ×16 ─► fibre ─► ti_core ─► sd_fanout ─► 16 modules
                 ▲                       │            │  8 links     │         │  ▲            │
                 └──── BUSY, SyncReset ◄─┴────────────┴─ status ◄────┘         │  └─ BUSY ◄─────┘
                                                                           ROC port
```

## Time base

The whole system runs on one 250 MHz clock (4 ns). The 62.5 MHz clock,
which paces the trigger words, is modelled as a 2-bit **slot phase**
counter: one slot is 4 clocks (16 ns) and carries one word. The TS
counter runs freely. A TI resets its counter to 0 when it decodes a
clock re-sync SYNC command (0011 or 0010). Because that command is
delay-compensated, all TIs end up with the same phase. Serialisers,
clock chips and PLLs are not modelled; the words and the SYNC bits
travel in parallel on the same clock.

## The trigger link (`ts_trigger_word`, `ti_trigger_decode`)

Every slot carries one word, marked `valid` for one clock:

| header | bits 11:0 | meaning |
|---|---|---|
| `1001` | quadrant[11:10], event type[9:0] | GTP major trigger |
| `1010` | quadrant, event type | external major trigger |
| `1011` | four 3-bit types, partition 1 in [2:0] | sub-TS (partition) triggers |
| `0110` | quadrant, event type | VME test trigger / inserted SyncEvent (type 0) |
| `0101` | command | VME command |
| `0100` | TS timer bits 13:2 | TI sync check |
| `0111` | bit 0 = 1: previous trigger was a SyncEvent | trigger content |

The *quadrant* is the clock within the slot in which the TS accepted the
trigger. This is how triggers keep 4 ns resolution on a 16 ns link.

The framer chooses the word for each slot in this order: main trigger,
content word after a SyncEvent, partition word, VME command, timer word.
A timer word fills any slot with nothing else to send. A partition word
displaced by a main trigger waits for the next free slot. While the run
is stopped, the link carries only idle (invalid) words.

The TI decoder reads one word at phase 1 and holds a trigger for one
slot. It fires `trig_out`, registered, at the word's quadrant of the
next slot, 5 + quadrant clocks after the read tick. A TI decodes
standard words (`std_en`), one selected partition (`part_en`,
`part_sel`), or both. Timer words are compared with the TI's own clock
counter. The offset seen in the first timer word after trigger start
must hold for every later one, otherwise `sync_err` is set.

## The SYNC line (`sync_encoder`, `sync_decoder`)

When idle the line is 1. A command is a 0 start bit followed by a 4-bit
code, MSB first, at one bit per clock. The encoder:
* places the first code bit at slot phase `sync_align`;
* keeps frame starts at least 16 clocks (64 ns) apart, with at least four
  idle 1s between frames;
* Manchester codes each bit as the symbol pair `{~b, b}`.

The decoder frames a command only after at least four 1s and flags a
Manchester violation.

| code | action in this design |
|---|---|
| 1101 | front end reset: TI FIFO, decoder and event data cleared; TS timer and TS event data cleared; reset pulse to every module; TD event-limit counters cleared |
| 0111 | trigger stop: TI FIFO pointers to 0, reading stops |
| 0101 | trigger start: TI FIFO read pointer to 0, reading starts |
| 0011, 0010 | TI slot phase re-sync |
| 0100, 0001 | decoded only (no GTP status register, no full-reset target modelled) |
| 0000, 1111 | invalid, refused by the encoder |

The TD decodes the SYNC line and encodes it again for its links, which
adds 2 clocks. It passes the trigger link through one register.

## Fixed latency: how the TIs line up

This is the part that is easiest to get wrong in configuration.

1. **Latency measurement** (`ti_latency_meter`). The TI sends a pulse on
   `loop_tx` and the TD returns it on the same link's back fibre. The
   round trip is counted in clocks, and `one_way` = round trip / 2,
   rounded up. Only whole clocks are measured.
2. **SYNC delay** (`ti_sync_delay`). The received SYNC symbols pass
   through a delay line of `sync_target - one_way` clocks. A TI on a long
   fibre therefore delays less, and every TI decodes a command
   `sync_target` (+ a constant) clocks after the TS sent it.
   The delay is clamped to 0 … `MAX_DELAY`−1 (511). So `sync_target`
   must be at least the longest `one_way`, and at most 511 more than
   the shortest.
3. **Slot phase**. A clock re-sync command aligns all TI slot phases
   (see *Time base*).
4. **Trigger FIFO** (`ti_trigger_fifo`). Every valid link word is
   written on arrival. Trigger stop (sent at the end of the previous run)
   has zeroed the write pointer, and the link carries no valid words
   until run start, so word *k* of the run sits at address *k* in every
   TI. At run start the TS turns the link on. `start_delay` slots later
   it sends trigger start. From that clock on, all TIs read one word
   per slot at phase 0, so word *k* comes out in the same clock
   everywhere.

From TS acceptance to the front end trigger, the latency is
`4·start_delay + sync_target` clocks plus a fixed pipeline constant.
Each TI holds a backlog of about `start_delay + (sync_target - one_way)/4`
words, which must stay below `FIFO_DEPTH` (128). With
`sync_target = 300` and `start_delay = 20`, a TI on a very short fibre
holds about 95 words. An overflow or underflow sets the sticky
`fifo_err`.

On run stop, the TS stops accepting triggers but keeps sending timer
words for `start_delay` slots. It then sends trigger stop and returns the
link to idle. This delay lets the TIs read out the triggers already
in the FIFO.

## Keeping the DAQ synchronised (throttling)

The TS stops accepting triggers (`ts_trigger_control`) while any of
these holds; `busy_time` counts those clocks during a run:

* **BUSY**: any front end module, the TI's own event buffer (within 8
  records of full) or a TD event limit raises BUSY. It is ORed upward
  through the front end SD, the fibre, the TD and the global SD, one
  register at each stage.
* **Event limit** (`td_event_limit`): for each link, the TD counts blocks
  closed by the TI minus blocks acknowledged by the ROC. It raises BUSY
  when a limit is set and the count reaches it. A limit of 1 with block
  size 1 is event locking; a limit of 0 is pipeline mode.
* **SyncEvent**: a trigger marked as SyncEvent comes from one of three
  sources:
  * a VME insert, sent with event type 0;
  * every `sync_period`-th accepted trigger;
  * an input pattern whose lookup-table entry has the SyncEvent bit set.

  After a SyncEvent the TS inhibits at once and waits until it has seen
  BUSY rise and fall again. The TI receives the content word that
  follows the SyncEvent. It then closes the open block and raises
  `roc_sync_pend`, and holds BUSY until the ROC has acknowledged every
  ready block.
* **SyncReset request**: a ROC raises `roc_srr`. The request travels up
  like BUSY and latches the TS `srr_flag` marker. Triggers stay
  inhibited until `srr_clear`.
* **Trigger rule**: at least `min_gap` clocks between accepted main
  triggers, and at most one main trigger per slot.

Trigger priority is an inserted SyncEvent first, then GTP, then external,
then VME. Sub-TS (partition) triggers come after main triggers and
are accepted only when no partition word is waiting.

## Trigger formation in the TS

* `ts_trigger_input`: a trigger is the rising edge of an input. Each
  input has an enable and a prescale: with `in_prescale = P`, 1 of every
  P+1 edges passes. The 15 asynchronous inputs first pass through a
  two-flip-flop synchroniser.
* `ts_event_type`: a two-level block-RAM lookup. The inputs are split
  into groups. Each group addresses a first-level table that gives a
  class code, and the class codes together address the second-level
  table. The second-level entry holds `{SyncEvent, event type[9:0]}`;
  type 0 means no trigger. There are two instances:
  * the 30 GTP inputs: 3 groups of 10, 4-bit codes;
  * the 30 + 15 external inputs: 5 groups of 9, 3-bit codes.

  The result comes 2 clocks after the input.
* `ts_partition`: four sub-TS. Each selects 5 GTP, 5 external and 3
  asynchronous inputs (index registers in `ts_cfg`) and looks the 13-bit
  pattern up in its own 8192 × 3-bit table.
* Tables are loaded through `lut_wr` (`tbl`, `addr`, `data`):

  | `tbl` | table |
  |---|---|
  | 0–2 | GTP first level |
  | 3 | GTP second level |
  | 4–8 | external first level |
  | 9 | external second level |
  | 10–13 | partitions 1–4 |

  The tables are not reset; load every entry your input patterns can
  reach.

## TS event data (`ts_event_data`)

The TS keeps its own record of every accepted main trigger:
`{trigger number 32, TS time stamp 48, word header 4, SyncEvent, event type 10}`.
Each sub-TS has a separate stream of `{number 32, time stamp 48, type 3}`
records. Every stream is a first-word-fall-through FIFO with a pop port
(`ev_rd` and `pev_rd` on `ts_core`; `ts_ev_*` and `ts_pev_*` on the top).
Trigger numbers start at 1. The numbers and the buffers are cleared when
the TS sends a front end reset. A record that meets a full buffer (256
main, 64 per sub-TS) is dropped and sets a sticky overflow flag. These
buffers do not throttle triggers, so read them faster than triggers
arrive.

## TI event data and the ROC (`ti_event_builder`)

For every trigger, the TI stores a 94-bit record in a 64-entry buffer:
`{trigger number 32, time stamp 48, source 4, event type 10}`. The ROC
pops records with `roc_rd` while `roc_avail` is high. Triggers are
grouped into blocks of `block_size`. A closed block raises `roc_irq` (an
interrupt request or polling flag) and sends `blk_end` to the TD. The
ROC answers each block with one `roc_ack` pulse, which also reaches the
TD.

## Run sequence

The end-to-end testbench follows this order, which is also how a real
system is brought up:
1. `ti_meas_start` (latency measurement).
2. SYNC 0011 (slot phase re-sync).
3. SYNC 1101 (front end reset).
4. SYNC 0111 (trigger stop, clears the FIFOs).
5. `run_start`.
6. Triggers.
7. `run_stop`.

Load the lookup tables and set `ts_cfg` and `ti_cfg` before `run_start`.

## Departures from the hardware described for this system

* The gigabit serialisers, the IODELAY phase alignment of SYNC, the
  clock chips and PLLs are not built. Everything shares one clock, so
  TIs align exactly (0 ns skew rather than under 4 ns).
* Fibre latency is measured in whole 4 ns clocks only. There is no
  carry-chain fine measurement.
* The latency of the real boards (about 550 ns from level-one input to
  crate, without fibre) is not reproduced. Latency here is set by the
  registers above.
* The VME interface, the VME-to-I²C and VME-to-JTAG engines and PROM
  loading are not built. The TS event data record layout is this
  design's own, chosen to match the TI's. Configuration,
  ROC and front end signals are plain ports.
* The trigger rule, the SyncEvent wait rule, the source priorities, the
  content-word value, the table organisation and all buffer depths are
  this design's own choices.
* The event limit raises BUSY when the outstanding count *reaches* the
  limit, so that a limit of 1 gives event locking.
* The TD does not decode the trigger words it forwards. It counts the
  blocks that each TI reports closed (`blk_end` in the TI status) rather
  than the triggers or blocks it sent.
* Partitioning with separate subsystem TS hardware, and the combined
  TS/TD/TI "master" board for small setups, are not built. Only
  partitioning through the TS's four sub-TS is.
* `fibre_link` is a behavioural model of a fibre with its transceivers: a
  fixed delay in clocks, idle until filled. It is not for synthesis
  into the system.

## Files

`rtl/` holds one module per file; shared types and constants are in
`rtl/tcs_pkg.sv`. The top is `rtl/tcs_system.sv`, with parameters
`N_TD` (16), `N_LINK` (8) and `N_FE` (16). At the defaults it holds 128
TIs.

| module | role |
|---|---|
| `ts_core` | TS: inputs, lookup tables, partitions, control, framer, SYNC, run sequencer, event data |
| `ts_trigger_input`, `ts_event_type`, `tcs_lut`, `ts_partition`, `ts_trigger_control`, `ts_trigger_word`, `ts_event_data` | TS parts |
| `sync_encoder`, `sync_decoder` | SYNC line |
| `sd_fanout` | SD fan-out and BUSY merge |
| `td_core`, `td_event_limit` | TD |
| `ti_core`, `ti_latency_meter`, `ti_sync_delay`, `ti_trigger_fifo`, `ti_trigger_decode`, `ti_event_builder` | TI |
| `fibre_link` | fibre delay model |

Every module has a self-checking testbench `tb/tb_<module>.sv`. Two
further testbenches run the whole system:
* `tb/tb_tcs_system.sv`: 2 TDs × 2 TIs on 150, 50, 5 and 4 m fibres;
* `tb/tb_tcs_system_full.sv`: the full 128-TI system at its defaults.

Both include `tb/tcs_system_tb_body.svh` and run one complete
sequence. It exercises and counts latency measurement, re-sync, FE
reset, aligned triggers, partition triggers, the trigger rule, BUSY,
event limit, all three SyncEvent kinds and the SyncReset request. It
also reads back the TS event data.
Every clock, it checks that all TIs fire together.

To simulate with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tcs_pkg.sv rtl/*.sv \
    tb/tb_tcs_system.sv --top-module tb_tcs_system -Mdir obj
obj/Vtb_tcs_system
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. The
full-size system builds and runs in under a minute.
