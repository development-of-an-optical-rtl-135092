# Optical front-end read-out for RICH hybrid photon detectors

An HPD (hybrid photon detector) delivers a 32x32 binary hit map for every
Level-0 trigger. The trigger rate averages 1 MHz, and every event has to
reach a Level-1 buffer about 100 m away, in the counting room. This RTL
covers both ends of that link for two HPDs:

* **Level-0, on the detector.** One PInt (pixel interface) per HPD turns each
  hit map into a 36-word event. The event carries its own bunch-crossing ID,
  an error word, a column parity and a CRC. The PInt sends it as two 16-bit
  streams, one word per 25 ns crossing, to two GOL serialisers.
* **Level-1, in the counting room.** A controller receives the four 16-bit
  streams of the two HPDs. It checks them against its own copy of the timing
  information and stamps the result beside the data. It packs one word from
  each fibre into a single 4-word burst of a QDR SRAM, so one burst holds
  one bunch crossing. Events wait there for the Level-1 decision. Accepted
  events are read back out; rejected ones are skipped.

The idea behind the Level-1 side is that one QDR burst (four 18-bit words)
holds exactly one crossing's worth of data from four fibres. Writes then
need one address per 25 ns, and all four words go in on consecutive K clock
edges. The edges that writes leave free carry the reads, so reads and
writes share one address bus without stalling the detector.

```
         detector side (clk40)                         counting room (clk160)
 pixel rows ─┐                                      ┌────────── l1_controller ──────────┐
 TTC (L0,BCR)┼─► pint_top ─► gol_a ══ fibre 0 ═══►  │ l1_rx_check x4 ─► burst ─► qdr_write_fsm ─┐
 JTAG ───────┘   (HPD 0)  ─► gol_b ══ fibre 1 ═══►  │ l1_ttc (derandomiser, decisions)        ├─► QDR SRAM
                 pint_top ─► gol_a ══ fibre 2 ═══►  │ qdr_pointers ─► qdr_read_fsm ◄──────────┘
                  (HPD 1) ─► gol_b ══ fibre 3 ═══►  └──► accepted events, 4-word bursts
```

The serialisers, lasers, fibres, receivers, TTC receivers and the QDR SRAM
are bought-in parts with no logic to design. Their signals are ports of
`rich_readout_top`.

## The event

Every event is 36 words of 32 bits, one word per bunch crossing, so a
transfer takes 36 x 25 ns = 900 ns:

| word | contents |
|------|----------|
| 0 | header `{4'hA, bxid[11:0], 4'hA, bxid[11:0]}`: each 16-bit half carries the BX ID |
| 1 | error word, the errors seen since the previous event |
| 2..33 | the 32 pixel rows (bit = 1 for a hit) |
| 34 | column parity: bit i is the XOR of bit i of the 32 rows |
| 35 | trailer `{crc_hi, crc_lo}`: CRC-16 of the upper and the lower halves of words 0..34 |

Error word bits:

| bit | meaning |
|-----|---------|
| 0 | BX FIFO overflow (a Level-0 accept with the FIFO full) |
| 1 | data buffer overflow |
| 2 | TTC single-bit error |
| 3 | TTC double-bit error |
| 4 | a GOL was not ready |

The CRC is CRC-16-CCITT:
- polynomial x^16 + x^12 + x^5 + 1 (`16'h1021`)
- preset to `16'hFFFF`
- 16 bits per step, MSB first (`rich_pkg::crc16_word`)

There is one CRC per 16-bit half, so each fibre can be checked on its own.
The low half of every word goes to GOL A (fibres 0 and 2) and the high half
to GOL B (fibres 1 and 3). The G-Link flag line is high on the header word
only.

The bunch-crossing ID is a 12-bit count of 40 MHz crossings. It wraps after
3563 crossings (one LHC turn) and is cleared by the TTC bunch counter reset
(BCR). The BX ID is used rather than an event number because consecutive
Level-0 triggers make event counting fragile.

## PInt (Level-0)

`pint_top` holds five parts:

- **`bx_counter` and the 16x12 BX FIFO (`sync_fifo`).** On every Level-0
  accept the current BX ID is pushed.
- **`pint_event_builder`.** Pixel rows go into a 64-row data buffer as they
  arrive. An event starts once the BX FIFO is not empty and 32 rows are
  buffered. A new event can start in the crossing right after the trailer
  of the previous one, so back-to-back events leave no gaps. The header
  appears 3 clocks after the event's last row arrives.
- **`gol_sync`.** Splits each word onto the two GOLs, with data-valid and
  flag. It reports an event word that was sent while a GOL was not ready.
- **`link_test_pattern`.** In link test mode the GOLs carry `{~n, n}`
  instead of events, where n is a 16-bit count that restarts when the mode
  is entered.
- **`pint_jtag` with a standard 16-state `tap_controller`.** This is the ECS
  (experiment control system) access. `tdo` changes on the falling edge of
  TCK.

The 4-bit JTAG instructions:

| IR | register | length | use |
|----|----------|--------|-----|
| `4'hF` | BYPASS | 1 | default after reset |
| `4'h2` | CONFIG | 8 | bit 0 = link test mode; bit 1 = hold the status register cleared |
| `4'h3` | PIXEL | external | the pixel chip's 44 x 8-bit DAC chain (352 bits) through `pix_shift`, `pix_update`, `pix_sdi` and `pix_sdo` |
| `4'h4` | STATUS | 32 | sticky copy of the error word bits, for the ECS |

The configuration register is the one piece of PInt control state that
is protected against single event upsets. It is held in three copies, and
`cfg` is their bitwise majority. On every TCK edge all three copies are
rewritten with the majority, or with a newly shifted value. So one upset
copy never reaches `cfg`, and it is repaired on the next TCK. This needs
TCK to keep running. The source only says that redundancy and error
correction protect the control logic; this triple-vote scheme, and the
choice of register, are my own.

In `rich_readout_top` the two PInts form one chain: TDI → PInt 0 → PInt 1 →
TDO. In a 16-bit CONFIG scan, the first 8 bits shifted in end up in PInt 1.

## Level-1 controller

### Clocking

`l1_controller` runs entirely on one 160 MHz clock. A 2-bit phase counter
derives two things from it:
- the 80 MHz QDR K clock (`qdr_k`, high in phases 1 and 3);
- the bunch-crossing strobe (phase 1).

So each 160 MHz cycle is half a K period:
- a cycle with `k == 0` ends on a **rising K** edge;
- a cycle with `k == 1` ends on a **rising K#** edge.

Release `rst160_n` at a bunch-crossing boundary. Phase 0 then starts a
crossing, and the fibre words and TTC signals (which change with the 40 MHz
clock) are sampled in phase 1, half a crossing after they change.

### Checking the fibres (`l1_rx_check`, one per fibre)

Each 16-bit word is stored as an 18-bit QDR word:
`{rx_err, check_bit, data[15:0]}`.
- Bit 17 is the receiver's error flag for that word.
- Bit 16 of word n is bit n of a 36-bit **check word** that travels beside
  the event.

| check bit | set when |
|-----------|----------|
| 0 | always, on the header (start of event) |
| 1 | the header marker nibble is not `4'hA` |
| 2 | the header BX ID differs from the locally generated one |
| 3 | the receiver flagged an error on words 0..2 |
| 4, 5 | the two LSBs of the local event ID (no error: the event ID stored with the data) |
| 34 | the recomputed column parity differs from word 34 |
| 35 | the recomputed CRC differs from word 35 |

A check bit can only report what is known by the time its word is written.
That is why the BX ID result goes in word 2 and not in the header.

The local BX ID comes from `l1_ttc`. It has its own `bx_counter` and pushes
the BX ID of every Level-0 accept into a 16-deep derandomiser. The
derandomiser is popped when the header arrives. The controller also checks
that all four fibres deliver the same word of the same event in the same
crossing.

Between events, the checker also runs a link self test. In link test mode
a PInt sends `{~n, n}`, so one fibre of the pair counts up and the other
counts down. A word outside an event that is one above or one below the
previous such word is counted as a good pattern word. Any other word
outside an event is a framing error. If it breaks a running pattern, it is
also counted as a pattern error. The document asks for self test in the
Level-1 electronics but does not say how; this check is my own choice.

The local event ID counts arriving events (headers on fibre 0) and is
cleared by the event counter reset. Event n therefore carries n mod 4 in
check bits 4 and 5. That is the same number the Level-1 decision for
event n brings in its two event ID bits, so the buffer holds both the data
and the event ID for a later match.

### Writing the QDR (`qdr_write_fsm`)

This is the core of the design. The write machine is one-hot. Its states,
in order, are `IDLE`, `ADDRESS`, `WR_D1`, `WR_D2`, `ADDRESS2` or `WR_D3`,
then `WR_D4`. Every 160 MHz cycle in which a burst is waiting
(`get_data`), it can start.

QDR timing as used here:
- WPS# (write port select) and the address are sampled at the rising K edge
  that ends the address cycle.
- The four data words are sampled at the next rising K edge and the three
  edges after it (K#, K, K#).

With a burst waiting in every crossing, the machine settles into the loop
`WR_D1, WR_D2, ADDRESS2, WR_D4`:

| cycle | k | state | on D | edge at the end of the cycle |
|-------|---|-------|------|-------------------------------|
| 1 | 0 | ADDRESS  | –      | K↑: WPS# low, address n |
| 2 | 1 | WR_D1    | word 1 | K#↑: – (the one K-clock start-up delay) |
| 3 | 0 | WR_D1    | word 1 | K↑: word 1 of burst n |
| 4 | 1 | WR_D2    | word 2 | K#↑: word 2 |
| 5 | 0 | ADDRESS2 | word 3 | K↑: word 3, and WPS# low for address n+1 |
| 6 | 1 | WR_D4    | word 4 | K#↑: word 4 |
| 7 | 0 | WR_D1    | word 1 | K↑: word 1 of burst n+1 |
| … | | | | |

In steady state a write address uses every second rising K edge (one per
25 ns), and a data word moves on every K edge. `continue` is set in
`ADDRESS2` and sends `WR_D4` back to `WR_D1`; otherwise the machine returns
to `IDLE`. `hold_read` is high in `ADDRESS` and `ADDRESS2`. It tells the
read machine that this rising K edge belongs to the write address, and it
switches the shared address bus to the write address.

The write address is a 17-bit wrap-around counter, one step per burst. The
address range is 128K bursts x 4 words x 18 bits = 9 Mbit. An event takes
36 consecutive addresses.

### Reading the QDR (`qdr_read_fsm`)

The read machine mirrors the write machine. It may drive RPS# (read port
select) with an address only:
- in a cycle that ends on a rising K edge (`k == 0`), and
- when `hold_read` is low.

This guarantees that WPS# and RPS# never fall on the same rising K edge.
Assertions check both sides of the rule: WPS# only in cycles that end on
rising K, and RPS# only on an edge the write machine has left free. The four words come back on
the same edge pattern as the writes and are collected into one 72-bit
burst. `rd_valid` pulses one clock after the fourth word. A new read can be
issued in `R_Q3`, so reads also sustain one burst per 25 ns. Under
continuous writes they take the alternate rising K edges. Writes always
win, because the detector side cannot be stalled.

### Pointers and the Level-1 decision (`qdr_pointers`, `l1_ttc`)

Level-1 decisions arrive on the TTC short broadcast port, one byte with a
strobe:

| bit | meaning |
|-----|---------|
| 0 | BCR, bunch counter reset |
| 1 | ECR, event counter reset |
| 4 | accept (with bit 5) |
| 5 | Level-1 decision |
| 7:6 | two LSBs of the event ID |

Decisions queue in a 16-deep FIFO. The local event ID counts decisions and
is cleared by ECR. A decision whose event ID bits differ from the local
count is flagged.

The read address is `offset + sub`:
- The **offset** steps by 36 on every decision, so it always points at the
  start of an event.
- On an accept, the **sub** counter walks 0..35 while the read machine
  fetches the event's bursts.
- A reject only moves the offset, in one clock.
- A decision is not acted on before its event has been completely written.

The write pointer may not overtake the read pointer. A new event is written
only if all 36 bursts fit without reaching the oldest unread event. That
leaves room for 3640 events. An event that does not fit is **dropped
whole** and counted, never half written.

Dropped events still receive Level-1 decisions, in order, and those
decisions must not move the read pointer. Once one event has been dropped,
new events are dropped until the buffer is at most half full. Drops
therefore come in a few long runs. Each run is recorded as a pair: the
number of events kept before it, and its length. The pairs go into a
4-deep FIFO (`RUNS`). When the decisions reach a run, that many decisions
are discarded in one clock each, and decisions after the run again meet
their own events. Writing resumes only while a FIFO entry is free, so a
run is never lost.

### Status

`l1_status` holds ten 16-bit saturating counters. A per-fibre error
counts once per fibre.

| counter | counts |
|---------|--------|
| `bxid_err` | BX ID mismatches |
| `parity_err` | parity mismatches |
| `crc_err` | CRC mismatches |
| `sync_err` | missing or early headers, stray words between events, and fibres out of step |
| `evid_err` | event ID mismatches |
| `dropped` | events dropped because the buffer was full |
| `lost` | bursts the write machine could not take (should stay 0) |
| `ttc_ovf` | derandomiser or decision FIFO overflows |
| `test_ok` | link test pattern words in sequence |
| `test_err` | link test pattern words out of sequence |

`l1_events_stored` is the number of complete events waiting.

## Files

- `rtl/rich_pkg.sv`: shared constants, the event and QDR types, the status
  struct and the CRC function.
- Each other file in `rtl/` is one module. Its opening comment gives the
  interface and timing, and says which choices are this design's own.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each ends
  with `TB_RESULT checks=<n> failures=<n>` and has a watchdog.
- `tb/tb_pint_jtag_seu.sv`: forces upsets into each copy of the
  triplicated configuration register and checks that they are outvoted
  and repaired.
- `tb/tb_rich_pkg.sv`: a bitwise reference CRC and a reference event
  builder. These are written independently of the RTL.
- Behavioural models used by the testbenches:
  - `tb/qdr_sram_model.sv`: QDR SRAM with 4-word bursts and protocol
    checks.
  - `tb/link_model.sv`: a fibre with delay and bit-flip injection.
  - `tb/pixel_dac_chain_model.sv`: the pixel chip DAC chain.

## Simulating

Verilator 5 with timing support is enough. For any testbench:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_rich_readout_top rtl/rich_pkg.sv tb/tb_rich_pkg.sv \
  tb/tb_rich_readout_top.sv -o sim && ./obj_dir/sim
```

`tb_rich_readout_top` runs the whole chain with every parameter at its
default (full 17-bit QDR address space) in about fifteen seconds. It has three
phases:

1. **24 events through both HPDs.**
   - Level-1 decisions start after three events, one every 36 crossings;
     every fourth event is rejected.
   - Each delivered event is compared word by word with a reference event
     built in the testbench, check bits included.
   - One fibre word is corrupted in flight. It must be caught by both the
     parity and the CRC check.
   - One decision carries a wrong event ID.
2. **3660 more events with no decisions.** This fills the buffer: exactly
   3640 must be stored and 20 dropped. Then all 3660 get their decisions.
   Only the last stored event is accepted among the stored ones. The
   dropped events are all accepted, and those accepts must produce no
   output. Four new events follow, all accepted, and must come out intact.
3. **Link test mode through the JTAG chain.** The configuration is read
   back over the chain. The pattern must then reach the Level-1 side in
   sequence on every fibre (`test_ok` counts up, `test_err` stays 0).

The testbench counts each mechanism and fails if one never occurred:
- accepted events delivered
- rejects skipped
- reads on edges next to writes
- drops
- check bits set
- event ID errors
- test pattern words

Every testbench was also run against a copy of its module with one
deliberate bug, and each of them caught the bug.

## Where this design goes beyond, or departs from, its source

The original proposal gives the architecture, the event order, the widths
and depths, and the write state machine. Several points were left open and
are filled in here:

- **Header, error word and trailer encodings.** These are this design's
  own: the `4'hA` marker, the error bit assignment, and the CRC-16-CCITT
  code. The proposal leaves the CRC block size and polynomial to later
  study.
- **Check word layout.** Bits 0..3, 34 and 35 as listed above. Only its
  existence (36 bits stamped beside each event) and the BX ID check are
  given.
- **Short broadcast bit assignment** and the use of the two event ID bits
  against a local count of decisions.
- **Read state machine.** Its states are new. Only "similar to the write
  machine" and the no-shared-edge rule are given.
- **Full-buffer behaviour.** Dropping whole events, the room rule, the
  half-full hysteresis and the drop-run FIFO that keeps later decisions
  matched to their events.
- **Clocking.** One 160 MHz clock with the K phase as a signal, instead of
  FPGA clock multipliers. The K clock runs at 80 MHz, not at the QDR's
  rated 167 MHz.
- **Address width.** The read-out chain overview labels the QDR address as
  19 bits. The QDR architecture (128K x 18, four words) and the 9 Mbit size
  give 17 bits, which is what is built.
- **Downstream interface.** Where accepted events go after the buffer is
  not specified. Here they leave as plain valid/sof/eof bursts.

Not built:
- the pixel chip itself;
- the PInt's analogue bias and calibration levels;
- the GTL/CMOS level translators;
- the GOL's CIMT encoding and serialiser;
- VCSELs, optical receivers and deserialisers;
- the TTC receiver chips;
- the QDR SRAM (modelled in `tb/` only);
- SEU protection for PInt control state other than the configuration
  register (TAP state, instruction register, event builder);
- the 32-bit single-fibre link option.
