# HomePNA 2.0 MAC controller

HomePNA 2.0 builds a home network over the telephone wiring already in a
house. Up to 25 stations share one phone line at 4 to 32 Mbit/s. Only one
station can talk at a time, so every station needs a medium access
controller (MAC) that decides when it may send. The protocol has three
parts:

* **CSMA/CD** in the IEEE 802.3 style: listen before sending, and notice
  when two stations sent at once.
* **Priority slots.** Eight priority levels are mapped onto time slots
  after each transmission, so higher-priority traffic gets the line first.
* **DFPQ** (Distributed Fair Priority Queuing). After a collision, every
  station works out the same order of access on its own. Each colliding
  station gets exactly one turn before any newcomer, so the access delay
  has a firm bound.

This repository holds synthesizable SystemVerilog for that controller. It
has four blocks, the Tx MAC, Rx MAC, DFPQ and PRNG blocks, plus a top level
that wires them together. The top level also contains the sending station's
header comparison, which detects collisions. The frame formatting, the modem and the priority
mapping sit outside the controller and are not included; the controller
only meets them at its ports.

```
            Frame Controller (not included)
   TxReady  TxDataOn/TxSigType/AttemptLimit   MyCol      SA
      |              ^                          |         |
  +---v--------------+--------------------------v-----+   |
  |  tx_mac  --prng_on-->  prng  <-----------------------+
  |     ^    <-prng_value--                            |
  |     | bl                                           |    Carrier Sense
  |   dfpq (8 x BL, 8 x MBL counters + controller) <---+---------- modem
  |     ^ time_slot, rx_sig_type, rx_pri               |
  |   rx_mac  ------------------------------------------+--> IFGSync
  +----------------------------------------------------+
      ^ TxPriority (management, not included)
```

## The time-slot sequence

Every station measures time from the **end** of the last carrier on the
line. Because they all see the same carrier, they all share one slot grid
without exchanging any clock. `rx_mac` keeps this grid.

| slot | length | cycles at 32 MHz | occurs |
|---|---|---|---|
| IFG (inter-frame gap) | 29 us | 928 | always |
| S0, S1, S2 (Backoff Signal Slots) | 32 us each | 1024 | only after a collision fragment |
| PRI7 ... PRI0 (Priority Slots) | 21 us each | 672 | always, highest priority first |
| unsynchronized | until the next carrier | - | after PRI0 |

A station with a priority-*p* frame starts it on the first cycle of slot
PRI*p*. If another station's carrier appears in an earlier slot, the grid is
abandoned: the line is busy, and a fresh grid starts when that carrier ends.
Higher priorities therefore always win, and equal priorities can only
collide with each other. In the unsynchronized period, anyone whose frame is
allowed to go sends at once, first come first served.

`rx_mac` classifies each carrier by its length. A carrier of at least
92.5 us is a valid frame, which means a successful transmission; the frame
padding guarantees that minimum. A carrier of 32 us up to 92.5 us is a
collision fragment: colliding senders stop within 70 us. The passive rule in
HomePNA 2.0 is stated as 32 to 92 us; the gap up to 92.5 us is counted here
as a fragment, so that no carrier falls between the two classes. Anything
shorter is noise. A carrier whose leading edge falls inside S0..S2 is a Backoff Signal.
A Backoff Signal does not stop the grid, and at most one is reported per
slot, however many stations signal in it. `rx_mac` also records the
priority slot in which a carrier began. That is the priority of the
collision or success that the DFPQ logic charges it to. A carrier that
began outside the priority slots has no known priority.

## DFPQ: putting colliding stations in order

This is the least obvious part of the design. Each station keeps two
counters per priority, in `dfpq`:

* **BL** (Backoff Level): how many turns this station must wait. A frame
  may be sent only while BL of its priority is 0.
* **MBL** (Maximum Backoff Level): how many groups are queued in the
  current resolution cycle. Every station tracks it, including stations
  with nothing to send.

What happens after a collision at priority *p*:

1. Each station whose frame collided draws a slot from the PRNG: S0, S1 or
   S2. It sends a short Backoff Signal in that slot.
2. All stations watch the three slots. A colliding station raises its BL by
   one for each earlier slot that carried a signal. Every signal seen
   raises MBL[*p*].
3. Stations that chose the same slot now form a group. The stations in the
   first group are still at BL 0, and they send in PRI*p*. If that group
   holds more than one station, they collide again and split further.
4. Each successful frame at priority *p* lowers every waiting BL[*p*] and
   MBL[*p*] that is above 0. The next group then reaches BL 0.

Stations that were not in the collision must not slip in ahead of the
stations that were, because the cycle is closed. This design enforces that
as follows:

* A priority with no frame waiting keeps BL equal to MBL. A frame that
  arrives in the middle of a cycle therefore queues behind every group
  already formed.
* A waiting station that did not collide counts every Backoff Signal. If
  it was at BL 0, it moves to the new MBL.

Example: stations A, B and C collide at priority 7 and choose S0, S1 and S2.
All three slots carry a signal, so MBL becomes 3 and A, B, C have BL 0, 1
and 2. A sends, and everyone's counters drop by one. Then B sends, then C.
MBL is back at 0 and the cycle is over.

**MBL also drops by one on a collision.** The rule as usually stated only
counts signals and successes. Under that rule, a group that collides again would
add its new signals without giving up the one level it already held. MBL
would then end one too high, and a later arrival would wait for a turn that
never comes. Decrementing MBL (when above 0) on each collision keeps the
count exact; the end-to-end test checks this in a case that must contain
a repeated collision.

**Collisions of unknown priority** begin outside the priority slots, such
as two stations starting together in the unsynchronized period. They change
no counter. The stations involved still send Backoff Signals, but they keep
BL 0. They meet again in their own priority slot, and the collision is
resolved there.

All of this is plain counting on events every station sees. Stations that
watch the same line keep identical MBL counters without exchanging any
message, and the end-to-end testbench checks that after every event.

## Transmit timing (`tx_mac`)

`tx_mac` tells the Frame Controller when to send, with a one-cycle
`tx_data_on`, and what to send: `tx_sig_type` is a frame or a Backoff
Signal. A station moves through these states:

* **idle**: no frame (`tx_ready` low).
* **wait**: a frame is queued. It is sent on the first cycle of its
  priority slot, or at any cycle of the unsynchronized period, if BL is 0
  and no carrier is sensed.
* **transmitting**: waiting to learn the outcome.
  * `my_col` from the Frame Controller means a collision. The PRNG starts,
    and the Backoff Signal goes out on the first cycle of the chosen signal
    slot. `attempt_limit` (AttemptLimit) counts it, and the frame goes back
    to **wait**.
  * A valid frame reported by `rx_mac` means success. AttemptLimit clears,
    and nothing more is sent until `tx_ready` drops. The Frame Controller
    drops `tx_ready` when its FIFO is empty.

AttemptLimit saturates. Giving up on a frame after too many attempts is
left to the Frame Controller.

## Pseudo-random slot choice (`prng`)

The generator is a 48-bit LFSR with feedback from bits 48, 47, 21 and 20.
It is loaded with the station's 48-bit source address at its first run
after reset. Each station therefore sits at its own point of the sequence,
and two stations can never draw in lockstep. Lockstep would be fatal: two
stations that always choose the same slot collide forever.

Each run steps the LFSR 16 times and gives the state modulo 3 as the slot.
`prng_complete` pulses 16 clock edges after `prng_on`. That is far inside
the 29 us IFG that comes before the first signal slot.

## Detecting a collision

There are two ways a station learns of a collision:

* **Station not sending.** The carrier length tells it: a 32 to 92.5 us
  burst is a collision fragment. `rx_mac` does this.
* **Station sending.** It compares what it sent with what it hears back.
  The bytes from the Frame Control field to the Ether-Type field (4 + 6 +
  6 + 2 = 18 bytes) include the sender's own source address, so any second
  transmitter changes them. `col_compare` takes the sent and received
  header bytes from the Frame Controller and pulses `col_detect` at the
  first difference, at most once per frame. A frame start (`tx_data_on`
  with `tx_sig_type` = frame) rearms it.

`col_detect` does two things:

* It is ORed with the external `my_col` input to give the collision that
  `tx_mac` and `dfpq` see. A Frame Controller that does its own comparison
  can therefore drive `my_col` instead and leave the byte ports at 0.
* It is brought out of the top, so the Frame Controller can cut the frame
  to a collision fragment (at most 70 us of carrier).

## Top-level interface (`hpna_mac_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | one clock of `CLK_MHZ` MHz; asynchronous active-low reset |
| `carrier_sense` | in | carrier on the line, including the station's own, synchronous to `clk` |
| `ifg_sync` | out | one-cycle pulse when a carrier ends (start of the IFG) |
| `tx_ready`, `tx_priority[2:0]` | in | a frame is waiting, and its priority |
| `my_col` | in | the Frame Controller saw this station's frame collide |
| `sa[47:0]` | in | station source address (PRNG seed) |
| `hdr_byte_valid`, `hdr_tx_byte[7:0]`, `hdr_rx_byte[7:0]` | in | one header byte as sent and as received, aligned, from Frame Control on |
| `col_detect` | out | header comparison found a collision: cut the frame |
| `tx_data_on`, `tx_sig_type` | out | start sending now, frame or Backoff Signal |
| `attempt_limit[3:0]` | out | Backoff Signals sent for the current frame |
| `my_pri_slot` | out | the current slot is this station's priority slot |
| `time_slot`, `rx_sig_type`, `rx_pri`, `rx_pri_valid`, `bl_all`, `mbl_all` | out | monitoring: slot grid, received events, all counters |

Parameters: `CLK_MHZ` (32), `BL_W` (5, enough for 25 stations),
`ATTEMPT_W` (4) and `PRNG_STEPS` (16). All slot lengths are written in
nanoseconds in `hpna_pkg` and converted to cycles for the chosen clock.

## Files

* `rtl/hpna_pkg.sv`: slot, event and command types; HomePNA durations.
* `rtl/rx_mac.sv`, `rtl/tx_mac.sv`, `rtl/dfpq.sv`, `rtl/prng.sv`: the
  four blocks.
* `rtl/dfpq_level_counter.sv`: one BL or MBL counter.
* `rtl/col_compare.sv`: the sending station's header comparison.
* `rtl/hpna_mac_top.sv`: the controller.
* `tb/tb_<block>.sv`: one self-checking testbench per block.
* `tb/tb_hpna_mac_top.sv`: the network test, described below.

## What the numbers rest on, and what is this design's own

These values are HomePNA 2.0 figures:

* the slot lengths (29 / 32 / 21 us);
* the 32 us and 92.5 us carrier bounds;
* eight priorities and three signal slots;
* the BL and MBL rules other than the one addition above;
* the 16-step PRNG run;
* the 18-byte compared header.

These are choices of this design:

* the 32 MHz clock, and a single clock for all blocks;
* all widths and state encodings;
* the LFSR and its seeding;
* `tx_data_on` as a single-cycle pulse;
* the MBL decrement on collision;
* the treatment of carriers of unknown priority and of noise;
* starting in the unsynchronized period after reset;
* requiring BL 0 for unsynchronized access.

Not covered, and left to neighbouring blocks:

* the PHY frame format (preamble, header, CRC16, padding to 92.5 us);
* cutting a collided frame to 70 us;
* aligning the sent and received header bytes for the comparison;
* modulation;
* mapping user priorities to the eight levels.

Carrier Sense is assumed to be already synchronous to `clk`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Each one has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/hpna_pkg.sv \
          tb/tb_hpna_mac_top.sv --top-module tb_hpna_mac_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one.

* `tb_rx_mac`: burst classification at the exact boundary lengths; the
  length of every slot after a frame and after a collision; one signal
  event per slot; the recorded priority.
* `tb_tx_mac`: start cycle in the priority slot; Backoff Signal in the
  chosen slot; holding off for BL > 0 and for carrier; unsynchronized
  access; clean-up after success.
* `tb_dfpq`: hand-worked BL/MBL sequences.
  * A: three stations collide at priority 7.
  * B: a newcomer joins a running cycle and sits through a repeated
    collision.
  * C: a bystander at BL 0.
  * D: events of unknown priority.
* `tb_prng`: results against a reference LFSR; 16-edge latency; all slots
  used; different addresses give different sequences.
* `tb_col_compare`: 200 random headers with differences placed inside and
  outside the compared 18 bytes; checks when a collision is reported, that
  it is reported only once per frame, and the report's timing.
* `tb_hpna_mac_top`: four full controllers at default parameters on one
  modelled line.
  * Collisions: each station's model feeds its header bytes, XORed with
    what the other stations send, to the controller's comparison. Every
    collision is detected that way.
  * Traffic: frames arriving together, a priority-6 frame that must
    overtake, a late priority-2 frame that must queue behind, and an
    unsynchronized send.
  * Checks: each frame is delivered once and intact; the first round
    contains four different stations; the priority-6 frame goes next; all
    stations agree on MBL; MBL returns to 0.
  * Each mechanism must occur at least once: header-comparison detection,
    collision inside and outside
    the priority slots, repeated collision, Backoff Signal, waiting at
    BL > 0, overtaking, unsynchronized access, non-zero AttemptLimit.
  * It covers about 3 ms of line time and runs in well under a second.
* `tb_hpna_25_stations`: 25 controllers, the most one line may carry, all
  given a priority-5 frame in the same cycle, then a second frame each.
  * Checks: all 50 frames are delivered once; the first 25 deliveries come
    from 25 different stations; MBL agrees across stations and returns
    to 0.
  * A typical run needs about 47 collisions and reaches MBL 8, over about
    20 ms of line time.
  * Simulation takes a few seconds.
