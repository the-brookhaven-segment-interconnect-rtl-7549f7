# FASTBUS segment interconnect

A FASTBUS system is built from *segments*: crate backplanes and cables, each
with its own wired-OR bus lines and its own arbitration. A segment
interconnect joins two of them, an **upper** and a **lower** segment. A master
on one segment can then reach a slave on the other, and it uses the same
protocol it would use for a local slave. The only visible difference is that
the interconnect holds WAIT while it gets the far segment, and WAIT only stops
the master's address timeout.

This RTL describes one interconnect, `segment_interconnect`. It does four
jobs:

* **Transaction relay** in both directions. An address on the upper segment
  that lies inside the interconnect's range goes down. An address on the lower
  segment that lies outside the range goes up.
* **Deadlock resolution.** Two masters can address across the interconnect
  in opposite directions at the same moment. Each then holds the segment the
  other needs. The interconnect tells the lower master to back off.
* **Broadcast.** A master writes a word into the interconnect's broadcast
  register. The interconnect then broadcasts that word on its lower segment
  only (*local*) or on every segment below it (*global*).
* **Cable-segment arbitration lines.** A long cable cannot carry a wired-OR
  signal. On a cable segment, each of the six AL arbitration lines is
  therefore carried as two lines that run in opposite directions.

The interconnect comes in two variants, set by the `UPPER_IS_CABLE`
parameter. With 1 (the default), a cable segment is above and a crate segment
is below. With 0, a crate segment is above and a cable segment is below. A
system that joins crates with cables chains the two variants:
crate → (variant 0) → cable → (variant 1) → crate.

## How the bus is modelled

All the logic runs from one clock, `clk_i`. All cycle counts assume a 10 ns
clock. The real module works asynchronously. Here, every bus input is taken
as already synchronised to the clock.

Each segment appears as two `si_pkg::fb_bus_t` structs:

* `*_i` holds the lines as seen on the segment.
* `*_o` holds the lines this interconnect asserts.

Both use positive logic: 1 means asserted. The bus itself, which is outside
this RTL, ORs `*_o` with what everyone else drives and feeds the result back
on `*_i`. Inside the interconnect, each unit produces its own `fb_bus_t`. The
top ORs these together in the same way.

The `fb_bus_t` lines are:

* the handshake lines `as ak ds dk rd`
* `wt` (WAIT) and `bk` (back off)
* the broadcast lines `bc bw ls`
* the arbitration lines `gk ar ag al[5:0]`
* the 32-bit multiplexed `ad`

On a cable side, `al` is one direction of the AL lines. The other direction
is carried by the `*_al_b_i/o` ports.

All outputs come straight from flip-flops, or from an OR of flip-flops. There
is no combinational path from a bus input to a bus output.

## Units

| module | role |
|---|---|
| `si_pkg` | line struct `fb_bus_t`, event struct `si_events_t`, widths |
| `si_addr_decode` | address range (base/mask) and broadcast-register match |
| `si_al_expander` | one logical AL line ↔ two physical directions on a cable |
| `si_seg_acquire` | gets and holds one segment: AR/AG, AL self-selection, GK |
| `si_path` | relays one transaction, source → destination (one instance per direction) |
| `si_deadlock` | sees both paths stuck, aborts the upward one, drives BK |
| `si_bcast_reg` | the broadcast register, a slave on the upper segment |
| `si_bcast_origin` | runs a broadcast that this interconnect starts |
| `si_bcast_relay` | passes a global broadcast from above to below |
| `segment_interconnect` | the top: wires the above together per variant |

## Relaying a transaction (`si_path`)

This is the sequence for a downward transaction. An upward one runs the same
way, with the upper and lower segments swapped.

1. AS rises on the upper segment. The address on A/D is inside the range and
   is not the broadcast register.
2. The path asserts WAIT on the upper segment and asks `si_seg_acquire` for
   the lower segment.
3. Once the path holds the lower segment, it drives the address on the lower
   A/D lines. `DESKEW_CYC` cycles later it asserts AS there.
4. The path waits for AK.
   * Any WAIT it sees from the lower segment restarts its timeout. That WAIT
     may come from another interconnect further down.
   * If neither AK nor WAIT arrives within `TIMEOUT_CYC` cycles, the path
     negates WAIT on the upper segment and withdraws AS. The master's own AS
     timeout then ends the transaction.
5. When AK arrives, the path passes it to the upper segment and drops WAIT.
   The data cycles are then relayed through one register stage in each
   direction:
   * DS, RD and write data go forward.
   * DK and read data come back.
6. The master drops AS. The path drops AS below, waits for AK to go away,
   drops AK above and releases the lower segment.

Each hop adds one cycle to each edge of the data handshake. A chain of
interconnects works because each one holds WAIT while the next one is busy
acquiring.

## The deadlock (`si_deadlock`)

Here is how the deadlock arises:

* Master X holds the upper segment and addresses something below.
* At the same time, master Y holds the lower segment and addresses something
  above.
* The downward path now waits for the lower segment, which Y holds.
* The upward path waits for the upper segment, which X holds.

Neither master will let go, because both are held in WAIT.

`si_deadlock` watches for both paths waiting at once for more than
`DETECT_CYC` cycles. When that happens it:

1. sends a one-cycle abort to the upward path, which negates WAIT on the lower
   segment and drops the path's request;
2. asserts BK on the lower segment until Y drops AS.

BK tells Y to release the bus and try again later. The downward path then
gets the lower segment and finishes X's transaction. Y's retry later goes
through normally.

The lower master is always the one that backs off.

## Getting a segment (`si_seg_acquire`)

Each side has one acquisition unit.

**Sharing between internal clients.** On the lower side there are three
clients: the downward path, the broadcast relay and the broadcast origin.
Fixed priority picks one of them. The chosen client keeps the segment until
it drops its request.

**Arbitration.** The unit follows the FASTBUS scheme:

1. Assert AR.
2. On each rising edge of AG, drive the unit's arbitration level
   (`ARB_LEVEL_UP` or `ARB_LEVEL_LOW`) on the AL lines. While the lines
   settle, apply the self-selection rule: a competitor stops driving its
   lower bits as soon as it sees a higher bit that it is not driving itself.
3. After `SETTLE_CYC` cycles, the unit has won if AL equals its own level.
   A loser waits for the next AG.
4. The winner asserts GK as soon as both GK and AK of the previous master
   are low.

**Early GK release.** A broadcast may drop GK early (`gk_rel_i`) while it
still drives AK. The next arbitration can then run during the broadcast, and
its winner waits for AK to drop.

Two interconnects on the same segment need different levels. The defaults
give the upper side and the lower side different levels, so the two
variants, when chained, do not collide.

## Broadcast

### Starting one

A master on the upper segment writes the broadcast register
(`si_bcast_reg`, address `BCAST_ADDR`). The MSB of the written word is the
global bit. When the master drops AS, `si_bcast_origin` starts on the lower
segment.

### Local broadcast (global bit 0)

1. Get the lower segment.
2. Drive the word on A/D, assert BC and AK, and drop GK at once.
3. `DESKEW_CYC` cycles later, assert DS. The modules on the segment latch
   A/D when they see BC and DS together.
4. After `DS_CYC` cycles (100 ns), drop BC and DS.
5. `DESKEW_CYC` cycles later, drop AK and A/D.

AK must stay up for the whole broadcast. This is because the next
arbitration winner may take the segment as soon as AK is low.

### Global broadcast (global bit 1)

The broadcast has to reach every segment below, and the originator must not
assert DS before all of them are ready. Two lines make this work:

* **LS (last segment).** Every interconnect holds LS high on its own upper
  segment (`up_o.ls = 1`). An interconnect that sees LS low on its lower
  segment therefore knows nothing hangs below.
* **BW (broadcast wait).** This line does the waiting. A crate segment uses
  its WAIT line instead, hence `UP_CABLE` / `LOW_CABLE` in the broadcast
  units.

Each interconnect below (`si_bcast_relay`) that sees BC with AK and the
global bit on its upper segment:

1. asserts BW above and gets its own lower segment;
2. drives the word with BC and AK below;
3. releases BW above, at one of two moments:
   * after the deskew time, if LS below is low (it is the last segment);
   * otherwise, after the guard time described below, once BW below is low.

BW on any segment is therefore the OR of "not ready yet" from everything
below it. After that, the relay repeats DS from above onto its lower segment.
It ends its own broadcast when BC above drops.

The originator drives BC, AK and the word, then waits for two things:

* the deskew time plus `GUARD_CYC` cycles;
* BW (WAIT on a crate segment) on its lower segment being low.

Only then does it drop GK and assert DS for 100 ns. The guard time is needed
because BW raised by an interconnect at the far end of a long cable takes a
while to arrive. 250 ns covers the round trip on a 75-foot cable.

## Cable AL lines (`si_al_expander`)

On a cable side, the interconnect drives each logical AL bit on both physical
directions. It reads the logical value as the OR of the two receivers, plus
its own drive. The terminations (100 Ω to −2 V) and the ECL drivers are
analog and are not part of this RTL.

## Parameters (`segment_interconnect`)

| parameter | default | meaning |
|---|---|---|
| `UPPER_IS_CABLE` | 1 | variant: cable above / crate below (0: the reverse) |
| `RANGE_BASE`, `RANGE_MASK` | `0x0100_0000`, `0xFF00_0000` | addresses below the interconnect: `(addr & MASK) == BASE` |
| `BCAST_ADDR` | `0x00FF_FFF0` | broadcast register address |
| `ARB_LEVEL_UP`, `ARB_LEVEL_LOW` | `6'h21`, `6'h3E` | arbitration levels on each side |
| `DESKEW_CYC` | 3 | address→AS and BC→DS skew, in cycles |
| `TIMEOUT_CYC` | 200 | cycles to wait for AK or WAIT after a relayed AS |
| `DS_CYC` | 10 | DS width of a broadcast (100 ns) |
| `GUARD_CYC` | 25 | wait before sampling BW on a global broadcast |
| `SETTLE_CYC` | 8 | AL settle time per arbitration |
| `DETECT_CYC` | 4 | cycles both paths must wait before the deadlock counts |

Only three of these come from the original design:

* the two variants that `UPPER_IS_CABLE` selects;
* the 100 ns DS width of a broadcast;
* the six AL lines, which are `si_pkg::AL_W`.

The deskew time, the timeout, the clock and the jumper settings are this
design's own choices. Set them to match the cables and modules of a real
system.

`ev_o` gives one-cycle pulses for monitoring:

* `down_fwd`, `up_fwd`
* `timeout`, `deadlock`
* `bcast_local`, `bcast_global`
* `relay_done`, `relay_last`
* `arb_up`, `arb_low`

## Where this design goes beyond, or departs from, the original

* **Clocked implementation.** The original handshake is asynchronous. This
  RTL is clocked, with one register stage per relayed edge, and it assumes
  that the inputs are synchronised.
* **Single-word transfers only.** Only single data cycles are relayed. Block
  transfers, and the FASTBUS MS and parity lines, are not modelled.
* **The jumpers** become parameters. The address range is a base/mask pair.
* **WAIT** above is dropped as soon as AK is passed back.
* **BK** is held until the lower master drops AS.
* **Broadcast start.** The broadcast starts only after the writing master has
  ended its transaction. The register can also be read back.
* **BW release in a relay.** An interconnect that is not the last keeps BW up
  until BW below is low. This, and repeating DS downward, is how a global
  broadcast reaches the segments further down.
* **Guard time.** The `GUARD_CYC` wait before the originator samples BW is an
  addition of this design.
* **Arbitration details.** The AR/AG/AL arbitration and the fixed priority
  among internal clients are standard FASTBUS practice, filled in here. The
  original only says that the interconnect requests control of the segment.
* **Not in the RTL:** the front-panel cable connectors, the termination card,
  the ECL line drivers and terminations, the LS pull-up, and each segment's
  arbitration timing control.

## Testbenches

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it exercises |
|---|---|
| `tb_si_addr_decode` | range and register match, 2000 random addresses |
| `tb_si_al_expander` | both directions driven, OR of receivers |
| `tb_si_seg_acquire` | AG, level competition, waiting for GK/AK, client priority, early GK release |
| `tb_si_path` | WAIT, exact deskew, AK pass-back, write and read data, exact timeout, WAIT stretching the timeout, abort |
| `tb_si_deadlock` | short overlap ignored, detection time, abort pulse, BK until AS drops |
| `tb_si_bcast_reg` | select, write, global bit, read-back, start after AS |
| `tb_si_bcast_origin` | local timing (deskew, 100 ns DS, AK after BC), global waiting for BW |
| `tb_si_bcast_relay` | local ignored, BW raised, last segment, chained segment waiting for WAIT below |
| `tb_segment_interconnect` | two interconnects in a crate–cable–crate chain (see below) |
| `tb_segment_interconnect_full` | one interconnect with all defaults (see below) |
| `tb_e749_system` | a five-segment system (see below) |

**`tb_segment_interconnect`** puts two interconnects in a chain:
crate–cable–crate. It runs:

* two-hop writes and reads, in both directions;
* an unanswered address, which triggers the timeout;
* the deadlock, with back-off and retry;
* a local broadcast;
* a global broadcast relayed to the last segment;
* a broadcast started in the second interconnect's register from the top
  segment.

It also counts every mechanism.

**`tb_segment_interconnect_full`** uses one interconnect with every parameter
at its default. It runs:

* the relays in both directions and the deadlock;
* a local broadcast;
* a global broadcast that waits on WAIT from a modelled interconnect below;
* a relayed broadcast arriving from a modelled interconnect above.

**`tb_e749_system`** builds a five-segment system of three crates and two
cables: crate–cable–crate–cable–crate, joined by four interconnects. It runs:

* writes and reads across all four interconnects, in both directions;
* a global broadcast that passes three relays, two of which must wait for
  the segments below them;
* a local broadcast;
* a global broadcast started two levels down, which must not travel upward;
* the deadlock at the third interconnect.

The models these testbenches use are:

* `tb_fb_master`: a master with an AS timeout that honours WAIT and backs off
  on BK;
* `tb_fb_slave`: a slave;
* `tb_fb_atc`: the arbitration timing control that issues AG;
* `tb_fb_bcast_rx`: a broadcast receiver.

### Running one with Verilator

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/si_pkg.sv tb/tb_segment_interconnect.sv --top-module tb_segment_interconnect
./obj_dir/Vtb_segment_interconnect
```

Replace the testbench file and top name to run any other testbench.
`si_pkg.sv` must come first on the command line. Every testbench finishes in
well under a second.
