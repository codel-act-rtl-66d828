# CoDel-ACT: CoDel active queue management as a switch egress pipeline

Deep switch buffers let queues stay full long after a burst ends. Every packet
then waits behind a standing queue ("bufferbloat"). CoDel (Controlled Delay) is
an active queue manager that removes such standing queues. It watches how long
each departing packet spent in the queue (its *sojourn time*). When that delay
stays above `TARGET` (5 ms), it starts dropping packets. The gaps between drops
shrink as `INTERVAL/sqrt(count)` (`INTERVAL` = 100 ms), until the delay falls
below `TARGET` again. When a new congestion cycle starts soon after the
previous one, CoDel does not begin again from one drop. It takes the drop count
that controlled the previous cycle as its starting point.

A match-action switch pipeline makes this hard to implement:

* every state register belongs to exactly one pipeline stage;
* a packet may read-modify-write each register only once.

CoDel's `count` and `dropNext` are needed both when a cycle starts
(`codel_init`) and while it lasts (`codel_update`), in different orders. The
CoDel-ACT scheme gives each function its own copy of these registers. It then
keeps the copies consistent by *recirculating* small mirror packets through
the pipeline. This repository implements that scheme as synthesizable
SystemVerilog: a four-stage egress pipeline that handles one packet per
clock cycle.

## The pipeline

```
            in_valid/in_ready/in_meta (egress timestamp, queue delay)
                     |
   +-------------> [0 recirc_path]   mirror packets first, data waits (in_ready=0)
   |                 |
   |               [1 chk_first_violation]  dropping, prevDropping
   |                 |   violation / first violation / end of cycle
   |               [2 codel_init]    countI, countI', dropNextI, dropNextI', lastCount
   |                 |   first violation: choose starting count, first dropNext
   |               [3 codel_update]  countU, dropNextU
   |                 |   later violations: drop when now >= dropNextU
   |                 v
   +---- mirror -- end of pipeline --> out_valid / out_meta / out_drop
```

A data packet is accepted in one cycle. Its verdict appears on `out_*` four
clock edges later. A mirror packet enters the recirculation FIFO on the cycle
after it leaves stage 3. It is back in stage 0 one cycle later, ahead of any
waiting data packet. While a mirror packet is injected, `in_ready` is low for
one cycle.

### Stage 1: `chk_first_violation`

For a data packet, `violation = qdelay >= TARGET`. The stage holds two one-bit
registers. Each stores the violation bit of the last data packet, and each is
read once:

* `dropping` yields `first_viol = violation && !previous`;
* `prevDropping` yields `cycle_end = !violation && previous`.

Mirror packets pass this stage without touching the registers.

### Stage 2: `codel_init`, entering a congestion cycle

On a first violation the stage computes:

```
delta     = countI - lastCount
count     = (delta > 1 and now - dropNextI < 16*INTERVAL) ? delta : 1
dropNext  = now + INTERVAL/sqrt(count)
```

These are the values in plain units; the RTL stores counts doubled (see below).
`countI`, `dropNextI` and `lastCount` are only *read* here. The results go to
the shadow registers `countI'` and `dropNextI'`. The packet also requests a
mirror of kind `PKT_SYNC_INIT` carrying `<count, dropNext, old countI>`.
`lastCount` takes the count of the cycle that just ended, and that write
arrives later through the mirror. `delta` is compared as a signed number, so a
count below `lastCount` falls back to one. The packet that starts a cycle is
never dropped; the first drop comes no earlier than `dropNext`.

### Stage 3: `codel_update`, inside a congestion cycle

For a violating packet that is not the first of its cycle:

```
if now >= dropNextU: drop; countU += 1; dropNextU += INTERVAL/sqrt(countU)
```

Both registers are updated atomically in this one stage. A packet flagged
`cycle_end` only reads them, and requests a mirror of kind `PKT_SYNC_UPD`
carrying `<countU, dropNextU>`.

### Keeping the copies consistent: the two mirror flows

This is the least obvious part of the design.

| mirror kind | made by | written when it recirculates |
|---|---|---|
| `PKT_SYNC_INIT` | the first violating packet, in `codel_init` | `lastCount` (stage 2), then `countU`, `dropNextU` (stage 3) |
| `PKT_SYNC_UPD` | the first non-violating packet after a cycle, in `codel_update` | `countI`, `dropNextI` (stage 2) |

So `codel_update` starts each cycle from the count and `dropNext` chosen by
`codel_init`. In turn, `codel_init` sees, at the next cycle start, the count
reached and the `dropNext` scheduled when the last cycle ended. No packet ever
touches a register twice, and no register is written from two stages.

Two things follow from the delay between a mirror's creation and its return
(about nine clock cycles until it has written stage 3):

* at line rate, the few packets of a cycle that arrive in that window see
  `codel_update` state from the previous cycle;
* mirrors are rare, one at the start and one at the end of each congestion
  cycle, so they cost almost no bandwidth.

Both effects are part of the scheme, not faults of this implementation.

### Doubled counts and the math unit (`rsqrt_unit`)

All counts are stored as `2*count`. A drop adds two, the "count = 1" case
stores 2, and the history test `delta > 1` becomes `delta > 2`. The math unit
receives the doubled count `x` and returns `INTERVAL*sqrt(2)/sqrt(x)`, which
equals `INTERVAL/sqrt(count)`. Giving the unit the doubled value is the
CoDel-ACT trick: it raises the resolution of the approximation for small
counts, where the drop spacing matters most.

The unit itself is this design's own. It is combinational and used inside a
stage. It writes `x = 2^p * m` with `1 <= m < 2` and `p = 2q + r`, so that
`1/sqrt(x) = 2^-q / sqrt(m*2^r)`. The four bits after the leading one index a
16-entry table per parity `r`, and the entry is shifted right by `q`. The
table entries are

```
edge[r][i] = round( INTERVAL * sqrt( 2*16 / ((16+i) * 2^r) ) )        used when p <= 4 (no bits lost)
mid[r][i]  = round( INTERVAL * sqrt( 2*32 / ((32+2i+1) * 2^r) ) )     used when p > 4 (half an LSB added)
```

The tables are computed at elaboration by a constant function with an integer
square root, so there is no data file. Measured over every input up to 4096,
around every power of two, and on random inputs:

* the worst relative error is 1.55 %;
* doubled counts up to 31 (real counts up to 15) are exact to 1 ns.

`MANT_W` changes the table size.

## Numbers and formats (`codel_pkg`)

| item | value |
|---|---|
| time unit | 1 ns, 48-bit timestamps (wrapping differences are compared signed) |
| `INTERVAL` / `TARGET` | 100 000 000 / 5 000 000 ns (module parameters) |
| counts | 32-bit, doubled |
| packet tag | 16 bits, carried through unchanged |
| recirculation FIFO | `RECIRC_DEPTH` = 4 (never holds more than one entry; an assertion checks for overflow) |
| reset | all registers zero, "not dropping"; asynchronous, active-low `rst_n` |

`regs` on the top brings every state register out, as a control plane would
read them. `recirc` pulses for each recirculated packet (the recirculation
load). `init_hist` pulses when a cycle starts from the drop history.

## Where this departs from the original switch program

* **Stages.** The switch program used 11 stages of a commercial pipeline. Here
  each CoDel function is one stage, because RTL can compute the drop test,
  the increment and the square root in one cycle. For the same reason
  `countU` and `dropNextU` are updated together in stage 3 instead of being
  read twice across two stages.
* **Cycle-end mirror.** The original flow decides in `chk_first_violation`
  to send `<countU, dropNextU>`. Those registers live in stage 3, so here the
  decision travels with the packet and the values are read in stage 3.
* **Recirculation** through the traffic manager and a mirror session becomes
  a small FIFO merged at the pipeline entry, with priority over data.
* **Dropping** is a flag (`out_drop`). The packet still leaves, so that the
  following deparser or queue can discard it.
* **Math unit.** The switch's built-in approximation (about 4 % average error,
  15 % worst case with doubled counts) is replaced by the table unit above,
  which is more accurate.
* **Not included:** the ingress pipeline (plain port forwarding), the parser
  and deparser, the traffic manager and its queues, and the older CoDel
  variant without the history rule, which is only a point of comparison.
  The top takes packet metadata that has already been parsed: egress
  timestamp and queue delay.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.
`tb/codel_ref_pkg.sv` holds the reference models: the table rule of the math
unit in real arithmetic, and a sequential packet-by-packet CoDel-ACT model.

| testbench | what it establishes |
|---|---|
| `tb_rsqrt_unit` | accuracy bounds above, on 6157 inputs |
| `tb_chk_first_violation` | the three flags against the previous-packet rule, `qdelay == TARGET` edge, sync packets ignored |
| `tb_codel_init` | history reuse, stale history (16*INTERVAL), negative delta, mirror payload, shadow registers, sync writes |
| `tb_codel_update` | drop time, count step of two, exact spacing (e.g. 100 ms then 70.710678 ms), cycle-end mirror, sync load |
| `tb_recirc_path` | mirror order and priority, `in_ready`, data order, no loss |
| `tb_codel_act_egress` | the whole pipeline at default parameters, see below |
| `tb_codel_act_tcp` | the pipeline managing a queue shared by TCP-like flows, see below |

The end-to-end test drives the top, with no parameter overrides, using a
closed-loop queue model. Packets are 100 us apart in egress time, and
congestion cycles start and end repeatedly, with a 3 s silence half way.

* **Exact phase.** 20 000 packets are offered twelve clock cycles apart, so
  every mirror has landed before the next packet. The pipeline must match the
  sequential model on every drop verdict and, before every packet, on all
  nine registers. The latency must be four cycles.
* **Line-rate phase.** 4 000 packets are offered back to back. Every packet
  must leave once and in order, and mirrors must stall the input.

Every mechanism must occur at least once: pass, first violation, history
reuse, restart from one, drop, cycle-end sync, recirculation and input stall.

### Behaviour under TCP-like load

`tb_codel_act_tcp` puts the pipeline, at its default parameters, in front of
one bottleneck queue shared by window-based senders. The network is an
event-driven model in the testbench:

* 1500-byte packets and a buffer holding 200 ms of traffic;
* slow start, additive increase, and at most one window halving per RTT;
* the senders are not rate-capped.

Every verdict must match the sequential model. Each run covers 10 s of
traffic, and the statistics leave out the first 2 s:

| scenario | mean queue delay | 99 % below | CoDel drops | recirculated packets |
|---|---|---|---|---|
| 100 Mb/s, 1 flow, RTT 5-10 ms | 3.8 ms | 8 ms | 29 | 52 |
| 100 Mb/s, 3 flows, RTT 5-10 ms | 6.9 ms | 10 ms | 101 | 555 |
| 100 Mb/s, 10 flows, RTT 5-10 ms | 12.9 ms | 23 ms | 621 | 13 |
| 1 Gb/s, 10 flows, RTT 3-25 ms | 5.7 ms | 8 ms | 103 | 1697 |
| 1 Gb/s, 30 flows, RTT 3-25 ms | 9.3 ms | 19 ms | 490 | 65 |
| 1 Gb/s, 50 flows, RTT 3-25 ms | 15.0 ms | 57 ms | 905 | 17 |
| 100 Mb/s, 3 flows, RTT 10 ms | 5.8 ms | 9 ms | 81 | 106 |
| 100 Mb/s, 3 flows, RTT 100 ms | 0.1 ms | 2 ms | 15 | 10 |
| 100 Mb/s, 3 flows, RTT 300 ms | 16.4 ms | 64 ms | 14 | 12 |

Without CoDel these queues would sit near the full 200 ms buffer. The test
requires only that CoDel drops in every scenario and that the mean delay
stays under 50 ms.

The original switch implementation kept the mean below 5 ms on a real testbed
with rate-capped TCP senders. This crude sender model, with no rate cap,
reaches that level only with few flows, so these figures describe the model
and should not be compared with the testbed numbers.

Recirculation stays rare: one pair of mirror packets per congestion cycle.
With many flows the queue stays above `TARGET` in one long cycle, so there
are even fewer.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/codel_pkg.sv tb/codel_ref_pkg.sv \
  rtl/rsqrt_unit.sv rtl/recirc_path.sv rtl/chk_first_violation.sv \
  rtl/codel_init.sv rtl/codel_update.sv rtl/codel_act_egress.sv \
  tb/tb_codel_act_egress.sv --top-module tb_codel_act_egress
./obj_dir/Vtb_codel_act_egress
```

The packages come first, and each file is listed once. For a block test, list
the block's files and its `tb_*.sv`. `-Wno-fatal` keeps lint warnings (unused
package constants, for example) from stopping the build.
