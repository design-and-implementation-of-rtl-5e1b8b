# Index-based parallel LAUC-VF burst scheduler

In an optical burst switching (OBS) node, a burst header packet (BHP) announces
a data burst a short offset time before the burst itself arrives. In that time
the node must book the burst onto one of the outgoing wavelength channels. To
use the channels well, the scheduler may fill idle gaps between bursts that
are already booked. These gaps are called *voids*. The LAUC-VF policy (latest
available unused channel with void filling) picks, among all channels with a
void large enough for the burst, the void that started last before the burst
arrives. This leaves the smallest unusable gap in front of the burst.

A direct implementation walks through every void on every channel, so its
time grows with the load. This design finds the one void worth checking on
each channel in constant time, with a bit-vector index, and does it for all
channels in parallel. A comparator tree then picks the winner. Every request
takes five clock cycles, whatever the load: four to find the best void and
one to update the bookkeeping. With the 16-channel default at a 150 MHz clock,
that is one burst every 33.3 ns.

## The per-channel index

Each channel sees the same time window, `[0, 2^TIME_W - 1]`. The window is cut
into `NUM_SLOTS` slots of `2^SLOT_SHIFT` time units each (defaults: 64 slots of
2048 units over 17-bit time stamps). A void is *indexed* by the slot its start
time falls in. Each channel stores:

* the **index vector**: one flip-flop per slot, set if and only if a void
  starts in that slot;
* the **void table**: a RAM with one entry per slot, holding the exact start
  and end time of the void indexed there. An entry means something only while
  its index bit is set.

Take voids that start in slots 1, 3 and 9 (1-based), and a burst that arrives
in slot 5. The search has three steps:

1. **Arrival slot.** `m` is the slot that holds the arrival time. It is
   `arrival >> SLOT_SHIFT`, zero-based.
2. **Locate.** A mask with every slot `<= m` set is ANDed with the index
   vector. A priority coder returns the highest remaining bit. In the example,
   `...0100000101 & ...0000011111 = ...0000000101`, so the candidate is the
   void in slot 3. It is the void that starts latest at or before the
   arrival slot.
3. **Verify.** The candidate's table entry is read. The burst fits if
   `void_start <= arrival` and `departure <= void_end`.

The cost is the same for any number of voids: one mask, one AND, one
priority encoder and one RAM read.

A consequence worth knowing is that only **one** void per channel is checked.
Suppose a void starts in the arrival slot, but after the arrival time. That
void is the candidate, and it fails verification. An earlier void that could
have held the burst is not tried. This is inherent to the scheme, and the RTL
and its reference model both behave this way.

## Booking a burst: splitting the void

When a channel wins, its candidate void `[vs, ve]` at index `k` is split by
the burst `[ta, te]`:

* **The part before the burst**, `[vs, ta]`, keeps index `k`. Table entry `k`
  is rewritten with the new end `ta`. If `ta == vs` this part is empty, and bit
  `k` is cleared.
* **The part after the burst**, `[te, ve]`, becomes a new void. Its index `j`
  is the slot of `te`: bit `j` is set and entry `j` is written. If `te == ve`
  this part is empty and nothing is written.

Both writes take place in the single update cycle, so the void table has two
write ports, as a true dual-port block RAM does.

**One void per slot.** The index can hold only one void per slot. The part
after the burst may land in a slot that already holds a void. This happens
when `j == k` and the part before the burst survives, or when the next void
starts in the same slot as `te`. In that case this design keeps the void
that is already there and drops the new one. The dropped time is lost to
later bookings, and the channel raises its bit of `void_drop` for that cycle.
In random tests with slots of 2048 units and bursts of 9000 to 25000 units
this happened in about 0.4 % of bookings. Shorter slots make it rarer.

After reset, one init cycle loads every channel with a single void that
covers the whole window, at slot 0. `ready` is low during that cycle.

## Choosing the channel

The **comparand translator** turns each channel's result into one number.
A channel with a feasible void gets `{0, arrival - void_start}`. A channel
without one gets all ones. The **channel selector** is a tree of two-input
comparators, `log2(NUM_CH)` levels deep. Each comparator passes on the
smaller value and its channel number. Equal values go to the lower channel.
If the smallest value has its top bit set, no channel can take the burst and
the result is channel 0.

To use a different void-filling policy, change only the comparand formula.

## Interface and timing

Top module: `obs_scheduler`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle request strobe, taken when `ready` is high |
| `bhp_arr`, `bhp_dep` | in | `TIME_W` | arrival and departure time of the burst |
| `ready` | out | 1 | a `start` in this cycle is accepted |
| `finish` | out | 1 | result valid, one cycle |
| `sel_ch_no` | out | `$clog2(NUM_CH+1)` | channel booked, 1..`NUM_CH`; 0 = no channel could take the burst |
| `void_drop` | out | `NUM_CH` | this update dropped a void (see above) |

The cycles are counted from the clock edge that accepts `start`:

| cycle | phase | what happens |
|---|---|---|
| 1 | LOCATE | every channel masks its index vector and registers its candidate index |
| 2 | READ | every channel reads its candidate's void table entry |
| 3 | VERIFY | avail and comparands are computed, and the comparands are registered |
| 4 | SELECT | the comparator tree runs and the channel number is registered |
| 5 | UPDATE | `finish` and `sel_ch_no` are valid, and the chosen channel writes its index and table |

`ready` is high in the UPDATE cycle. A new `start` there goes straight into
LOCATE, so back-to-back requests complete every five cycles. A `start` while
`ready` is low is ignored. A burst with no feasible void is not booked
anywhere, and nothing is kept for it. The caller must keep
`bhp_arr <= bhp_dep`, and an assertion checks this.

## Parameters

| parameter | default | origin |
|---|---|---|
| `NUM_CH` | 16 | published channel count |
| `NUM_SLOTS` | 64 | own choice (the slot count is left open) |
| `TIME_W` | 17 | own choice; covers the published example time stamps (up to 116817) |
| `SLOT_SHIFT` | 11 | own choice; slot length 2048, so 64 slots cover the whole 17-bit range |

The window starts at time 0 and never moves. Time stamps are absolute within
`TIME_W` bits, and the first void ends at `2^TIME_W - 1`. If you change
`TIME_W` or `SLOT_SHIFT`, keep `NUM_SLOTS << SLOT_SHIFT` equal to
`2^TIME_W`. Otherwise the late times all pile into the last slot.

At the defaults, synthesis gives about 1500 flip-flops (mostly the 16 × 64
index vectors and the comparand registers) and 16 void tables of 64 × 34
bits.

## Module map

| file | role |
|---|---|
| `rtl/obs_pkg.sv` | default sizes and the phase enum |
| `rtl/obs_scheduler.sv` | top: control unit, `NUM_CH` search engines, translator, selector |
| `rtl/control_unit.sv` | five-phase sequencer, latches the request, one-hot update |
| `rtl/search_engine.sv` | one channel: index vector, location, void table, verification, void splitting |
| `rtl/location_circuit.sv` | arrival slot, mask, AND filter, priority coder |
| `rtl/slot_of_time.sv` | time stamp to slot index |
| `rtl/mask_generator.sv` | mask of slots `<= m` |
| `rtl/priority_coder.sv` | highest set bit |
| `rtl/void_table.sv` | void RAM: one read port and two write ports |
| `rtl/verification_circuit.sv` | does the burst fit the candidate |
| `rtl/comparand_translator.sv` | LAUC-VF comparands |
| `rtl/channel_selector.sv` | comparator tree, 1-based result |

## Where this RTL departs from, or fills in, the published design

* The numbers of the time window (slot count, slot length, time width) and
  the fixed window start are this design's own. How the window advances
  over time is not specified, and it is not built.
* The arrival-slot formula was published with a rounding bracket. It is
  read here as rounding down, so that `m` is the slot containing the arrival
  time.
* One description of the AND filter says "index less than m". The mask
  rule says "index <= m", and this design follows the mask rule.
* The update rule for a split void follows the published example. The
  handling of two voids in one slot, and of zero-length remainders, is this
  design's own.
* The split of the four search cycles into locate, read, verify and select
  is this design's own. So are the `ready`, `init` and `void_drop` signals.
  The control unit's `Config` output to the translator has no published
  meaning, and here it is the comparand load strobe.
* Channel numbers are 1-based, and 0 means "none", as in the published
  waveforms. Ties go to the lower channel.
* Only the LAUC-VF translator is built.
* The FPGA clock rate (150 MHz on a Virtex-4) is not checked here. Only the
  five-cycle count is.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. `tb/obs_ref_pkg.sv`
is a behavioural model of one channel's void list. It also keeps a list of
every booked burst, so the testbenches can check that no two bursts on a
channel overlap. That check does not depend on the void bookkeeping at all.

`tb/obs_scheduler_tb.sv` runs the whole scheduler at its default size. It
starts with 18 published example requests, then runs 30 episodes of 150
random bursts, issued back to back. For every request it checks these
things:

* the LAUC-VF channel, computed from 16 reference channels;
* that `finish` comes exactly five cycles after the accepting edge;
* that the booked burst does not overlap any earlier burst;
* the drop flags.

It also counts how often each of these happened, and it fails if any never
did:

* booked and blocked bursts;
* void filling;
* back-to-back requests;
* several feasible channels at once, and ties between them;
* removed voids and dropped voids.

A typical run covers about 4500 requests, 1400 of them filled into voids.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/obs_pkg.sv tb/obs_ref_pkg.sv tb/obs_scheduler_tb.sv \
  --top-module obs_scheduler_tb -o sim
./obj_dir/sim
```

Replace `obs_scheduler_tb` with any other `*_tb` to test one block. The
testbenches use `$urandom` only, and they need no files.
