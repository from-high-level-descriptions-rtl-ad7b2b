# Storage-ring: a bit-serial hardware problem-store

A *problem-store* is a shared bag of work items for a multiprocessor. Any number of
processors, each at its own port, put items in and ask for items back. An item that is asked
for may be any stored item of the right kind. Order does not matter. What matters is that no
item is lost and none is handed out twice. Each item belongs to one or more *categories*, and a
request names the categories it will accept.

This RTL builds that store as a **storage-ring**, the structure proposed by J. Staunstrup and
M. R. Greenstreet in "From High-level Descriptions to VLSI Circuits" (1988). There is one
register per port, and the registers are joined into a ring. Items keep circulating from
register to register. When an item passes a port whose request it matches, that port takes it.
Two ideas make this work:

* **Rubber-wires.** A plain ring holds only one item per port, and a busy ring blocks quickly.
  Each link in the ring is therefore a *rubber-wire*: a stack of spare register pairs that
  fills when the ring ahead is blocked and drains back into it when there is room. The link
  "stretches" under load.
* **Guarded transitions, all fired together.** The behaviour is written as *transitions*:
  small rules of the form "if this condition holds, move this item there". Every enabled
  transition fires in the same step. That is correct only because the conditions are built so
  that two transitions touching the same register are never enabled together. Most of the
  design's subtlety lives in those conditions.

Default configuration: 32 ports, 16-bit items and rubber-wires of height 8. That gives
32 × (1 + 2·8) = 544 ring registers. Each port also has an output and an input register.

## Items, categories and requests

An item is a `WW`-bit word. Its top `NCAT` bits are its category set, with one bit per
category. The remaining bits are payload and take no part in matching. A request (the port's
*pattern*) is also a category set. An item matches a pattern when the two share at least one
category. An all-zero pattern matches nothing, so zero means "no request".

This encoding is this design's own choice; the original leaves matching abstract. If you need
a different rule, change `pattern_match.sv`. Its only contract is to be combinational.

## The frame: how items move

All movement is bit-serial. This keeps links one wire wide, which matters for a ring that may
span chips. `transfer_ctrl` divides time into **frames** of `WW + 1` clock cycles:

```
cycle:     0    1    2   ...  WW-1 | WW
transfer:  1    1    1   ...   1   | 0
           ^ frame_start           ^ state cycle
```

* During the `WW` **transfer cycles**, every enabled move shifts one bit per cycle. The
  target register shifts right and takes the source's bit 0 into its top bit. The source
  shifts right too. After `WW` cycles the target holds the item.
* In the single **state cycle**, all full/empty flags change: each target becomes full and
  each source becomes empty. Processors put and get only in this cycle.

Flags are stable for the whole of a frame, so every "may this move happen?" decision, which
reads only flags, stays the same for all the cycles that carry it out. The one decision that
reads data is a pattern match. It is taken in the first transfer cycle, before any bit has
moved, and held for the rest of the frame.

An item moves at most one register per frame. At the defaults a frame is 17 cycles.

## Wires and why they never collide

`bs_wire` is the basic transition between a *source* register and a *target* register:

```
go       = source full  AND  target empty  AND  guard
copy     = go AND transfer        (the registers shift)
newstate = go AND NOT transfer    (target := full, source := empty)
```

`bs_register` ORs the control bundles of all wires that use it. It relies on at most one of
them being active. The `guard` input carries the extra conditions that make this true.
Wherever two transitions could touch the same register in the same frame, one of them is
given a condition that excludes the other. Three kinds of exclusion are used:

| conflict | resolved by | kind |
|---|---|---|
| lift A → upper level vs. move A → B (rubber-wire) | lift only while B is full | fixed by construction |
| return from upper level → B vs. move A → B | return only while A is empty | fixed priority |
| port takes the item in x vs. ring moves x on | taking wins (`a_hold`) | fixed priority |
| port inserts into x vs. ring fills x | take turns, one priority bit per port (`ring_hold`/`ring_want`) | alternating |

Alternation in the last row is needed. Under a fixed "ring always first" rule, items that
nobody asks for can circulate forever, and the ports then never get to insert. With the priority
bit, a port that loses once wins the next conflict. The bit starts as "ring first" after reset
and flips after each contested frame.

Assertions in `bs_register` check the exclusion at run time. They fire if a register is ever
filled and drained together, filled while full, or drained while empty.

## Rubber-wires

`rubber_wire` joins ring register A (at port i) to ring register B (at port i+1). Level 0 is
the pair (A, B) itself. Levels 1 … `HEIGHT` each add a pair (A_k, B_k). Their transitions are:

```
      A_2 ----> B_2          horizontal  A_k -> B_k            always
       ^         |           up          A_k -> A_k+1           only while B_k is full
      A_1 ----> B_1          down        B_k+1 -> B_k           only while A_k is empty
       ^         v
 x[i]= A -----> B =x[i+1]
```

* **Ring not blocked** (B empty): the item in A moves straight to B, like a plain wire.
* **Ring blocked** (B full): the item in A is lifted to A_1. It then travels along level 1,
  or further up if B_1 is also full.
* **Unwinding:** an item in B_k comes down into B_{k-1} when that is empty and no item is
  waiting in A_{k-1} beside it. Items in the ring therefore go first, and stored items merge
  back in the gaps.

The original writes this as a recursive definition, where a rubber-wire of height d contains
one of height d-1. Here it is unrolled into a `for` generate loop over levels. `HEIGHT = 0`
gives a plain wire, which turns the design into a simple ring. Each rubber-wire adds
`2·HEIGHT` registers, reports how many of them are full (`occupancy`), and pulses
`stretch_evt` and `descend_evt` when an item leaves or rejoins the ring.

## Ports

`port` holds the three registers a processor sees:

* **outreg**, written through `put_valid/put_ready/put_data`. It is accepted only in the
  state cycle and only when empty. In a later frame the item moves into the ring register x,
  once x is empty and the arbitration above allows it.
* **pattern**, written through `pat_we/pat_data`. It can be written in any cycle and takes
  effect at the next frame start.
* **inreg**, read through `get_valid/get_ready/get_data` in the state cycle. The port fills it
  from x when x is full, inreg is empty and x matches the pattern.

Each register also has a status output (`outreg_full`, `inreg_full`, `pat_empty`). A request
stays in place after it is served. The next matching item is taken as soon as the processor
has emptied inreg. To stop receiving, write pattern 0.

### Timing at a glance

* put accepted in the state cycle of frame f → item in x at the end of frame f+1
* each further register: +1 frame
* taken into inreg: +1 frame, visible on `get_valid` in the next state cycle

So an item put at port i and requested only at port i+k appears there `k + 3` frames after the
put. At the defaults, port 0 to port 31 takes 34 frames = 578 cycles. Both testbenches check
this exactly.

## Capacity, and when the store gets stuck

The ring holds `N_PORTS·(1 + 2·HEIGHT)` items, plus one waiting item in each outreg.

Two situations stop all progress. Both are properties of the storage-ring scheme itself, not
bugs in this RTL:

1. **Every register full.** No item can move. Progress then depends on a port taking the item
   currently in front of it. If no port's pattern matches the item in its own x, nothing
   changes.
2. **Every processor waiting to put into a full store.** This happens when the load puts more
   items than the store holds before anyone asks for them.

Size `HEIGHT` for the worst burst you expect.

## Measured behaviour

`tb_workload_batches` replays the experiment the storage-ring was evaluated with: 32 ports,
1200 operations split into one sequence per port, and each port doing its next operation as
soon as it can. Two kinds of batch are used. In *random* batches, ins and outs are mixed evenly.
In *biased* batches, the first half has 3 outs per in and the second half 3 ins per out. Each
time step is one frame. Requests accept any category.

| batch | HEIGHT 8 | HEIGHT 4 | HEIGHT 2 | ideal store | one-at-a-time store |
|---|---|---|---|---|---|
| random | 295 | 295 | 301 | 47 | 1200 |
| biased | 173 | 205 | stalls | 40 | 1200 |

The shape matches the original evaluation. Height hardly matters when ins and outs are
balanced. Under a burst of outs, the taller rubber-wires absorb the burst. At height 2 the
store (160 + 32 items) cannot hold the roughly 290 items the burst leaves behind, so every
port ends up waiting to put (case 2 above). The absolute numbers differ from the original
ones, because the batches are different random draws and frame-level timing is used.

## Files

| file | role |
|---|---|
| `rtl/st_pkg.sv` | default sizes; `xfer_t` control bundle (`copy`, `newstate`) |
| `rtl/transfer_ctrl.sv` | frame counter: `transfer`, `frame_start` |
| `rtl/bs_register.sv` | full flag + shift register; parallel load/clear for the port registers |
| `rtl/bs_wire.sv` | one transition: enable, copy, newstate |
| `rtl/pattern_match.sv` | category match |
| `rtl/rubber_wire.sv` | stretching link between two ring registers |
| `rtl/port.sv` | outreg, pattern, inreg, in/out transitions, priority bit |
| `rtl/storage_ring.sv` | top: ring registers, ports, rubber-wires, frame counter |

Top parameters: `N_PORTS` (32), `WW` (16), `HEIGHT` (8), `NCAT` (4). The top's per-port
signals are packed arrays indexed by port number. Reset (`rst_n`) is asynchronous and active
low, and it empties every register.

## Simulating

Every testbench is self-checking. Each ends by printing `TB_RESULT checks=<n> failures=<m>`.
For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/st_pkg.sv tb/tb_storage_ring.sv --top-module tb_storage_ring
./obj_dir/Vtb_storage_ring
```

| testbench | what it covers |
|---|---|
| `tb_transfer_ctrl`, `tb_bs_wire`, `tb_bs_register`, `tb_pattern_match` | leaf blocks, exhaustively or against reference rules |
| `tb_rubber_wire` | stretch, hold while blocked, unwind, item conservation, capacity |
| `tb_port` | put/get timing, match sampling, full inreg, port/ring alternation |
| `tb_storage_ring` | 4-port ring, height 2: exact latency; fill until the ring is full; drain; scoreboard; counts stretch, descend, full ring, held puts |
| `tb_simple_ring` | `HEIGHT = 0` (plain wires): latency, one word per port plus outregs, drain |
| `tb_storage_ring_full` | default parameters: 34-frame latency round the ring, one full round of 32 items |
| `tb_workload_batches` (+ helper `batch_driver`) | the random/biased batch experiment above |

## Departures from the original description

* **Clocking.** The original uses a two-phase non-overlapping clock: conditions are evaluated
  on φ1 and writes happen on φ2. This RTL uses one clock instead. Conditions are
  combinational within the cycle, and all writes happen on the rising edge.
* **Layout.** Layout-level parts (the CMOS cell of the newstate transition) are not part of
  the RTL.
* **Choices made here.** These items are not specified by the original and were
  chosen here:
  * word width and category encoding;
  * the processor handshakes and their restriction to the state cycle;
  * sampling the match at frame start;
  * retrieval taking priority over moving on;
  * the reset values.
* **Port arbitration.** The original leaves out the exact bit-serial form of the port
  transitions, and it allows either a fixed or an alternating choice between conflicting
  transitions. Port insertion uses the alternating choice, for the starvation reason given
  above.
