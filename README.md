# Multi-queue ATM cell processor with weighted round-robin scheduling

This is the core of a two-port ATM cell processor. The core sits between two
links, for example a short-haul switch link and a long-haul or host link. It
carries traffic in both directions and gives every connection (VC) its own
cell queue, so that a burst on one connection cannot delay another. Once per
cell time it decides which queue sends next on the outgoing link. That
decision is a weighted round-robin among *service classes*. Each class has a
weight: the number of base-bandwidth channels that each of its VCs has paid
for. Each class also has a counter that gains tokens in proportion to
weight × (ready VCs) and pays for every cell it sends. The result is that
each VC gets its purchased share of the link, and successive cells of a VC
stay evenly spaced in time. The architecture is MuqPro II, the "Multi-Queue
Processor" proposed by Katevenis, Serpanos and Markatos (ICS-FORTH). This RTL
is an independent implementation of that architecture. Every detail that the
architecture leaves open was chosen here; those choices are listed in
[Departures and choices](#departures-and-choices).

All sources are SystemVerilog (IEEE 1800-2017). The design is in `rtl/` and
the self-checking testbenches are in `tb/`.

## Block map

```
            port 1                                              port 2
  in  --+-- cells ---> [ direction 0: lookup -> queues -> scheduler ] --+--> port_out_mux --> out
        |                                   ^ L1 credits                |        ^ credits for
        +-- L1 credits ------------+        +---------------------------)--------+ port-2 cells
                                   |                                    |
  out <-- port_out_mux <-- [ direction 1: scheduler <- queues <- lookup ] <-- cells --+-- in
             ^ credits for         ^ L1 credits                                       |
             | port-1 cells        +------------------------------------ L1 credits --+
```

| module | role |
|---|---|
| `muqpro_top` | two `muqpro_direction`s and two `port_out_mux`es; splits each incoming link into cells and L1 credits |
| `muqpro_direction` | one direction of flow. It contains the FSM that serialises all table updates, the cell-time counter, the L1 credit pool and the bypass path |
| `vc_translate` | header lookup: VPI/VCI translation, queue (VC) selection, routing to the processor |
| `cell_queue_mgr` | per-VC FIFO queues, kept as linked lists in one shared cell buffer with a free list |
| `vc_active_lists` | one round-robin list per class of the VCs that are ready to send; list length = N_i |
| `vc_credit_table` | per-VC class, flow-control mode (credit or rate) and L2 credit count |
| `wrr_class_sched` | the class counters and the RR / HVF / HPF selection rules |
| `cell_fifo` | cells waiting for the embedded processor |
| `port_out_mux` | merges outgoing cells with L1 credits returned to the device on that port |
| `muqpro_pkg` | cell/header structs, policy enum, management-cell rule |

Direction 0 receives on port 1 and sends on port 2. Direction 1 works the
other way round. In the top-level arrays, index 0 of a port array is port 1,
and index 0 of a direction array is direction 0.

## The class scheduler (`wrr_class_sched`)

This is the heart of the design, and the part that is easiest to get wrong
when changing it.

State: one signed counter `c_i` per class, all zero after reset.

Inputs at every cell time: the weight `w_i` of each class and `N_i`, the
number of VCs of class `i` that can send now. `N_i` comes from the length of
class `i`'s list in `vc_active_lists`.

One `step` (one cell time) does the following:

1. **Increment.** Compute `cand_i = c_i + w_i·N_i` for every class. Let
   `N = Σ w_i·N_i`.
2. **Select.** Pick one class with `N_i > 0` and `cand_i ≥ 0`, using the
   rule set by `policy`:
   * `POL_RR`: the first such class after the last one selected, scanning
     circularly.
   * `POL_HVF` (highest value first): the class with the largest `cand_i`.
   * `POL_HPF` (highest priority first): the class with the largest weight.
   Ties go to the higher class index.
3. **Charge.** The selected class gets `c_i ← cand_i − N`. Every other class
   gets `c_i ← cand_i`. A class with `N_i = 0` is cleared to 0.

While the set of ready VCs stays fixed, the counters always sum to zero after
a step. After the increment they sum to `N > 0`, so some counter is
non-negative and a cell is always sent. Over any `N` consecutive cell times,
class `i` is chosen close to `w_i·N_i` times; the scheduler testbench checks
this to within two cells over two rounds. So every VC gets `w_i/N` of the
link.

The policies differ only in the *jitter*: how far the gap between two cells
of the same VC strays from its ideal period `avg_i = N / w_i`. HPF always
serves the heaviest class as soon as its counter allows it. So that class's
gaps never exceed `ceil(avg)`, and the lighter classes take up the slack.

When classes go idle, the zero-sum property no longer holds exactly (step 3
clears their counters). It can then happen that no active class has a
non-negative counter. That cell time is then spent incrementing only, and the
counters recover within a few steps. `sel_valid` is low in such a cell time.

Timing: `sel_valid`/`sel_class` are combinational in the cycle where `step`
is high. The counters update at the end of that cycle. Counters are 32 bits
and weights 12 bits, so a weight of up to 4095 base channels is possible.

## Round-robin inside a class and the ready-list invariant

Within a class, VCs take turns one cell at a time. `vc_active_lists` holds a
linked list per class. All classes share one next-pointer table indexed by
VC number. The departure sequence is:

* cycle 1: the scheduler picks class `k`; the head VC `v` of list `k` is
  popped; its head cell is dequeued into the output register; one L2 credit
  (if `v` is credit-controlled) and one L1 credit are spent;
* cycle 2: if `v` still has cells and may still send, it is appended at the
  tail of list `k`.

The controller in `muqpro_direction` maintains one invariant: **a VC is on
its class list exactly when its queue is non-empty and it is eligible**.
Eligible means rate-controlled, or credit-controlled with at least one L2
credit. The invariant is restored at every event that can change it:

| event | list action |
|---|---|
| cell arrives to an empty queue of an eligible VC | push |
| L2 credits arrive for a credit-controlled VC that had none and has cells | push |
| departure | pop, then push back if still non-empty and eligible |

Nothing else changes eligibility. So a VC's class or mode must only be
rewritten (`cfg_*`) while its queue is empty; the hardware does not check
this. The FSM handles one event per clock, in this priority: departure, cell
arrival from the lookup, cell from the processor, L2 credit, configuration.

## Flow control

* **Level-1 (hop-by-hop) credits.** Each direction keeps a credit pool for
  its output link, loaded with `L1_INIT` at reset. A departure spends one
  credit, and each credit received on that port adds one. When a cell time
  comes while cells are waiting but the pool is empty (or the output register
  is still full), no cell is sent. `ev_stall` then pulses at the end of that
  cell time. At most one lost cell time is kept pending. In the other
  direction, the core returns credits to the device it receives from: one for
  every cell from that device that has left the buffers (sent, discarded, or
  read by the processor). Cells the processor injects return no credit; a tag
  bit stored with each cell tells them apart. `port_out_mux` sends a pending
  credit before the next cell. Per-port `l1_en` turns all of this off for
  devices that do not use credits.
* **Level-2 (end-to-end) credits.** Each credit-controlled VC has a credit
  counter. The embedded processor decodes the remote credit cells and adds
  credits through `l2_*`. Each cell the VC sends spends one credit.
* **Rate control** is credit control with the credit check switched off.
  Such a VC is scheduled only by its class weight (`cfg_credit_mode = 0`).

## Buffers and discard

`cell_queue_mgr` keeps the cells of all VCs of one direction in a single
buffer of `BUF_CELLS` slots. A link table chains each VC's cells. New slots
come first from a pointer that sweeps the buffer once after reset, then from
a LIFO free list. When a dequeue and an enqueue happen in the same clock, the
new cell reuses the slot just freed. When the buffer is full, arriving cells
are discarded and `ev_drop` pulses. A full processor FIFO also discards. The
buffer is an on-chip array that stands for the external cell memory; the
next-pointer and queue tables stand for the management SRAM.

## Lookup, the processor path and bypass

`vc_translate` indexes a direct-mapped table with `{VPI[1:0], VCI[9:0]}`
(with the defaults) and compares the full VPI/VCI as a tag. On a hit there
are three outcomes:

* For a normal data cell, the cell gets the outgoing VPI/VCI from the table
  and joins the queue of the VC the table names.
* For a connection marked `to_ep`, the cell goes to the processor FIFO with
  its header unchanged.
* For payload types 100, 101 and 110 (F5 OAM and resource-management cells),
  the cell also goes to the processor FIFO with its header unchanged.

A miss discards the cell and pulses `ev_miss`. The processor sends its own
cells (`ep_tx_*`) into any VC queue; they are scheduled like any other cell.

With `bypass[d]` set, direction `d` skips lookup and buffering. Each input
cell goes straight to the output register; it still needs an L1 credit if
`l1_en` is set on the output port. This is the physical-layer-conversion use,
for example joining two different link types.

## Interfaces and timing

* One clock, `clk`. Reset `rst_n` is synchronous and active low.
* After reset, the translation, queue-length and VC tables are cleared by
  sweeps of about `NUM_VC` cycles. `ready[d]` goes high when direction `d` is
  done. The testbenches wait for `&ready` before writing tables.
* Cells travel as a whole: `cell_t` = 32-bit header (12-bit VPI, 16-bit VCI,
  PT, CLP) + 384-bit payload. The HEC byte is left to the link interface.
* Port links (`p_in_*`, `p_out_*`) use valid/ready. `*_is_credit` marks a
  transfer that carries one L1 credit instead of a cell. Credits on the input
  side are always accepted.
* The cell time is `CELL_CLKS` clocks (35 by default, i.e. 700 ns at 50 MHz,
  one 622 Mb/s cell time). A direction sends at most one cell per cell time.
  It sends exactly one per cell time while it has ready cells, credits and a
  free output.
* Latency: lookup is 1 clock. An arrival is handled in 1 clock. A departure
  leaves the output register 1 clock after it was selected.
* Processor side, per direction: table writes `tw_*`; VC configuration
  `cfg_*` (valid/ready); L2 credits `l2_*` (valid/ready); received cells
  `ep_rx_*`; cells to send `ep_tx_*`.
* Observation: event strobes `ev_*`, buffer occupancy, FIFO level, the class
  counters and the credits pending per port.

| parameter | default | meaning |
|---|---|---|
| `NUM_CLASS` | 6 | service classes |
| `NUM_VC` | 4096 | VCs (queues, table entries) per direction |
| `BUF_CELLS` | 16384 | cell buffer slots per direction |
| `CELL_CLKS` | 35 | clocks per cell time |
| `L1_INIT` | 32 | initial L1 credits of each output link |
| `EP_DEPTH` | 16 | processor FIFO depth |
| `W_BITS`, `CR_BITS` | 12, 16 | weight and L2 credit widths |

Only the six service classes, the 700 ns cell time and the three selection
rules come from the original architecture. All other sizes are choices made
here: the architecture asks only for "thousands" of queues and a large
external buffer.

## Departures and choices

Not built:

* The physical port interfaces: HIC/HS, UTOPIA-2, SONET/SDH framing, and the
  32-bit PCI port with its user-level DMA channels. The core exposes plain
  cell streams instead.
* The embedded processor, its RAM and its boot ROM. Their interfaces are
  brought out as ports, so a processor model or real firmware can drive
  them.
* The external SDRAM and SRAM, and their controllers. Arrays with
  single-cycle access stand in for them.
* The Virtual Clock policy. It is defined only by reference to other work.
* The grouping of VCs into VP/VC *flow groups* for scheduling, and the
  multi-lane form of the switch's hardware credits. The architecture names
  both but does not describe them. Level-1 credits here use one pool per
  output link.
* The FPGA prototype variant (MuqPro I: 155 Mb/s, four UTOPIA-1 inputs, SRAM
  cell buffer, one credit level).

Chosen here:

* The table layouts, the cell format on the bus, and the direct-mapped
  lookup with discard on a miss.
* The management-cell rule, the credit-return rule, the stall rule, and
  credits taking priority on the output.
* One event per clock in a fixed priority order, a two-clock departure, and
  reset sweeps.
* The processor's outgoing cells join a VC queue that the processor names.
  In the original block diagram the processor has a queue of its own in
  front of each scheduler. Reserving one VC for the processor gives exactly
  that, and it also lets the processor's cells take any service class.
* Clearing idle classes' counters, tie-breaking, and widths.
* `N_i` counts only the VCs that can send now, not every VC of the class.
  This is what makes the scheme work-conserving when queues run empty. The
  original analysis assumes all VCs are always backlogged, and then the two
  readings coincide.

## Verification

Every testbench checks its results against values computed independently, in
the testbench itself. Each ends with a `TB_RESULT checks=… failures=…` line
and has a cycle watchdog.

| testbench | what it establishes |
|---|---|
| `tb_wrr_class_sched` | every selection and every counter of all three policies against an integer reference model; shares per round; HPF's top class served at even intervals; idle classes |
| `tb_vc_active_lists` | round-robin order and lengths under random push/pop, including push and pop on the same list in one clock |
| `tb_cell_queue_mgr` | cell contents, order, tags, lengths, occupancy and full flag under random traffic that fills the buffer; sweep length |
| `tb_vc_translate` | hit/miss, translation, processor routing, order under output stalls |
| `tb_vc_credit_table` | configuration, saturating credit add, credit use, eligibility; reset contents |
| `tb_cell_fifo`, `tb_port_out_mux` | FIFO order/full; credit-first merging, nothing lost |
| `tb_muqpro_direction` | for each policy, every departure against a reference model of counters *and* VC lists, and departures exactly one cell time apart; L1 stall; L2 gating (a VC sends exactly as many cells as credits); processor paths; miss; overflow discard; bypass; total credits returned |
| `tb_muqpro_top` | the whole core at its default size, with a device model on each port exchanging L1 credits: about 17,000 cells checked for order and header, every cell accounted for, and every mechanism exercised (departure, stall, L1 credit return, L2 gating, overflow, miss, processor in/out, policy switch, bypass) |
| `tb_wrr_workloads` | the scheduler on the two reference workloads and on a 2400-channel link (below) |

`tb_wrr_workloads` uses six classes with weights `2^(i−1)`, and every VC
always has a cell to send. The *uniform* workload has 1–20 VCs per class.
The *non-uniform* workload has one VC in each of classes 2–6 and 1–1000 VCs
in class 1. Each policy runs four random draws of each workload. The
testbench measures the lateness of each service, `(s − avg)/avg`, and
averages the non-negative samples. The results of a run with the default
seed, in percent, for classes 1…6:

| workload | RR | HVF | HPF |
|---|---|---|---|
| uniform | 0, 0.09, 0.24, 0.71, 2.73, 3.79 | 0, 0.50, 0.59, 1.40, 1.82, 1.70 | 0, 1.33, 1.06, 1.72, 1.92, 1.56 |
| non-uniform | 0, 0.07, 0.64, 2.08, 5.44, 12.14 | 0, 0.07, 6.12, 2.83, 2.70, 5.89 | 0, 0.07, 0.16, 1.02, 1.50, 2.78 |

The non-uniform case shows the expected ranking. HPF keeps every class
within a few percent, while RR and HVF delay the heaviest class by 6–12 %.
With a uniform workload the three policies come out closer than the original
evaluation reported. HPF's heaviest class shows 1.6 % rather than practically
zero. The cause is rounding: under HPF that class is never served later than
`ceil(avg)` (the testbench checks this), but `avg = N/w` is rarely a whole
number of cell times. How the original study treated fractional periods is
not known, so treat the absolute percentages with care. The testbench also
prints a second reading, with early services counted as zero delay. In that
reading HPF stays at or below about 1 % for every class in both workloads
(1.01 % at most). This matches
the original evaluation's non-uniform result (HPF below 1 %; up to 20 % for
the others, 6–12 % here).

The same testbench also schedules the architecture's sizing example: a
155 Mb/s link cut into 2400 channels of 64 kb/s. Classes buy 1, 4, 10, 30,
100 and 300 channels, with 100, 100, 50, 20, 5 and 1 VCs, which uses up all
2400 channels. Every VC receives its channel count per 2400 cell times under
all three policies. The largest gap between two cells of a VC is:

| policy | 1 | 4 | 10 | 30 | 100 | 300 channels |
|---|---|---|---|---|---|---|
| ideal | 2400 | 600 | 240 | 80 | 24 | 8 |
| RR | 2401 | 601 | 242 | 86 | 24 | 10 |
| HVF | 2400 | 600 | 240 | 81 | 24 | 9 |
| HPF | 2400 | 600 | 240 | 81 | 24 | 8 |

Each unit testbench has been run against a deliberately broken copy of its
module, and each of those copies fails its test.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/muqpro_pkg.sv tb/tb_muqpro_top.sv --top-module tb_muqpro_top -o sim
./obj_dir/sim
```

Replace `tb_muqpro_top` with any other testbench name. The full-size
end-to-end run takes a few seconds. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/muqpro_pkg.sv rtl/<module>.sv`.
The assertions in the modules check the rules of the internal handshakes: no
pop from an empty list, no enqueue into a full buffer, at most one controller
operation per clock.

## Changing it

* **Sizes.** Change the parameters of `muqpro_top`; every width is derived
  from them. `TBL_BITS` of the lookup follows `VC_BITS`, so the translation
  table has `NUM_VC` entries.
* **Policy.** A new selection rule goes into the `case` of `wrr_class_sched`
  and the enum in `muqpro_pkg`. The charge and increment rules must stay
  as they are, or the per-VC shares are lost. Extend the reference model in
  `tb_wrr_class_sched` and `tb_muqpro_direction` in the same way.
* **Real memories.** The arrays in `cell_queue_mgr`, `vc_active_lists`,
  `vc_credit_table` and `vc_translate` are read combinationally. Moving them
  to synchronous or external RAM means splitting the controller's operations
  over more clocks. There is plenty of room: a cell time has 35 clocks, and
  the busiest case (two arrivals and two departures per cell time across
  both directions) uses 3 per direction.
