# Reconfigurable two-level bus arbiter

A shared on-chip bus (an AMBA AHB-style single-layer bus) needs one arbiter that
decides which of up to 16 masters drives the next transfer. A fixed-priority
arbiter is cheap but starves low-priority masters. Round robin is fair but ignores
urgency. This arbiter does not commit to either. It splits the masters into four
groups of four and arbitrates in two levels. Each of the five arbitration blocks
can run any of four algorithms, chosen at run time:

```
 req[3:0]   ──► F1 ─┐
 req[7:4]   ──► F2 ─┤ group candidates + valid
 req[11:8]  ──► F3 ─┼──────────────────────────► F5 ──► grant register ──► gnt[15:0]
 req[15:12] ──► F4 ─┘                                   + tenure timer      master_id
                                                                            bus_busy
 cfg_we / cfg_wdata ──► reconfiguration controller ──► one-hot algorithm enables of F1..F5
```

A *state* is written as five digits, F1 first, where 1 = fixed priority,
2 = round robin, 3 = first come first serve (FCFS) and 4 = random access. For
example, `11111` is the conventional fixed-priority arbiter with master 0 on top.
`22222` is a two-level round robin. `12141` runs fixed priority in F1, F3 and F5,
round robin in F2 and random access in F4. That makes 4^5 = 1024 arbitration
schemes in one piece of hardware, and a system can pick the one that suits its
traffic.

## Selection codes

`cfg_wdata` / `cfg_active` is a packed struct `arb_pkg::arb_cfg_t`, 10 bits wide.
F1 sits in bits [1:0], F2 in [3:2], and so on up to F5 in [9:8]. Each field holds
one 2-bit code:

| code | algorithm | digit in a state name |
|------|-----------|-----------------------|
| 00 | fixed priority | 1 |
| 01 | round robin | 2 |
| 10 | first come first serve | 3 |
| 11 | random access | 4 |

So the digit is the code plus one. State `12341` is
`{f5:00, f4:11, f3:10, f2:01, f1:00}` = `10'b00_11_10_01_00`.

## The four algorithms

Each algorithm is its own module with the same interface: `req[N-1:0]` in,
and a combinational one-hot candidate `gnt` and `valid` out. `advance` tells the
algorithm that its candidate was accepted, and `en` says whether it is the one
selected. N is 4 everywhere in this design.

- **Fixed priority** (`fixed_priority_arb`): lowest index wins, M0 > M1 > M2 > M3.
  It has no state.
- **Round robin** (`round_robin_arb`): a pointer register remembers the master
  granted last. The search starts at the next master and wraps around. The scan
  is a single combinational search in one cycle, not one master per clock. The
  pointer moves only on an accepted grant.
- **First come first serve** (`fcfs_arb`): a FIFO of master indices, depth N,
  with a stack counter. A master joins the tail in the first cycle its request
  is seen. Masters arriving in the same cycle join in index order. The head is
  the candidate. It leaves the FIFO when accepted, and if it keeps requesting it
  joins the tail again next cycle. A master that withdraws its request leaves the
  FIFO. When the FIFO is empty, a newcomer can be the candidate in the cycle it
  arrives.
- **Random access** (`random_arb` + `lfsr`): a 16-bit maximal-length LFSR
  (x^16+x^14+x^13+x^11+1) steps every clock. Its state is cut into four 4-bit
  random numbers, one per master. A comparator grants the requester with the
  largest number, and on a tie the lower index wins. Each block has its own seed
  (`arb_pkg::block_seed`).

`arb_block` is one functional block F1..F5. It instantiates all four algorithms
on the same requests and uses the one-hot enable to pick which candidate leaves
the block and which algorithm sees `advance`. The algorithms that are not
selected keep their state. The round-robin pointer stays where it was. The FCFS
FIFO keeps recording arrival order, so switching a block to FCFS starts with the
correct order. The LFSRs always run.

## How the two levels interact

This is the part most worth understanding before changing the RTL.

1. **One decision path per cycle.** F1..F4 each produce a candidate from their
   four requests. F5 sees the four `valid` bits as its own "requests" and picks a
   group. The winner is `4*group + candidate`. All of this is combinational
   within the cycle.
2. **When a decision is taken.** `grant_ctrl` raises `arb_now` in three cases:
   when the bus is idle, when the owner has dropped its request, or when the
   owner has held the bus for `BLOCK_CYCLES` cycles (16 by default). The winner
   is then loaded into the grant register and owns the bus from the next cycle.
   A master that used up its tenure and still requests competes again like
   everyone else. Under fixed priority that can mean it wins again at once. With
   no requester, the bus parks on `DEFAULT_MASTER` (master 0) with `bus_busy` low.
3. **Whose state moves.** F5 sees `advance = arb_now`. A first-level block
   advances only if its group won at F5 (`arb_now && top_gnt[g]`). Otherwise a
   round-robin group would skip a master that never got the bus, and an FCFS
   group would drop a master that was only a candidate.
4. **Changing the selection.** A write to the selection register is held pending
   and takes effect at the next cycle with `arb_now` high. A write made in a
   cycle where `arb_now` is already high takes effect at once. So a decision is
   always made under a single scheme, and the new selection governs the next
   decision after the write. The reset value is `11111`.

Timing summary: a request present in a decision cycle is granted in the next
cycle. `gnt`, `master_id` and `bus_busy` come from registers. `arb_now` is
combinational. The owner should lower its request during its last transfer cycle,
as an AHB master lowers its bus request. The arbiter then decides in that same
cycle and the bus changes hands with no idle cycle.

## Top-level interface (`reconfigurable_arbiter`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock, asynchronous active-low reset |
| cfg_we | in | 1 | write the selection register |
| cfg_wdata | in | 10 (`arb_cfg_t`) | new selection, F1 in [1:0] .. F5 in [9:8] |
| cfg_active | out | 10 | selection in force |
| req | in | 16 | bus request of masters 0..15 |
| gnt | out | 16 | one-hot grant (default master when idle) |
| master_id | out | 4 | index of the granted master |
| bus_busy | out | 1 | the granted master is a real requester |
| arb_now | out | 1 | a decision is taken in this cycle |

Parameters: `BLOCK_CYCLES` (16, the transfer period of the reference traffic),
`DEFAULT_MASTER` (0), `RESET_CFG` (`11111`). The group structure (4 × 4) is set by
`arb_pkg`.

## Behaviour under the reference traffic

`tb/tb_workload.sv` runs the traffic the arbiter was characterised with:

- 16 masters, each with 1.0 to 1.875 KB to send over a 32-bit bus.
- An idle master requests with probability 0.5 per cycle.
- Each transaction is 8 to 16 words, drawn uniformly (mean 12, variance 6.67).

The test covers nine states. It also runs a second instance with
`BLOCK_CYCLES = 32` on a 64-bit bus with 16- to 32-word transactions, the
larger block size. Its numbers are for orientation, not a benchmark.
With this closed, saturated workload the bus is busy more than 99 % of the
time in every state. The states differ in who waits:

- Under `11111`, average waits grow steadily from about 10 cycles for master 0 to
  about 200 cycles for masters 14 and 15. The low-priority masters finish last,
  which shows the starvation that fixed priority causes. The grant rate tells
  the same story. It is the share of decisions a master wins among those taken
  while it was requesting. It falls from 100 % for masters 0 and 1 to about 6 %
  for masters 14 and 15.
- Under `22222` and `44444`, waits are spread evenly over the masters, at
  110-200 cycles. Grant rates sit between 6 and 11 % for every master.

The latencies and utilisation figures published for this kind of arbiter came
from a separate, more abstract C model with its own accounting. They are not
reproduced cycle for cycle here.

## How far to trust it

Every block has a self-checking testbench that compares it cycle by cycle with a
reference model (`tb/arb_ref_pkg.sv`) written separately from the RTL. The checks cover:

- fixed priority: exhaustively;
- round robin: against the reference model, plus a bound on how long a
  continuously requesting master waits;
- FCFS: order of service, including withdrawals and simultaneous arrivals;
- random: against the polynomial, plus the fairness of the shares;
- LFSR: a full 65535-state period;
- the selection register: immediate and deferred application;
- `grant_ctrl`: tenure expiry, early release and parking.

`tb_reconfigurable_arbiter` runs the top at its default parameters for 40 000
cycles. It switches among the published states and random states, and compares
`arb_now`, `gnt`, `master_id`, `bus_busy` and `cfg_active` with a model of both
levels in every cycle. It also counts each mechanism and fails if one never
occurred:

- each algorithm deciding a contended choice at level 1 and at F5;
- a selection applied at once, and one deferred;
- a tenure expiry;
- an early release;
- idle parking.

The RTL carries assertions: one-hot enables, grants only to requesters, the FCFS
counter bound and the tenure bound.

After synthesis, the whole arbiter is about 1350 word-level cells and 176
flip-flops.

## Where this design makes its own choices

The overall structure is as described above: four first-level blocks plus one
second-level block, four algorithms per block, the 2-bit codes, an LFSR with a
maximum comparator, and a FIFO with a stack counter and sorting. The following
points were not specified and were decided here:

- The round-robin search is combinational rather than a clocked pointer scan.
  The round-robin "grant register" and "timer" are shared by the whole arbiter
  as the grant register and tenure timer.
- The FCFS rules: same-cycle arrivals enter in index order, withdrawn masters are
  removed, and a newcomer bypasses an empty FIFO.
- The LFSR width, polynomial and seeds. Ties between random numbers go to the
  lower index.
- The tenure rule (at most `BLOCK_CYCLES` per grant), the one-cycle grant
  latency, and master 0 as default master.
- Selection changes wait for the next decision. The reset state is `11111`.
- A first-level block advances only when its group wins at F5.

Not included: the rest of an AHB system, that is the address decoder, the
slave and master multiplexors, and LOCK, SPLIT and RETRY handling. The arbiter
handles requests and grants only. An AHB wrapper would add HLOCK (hold off
`arb_now` while the owner is locked) and split masking (clear a split master's
request until its slave releases it).

## Files

- `rtl/arb_pkg.sv`: codes, `arb_cfg_t`, group sizes, LFSR seeds
- `rtl/fixed_priority_arb.sv`, `rtl/round_robin_arb.sv`, `rtl/fcfs_arb.sv`,
  `rtl/random_arb.sv`, `rtl/lfsr.sv`: the algorithms
- `rtl/arb_block.sv`: one functional block F1..F5
- `rtl/reconfig_controller.sv`: selection register and enable decode
- `rtl/grant_ctrl.sv`: grant register, tenure timer, default master
- `rtl/reconfigurable_arbiter.sv`: the top level
- `tb/tb_<module>.sv`: one testbench per module, plus `tb/tb_workload.sv`
  (reference traffic, built from `tb/workload_runner.sv`)
- `tb/arb_ref_pkg.sv`: reference models

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/arb_pkg.sv tb/arb_ref_pkg.sv tb/tb_reconfigurable_arbiter.sv \
    --top-module tb_reconfigurable_arbiter -o sim
./obj_dir/sim
```

Substitute any other `tb_*` for the top module. `tb_workload` needs only
`rtl/arb_pkg.sv` ahead of it. All testbenches finish in well under a second.
To try another block size, instantiate the top with
`#(.BLOCK_CYCLES(32))`. To change the reset scheme, set
`RESET_CFG`.
