# sBUX: a rate-scheduled buffered crossbar with a two-cell crosspoint buffer

This is synthesizable SystemVerilog for an N x N combined input- and
crosspoint-queued (CICQ) cell switch. It follows the smoothed buffered crossbar
("sBUX") and bandwidth regulator described in the article *On Guaranteed
Smooth Switching for Buffered Crossbar Switches*.

A conventional buffered crossbar uses credits to stop the input side from
overflowing the small buffer at each crosspoint. The credit loop has to cover
the round trip between line card and switch core, so the crosspoint buffers
grow with link speed and cable length. sBUX drops the credits altogether.
Every input and every output is run by the same kind of rate-based scheduler,
the *smoothed multiplexer* (sMUX). It spreads each flow's cell services evenly
over time, and it does so whether or not there is a cell to send. The input
then fills a crosspoint buffer at the same smooth rate as the output drains
it. A buffer of **two cells** at each crosspoint is then enough, whatever the
latency between line card and core. The rates come either from admission
control (real-time traffic) or from a *bandwidth regulator* (best-effort
traffic). The regulator re-estimates demand once per period of T slots and
turns it into an admissible, fully loaded rate matrix.

Default configuration: N = 32 ports, period T = 256 slots, 64-byte (512-bit)
cells, 16-bit demand words, 100 parallel dividers in the allocator, two-cell
crosspoint buffers. One clock cycle is one cell slot.

## Rates and periods

All rates are integers. A flow (i, j) with rate `a` receives `a/T` of a link,
which is `a` cell services per period of T slots. A matrix is *admissible*
when every row sum and every column sum is at most T. Row i drives input
scheduler SI_i and column j drives output scheduler SO_j.

A new matrix takes effect at every period boundary. At that point each
scheduler restarts all its flows. Within one period, flow i's services are
therefore placed exactly: its j-th service falls in the window

    eligible from  ceil((j-1)*T/a)      deadline  ceil(j*T/a)

counted in slots from the period start. The a-th deadline is exactly T, so a
flow gets exactly `a` services per period, provided its row or column is
admissible.

## The sMUX scheduler (`smux`)

In every slot, sMUX looks at the flows whose next service is already eligible.
It grants the one with the earliest rounded-up deadline. Ties go to the
lowest index; the scheme itself allows any tie-break. If no flow is eligible,
the slot is idle. This is earliest-deadline-first, adapted to whole slots. It
guarantees that every service lands inside its window. In any stretch of
slots, a flow then gets the ideal number of services to within one cell.

Example with T = 8 and rates (5, 2): the slots go to
`f0 f1 f0 - f0 f0 f1 f0`.

Implementation details:

* Per flow the scheduler keeps the service count, the eligible slot, and the
  next deadline. The deadline is held exactly, as `q + r/a` with `0 <= r < a`.
  Each service adds `T div a` to `q` and `T mod a` to `r`, with a carry into
  `q`. The two step constants come from a divider and are registered when the
  rates load. The divider never sits in the per-slot path.
* The earliest-deadline search is a priority scan over the N flows. For
  T = 256 the deadlines are 10 bits wide.
* `load` marks the *last* slot of a period. That slot is still scheduled with
  the old rates. At its clock edge the new rates are taken, and the next slot
  is slot 0.
* An assertion checks that no flow is granted more than its rate.
* T does not have to be a power of two. The tests run T = 8, 15, 32, 64 and
  256.

## The crossbar (`sbux_switch`)

```
 in_i --> voq_bank_i --(SI_i grant)--> fabric_link (LAT slots) --> XPB(i, dst)
                                                                       |
                                     out_j <--(SO_j grant)-- XPB(0..N-1, j)
```

* **VOQs** (`voq_bank`): one FIFO per output at each input, in one shared
  memory. When SI_i serves a VOQ, its head cell leaves if there is one. If the
  VOQ is empty, the service is *ineffective* and nothing leaves. An arrival to
  a full VOQ is dropped (`voq_drop`).
* **Fabric latency** (`fabric_link`): the input side sits on the line cards,
  LAT slots away from the core. Every input period starts LAT slots before
  the matching output period. A cell the input scheduler sends in its slot s
  therefore reaches the crosspoint in the output scheduler's slot s. To the
  crosspoint, the two schedulers look co-located. LAT must be below T.
* **Crosspoint buffers** (`xpb`): two-cell FIFOs. Within a slot the push
  comes before the pop, so a cell that arrives at an empty buffer can leave
  in the same slot. When SO_j serves an empty buffer the service is
  ineffective (`ineff_out`). With rate-fed inputs, an output service is
  ineffective at most once per flow, and the buffer never holds more than two
  cells. A push into a full buffer that is not popped in the same slot would
  set the sticky `xpb_overflow`. The testbenches check that it stays clear.
* **Rate hand-over**: `rate_next` is sampled in the last slot of an input
  period and goes to all SI_i. A copy is held and given to all SO_j LAT slots
  later. Both ends of every flow therefore change rate at the same point in
  the flow's own timeline. This keeps the two-cell bound across rate changes.

A worked worst case runs in the testbench with N = 3 and T = 15. Input 3's
row is (1, 3, 11)/15 and output 2's column is (2, 10, 3)/15. Flow 3->2 leaves
output 2 in slots 1 and 13. The output's service in slot 7 is ineffective.
The buffer holds two cells at the end of slot 12.

## The bandwidth regulator

### Demand estimator (`bw_estimator`, one per input)

All quantities are in cells per period. At the start of period k, for each of
the input's N flows:

    p(k+1) = (f(k-1) + p(k)) / 2            arrival prediction, gain 1/2
    q(k+1) = max(0, q(k) + p(k) - a(k))     backlog prediction
    d(k+1) = p(k+1) + q(k+1)                demand, saturated to L bits

Here `f(k-1)` is the number of cells that arrived in the period just ended,
`q(k)` is the VOQ backlog now, and `a(k)` is the allocation that starts now.
The halving truncates. The demand row is registered one cycle after the
period starts.

### Allocator (`bw_allocator`)

It turns the demand matrix d into a matrix whose rows and columns all sum to
T, as far as the zero pattern allows:

1. **Line sums** of d, one diagonal per cycle (N cycles).
2. **Proportional scaling**: `a(i,j) = floor(d(i,j)*T / max(R_i, C_j))`,
   where R_i and C_j are the row and column sums. M elements are done per
   cycle, taking ceil(N^2/M) cycles. The result is always admissible.
3. **Line sums** of a (N cycles).
4. **Boosting**: N steps. Step s takes diagonal `k = (start + s) mod N`, which
   is the elements `(i, (i+k) mod N)`. All N of them are raised at once by
   `T - max(R_i, C_j)`, and the sums are updated. A diagonal touches every
   row and column exactly once, so the N updates do not conflict. `start`
   advances by one on every run, so no row or column is always boosted first.

For example, with T = 10 the demand `[[4,5,6],[3,5,5],[2,1,6]]` scales to
`[[2,3,3],[2,3,2],[2,0,3]]`. Boosting the main diagonal gives
`[[4,3,3],[2,6,2],[2,0,5]]`, and the next two diagonals end at
`[[4,3,3],[2,6,2],[4,1,5]]`.

A run takes 3N + ceil(N^2/M) cycles, and `done` comes one cycle later: 108
cycles after `start` at the defaults, or 109 after the period start once the
estimators' cycle is counted. In the top level the regulator starts when the input
period starts. Its result is used from the next period on. It must therefore
finish within one period, and an assertion in `sbux_top` checks this. For
N = 32 this rules out periods shorter than about 110 slots.

## Top level (`sbux_top`)

`sbux_top` connects the switch, N estimators and the allocator. The
`best_effort` input selects the rate source:

* `0`: the admission-control matrix `rt_rate` (must be admissible);
* `1`: the regulator's latest result.

A change of mode takes effect at the next rate update. Outputs expose the
departures (`out_valid/out_src/out_cell`), the matrix in force (`cur_rate`),
the latest demand matrix, the period events (`period_start`, `rate_update`,
`alloc_done`, `slot`), and the queue state and per-slot events (`voq_occ`,
`xpb_occ`, `ineff_in`, `ineff_out`, `voq_drop`, `xpb_overflow`).

Cells are opaque W-bit words. The destination comes in separately on
`in_dst`, and the source is reported on `out_src`.

## Parameters

| parameter | default | meaning | origin |
|---|---|---|---|
| `N` | 32 | ports | article's main simulated size |
| `T` | 256 | rate period, slots; rates are a/T | article's main simulated period |
| `W` | 512 | cell width, bits (64 bytes) | article |
| `L` | 16 | demand word, bits | article |
| `M` | 100 | dividers in the scaler | article |
| `XPB_DEPTH` | 2 | crosspoint buffer, cells | article |
| `VOQ_DEPTH` | 256 | cells per VOQ | own choice: one period at full rate |
| `LAT` | 4 | line card to core latency, slots | own choice (any value < T) |

The defaults live in `rtl/sbux_pkg.sv`.

## Where this RTL departs from the article, and its limits

* Tie-breaking in sMUX is fixed to the lowest index. All flows restart at
  every period boundary. The article leaves both points open.
* The article uses 20-stage pipelined dividers. Here the allocator's M
  dividers, and the per-flow step dividers in sMUX, are single-cycle
  combinational dividers. The article's hardware-time estimate also assumes
  faster adders and dividers than one operation per slot: 50 slots for N = 32
  at 10 Gb/s, against 109 cycles here.
* The serial links that carry demands and allocations between line cards and
  core are not modelled. Both move in parallel, in zero time.
* The demand line sums are formed after the demands arrive, taking N extra
  cycles. The article overlaps them with reception.
* The article does not give VOQ depth, fabric latency, reset behaviour or
  saturation of the demand. Here they are: 256 cells, 4 slots, synchronous
  active-low reset to all-zero rates, and saturation at 2^L - 1.
* Only one latency LAT is supported, common to all inputs. The article allows
  a different measured latency per input.
* Size: there are N^2 = 1024 crosspoint buffers of two 512-bit cells (1 Mbit
  of flip-flops) and 128 Mbit of VOQ storage. In silicon the VOQ storage would
  be SRAM on the line cards. Here it is written as plain arrays. Coarse
  synthesis of the full top level takes many minutes.
* Admissibility of `rt_rate` is the caller's responsibility. It is not checked.
* The estimator sees only VOQ occupancy, as in the article. A cell that is
  already in a crosspoint buffer when its VOQ empties has no demand behind it.
  In best-effort mode it leaves only when the booster's rotating diagonal
  reaches its pair, which can take up to N periods (8192 slots at the defaults).

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`:

| testbench | what it checks |
|---|---|
| `tb_smux` | the (5,2)/8 schedule; the worked-example row and column schedules at T = 15; 12 periods of random rates (T = 64) compared slot by slot with a reference EDF, service windows, exact counts per period |
| `tb_xpb` | random push/pop against a queue model: cut-through, order, occupancy, ineffective pops, overflow flag |
| `tb_voq_bank` | random arrivals and services against per-queue models, drops when full |
| `tb_fabric_link` | latency 4 and 0 |
| `tb_bw_estimator` | 60 periods of random traffic against the three formulas, saturation, timing |
| `tb_bw_allocator` | the 3x3 example (scaled and boosted), the round-robin start, random 8x8 matrices against a reference, latency |
| `tb_sbux_switch` | the N = 3, T = 15 worst case, slot by slot; 300 periods of random traffic under a new random matrix each period (N = 4): routing, order, no loss, no overflow |
| `tb_sbux_top` | N = 4, T = 32: real-time, best-effort, real-time, best-effort, under changing traffic patterns; every regulator result is compared with a reference and must be admissible and applied; all cells delivered in order; counts rate updates, regulator runs, boosts, mode switches, ineffective services and full crosspoint buffers, and requires each to happen |
| `tb_sbux_top_full` | the same end-to-end test at the default size (N = 32, T = 256, 512-bit cells), about 16 periods |
| `tb_workload_traffic` | best-effort workloads at the default size: 24,000 slots of random phases (100 to 2000 slots) mixing uniform, log-diagonal and unbalanced (w = 0.5) traffic, then 12,000 slots of on-off bursts (mean 16 cells), both at load 0.8; no loss or reordering, full drain, throughput at least 0.99, mean output burst at most 1.2 |

Running one with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sbux_switch \
    rtl/sbux_pkg.sv rtl/smux.sv rtl/xpb.sv rtl/voq_bank.sv rtl/fabric_link.sv \
    rtl/sbux_switch.sv tb/tb_sbux_switch.sv
./obj_dir/Vtb_sbux_switch
```

For the top-level tests, pass every file in `rtl/` (the package first)
together with the testbench. The full-size model takes a few minutes to
compile and about three seconds to simulate.

`tb_workload_traffic` is a shortened version of the article's runs, about
36,000 slots instead of a million. One run gave throughput 1.000, no drops,
a mean output burst of 1.02 cells (the input bursts were 16 cells), and a
mean delay of 341 slots. These runs are too short, and use one fixed load,
so they do not reproduce the article's delay curves (Table III) or
burstiness tables (Table IV). They were not compared with those figures.
