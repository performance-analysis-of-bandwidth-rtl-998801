# Bandwidth-aware bus arbiter

Fixed-priority, round-robin, TDMA and lottery arbiters choose between
simultaneous bus requests without looking at how much of the bus each master
has already had. None of them lets you say "the CPU gets 40 % of the bus and
each DMA engine 20 %". This arbiter does. It counts the cycles each master has
owned the bus and turns the counts into percentages. It compares those with a
target share that you set per master. The master furthest *below* its target
gets the highest priority for the next cycle. Over time this feedback loop
pulls every master's share onto its target, provided the masters ask for at
least that much.

The RTL is SystemVerilog (IEEE 1800-2017) with AMBA-AHB-style signals
(`HBUSREQx`, `HLOCKx`, `HREADY`, `HGRANTx`, `HMASTER`). It builds the
bandwidth-aware arbitration scheme published by K.-P. Lee and Y.-S. Yoon. That
description gives the stage structure and the arithmetic. The bus hand-over
rules, the counter range and a few other details are this design's own choices;
they are listed below.

## The feedback loop

```
            +-------------------------------------------------------------+
            |                                                             |
 master[x]  v                                                             |
   --> usage counter x --> proportion --> difference --> priority --> [prio reg] --> arbitration --+--> grant[]
       (owned cycles)      (percent)     (target-share)  (rank 1..N)                 block        +--> master[] / hmaster
                                              ^
                                          target[x]
```

| Stage | Module | What it computes |
|---|---|---|
| usage counters | `bwa_master_counter` (one per master) | cycles in which master *x* owned the bus (and `count_en` was high) |
| proportion calculator | `bwa_proportion_calc` | `share[x] = count[x] * 100 / T`, where *T* is the sum of all counts, as an integer percent |
| difference calculator | `bwa_difference_calc` | `diff[x] = target[x] - share[x]`, signed; positive means "owed bandwidth" |
| priority decision | `bwa_priority_decision` | priority 1..N: largest `diff` first; on equal `diff` a preset order (`TIE_ORDER`, default: lower master index first) |
| priority register | in `bwa_arbiter_top` | the priorities decided in one cycle apply to the next cycle's requests |
| arbitration block | `bwa_arbitration` | grants the bus to the requesting master with the best priority |

With a single request, priorities play no part and that master gets the bus.
They matter only when two or more masters request at the same time.

### Worked example (targets 40:30:20:10)

All four masters request in every step, and each step hands one bus cycle to
the master that has priority 1:

| usage counts M0..M3 | shares (%) | target - share | priority |
|---|---|---|---|
| 9 7 4 3 | 39 31 17 13 | 1 -1 3 -3 | 2 3 1 4 |
| 9 7 5 3 | 38 29 21 12 | 2 1 -1 -2 | 1 2 3 4 |
| 10 7 5 3 | 40 28 20 12 | 0 2 0 -2 | 2 1 3 4 |
| 10 8 5 3 | 38 31 19 12 | 2 -1 1 -2 | 1 3 2 4 |
| 11 8 5 3 | 41 30 18 11 | -1 0 2 -1 | 3 2 1 4 |
| 11 8 6 3 | 39 29 21 11 | 1 1 -1 -1 | 1 2 3 4 |

The unit testbenches check every row of this table, stage by stage.

## How a share becomes a whole percentage

Shares are integers from 0 to 100 (7 bits), so every fraction has to be
rounded. The default rule, `ROUND_LARGEST_REMAINDER`, works like this:

1. Compute `q[x] = floor(100*count[x]/T)` and the remainder `r[x]` for every master.
2. `100 - sum(q)` points are still missing. This is at most N-1.
3. Hand one point each to the masters with the largest remainders. On equal
   remainders the lower index comes first.

The shares then always add up to exactly 100. This is the only simple rule that
reproduces every row of the table above. For example, 11:8:5:3 gives
41:30:18:11, whereas rounding each share on its own would give 41:30:19:11.
In hardware this is a rank among N remainders, compared with the missing count.
`ROUND_HALF_UP` rounds each share on its own; set it with the `ROUND_MODE`
parameter.

Each share needs one division. The divisions are combinational: N dividers of
(CNT_W+7) by (CNT_W+2) bits. This is the largest part of the arbiter, and the
first place to look if timing is tight. One divider shared over N cycles would
also work, because the counts change slowly. The priorities would then lag by
a few more cycles.

## Timing

All state is in registers clocked on the rising edge of `clk`. Reset is
synchronous and active low: counters go to 0, priorities to 1..N in index
order, and grant and owner to master 0.

- Cycle *k*: master *x* owns the bus (`master[x]`) with `count_en` high. Its
  counter is incremented at edge *k*.
- Cycle *k+1*: the new count flows combinationally through proportion,
  difference and priority decision. The priority register captures the result
  at edge *k+1*.
- Cycle *k+2*: the arbitration block uses those priorities. A new grant is
  registered at edge *k+2*.
- `master` / `hmaster` take over the grant at the next edge where `hready` is
  high. As on AMBA AHB, the grant runs one cycle ahead of the address-phase
  owner.

The grant may change at an edge only if `hready` is high and the current
grantee is not holding the bus (its `req` and `lock` both high). With no
request at all, the grant stays with the last grantee (the bus is parked).

## Counting and rescaling

A master's counter increments in each cycle where `master[x] & count_en`.
Tie `count_en` high to count every owned cycle. Drive it with "the bus is
carrying a transfer" (non-IDLE transfer or wait state) to keep parked, idle
cycles out of the statistics. The testbenches do the latter.

The counters are `CNT_W` = 24 bits wide. That is enough for more than 16
million cycles per master, and more than the 10 million-cycle runs used to
evaluate the scheme. When any counter is full, `rescale` goes high and every
counter stores half of its next value at the same edge. This keeps the ratios
between masters, so the shares survive. It also turns the measurement into a
long window that slowly forgets old history. With a small `CNT_W` (the
end-to-end test uses 10 bits) this happens every thousand cycles or so, and the
loop still holds the targets.

## How accurate it is

The loop only sees whole percentages. It therefore settles anywhere inside a
dead band of roughly ±0.5 to ±1 percentage point around each target, not
exactly on it. Long simulations of four random-traffic masters show this. The
traffic is bursts of 1/4/8/16 beats, idle gaps of 0 to 10 cycles (5 on
average), and 5 % HREADY wait states.

| targets | shares after 2,000,000 cycles |
|---|---|
| 40:30:20:10 | 39.76 / 30.74 / 19.75 / 9.74 |
| 40:35:15:10 | 39.75 / 34.76 / 15.74 / 9.75 |
| 40:30:15:15 | 39.50 / 30.50 / 15.49 / 14.50 |
| 30:30:20:20 | 30.75 / 29.75 / 19.75 / 19.75 |
| 40:20:20:20 (8-beat bursts) | 39.75 / 20.75 / 19.75 / 19.75 |

After 1,000 cycles the shares are typically within about 2 points of their
targets. Throughput follows the shares. In the 40:20:20:20 case with 32-bit
8-beat bursts, the processor master moves about 11.3 data bits per bus cycle
and each DMA master about 5.7. That is the intended 2:1 ratio. If you need finer control, widen `PCT_W` in `bwa_pkg` and replace the
constant 100 with a larger scale (e.g. 1000 for tenths of a percent). That
means changing `bwa_proportion_calc`, `bwa_difference_calc`, and `DIFF_W`.

A target can only be met if its master asks for the bus often enough. The loop
does not check that the targets add up to 100. A master that is owed bandwidth
but not requesting simply does not get it, and its unused share goes to
whoever is requesting.

## Interface of `bwa_arbiter_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | bus clock (HCLK) |
| `rst_n` | in | 1 | synchronous reset, active low |
| `req` | in | N | bus requests, HBUSREQx |
| `lock` | in | N | HLOCKx: a requesting grantee keeps the bus |
| `hready` | in | 1 | HREADY: the grant and the owner may change |
| `count_en` | in | 1 | the current owner is using the bus this cycle |
| `target` | in | N x 7 | target share per master, percent |
| `grant` | out | N | HGRANTx, one-hot |
| `master` | out | N | bus owner, one-hot |
| `hmaster` | out | 4 | bus owner, binary (HMASTER[3:0]) |
| `usage` | out | N x CNT_W | usage counters |
| `share` | out | N x 7 | measured shares, percent |
| `diff` | out | N x 8 | target minus share, signed |
| `prio` | out | N x 3 | priorities in use, 1 = highest |
| `rescale` | out | 1 | the counters are being halved at this edge |

Parameters: `N` = 4 masters, `CNT_W` = 24, `ROUND_MODE` =
`ROUND_LARGEST_REMAINDER`, and `TIE_ORDER`. `TIE_ORDER` is a packed array of
4-bit tie ranks, one per master; a lower rank wins a tie. Its default
`TIE_BY_INDEX` ranks masters by index. Use it to put, say, a processor ahead of
DMA engines on equal differences. The remainder rounding always breaks its
ties by index. `N` can be up to 16, because `hmaster` and `TIE_ORDER` have
room for 16 masters; only `N` = 4 is simulated.

Assertions check that `grant` and `master` are one-hot and that no counter
wraps without a rescale.

## Files

`rtl/`:
- `bwa_pkg.sv`: widths, `pct_t`, `diff_t` and the rounding-mode enum.
- `bwa_master_counter.sv`, `bwa_proportion_calc.sv`, `bwa_difference_calc.sv`,
  `bwa_priority_decision.sv`, `bwa_arbitration.sv`: the stages.
- `bwa_arbiter_top.sv`: the arbiter.

`tb/`:
- `tb_bwa_<stage>.sv`: self-checking unit tests. Each covers the worked
  example, corner cases and thousands of random vectors against an independent
  integer model (`tb_bwa_ref_pkg.sv`).
- `tb_bwa_traffic_master.sv`: a behavioural bus master. It issues random
  bursts and measures its request wait times.
- `tb_bwa_env.sv`: the system-level stimulus and checker. Every cycle it checks
  counters, shares, differences, priorities, grant and owner against a
  reference model. At the end of each workload it checks that every share is
  within 1 point of its target. It also counts how often contention, lock
  holds, wait states, equal differences, remainder rounding, rescales and
  parking occurred, and fails any mechanism that never occurred.
- `tb_bwa_arbiter_top.sv`: the end-to-end test with 10-bit counters (frequent
  rescales): five workloads of 20,000 cycles each.
- `tb_bwa_arbiter_full.sv`: the arbiter at its default parameters: five
  workloads of 2,000,000 cycles each. It takes about 7 s.

Every testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.

## Simulating

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/bwa_pkg.sv tb/tb_bwa_ref_pkg.sv tb/tb_bwa_arbiter_top.sv \
    --top-module tb_bwa_arbiter_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. Lint the RTL with
`verilator --lint-only -Wall -Irtl -y rtl rtl/bwa_pkg.sv rtl/bwa_arbiter_top.sv`.

## What follows the original scheme and what does not

Taken from the scheme as published:
- the stage chain (counters, proportion, difference, priority decision,
  arbitration);
- counting owned bus cycles per master;
- the percentage formula;
- the sign of the difference;
- ranking by difference, with a preset order on ties;
- priorities applied in the next cycle;
- four masters;
- the user-set target shares.

This design's own choices:
- Percentages are whole numbers with largest-remainder rounding. The published
  text speaks of rounding to one decimal place, while its worked example uses
  whole percentages that only this rule reproduces.
- The preset tie order is a parameter, with the master index as default.
- The 24-bit counters and the halving rescale.
- The `count_en` qualifier.
- The AHB hand-over rules (`hready`, `lock`, parking, reset to master 0).
- The one-cycle priority register plus registered grant, which give the
  two-edge latency described under Timing.

Not built: the masters, slaves, address decoder and data multiplexer of the
bus system around the arbiter. The testbenches model the masters
behaviourally. The fixed-priority, round-robin, TDMA and lottery arbiters the
scheme was compared against are also not built. Throughput in bit/s is not
computed, because it depends on a bus clock frequency that is not specified.
