# Dynamic cluster resizing: ED²P-driven issue-queue gating

A clustered out-of-order core splits its back end into several identical
clusters. Each cluster has its own register file, data cache and functional
units, plus four issue queues (IQs): integer, floating point, memory and copy.
How much of that hardware a program can use varies from one program phase to
the next. This design decides, while the program runs, how many issue queues
of each kind stay switched on. It aims at the lowest **energy × delay²**
(ED²P), a metric that does not depend on the supply voltage.

The controller needs no model of the program. It measures energy with
activity counters, measures delay with a cycle counter, and moves the number
of active queues towards whichever setting gave the lower ED²P.

The RTL covers the resizing logic for a 4-cluster machine: 16 energy
estimators, the interval counters and sequencer, and one resizer per queue
type. The core itself (trace cache, rename, steering, the queues, caches and
functional units) is not part of it. The resizing logic sees the core through
two inputs (accesses per queue per cycle, instructions committed per cycle)
and one output (the enable of each queue).

## Measuring energy: activity counter × energy per access

Every issue queue has an **activity counter (AC)**. Each cycle it adds the
number of accesses made to that queue. Each queue type also has an
**energy-per-access constant (EAR)**, fixed at design time. At the end of each
measurement interval, the energy of the interval is `AC × EAR`. It is stored in
the queue's **Energy Consumed Register (ECR)**, and the AC starts again from
zero (`energy_estimator`).

The energy of a queue type is the sum of its four ECRs, one per cluster. A
queue that is switched off counts no accesses, so switching it off shows up as
saved energy. This only works if the core's own activity grows with the number
of active queues. For example, result tags broadcast to every active queue
make each extra queue cost energy.

The EAR values are placeholders in arbitrary units: int 12, FP 14, mem 40,
copy 6 (`dcr_pkg::EAR_DEFAULT`, or the `EAR` parameter of `dcr_top`). Set
them from your own energy characterisation. Only their ratios matter, because
the controller compares ED²P values with each other and never with an
absolute figure.

## Comparing two intervals fairly: the scaled delay

Two intervals never execute the same number of instructions, so their raw
E·C² values (C = cycles) cannot be compared directly. The delay of the newer
interval is therefore rescaled to the instruction count `Iref` of the interval
it is compared with:

```
IPC      = I / C                      (I = committed instructions)
D_scaled = Iref / IPC = Iref · C / I
ED²P     = E · D_scaled²
```

Only the delay is rescaled. The energy is used as measured.

`ed2p_unit` computes `Iref·C / I` with a restoring divider, one quotient bit
per cycle. It then squares the delay and multiplies by E. The unit also gives
the interval's own unscaled `E·C²`, which becomes the reference for the next
comparison. The scaled delay is truncated. It saturates at 2²³−1, and `I = 0`
counts as the worst possible interval. With the default widths the whole
computation takes 46 cycles. That is negligible against 16K-cycle intervals,
and one unit per queue type is enough.

## The two resizing schemes

The scheme is chosen at run time with the `scheme` input. When it changes,
the interval sequence restarts and both controllers forget their history. The
current queue counts are kept.

### Single-interval scheme (`single_interval_ctrl`)

Each queue type has a **direction bit**. At the end of every interval (16K
cycles by default), the interval's scaled ED²P is compared with the previous
interval's ED²P:

* **ED²P went down:** the last move helped, so move one more queue in the same
  direction.
* **ED²P did not go down (equal included):** flip the direction bit and move
  one queue the other way.

The count stays within 1…4. A move that would leave that range leaves the
count unchanged. The first interval after reset or a scheme change only
records its value. The direction bit starts at "remove". The drawback is that
the configuration changes after every interval.

### Double-interval scheme (`double_interval_ctrl`)

The configuration is held steady for a 256K-cycle **large interval**. Then
two 16K-cycle **trials** run. One uses N−1 queues of each type and the other
N+1. The lowest of the three ED²P values decides N for the next round:

```
|<-------------- large interval, N queues (256K) -------------->|<- N-1 ->|<- N+1 ->|
|        PH_WARM (240K, not measured)        | PH_REF (16K, N)   | PH_DOWN | PH_UP   |
                                                                 16K        16K
```

N is measured over the **last 16K cycles** of the large interval (`PH_REF`),
so that all three candidates are measured over windows of the same length.
The trial ED²Ps are scaled to the instruction count of that reference window.
A trial that would leave 1…4 runs with N queues and is not a candidate. A
trial must be strictly better than the reference to win. On a tie between the
two trials, the smaller count wins.

All four queue types use the same interval boundaries. Each type makes its
own decision, from its own energy and the shared delay. The trials of all
types therefore run at the same time.

## Which queues are switched off

With N active queues of a type, the queues of clusters 0 … N−1 are on
(`aiq_mask`). **Cluster 0 keeps every queue on at all times.** The highest
cluster is always the first to go. The core's steering logic must read
`iq_enable` and stop sending micro-ops to a disabled queue. Draining a queue
that is being switched off is the core's job.

## Module hierarchy

```
dcr_top
├── interval_sequencer       window boundaries and tags (PH_SINGLE / WARM / REF / DOWN / UP)
├── interval_monitor         cycles and committed instructions per window
├── energy_estimator ×16     AC, EAR, ECR per [type][cluster]
└── iq_resizer ×4            per queue type
    ├── ed2p_unit            E·C² and E·(Iref·C/I)²
    │   └── seq_divider      restoring divider
    ├── single_interval_ctrl direction-bit rule
    ├── double_interval_ctrl best of N, N−1, N+1
    └── aiq_mask             count → per-cluster enables
```

`dcr_pkg` holds the shared constants and the `iq_type_e`, `scheme_e` and
`phase_e` types.

## Interface and timing of `dcr_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `scheme` | in | `scheme_e` | `SCHEME_SINGLE` or `SCHEME_DOUBLE`; a change restarts the sequence |
| `iq_access` | in | [4][4][3] | accesses per cycle to queue [type][cluster], 0…7 |
| `commit` | in | 3 | instructions committed this cycle, 0…4 |
| `iq_enable` | out | [4][4] | queue enables; bit [t][0] is always 1 |
| `n_active` | out | [4][3] | decided number of active queues per type |
| `n_applied` | out | [4][3] | count in force now (N±1 during trials) |
| `ecr` | out | [4][4][30] | Energy Consumed Registers of the last window |
| `interval_end` | out | 1 | high on the last cycle of each window |
| `cur_phase` | out | `phase_e` | window now running |

Reset makes every type start with all 4 queues active.

On the last cycle of a window, `interval_end` is high. The ECRs and counters
latch that cycle's activity too, and they hold the totals from the next
cycle. The resizers start their ED²P computation in that next cycle. A
resulting change of `n_active` is visible 49 cycles after `interval_end`,
while the next window is already running. In the double scheme, `n_applied`
switches to N−1 or N+1 on the first cycle of a trial window.

## Parameters and sizes

| parameter | default | origin |
|---|---|---|
| clusters, queue types | 4, 4 | machine description |
| `LARGE_LEN` | 262144 (256K) cycles | double-scheme large interval |
| `SHORT_LEN` | 16384 (16K) cycles | double-scheme trial interval |
| `SINGLE_LEN` | 16384 cycles | own choice: the single-scheme interval length is not specified |
| `EAR` | 12 / 14 / 40 / 6 | own placeholders |
| accesses per queue per cycle | 0…7 (3 bits) | own choice |
| counter widths | 19-bit cycles, 22-bit instructions, 22-bit AC, 30-bit ECR, 78-bit ED²P | derived from the interval length |

The widths follow from `LARGE_LEN`. Shorter intervals shrink everything
automatically. The activity counters and instruction counters saturate
instead of wrapping.

## Choices made here, beyond the scheme itself

The following are this implementation's own decisions. Everything else
follows the scheme as described above.

* Both schemes are built into one controller and chosen by an input.
* The N configuration of the double scheme is measured over the last 16K
  cycles of the large interval.
* A disabled queue counts no accesses.
* Ties and out-of-range moves are resolved as described above.
* All queues start active after reset. The single scheme's first move is
  downwards.
* Queues are turned off from the highest cluster down.
* A decision is applied about 50 cycles into the following window. It is not
  applied at the window boundary.
* The energy constants, the access range and all widths are assumptions.

## Simulating

Every file can be compiled with plain Verilator 5. For example, the
end-to-end test at short intervals:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/dcr_pkg.sv tb/tb_dcr_top.sv --top-module tb_dcr_top
./obj_dir/Vtb_dcr_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and finishes, and each
has a watchdog.

* **Unit testbenches:** `tb_<module>` for `energy_estimator`,
  `interval_monitor`, `interval_sequencer`, `ed2p_unit`,
  `single_interval_ctrl`, `double_interval_ctrl`, `aiq_mask` and
  `iq_resizer`. Each compares its block with an independent model. The ED²P
  tests use 128-bit arithmetic and check the 46-cycle latency.
* **`tb_dcr_top`:** the full design with 100-cycle intervals and a 400-cycle
  large interval. A synthetic core drives it (`tb/dcr_checker.sv`):
  * Each queue type has a demand level that changes every few windows.
    Too few queues slow down commit.
  * Every commit is broadcast to all active queues, so each extra queue costs
    energy.
  * Disabled queues still see stray accesses, which the design must ignore.

  The checker has its own reference model. It counts activity, predicts every
  ECR, and repeats both decision rules to predict every queue count. It also
  requires each mechanism to occur at least once: grow, shrink, direction
  flip and blocked move; keep/shrink/grow after a trial; both trial windows;
  scheme switches; gated accesses.
* **`tb_dcr_top_full`:** the same checker with every parameter at its default
  (256K/16K intervals). It runs 40 single-scheme intervals and 10 complete
  double-scheme rounds, about 3.9 M cycles, which takes a few seconds.

## Limits

* The numbers are only as good as the activity inputs. The design trusts the
  core to report accesses per queue faithfully.
* The EAR constants carry no real energy data.
* Nothing here models static (leakage) power of an enabled queue. The
  estimate is dynamic energy only, so gating pays off only through lower
  activity.
* Switching a queue off or on takes effect immediately at the enable output.
  The core's drain and wake-up sequence is not modelled.
