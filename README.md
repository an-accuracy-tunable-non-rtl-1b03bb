# Coupled-oscillator co-processor

A small co-processor that finds the N-th largest or smallest of up to 32 analog
samples, sorts them, and counts how many element pairs of two vectors are close
(degree of match). It does no arithmetic on digitized samples. The comparing is
done by an array of **two-input coupled nano-oscillators**. Feed a pair of
oscillators two input levels and they lock after a time that grows with the
difference between the levels. A 1-bit comparator on the coupled output goes
high when the pair has locked. Every oscillator gets its sample on one input
and a common reference on the other. The order in which the oscillators lock
is then the order of the samples' distances to that reference. The digital
part of the design never sees a sample value. It only times and counts the
lock events.

The accuracy knob is the **Timer-Limit**. In a degree of match, only the
oscillators that lock before the limit count. A short limit gives a fast
result that accepts only close pairs. A longer limit runs longer and accepts
pairs that are further apart.

This repository holds synthesizable SystemVerilog for the digital parts: the
read-out circuit, the global controller and the latching circuitry. It also
holds a cycle-level behavioural model of the oscillator array, so that the
whole co-processor can be simulated.

## Block structure

```
 host ──start/opcode/N/limit──▶ global_controller ──latch, sel, vref──▶ latch_tune
   ▲                               │   ▲                                   │ K input pairs
   │ status, time_value, done      │   │ Execution Over, Count Over,       ▼
   │                               │   │ Output Status, Timer Value     osc_array (model)
   │                               ▼   │                                   │ K comparator bits
   └──── addr_out / data_out ───▶ readout ◀────────────────────────────────┘
```

| file | role |
|---|---|
| `rtl/coproc_pkg.sv` | sizes (K = 32, 5-bit levels, 16-bit timer), opcode and pair-select enums |
| `rtl/coproc_top.sv` | the co-processor |
| `rtl/global_controller.sv` | runs one instruction: set-up strobes, optional reference sweep, result capture |
| `rtl/latch_tune.sv` | applies the input pair of every oscillator and pads unused ones |
| `rtl/osc_array.sv`, `rtl/coupled_osc_pair.sv` | **behavioural model** of the oscillators and their 1-bit comparators |
| `rtl/readout.sv` | read-out circuit: the blocks below plus two result multiplexers |
| `rtl/wta.sv` | winner-take-all: one Valid per lock event, index of the lowest new winner |
| `rtl/match_count.sv` | alternative to the WTA that also counts how many oscillators locked together |
| `rtl/logk_counter.sv` | counts lock events; it addresses the sorted array |
| `rtl/value_register.sv` | holds N |
| `rtl/count_comparator.sv` | raises Execution Over when the count reaches N |
| `rtl/sync_timer.sv` | 16-bit timer with limit, Count Over and freeze |
| `rtl/sorted_array.sv` | 32 × 16-bit queue of lock times (or oscillator indices), read by the host |

## Instructions

Samples are 5-bit **level codes**. Code 0 is the lowest input level a_MIN and
code 31 the highest, a_MAX. A physical device uses 32 input voltages about
12 mV apart between 0.3 V and 0.7 V. The host presents one instruction, pulses
`start` and waits for `done`.

| opcode | oscillator j gets | read-out mode (MUX Input) | ends when | result |
|---|---|---|---|---|
| `OP_NTH_MAX` | ⟨A_j, a_MAX⟩ | 0 | the counter reaches N | `status` = index of the N-th distinct maximum; `time_value` = its lock time |
| `OP_NTH_MIN` | ⟨A_j, a_MIN⟩ | 0 | the counter reaches N | the same, for the minimum |
| `OP_SORT` (`ord_inc` = 0 / 1) | ⟨A_j, a_MAX⟩ / ⟨A_j, a_MIN⟩ | 0 | the counter reaches N | lock times (or indices, with `store_index`) of the N largest / smallest samples in `sorted_array` entries 0..N-1 |
| `OP_DOM` | ⟨A_j, B_j⟩ | 1 | the timer reaches `time_limit` | `status` = number of lock events within the limit |

`n_used` gives the number of samples. The latching circuitry feeds the other
oscillators ⟨a_MIN, a_MAX⟩, the widest possible pair, so they lock last.
An N-th or sort instruction whose N is never reached ends when the timer
reaches its limit. `timed_out` is then set. The timer limit for these
instructions is 16'hFFFF, the largest value 16 bits can hold.

The host turns a lock time back into a sample value. A lock time is
monotonic in the distance to the reference, so a fitted polynomial or a small
lookup table serves as the mapping. With the oscillator model used here the
mapping is exact: `level = 31 - (t - LOCK_CYCLES) / CYCLES_PER_LEVEL` for a
maximum search.

Inputs with more than 32 samples are the host's job. The host splits them into
chunks. For N-th max and sort, it carries the N best values of one chunk into
the next. For degree of match, it adds up the counts of the chunks.

## How the read-out circuit works

This is the part that needs the most care.

**Winner-take-all (`wta`).** In every cycle, the WTA compares the comparator
bits with a sticky mask of the oscillators that have already won in this
instruction. If any bit is newly high, the WTA pulses `valid` once and reports
the lowest such index. So **simultaneous lock events count once**. That is why
the instructions are the N-th *distinct* maximum and minimum: equal samples
lock together and make a single event, reported with the smaller index. The
mask also stops a comparator that stays high, or pulses again, from being
counted twice. `reset_counter` clears the mask.

**Counter, sorted array, comparator.** Each `valid` writes the current Timer
Value into `sorted_array[count]` and then increments the counter. The sorted
array therefore holds the lock times in lock order. The comparator watches
the counter's *next* value against the Value-Register (N). So Execution Over
is set in the same cycle as the N-th event. In that cycle the timer is frozen
before it advances. The held `time_value` is exactly the time of the N-th
lock, and equals the last sorted-array entry. After that, Execution Over
disables the WTA and the timer. Output Status and Timer Value stay held until
the next instruction.

**Degree of match (MUX Input = 1).** Here Count Over ends the instruction and
Output Status is the counter. Lock events in the cycle where the timer equals
the limit still count. With the WTA read-out, the count is the number of
*distinct lock times* within the limit. Two pairs with the same level
difference lock in the same cycle and count once. In a real array, lock times
vary a little from pair to pair and some such ties break. In this discrete
model every tie stays. The match-counting read-out below counts every pair.
On 40-element vectors with threshold 8, the MC build equals a plain
thresholded count exactly. The WTA build often reports about half of it.

**Match counting (`USE_MC = 1`).** The `match_count` stage also outputs the
number of oscillators that locked in the cycle, and the counter advances by
that number. Then:

- the N-th maximum counts duplicates;
- a degree of match counts every close pair;
- a sort leaves a gap of p−1 addresses after a value held by p oscillators.

To make Execution Over fire when the counter jumps past N, the comparator
tests count ≥ N rather than equality. The two tests agree for the WTA.

With `MC_MULTI_WRITE = 1` as well, the sorted array fills those gaps. A write
of Match Count p stores the same lock time in p consecutive entries, in one
cycle, so the array lists every sample, duplicates included.

**Storing indices (`store_index = 1`).** The sorted array can take the index
of the oscillator that locked instead of the timer value. A sort then leaves
the sample indices in order, and the host can look up the samples directly
with no time-to-value mapping. A lock event of several oscillators stores
only its lowest index, because that is the only index the WTA or MC stage
reports. With multiple writes, all p entries of such an event hold that index.

## Instruction timing

One instruction in time mode runs as follows. Cycle numbers are relative to
the LATCH cycle.

| cycle | controller state | what happens |
|---|---|---|
| 0 | LATCH | `latch`: new input pairs at the next edge; `reset_counter` |
| 1 | ARM | the oscillators see new inputs and restart. `reset_counter` again, because comparators from the last instruction are still high in this cycle. `write_value` (N) and `write_limit` (restart the timer) |
| 2 … | RUN | timer = cycle − 2. An oscillator whose levels differ by d has its comparator high from timer value `LOCK_CYCLES + d·CYCLES_PER_LEVEL` |
| end + 1 | RUN → IDLE | `status` and `time_value` captured, `done` for one cycle |

So with the default model (2 cycles to lock, 4 cycles per level) an N-th
maximum of a sample at level v ends at timer value 2 + 4·(31 − v). Overhead
per instruction is 3 cycles plus the lock time. A time-out in time mode takes
65,535 cycles.

## Voltage-sweep mode (`sweep = 1`)

Practical oscillators such as VO₂ (HyperFET) pairs lock within a few cycles
of their own, which is too fast to time. They do lock only when the two inputs
are nearly equal, within one 12 mV step. In sweep mode the controller
therefore applies a common reference level V_ref to the second input of every
used oscillator. It steps V_ref one level every `SWEEP_DWELL` cycles: from
a_MAX down for maximum and decreasing sort, from a_MIN up for minimum and
increasing sort. At each step the oscillators are re-latched and restart. The
timer ticks once per step, so Timer Value counts **sweep steps**.

Example (in `tb_coproc_top`): samples 652, 544, 500 and 400 mV are levels 27,
18, 14 and 6 on a 12 mV grid topped at 700 mV. The 3rd maximum returns the
500 mV sample after 17 steps. A sort gives the steps 4, 13, 17 and 25.

Such oscillators need no timer for a positional degree of match. With
⟨A_j, B_j⟩ on oscillator j, only equal pairs lock, so the match-counting
read-out gives the exact number of equal positions once the limit passes the
lock time. In the model, `MAX_SYNC_DIFF = 0` gives this behaviour.

A degree of match in sweep mode keeps vector A on the oscillators and applies
the elements of vector B one per step as V_ref. The count is the number of B
elements that meet an equal A element not matched before, whatever their
positions. The timer limit is the number of samples.

The sweep needs only equal levels to lock within a step. With the oscillator
model this holds when
`LOCK_CYCLES + 2 ≤ SWEEP_DWELL ≤ LOCK_CYCLES + CYCLES_PER_LEVEL + 1`.
The defaults 2, 4 and 4 meet it. A sweep that finds no N-th value ends after
2^SW = 32 steps with `timed_out`.

## The oscillator model

`coupled_osc_pair` is not hardware to synthesize. It stands in for an analog
oscillator pair and its 1-bit output comparator. It counts cycles since its
inputs were last applied, which means since an input changed or `restart`
pulsed. Its output goes high once

    elapsed ≥ LOCK_CYCLES + |a − b| · CYCLES_PER_LEVEL   and   |a − b| ≤ MAX_SYNC_DIFF

`MAX_SYNC_DIFF = 31` (the default) lets every pair lock eventually, like an
idealized phase-locking (Kuramoto-type) oscillator. `MAX_SYNC_DIFF = 0` lets
only equal levels lock, like a HyperFET pair whose comparator threshold gives
a one-step resolution. The cycle counts are placeholders. A real device would
be characterized, and its lock-time curve is neither linear nor exact.
Everything that depends on the model is a parameter of `coproc_top`.

## Interface of `coproc_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | one clock, asynchronous active-low reset |
| `start` | in | 1 | accepted when `busy` is low |
| `opcode` | in | `opcode_e` | instruction |
| `ord_inc` | in | 1 | sort order: 1 increasing, 0 decreasing |
| `n` | in | 6 | N (1..32) |
| `time_limit` | in | 16 | Timer-Limit for a time-mode degree of match |
| `sweep` | in | 1 | voltage-sweep mode |
| `store_index` | in | 1 | sorted array stores oscillator indices, not lock times |
| `n_used` | in | 6 | samples in use (clipped to 32) |
| `samples_a`, `samples_b` | in | 32 × 5 | sample levels (vector A, vector B) |
| `addr_out` / `data_out` | in / out | 5 / 16 | sorted-array read port (combinational) |
| `busy`, `done`, `timed_out` | out | 1 | handshake; `done` is a one-cycle pulse |
| `status` | out | 6 | winner index (min/max/sort) or count (degree of match) |
| `time_value` | out | 16 | lock time in cycles, or in sweep steps |

`opcode`, `ord_inc`, `n`, `time_limit`, `sweep`, `n_used` and `store_index`
are sampled with `start`. The sample vectors must stay stable while `busy` is
high.

Parameters: `K` = 32, `SW` = 5, `TW` = 16, `USE_MC` = 0, `MC_MULTI_WRITE` = 0,
`LOCK_CYCLES` = 2, `CYCLES_PER_LEVEL` = 4, `MAX_SYNC_DIFF` = 31 and
`SWEEP_DWELL` = 4.

## Design choices beyond the source description

The block structure and its wiring follow the published read-out diagram.
This includes the two multiplexers, the counter addressing the sorted array
and the timer feeding its data. So does the rule that ties go to the lowest
oscillator index. The following points are this design's own choices:

- The counter, Value-Register and Output Status are 6 bits (clog2(K+1)), one
  more than log2 K, so that N = K and a match count of K fit.
- Sorted-array entries are 16 bits, the timer width. The array has a
  combinational read port.
- The WTA keeps a sticky winner mask.
- The comparator tests ≥, not =, and looks at the counter's next value.
  Execution Over is a sticky level.
- "Timer-Limit = 2^16" is written as 16'hFFFF.
- The timer has a `tick` enable so that it can count sweep steps.
- The controller's state machine, handshake, opcode encoding, time-out and
  sweep timing are all this design's own.
- The sweep version of degree of match walks through vector B in index order.
- Index storage is a run-time input. The multiple-write circuit is a
  parameter and writes a whole range in one cycle.

## Not included

- The analog front end: sensors, analog matching cells, and the DC-offset and
  amplitude tuning that maps a signal into the oscillators' input range.
  Samples enter as level codes.
- The host processor. Its work is the mapping of lock times to values, the
  chunking of long inputs and the VQ / classification loops. The workload
  testbenches play it.
- An XOR-network degree-of-match circuit for fast oscillators. It is only
  referred to, not designed.
- Storing every index of a simultaneous group. Only the group's lowest index
  is known to the read-out circuit.

## Simulation

Every testbench in `tb/` checks itself. It prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. To build and run one
with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl \
          rtl/coproc_pkg.sv tb/tb_coproc_top.sv --top-module tb_coproc_top \
          -Mdir obj -o sim && obj/sim
```

`-y rtl` lets Verilator find the modules by name. Every RTL file and
testbench builds without warnings at Verilator's default level. Under
`-Wall`, two kinds of warning remain. The package has constants that not every
file uses. The assertions also use the asynchronous reset.

| testbench | covers |
|---|---|
| `tb_coproc_top` | whole design at default parameters. Random N-th max/min with ties and padding, sorts in both orders (storing lock times and storing indices), degree of match, the sweep example, random sweeps, swept degree of match, and time-outs in both modes. Counts each mechanism and fails if one never happens |
| `tb_coproc_top_mc` | whole design with `USE_MC = 1`: N-th with duplicates, gaps in the sorted array and, in a second instance, multiple writes filling them, per-oscillator degree of match |
| `tb_workload_vq` | vector quantization: 50 vectors × 8 attributes into 3 clusters (DoM, then a median from the N-th maximum). Also nearest-centroid classification with 64 attributes in two passes of 32 |
| `tb_workload_dom` | degree-of-match accuracy: 40-element vectors in two chunks, Timer-Limit swept from 0 to 124 and then fixed at the value for threshold 8, on the WTA and MC builds, against a plain thresholded count. Also the exact positional count of oscillators that lock only on equal inputs |
| `tb_workload_shm` | peak detection: 50 strain samples in 0..300 scaled to 32 levels, Sort(2, decreasing) over two chunks, in time and sweep mode. Also N-th distinct max (N = 1, 2) read through the index output, in chunks of 30 new samples |
| `tb_readout` | read-out circuit in three builds side by side (WTA, MC, and MC with multiple writes), storing times or indices, against a reference of lock events |
| `tb_wta`, `tb_match_count`, `tb_logk_counter`, `tb_value_register`, `tb_count_comparator`, `tb_sync_timer`, `tb_sorted_array`, `tb_latch_tune`, `tb_global_controller`, `tb_coupled_osc_pair`, `tb_osc_array` | one block each |

Each of them runs in under a second of wall-clock time.
