# Built-in weighted test sequence generator for synchronous sequential circuits

This RTL generates, on chip, test sequences for the primary inputs of a
synchronous sequential circuit under test (CUT). The flip-flops of the CUT
are left alone: no scan, no hold mode, no partial reset. Only its inputs are
driven.

The idea extends weighted random patterns, as used for combinational logic,
to sequential circuits. Combinational weights are 0, 0.5 and 1. Here a
*weight* is a short binary subsequence `alpha`, and the input it is given
receives `alpha` repeated:

    input value at time unit u  =  alpha(u mod len(alpha))

For example, weight `100` gives `100100100...`. A *weight assignment* gives
every CUT input one such subsequence. The subsequences are cut from a
deterministic test sequence `T` for the CUT, chosen so that the repeated
pattern reproduces `T` exactly over the last few time units before a hard
fault is detected. The generator applies a short list of weight assignments
one after another, each for `L_G` clock cycles (2000 by default). No test
patterns are stored. With enough assignments the fault coverage of `T` is
reached.

## How a test session runs

```
 start ─┐
        ▼
 ┌────────────────┐  sel (s1, s2, ...)  ┌────────────┐
 │ assign_counter │────────────────────►│ weight_mux │──► cut_in[0]
 │  L_G cycles    │                     ├────────────┤
 │  per assignment│──fsm_restart──┐     │ weight_mux │──► cut_in[1]
 └────────────────┘               │     ├────────────┤
                                  ▼     │    ...     │
                        ┌──────────────────┐         │
                        │ weight_fsm len 1 │──► ...  │
                        │ weight_fsm len 2 │──► subsequence values
                        │ weight_fsm len 3 │     (one wire each)
                        └──────────────────┘
```

* `assign_counter` holds a cycle counter `0 .. L_G-1` and a binary
  assignment counter `sel`. `sel` advances every `L_G` cycles. Its bits are
  the multiplexer selects: `s1` is bit 0, `s2` is bit 1.
* There is one `weight_fsm` per distinct subsequence length. An FSM of length
  `L` cycles through `L` states and has one output per subsequence of that
  length. Output `k` in state `s` is `alpha_k(s)`.
* There is one `weight_mux` per CUT input. Its data inputs are the FSM
  outputs that the weight assignments give that input, in assignment order.

### Timing

1. While idle, `busy` is 0 and the FSMs are held in their first state.
2. A one-cycle `start` begins a session. From the next cycle, `busy` is 1 for
   exactly `N_ASSIGN * L_G` cycles.
3. In cycle `u` (0 ≤ u < L_G) of assignment `j`:
   * `sel = j`;
   * `cut_in[i] = alpha_{i,j}(u mod len)`;
   * `seq_first` is 1 when `u = 0`. It can be used to reset the CUT before
     each sequence.
4. After the last cycle, `done` rises and stays up until the next `start`.
   `start` is ignored while a session runs.

### Why the FSMs restart at every sequence

The subsequences are chosen assuming each sequence starts at `alpha(0)` in
its time unit 0. A free-running FSM would instead enter the next sequence at
phase `L_G mod L`. That is 2 for `L = 3` and `L_G = 2000`, so a length-3
weight would no longer line up with the time units it was chosen to
reproduce. `assign_counter` therefore raises `fsm_restart` in the last cycle
of each assignment, and every FSM is back in its first state in cycle 0.
This is a design choice; the method says only that an FSM produces its
subsequences from reset until it is reset again.

## The subsequence FSMs

`weight_fsm` follows the method's FSM construction:

* An FSM for length `L` has `ceil(log2 L)` state bits. Only `L` of the
  `2^ceil(log2 L)` codes are reachable.
* The state is binary coded: first state = 0, next = 1, and so on. It wraps
  from `L-1` back to 0.
* The outputs are a Moore decode of the state, so each output is a single
  function of the state bits. Unreachable codes are don't-cares. Shorter
  subsequences therefore give fewer state bits or more don't-cares, which is
  why the method prefers short subsequences.
* A length-1 FSM has no real state. It is built with one flip-flop that
  stays at 0, and synthesis removes it.

The default `weight_fsm` is the method's five-state example. Its three
outputs carry `00010`, `01011` and `11001`:

| state | next | z1 | z2 | z3 |
|-------|------|----|----|----|
| A (0) | B    | 0  | 0  | 1  |
| B (1) | C    | 0  | 1  | 1  |
| C (2) | D    | 0  | 0  | 0  |
| D (3) | E    | 1  | 1  | 0  |
| E (4) | A    | 0  | 1  | 1  |

Subsequences that repeat into the same sequence, such as `0` and `00`, or `01`
and `0101`, are merged into one FSM output, the shortest.

## Configuring the generator (`wtsg_top` parameters)

A generator for one CUT is fully described by a handful of tables. The
tables come from an offline procedure, outlined in the next section.

| parameter | meaning |
|-----------|---------|
| `N_IN` | number of CUT inputs |
| `N_ASSIGN` | number of weight assignments; `sel` has `max(1, clog2(N_ASSIGN))` bits |
| `L_G` | cycles per assignment (default 2000) |
| `N_SUB`, `MAX_LEN` | number of distinct subsequences, longest length |
| `SUB_LEN[k]` | length of subsequence `k` |
| `SUB_SEQ[k]` | bits of subsequence `k`, right-aligned in `MAX_LEN` bits and written as the subsequence is read: the most significant of its `SUB_LEN[k]` bits is applied first (`3'b100` is `100`, `3'b001` with length 2 is `01`) |
| `N_FSM`, `FSM_LEN[f]` | the distinct lengths; one FSM each |
| `SEL[j*N_IN + i]` | subsequence applied to input `i` by assignment `j` |

Elaboration stops with an error in these cases:

* a length that has no FSM;
* an FSM that has no subsequence;
* a `SEL` entry out of range.

The defaults are for ISCAS-89 `s27` (4 inputs), with the two weight
assignments that best match its deterministic test sequence:

| assignment | input 0 | input 1 | input 2 | input 3 |
|------------|---------|---------|---------|---------|
| 0 | `01` | `0` | `100` | `1` |
| 1 | `100` | `00` (built as `0`) | `01` | `100` |

This needs three FSMs (lengths 1, 2 and 3) with four outputs. The first 12
cycles of assignment 0 are:

```
u : 0 1 2 3 4 5 6 7 8 9 10 11
I0: 0 1 0 1 0 1 0 1 0 1 0  1
I1: 0 0 0 0 0 0 0 0 0 0 0  0
I2: 1 0 0 1 0 0 1 0 0 1 0  0
I3: 1 1 1 1 1 1 1 1 1 1 1  1
```

The complete assignment list needed for full coverage of `s27` is not
published, so these two are an example, not a complete generator.

## Where the tables come from (offline, not in this RTL)

Choosing the weights is a software task that needs a fault simulator. It
runs as follows:

1. Take the detection time `u` of every fault under `T`. Work from the
   latest detection time down.
2. For a time `u` and a length `L = 1, 2, ...`, find the `alpha` of length
   `L` whose repetition equals `T_i` over time units `u-L+1 .. u`. This gives
   `alpha(u' mod L) = T_i(u')`. Add it to the pool of subsequences.
3. For each input, rank the pooled subsequences that match up to `u` by how
   many time units of `T_i` their repetition matches. Assignment `j` takes
   the `j`-th ranked entry for every input. If no assignment would use only
   full-length entries, a full-length entry is moved to the front.
4. Simulate each assignment for `L_G` cycles and drop the faults it detects.
5. Finally, simulate the kept assignments in reverse order. Any assignment
   that adds no new detection is removed.

Published results for this method cover ISCAS-89 circuits. They range from
3 to 151 assignments and from 3 to 46 FSMs. For most circuits the longest
subsequence is much shorter than `T`. `s1196`, for instance, needs only
lengths up to 3.

## What is not here

* **The CUT.** The CUT inputs are the output port `cut_in`. Whether the CUT
  is reset between sequences is left to the integrator, with `seq_first` as
  the hook.
* **Observation points.** Extra observed CUT lines can cut down the number of
  assignments needed. They are lines inside the CUT, so they are outside
  this generator.
* **Pseudo-random (LFSR) weights.** The method deliberately excludes them.
* **Response compaction and pass/fail evaluation.** The method does not
  describe them.

## Design choices not fixed by the method

* A synchronous active-low reset everywhere.
* A `start`/`busy`/`done` handshake. After the last assignment the session
  stops; it does not wrap around.
* FSMs restart at the start of every sequence (see above).
* The FSM state encoding is binary.
* Multiplexer select code `j` picks assignment `j`. A code of `N` or more,
  possible only when `N` is not a power of two, picks input 0. The counter
  never produces such a code.

## Files

| file | content |
|------|---------|
| `rtl/wtsg_top.sv` | generator top: counter, FSM bank, multiplexers |
| `rtl/assign_counter.sv` | cycle and assignment counter, restart and handshake |
| `rtl/weight_fsm.sv` | one FSM producing `M` subsequences of length `LEN` |
| `rtl/weight_mux.sv` | N-to-1 selector for one CUT input |
| `tb/tb_weight_fsm.sv` | five-state example table and length-1/3 FSMs, random enable and restart |
| `tb/tb_weight_mux.sv` | 4-way and 3-way selects against the data bits |
| `tb/tb_assign_counter.sv` | cycle-exact `sel`, `seq_first`, `fsm_restart`, `busy`, `done`; ignored start; second session |
| `tb/tb_wtsg_top.sv` | default `s27` generator, end to end: both assignments for 2000 cycles each, the 12-cycle listing above, two sessions |
| `tb/tb_wtsg_s27_table4.sv` | `s27` generator built from all fourteen weights of length ≤ 3 (no merging) and the first three ranked assignments; checks every cycle, and that each generated input matches `s27`'s deterministic sequence at the expected number of time units (8 7 6 7 / 7 7 5 7 / 5 7 4 6) and exactly over the last `len` units up to time 9 |
| `tb/tb_wtsg_fig1.sv` | three inputs and four assignments (two select bits), lengths 1, 2, 3 and 5, `L_G = 22`; the contents are illustrative |
| `tb/tb_wtsg_s1196.sv` | the `s1196` counts: 14 inputs, 151 assignments of 2000 cycles, 3 FSMs with 10 outputs; the assignments are pseudo-random, since the real ones are not published |

Every testbench checks its outputs against values it computes independently.
It prints `TB_RESULT checks=N failures=F` and has a watchdog. The
generator-level benches also count each mechanism: an assignment change, an
FSM restart that changes an output, and the end of a session. They fail if
any of these never happened.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
          --top-module tb_wtsg_top tb/tb_wtsg_top.sv -o sim
./obj_dir/sim
```

Replace `tb_wtsg_top` with any testbench name above. All of them finish in
well under a second of simulation time. The largest is `tb_wtsg_s1196`, at
302,000 cycles. Lint a module on its own with
`verilator --lint-only -Wall -y rtl rtl/wtsg_top.sv`.
