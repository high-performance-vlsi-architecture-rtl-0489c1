# XSORT-N: a running sorter whose critical path does not grow with N

XSORT-N sorts a stream of samples as they arrive. One W-bit sample comes in
per clock cycle. After N samples, N registers hold all of them in descending
order, available in parallel as `r[0]` (largest) to `r[N-1]` (smallest). The
array is then cleared for the next round of N samples. This kind of
"sort the last N, decide, start over" block appears in order-statistics
detectors, for example in detecting a weak signal in impulsive noise.

The design is a variant of the earlier SORT-N architecture. SORT-N sorted in
ascending order and located the insert position with a leading-one detector
(a tree that grows by one level each time N doubles), plus a counter for the
case where the new sample exceeds everything stored. XSORT-N sorts in
**descending** order instead. This does two things:

* the insert position can be found with one XOR gate per register, and
* the "larger than everything" case needs no special handling.

The select path is then comparator → XOR → multiplexer, and its depth does
not depend on N. Only the fan-out of the input register grows with N.

Defaults: `W = 16`, `N = 1024`. The architecture was evaluated at
N = 32, 64, 128, 256, 512 and 1024 with W = 16; all of these are parameter
settings of the same RTL.

## How a sample is inserted

Each cycle, the sample held in the input register `REG_IN` is compared with
every array register at the same time:

    cmp[x] = (REG_IN > REG_x)          x = 0 .. N-1, unsigned

The array is sorted in descending order. So `cmp` is always a run of 0s
(registers holding values at least as large as the sample) followed by a run
of 1s (registers holding smaller values). The new sample belongs at the first
1. That is the only place where neighbouring comparator bits differ:

    xor[x] = cmp[x-1] ^ cmp[x]         x = 1 .. N-1

Each register's multiplexer then picks its next value from its own `cmp` and
`xor` bits:

| `xor[x]` | `cmp[x]` | operation | next `REG_x` |
|---|---|---|---|
| 0 | 0 | retain | `REG_x` |
| 0 | 1 | shift  | `REG_{x-1}` |
| 1 | 1 | load   | `REG_IN` |
| 1 | 0 | cannot occur; treated as retain | `REG_x` |

Registers left of the insert point keep their values. The insert register
takes the new sample. Registers to its right move one place right, and the
value in `REG_{N-1}` drops off the end (this never happens within a round,
because only N samples are accepted).

Example with N = 8. The array holds `8 6 5 3 2 0 0 0` and the sample is 4:

    cmp = 0 0 0 1 1 1 1 1
    xor =   0 0 1 0 0 0 0      (for x = 1..7)
    next  8 6 5 4 3 2 0 0

### Register 0

`REG_0` has no left neighbour and no XOR gate. Its multiplexer has two
inputs: retain when `cmp[0] = 0`, load `REG_IN` when `cmp[0] = 1`. When
`cmp[0]` is 1, the sample is larger than the largest stored value. Every
other `cmp` bit is then 1 as well, so the rest of the array shifts.

In the RTL, bit 0 of the decode output is tied to 1. With that, the general
rule above gives exactly this two-input behaviour. `xsort_mux` with
`FIRST = 1` builds the two-input version.

### Zero samples, empty slots and ties

All registers reset to 0, so an empty slot holds the smallest possible value.
Any non-zero sample therefore sorts in front of empty slots. A sample of 0
gives an all-zero `cmp` code, so every register retains. The sample does not
have to be stored: if a round has m zero samples, the last m registers hold 0
at the end anyway. The design relies on this in two places:

* samples are compared as **unsigned** numbers, and
* an idle cycle is implemented by loading 0 into `REG_IN`, so the datapath
  needs no valid gating.

A sample equal to stored values gives `cmp = 0` at those values (the test is
strictly greater). It is therefore placed after them.

## Round control and interface

This interface is this design's own. The architecture fixes only the
streaming of one sample per cycle, the clear between rounds, and a log2(N)-bit
counter that produces a ready signal.

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; every register is rising-edge triggered |
| `rst_n` | in | 1 | asynchronous active-low reset; everything goes to 0 |
| `clear` | in | 1 | synchronous: empties the array and starts a new round |
| `in_valid` | in | 1 | `in_data` carries a sample this cycle |
| `in_data` | in | W | sample, unsigned |
| `in_ready` | out | 1 | a sample offered in this cycle is accepted |
| `ready` | out | 1 | `r` holds the N samples of the round, sorted |
| `r` | out | N×W (packed `[N-1:0][W-1:0]`) | sorted array, `r[0]` largest |

Timing:

* A sample is accepted in a cycle where `in_valid` and `in_ready` are both
  high. It is in `REG_IN` after the next edge. It is in `r` one edge later.
* Idle cycles (`in_valid` low) may appear anywhere. `REG_IN` then loads 0,
  which changes nothing.
* A log2(N)-bit counter counts the accepted samples and wraps on the N-th.
  A `full` flag is set at that point, and `in_ready` goes low. Further
  samples are refused, not dropped into the array.
* `ready` is `full` delayed by one cycle, because the N-th sample is inserted
  one cycle after it is accepted. If N samples arrive back to back starting
  in cycle 0, `ready` is high from cycle N+1.
* `clear` empties the array and resets the counter and `ready` at the next
  edge. A sample offered in the same cycle as `clear` is accepted as the first
  sample of the new round. Back-to-back rounds therefore take N+1 cycles each:
  N samples plus the cycle in which `r` is read.
* `clear` before `ready` aborts the round, and the sample still in `REG_IN`
  is lost.

The result stays in `r`, with `ready` high, until `clear`.

## Module structure

    xsort_n                   top: wiring and two assertions
      xsort_ready_counter     log2(N)-bit sample counter, full, ready, accept
      xsort_in_reg            REG_IN (loads 0 when nothing is accepted)
      xsort_cmp     x N       CMP_x:  REG_IN > REG_x
      xsort_load_decode       xor[x] = cmp[x-1] ^ cmp[x], bit 0 tied to 1
      xsort_slot    x N       REG_x with its multiplexer
        xsort_mux             retain / shift / load select (Table above)
    xsort_pkg                 default sizes, select encoding (sel_e)

Assertions in `xsort_n` check two rules on every clock edge:

* the comparator code never steps from 1 back to 0, and
* at most one of `xor[1..N-1]` is high.

These two hold only if the array stays sorted.

At the defaults, yosys coarse synthesis of `xsort_n` gives about
14,400 word-level cells and 16,412 flip-flops. That is 1024 × 16 array bits
plus `REG_IN`, the 10-bit counter, `full` and `ready`.

## Timing

The register-to-register path that matters is
`REG_IN`/`REG_x` → `CMP_x` → `XOR_x` → `MUX_x` → `REG_x`. It consists of:

* a W-bit magnitude comparator,
* one XOR, and
* a 3-input multiplexer with its select decode.

None of these depend on N. The published comparison at W = 16 in a 45 nm
library reports a minimum clock period of 0.481 ns at N = 32, 0.525 ns at
N = 128 and 0.565 ns at N = 512 for this structure. For the
leading-one-detector version it reports 0.720, 0.990 and 1.210 ns.
Those numbers are quoted from that comparison; this RTL has not been taken
through timing analysis. The slow growth with N comes from the fan-out of
`REG_IN` to all N comparators and multiplexers. In a real implementation that
net needs buffering or replication; the RTL leaves this to synthesis.

## What follows the architecture and what is this design's choice

These follow the architecture:

* descending order
* comparator sense (`>`)
* the XOR decode
* the multiplexer table, including the two-input first multiplexer
* registers reset to 0 and zero samples not stored
* the input register
* the parallel outputs
* a log2(N)-bit counter for the ready signal
* W = 16 and the evaluated values of N

These are this design's choices:

* unsigned samples
* the impossible `xor = 1, cmp = 0` case maps to retain
* asynchronous active-low reset
* `clear` as a separate synchronous input
* the `in_valid`/`in_ready` handshake
* idle cycles made by loading 0 into `REG_IN`
* refusal of samples after N
* `ready` one cycle after the counter wraps
* the `sel_e` encoding
* the assertions
* N must be a power of two ≥ 2

The ascending-order SORT-N design with its leading-one-detector tree, index
generator and counter-based position is only a point of comparison. It is not
included.

## Testbenches

Each testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. Each has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_xsort_cmp` | corner values and 2000 random pairs against an integer difference |
| `tb_xsort_load_decode` | all N+1 thermometer codes at N = 1024, and random codes |
| `tb_xsort_mux` | both multiplexer forms, every select combination, random data |
| `tb_xsort_slot` | reset value, retain / shift / load and clear, against a cycle model |
| `tb_xsort_in_reg` | capture and zero-on-idle |
| `tb_xsort_ready_counter` | ready exactly N+1 cycles after the first of N samples; refusal after N; clear with a sample; random idle and clear |
| `tb_xsort_n` | N = 8, W = 4, 300 random rounds (described below) |
| `tb_xsort_n_sizes` | N = 32, 128 and 512 at W = 16, two rounds each: sort result and ready latency |
| `tb_xsort_n_full` | default parameters (N = 1024, W = 16): one random round and one round of small repeated values, sort result and ready latency |

`tb_xsort_n` is the main end-to-end test. After every cycle it compares the
whole array with the samples inserted so far, sorted by the language's own
`rsort()` and padded with zeros. It also counts how often each case occurs,
and fails if any of them never happens:

* insert at `REG_0`
* insert in the middle
* insert at `REG_{N-1}`
* zero sample
* tie
* refused sample
* idle cycle
* clear
* ready

Run one with Verilator, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/xsort_pkg.sv tb/tb_xsort_n.sv --top-module tb_xsort_n
    ./obj_dir/Vtb_xsort_n

The full-size testbench takes about 20 s to build and well under a second to
run. To change the sizes, override `W` and `N` on `xsort_n`. The defaults
live in `xsort_pkg` (`W_DEFAULT`, `N_DEFAULT`).
