# Folded bit-serial multiplier (FBSM)

An unsigned integer multiplier that trades time for area in a single,
freely chosen ratio. Operand `a` (`LA = K*N` bits) is applied in parallel,
operand `b` (any length `lb`) enters one bit per iteration, LSB first, and
the `LA+lb`-bit product leaves one bit at a time, LSB first. Only `K`
full adders do the arithmetic, each standing in for `N` of the `LA` full
adders of a classic serial-parallel multiplier. The cost is time: a
product bit comes out every `N` cycles instead of every cycle.

The same RTL covers the whole family. `N = 1` is the classic unfolded
multiplier. `K = 1` is a single full adder working through all of `a`.
The default, `K = 8`, `N = 16`, multiplies 128-bit operands with 8 full
adders.

## The starting point: a serial-parallel-serial multiplier

The unfolded multiplier has one processing element (PE) per bit of `a`,
numbered `LA-1` (left) down to `0` (right). PE `i` holds an AND gate and a
full adder. In cycle `l` it adds three bits:

* `a[i] & b[l]`, where `b[l]` is broadcast to all PEs;
* the sum bit that PE `i+1` produced in cycle `l-1`, so sums shift one
  place to the right per cycle (the leftmost PE gets `0`);
* its own carry of cycle `l-1`, fed back through one latch.

The sum that leaves PE `0` in cycle `l` is product bit `l`. After the last
bit of `b`, another `LA` cycles with `b = 0` push out the upper half of the
product. Every bit the PEs hold in cycle `l` has weight `2^(i+l)`, so the
sum passed right and the carry kept in place both arrive with the right
weight.

## Folding: who computes what, and when

The `LA` bit operations of one cycle are split into `K` groups of `N`
neighbours. PE `j` of the folded design performs operations
`jN, jN+1, ..., jN+N-1`, one per cycle. Each step of the unfolded design
(one bit of `b`) therefore becomes an *iteration* of `N` cycles. Cycle
`u = 0 .. N-1` of an iteration is called *time instance* `u`. In time
instance `u`, PE `j` uses bit `a[jN+u]` of operand `a`.

Every value must now wait in latches until the operation that consumes it
runs. The wait follows from the schedule: the consumer runs one iteration
(`N` cycles) later, shifted by the difference of the two time instances.

| value | produced by | consumed by | wait |
|---|---|---|---|
| sum, inside a PE | op `jN+u+1`, instance `u+1` | op `jN+u`, instance `u` | `N-1` cycles |
| sum, between PEs | op `(j+1)N` in PE `j+1`, instance `0` | op `jN+N-1` in PE `j`, instance `N-1` | `2N-1` cycles |
| carry | op `i` | op `i` again | `N` cycles |

This is the whole datapath of one slice:

```
        left sum ──┐                      ┌── own sum (after N-1 latches)
   a[jN+u], b ──> PE j ── sum ──> (N-1)D ──> ND ──> to PE j-1 (PE 0: p)
                   ^ └─ carry ──> ND ──┐
                   └───────────────────┘
```

* The sum buffer has `2N-1` latches, in two parts. A tap after the first
  `N-1` latches feeds the PE's own sum back to itself. The far end feeds
  the right neighbour.
* A switch in front of the adder selects the PE's own sum in time instances
  `0 .. N-2`, and the left neighbour's sum in time instance `N-1`. The
  leftmost PE receives `0` in place of a neighbour's sum.
* The carry goes round an `N`-latch buffer back into the same PE.
* The product leaves the far end of PE 0's sum buffer.

Each PE has `3N-1` latches in all. They are plain shift registers with no
addressing, so an FPGA can pack them into LUT shift registers.

### Example: K = 2, N = 2

Here `a` has 4 bits. PE 1 works on `a[2]`, `a[3]` and PE 0 on `a[0]`,
`a[1]`. Counting cycles from the first operation, in cycle 0 both PEs use `b[0]` with `a[2]` and `a[0]`. In
cycle 1 they use `b[0]` again, this time with `a[3]` and `a[1]`. In
cycle 2 (instance 0) PE 0 computes `a[0]b[1] + a[1]b[0]`. The `a[1]b[0]`
term is its own result of cycle 1, taken after one latch. In cycle 3
(instance 1) PE 0 computes `a[1]b[1] + a[2]b[0]`. The `a[2]b[0]` term is
PE 1's result of cycle 0, after three latches. Product bit 0, `a[0]b[0]`,
is at `p` in cycle 3, and the next bits follow in cycles 5, 7 and so on.

## Interface and timing

Ports of `fbsm` (`rtl/fbsm.sv`):

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous active-low reset (sequencer, operand register) |
| `start` | in | 1 | begin a product; accepted when `busy` is low or together with `done` |
| `a` | in | `K*N` | operand `a`, captured at `start` |
| `lb` | in | `LBW` | length of operand `b` in bits, captured at `start` |
| `b_in` | in | 1 | next bit of `b`, LSB first, read in cycles where `b_take` is high |
| `b_take` | out | 1 | `b_in` is consumed this cycle |
| `busy` | out | 1 | a product is in progress |
| `p` | out | 1 | product, LSB first |
| `p_valid` | out | 1 | `p` holds a product bit |
| `done` | out | 1 | `p` holds the last product bit |

Count cycles from the one in which `start` is high (cycle 0).

* `start` clears every latch and captures `a` and `lb`.
* Iteration `l` occupies cycles `1+N*l .. N*(l+1)`.
  * For `l < lb`, `b_take` is high in the first cycle of the iteration.
    `b_in` must hold `b[l]` in that cycle. The bit is then held internally
    for the other `N-1` cycles.
  * For `lb <= l <= LA`, `b` is forced to 0. These iterations push out the
    upper product bits.
* Product bit `m` appears on `p` with `p_valid` in cycle `2N + N*m`. That
  is `2N-1` cycles after the first operation, and then one bit every `N`
  cycles. `done` comes with bit `LA+lb-1`, in cycle `N*(LA+lb+1)`.
* A new `start` may be raised together with `done`, so products can run
  back to back without a gap.

A `LA x LA` product takes `N*(2*LA+1)+1` cycles, start cycle included. At
the default size (128 x 128 bits) that is 4113 cycles.

## Modules

| module | role |
|---|---|
| `fbsm_pkg` | counter width helper, sequencer state type |
| `fbsm_pe` | combinational PE: selects `a[jN+u]`, AND gate, sum-input switch, full adder |
| `fbsm_delay` | `DEPTH`-latch shift register with synchronous clear (`DEPTH = 0` is a wire) |
| `fbsm_ctrl` | sequencer: time-instance and iteration counters, `b` request and hold, flush, `p_valid`/`done` |
| `fbsm` | top: sequencer, operand register, `K` slices of one PE and three buffers |

Parameters of `fbsm`: `K` (PEs, default 8), `N` (folding factor, default
16) and `LBW` (width of `lb`, default 16, so `b` may be up to 65535 bits
long). Any `K >= 1` and `N >= 1` works. Non-powers of two are also fine:
the time-instance counter simply wraps at `N`.

Size at the defaults after generic synthesis: about 180 word-level cells
and 543 flip-flops. Of the flip-flops, 376 are datapath latches
(8 x 47), 128 are the operand register and the rest belong to the
sequencer.

## Implementation on an FPGA

The folded design was evaluated on a Spartan-II FPGA. Its LUTs can act as
16-bit shift registers, two per slice, so the `3N-1` latches of a PE fit
in about `ceil((3N-1)/32)` slices. The table below gives the clock periods
reported for that device (speed grade -5, PQ208 package). They come from that
implementation and were not measured on this RTL.

| operand bits | N | K | period [ns] | unfolded (N=1) period [ns] |
|---|---|---|---|---|
| 8 | 1 / 2 / 4 | 8 / 4 / 2 | 4.088 / 4.105 / 3.803 | 3.957 |
| 16 | 2 / 4 / 8 | 8 / 4 / 2 | 4.898 / 4.785 / 4.502 | 4.706 |
| 32 | 4 / 8 / 16 | 8 / 4 / 2 | 4.590 / 4.214 / 4.367 | 4.580 |
| 64 | 8 / 16 / 32 | 8 / 4 / 2 | 7.211 / 7.202 / 7.003 | 6.682 |
| 128 | 16 / 32 / 64 | 8 / 4 / 2 | 8.056 / 7.855 / 7.841 | 8.129 |

The clock period hardly changes with `N`, so folding by `N` cuts the full
adders by `N` and slows the product by about `N`. The RTL here is generic:
it uses no vendor primitives.

## Where this RTL departs from the published description

* **Carry buffer of `N` latches.** The published figures draw `N-1`
  latches in the carry loop and count `3N-2` latches per PE. With `N-1`
  latches the carry returns one cycle early, into the wrong operation, and
  products come out wrong. The delay formula used for the sum paths gives
  `N` for the carry loop. With `N = 1`, only `N` latches gives back the
  single carry latch of the unfolded multiplier. This RTL uses `N`, so it
  has `3N-1` latches per PE.
* **Switch timing.** The published text and figures say a PE takes its left
  neighbour's sum in time instance 0 and its own in instances 1..N-1. The
  published data-flow example and the delay derivation both say the
  reverse, and so does the arithmetic above. This RTL follows the
  arithmetic: own sum in `0..N-2`, neighbour's sum in `N-1`.
* **Control is this design's own.** The published description gives the
  datapath and its schedule, not a control interface. All of the following
  were added here: the sequencer, `start`/`busy`/`done`, the `b_take`
  request, the run-time length `lb`, the operand register for `a`, the
  clear at `start`, the back-to-back start and the synchronous reset.

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fbsm_pkg.sv \
          tb/tb_fbsm.sv --top-module tb_fbsm -Mdir obj_tb_fbsm
./obj_tb_fbsm/Vtb_fbsm
```

| testbench | what it checks |
|---|---|
| `tb_fbsm_delay` | a random stream is delayed by exactly 16, 5 and 1 cycles; clear empties the buffer |
| `tb_fbsm_pe` | every input combination for `N` = 1, 4 and 16 against `a&b + sum + carry`, with the switch per time instance |
| `tb_fbsm_ctrl` | cycle-by-cycle schedule for `N = 3`, `LA = 6` and `lb` = 0, 1, 5, 9: time instance, `b_take`, broadcast `b`, `p_valid`, `done`, busy length |
| `tb_fbsm` | `K = 2`, `N = 2`: directed and 60 random products with `lb` from 0 to 12, plus latency and bit spacing; it counts each datapath mechanism (own-sum recycling, neighbour sum, leftmost `0`, recycled carry, `b` request, flush, back-to-back start) and fails any that never happens |
| `tb_fbsm_full` | default parameters (128-bit `a`): products with `lb` = 1, 128 and 200, and exactly 4113 cycles per 128 x 128 product |
| `tb_fbsm_workloads` | all 15 folded configurations from 8 to 128 bits, `N` from 1 to 64, against a wide reference product, with the cycle count `N*(2LA+1)+1` per product |

`tb/fbsm_runner.sv` is the shared driver and checker used by the last two
testbenches. All testbenches together run in well under a second.
