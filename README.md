# Multi-input counters: parallel incrementers, pipelined and modulo-p accumulative counters

A multi-input counter (also called an accumulative parallel counter) keeps a
q-bit count and, on every clock cycle, adds to it the number of 1s among n
single-bit inputs. It is the sequential counter generalised to n count inputs,
or the combinational parallel counter given a memory. Typical uses are
counting events that arrive demultiplexed over many slow lines (a 400 MHz
stream split 32 ways is 32 lines at 12.5 MHz), or counting responders in an
associative array.

The obvious build is a population-count circuit followed by a q-bit adder
and a register. The designs here do better in two ways:

* **Merge the count into the adder.** The count of n-1 inputs and the stored
  word are added by one ripple-carry adder that ends the counter tree, and the
  n-th input enters as that adder's carry-in. Only the low ceil(log2 n) bits
  go through it. Everything above those bits is a plain sequential counter,
  incremented by the adder's carry. So the cycle time depends on n, not on q.
* **Pipeline at the bit level.** Every full adder output is registered, and
  each ripple-carry adder works on operands skewed by one cycle per bit. The
  clock period is then one full adder plus a flip-flop. For 2^l inputs the
  count can be read 2l cycles after the inputs arrive, whatever q is.

A modulo-p version keeps the count modulo any constant p. It keeps the
pipelined mod-2^q counter and adds two slowly updated offsets. Two pipelined
adders compute both candidate results. Overflow flags alone pick the right
one, so no comparator or divider sits in the fast path.

The RTL follows the designs of Yeh and Parhami, "Efficient Designs for
Multi-Input Counters". The section [Departures and own
choices](#departures-and-own-choices) lists what was decided here.

## The three counters in `mic_top`

`mic_top` puts three independent designs side by side. Each has its own
ports. They share only `clk` and the asynchronous active-low `rst_n`.

| ports   | design | default size | latency |
|---------|--------|--------------|---------|
| `mic_*` | (n, q) multi-input counter: parallel incrementer, register, fast counter (`mic`) | n = 32, q = 16 | 1 cycle |
| `inc_*` | (n, m; p) modulo-p parallel incrementer, combinational (`mod_parallel_incrementer`) | n = 32, m = 7, p = 100 | combinational |
| `pm_*`  | pipelined (n, q; p) modular counter (`pipe_mod_mic`), containing the pipelined (n, q) counter (`pipe_mic`) | n = 16, q = 16, p = 1000 | 11 cycles (`pm_count`), 8 cycles (`pm_raw_count`) |

Module hierarchy:

```
mic_top
├── mic                       (n,q) counter
│   ├── parallel_incrementer  (n, log n) incrementer
│   │   ├── cpc → cpc_tree    (n-1)-input counter tree, recursive
│   │   └── full_adder / half_adder
│   └── fast_counter          upper count bits
├── mod_parallel_incrementer  (n,m;p) incrementer: cpc, two rca, mux
└── pipe_mod_mic              pipelined (n,q;p) counter
    ├── pipe_mic              pipelined (n,q) counter
    │   ├── pipe_cpc          pipelined tree, recursive, built from pipe_rca and delay_line
    │   └── fast_counter
    ├── accum_adder ×2        offsets A (left) and B (right)
    ├── pipe_fast_adder ×2    C + A and C + B
    └── mod_select            control logic and output multiplexer
```

`mic_pkg` holds `cpc_width(n)`, the number of bits of a count of 0..n.

## The counter tree

`cpc` counts the 1s among N inputs. It is built by one rule. Take two
counters of l inputs each, which give k-bit counts. Add their counts with a
k-bit ripple-carry adder and feed one more input into the carry-in. The
result is a counter of 2l + 1 inputs with k + 1 output bits.

Starting from single wires, the rule gives counters of 1, 3, 7, 15, 31, ...
inputs. A 31-input tree has 8 one-bit, 4 two-bit, 2 three-bit and 1
four-bit adders: 26 full adders in all, which is about one per input. `cpc`
pads N up to the next 2^w - 1 and ties the spare inputs to 0. `cpc_tree`
writes the rule as a recursive module.

## Parallel incrementer and the split counter

`parallel_incrementer` (N, M) computes z = (y + ones(x)) mod 2^M and a
carry-out `ovf`. It counts x[N-1:1] with a `cpc`. An M-bit adder then adds
that count to y, with x[0] as the carry-in. The low cpc_width(N-1) cells are
full adders. Above them only y and the carry remain, so those cells are half
adders. The default (32, 7) is the example size of the original design.

With `END_AROUND = 1` the incrementer works modulo 2^M - 1 instead. The
adder's carry-out is added back at bit 0 (an end-around carry). Here a
second chain of half adders does that, so there is no combinational loop.
This chain cannot carry again. The result is congruent to y + ones(x) modulo
2^M - 1. The all-ones word is a second code for zero, as in ones'-complement
arithmetic.

`mic` is the (N, Q) counter built on it. Its incrementer is only
cpc_width(N-1) bits wide (5 bits for N = 32), and its y input is a 5-bit
register. The incrementer's carry is at most 1 per cycle. It drives the
increment of `fast_counter`, a (Q-5)-bit counter holding the upper bits. The
count of a set of inputs is visible in the cycle after they are presented.
`wrap` marks a pass of the Q-bit count through zero.

## Modulo-p parallel incrementer

`mod_parallel_incrementer` (N, M; P) computes z = (y + ones(x)) mod P. It
requires y < P, 2^(M-1) < P <= 2^M and N <= P. The sum S = y + ones(x) is
then below 2P, so one subtraction is enough. Four parts do the work:

* a `cpc` counts x[N-1:1];
* the first adder forms S, with x[0] as its carry-in;
* the second adder adds 2^M - P;
* a multiplexer picks the second result when S >= P.

S can exceed 2^M - 1 (for example 99 + 32 with M = 7). The select signal is
therefore the sign of the (M+1)-bit difference S - P. In terms of the two
adders, it is the OR of their carries: at most one of the two can carry.
`wrap` is that select signal.

## Pipelined (n, q) counter: wavefronts and skew

This is the part that takes the most care to read. Give every flip-flop a
label: the number of clock edges between a set of inputs arriving and that
flip-flop first holding a value derived from it. All flip-flops with the
same label form one computational wavefront.

**Ripple-carry adders with skewed operands (`pipe_rca`).** Bit j of each
operand arrives j cycles after bit 0. Cell j's sum and carry are both
registered, so the carry into cell j+1 arrives in the same cycle as operand
bit j+1. The sum comes out with the same skew, one cycle later. The carry out
of the top cell goes through a second flip-flop. It then leaves as the next
higher bit, keeping the one-cycle-per-bit skew.

**The tree (`pipe_cpc`).** This is the counter tree with one flip-flop on
each full-adder output. Level k works on wavefront k-1. The spare input used
as carry-in at level k passes through k-1 flip-flops first. For 16 inputs
the tree counts x[15:1] in 3 levels. Bit j of its 4-bit count is on
wavefront 3 + j.

**The accumulating last level (`pipe_mic`).** Cell j of the last level adds
three things: count bit j, its own stored sum bit (the flip-flop output fed
back) and the registered carry of cell j-1. x[0], delayed to wavefront
L-1, is the carry-in of cell 0. Every input of cell j comes exactly j cycles
late. Each sum flip-flop therefore adds the right carry to the right set,
even though carries from different sets are in flight at once. Sum bit j is
on wavefront L + j. The carry out of the top cell is on wavefront 2L-1 and
increments the `fast_counter`. That counter has latency d = 1, so it is on
wavefront 2L. Delay chains of L - j flip-flops move sum bit j to wavefront
2L. On the top bit this makes d + 1 flip-flops counting the sum flip-flop.

For N = 2^L the count therefore appears 2L + d - 1 = 2L cycles after the
inputs: 8 cycles for 16 inputs. The counter takes a new set every cycle. The
critical path is one full adder, except inside the fast counter, which is a
plain binary counter here.

## Pipelined modulo-p counter (`pipe_mod_mic`)

Let T be the true number of 1s counted since reset. The inner `pipe_mic`
delivers C = T mod 2^q. Its dropped bit q is reported as `raw_wrap`
(Ovf_C).

**Two offsets.** Two `accum_adder`s hold offsets A (left, reset to 0) and B
(right, reset to -p). Each can step by -2p. Both are kept mod 2^q. Two
`pipe_fast_adder`s form R_left = C + A and R_right = C + B, also mod 2^q.
Because every quantity is mod 2^q, the 2^q multiples lost from C cancel. So
R = T - kp exactly whenever 0 <= T - kp < 2^q.

**Alternation.** One path is current and holds T - kp, in [0, p). The other
path holds T - (k+1)p, which is negative. Mod 2^q, that value sits just
below 2^q. When T reaches (k+1)p, the other path's result wraps modulo 2^q
to a small value. From then on it is the correct count. The multiplexer
switches to that path. The path just left is stepped by -2p, so it now
holds T - (k+2)p and waits for the next multiple. The selection thus flips
between left and right. Each offset changes only about once every p/n cycles,
so the accumulative adders need not be fast.

**Detecting the wrap from overflow flags (`mod_select`).** Let c(t) be the
waiting path's adder carry in cycle t and w(t) the aligned Ovf_C. While that
path's offset is constant, its result wraps exactly when

    w(t) xor c(t) xor c(t-1) = 1

This holds because R changes by +Δ - 2^q·(w + c(t) - c(t-1)), where Δ is the
small step of T, and only the combinations 0 and 1 are possible. After each
switch, the stepped path is ignored for SETTLE = FA_STAGES + 3 cycles. That
is the time for the -2p step to pass the accumulative adder and the fast
adder pipeline. `add_left` and `add_right` are the one-cycle step strobes.

**Limits.** Two conditions keep the scheme correct:

* p + n <= 2^q, so that "just below 2^q" and "small" cannot overlap;
* p > n·(SETTLE+1), so that T cannot advance by p while a path settles.

At the defaults (n = 16, q = 16, FA_STAGES = 2) this means 96 < p <= 65520.
Both are checked at elaboration.

**Latency.** 2 log2(n) cycles through the inner counter, FA_STAGES through
the fast adders and 1 for the registered multiplexer: 11 cycles at the
defaults. `count` is T mod p, `raw_count` is T mod 2^q (8 cycles), and
`path` is 1 while the right path is selected.

## Parameters

| module | parameter | default | notes |
|--------|-----------|---------|-------|
| `cpc` | `N` | 31 | any N >= 1 |
| `parallel_incrementer` | `N`, `M`, `END_AROUND` | 32, 7, 0 | M >= cpc_width(N-1); END_AROUND = 1: modulo 2^M - 1 |
| `mic` | `N`, `Q` | 32, 16 | Q > cpc_width(N-1) |
| `mod_parallel_incrementer` | `N`, `M`, `P` | 32, 7, 100 | 2^(M-1) < P <= 2^M, N <= P |
| `pipe_cpc` | `K` | 4 | 2^K - 1 inputs |
| `pipe_mic` | `N`, `Q` | 16, 16 | N a power of two, >= 4; Q > log2 N |
| `pipe_mod_mic` | `N`, `Q`, `P`, `FA_STAGES` | 16, 16, 1000, 2 | see limits above |
| `pipe_fast_adder` | `Q`, `STAGES` | 16, 2 | STAGES divides Q |
| `accum_adder` | `Q`, `P`, `INIT_MULT` | 16, 1000, 0 | value after reset = -INIT_MULT·P |
| `mod_select` | `Q`, `SETTLE` | 16, 5 | |
| `fast_counter` | `W` | 11 | |

## Departures and own choices

The original design fixes these sizes: 32 inputs for the parallel
incrementer, 7 output bits for the (32, 7) example, and 16 inputs with d = 1
for the pipelined counter. It also fixes the latch placement and the 8-cycle
readout. Everything below was decided here.

* Count width q = 16 everywhere. The moduli p = 100 (combinational
  incrementer) and p = 1000 (pipelined). n = 32 for the non-pipelined
  counter and the modulo-p incrementer.
* Reset: asynchronous, active low, and it clears every flip-flop. The
  accumulative adders reset to 0 and -p.
* `fast_counter` is a plain registered binary counter with d = 1. The
  original leaves the fast counter's construction open. For large q a
  faster counter (for example one that increments in small blocks) can
  replace it, provided it keeps d = 1.
* `pipe_fast_adder` is a chunked ripple adder with a carry register between
  chunks and 2 stages. The original asks only for a pipelined fast adder
  with an overflow output.
* The control logic of the modular counter is this design's own: the wrap
  equation, the settle counter and the registered multiplexer. The original
  names the three overflow signals as its inputs but gives no table.
* The select signal of the modulo-p incrementer is the OR of both adders'
  carries. This covers sums above 2^m - 1.
* Which input drives which leaf of a counter tree is arbitrary here.
* Not built: the cheaper pipeline that drops every other layer of latches;
  carry-select or carry-skip speedups for wide incrementers; full-adder cells
  with the multiplexer merged into their sum logic; parallel decrementers;
  pipelined counters for n not a power of two. The original mentions all of
  these only as options.

## Simulating

Every `tb/tb_<module>.sv` is a self-checking testbench. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. Results are
compared against population counts and running totals computed in the
testbench. Pipeline latencies are checked cycle-exactly: 8 for `pipe_mic`,
11 for `pipe_mod_mic`, and the skew of `pipe_cpc`. `tb_mic_top` runs all
three counters at their default sizes for 14000 cycles. It requires every
mechanism to occur at least once:

* fast-counter increments;
* wraps of the 16-bit counts;
* modular reductions;
* path switches in both directions, each of which steps an accumulative
  adder.

To build and run one, for example the top-level test:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/mic_pkg.sv tb/tb_mic_top.sv --top-module tb_mic_top -o sim
./obj_dir/sim
```

Replace `tb_mic_top` with any other testbench name. `verilator --lint-only
-Wall` reports only two kinds of warning. The first is unused clock and
reset pins on the leaf levels of the recursive pipelined tree, where a level
has no flip-flops. The second appears when `cpc_tree` or `pipe_cpc` is linted
as a top of its own: Verilator then reports `lo`/`hi` as undriven. That is an
artifact of self-instantiation; it does not appear under their parents. All of the testbenches pass at the sizes
they use. The modular testbenches use q = 8 and p = 100 so that wraps and
path switches happen often; `tb_mic_top` uses the defaults.
