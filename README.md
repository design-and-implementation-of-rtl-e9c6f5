# Systolic DLMS adaptive FIR filter

An adaptive FIR filter changes its own coefficients while it runs. Each sample
it compares its output with a desired signal and nudges each weight in the
direction that reduces the error. With the plain LMS rule the new weights must
be ready one sample after the error was formed. That feedback loop runs through
the whole multiply/add chain, so it cannot be pipelined, and the clock period
grows with the filter length.

The **delayed LMS (DLMS)** rule lets the weights be updated from an error that
is `D` samples old:

```
y(n)     = sum_k w_k(n) * x(n-k)                 k = 0 .. N-1
e(n)     = d(n) - y(n)
w_k(n+1) = w_k(n) + mu * e(n-D) * x(n-D-k)
```

Because the update may lag, registers can be put anywhere in the output path,
as long as `D` counts them. This RTL builds such a filter as a **systolic
array**. It is a row of identical tap processing elements (PEs). Data moves
between neighbouring PEs through registers only, the filter products are summed
in a pipelined adder tree, and one register sits in the error feedback path. It
accepts one input sample and one desired sample every clock.

The same multiply-accumulate cell also drives a second, independent design: a
two-dimensional systolic **matrix multiplier** (see below). The top module,
`systolic_dsp_top`, holds the filter (ports `fir_*`) and the matrix multiplier
(ports `mm_*`) side by side. They share only the clock and the reset.

## Architecture

```
 x(n) ──────┬──►[PE 0]──reg──►[PE 1]──reg──►[PE 2]──reg──►[PE 3]──► x_casc
 x(n) ─z^-D─┴──►[    ]──reg──►[    ]──reg──►[    ]──reg──►[    ]──► xd_casc
 mu·e(n-D) ────►[    ]───────►[    ]───────►[    ]───────►[    ]──► mue_casc
                 │ w0·x(n)     │ w1·x(n-1)    │ w2·x(n-2)    │ w3·x(n-3)
                 └──(+)──reg───┘              └──(+)──reg────┘
                         └────────────(+)──reg───────┘
                                        │ y(n-2)
 d(n) ──z^-2──► d(n-2) ──(+)◄─(−)───────┤
                          │ e(n-2)       └──► y_out
                          └─► err_out, then ×mu, reg ──► mu·e(n-3) to PE 0
```

The diagram shows the default four taps. For `N` taps the tree has
`L = log2(N)` levels, and the output is `y(n-L)`. That is the default
(`P = log2(N)`) of the tree-PE form described under "Tree PEs and the
parameter P" below.

**Tap PE (`dlms_tap`).** Each tap holds one weight and sees three streams:

| stream        | value at tap k | between taps                      |
|---------------|----------------|-----------------------------------|
| filter input  | `x(n-k)`       | one register                      |
| update input  | `x(n-D-k)`     | one register                      |
| scaled error  | `mu·e(n-D)`    | no register (broadcast to all taps) |

The tap has two multipliers.

- The filter multiplier forms `w_k·x(n-k)` at full precision for the adder tree.
- The update multiplier, with an adder and the weight register, forms
  `w_k += mu·e(n-D)·x(n-D-k)`. This part is a generic systolic
  multiply-accumulate cell, `mac_pe`: a multiplier, an accumulator with
  feedback, and operand streams that leave toward the neighbouring PE.

`mac_pe` can register its second operand stream or pass it straight through
(`REG_B`). The tap uses the pass-through form for the broadcast error.

**Adder tree (`adder_tree`).** The tree adds the products in pairs, with a
register after every level. It is numbered like a heap: node 1 is the root,
and node `i` adds nodes `2i` and `2i+1`. The sum keeps full precision
(`16 + L` bits), so it cannot overflow. `N` must be a power of two, at least 2.

**Feedback (`error_unit`).** The desired sample is delayed by `L` so that it
lines up with the tree output. The error unit subtracts the filter output from
it, multiplies by `mu` (an arithmetic right shift by `MU_SHIFT`) and registers
the result. That register is the only one in the loop outside the tree.

**Delay lines (`delay_line`).** These are zero-initialised shift registers.
They form `x(n-D)` and the aligned `d(n-L)`.

**Tree PE (`tree_pe`).** A tree PE of order `P` holds `2^P` taps and an
adder tree of `P` levels whose root is not registered. It adds the tree sum to
the partial sum from the previous PE and registers the result. The filter
chains `N/2^P` of these PEs.

**Fill counter (`state`).** This counter counts clocks since reset and stops at
`N`. It shows how far the first sample after reset has moved along the tap line.

## The adaptation delay

`D` equals the number of registers between a sample entering the filter and its
error reaching the weights. It is the output latency `L` plus the feedback
register. For the default tree (`P = log2(N)`):

```
D = L + 1 = log2(N) + 1     (L tree levels + the feedback register)
```

| taps N | tree levels L | output   | adaptation delay D |
|-------:|--------------:|----------|-------------------:|
| 2      | 1             | y(n-1)   | 2                  |
| 4      | 2             | y(n-2)   | 3                  |
| 8      | 3             | y(n-3)   | 4                  |
| 16     | 4             | y(n-4)   | 5                  |
| 32     | 5             | y(n-5)   | 6                  |

The input `x(n)` feeds tap 0 with no register in front. The path from the input
port through one multiplier and one adder into the first tree register is
therefore combinational. Every other path is one multiplier and one adder, or
one adder, between registers. The longest of these (the weight update:
multiply, add, weight register) does not depend on `N`. That is the point of
the structure.

### Tree PEs and the parameter P

The filter can also be built as a chain of smaller trees. Parameter `P`
(0 ≤ P ≤ log2 N) sets the order of each tree PE:

```
 x, x(n-D), mu·e ──►[PE 0]──reg──►[PE 1]──reg──► ... ──►[PE M-1]──► casc
                      │tree         │tree                 │tree
 0 ────────────────(+)reg────────(+)reg─── ... ─────────(+)reg──► y
```

- `M = N/2^P` PEs, each holding `2^P` taps.
- One register sits between PEs on each of the three streams. The taps of PE
  `j` therefore work `j` clocks behind PE 0, and their weights lag by `j`
  clocks.
- Output latency `L = max(P-1, 0) + M`, and `D = L + 1`.

| N | P | PEs | L | D |
|--:|--:|----:|--:|--:|
| 4 | 2 (default) | 1 | 2 | 3 |
| 4 | 0 | 4 | 4 | 5 |
| 8 | 3 (default) | 1 | 3 | 4 |
| 8 | 2 | 2 | 3 | 4 |
| 8 | 1 | 4 | 4 | 5 |
| 8 | 0 | 8 | 8 | 9 |

`P = 0` is the fully pipelined chain: one tap per PE, and a delay that grows
with `N`. `P = log2(N)` is the single tree above. Intermediate values trade
adaptation delay against the length of the tree inside one PE. In every case
the array computes the DLMS equation exactly with the `D` given. A larger `P`
means a shorter delay and faster convergence. In an 8-tap system-identification
test with the same data, the summed error over the first 600 samples is
between 3 % and 25 % lower with `P = 3` than with `P = 0`, depending on the random data.

The delayed update converges a little more slowly than true LMS, and it needs a
somewhat smaller step size. In exchange, the clock does not slow down as taps
are added.

## Arithmetic

All words are signed two's complement integers:

| signal               | width | parameter |
|----------------------|------:|-----------|
| input x(n)           | 8     | `X_W`     |
| desired d(n)         | 8     | `D_W`     |
| weights w_k          | 8     | `W_W`     |
| output y, error e    | 16    | `Y_W`, `E_W` |
| step size mu         | 2^-1  | `MU_SHIFT = 1` |

Products and the tree sum are exact.

- The filter output is the tree sum shifted right by `P_SHIFT` (default 0),
  keeping the low `Y_W` bits.
- The error keeps the low `E_W` bits.
- `mu·e` is `e >>> MU_SHIFT`, which rounds toward minus infinity.
- A weight update keeps the low `W_W` bits, so weights **wrap around**. They do
  not saturate.

With the default sizes and the stimulus `x = 8`, `d = 18`, the error is 18 until
the first output arrives. So the first update of `w0` is `0.5·18·8 = 72`
(`01001000`). It lands `D = 3` clocks after the first sample. Each later tap
starts one clock after its neighbour and then follows the same sequence one
clock behind it.

With 8-bit integer weights and `mu = 0.5`, the loop cannot settle on such a
signal: the updates are far larger than the weight range, and the weights keep
wrapping. This default configuration shows how the datapath behaves, not a
useful filter. For real adaptation, widen the weights and shrink the step size.
For example, `W_W = 16`, `D_W = 16` and `MU_SHIFT = 5` with ±1 input samples
identify an 8-tap system to within a few LSB in about 1000 samples
(`tb_dlms_identify`). If the weights need fractional bits, `P_SHIFT` sets their
binary point in the output.

## Systolic matrix multiplier (`systolic_matmul`)

This array computes `C = A·B` for an `M×K` matrix `A` and a `K×P` matrix `B`.
The default size is 3×3×3. It has one `mac_pe` per element of `C`, laid out as
a grid.

Data moves through the grid like this:

- Row `i` of `A` enters at the left edge, one element per clock. Each PE passes
  it right through a register.
- Column `j` of `B` enters at the top, one element per clock. Each PE passes it
  down through a register.
- Row `i` starts `i` clocks late and column `j` starts `j` clocks late.

As a result, `a(i,s)` and `b(s,j)` meet in PE `(i,j)` at clock `s+i+j`. Each PE
accumulates its own element of `C`, and nothing moves between PEs except the
operands.

```
            b(.,0)   b(.,1)   b(.,2)        (column j delayed by j)
              │        │        │
 a(0,.) ───►[PE00]──►[PE01]──►[PE02]──►
              │        │        │
 a(1,.) ─z─►[PE10]──►[PE11]──►[PE12]──►     (row i delayed by i)
              │        │        │
 a(2,.)─z²─►[PE20]──►[PE21]──►[PE22]──►
```

The control is a start/busy/done handshake:

1. On the clock where `start` is high, the array captures `a_mat` and `b_mat`
   and clears every accumulator. `start` is ignored while `busy` is high.
2. The skewed feed then runs for `M+K+P-2` clocks, with `busy` high.
3. `done` pulses once, `M+K+P-1` clocks after the start clock. At that point
   `c_mat` holds the exact product, with `A_W+B_W+clog2(K)` bits per element.
4. `c_mat` holds that value until the next start.

Positions outside a row or column are fed zero, so they add nothing. The grid
therefore drains to all-zero registers between operations, and back-to-back
operations need no gap.

## Interface of `dlms_systolic_fir`

| port        | dir | width      | meaning |
|-------------|-----|------------|---------|
| `clk`       | in  | 1          | one sample per rising edge |
| `rst_n`     | in  | 1          | asynchronous, active low; clears weights, delay lines, tree, feedback register and `state` |
| `x_in`      | in  | `X_W`      | x(n) |
| `d_in`      | in  | `D_W`      | d(n) |
| `y_out`     | out | `Y_W`      | y(n-L) |
| `err_out`   | out | `E_W`      | e(n-L) = d(n-L) - y(n-L) |
| `weights`   | out | `W_W` × N  | w_k(n) |
| `state`     | out | clog2(N+1) | clocks since reset, saturating at N |
| `x_casc`, `xd_casc`, `mue_casc` | out | | the three streams leaving the last tap, for chaining arrays |

There is no valid/ready handshake: every clock is a sample.

Parameters:

- `N` (default 4): number of taps.
- Word widths: `X_W`, `D_W`, `W_W`, `Y_W`, `E_W`.
- `MU_SHIFT`: step size, `mu = 2^-MU_SHIFT`.
- `P_SHIFT`: output scaling.
- `P` (default `log2(N)`): tree-PE order, see above.
- `S_W`: derived. Leave it at its default.

The shared defaults live in `dlms_pkg`.

## Where this follows the source design and where it does not

These parts follow the source design:

- the tap structure: two multipliers per tap, with registers between taps on
  both input lines and a broadcast error;
- the pipelined adder tree with output `y(n-2)` at four taps;
- the generalised form: a chain of tree PEs of order `p`, where `p = 0` is
  the fully pipelined chain;
- one register in the feedback path;
- the 8/16-bit word sizes and `mu = 0.5`;
- zero initial weights;
- the lengths 2, 4, 8, 16 and 32;
- the existence of a counter called `state` in its simulations;
- for the matrix multiplier: one MAC PE per element of `C`, operands passed to
  the neighbouring PEs, the one-clock stagger of successive rows and columns,
  and the three-element operand sequences of the 3×3×3 default.

These are choices of this implementation:

- signed integer arithmetic with wrap-around;
- `mu` as a shift;
- asynchronous active-low reset;
- the meaning given to `state`;
- full-precision products and tree;
- `P_SHIFT`;
- the cascade outputs;
- a default of four taps;
- for the matrix multiplier: the parallel operand load, the start/busy/done
  handshake and the element widths.

Known differences and gaps:

- **Later weight values.** In the published simulations, the weights after the
  first update (72) do not follow the DLMS equation with these word sizes. For
  example, `w0` moves 72 → 112 there but 72 → 144 here, and the published
  numbers could not be reproduced from the stated sizes. This RTL follows the
  equations.
- **Tree-PE chain.** The source shows the chained tree PEs without giving the
  delays on the lines between PEs, and labels the PEs as if their orders
  could differ. Here all PEs of one filter have the same order. One register
  per PE boundary on each stream, and an unregistered tree root, are choices
  of this implementation.
- **Multipliers.** Every multiplier here is a plain single-cycle
  multiplier. The source also mentions comparing convergence with a
  "systolic multiplier", but does not describe that multiplier, so it is not
  built.
- **Register count.** At four taps the default build has 170 flip-flop bits.
  The source reports 49 registers for its 4-tap FPGA build. Its counting rules
  are unknown, so the figures are not comparable.

## Simulation

Every testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it exercises |
|-----------|-------------------|
| `tb_mac_pe` | multiply-accumulate, wrap, registered and broadcast exits |
| `tb_dlms_tap` | weight update, product, inter-tap delays; first update = 72 |
| `tb_adder_tree` | 4- and 8-input trees, exact latency 2 and 3, extreme values |
| `tb_error_unit` | `d - y`, `mu·e` one clock later |
| `tb_dlms_systolic_fir` | default filter against the reference model every clock: published stimulus, random data, reset in mid-run; counts weight updates, weight wraps, fill counter reaching N, feedback, resets |
| `tb_dlms_workloads` | 2, 4, 8, 16 and 32 taps side by side against the model; first update lands exactly `log2(N)+1` clocks after the first sample |
| `tb_tree_pe` | tree PEs of order 0, 1 and 2: weights, passed-on streams, accumulation chain |
| `tb_dlms_cascade` | 8 taps with `P` = 0, 1, 2, 3 and 4 taps with `P` = 0, against the model |
| `tb_dlms_identify` | 8-tap system identification: weights converge to the unknown system; the default tree (`D` = 4) converges faster than the `P = 0` chain (`D` = 9) on the same data |
| `tb_systolic_matmul` | 3×3×3 and 2×4×3 products against a reference; done exactly `M+K+P-1` clocks after start; start while busy ignored; extreme values |
| `tb_systolic_dsp_top` | both designs at their default sizes running at once: the filter against the model, back-to-back matrix products, reset in mid-run |

The reference model (`tb/dlms_model_pkg.sv`) is written straight from the DLMS
equations and a history of samples. It is not a copy of the RTL's structure.

To run one testbench, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    --top-module tb_dlms_systolic_fir \
    rtl/dlms_pkg.sv tb/dlms_model_pkg.sv tb/tb_dlms_systolic_fir.sv
./obj_dir/Vtb_dlms_systolic_fir
```

`-y` lets verilator find each module in the file of the same name. The
packages are listed first because they are imported. `-Wno-fatal` keeps the
build going past width warnings in the testbenches. Those warnings come from
passing narrow signals to the 64-bit checking tasks and do no harm.

Lint with `verilator --lint-only -Wall -Irtl rtl/dlms_pkg.sv rtl/<module>.sv`.

The remaining warnings are of three kinds. Some are unused high bits of
full-precision intermediates, which are truncated on purpose. Some are
package defaults that a given module does not use. The last is the clock and
reset of a two-input adder tree with an unregistered root (inside a tree PE of
order 1), which then has no register at all.
