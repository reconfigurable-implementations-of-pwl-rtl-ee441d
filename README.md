# Reconfigurable PWL multiscroll chaos generator (3 to 7 scrolls)

This design generates chaotic signals whose attractor has 3, 4, 5, 6 or 7
"scrolls", chosen with board switches while it runs. It is a Chua-type system
whose nonlinearity is a piecewise-linear (PWL) function with several
breakpoints. Each breakpoint pair adds a scroll. One clock cycle computes one
Euler step of the system in 32-bit fixed-point arithmetic. Two 8-bit DAC
outputs show any two of the signals x, y, z and h(x) on an oscilloscope in
X-Y mode. x against y shows the attractor. x against h shows the PWL curve.

The main idea is to change the scroll count without re-synthesising. The
system equations are the same for every scroll count. Only the nonlinearity
differs, so the system is split into a fixed "main" part and
transfer-function blocks that plug into it. The 3- and 4-scroll nonlinearities
need the same operators, and so do the 5- and 6-scroll ones. Each of those
pairs therefore shares one datapath, and only the coefficients are switched.

## The system

State update, with step dk = 0.01, alpha = 9 and beta = 14.87:

    x[n+1] = x[n] + alpha*dk*(y[n] - h(x[n]))
    y[n+1] = y[n] + dk*(x[n] - y[n] + z[n])
    z[n+1] = z[n] - beta*dk*y[n]

The nonlinearity, with 2q-1 breakpoints c_i and 2q slopes m_0 .. m_{2q-1}:

    h(x) = m_{2q-1}*x + sum_{i=1}^{2q-1} k_i*(|x + c_i| - |x - c_i|),   k_i = (m_{i-1} - m_i)/2

`|x + c| - |x - c|` equals 2x inside [-c, c] and ±2c outside, so each term
bends the curve at ±c_i. The parameter sets (all slopes are in units of 1/7):

| scrolls | breakpoints | slopes m (x 1/7)                          | breakpoints c                |
|---------|-------------|-------------------------------------------|------------------------------|
| 3       | 3           | 0.9 -3 3.5 -2.4                           | 1 2.15 4                     |
| 4       | 3           | -1 2 -4 2                                 | 1 2.15 3.6                   |
| 5       | 5           | 0.9 -3 3.5 -2.7 4 -2.4                    | 1 2.15 3.6 6.2 9             |
| 6       | 5           | -1 2 -4 2 -4 2                            | 1 2.15 3.6 8.2 13            |
| 7       | 7           | 0.9 -3 3.5 -2.4 2.52 -1.68 2.52 -1.68     | 1 2.15 3.6 6.2 9 14 23       |

`rtl/mscroll_pkg.sv` holds these lists as real numbers. The fixed-point
coefficients (m_last, k_i, c_i) are computed from them at elaboration, so
changing a set only means editing one line there.

## Number format

All datapath values are signed 32-bit Q8.24 numbers: 8 integer bits and 24
fraction bits, so the range is ±128 with a resolution of 6e-8. The 32-bit word
length is part of the original design. The binary-point position is this
implementation's choice. Floating-point runs of the system give these peak
magnitudes:

| scrolls | max x | max y | max z | max h |
|---------|-------|-------|-------|-------|
| 3       | 3.9   | 0.7   | 5.7   | 0.5   |
| 4       | 8.8   | 1.6   | 12.6  | 0.8   |
| 5       | 8.9   | 1.2   | 12.1  | 0.9   |
| 6       | 29.9  | 5.3   | 42.0  | 2.8   |
| 7       | 19.0  | 1.8   | 23.4  | 1.1   |

All of these fit with room to spare. To trade headroom for precision, change
`FRAC` in the package. Constant coefficients are rounded to nearest. Products
are 64-bit and are truncated back to Q8.24 with an arithmetic shift
(`fmul`).

## Block structure

    mscroll_top
    ├── main_chua       state registers x, y, z and the three Euler updates
    ├── tf_34           h(x) for 3 or 4 scrolls  ─┐
    ├── tf_56           h(x) for 5 or 6 scrolls   ├─ each wraps pwl_tf
    ├── tf_7            h(x) for 7 scrolls       ─┘
    └── control_block   switch decoding, block enables, restart, DAC scaling

Data flow in one clock cycle: `main_chua` presents the registered x[n] to all
three transfer-function blocks. The control block has enabled exactly one of
them. That block computes h(x[n]) combinationally. The other two output zero,
so an OR of the three outputs forms the return bus. `main_chua` combines h with
y and z and registers the next state on the clock edge. The critical path is
therefore one PWL evaluation (a multiplier and an adder chain of length
NB+1) followed by one constant multiply and add.

### Transfer-function blocks (`pwl_tf`, `tf_34`, `tf_56`, `tf_7`)

`pwl_tf` builds the h(x) equation directly: it has NB+1 multipliers, 2*NB
absolute-value units and the adders around them. It holds two coefficient
rows. The `set_hi` input drives a multiplexer that picks which row feeds the
multipliers. Switching between 3 and 4 scrolls (or 5 and 6) therefore changes
operands, not hardware. `tf_7` has one set and ties `set_hi` low. `en` low
forces the block's output to zero. This is how the three blocks share the
return bus.

Counted over the whole design there are 21 constant-coefficient 32x32
multipliers: 3 in `main_chua` and 4, 6 and 8 in the three transfer-function
blocks. On an FPGA with 9-bit multiplier elements this is more than a small
device offers, so expect part of the multiplication to land in logic.

### Control block

* **Switch inputs.** `sw_scroll` (3 bits) gives the scroll count in binary,
  3 to 7. Codes 0 to 2 are ignored and the current count is kept.
  `sw_dac_a` and `sw_dac_b` (2 bits each) pick the signal for each DAC:
  0 = x, 1 = y, 2 = z, 3 = h. All switch inputs pass through a two-flop
  synchroniser.
* **Activation.** The registered scroll count drives `en_34`, `en_56`,
  `en_7` (one-hot) and `set_hi`, which is high for 4 and 6 scrolls.
* **Restart.** When the synchronised switch value differs from the registered
  count, `restart` is high for one cycle. On that edge the count register
  takes the new value and `main_chua` reloads the start point (0.1, 0, 0).
  Each attractor therefore begins from the same place instead of from the
  state left by the previous system.
* **DAC scaling.** Each DAC sample is the chosen Q8.24 value shifted right
  arithmetically, saturated to -128..127 and sent offset-binary
  (code = value + 128). The shift depends on the scroll count, so the 8-bit
  full scale covers the attractor:

  | scrolls | full scale |
  |---------|------------|
  | 3       | ±8         |
  | 4, 5    | ±16        |
  | 7       | ±32        |
  | 6       | ±64        |

  h is much smaller than x, so in x-h mode the curve looks flat. Use the
  oscilloscope's vertical gain.

## Timing

| event                                      | when                                   |
|--------------------------------------------|----------------------------------------|
| Euler step                                 | every rising clock edge                |
| h(x[n]) valid                              | same cycle as x[n] (combinational)     |
| switch change → `restart` high             | after 2 edges (synchroniser)           |
| switch change → new scroll count, start point loaded | 3rd edge                     |
| DAC codes                                  | registered: show the previous cycle's values |
| reset (`rst_n` low, asynchronous)          | 5 scrolls, state (0.1, 0, 0), DAC A = x, DAC B = y, DAC codes 128 |

The signal's speed scales with the clock. The attractor turns over in a few
hundred to a few thousand steps, so at 50 MHz the output has frequencies in the
tens of kHz. There is no clock enable. To slow the output down, gate the clock
or add an enable to `main_chua`'s state registers.

## Top-level ports

| port                 | dir | width | meaning |
|----------------------|-----|-------|---------|
| `clk`, `rst_n`       | in  | 1     | clock, asynchronous active-low reset |
| `sw_scroll`          | in  | 3     | scroll count 3..7 (may be asynchronous) |
| `sw_dac_a`, `sw_dac_b` | in | 2    | signal on each DAC: 0 x, 1 y, 2 z, 3 h |
| `dac_a`, `dac_b`     | out | 8     | offset-binary codes for two external 8-bit DACs |
| `scroll`             | out | 3     | scroll count in use |
| `x_n`, `y_n`, `z_n`, `h_n` | out | 32 | current state and h, Q8.24, for observation |

The DACs and the switches are board parts outside this RTL.

## Where this follows the original design and where it does not

Taken from the original design:
* the Euler-discretised system and dk = 0.01, alpha = 9;
* the slope and breakpoint sets above;
* 32-bit fixed point and 8-bit DACs;
* one step per clock, with h returned within the same cycle;
* the split into a main system, a 3-4 scroll block, a 5-6 scroll block, a
  7-scroll block and a control block;
* shared operators with switched coefficients;
* the control block choosing the active block and routing two scaled signals
  to the DACs.

Choices made here:
* the Q8.24 split;
* beta = 14.87 (related generators in the literature use 14.286; change
  `BETA` in the package to use that value);
* the start point (0.1, 0, 0);
* reset behaviour, the synchroniser, the restart on a change of scroll count
  and the switch encoding;
* the DAC scaling table and offset-binary coding;
* the OR-ed return bus;
* the extra state outputs.

The 7-scroll set has 8 slopes and 7 breakpoints (q = 4), and it is built
that way.

Not included: the original work also built the same systems on a
switched-capacitor field-programmable analog array (integrators and a
programmable transfer-function cell, with rescaled coefficients) and compared
them with a discrete op-amp circuit. Neither is digital logic, and neither is
part of this RTL.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line.

* `tb_tf_34`, `tb_tf_56`, `tb_tf_7`: for every parameter set, compare h(x)
  with a floating-point reference (tolerance 5e-5) at 0, at every breakpoint
  and next to it, and at 2000 random points over the state range. Also check
  that the output is zero while the block is disabled. The reference
  (`tb/mscroll_ref_pkg.sv`) evaluates h by walking the segments and adding
  slope times segment length, a different formula from the RTL's.
* `tb_main_chua`: closes the loop with a floating-point 5-scroll h and checks
  30000 consecutive steps against a floating-point Euler step (tolerance 1e-6).
  It also checks reset, restart and that the trajectory leaves the middle
  scroll.
* `tb_control_block`: checks synchroniser latency, restart pulses, enables and
  set bit for every count, invalid codes, and exact DAC codes (including
  saturation) for every count and selection.
* `tb_mscroll_top`: runs the whole generator through 5, 3, 4, 6, 7, an invalid
  code and 5 again, 50000 steps each, with about 2.1 million checks. It checks
  every step, h and both DAC codes. It checks the 3-edge switch latency and
  the restart, and that x spreads over several scrolls. It also counts the
  scroll switches, restarts, shared-set uses, ignored codes and DAC
  selections, and fails if any of them never happened. It runs the top with
  its default configuration, in well under a second.

* `tb_scroll_workload`: the scroll-count check. For each setting it locates
  the zeros of h: rising zeros are scroll centres, falling zeros separate
  scrolls. It then runs the generator for 400000 steps and requires x to visit
  exactly the n regions that hold a centre. Typical result: the last scroll is
  first reached after 13k to 80k steps. With the 4-scroll set, a trajectory
  started at (0.1, 0, 0) circles the centres at -1.5, +1.5 and +5.85. It only
  reaches the edge of the region around -5.85 (x never falls below about
  -2.5), and a floating-point run of two million steps does the same. A
  negative start point gives the mirror image.

The references work in floating point and check each step from the DUT's own
state. A chaotic trajectory cannot be compared over long spans, because
rounding differences grow exponentially, but a one-step comparison is exact
up to the stated tolerance.

To simulate with Verilator (5.x):

    verilator --binary --timing -Wno-fatal \
      rtl/mscroll_pkg.sv rtl/pwl_tf.sv rtl/tf_34.sv rtl/tf_56.sv rtl/tf_7.sv \
      rtl/main_chua.sv rtl/control_block.sv rtl/mscroll_top.sv \
      tb/mscroll_ref_pkg.sv tb/tb_mscroll_top.sv --top-module tb_mscroll_top
    ./obj_dir/Vtb_mscroll_top

For a block testbench, replace the last file and the top module, for example
`tb/tb_tf_56.sv --top-module tb_tf_56`. Include the package files and the
modules the block uses.

## Changing the design

* New parameter set with the same breakpoint count: edit `slope7` and
  `bpoint` in `mscroll_pkg`.
* New scroll count with a different breakpoint count: add a case to those
  functions and to `nbreak`, add a wrapper like `tf_7`, and give the control
  block an enable and a DAC scale for it.
* Different step or system constants: `DK`, `ALPHA`, `BETA`, `X0`/`Y0`/`Z0`
  in the package. The testbench reference (`mscroll_ref_pkg`) repeats them on
  purpose, so update it too.
