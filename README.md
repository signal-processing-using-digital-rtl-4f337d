# A small general-purpose signal processor: one biquad on one multiplier

This is a sample-in, sample-out digital signal processor. It takes one stream of samples from an
analog-to-digital converter and returns one filtered stream to a digital-to-analog converter.
Its core is a second-order IIR filter (a "biquad") in Direct Form II. Five programmable coefficients
select what the filter does, so the same hardware can serve different applications.

The main idea is economy of arithmetic. The filter needs five multiplications per sample, but the
datapath has only **one 16 x 16 signed serial multiplier** and **one 32-bit adder/subtractor**. A small
controller reuses them five times per sample. The values the filter must remember sit in a
*data-management* memory between uses: the partial sum, the two delayed internal values, and the
coefficients. That memory shifts and rotates them so that each value is at hand when its step needs it.
A *truncation circuit* brings 32-bit sums back to 16-bit samples and saturates instead of wrapping around.

The arithmetic circuits that feed this datapath are also included as separate, reusable blocks:
- a gate-level one-bit full adder cell and a four-bit cascade of it;
- a 4 x 4 cellular array multiplier;
- a ripple carry adder;
- a 4-bit carry lookahead group and a 16-bit two-level lookahead adder built from such groups;
- a parallel signed multiplier.

## The filter

Direct Form II keeps one internal signal w(n) and its two past values:

    w(n) = x(n) - a1 w(n-1) - a2 w(n-2)
    y(n) = b0 w(n) + b1 w(n-1) + b2 w(n-2)

Together these equal the usual difference equation
`y(n) = b0 x(n) + b1 x(n-1) + b2 x(n-2) - a1 y(n-1) - a2 y(n-2)`. Only two delayed values are needed
instead of four.

### The five-step schedule

`biquad_ctrl` runs each sample through these steps. `acc` is the 32-bit partial sum held in `data_mem`.

| step | operation                     | operand    | coefficient | after the step                  |
|------|-------------------------------|------------|-------------|---------------------------------|
| load | acc = x(n) * 2^14             |            |             |                                 |
| 0    | acc = acc - a1 * w(n-1)       | w(n-1)     | a1          |                                 |
| 1    | acc = acc - a2 * w(n-2)       | w(n-2)     | a2          | w(n) = truncate(acc) is stored  |
| 2    | acc = 0 + b0 * w(n)           | w(n)       | b0          |                                 |
| 3    | acc = acc + b1 * w(n-1)       | w(n-1)     | b1          |                                 |
| 4    | acc = acc + b2 * w(n-2)       | w(n-2)     | b2          | y(n) = truncate(acc) is output; w shifts |

The feedback coefficients are stored as a1 and a2. The adder/subtractor subtracts their products, so the
minus signs of the equations cost nothing. Every step writes its sum back through the truncation circuit.
Partial sums keep their full 32 bits (saturated only on overflow). Only w(n) and y(n) are cut to 16 bits.

### Data management: shift and rotate

`data_mem` holds three kinds of value:
- **Coefficient ring.** Five registers hold the coefficients in the order they are used: a1, a2, b0, b1, b2.
  The head of the ring is wired to the multiplier. The ring rotates one place after every step, so
  after five steps it is back at a1. It needs no address decoding in the datapath. Writes address a
  coefficient by name and are accepted only while the filter is idle.
- **Delay line** w(n), w(n-1), w(n-2). w(n) is written after step 1. At the end of the sample the line
  shifts: w(n) becomes w(n-1) and w(n-1) becomes w(n-2). The old w(n-2) has been used by then and is dropped.
- **Partial-sum register.** It is loaded with the aligned input sample and then with each step's result.

### Number formats

| quantity                 | width | format  | range           |
|--------------------------|-------|---------|-----------------|
| x, w, y (samples)        | 16    | Q1.15   | [-1, 1)         |
| b0, b1, b2, a1, a2       | 16    | Q2.14   | [-2, 2)         |
| products and partial sum | 32    | Q3.29   | [-4, 4)         |

Q2.14 coefficients are this design's choice. They allow |a1| up to 2, which stable second-order
sections need. To write a coefficient c, store `round(c * 16384)` as a 16-bit two's-complement value.
The `FRAC` parameter sets the number of fraction bits.

**Scaling.** In Direct Form II the internal signal w(n) passes through the feedback part of the filter
before the feed-forward part, so it can be much larger than both x(n) and y(n). For example, the
low-pass section b = (1, 2, 1)/16, a1 = -1.2, a2 = 0.45 has a gain of 4 from x to w at DC. w(n) is
stored with 16 bits and saturates, so inputs must be scaled so that w(n) stays within [-1, 1). If it
does not, the output is flat-topped, not wrong in sign.

### Truncation and saturation

`truncation` turns a 32-bit sum into what gets stored:
- **No adder overflow.** The sum is shifted right by 14 (low bits dropped, so it rounds toward minus
  infinity) and clamped to [-32768, 32767].
- **Adder overflow.** The sign bit of the sum is wrong: it is really a carry out of the magnitude. The
  sum is discarded. The output is the largest value of the *true* sign, which is the opposite of the
  wrapped sum's sign bit. A sum that overflowed upward and looks negative therefore becomes the largest
  positive value, not a large negative one. The 32-bit partial sum saturates in the same way.

The `sat` output goes high with y(n) if, during that sample, the adder overflowed or w(n) or y(n) was
clamped. A partial sum that is simply larger than the 16-bit range is normal and does not count.

## The multiplier and adder stage

`mac_unit` combines:
- `serial_mult`, which computes a 16 x 16 signed product in 16 clock cycles;
- `addsub`, a 32-bit adder/subtractor that adds the product to, or subtracts it from, the value supplied
  by the data management.

**Serial multiplier.** The multiplicand is sign-extended to 32 bits and shifted left one place per cycle.
The multiplier is shifted right one place per cycle. Each cycle, an AND of the shifted multiplicand with
the multiplier's current low bit gives a partial product, and an adder/subtractor adds it into the product
register. The multiplier's last bit is its two's-complement sign bit, with weight -2^15, so its partial
product is subtracted. That is why this stage needs an adder/subtractor and not just an adder. The
multiplier uses one adder instead of an array, at the cost of N cycles per product.

**Adder/subtractor.** It computes a - b as a + ~b + 1 on a carry lookahead adder (`cla_adder`). Its `ovf`
output detects signed overflow: the carry into the sign bit differs from the carry out of it. `cout` is
the plain carry out.

## Timing and interface of the processor (`dsp_top`)

| port                               | dir | width | meaning                                        |
|------------------------------------|-----|-------|------------------------------------------------|
| clk, rst_n                         | in  | 1     | clock; synchronous active-low reset            |
| x_valid, x_in                      | in  | 1, 16 | sample from the converter, taken when idle     |
| coef_we, coef_sel, coef_data       | in  | 1,3,16| write coefficient 0..4 = b0, b1, b2, a1, a2    |
| busy                               | out | 1     | a sample is being processed                    |
| y_valid, y_out, sat                | out | 1,16,1| output sample, one-cycle strobe, saturation    |
| ma_*, am_*, ra_*, cla_*, pm_*      |     |       | the side-by-side arithmetic blocks (below)     |

- **Sample acceptance.** A sample is taken on a clock edge where `x_valid` is high and `busy` is low.
  A sample offered while `busy` is high is ignored. No input buffer is provided.
- **Step length.** Each step takes N + 2 = 18 cycles: one to launch the multiply, 16 to multiply, and
  one to write back.
- **Output timing.** `y_valid` rises 5 x 18 = **90 clock edges** after the accepting edge. `y_out` then
  holds until the next output.
- **Throughput.** One sample every 91 cycles is the maximum input rate. `x_valid` can be held high
  continuously to run at that rate.
- **Reset.** Reset clears the coefficients, the delay line and the partial sum.

The analog converters themselves are not part of this RTL. The ports above are their digital sides.

## Arithmetic building blocks

These blocks stand beside the filter in `dsp_top`, each with its own ports. Some are also used inside it.

- **`full_adder_cell`**: a one-bit full adder at gate level. Three AND2 gates feed a NOR3 that gives the
  inverted carry. An OR3, an AND2, an AND3 and a NOR2 give the inverted sum. It is a CMOS mirror-adder
  cell, so both outputs are active low (`cout_n`, `s_n`).
- **`mirror_adder4`**: four of those cells in cascade. A full adder is self-dual: inverted inputs give
  inverted outputs. Odd bits therefore take inverted operands and the inverted carry, and produce true
  outputs. No inverter sits in the carry path.
- **`array_mult`**: an N x N unsigned cellular array multiplier (default 4 x 4). Each cell ANDs one bit of
  a with one bit of b and adds the result, with a `full_adder_cell`, into the running sum. Each row adds
  a & b_i to the previous row's sum shifted by one place. The carry ripples along the row, and the row's
  carry out becomes the top bit of the next row's addend.
- **`ripple_adder`**: a W-bit ripple carry adder (default 4), with XOR2, XOR2, AND2, AND2 and OR2 per bit.
  Its delay grows linearly with W.
- **`cla4`**: a 4-bit lookahead group. The internal carries are formed in parallel from propagate and
  generate signals. It outputs the group propagate and group generate (P0-3, G0-3).
- **`cla_adder`**: a two-level lookahead adder (default W = 16). It is built from W/4 `cla4` groups, with
  one lookahead carry unit (`cla_lcu`) for every four groups. The unit forms the carries into its groups
  in parallel from their P and G, using the same equations as `cla4` does for bits. At 16 bits no carry
  ripples anywhere, and the deepest path is about ten gate levels, against 2W + 2 = 34 for a ripple
  adder. The 32-bit adder/subtractor chains two such 16-bit blocks through their block P and G.
- **`par_mult`**: an N x N signed combinational multiplier. Its structure is left to synthesis. It is
  the fast, large alternative to `serial_mult`.

## Module hierarchy

    dsp_top
      iir_filter
        biquad_ctrl          five-step sequencer (FSM)
        mac_unit
          serial_mult
            addsub -> cla_adder -> cla4, cla_lcu
          addsub -> cla_adder -> cla4, cla_lcu
        truncation
        data_mem             coefficient ring, delay line, partial sum
      mirror_adder4 -> full_adder_cell
      array_mult    -> full_adder_cell
      ripple_adder
      cla_adder -> cla4, cla_lcu
      par_mult
    dsp_pkg                  widths, coefficient names, FSM states

## Parameters

| parameter | default | where                                   | meaning                           |
|-----------|---------|-----------------------------------------|-----------------------------------|
| N         | 16      | dsp_top, iir_filter, mac_unit, serial_mult, par_mult | sample / coefficient width |
| ACC_W     | 32      | dsp_top, iir_filter, mac_unit, addsub (W) | sum width; must be 2N          |
| FRAC      | 14      | dsp_top, iir_filter, truncation         | coefficient fraction bits         |
| N         | 4       | array_mult                              | array multiplier size             |
| W         | 4 / 16  | ripple_adder / cla_adder                | adder width (cla: multiple of 4)  |

## Where this design makes its own choices

The following points are not fixed by the design this RTL follows. They are decisions of this implementation:
- **Widths and formats.** The 16-bit multiplier and 32-bit adder/subtractor are the stated sizes. The
  Q1.15 / Q2.14 number formats, rounding toward minus infinity and clamping to 16 bits are this
  implementation's.
- **Saturation.** Saturating to the largest value on adder overflow, and recovering the true sign of an
  overflowed sum, follow the stated behaviour. The negative-overflow case mirrors the positive one.
- **Schedule.** The first two steps (the two feedback terms) are the stated ones. The three output steps,
  the FSM and the timing are this implementation's.
- **Feedback sign.** The feedback coefficients are applied as -a1 and -a2 by subtracting.
- **Coefficient storage.** Registers and the rotating ring order are this implementation's reading of
  the "shift-and-rotate" memory.
- **Multiplier choice.** The filter uses the serial multiplier. The intended long-term mix of serial and
  parallel multipliers was never fixed, so none is built.
- **Lookahead adder.** The two-level arrangement of `cla_adder` (groups plus a lookahead carry unit) is
  this implementation's reading of the roughly 10 gate delays quoted for a 16-bit lookahead adder.
  Beyond 16 bits, blocks are chained, not given a third level.
- **Array multiplier.** `array_mult` ripples the carry along each row, a textbook array multiplier. It
  is not a carry-save array.
- **Mirror adder cascade.** How the cells are cascaded (alternating polarity) is this implementation's.
- **Not included.** The transistor-level layout of the full adder cell, the analog converters, and any
  FPGA-specific timing or area are outside this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. Results are compared with values computed
independently in the testbench:
- **Adders and the full adder cell:** checked exhaustively at 4 bits (8-bit exhaustive for
  `cla_adder`; all 512 inputs of the lookahead carry unit `cla_lcu`), plus random and carry-chain
  corner cases at 16 and 32 bits.
- **Multipliers:** `serial_mult` is checked at 4, 8 and 16 bits, with the cycle count (done exactly
  N + 1 edges after start). `array_mult` is exhaustive at 4 x 4 and random at 8 x 8. `par_mult` is
  checked at random at 16 bits and exhaustively at 8 and 4 bits.
- **`truncation`:** covers all four saturation cases.
- **`biquad_ctrl`:** checked against the schedule table above, including the 90-cycle latency and
  refusal of a sample while busy.
- **`iir_filter` and `dsp_top`:** compared sample by sample with a bit-exact integer model of the filter
  (`tb/biquad_ref_pkg.sv`), including the `sat` flag and the latency. `tb_iir_filter` also checks
  identity and pure-delay coefficient sets. It also compares a low-pass run with the difference
  equation evaluated in floating point, within 16 LSB.
- **End to end:** `tb_dsp_top` runs at the default sizes. It loads a low-pass section, retunes to a
  high-pass one, then drives the filter into overflow. It counts serial multiplications, subtracting
  steps, ring rotations, delay-line shifts, retunes, positive and negative saturation, adder overflows
  and refused samples, and fails if any of them never happened.

Each block was also checked against a deliberately broken copy, to confirm that its testbench catches
the fault.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/dsp_pkg.sv tb/biquad_ref_pkg.sv tb/tb_dsp_top.sv --top-module tb_dsp_top -o sim
    ./obj_dir/sim

Replace `tb_dsp_top` with any other `tb_<module>`. `biquad_ref_pkg.sv` is needed only by `tb_iir_filter`
and `tb_dsp_top`. All testbenches finish in well under a second.

Verilator simulates two-state values, so every register read by the logic has a reset value. The
design uses one clock and synchronous resets throughout.
