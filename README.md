# Polyphase parallel FIR for bunch-by-bunch beam position processing

A bunch-by-bunch beam position monitor has to filter an ADC stream at
several hundred MHz to GHz rates, one sample or more per electron bunch. An
FPGA clock tops out at a few hundred MHz. This design closes the gap by
splitting the work in parallel. The input arrives as blocks of **M** consecutive
samples, one block per FPGA clock. The filter is split into its polyphase
components, so every multiplier runs at the block rate. **L** copies of that
structure each produce one of L consecutive output samples in every clock.
The result is an FIR filter whose sample rate is M times its clock. It costs
L times the hardware of a single-rate filter. With M = L = 5 and a 209 MHz
clock, that is 1045 Msamples/s in and out.

The arithmetic is laid out the way it maps onto Xilinx DSP48E2 slices:
each tap is one multiply-add slice. The slices are chained either as a
systolic FIR (the default) or as a transposed FIR.

## Sample ordering on the buses

Everything hinges on one convention, used on the input and the output bus alike:
**lane 0 is the newest sample**.

* `x_in[k] = x(n - k)`, k = 0..M-1, where n is the newest sample of the block.
  Sample n+M arrives in lane 0 on the next clock.
* `y_out[l] = y(n - l)`, l = 0..L-1, for the same n. Both are delayed by the
  latency given below.

With L = M, every output sample appears exactly once. If L < M, the outputs are
y(n)..y(n-L+1) of each block and the others are not computed. If L > M,
outputs overlap between successive blocks.

## How the parallel filter is built

### Polyphase decomposition (module `miso`)

Write the NTAPS-tap filter h as M interleaved sub-filters:

    E_k(z) = sum_{i=0}^{NTAPS/M-1} h(iM + k) z^-i,     H(z) = sum_k z^-k E_k(z^M)

At the full sample rate, E_k(z^M) needs a delay of M samples per tap. On the
block clock that delay is exactly one clock. Lane k already carries the stream
x(n-k), so the z^-k delay line that would normally feed the branches is not
needed. Sub-filter k is an ordinary NTAPS/M-tap FIR clocked at the block rate
on lane k, and the M branch outputs are added:

    y(n) = sum_k sum_i h(iM + k) x(n - k - iM)

This is the *M-input single-output* (MISO) block. It produces one output sample
per clock from M input samples per clock. The branch adder is one registered
stage. Its output is 48 + ceil(log2 M) bits wide, so the sum cannot overflow.

### One MISO per output (module `milo`, the top)

Output l needs the input bus delayed by l samples: x(n-l-k) for k = 0..M-1.
`milo` registers the incoming block and keeps as many earlier blocks as the
deepest window reaches. That is `HIST_BLOCKS = 1 + floor((L+M-2)/M)` blocks in
all, 2 at the defaults. These registers form a sample window where
`win[j] = x(n - j)`. MISO copy l is fed from `win[l .. l+M-1]`. Nothing is
shared between the L copies. This is the "L times the resources" price of the
method: 5 x 5 branches x 4 taps = 100 DSP slices at the defaults.

`in_valid` only tags the data. The filter state advances on every clock
because the input is a continuous ADC stream. `out_valid` is `in_valid`
delayed by the latency. It marks which output blocks come from real samples.

### Sub-filter structures (modules `fir_systolic`, `fir_transposed`)

Both modules compute `y(t) = sum_i coef[i] x(t - LAT - i)` with one
`dsp_slice` per tap. The parameter `STRUCT` chooses between them (type
`pfir_pkg::fir_struct_e`).

* **Systolic** (`FIR_SYSTOLIC`, the default). The slices hold coef[0], coef[1],
  ... in order. The sample enters slice 0 through one B register. Each later
  slice takes it from the previous slice's B cascade output through **two**
  B registers. The partial sum moves one P register per slice, and slice 0
  adds zero. Because the data moves one register more per slice than the
  sum, each slice multiplies a sample one step older than its neighbour's.
  That is the delay line of the direct form, and no signal drives more than
  one slice. Latency: TAPS + 2 clocks.
* **Transposed** (`FIR_TRANSPOSED`). The sample is broadcast to every slice.
  The first slice in the chain holds coef[TAPS-1] and adds zero, and the last
  holds coef[0] and drives the output. Each P register along the chain delays
  the older products by one more clock. Latency: 3 clocks, whatever TAPS is.
  The broadcast input has a fan-out of TAPS. On a real device that fan-out is
  what limits the filter length. The RTL does not limit TAPS.

### DSP slice (module `dsp_slice`)

This is a synthesizable model of a DSP48E2-style slice:

    P <= M + PCIN,   M <= (use_preadd ? D + A : A) * B

It has a 27-bit pre-adder, a 27x18 multiplier, a 48-bit post-adder, one A/D
register, BREG (1 or 2) B registers with BCOUT taken after the last of them,
an M register and a P register. Latency is 3 clocks from A/D, BREG + 2 from B
and 1 from PCIN. The post-adder only adds. The other ALU modes of the real
slice, its clock enables and its second A register are not modelled,
because the FIR structures use none of them. The pre-adder is modelled but
the FIRs leave it off.

## Timing

| Configuration | Latency (clocks, block presented to result visible) | Interval | Samples per clock |
|---|---|---|---|
| `milo`, systolic sub-filters | NTAPS/M + 4 (8 at defaults) | 1 | M in, L out |
| `milo`, transposed sub-filters | 5 | 1 | M in, L out |
| `miso` | sub-filter latency + 1 | 1 | M in, 1 out |
| `fir_systolic` | TAPS + 2 | 1 | 1 |
| `fir_transposed` | 3 | 1 | 1 |

`milo`'s latency is 1 (input register) + the sub-filter latency + 1 (summing
register). A block presented before clock edge c gives its outputs right
after edge c + LATENCY - 1. The published high-level-synthesis build of the
5x5 filter reports a 2-cycle latency. This RTL pipelines more deeply (8 clocks
at defaults) in exchange for one multiply-add per clock stage. The interval,
one block per clock, is the same.

Reset (`rst_n`) is synchronous and active low and clears every register. The
first outputs after reset are those of a stream preceded by zeros.

## Parameters (`milo`)

| Parameter | Default | Meaning |
|---|---|---|
| `M` | 5 | input lanes (samples per clock) |
| `L` | 5 | output lanes (MISO copies) |
| `NTAPS` | 20 | filter length; must be a multiple of M |
| `DATA_W` | 16 | signed sample width (at most 18, the B port) |
| `COEF_W` | 18 | signed coefficient width (at most 27, the A port) |
| `STRUCT` | `FIR_SYSTOLIC` | sub-filter form |
| `OUT_W` | 48 + ceil(log2 M) | output width |

`coef[0..NTAPS-1]` are plain input ports. They must be held constant while the
filter runs. Changing them gives a transient of up to one latency. Filter
coefficients, not data, go on the 27-bit A port.

## What comes from the source design and what does not

These follow the published design:

* the polyphase split;
* the MISO form without the input delay line;
* L MISO copies fed by input buses delayed by 0..L-1 samples;
* the 5-input, 5-output configuration;
* the DSP48E2 widths;
* the slice chains of both FIR mappings: coefficient order, zero cascade
  input, and one B register in the first systolic slice with two in each
  later one.

These are this implementation's own choices, because the source gives no values for them:

* **Filter length:** 20 taps, i.e. 4 per branch, matching the four-slice
  chains of the slice diagrams.
* **Widths:** 16-bit samples and 18-bit coefficients.
* **Branch adder:** a single registered stage.
* **Valid signals:** `in_valid` and `out_valid` are added.
* **Reset:** synchronous, active low.
* **Sub-filter form:** systolic by default, since it has no fan-out problem.
  The source does not say which form its parallel filter uses.

Not built:

* The ADC and the deserialiser that would present its samples as M lanes.
  These lie outside the design; the samples enter through `x_in`.
* The IIR, addition-tree and plain direct-form structures that the source
  compares against. They are alternatives it rejects.
* Clock rate. Whether the design closes timing at 200+ MHz on a given FPGA is
  a place-and-route question that simulation cannot answer.

Throughput follows from the interval of 1. For a ring with bunches at
204 MHz and N samples per bunch, set M = N and run the clock at the bunch
rate.

## Verification

Each testbench compares every output, bit for bit, with a direct-form FIR
computed in the testbench in 64-bit arithmetic. It also checks the latency
stated above. Inputs are random and include full-scale negative values.

| Testbench | Covers |
|---|---|
| `tb_dsp_slice` | BREG = 1 and 2, pre-adder on and off, PCIN, BCOUT, wrap of the pre-adder |
| `tb_fir_systolic`, `tb_fir_transposed` | 1, 4 and 7 taps |
| `tb_miso` | 5 lanes / 20 taps in both forms, 3 lanes / 9 taps |
| `tb_milo` | runs four filters side by side and counts each mechanism, failing if one never occurs (see below) |
| `tb_milo_full` | `milo` with no parameter overrides: 200 blocks, every output, 8-clock latency, 1000 samples in and 1000 out in 200 clocks |

The four filters in `tb_milo`:

* 5x5 systolic;
* 5x5 transposed;
* 4 inputs / 2 outputs;
* 2 inputs / 5 outputs, whose windows reach two blocks back.

The mechanisms it counts are:

* both sub-filter forms;
* windows that reach into the previous block;
* windows that reach two blocks back;
* valid gaps;
* full-scale inputs.

The `*_harness` modules in `tb/` hold the stimulus and the reference model
that these testbenches share.

Every testbench ends by printing `TB_RESULT checks=N failures=F`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/pfir_pkg.sv \
        tb/tb_milo_full.sv --top-module tb_milo_full -Mdir obj_full
    ./obj_full/Vtb_milo_full

Replace `tb_milo_full` with any other testbench name. `-Irtl -Itb` lets
Verilator find each module in the file of the same name. Each run takes well
under a second.

## Files

* `rtl/pfir_pkg.sv`: shared widths, the `fir_struct_e` type and the latency function
* `rtl/dsp_slice.sv`: the multiply-add slice
* `rtl/fir_systolic.sv` and `rtl/fir_transposed.sv`: the single-rate FIR chains
* `rtl/miso.sv`: the polyphase M-input single-output filter
* `rtl/milo.sv`: the top, M inputs and L outputs
* `tb/`: the testbenches and their shared harness modules
