# IIR decimation filters with the merged delay transformation

A decimation filter low-pass filters a sample stream and keeps only every
M-th output. With an FIR filter that is easy: the discarded outputs are simply
never computed. A recursive (IIR) filter seems to need them, because each
output is built from the one before it. The merged delay transformation (MDT)
removes that dependency. It rewrites the recursion so that an output depends
only on the output **M samples earlier** and on the last M inputs. The filter
then does its arithmetic once per M input samples, at the output rate, and
the M-1 intermediate outputs are never formed.

This repository is synthesizable SystemVerilog for:

* a first-order Butterworth low-pass decimating by 4 (`mdt_fo_decimator`);
* a second-order Butterworth low-pass decimating by 4 (`mdt_so_decimator`);
* a general higher-order decimator made of first- and second-order MDT
  sections in parallel, with loadable coefficients (`mdt_parallel_decimator`);
* a top level, `mdt_iir_decimation_top`, that runs all three side by side on
  one input stream.

The default filter specification is a sampling rate of 44.2 kHz, a cut-off of
20 kHz and a decimation factor of M = 4. The coefficients are not stored as
tables. They are computed from these three numbers while the design
elaborates, so changing a parameter gives a new filter.

## The transformation

Start from a first-order recursion with pole `p` and gain `r`:

    y[n] = p·y[n-1] + r·x[n]

Substitute the equation into itself M-1 times:

    y[n] = p^M · y[n-M]  +  Σ_{i=0}^{M-1} r·p^i · x[n-i]

The M unit delays of the feedback loop have merged into one delay of M
samples. Only every M-th output is needed, so that delay is a single register
loaded once per group of M inputs. One output costs M+1 multiplications,
against 2M when every output of the plain recursion is computed.

The feedback coefficient is `p^M` and the feed-forward taps are `r·p^i`. For
a stable filter and M ≥ 2, |p^M| < |p|: the loop gain is smaller than in the
original recursion.

## Second-order sections: one pole of a conjugate pair

A higher-order recursion cannot be rewritten directly. Instead the transfer
function is expanded into partial fractions. A real pole gives a first-order
section. A complex pole `p` always comes with its conjugate, and the pair
forms a second-order section:

    H(z) = k + r/(1 - p·z^-1) + r*/(1 - p*·z^-1)

Each half can be transformed as above, but with complex coefficients. For a
real input, the two halves produce conjugate outputs, `y2 = y1*`. Their
imaginary parts cancel and their real parts are equal, so:

    y[n] = k·x[n] + 2·Re y1[n]

Only `y1` is computed. Write `A + jB = p^M` and `C_i + jD_i = r·p^i`. Then the
complex recursion splits into two real recursions that feed into each other:

    y1R[n] = A·y1R[n-M] − B·y1I[n-M] + Σ C_i·x[n-i]
    y1I[n] = A·y1I[n-M] + B·y1R[n-M] + Σ D_i·x[n-i]

The imaginary part `y1I` never reaches the output, but it must be kept as
state, because the next `y1R` depends on it. Each output costs:

* 4 feedback multiplications;
* 2M feed-forward multiplications;
* 1 multiplication for the direct term `k`;
* a doubling, which is a one-bit shift in hardware.

Counting the doubling, that is 2M + 6 operations. For M = 4 the second-order
section has 13 real multipliers.

`mdt_second_order_section` implements these two equations exactly. The
testbench checks `y1R` and `y1I` separately against a complex floating-point
recursion, because an error in the cross terms (the sign of `B`) would
otherwise show only slowly in the output.

## Higher orders

`mdt_parallel_decimator` builds an arbitrary filter from:

* `NFO` first-order sections, one per real pole;
* `NSO` second-order sections, one per conjugate pole pair.

All sections share one phase counter and one input delay line. They all
compute on the same input sample, and their outputs are added to a single
direct term `k·x[n]`. The coefficients are input ports, so a host or
constants can load any expansion. The end-to-end testbench loads a
third-order Butterworth filter, which has one real pole and one pair.

## Coefficients

`mdt_pkg` designs the Butterworth filters with the bilinear transform. It
prewarps the cut-off with `K = tan(π·fc/fs)`, then splits each design into
parallel form:

| filter | design | parallel form |
|---|---|---|
| 1st order | `g(1+z^-1)/(1-p z^-1)`, `g = K/(1+K)`, `p = (1-K)/(1+K)` | `k = -g/p`, `r = g - k` |
| 2nd order | `b0 = b2 = K²/a0`, `b1 = 2b0`, `a1 = (2K²-2)/a0`, `a2 = (1-√2K+K²)/a0`, `a0 = 1+√2K+K²` | `p = -a1/2 + j√(a2 - a1²/4)`, `k = b2/a2`, `Re r = (b0-k)/2`, `Im r = -((b0-k)·Re p + b1 - k·a1)/(2·Im p)` |

Then `p^M` and `r·p^i` are formed, rounded to 18 bits, and wired to the
sections as constants.

At the defaults the results are:

* first order: `p = -0.7386`, `r = -0.3077`, `k = 1.1770`;
* second order: `p = -0.7912 ± 0.1722j`, `r = -0.2126 ∓ 0.0048j`,
  `k = 1.2347`.

The first-order formulas fail at `fc = fs/4`, where `p = 0`.

The first-order Butterworth filter has a zero at z = -1. It therefore needs
the direct term `k`, just as the second-order section does. The first-order
section has an optional `k` input for that reason. With `k = 0` it is the bare
first-order MDT recursion with M+1 multiplications.

## Number formats and accuracy

| signal | type | format |
|---|---|---|
| input, output | `sample_t` | 16 bits, Q1.15; the output is rounded to nearest and saturated |
| coefficients | `coef_t` | 18 bits, 16 fraction bits, range [-2, 2) |
| section state and outputs | `state_t` | 24 bits, 20 fraction bits, range [-8, 8), saturated |
| sums of products | `acc_t` | 48 bits; holds up to 63 taps without overflow |

The simulations compare against the undecimated filter in floating point.
Over sine, square-wave and random inputs, the largest output errors are:

| filter | largest error |
|---|---|
| first order | 0.85 LSB |
| second order | 1.43 LSB |
| third order, parallel form | 1.77 LSB |

These errors come from rounding the coefficients to 18 bits and the state to
20 fraction bits.

A full-scale square wave overshoots the first-order filter's response beyond
±1, because of its negative pole. The output then saturates.

## Interface and timing

Every filter has the same stream interface:

* `clk`, and `rst_n`, a synchronous active-low reset. Reset clears every
  register, so the filter starts from rest.
* `in_valid` and a 16-bit sample. At most one sample per clock. Idle cycles
  are allowed; the filter counts samples, not cycles.
* `out_valid` and a 16-bit output. `out_valid` is high for one clock per M
  input samples.

The output belonging to input samples `n = M-1, 2M-1, …` (counted from reset)
appears one clock after that input sample. It equals samples M-1, 2M-1, … of
the undecimated filter.

All multiplications of a section run in parallel in that single cycle. The
multipliers are therefore busy for only one cycle in M. Time-sharing them
would save area but is not done here.

## Module map

```
mdt_iir_decimation_top
├── mdt_fo_decimator          first-order Butterworth
│   ├── mdt_phase_ctrl        modulo-M counter → fire on every M-th sample
│   ├── mdt_input_delay       x[n] … x[n-M+1]
│   └── mdt_first_order_section
├── mdt_so_decimator          second-order Butterworth
│   ├── mdt_phase_ctrl, mdt_input_delay
│   └── mdt_second_order_section
└── mdt_parallel_decimator    NFO + NSO sections, coefficients on ports
    ├── mdt_phase_ctrl, mdt_input_delay
    ├── mdt_first_order_section  × NFO
    └── mdt_second_order_section × NSO
mdt_pkg                       types, formats, coefficient functions
```

Parameters:

* `M`: decimation factor, from 1 to 63.
* `FS_HZ`, `FC_HZ`: design rate and cut-off of the Butterworth filters.
* `NFO`, `NSO`: section counts of the parallel filter, each at least 1.

The word lengths are package constants in `mdt_pkg`.

## Simulation

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=F` and stops itself with a watchdog. With plain
Verilator 5, for example:

```
verilator --binary --timing -y rtl rtl/mdt_pkg.sv tb/tb_mdt_iir_decimation_top.sv \
          --top-module tb_mdt_iir_decimation_top
./obj_dir/Vtb_mdt_iir_decimation_top
```

| testbench | what it checks |
|---|---|
| `tb_mdt_phase_ctrl` | `fire` and `phase` against a model count, with random gaps and a reset in mid-group; M = 4 and 3 |
| `tb_mdt_input_delay` | every window tap against a software history |
| `tb_mdt_first_order_section`, `tb_mdt_second_order_section` | 24 random stable sections each, against the undecimated recursion in floating point; `y_valid` exactly one cycle after `fire` |
| `tb_mdt_fo_decimator`, `tb_mdt_so_decimator` | the default filters against a direct-form Butterworth reference: sines at 2 and 15 kHz, square wave, noise, random idle cycles; output count and timing. The second-order test also runs an M = 2 instance |
| `tb_mdt_parallel_decimator` | 12 random partial-fraction filters at 1+1 and 2+2 sections |
| `tb_mdt_iir_decimation_top` | all three filters at the default parameters, the third-order one loaded with a Butterworth expansion the testbench derives itself; also counts idle cycles, saturated outputs and a reset in mid-stream |

The references are independent of the RTL's own coefficient arithmetic. The
decimator tests run the direct-form filters, not the parallel form, so they
also verify the partial-fraction formulas in `mdt_pkg`.

## Departures and open points

* **Filter design.** Bilinear-transform Butterworth filters are assumed, since
  the specification gives only the type, order, fs, fc and M. Another design
  method would give different coefficients for the same structure.
* **Word lengths.** All word lengths, the rounding and the saturation are this
  design's choice.
* **Direct term in the first-order filter.** The bare first-order
  transformation has no direct term. The first-order Butterworth filter needs
  one, so it uses one extra multiplier: 5 per output instead of M+1 = 4.
* **Merged delay.** The M-sample feedback delay is one register updated at the
  output rate, not a chain of M input-rate registers. The values are the same,
  because intermediate outputs are never needed.
* **Parallel filter.** Higher orders are described only as a method. The
  parallel decimator's structure is therefore the simplest one: one shared
  direct term, and all sections firing together. Its default of one section
  of each kind is arbitrary.
* **Not built.** Conventional decimators that compute every output are not
  built; they serve only for comparison. FPGA resource figures, such as slice
  counts and clock rates, come from a vendor flow and are not reproduced.
  After generic synthesis the first-order decimator has 100 flip-flop bits
  and the second-order one has 124.
