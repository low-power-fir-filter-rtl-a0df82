# Low-power FIR filter with approximate adders

A digital filter for audio-rate signals spends most of its logic on adders.
Many DSP uses can tolerate small numeric errors, so part of that logic can be
replaced by cheaper, deliberately inexact adder cells. This design is a 26-tap
low-pass FIR filter whose adders use, in their low bit positions, the simplest
such cell there is. This *fifth approximate full adder* sets

    Sum  = B
    Cout = A

and does not use the carry input at all. In silicon this is little more than
two wires with buffers, so it switches far less capacitance than a
24-transistor mirror full adder. The upper bit positions use exact full adders.
The error therefore stays well below the bits the filter keeps at its output.

All of the RTL is synthesizable SystemVerilog (IEEE 1800-2017).

## The approximate full adder

| A B Cin | exact Sum Cout | approx Sum Cout |
|---------|----------------|-----------------|
| 0 0 0   | 0 0            | 0 0             |
| 0 0 1   | 1 0            | **0** 0         |
| 0 1 0   | 1 0            | 1 0             |
| 0 1 1   | 0 1            | **1** **0**     |
| 1 0 0   | 1 0            | **0** **1**     |
| 1 0 1   | 0 1            | 0 1             |
| 1 1 0   | 0 1            | **1** 1         |
| 1 1 1   | 1 1            | 1 1             |

The sum is wrong in four of the eight cases and the carry in two (shown in
bold). `rtl/approx5_fa.sv` is the cell. `rtl/mirror_adder_fa.sv` is the exact
cell. It is written the way a mirror adder computes: first the inverted carry,
then the inverted sum built from it.

## The hybrid adder and what it computes

`rtl/approx_adder.sv` is a W-bit ripple-carry adder. Positions
`0 .. APPROX_LSBS-1` are approximate cells and the rest are exact. Because an
approximate cell passes B to its sum and A to its carry, the whole chain has a
closed form (K = `APPROX_LSBS`):

    sum[K-1:0]   = b[K-1:0]
    sum[W-1:K]   = a[W-1:K] + b[W-1:K] + a[K-1]      (mod 2^(W-K))

In words, the low K bits of operand `a` are thrown away, and the carry into
bit K is guessed from `a[K-1]`. The error of one addition is therefore less
than 2^K in magnitude. With `APPROX_LSBS = 0` the adder is exact. With
`APPROX_LSBS = W` it returns `b` unchanged, which is why only the low bits are
approximated. The testbenches use this closed form as their reference model.

Operand order matters. In the filter, `a` is the running sum and `b` is the
new product. So the low bits of the final sum are the low bits of the last
product, and each addition also contributes its carry guess.

## The filter

`rtl/approx_fir.sv` (the top) is a direct-form FIR filter:

```
data_in ─┬─ x[0] ─ x[1] ─ ... ─ x[24]        delay line, shifts when in_valid
         │    │      │            │
        ×c0  ×c1    ×c2   ...   ×c25          exact signed 16x16 multipliers
         │    │      │            │
         └─(+)─────(+)─── ... ──(+)           25 approx_adder in series, 37 bits
                                  │
                             >>> 16, saturate to 16 bits, register
                                  │
                        data_out, out_valid, saturated
```

The coefficients and sizes are in `rtl/fir_pkg.sv`. The coefficients are
16-bit two's-complement numbers and form a symmetric, linear-phase set. They
realise an equiripple low-pass filter for a 48 kHz sample rate, with a 10 kHz
pass-band edge and a 12 kHz stop-band edge. Computed from the coefficients
after the 16-bit shift, the gain is:

| frequency | 0 Hz | 5 kHz | 10 kHz | 12 kHz | 16 kHz | 20 kHz |
|-----------|------|-------|--------|--------|--------|--------|
| gain      | 0.944| 1.018 | 0.944  | 0.056  | 0.046  | 0.037  |

The filter takes at most one sample per clock, so a 48 kHz sample rate needs a
clock of at least 48 kHz.

### Interface and timing

| port        | dir | width | meaning                                                  |
|-------------|-----|-------|----------------------------------------------------------|
| `clk`       | in  | 1     | clock, rising edge                                       |
| `rst`       | in  | 1     | synchronous, active high; clears the delay line and outputs |
| `in_valid`  | in  | 1     | `data_in` holds a sample to accept this cycle            |
| `data_in`   | in  | 16    | input sample, two's complement                           |
| `out_valid` | out | 1     | `data_out` holds a new result                            |
| `data_out`  | out | 16    | filtered sample, two's complement                        |
| `saturated` | out | 1     | this result was clipped to the 16-bit range              |

The sample on `data_in` is multiplied by c0 in the cycle it arrives. Its result
appears on `data_out` one clock later, with `out_valid` high. There is no
back-pressure. In a cycle with `in_valid` low the delay line holds, and
`data_out` keeps its last value.

### Parameters

| parameter     | default | meaning                                               |
|---------------|---------|-------------------------------------------------------|
| `APPROX_LSBS` | 8       | number of low bits of every adder built from approximate cells |
| `OUT_SHIFT`   | 16      | right shift from the 37-bit sum to the output         |

`TAPS` (26), `DATA_W` (16), `COEF_W` (16) and the accumulator width `ACC_W`
(37) are package constants.

### Accuracy

Each of the 25 additions is off by less than 2^8. The total error is therefore
below 25 · 2^8 = 6400, which is under 2^16, the weight of one output LSB. So
with the defaults the output never differs from an exactly computed filter by
more than one LSB. In a random test the approximation changed the output in
about 7% of the samples.

## Where this design makes its own choices

The filter specification, the coefficient values, the 16-bit sample width and
the fifth approximate cell come from the published design. The following are
this design's own choices:

- **Tap count.** The specification names a 25-tap filter, but the
  coefficient set it gives has 26 entries. The 26 coefficients are used. The
  first coefficient is taken as `FBF5`, the value that makes the set
  symmetric.
- **Which bits are approximate.** The number of approximate bit positions is
  not specified. Eight was chosen so that every error stays below the output
  bits. Change `APPROX_LSBS` to trade accuracy for switching activity.
- **Structure.** The filter uses a direct form with one multiplier per tap and
  a serial adder chain. The multipliers are exact.
- **Scaling and overflow.** The output is the sum shifted right by 16 and
  saturated.
- **Handshake and reset.** The `in_valid`/`out_valid` handshake, the
  one-cycle latency, the synchronous reset and the `saturated` flag are all
  this design's own.
- **Other cells not built.** Four other approximate cells, with
  intermediate accuracy, exist as alternatives to the fifth one. They are not
  built here.
- **Power is not modelled.** The low-power argument rests on the
  transistor-level cell. The RTL gives only the cell's logic function, so
  power and area figures cannot come from this code. A synthesis tool will
  reduce an approximate bit to plain wiring.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `approx5_fa_tb`: all eight input cases. It also checks the counts of
  four sum errors and two carry errors against an exact adder.
- `mirror_adder_fa_tb`: all eight input cases against `a + b + cin`.
- `approx_adder_tb`: the default 37-bit adder against the closed form above,
  using corner cases and 2000 random pairs. It also checks the `APPROX_LSBS = 0`
  variant (exact) and the all-approximate variant (returns `b`).
- `approx_fir_tb`: the top at its default parameters. A bit-accurate model
  in the testbench checks every output and the one-cycle latency. It
  also checks that the result is within one LSB of exact filtering. The stimulus is,
  in order:
  - reset
  - an impulse, whose response must reproduce the scaled coefficients
  - a step, which must settle at 9437 for an input of 10000
  - a 5 kHz sine, whose gain must be between 0.85 and 1.10 (1.016 measured)
  - a 16 kHz sine, whose gain must be below 0.05 (0.040 measured)
  - sign-matched full-scale inputs, which must drive the output into positive
    and then negative saturation
  - random samples with random idle cycles

  The testbench fails if the approximation never changed an output, or if
  saturation or an idle cycle never happened.

To simulate with Verilator, for example the filter:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/fir_pkg.sv rtl/approx5_fa.sv rtl/mirror_adder_fa.sv \
  rtl/approx_adder.sv rtl/approx_fir.sv tb/approx_fir_tb.sv \
  --top-module approx_fir_tb -o sim
./obj_dir/sim
```

The whole run takes well under a second. The cell testbenches need only their
own module. `approx_adder_tb` needs the two cells and the adder.
