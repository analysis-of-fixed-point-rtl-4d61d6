# Fixed-point vs floating-point memory-based FFT

This RTL implements a 64-point radix-2 FFT twice, once in fixed point and once
in a small custom floating-point format. It was built to show how the number
format affects area and accuracy. The FFT is the cheapest kind there is: one
butterfly, one data memory and an address counter. The butterfly works through
all six stages in place, one butterfly per clock. Because the same adders,
multipliers and memory serve every stage, the word length cannot grow from
stage to stage. Every operator returns a result as wide as its inputs,
truncated and saturated. So the number format alone decides how much
quantization noise the transform adds and how much dynamic range it has.

The two default formats are the shortest of each kind that keep the
transform's signal-to-quantization-noise ratio (SQNR) above 40 dB, which is
about 1 % error vector magnitude. The input is complex Gaussian noise that
peaks at 9 % of full range.

| core | word | format | dynamic range |
|------|------|--------|---------------|
| fixed point | 14 bits | S0.13: sign + 13 fraction bits, two's complement | 78 dB |
| floating point | 13 bits | 2-bit encoded exponent + 11-bit two's complement mantissa | 78 dB |

The two formats split the cost differently. A floating-point adder is larger
than a fixed-point one, because it must align and renormalise. A
floating-point multiplier is smaller, because it multiplies only the short
mantissas. The study's 12 nm synthesis estimates, for six adders, four
multipliers and the 64-word memory:

| format | adder | multiplier | FFT total |
|--------|-------|------------|-----------|
| fixed point, 14 bits | 55 µm² | 168 µm² | 1292 µm² |
| floating point, 2+11 bits | 76 µm² | 137 µm² | 1277 µm² |

At the 40 dB target the two are practically equal. The study found that
floating point pulls ahead once more than about 100 dB of dynamic range is
needed, which takes 3 or more exponent bits. With 4 exponent bits, fixed
point at the same dynamic range needed about twice the area.

Everything is parameterised, so any other word length can be built. The
sweep testbench builds and checks all 16 fixed-point and 33 floating-point
formats of the study.

## The number formats

Both formats cover roughly [-1, 1). A complex word is packed `{re, im}`.

**Fixed point, S0.(WL-1).** This is a plain two's complement fraction:
value = code / 2^(WL-1), from -1 to 1 - 2^-(WL-1).

**Floating point, `{e, M}`.** The word holds an EW-bit exponent field `e` and
an MW-bit mantissa `M`:

```
  [EW+MW-1 : MW]  e   unsigned, stands for the exponent -e (0, -1, ... -(2^EW-1))
  [MW-1 : 0]      M   two's complement fraction, sign included, MW-1 fraction bits
  value = M * 2^-e
```

The exponent is never positive, so it needs no sign bit. Data in a
normalised-signal FFT stays below 1 in magnitude, and this encoding saves the
bit a signed exponent would spend on values above 1. The mantissa is two's
complement rather than sign and magnitude. Adders then need no sign
comparison, and multipliers need no XOR sign logic.

- **Normalisation.** The exponent is chosen so that |M| lies in [0.5, 1).
  This is e = -(floor(log2|v|) + 1).
- **Gradual underflow.** When that would need e > 2^EW-1, the exponent stops
  at 2^EW-1 and M is left unnormalised. The mantissa then behaves like a fixed
  point number, which extends the dynamic range down to 2^-(2^EW-1+MW-1). With
  EW = 2 and MW = 11 that is 2^-13, or 78 dB. A result that truncates to 0
  here is flushed to zero.
- **Zero** is encoded as M = 0, e = 2^EW-1. Every operator produces exactly
  this encoding for a zero result.
- **Saturation.** A result of magnitude 1 or more would need e < 0. It becomes
  M = 1 - 2^-(MW-1) or M = -1, with e = 0.

**Rounding is truncation toward zero in both formats.** It is not the
drop-the-LSBs truncation that two's complement hardware gives for free. For
negative results the two differ by one LSB. The choice matches the reference
quantizer the formats were evaluated with, so the hardware reproduces those
results bit for bit.

## Arithmetic operators

Every operator computes its result exactly, then quantizes it once, to the
input format.

- `fxp_add` adds or subtracts with one extra integer bit, then saturates.
  The parameter `SUB = 1` makes it a subtractor.
- `fxp_mul` takes the exact 2·WL-bit product and truncates it toward zero.
  The only overflow is (-1)·(-1), which saturates.
- `flp_add` compares exponents and shifts the smaller operand's mantissa right
  by the difference. It first appends 2^EW-1 guard bits, so no bit is lost.
  It then adds the two mantissas in two's complement.
- `flp_mul` adds the exponents with a carry bit and multiplies the mantissas
  exactly.
- `flp_normalize` is shared by both floating-point operators. It finds the
  leading one, picks the exponent, clamps for gradual underflow or
  saturation, and truncates the mantissa.
- `fxp_quantize` does the same job for fixed point.
- `arith_add` and `arith_mul` select the fixed- or floating-point operator
  from an `arith_e` parameter. This lets the complex multiplier, butterfly
  and FFT core be written once for both formats.

Each operator has `sat` and `ufl` flags. They report saturation and gradual
underflow; `ufl` is always 0 in fixed point.

## Butterfly and complex multiplier

`cmul` forms (a+ib)(c+id) = (ac-bd) + i(ad+bc) from four multipliers, one
subtractor and one adder. `butterfly` is the radix-2 decimation-in-time
butterfly:

```
t  = W * X1
Y0 = X0 + t
Y1 = X0 - t
```

It uses four multipliers and six adders. The twiddle multiplication comes
before the add/subtract.

**Twiddle bypass.** When the twiddle index is 0, W = 1. That value cannot be
represented in a [-1, 1) format, so the multiplier is bypassed and X1 goes
straight to the adders. This happens in 63 of the 192 butterflies of a
transform.

`twiddle_rom` holds W_64^k = cos(2πk/64) - i·sin(2πk/64) for k = 0..31. The
table is computed at elaboration with `$cos`/`$sin` and quantized with the
same truncation as the data.

## The memory-based schedule

`fft_core` is the complete FFT. Its data memory, `fft_mem`, holds N complex
words. It has two asynchronous read ports and two synchronous write ports, so
each clock one butterfly's operands are read, computed combinationally, and
written back to the same two addresses. `fft_addr_gen` counts stages s = 0..5
and butterflies j = 0..31:

```
half   = 2^s
addr0  = (j / half) * 2*half + (j mod half)
addr1  = addr0 + half
tw_idx = (j mod half) * N / (2*half)
```

Input sample i is stored at the bit-reversed address of i, so the transform
ends in natural order. One transform goes through three phases:

| phase | clocks | what happens |
|-------|--------|--------------|
| LOAD | ≥ 64 | `in_ready` = 1; each accepted sample is written to its bit-reversed address |
| COMPUTE | exactly 192 = (N/2)·log2 N | one butterfly per clock; `in_ready` = 0 |
| UNLOAD | ≥ 64 | `out_valid` = 1; bins 0..63 in natural order; `out_last` on bin 63 |

COMPUTE starts on the clock after the last sample is accepted. The first
output is valid exactly 192 clocks after that acceptance edge. The core cannot
take new input while it computes or unloads; a streaming system would need an
input buffer in front of it.

**Status flags.** `sat_seen` and `ufl_seen` report whether any operator
saturated or underflowed gradually during the transform being unloaded. They
are cleared when the next transform starts computing.

**Headroom.** The word length is fixed and an FFT output can be up to 64
times its input, so the caller must leave headroom. The testbenches fail if any
Gaussian transform peaking at 9 % of full range saturates.

## Top level

`fft_top` places the fixed-point core (`fxp_*` ports, 2×14-bit words) and the
floating-point core (`flp_*` ports, 2×13-bit words) side by side. They share
only `clk` and the synchronous active-low reset `rst_n`.

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 64 | FFT points (power of two) |
| `FXP_WL` | 14 | fixed-point word length |
| `FLP_EW` | 2 | floating-point exponent bits |
| `FLP_MW` | 11 | floating-point mantissa bits, sign included |

## Accuracy

Every testbench compares the hardware bit for bit with a reference. The
reference is written with real numbers: it applies the exact operation, then
truncates toward zero via `$rtoi` and saturates. It shares no code with the
RTL. The FFT testbenches also measure SQNR against a double-precision DFT of
the unquantized input. The input is Gaussian with σ = 0.02, clipped at 0.09.
Results for the default formats (16 transforms each), with the published
values for the same formats:

| format | measured SQNR | published SQNR |
|--------|---------------|----------------|
| fixed point S0.13 | 46.0 dB | 44.3 dB |
| floating point 2+11 | 43.4 dB | 42.5 dB |

The sweep uses 16 transforms per format; the published study used 5000. It
follows the published SQNR curve over all 49 formats, about 6 dB per added
bit. Differences from the published values:

- 3 and 4 exponent bits: within 0.4 dB.
- 2 exponent bits: 0.6–1.3 dB higher.
- Fixed point: 1.2–1.8 dB higher.

The offset most likely comes from the input level. Here σ is set so that 9 %
of full range is 4.5σ. The published input was scaled down until 5000 runs
showed no overflow, and its level relative to the noise is not stated. One
consequence: measured here, fixed-point S0.12 (13 bits) just reaches 40 dB
(40.1 dB). Its published value is 38.3 dB, below the target.

The sweep also measures SQNR against a second reference. That reference takes
the exact DFT of the already-quantized input and quantizes the result to the
same format. It excludes the input's own rounding noise, so it isolates the
noise added inside the FFT. For the default formats this gives 52.7 dB
(fixed point) and 48.9 dB (floating point); the published values are 49.3 and
46.7 dB. The pattern matches the first comparison, with larger offsets:

- 3 and 4 exponent bits: within 0.6 dB.
- 2 exponent bits: 1.7–3.0 dB higher.
- Fixed point: 2.8–3.9 dB higher.

This second comparison is checked with a 5 dB tolerance.

## Where this RTL departs from or adds to the study

- **Timing.** The butterfly, memory read and twiddle lookup form one
  combinational path. This gives one butterfly per clock and 192 clocks per
  transform, but no pipelining was done and no timing target was set. The
  study synthesized its single operators at 833 MHz in a 12 nm library. The
  whole read-compute-write path is much longer than one operator, so reaching
  such a clock would take pipeline registers. Those would add hazard handling
  between stages.
- **Where rounding happens.** The study's software model rounds the twiddle
  factor and the butterfly outputs. Its hardware estimate assumes adders and
  multipliers of the data word length. This RTL follows the hardware: each of
  the ten operators rounds its own result, so one butterfly rounds up to
  three times on a path. Every SQNR figure above includes these extra
  roundings. Their share cannot be separated from the input-level offset.
- **Memory.** The memory is a register array with 2 read and 2 write ports.
  The study estimated its area from a memory macro.
- **Full-precision outputs.** The study also describes operators whose output
  grows to keep full precision: one bit for a fixed-point add, twice the bits
  for a multiply, and the 2N+1-bit complex product. Its FFT does not use them,
  and they are not built.
- **Behaviour not specified by the study.** The valid/ready handshakes,
  `out_last`, the status flags, the reset and the zero encoding are choices
  made here. The exponent sits above the mantissa, as in the study's generic
  floating-point layout. The sign bit moves from the top of the word into the
  two's complement mantissa.
- **Operator structure.** The study's block diagrams show sign + magnitude
  mantissas, with the product sign formed by an XOR. It names two's
  complement as an equivalent option with no separate sign handling, and
  that is what is built here.

## Simulating

All testbenches are self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fft_pkg.sv tb/tb_ref_pkg.sv tb/tb_fft_top.sv --top-module tb_fft_top -o sim
obj_dir/sim
```

Substitute any other testbench for `tb_fft_top`:

| testbench | covers |
|-----------|--------|
| `tb_fxp_add`, `tb_fxp_mul`, `tb_flp_add`, `tb_flp_mul` | the operators, random and corner operands; the floating-point ones at two formats each |
| `tb_cmul`, `tb_butterfly`, `tb_twiddle_rom` | both formats |
| `tb_fft_mem`, `tb_fft_addr_gen` | memory ports; address sequence and 192-cycle count |
| `tb_fft_core` | both cores: 12 transforms each, overdriven and tiny inputs included |
| `tb_fft_top` | the top at its default parameters: 24 transforms per core; counts every mechanism (bypass, stalls, backpressure, saturation, underflow) and fails if one never happened |
| `tb_sqnr_sweep` | all 49 formats of the study, bit-exact; SQNR against both published references (±3 dB and ±5 dB) |

`tb/fft_stream_drv.sv` is the shared stimulus and checking engine for the FFT
testbenches. `tb/tb_ref_pkg.sv` is the reference arithmetic. The sweep builds
49 cores and takes one to two minutes to compile; every run finishes in
seconds.

## Files

`rtl/`:

- `fft_pkg.sv`: the `arith_e` format type and word-width helper.
- Operators: `fxp_quantize.sv`, `fxp_add.sv`, `fxp_mul.sv`,
  `flp_normalize.sv`, `flp_add.sv`, `flp_mul.sv`, `arith_add.sv`,
  `arith_mul.sv`.
- Datapath: `cmul.sv`, `butterfly.sv`, `twiddle_rom.sv`.
- Memory and control: `fft_mem.sv`, `fft_addr_gen.sv`.
- Cores: `fft_core.sv`, `fft_top.sv`.
