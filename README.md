# 8-point combinational FFT

This circuit computes the 8-point discrete Fourier transform

    G[k] = sum_{n=0..7} s[n] * exp(-j*2*pi*n*k/8),   k = 0..7

of eight complex fixed-point samples in a single combinational pass. There
is no clock, no register and no handshake. All eight samples go in on
parallel ports. All eight bins appear on parallel ports one propagation
delay later. The arithmetic is a radix-2 decimation-in-frequency (DIF) FFT:
three stages of butterflies, then a fixed rewiring of the outputs. Only the
two twiddle factors of the form ±0.7071 ± 0.7071j need real multipliers.
The circuit uses six 16 × 10-bit multipliers. Everything else is adders and
subtractors.

The RTL is a SystemVerilog rendering of a small published VHDL design, an
FPGA exercise targeting a Virtex-4 device. It is bit-exact to that design's
arithmetic. The places where it differs are listed under *Departures*.

## Number format

Each real and imaginary part is a 16-bit two's-complement word with 9
fraction bits, so the code `c` stands for `c / 512`:

| value | code |
|------:|-----:|
| 1.0   | `16'h0200` (512) |
| −4.0  | −2048 |
| largest | 32767 (≈ 63.998) |
| smallest | −32768 (−64.0) |

The transform is **unscaled**: `G[0]` is the plain sum of the inputs, and a
bin can be up to 8× larger than the largest input. Every adder keeps 16 bits
and wraps silently. Nothing saturates and nothing flags an overflow. For
wrap-free results, keep `|re| + |im|` of every input sample below 8.0
(code 4096). Larger inputs still give the exact modulo-2^16 result of the
integer arithmetic below, but that result is no longer a useful spectrum.

The constants live in `fft_pkg`: `N = 8`, `DATA_W = 16`, `FRAC_W = 9`,
`TW_W = 10`, `TW_FRAC = 9`, and `TW_C707 = 362` (0.7071 × 512, rounded).

## The flow graph

Stage *m* combines samples that are 8/2^m apart. A butterfly on a pair
`(a, b)` produces the sum `a + b` and the difference `(a − b)`. The
difference is then multiplied by a twiddle factor W. Here `W8 = exp(−j·2π/8)`.

**Stage 1** (`fft_stage1`) works on the pairs `(k, k+4)` for `k = 0..3`:

    s1[k]   =  s[k] + s[k+4]
    s1[k+4] = (s[k] − s[k+4]) · W8^k

| k | W8^k | how it is done |
|---|------|----------------|
| 0 | 1 | plain difference |
| 1 | 0.7071 − 0.7071j | `fft_w8_rotate #(.K(1))`, 4 multipliers |
| 2 | −j | swap real and imaginary parts and negate one: `re = t_im`, `im = −t_re` |
| 3 | −0.7071 − 0.7071j | `fft_w8_rotate #(.K(3))`, 2 multipliers |

**Stage 2** (`fft_stage2`) treats indices 0..3 and 4..7 as two separate
4-point transforms. Within each group, the pairs are `(g, g+2)` and
`(g+1, g+3)`. The second difference is multiplied by `W4^1 = −j`, using the
same swap trick. This stage has no multipliers.

**Stage 3** (`fft_stage3`) is four plain 2-point butterflies on the pairs
`(2m, 2m+1)`.

**Output order.** A DIF FFT delivers its bins in bit-reversed order. Bin `k`
sits at stage-3 position `bitrev3(k)`:

| bin G[k] | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| from s3[·] | 0 | 4 | 2 | 6 | 1 | 5 | 3 | 7 |

`fft_circuitA` does this reordering in its output wiring. It costs no logic.

## The twiddle multiplier, bit by bit

`fft_w8_rotate` is the only part that does more than add. It is also the
only source of rounding error. It computes `y = (a − b) · W8^K`:

1. The difference `t = a − b` is formed in 16 bits, with wrap.
2. The twiddle parts ±0.7071 are the 10-bit constants ±362, with 9 fraction
   bits. Each product is 26 bits wide and has 18 fraction bits.
   - For `K = 1`, four products are formed:
     `re = 362·t_re − (−362)·t_im` and `im = (−362)·t_re + 362·t_im`.
   - For `K = 3`, the shared factor is used, so only two products are needed:
     `re = −362·(t_re − t_im)` and `im = −362·(t_re + t_im)`.
     The inner sum and difference are themselves 16-bit wrapping operations.
3. The result keeps bits `[24:9]` of the 26-bit sum:
   - Dropping the 9 low bits is a floor division by 512, so it rounds toward
     −∞. A product of −1 code times 0.7071 gives −1, not 0.
   - Dropping bit 25 wraps the result to 16 bits.

Two error sources follow from this:

- **Truncation.** Each multiplier output can be off by up to one code,
  always in the negative direction.
- **Twiddle quantisation.** 362/512 = 0.70703 instead of 0.70711, a relative
  error of about 1.1 × 10⁻⁴.

These errors pass through stages 2 and 3 unchanged. A bin's error is
therefore a few codes at most. For the ramp input 1, 2, …, 8, the circuit
returns `G[1] = −4 + 9.65625j`. The exact value is −4 + 9.65685j, so the
difference is 0.3 codes.

The two forms in step 2 give the same result unless an intermediate wraps.
Both are kept because the original design used exactly these forms, and its
synthesis mapped the six products onto six DSP48 slices.

## Interface and timing

`fft_circuitA` (top):

| port | direction | type | meaning |
|------|-----------|------|---------|
| `s_re[0:7]` | in  | `logic signed [15:0]` | real parts of the samples s[n] |
| `s_im[0:7]` | in  | `logic signed [15:0]` | imaginary parts of the samples |
| `G_re[0:7]` | out | `logic signed [15:0]` | real parts of the bins G[k], natural order |
| `G_im[0:7]` | out | `logic signed [15:0]` | imaginary parts of the bins |

The stage modules take and return `cplx_t x[8]` / `y[8]`, where `cplx_t` is
the packed struct `{re, im}` from `fft_pkg`.

Latency is zero cycles. The critical path runs through 4 adders and 1
multiplier:

- the 16-bit difference,
- the 26-bit product and the 26-bit sum of two products,
- the stage-2 adder,
- the stage-3 adder.

To use the circuit in a clocked design, register its inputs and outputs
outside it. The circuit has 512 I/O bits in all. That is more than the 352
user pins of the FPGA package the original was tried on, so as a chip-level
top it cannot be placed there. It is meant as a sub-block.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

`tb/tb_fft_ref_pkg.sv` holds two references:

- **Integer model.** An integer re-implementation of every stage, with the
  same 16-bit wrap and floor-by-512 rules. The stage outputs are compared
  against it bit for bit.
- **Floating-point DFT.** Used for inputs small enough not to wrap. The
  tolerance is 6 codes plus 2 × 10⁻⁴ of the magnitude.

What each testbench covers:

- `tb_fft_w8_rotate`: both K variants.
  - Directed cases: a unit difference gives exactly ±362, and −1 code
    floors to −1.
  - Random operands over the full and the reduced range.
- `tb_fft_stage1/2/3`:
  - zeros, impulses on every input, and the ramp;
  - 3000 random vectors, half of them full-range so that wrapping occurs.
- `tb_fft_circuitA`: the end-to-end test, with all parameters at their
  defaults.
  - The ramp 1..8 must give exactly `36`, `−4 ± 9.65625j`, `−4 ± 4j`,
    `−4 ± 1.65625j` and `−4`. This is the result the original design
    produced.
  - A complex tone `exp(j·2π·k0·n/8)` must peak in bin `k0` for each `k0`.
    This checks the output order.
  - 4000 random vectors.
  - It counts how often twiddle truncation, 16-bit wrap-around and correct
    tone placement occurred. If any of them never occurred, that counts as
    a failure.

To run a testbench with plain Verilator:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/fft_pkg.sv tb/tb_fft_ref_pkg.sv \
        rtl/fft_w8_rotate.sv rtl/fft_stage1.sv rtl/fft_stage2.sv \
        rtl/fft_stage3.sv rtl/fft_circuitA.sv tb/tb_fft_circuitA.sv \
        --top-module tb_fft_circuitA -o sim
    ./obj_dir/sim

Each run takes a few seconds.

## Departures from the original VHDL

- **Ports.** The original has 32 separate ports, `s_re0 … s_im7` and
  `G_re0 … G_im7`. Here they are four unpacked arrays with the same names,
  and the array index replaces the digit suffix. The bit-level behaviour is
  the same.
- **Structure.** The original is one flat architecture. Here the three stages
  and the twiddle multiplier are separate modules, and the butterfly
  operations are package functions.
- **Conflicting comments.** Some comments in the original listing name the
  wrong operands, e.g. "s2(1) = s1(1) + s2(3)" where the code adds `s1(3)`.
  The code was followed in every such case.
- **Testbench.** The original testbench applies one vector and only displays
  the result. The testbenches here are self-checking and much broader. They
  sample outputs 10 ns after each input change, a value chosen for this RTL,
  since the circuit has no clock.
- **Not reproduced.** The original's FPGA results (866 four-input LUTs,
  6 DSP48s, 434 slices on an XC4VFX40-10) belong to the vendor flow. The I/O
  buffers and DSP primitives it maps to are not modelled.

## Files

| file | contents |
|------|----------|
| `rtl/fft_pkg.sv` | format constants, `cplx_t`, butterfly helper functions |
| `rtl/fft_w8_rotate.sv` | constant multiplier by W8^1 or W8^3 |
| `rtl/fft_stage1.sv` | stage 1: (k, k+4) butterflies with W8^k |
| `rtl/fft_stage2.sv` | stage 2: two 4-point groups with −j |
| `rtl/fft_stage3.sv` | stage 3: 2-point butterflies |
| `rtl/fft_circuitA.sv` | top: stages plus bit-reversal output order |
| `tb/tb_fft_ref_pkg.sv` | integer model and floating-point DFT |
| `tb/tb_*.sv` | one self-checking testbench per module |
