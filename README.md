# Walsh-domain signal processing: serial Walsh transform, DSP stage, inverse transform

This RTL takes two sampled signals, x(t) and g(t), one sample of each per strobe. It
moves them into the Walsh domain, combines them there, and returns the result as a serial
signal. Walsh functions only take the values +1 and -1, so the forward transform needs no
multipliers and no butterfly network. Each coefficient is a running sum of the incoming
samples. Each sample is added or subtracted according to one bit of a small counter.
Between the transforms, two signals are added or subtracted coefficient by coefficient.
Multiplying two signals becomes a *dyadic convolution* of their coefficients: a
convolution whose index arithmetic is XOR.

The structure follows the design published by Zulfikar, Abbasi and Alamoud: serial-in,
parallel-out Walsh transforms, a processing block, and a parallel-in, serial-out inverse
Walsh transform. It also follows their word-length rules. The clocking, framing and
streaming are this implementation's own. They are listed in
[Departures and choices](#departures-and-choices).

```
 x ─serial─► walsh_transform ─A[N]─┐
                                    ├─► dsp_unit ─C[N]─► inverse_walsh_transform ─serial─► h
 g ─serial─► walsh_transform ─B[N]─┘      (OP)
```

## Walsh functions from a counter

Sample k of a frame of N samples (N a power of two) has the Walsh sign
ψ(n, k) = (−1)^popcount(n & k) in natural (Hadamard) order. Code +1 as 0 and −1 as 1.
The product of Rademacher functions that defines ψ then becomes an XOR of counter bits.
For N = 4:

| function | W(0) | W(1) | W(2) | W(3)        |
|----------|------|------|------|-------------|
| bit      | 0    | Q(0) | Q(1) | Q(0) ^ Q(1) |

`walsh_circuit` is this counter, advanced by each strobe, plus the XOR network. W(0) is
always +1, so nothing uses it.

## Forward transform (`walsh_transform`)

The transform has one negative circuit (−X), N−1 multiplexers that pick X or −X by
W(n), N data buffers F_n, N accumulators and N output buffers. After a frame:

    A_n = Σ_k x_k · ψ(n, k)        (no 1/N; the inverse transform applies it)

An accumulator (`wt_accumulator`) is an adder and a register. The WI-bit buffer value
reaches the WO-bit adder by repeating its sign bit. On the first sample of a frame the
accumulator loads instead of adding, so frames need no clear cycle. The output buffers
take the finished frame once. They hold it while the next frame accumulates.

Timing, with the strobe high in clock cycle c:

| edge | event                                            |
|------|--------------------------------------------------|
| c+1  | data buffers take ±X                             |
| c+2  | accumulators add                                 |
| c+3  | output buffers take A (last sample of a frame); `a_valid` is high for the next cycle |

Strobes may arrive back to back (one sample per clock) or with any number of idle cycles
between them.

## The processing stage (`dsp_unit`, `dyadic_convolution`)

The operation is fixed at build time by `OP` (`walsh_pkg::dsp_op_e`), because each
operation needs its own word lengths:

| OP        | C_n                          | result h  |
|-----------|------------------------------|-----------|
| `DSP_GEN` | A_n                          | x         |
| `DSP_ADD` | A_n + B_n                    | x + g     |
| `DSP_SUB` | A_n − B_n                    | x − g     |
| `DSP_MUL` | Σ_m A_(n XOR m) · B_m        | x · g     |

The last line is the Walsh product theorem: with unscaled coefficients, the dyadic
convolution equals N · Σ_k x_k g_k ψ(n, k). `dyadic_convolution` computes all N outputs
at once. It uses N² signed multipliers in full precision and keeps the low WIC bits. The
stage is combinational.

## Inverse transform and the missing 1/N (`inverse_walsh_transform`)

Coefficients arrive in parallel and must stay stable for a frame. For each strobe, the
Walsh circuit gives the output position k. Each C_n (n ≥ 1) passes through its own
negative circuit and multiplexer. Data buffers register the chosen values. A chain of
N−1 adders then forms

    S_k = Σ_n C_n · ψ(n, k) = K · h_k,   K = N (GEN, ADD, SUB) or N² (MUL)

Neither transform divided by N, so S_k is K times the wanted sample. The division is pure
wiring. The output buffer drops the low log2 K bits of S_k and keeps the top WOO bits.
For coefficients produced by the forward transforms, the dropped bits are always zero.

The adders are only WIC bits wide, so partial sums can wrap around. This is harmless:
two's-complement addition is exact modulo 2^WIC, and the final sum always fits.

Timing: strobe in cycle c → data buffers at edge c+1 → output buffer at edge c+2.
`h_valid` is then high for one cycle, and `h_count` gives k. The assertion
`c_stable_in_frame` checks that `c` does not change between the strobes of a frame.

## Word lengths

WI is the input sample width; L = log2 N.

| stage                  | width                     | N = 4, WI = 4 |
|------------------------|---------------------------|---------------|
| A, B (WO)              | WI + L                    | 6             |
| C, adders (WIC = WOC)  | GEN: WO; ADD/SUB: WO + 1; MUL: 2(WI − 1 + L) + 1 | 6 / 7 / 11 |
| h (WOO = WIC − log2 K) | GEN: WI; ADD/SUB: WI + 1; MUL: 2WI − 1 | 4 / 5 / 7 |

`walsh_pkg` computes these widths (`wo_bits`, `wic_bits`, `log2k_bits`, `woo_bits`).

**Input range.** These widths are exact for inputs in −(2^(WI−1)−1) … 2^(WI−1)−1, the
symmetric range: −7 … 7 for WI = 4. The value −2^(WI−1) is not supported. The negative
circuit and the data buffers are WI bits wide, so −(−8) is −8 again. For the multiply
build, (−8)·(−8) = 64 would also not fit the 7-bit result. Throughout the symmetric range,
every intermediate value fits its width, and the testbenches exercise the extremes. The
assertion `x_in_range` in `walsh_transform` flags an unsupported sample.

## The streaming system (`walsh_dsp_system`)

Both forward transforms see the same strobe and the same samples. The inverse transform
gets the strobe delayed by `WT_LATENCY` = 2 clocks. This makes it read frame f's
coefficients while frame f+1 is being entered. The delay must be exactly 2: the output
buffers change three edges after a frame's last strobe. With a delay of 2, the inverse
transform's last read of the old frame falls on that same edge and still sees the old
values. Its first read of the new frame comes at least one edge later.

So output sample k of frame f appears 4 clock cycles after the strobe of input sample k
of frame f+1. The first frame after reset yields zeros. To flush the last frame, enter
one more frame, of zeros for example. `coef_valid` marks new A, B, C vectors, which are
brought out as ports.

Worked example (N = 4, WI = 4):

| | 0 | 1 | 2 | 3 |
|---|---|---|---|---|
| x | −6 | −2 | 3 | 7 |
| g | 6 | 6 | 5 | −5 |
| A | 2 | −8 | −18 | 0 |
| B | 12 | 10 | 12 | −10 |
| C = A + B | 14 | 2 | −6 | −10 |
| h = x + g (ADD) | 0 | 4 | 8 | 2 |
| D = A − B | −10 | −18 | −30 | 10 |
| h = x − g (SUB) | −12 | −8 | −2 | 12 |
| E = dyadic convolution of A, B | −272 | 104 | −112 | −296 |
| h = x · g (MUL) | −36 | −12 | 15 | −35 |

The coefficient rows are indexed by n, the signal rows by k.

## Modules and parameters

| file | role | parameters (default) |
|---|---|---|
| `rtl/walsh_pkg.sv` | `dsp_op_e`, width functions, `WT_LATENCY` | — |
| `rtl/walsh_circuit.sv` | counter + XOR Walsh generator | N (4) |
| `rtl/negative_circuit.sv` | −x in the same width | W (4) |
| `rtl/wt_accumulator.sv` | sign-extending accumulator | WI (4), WO (6) |
| `rtl/walsh_transform.sv` | serial-in/parallel-out transform | N (4), WI (4), WO (WI+log2 N) |
| `rtl/dyadic_convolution.sv` | XOR-index convolution | N (4), WA (6), WE (2(WA−1)+1) |
| `rtl/dsp_unit.sv` | GEN / ADD / SUB / MUL stage | OP (DSP_ADD), N, WI, WO, WIC |
| `rtl/inverse_walsh_transform.sv` | parallel-in/serial-out inverse | N (4), WIC (6), LOG2K (log2 N), WOO |
| `rtl/walsh_dsp_system.sv` | top: two transforms, DSP stage, inverse | N (4), WI (4), OP (DSP_ADD) |

All logic runs on `clk` with a synchronous active-low `rst_n`. The design has one clock
and no latches. Synthesised with default parameters, the top is about 107 word-level
cells and 123 flip-flop bits. For other sizes, set N (a power of two), WI and OP on the
top. The widths follow from them.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=… failures=…` and then
calls `$finish`. Build one with plain Verilator, naming the package first:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/walsh_pkg.sv tb/walsh_dsp_system_tb.sv --top-module walsh_dsp_system_tb
    ./obj_dir/Vwalsh_dsp_system_tb

| testbench | what it shows |
|---|---|
| `walsh_dsp_system_tb` | end to end, one build per OP at N=4, WI=4, plus ADD at N=8, WI=5. Checks the worked example, random and extreme frames, idle gaps, back-to-back strobes, exact output and coefficient timing |
| `walsh_dsp_system_full_tb` | the default build untouched: worked example and 59 further frames |
| `walsh_sizes_tb` | forward transforms with N = 4, 8, 16 and 8-bit samples; inverse transforms with N = 4, 8, 16 and 8-bit coefficients |
| `walsh_transform_tb`, `inverse_walsh_transform_tb`, `dsp_unit_tb`, `dyadic_convolution_tb`, `wt_accumulator_tb`, `walsh_circuit_tb`, `negative_circuit_tb`, `walsh_pkg_tb` | each block against an independent model: Hadamard signs from Sylvester's recursion, the product theorem in the signal domain, integer arithmetic |

`walsh_transform_check`, `iwt_check` and `system_check` in `tb/` are reusable
stimulus-and-model harnesses, parameterised by size and operation.

## Departures and choices

These follow the published design:

- the block structure and block counts of both transforms;
- the counter/XOR Walsh circuit and the natural Hadamard order;
- sign extension into the accumulators;
- the word-length rules, including WOC = WIC;
- scaling by dropping low output bits;
- the four operations and their widths.

These are this implementation's own:

- **One clock.** The published circuit clocks the counter, data buffers and accumulators
  from the Enter signal, and the output buffers from a separate clock. Here, `enter` is a
  strobe sampled on `clk`. The accumulators add the data buffer one clock after it was
  loaded.
- **Framing.** The accumulators load on a frame's first sample instead of being cleared.
  Reset is synchronous and active low; the published design does not state a reset.
- **Forward output buffers** load once per finished frame. In the published circuit they
  copy the accumulators on every clock and so show running sums. Loading once per frame
  is what lets the system stream.
- **Inverse transform** has a data buffer for C_0 as well, N buffers in all.
  `h_valid`/`h_count` are added.
- **System sequencing.** The two-clock strobe delay and the one-frame overlap between the
  forward and inverse transforms are this implementation's own.
- **Operation selection** is a build-time parameter. A run-time selectable chip would need
  the widest widths for every operation.
- **Dyadic convolution** is realised as a parallel array of multipliers. The published
  design gives only the operation.
- **Input range** is symmetric, as explained under Word lengths.

Not covered: the published area and speed figures refer to specific FPGA families, and
nothing here reproduces them.
