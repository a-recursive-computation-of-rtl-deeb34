# Recursive 2-D DCT with a cosine-only kernel

This RTL computes the 8×8 two-dimensional discrete cosine transform of image
blocks without the usual row–column split. There is no transposition memory.
The block is folded once into two short 1-D sequences, and each output
coefficient X(k1,k2) then comes out of an N-step second-order recursion. That
recursion needs only four multipliers and three adders, and only cosine
coefficients.

The algorithm and the two datapath architectures follow the thesis *"A
Recursive Computation of the 2-D DCT: Algorithm, Architectures and FPGA
Implementation"* (Shaofeng An). The source leaves several things open: the
number formats, the sequencing, the interfaces, how a recursion starts, and
reset. Those are this design's own choices, and they are listed in
[Departures and own choices](#departures-and-own-choices).

## The idea: fold, then recurse

The transform is

    X(k1,k2) = (2/N) u(k1) u(k2) Σ x(n1,n2) cos((2n1+1)k1π/2N) cos((2n2+1)k2π/2N)

with u(0) = 1/√2 and u(k) = 1 otherwise. Write the product of cosines as a sum
of two cosines. Their arguments are then `(q + c)π/N`, where `q = n1k1 ± n2k2`
is an integer and `c = (k1 ± k2)/2`. Cosine has period 2π and
cos(θ + π) = −cos θ, so every pixel can be moved onto `m = q mod N` with sign
`(-1)^floor(q/N)`. This gives two sequences of length N per output:

    x_a(m) = Σ over pixels with (n1k1 + n2k2) mod N = m   of  ±x(n1,n2)
    x_s(m) = Σ over pixels with (n1k1 − n2k2) mod N = m   of  ±x(n1,n2)

and the whole 2-D transform reduces to two 1-D cosine sums:

    X(k1,k2) = (u(k1)u(k2)/N) · [ Σ_m x_a(m) cos((m + ω+)π/N) + Σ_m x_s(m) cos((m + ω−)π/N) ]
    ω± = (k1 ± k2)/2

This fold is the **pre-addition** (`dct_preadd`). It uses only additions and
subtractions of pixels.

When k1, k2 and N share a factor g, every q is a multiple of g. Only the
samples m·g are then non-zero, and the sequences shrink to M = N/g entries
with π/M and ω± = (k1 ± k2)/(2g) in place of π/N and (k1 ± k2)/2. The
pre-addition takes g as an input, and the top uses it when `CASE2 = 1`.

## The recursive kernel

Each 1-D sum is evaluated by a Goertzel-like second-order recursion
(`dct_kernel`). It runs once per output over the N samples x(0) … x(N−1):

    w(m) = x(m) + ζ·w(m−1) − w(m−2)          ζ = 2cos(π/N)
    y    = η·w(N−1) − κ·w(N−2)               η = cos((ω−1)π/N),  κ = cos(ωπ/N)
    X_ac = ε·y                               ε = −u(k1)u(k2)/N

Its transfer function is (η − κz⁻¹)/(1 − ζz⁻¹ + z⁻²). The impulse response is
h(n) = cos((n+1−ω)π/N), so after the last sample

    y = Σ_m x(m) cos((N − m − ω)π/N) = −Σ_m x(m) cos((m + ω)π/N)

The minus sign is absorbed into ε. This is why ε is negative, and why the two
kernel outputs simply add up to X(k1,k2). Per step the kernel does three
multiplications (ζ, η, κ), plus one with ε at the end, and three additions.
The comparable kernel that also uses sine terms needs six multiplications and
four additions.

The kernel has two registers, w(m−1) and w(m−2). `in_first` makes the kernel
read them as zero, so a new output starts from rest without a separate clear
cycle. `in_last` registers the result, which appears one clock later. The
kernel can hold `LANES` independent recursions, each with its own register
pair, selected per sample by `in_lane`. Architecture-2 uses this.

### Coefficients

All cosines needed for N = 8 are cos(jπ/16) for integer j. `dct_coeff_rom`
holds one period of that table (32 entries), computed at elaboration time with
`$cos`, so no data file is needed. From the table it reads, for each (k1,k2):

| name  | value                     | used as                    |
|-------|---------------------------|----------------------------|
| alpha | cos((k1+k2−2g)π/2N)       | η of the x_a recursion     |
| gamma | cos((k1+k2)π/2N)          | κ of the x_a recursion     |
| beta  | cos((k1−k2−2g)π/2N)       | η of the x_s recursion     |
| delta | cos((k1−k2)π/2N)          | κ of the x_s recursion     |
| zeta  | 2cos(gπ/N)                | ζ of both                  |
| eps   | −u(k1)u(k2)/N             | ε of both                  |

Here g = 1, unless the table is built with `CASE2 = 1`. Then g is the largest
divisor of N that divides both k1 and k2. The table also outputs g (`fold`)
and M = N/g (`seq_len`).

## Two architectures

**Architecture-1** (`dct_arch1`) maps the algorithm directly. Input registers
capture x_a(m), x_s(m) and the coefficient set. Two kernels run side by side:
one on x_a with (alpha, gamma), one on x_s with (beta, delta). An adder forms
X(k1,k2). It takes one sample pair per clock, N clocks per coefficient, and
has a latency of 3 clocks after the last pair.

**Architecture-2** (`dct_arch2`) uses a single kernel for both sums. A control
flip-flop alternates two phases. In the first, multiplexers apply x_a, alpha
and gamma; in the second, x_s, beta and delta. A demultiplexer on the output
holds X_ac1 until X_ac2 arrives, and then the two are added. Each phase is one
clock cycle here, so a recursion step takes two clocks and `in_ready` is high
one clock in two while streaming. The kernel keeps a separate register pair
per phase (`LANES = 2`), so the two interleaved recursions stay independent.
Latency is 4 clocks after the last pair is taken. The trade is about half the
multipliers for half the throughput per clock.

## The complete transform: `dct2d_recursive`

The top wraps one architecture, chosen by `ARCH` (1 by default), with a block
buffer, the pre-addition, the coefficient table and a sequencer.

* **Loading.** `in_ready` is high while the buffer loads. A pixel is taken on
  each clock with `in_valid && in_ready`, in raster order (`n1` rows, `n2`
  columns, `blk[n1*N+n2]`). Gaps in `in_valid` are allowed.
* **Computing.** After the 64th pixel, the sequencer walks (k1,k2) in raster
  order and m = 0 … N−1 within each (M−1 with `CASE2`). Each clock it hands the architecture the
  pre-added pair and the coefficient set. `in_ready` stays low.
* **Results.** `out_valid` pulses once per coefficient, in raster order of
  (k1,k2), with `out_k1`/`out_k2` as tags. There is no output back-pressure.
* **Overlap.** Once the last sample pair of a block has entered the
  architecture, the buffer is free, and the next block starts loading while
  the last results drain.

Timing per block: 64 clocks to load (with no gaps), then 512 clocks
(`ARCH = 1`) or 1024 clocks (`ARCH = 2`) of computing. The last result appears
`1 + STEP·(T−1) + LATENCY` clocks after the last pixel was taken, where T = N³
= 512 is the number of recursion steps per block: 515 (`ARCH = 1`) or 1027
(`ARCH = 2`).

With `CASE2 = 1` the sequencer runs only m = 0 … M−1 for each (k1,k2). That
gives T = Σ N/g = 439 steps per block instead of 512. For example,
X(0,0) then takes one step, and X(4,4) takes two.

Ports (defaults N = 8, IN_W = OUT_W = 12):

| port            | dir | width | meaning                                  |
|-----------------|-----|-------|------------------------------------------|
| clk, rst_n      | in  | 1     | clock, asynchronous active-low reset     |
| in_valid        | in  | 1     | pixel offered                            |
| in_ready        | out | 1     | pixel taken when both are high           |
| in_pixel        | in  | 12    | signed pixel x(n1,n2)                    |
| out_valid       | out | 1     | result valid                             |
| out_k1, out_k2  | out | 3     | index of the result                      |
| out_x           | out | 12    | signed X(k1,k2), rounded and clamped     |
| out_sat         | out | 1     | result was clamped                       |

Parameters:

| parameter | default | meaning                                                   |
|-----------|---------|-----------------------------------------------------------|
| N         | 8       | block size (a power of two)                               |
| IN_W      | 12      | pixel width                                               |
| OUT_W     | 12      | result width                                              |
| SF        | 6       | fraction bits kept in the recursion state                 |
| ARCH      | 1       | 1 = two kernels, 2 = one time-shared kernel               |
| CASE2     | 0       | 1 = shorten sequences to N/g steps when k1, k2, N share g |

## Number formats and accuracy

* Pixels and results are 12-bit two's complement. Coefficients are 12 bits:
  alpha … delta and zeta in Q2.10. eps uses 11 + log2(N) = 14 fraction bits,
  so −1/N lands exactly on the most negative code (`dct_pkg`).
* x_a, x_s are IN_W + 2·log2(N) = 18 bits wide. That is enough even when all
  64 pixels fold onto one m, which happens for k1 = k2 = 0.
* The recursion state adds 2 guard bits, because the gain of the recursion
  1/sin(π/8) is about 2.6. It also keeps SF = 6 fraction bits. Products are
  truncated; the final sum is rounded to an integer.
* The DC term of a full-scale 12-bit block is 8 × 2047, far outside 12 bits.
  Such results are clamped to −2048 … 2047 and flagged on `out_sat`. Pixels of
  8-bit images (level-shifted to −128 … 127) never clamp.
* Accuracy is limited by the 12-bit coefficients. Against the exact transform,
  results are within 2 LSB plus about 1 LSB per 16384 of Σ|x| over the block.
  That is within 2–3 LSB for typical 8-bit content, and up to about 10 LSB for
  a full-scale 12-bit block.

## Departures and own choices

* **Sequence length.** By default every coefficient uses M = N samples. That
  is exact for every (k1,k2), and it gives the fixed N clocks per coefficient
  that the architectures are specified for. The shortening to M = N/g is
  available with `CASE2 = 1`. The source describes it only for non-zero k1
  and k2. This design applies it to every (k1,k2) with a common factor,
  including those with a zero index, and the fold stays exact there.
* **Two-phase clock.** The source runs Architecture-2's two phases in the high
  and low halves of one clock. Here each phase is a full cycle of a single-edge
  clock, and the kernel holds per-phase state.
* **Coefficient routing in Architecture-1** pairs alpha with gamma and beta
  with delta. Only that pairing gives the two cosine sums.
* **Output scale.** ε = −u(k1)u(k2)/N is applied in each kernel. Together with
  the plain adder, this gives X(k1,k2) with the orthonormal scaling of the
  definition above.
* **Own additions.** These are the block buffer, the sequencer, the
  valid/ready interfaces, the registered coefficient sets, the `in_first`
  restart, the output clamping with `out_sat`, and the asynchronous reset.
* **Not built.** The same kernel can compute the inverse DCT, the DST and the
  inverse DST with other pre-additions, and the input can be folded to reach
  fewer cycles. Neither is designed in the source, and neither is here.

## Files

| file                      | contents                                                |
|---------------------------|---------------------------------------------------------|
| `rtl/dct_pkg.sv`          | coefficient type and formats, rounding/clamping helpers |
| `rtl/dct_kernel.sv`       | recursive kernel                                        |
| `rtl/dct_preadd.sv`       | pre-addition (fold of the block onto x_a, x_s)          |
| `rtl/dct_coeff_rom.sv`    | coefficient table                                       |
| `rtl/dct_arch1.sv`        | Architecture-1, two kernels                             |
| `rtl/dct_arch2.sv`        | Architecture-2, one time-shared kernel                  |
| `rtl/dct2d_recursive.sv`  | complete transform (top)                                |
| `tb/tb_*.sv`              | self-checking testbenches, one per module               |

## Simulating

Each testbench checks the results against values it works out itself from the
definitions, prints `TB_RESULT checks=<n> failures=<n>` and stops. For
example, the end-to-end test of both architectures:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        --top-module tb_dct2d_recursive rtl/dct_pkg.sv tb/tb_dct2d_recursive.sv
    ./obj_dir/Vtb_dct2d_recursive

Swap in `tb_dct_kernel`, `tb_dct_preadd`, `tb_dct_coeff_rom`,
`tb_dct_arch1`, `tb_dct_arch2` or `tb_dct2d_full` for the other tests.
`tb_dct2d_full` runs the top at its default parameters over three blocks.
`tb_dct2d_recursive` runs both architectures, each with and without
`CASE2`. It requires each of back-pressure, load/drain overlap, input gaps
and clamping to occur at least once per copy, and shortened sequences in the
`CASE2` copies. All of them finish in well under a second.

What is verified: the kernel against its closed form, including impulse
response, interleaved lanes and latency; the fold against brute force and
against the trigonometric identity it rests on, with and without shortening;
the coefficient table in both forms; both
architectures and the top against a floating-point 2-D DCT; the exact cycle
counts above. Not verified: timing closure or resource use on any FPGA.
