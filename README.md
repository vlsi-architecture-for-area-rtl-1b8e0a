# SEFDM transmitter built from parallel IFFTs

Spectrally efficient FDM (SEFDM) packs N sub-carriers closer together than
OFDM does. The spacing is alpha/T instead of 1/T, with alpha = b/c < 1. The
signal then needs a fraction alpha of the OFDM bandwidth for the same data,
but the sub-carriers are no longer orthogonal. So one N-point IFFT can no
longer generate the signal.

This RTL generates it anyway, using only standard N-point IFFTs. The steps:

- spread the symbols out with zeros;
- run c small IFFTs in parallel;
- rotate and add their outputs.

alpha is chosen at run time from the values b/c with c <= C_MAX. IFFTs a
configuration does not need have their clock gated off.

Defaults: N = 16 sub-carriers, 8-bit I/Q symbols, C_MAX = 4 parallel IFFTs.
One full SEFDM symbol (16 samples) is produced per clock, 9 clocks after its
input.

## The arithmetic the hardware implements

One SEFDM symbol has N time samples:

    X(k) = sum_{n=0}^{N-1} s_n * exp(+j*2*pi*n*k*b/(c*N)),   k = 0..N-1

Build a vector ŝ of length c*N. Put s_n at position n*b and zeros everywhere
else. X(k) is then a cN-point inverse DFT of ŝ, evaluated at k = 0..N-1.
Now split the index of ŝ as p = i + m*c, with row i = 0..c-1 and column
m = 0..N-1:

    X(k) = sum_{i=0}^{c-1} exp(+j*2*pi*i*k/(c*N)) * Y_i(k)
    Y_i(k) = sum_{m=0}^{N-1} ŝ_{i+m*c} * exp(+j*2*pi*m*k/N)

Y_i is an ordinary N-point IFFT of row i of ŝ, read as a c x N matrix in
column-major order. The transmitter therefore has three stages:

1. **Zero insertion and reorder** (`sefdm_reorder`) builds the c rows.
2. **c parallel N-point IFFTs** (`ifft_r22`) produce the Y_i.
3. **Post-processing** (`sefdm_postproc`) computes X(k). For each sample it
   multiplies Y_i(k) by a rotation coefficient from a ROM and accumulates. It
   needs c-1 complex multiply-accumulates (CMACs) per sample, because row 0
   has coefficient 1.

With b = c (alpha = 1) the same hardware produces plain OFDM. Outputs are not
scaled by 1/sqrt(N).

## Dataflow and timing (`sefdm_tx`)

```
in_sym[N] ──► sefdm_reorder ──► ifft_r22 #0 ──┐
 cfg_b,cfg_c    (1 clk)          ifft_r22 #1 ──┤
                                 ifft_r22 #2 ──┼──► sefdm_postproc ──► out_re/out_im[N]
                                 ifft_r22 #3 ──┘     (C_MAX-1 clk)
                                 (5 clk, en = i < c)
```

| stage | latency (defaults) |
|---|---|
| reorder, registered | 1 |
| IFFT: 4 butterfly stages + 1 twiddle stage | 5 (4 with `PRUNE`) |
| CMAC chain | C_MAX-1 = 3 |
| **total `LATENCY`** | **9 (8 with `PRUNE`)** |

Each stage accepts a new set of symbols on every clock. `in_valid` travels
through a shift register and comes out as `out_valid`. The value of c travels
with the data, so the post-processing ROMs are addressed with the c each
symbol was sent with. `busy` is high while any symbol is in flight.

Configuration rules (assertions in `sefdm_tx`):

- 1 <= b <= c <= C_MAX.
- b and c may change only while `busy` is low.
- They must be set at least one clock before the first symbol that uses them.
  Enabling or disabling an IFFT takes effect at once, so a change in flight
  would corrupt symbols already in the pipeline.
- With `PRUNE = 1`, alpha must also be at most 1/2 (2b <= c).
- Symbol components must lie in -127..127. The value -128 is excluded, so the
  +j rotations in the IFFT cannot overflow.

## Zero insertion without a buffer (`sefdm_reorder`)

The sparse c x N matrix is never stored. Each of the C_MAX*N IFFT inputs gets
a multiplexer. Input m of IFFT i shows element p = i + m*c of ŝ. That element
is a symbol only when p is a multiple of b and p/b < N. The multiplexer then
picks s_{p/b}; otherwise it outputs 0 + j0. IFFTs with i >= c get zeros.

Symbols arrive N at a time, and b and c are run-time values. The multiplexer
is therefore an N:1 selection, driven by a small divider and modulo on
b-bit values. For example, with alpha = 2/3 and N = 16, ŝ has 48 entries:
s_t sits at p = 2t, in row 2t mod 3, column 2t div 3. Each IFFT gets about a
third of the symbols, and columns 11..15 of every row are zero.

## The IFFT (`ifft_r22`)

This is a fully parallel, pipelined radix-2^2 decimation-in-frequency IFFT.
N must be a power of 4. The log2 N butterfly stages each combine words a span
h = N/2^(s+1) apart. Radix-2^2 keeps every second stage free of
multipliers:

- Before each odd stage, the last quarter of every 4h-word block is
  multiplied by +j. This is a swap with a negation.
- After each odd stage (except the last), word q*h + n3 of a 4h-word block
  is multiplied by exp(+j*2*pi*bitrev2(q)*n3/(4h)).

For N = 16 that leaves a single stage of constant multipliers between stages
1 and 2. Outputs come out in bit-reversed order and are put back into natural
order by wiring. Every stage and the twiddle multiplier are registered.

**Word growth.** The IFFT does no scaling. Each butterfly stage adds one bit
and each non-trivial twiddle adds one more. A rotation can turn (v, v) into
(0, v*sqrt 2), so the twiddle needs that bit. With 8-bit inputs the output is
8 + 4 + 1 = 13 bits, and nothing can overflow. Twiddles are 10-bit values
with 8 fraction bits, computed at elaboration with `$cos`/`$sin`, and products
are rounded half up.

**Enable and clock gating.** `en` drives a latch-based clock gate
(`clock_gate`) on all internal pipeline registers. While `en` is low they
neither toggle nor burn clock power. The output register stays on the free
clock and is cleared to zero on the first clock with `en` low. A disabled
IFFT therefore adds exactly nothing to the sum in the post-processing. The
latch in `clock_gate` is intentional and is the only latch in the design.

**First-stage pruning (`PRUNE = 1`).** For alpha <= 1/2 every row of ŝ is
zero in its upper N/2 entries: row i has symbols only where
i + m*c <= b*(N-1). Each first-stage butterfly then has one zero input, and
its sum and difference are both just the other input. The whole first
stage, its adders and its register are replaced by wires. This saves
N/2 butterflies and one pipeline register per IFFT and shortens the latency
by one clock. It is a build-time option, because a pruned build cannot run
alpha > 1/2.

## Post-processing (`sefdm_postproc`, `cmac`, `rot_coef_rom`)

Each output sample k has a chain of C_MAX-1 registered CMACs:

    acc_0 = Y_0(k);   acc_i = acc_{i-1} + R_i(k) * Y_i(k)   (one clock each)

Y_i is delayed i-1 clocks so that it meets its partial sum. The coefficient
R_i(k) = exp(+j*2*pi*i*k/(c*N)) comes from a small ROM per (i, k) whose
address is c. Its contents are computed at elaboration (10 bits, 8 fraction
bits), and it returns 0 for rows i >= c. The chain length is fixed, so the
latency does not depend on alpha. Output samples are 14 bits, one more than
the IFFT output, as headroom for rounding.

## Accuracy

The only errors are coefficient quantisation and rounding. Against a
floating-point evaluation of the SEFDM formula, the largest error seen in
simulation is about 4 LSB, on outputs that reach a few thousand LSB. The
testbenches allow 16 LSB end to end.

## Where this RTL departs from, or goes beyond, the architecture it implements

- **Own choices:**
  - C_MAX = 4.
  - Parallel N-symbol input and output, with a valid/busy handshake.
  - All word sizes and the rounding.
  - Asynchronous active-low reset.
  - The pipeline register placement.
  - Accepting b = c (OFDM).
- **IFFT core:** the reference FPGA implementation used a vendor IFFT core.
  Here the radix-2^2 IFFT is written out.
- **Pruning:** the source describes pruning the first stage "up to the first
  complex multiplier" and saving N/2 complex words of storage per IFFT. This
  RTL removes the stage's whole N-word register, because its two halves hold
  identical values.
- **Not built:**
  - Partial pruning of individual half-zero butterflies for other values of
    alpha.
  - The alternative single long IFFT of length N/alpha.
  - The conventional bank-of-oscillators transmitter, which is only the point
    of comparison.
- **Timing:** the reference reports a 4 ns clock on an FPGA. No timing
  analysis was done for this RTL.

## Size

Coarse synthesis at the defaults gives about 3,800 word-level cells and
10,700 flip-flop bits. There are four IFFTs of about 1,760 flip-flop bits
each, 64 complex multipliers in the IFFT twiddle stages and 48 in the CMACs.

## Files

| file | contents |
|---|---|
| `rtl/sefdm_pkg.sv` | `sym_t`, quantised cos/sin and bit-reverse functions |
| `rtl/sefdm_tx.sv` | top level |
| `rtl/sefdm_reorder.sv` | zero insertion / reorder multiplexers |
| `rtl/ifft_r22.sv` | parallel radix-2^2 IFFT with enable and pruning option |
| `rtl/clock_gate.sv` | latch + AND clock gate |
| `rtl/sefdm_postproc.sv` | CMAC chains |
| `rtl/cmac.sv`, `rtl/cmult.sv` | complex multiply-accumulate, complex multiplier |
| `rtl/rot_coef_rom.sv` | rotation coefficient ROM |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_sefdm_tx_full.sv` | end-to-end test of the default build, every alpha with c <= 4 |

`tb_sefdm_tx` runs the default build and a `PRUNE = 1` build side by side
over a sequence of alphas. It counts and requires:

- mode switches;
- switched-off IFFTs holding zero;
- back-to-back symbols;
- idle cycles;
- pruned operation.

Every testbench ends with a line `TB_RESULT checks=<n> failures=<n>`.

## Simulating

Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sefdm_pkg.sv \
          tb/tb_sefdm_tx.sv --top tb_sefdm_tx -o sim
./obj_dir/sim
```

Swap in any other `tb/tb_*.sv` and its module name. Change N (a power of 4),
C_MAX (at least 2) or COEF_W through the top's parameters. Widths and
latency follow automatically.
