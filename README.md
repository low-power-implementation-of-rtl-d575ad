# QRNS polyphase filter bank

An 8-channel uniform DFT filter bank (polyphase FIR sub-filters followed by an
8-point IDFT) whose arithmetic is done entirely in the **Quadratic Residue
Number System (QRNS)**. The intended use is the frequency demultiplexer of a
satellite transponder: a complex input stream at f_c is split into 8 channels,
each at f_c/8, with a 367-tap complex prototype low-pass filter.

The point of QRNS is that a complex multiplication, which costs four real
multiplications in two's complement, becomes two independent modular
multiplications, and that a wide word is split into several narrow residue
channels that never exchange carries. The price is a conversion into QRNS at
the input and back to binary at the output.

Two complete, independent filter banks are provided and placed side by side in
the top module `qrns_filter_bank_top`:

| bank | module | moduli | outputs |
|---|---|---|---|
| error-free | `qrns_fb_errfree` | {13,17,29,37,41,53,61} everywhere (product ≈ 2^34.9) | exact, 35-bit signed |
| truncated | `qrns_fb_truncated` | {13,17,29,37,41} in the sub-filters, {13,17,29,37,41,53} in the IDFT | sub-filter results cut to 15 bits, 29-bit signed |

Both are programmable: the prototype coefficients are loaded through the
sample input port.

## How QRNS represents a complex number

Every modulus m used here is a prime with m ≡ 1 (mod 4), so the equation
q² + 1 ≡ 0 has a solution q in Z_m (for example q = 5 for m = 13, q = 11 for
m = 61; the design always takes the smallest root). A complex integer
x_R + j·x_I is represented, per modulus, by the pair

    X  = <x_R + q·x_I>_m
    X^ = <x_R − q·x_I>_m

Complex addition is pairwise addition and complex multiplication is pairwise
multiplication: the "X" and "X^" halves form two independent datapaths (the
*X structure* and the *X^ structure*). Back-conversion per modulus is

    x_R = <2⁻¹ (X + X^)>_m,   x_I = <2⁻¹ q⁻¹ (X − X^)>_m

followed by the Chinese remainder theorem over all moduli. A complex constant
c_R + j·c_I is therefore `<c_R + q·c_I>` in the X structure and
`<c_R − q·c_I>` in the X^ structure; the parameter `QS` (+1 / −1) selects
which. For example, multiplying by j is multiplying by q in X and by −q in X^.

All these constants (q, inverses, primitive roots, CRT weights, tables) are
computed at elaboration by the constant functions in `qrns_pkg`, so the
moduli can be changed by editing parameter lists only.

## Data flow of the error-free bank

```
x(n) ─► qrns_bin2qrns ─► qrns_commutator ─► 2 × 7 rns_path ─► qrns_out_serializer ─► y0..y7
        (7 moduli,       (÷8: 8 samples      (per modulus and     (mux, one qrns2bin,
         X and X^)        → 1 frame)          structure: 8 rns_fir  demux)
                                              + rns_idft8)
```

* **Input conversion** (`qrns_bin2qrns`): one register stage, reduces each
  signed component modulo m and forms X and X^ for every modulus.
* **Commutator** (`qrns_commutator`): the 8 down-samplers. Branch p receives
  x[8n − p]: the eight samples of a frame are written newest-first into slots
  0..7 and released together with a one-cycle `frame_valid`, i.e. at f_c/8.
* **RNS path** (`rns_path`): for one modulus and one structure, 8 FIR
  sub-filters E_0..E_7 and one 8-point IDFT. There are 14 of them (7 moduli ×
  2 structures) and they run in lock step.
* **Output** (`qrns_out_serializer`): a single QRNS-to-binary converter
  running at f_c handles the 8 channels of a frame one per clock; the results
  are collected and all eight outputs are loaded at once with `out_valid`.

With the prototype h[0..366] and W = e^{+j2π/8}, the bank computes

    v_p(n) = Σ_t h[8t+p] · x[8(n−t) − p]          (sub-filter E_p, t = 0..45)
    y_k(n) = IDFT_k{ v_0..v_7 } · 256              (see below for the 256)

which equals 256 · Σ_l h[l] x[8n−l] W^{lk}: channel k is the input filtered
by the prototype shifted to frequency k·f_c/8, decimated by 8. 367 taps are
spread over 8 branches of 46 taps; the last tap of branch 7 is always zero.

## Inside a sub-filter: products by index addition

`rns_fir` is a direct-form FIR in one residue channel. Its products use the
**index isomorphism**: with g a primitive root of m, every nonzero residue is
a power g^i, so a·b = g^<i(a)+i(b)>_{m−1}. Samples are converted to
(zero flag, index) once when they enter the delay line, coefficients are
stored in the same form, and each tap needs only a small modular adder on
indices and an exponent table. A zero operand (which has no index) forces the
product to zero through the flag. The 46 tap products are summed as plain
binary numbers (at most 46 × 60) and reduced modulo m once.

Pipeline: delay line → product register → reduced sum, 3 clocks. All stage
registers load only when their stage carries valid data, so the sub-filters
toggle once per frame.

## Inside the IDFT: two tables per butterfly

`rns_idft8` is an 8-point decimation-in-frequency IDFT: 12 butterflies
(`rns_butterfly`) in 3 stages, one register per stage. A butterfly computes
`<(a+b)·C_A>` and `<(a−b)·C_B>`, each multiplication by a constant being a
look-up table filled at elaboration.

The stage-1 twiddles W¹ = (1+j)/√2 and W³ = (−1+j)/√2 are irrational, so
they are quantised as 10-bit signed numbers with 8 fraction bits:
(181 + 181j)/256. To keep one common scale on every path, all stage-1 outputs
are multiplied by a quantised constant — the sum outputs by 256 and the
difference outputs by 256·Wⁿ rounded. Stages 2 and 3 use the exact twiddles
1 and j. Hence the IDFT output is 256 times the true IDFT, with W¹ and W³
approximated; there is no 1/8 normalisation. Outputs are in natural order.

## Output conversion and wrap-around

`qrns2bin` first undoes the QRNS pairing per modulus, then applies the
Chinese remainder theorem with one table per modulus holding
`<r·T_i>_{m_i} · (M/m_i)`, sums the terms and subtracts the largest multiple
of M that fits. Values above (M−1)/2 are returned as negative, so the
result is two's complement in the range ±(M−1)/2. Two register stages.

Because the arithmetic is modular, a result outside ±(M−1)/2 wraps around
rather than saturating. For the error-free bank M ≈ 3.14·10¹⁰; with a real
low-pass prototype this range is ample, but random full-scale coefficients
and data can exceed it.

## The truncated bank

Residues cannot be truncated, so in `qrns_fb_truncated` each branch's
sub-filter output goes through `qrns_trunc_requant` before the IDFT:
QRNS → binary (5 moduli, 24-bit signed result), keep the top 15 bits
(arithmetic shift right by 9, rounding toward −∞, never overflows),
binary → QRNS (6 moduli). This lets the 80 sub-filters use 5 moduli instead
of 7 and the IDFTs 6 instead of 7. The sub-filter results are exact modulo
13·17·29·37·41 = 9 722 453 and wrap outside ±4 861 226; the IDFT of 15-bit
inputs (×256, 8 points) always fits the 6-moduli range, so the outputs are
exactly 256·IDFT{⌊v_p / 512⌋} with the same quantised twiddles.

## Interface and timing

Both banks have the same interface (in the top, prefixed `ef_` and `tr_`):

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | f_c; the f_c/8 parts use the same clock with valid enables |
| `rst_n` | in | 1 | synchronous, active low; clears coefficients and delay lines |
| `in_valid` | in | 1 | a sample (or coefficient) is on `in_re`/`in_im` |
| `in_re`, `in_im` | in | 12 signed | data samples are meant to be 10-bit; coefficients use all 12 bits |
| `load` | in | 1 | one-cycle pulse: the next 367 valid samples are h[0..366] |
| `loading` | out | 1 | high while coefficients are being taken |
| `out_valid` | out | 1 | one-cycle pulse: `y_re`/`y_im` hold a new frame |
| `y_re[8]`, `y_im[8]` | out | 35 / 29 signed | channels y0..y7; held until the next frame |

* One sample per clock is the design rate; `in_valid` may have gaps. A frame
  is 8 valid samples counted from reset or from the end of a load. Load only
  at a frame boundary (a partial frame is discarded when `load` arrives).
* During a load, coefficient k goes to branch k mod 8, tap k div 8. The
  coefficient registers are cleared when the load starts; the delay lines
  keep their contents.
* Latency, from the clock in which a frame's last sample is presented to
  `out_valid`: **18 clocks** in the error-free bank, **22** in the truncated
  bank. Channel 0 passes 11 register stages in the error-free bank (input
  converter, commutator, 3 in the sub-filter, 3 in the IDFT, 2 in the output
  converter, output register); the other channels also wait up to 7 clocks
  for the shared output converter. The truncated bank adds 4 stages.

## Module list

| module | role |
|---|---|
| `qrns_pkg` | moduli, sizes, constant functions (q, inverses, primitive roots, twiddles) |
| `qrns_bin2qrns` | binary → QRNS, any moduli list and input width |
| `qrns_coef_loader` | coefficient-load state machine |
| `qrns_commutator` | input commutator, decimation by 8 |
| `rns_fir` | one sub-filter in one residue channel |
| `rns_butterfly` | modular DIF butterfly with two constant tables |
| `rns_idft8` | 8-point modular IDFT |
| `rns_path` | 8 sub-filters + IDFT for one modulus and structure |
| `qrns2bin` | QRNS → binary by CRT, any moduli list |
| `qrns_out_serializer` | output mux, shared converter, demux |
| `qrns_trunc_requant` | QRNS → binary → 15 bits → QRNS for one branch |
| `qrns_fb_errfree` | error-free bank |
| `qrns_fb_truncated` | truncated bank |
| `qrns_filter_bank_top` | both banks side by side |

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`) that
compares against values computed in the testbench with ordinary integer
arithmetic, and checks the cycle latency stated above. Highlights:

* `tb_rns_fir`: 46-tap sub-filters for m = 61 and 13 with random
  coefficients and data (zeros included) against a direct convolution.
* `tb_rns_idft8`, `tb_rns_path`: against a direct-formula evaluation of the
  quantised IDFT (`tb/tb_idft_ref.sv`).
* `tb_qrns2bin`, `tb_qrns_out_serializer`, `tb_qrns_trunc_requant`:
  round trips over the full signed range, end points included.
* `tb_qrns_fb_errfree`, `tb_qrns_fb_truncated`, `tb_qrns_filter_bank_top`:
  full-size banks; a random full-scale prototype is loaded through the input
  port, ~60 frames are streamed (with gaps), a small-valued prototype is
  reloaded and streaming continues. Every output frame is compared with the
  64-bit complex model in `tb/tb_fb_ref.sv`. The top testbench runs both banks
  at their default sizes.

To run one with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -y rtl -y tb -Irtl \
  --top-module tb_qrns_filter_bank_top rtl/qrns_pkg.sv tb/tb_qrns_filter_bank_top.sv
./obj_dir/Vtb_qrns_filter_bank_top
```

Each testbench prints `TB_RESULT checks=N failures=F`. The full-size top
testbench takes several minutes to build (it elaborates 192 sub-filters of
46 taps) and well under a second to run.

## What is this design's own choice

The structure (moduli sets, two QRNS structures, 8 sub-filters and an IDFT
per residue channel, index-based tap products, two tables per butterfly,
one time-shared output converter, 15-bit truncation between two extra
conversions, coefficient loading through the input port) follows the
published architecture. The following are reconstructions and choices made
here:

* The converters: the input converter uses plain constant-modulus
  remainders, the output converter a table-based CRT. Published designs use
  dedicated converter architectures.
* Input port width of 12 bits, so that 12-bit coefficients can share it with
  10-bit samples.
* IDFT twiddle format (scale 256, 181/256 for 1/√2) and the matching scale on
  the sum outputs; no 1/8 normalisation.
* Polyphase ordering (branch p gets x[8n−p]), coefficient mapping, reset and
  valid handshake, and the exact split into pipeline stages. The error-free
  bank has 11 register stages on the path of channel 0, as in the published
  pipeline, but `out_valid` comes 18 clocks after a frame because of the
  shared output converter. The truncated bank adds 4 stages, following the
  published statement of four extra cycles rather than its table's total
  of 17.
* The 35-bit error-free output: the 7-moduli range is 2^34.87, so 35 bits
  are needed to hold it in two's complement (34 bits are quoted for the
  required range). For the truncated bank the moduli sets are taken as
  printed with the block diagram (ranges 2^23.2 and 2^28.9); the 15 kept bits
  are the top bits of the 24-bit sub-filter result.
* Not provided: the wired-coefficient variants (they need the actual
  prototype coefficients, which are not available) and any area, power or
  timing figures; nothing here has been synthesised to gates or timed.
