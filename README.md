# Roberts cross edge detector with residue-number-system arithmetic

This design finds edges in a grey-scale image stream. It first smooths the
image with a 3 x 3 Gaussian filter and then applies the 2 x 2 Roberts cross
operator. Both kernel computations run in a **residue number system (RNS)**
instead of ordinary binary. A number is held as three small residues, one for
each modulus of the set {2^n-1, 2^n, 2^n+1}. Sums and products of the three
residues are computed separately, with no carries passing between them. So
the widest adder or multiplier in the filters is n+1 bits wide, not the
12 to 18 bits that the same sums need in binary. Binary is used only at the
edges of each RNS stage, where the converters are.

The structure follows a published design of an RNS Roberts cross detector:

- a Gaussian stage followed by a Roberts cross stage;
- RNS modulo adders and multipliers in both stages;
- the moduli set {2^n-1, 2^n, 2^n+1} with n = 4 or 6;
- 8-bit pixels and 256 x 256 images.

That design gives no circuit for any block. The converters, the arithmetic
circuits, the pipeline, the kernel values and the stream interface are this
implementation's own choices. They are listed under "Departures and
limits" below.

## Data flow

```
in_pixel (8 b) ─► forward conv. (n=N_GF) ─► 3x3 window ─► Gaussian, RNS ─► reverse conv.
   ─► >>4 ─► forward conv. (n=N_RCO) ─► 2x2 window ─► Roberts cross Gx²+Gy², RNS
   ─► reverse conv. ─► integer sqrt ─► clamp 255 ─► out_pixel (8 b)
```

| clock | stage | module |
|------:|-------|--------|
| 1 | pixel to residues, registered | `rns_fwd_conv` |
| 2 | 3 x 3 window from two line buffers | `window_gen` (K=3) |
| 3-4 | nine modulo products, then a modulo adder tree, in each channel | `gauss_rns` → `rns_wsum9` ×3 |
| 5 | residues to binary, divide by 16, residues again | `rns_rev_conv`, `rns_fwd_conv` |
| 6 | 2 x 2 window from one line buffer | `window_gen` (K=2) |
| 7-8 | diagonal differences and their squares, then their sum | `rco_rns` |
| 9 | residues to binary, square root, clamp, output register | `rns_rev_conv`, `isqrt` |

An output pixel leaves 9 clocks after the input pixel that completes its
window. It is the gradient magnitude of the smoothed image at that point:

```
S[r][c]  = (sum K[i][j] * P[r+i][c+j]) >> 4       K = [1 2 1; 2 4 2; 1 2 1]
Gx       = S[r][c]   - S[r+1][c+1]
Gy       = S[r][c+1] - S[r+1][c]
out[r][c] = min(255, floor(sqrt(Gx^2 + Gy^2)))
```

Each window drops the image border it cannot cover, so a W x H input gives a
(W-3) x (H-3) output. For 256 x 256 that is 253 x 253.

## The residue number system

With m1 = 2^n-1, m2 = 2^n and m3 = 2^n+1, the three moduli are pairwise
coprime. Every integer in [0, M), where M = m1·m2·m3 = 2^3n - 2^n, has a
unique residue triple. Any result that stays inside [0, M) can therefore be
computed entirely on residues and converted back exactly.

| n | moduli | M | residue bits |
|--:|--------|--:|-------------:|
| 4 | 15, 16, 17 | 4 080 | 4 + 4 + 5 = 13 |
| 6 | 63, 64, 65 | 262 080 | 6 + 6 + 7 = 19 |

The largest values the two stages produce are:

- Gaussian sum: 255 · 16 = 4 080.
- Roberts cross: Gx² + Gy² ≤ 2 · 255² = 130 050.

n = 4 cannot hold either of them. Its range ends at 4 079, so a window of
nine 255s wraps to 0. The defaults are therefore n = 6 for both stages
(`N_GF = N_RCO = 6`). Every arithmetic module and converter also works, and
is tested, at n = 4.

In this code a residue triple travels as one packed word
`{r_hi[n:0], r_mid[n-1:0], r_lo[n-1:0]}` of 3n+1 bits. Here r_lo is the
residue mod 2^n-1, r_mid mod 2^n and r_hi mod 2^n+1.

### Channel arithmetic (`rns_mod_add`, `rns_mod_mul`)

Each modulus has a cheap identity for 2^n, and the circuits are built on it:

| modulus | 2^n ≡ | add | multiply (product = H·2^n + L) |
|---------|-------|-----|-----------------------------|
| 2^n-1 | 1 | n-bit add, carry-out added back in (end-around carry) | L + H with end-around carry |
| 2^n | 0 | n-bit add, carry-out dropped | L |
| 2^n+1 | -1 | (n+1)-bit add, subtract m if ≥ m | L - H, add m if negative |

- **Subtraction.** Mod 2^n-1 it adds the one's complement ~b, which equals m - b. Mod 2^n+1 it adds m back after a negative difference.
- **Zero.** The end-around-carry channel can produce the all-ones pattern, which is a second encoding of 0. It is mapped back to 0, so every residue leaves a module reduced.
- **Timing.** Both modules are purely combinational. The stages around them hold the registers.

### Forward conversion (`rns_fwd_conv`)

The binary input is cut into n-bit digits d0, d1, d2, … (least significant
first):

- **mod 2^n:** d0.
- **mod 2^n-1:** d0 + d1 + d2 + …, folded with end-around carry.
- **mod 2^n+1:** d0 - d1 + d2 - …, folded the same way, then corrected once into [0, 2^n].

An 8-bit pixel has two digits for both n = 4 and n = 6, so each converter is
a few small adders.

### Reverse conversion (`rns_rev_conv`)

This is the least obvious block. It uses mixed-radix conversion specialised
to this moduli set and needs no lookup table and no general multiplier.
Write

```
X = x_mid + 2^n · Z,    0 ≤ Z < (2^n-1)(2^n+1)
```

Because 2^n ≡ 1 (mod 2^n-1) and 2^n ≡ -1 (mod 2^n+1), the residues of Z
follow directly:

```
Z1 = Z mod (2^n-1) = (x_lo  - x_mid) mod (2^n-1)
Z3 = Z mod (2^n+1) = (x_mid - x_hi ) mod (2^n+1)
```

Next, Z = Z3 + (2^n+1)·T with T = (Z1 - Z3)·(2^n+1)^-1 mod (2^n-1). Modulo
2^n-1, the value 2^n+1 equals 2, and the inverse of 2 is 2^(n-1).
Multiplying by 2^(n-1) modulo 2^n-1 is a one-bit right rotation of the n-bit
value. Multiplying T by 2^n+1 is `(T << n) + T`.

The whole converter is therefore:

- three modulo subtractors (one of them on Z3 after it is reduced mod 2^n-1);
- a rotation, which is only wiring;
- two adds.

Its output is `{Z, x_mid}`.

### Why the Roberts cross is computed as Gx² + Gy²

The diagonal differences are signed, but an RNS word has no sign. A negative
difference is simply held as its residue modulo M. Recovering |Gx| would need
RNS sign detection, which is comparatively expensive. Squaring avoids it,
because (−g)² = g². The sum of squares lies in [0, 130 050], inside M at
n = 6, so the reverse converter returns it exactly. The magnitude is then
recovered in binary by a restoring digit-by-digit square root (`isqrt`).

## Interface and timing (`rcd_top`)

| port | dir | width | meaning |
|------|-----|------:|---------|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset (clears control registers only) |
| `in_valid` | in | 1 | `in_pixel` is a pixel of the frame |
| `in_sof` | in | 1 | with `in_valid`: first pixel of a frame; restarts the row/column counters |
| `in_pixel` | in | 8 | grey level, raster order, `IMG_W` pixels per row |
| `out_valid` | out | 1 | `out_pixel` is an output pixel |
| `out_sof` | out | 1 | first output pixel of a frame |
| `out_pixel` | out | 8 | gradient magnitude, raster order, `IMG_W-3` per row |

- **Rate.** One pixel per clock. There is no back-pressure.
- **Gaps.** `in_valid` may drop for any number of clocks between pixels. The gap passes through, and the nine-clock latency does not change.
- **Frame height.** The frame height is not a parameter. Frames end when the next `in_sof` arrives.
- **Reset.** Line buffers and data registers are not reset. Only windows that lie fully inside the current frame are ever marked valid.

Parameters of `rcd_top`:

| parameter | default | meaning |
|-----------|--------:|---------|
| `IMG_W` | 256 | pixels per input row |
| `N_GF` | 6 | n of the Gaussian stage's moduli set |
| `N_RCO` | 6 | n of the Roberts cross stage's moduli set |
| `KERNEL` | 1,2,1,2,4,2,1,2,1 | Gaussian weights, row-major |
| `KSHIFT` | 4 | log2 of the kernel sum, the normalising shift |

- Storage is two line buffers of `IMG_W` × 19 bits and one of `IMG_W-2` × 19 bits: 14 554 bits at the defaults.
- If you change `KERNEL`, keep 255 · sum(KERNEL) below M of `N_GF`, and set `KSHIFT` to match.

## Files

| file | contents |
|------|----------|
| `rtl/rns_pkg.sv` | channel-kind enum, modulus and width functions |
| `rtl/rns_mod_add.sv`, `rtl/rns_mod_mul.sv` | one-channel modulo adder/subtractor and multiplier |
| `rtl/rns_fwd_conv.sv`, `rtl/rns_rev_conv.sv` | binary ↔ residue converters |
| `rtl/rns_wsum9.sv` | nine-tap constant-weight sum in one channel |
| `rtl/gauss_rns.sv` | Gaussian filter, three channels |
| `rtl/rco_rns.sv` | Roberts cross Gx² + Gy², three channels |
| `rtl/window_gen.sv` | line buffers and K x K register window |
| `rtl/isqrt.sv` | combinational integer square root |
| `rtl/rcd_top.sv` | the detector |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a watchdog that ends a hung run as a failure. To run one with
Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/rns_pkg.sv tb/tb_rcd_top.sv --top-module tb_rcd_top
./obj_dir/Vtb_rcd_top
```

What the testbenches cover:

- **Arithmetic units and converters.** Checked exhaustively at n = 4 and n = 6:
  - every operand pair of each channel;
  - every 8-bit input, and every 12-bit input at n = 4;
  - every value of the dynamic range for the reverse converter;
  - every 18-bit radicand for the square root.
- **Filter stages.** The Gaussian and Roberts cross stages are checked on random and extreme windows against integer arithmetic. This includes their two-clock latency, the largest sums and negative differences.
- **Window generator.** Checked for contents, border handling, `out_sof` and idle clocks.
- **Detector (`tb_rcd_top`).** It runs the detector at its default parameters on two 256 x 256 frames, one of noise and one of a synthetic scene, with random idle clocks. An integer model predicts the output. The bench compares every output pixel, `out_sof`, the 253 x 253 frame size and the nine-clock latency of every pixel. It also requires that idle clocks, a frame restart and negative gradients each occurred. It finishes in a few seconds.

## Departures and limits

- **Word length.** The source design names n = 4 and n = 6. Here both stages default to n = 6, because n = 4 cannot hold either stage's range (see above).
- **Kernel.** The Gaussian kernel is the binomial 3 x 3 kernel with sum 16. Normalisation truncates, and it is done in binary between the two RNS stages. This costs one reverse and one forward conversion there.
- **Magnitude.** The output is floor(sqrt(Gx² + Gy²)), not |Gx| + |Gy|. No threshold is applied: the output is the gradient magnitude, not a binary edge map.
- **Clamp.** With the default kernel the magnitude cannot exceed about 180, so the clamp to 255 never acts. It matters only for sharper kernels.
- **Median stage.** A median (reordering) stage appears in general descriptions of such detectors. It is not part of this pipeline.
- **Critical path.** Stage 9 holds a reverse converter followed by a nine-step combinational square root, and is the longest path. Stage 5 holds two converters. Both could be split into more pipeline stages without changing the function; the latency would then grow accordingly.
- **Not reproduced.** The source design was evaluated against a binary (positional) version for frequency, area and power in a 180 nm library. That comparison and the binary version are not part of this RTL. Nothing here reproduces those figures.
