# 5/3 lifting wavelet transform processors (2-D DWT and IDWT)

This is a pair of streaming processors for one level of the two-dimensional
5/3 (LeGall) discrete wavelet transform, the reversible transform of
JPEG 2000. The forward processor takes an N x N image and splits it into the
four subbands LL, LH, HL and HH. The inverse processor puts them back
together. Each processor is pipelined and moves **two values per clock** in
and out. It needs no multiplier, because the two lifting constants
(alpha = -1/2 and beta = 1/4) are shifts. Each processor uses only **four
adder-and-shift processing elements**, and every one of them does useful
work on every cycle of a frame.

For more decomposition levels, feed the LL subband back into the forward
processor with half the image size. Nothing is lost on the way: the inverse
processor rebuilds the original pixels bit for bit.

## The arithmetic

The 1-D lifting transform of a sequence x splits it into a high-pass half H
and a low-pass half L:

    H(j) = x(2j+1) + alpha * (x(2j) + x(2j+2))        predict, PE(alpha)
    L(j) = x(2j)   + beta  * (H(j) + H(j-1))          update,  PE(beta)

In the integer form used here:

    PE(alpha):  y = a - ((b + c) >>> 1)
    PE(beta):   y = a + ((b + c + 2) >>> 2)

The inverse PEs subtract what the forward PEs add, in the reverse order. So
the inverse reproduces the forward rounding exactly, and reconstruction is
lossless. At the edges, the missing neighbours are mirrored:
x(N) = x(N-2) and H(-1) = H(0).

The 2-D transform first applies the 1-D transform to every row, giving
L(r,j) and H(r,j). It then applies it down every column of both halves:

    HH(i,j) = H(2i+1,j) + alpha*(H(2i,j) + H(2i+2,j))
    HL(i,j) = H(2i,j)   + beta *(HH(i,j) + HH(i-1,j))
    LH(i,j) = L(2i+1,j) + alpha*(L(2i,j) + L(2i+2,j))
    LL(i,j) = L(2i,j)   + beta *(LH(i,j) + LH(i-1,j))

All coefficients are 16-bit two's complement (`dwt53_pkg::COEF_W`). That is
ample for 8-bit pixels over many levels.

## Forward processor (`dwt53_core`)

```
 pixel pairs          (L,H) per clock            (HL,HH) / (LL,LH) per clock
 x(r,2j),x(r,2j+1) -> dwt53_hf ------------------> dwt53_vf -------------------->
                      PE(alpha) -> PE(beta)        PE(alpha) -> PE(beta)
                      1 pending pair               7 line buffers (3.5N words)
```

### Horizontal filter (`dwt53_hf`)

One pixel pair (x(2j), x(2j+1)) arrives per clock. H(j) also needs
x(2j+2), which arrives with the next pair. The filter therefore holds one
pair back. When pair j arrives, PE(alpha) and then PE(beta) complete
pair j-1. The mirror at the right edge needs no new sample, so the last pair
of a row is completed by the first pair of the next row. Rows therefore
follow each other with no bubble. After the last pair of a frame, a
one-cycle flush completes the held pair.

### Vertical filter (`dwt53_vf`): the central trick

The row stream delivers one L and one H value per clock. Across two image
rows, the H half needs M = N/2 predict steps and M update steps, and so does
the L half. That is one alpha step and one beta step per clock on average.
So the filter has **one PE(alpha) and one PE(beta), shared by the two
halves** and alternated row by row:

| row arriving | PEs work on | output beats (one per column) |
|---|---|---|
| 0, 1 | (stored only) | none |
| 2i+2 (even) | H stream of row pair i: HH(i) from H(2i), H(2i+1) and the arriving H(2i+2); then HL(i) | (HL(i,j), HH(i,j)), `PASS_H` |
| 2i+3 (odd) | L stream of row pair i, all from stored rows: LH(i), then LL(i) | (LL(i,j), LH(i,j)), `PASS_L` |
| flush E1 | H stream of the last pair, with H(N) mirrored to H(N-2) | `PASS_H` row M-1 |
| flush E2 | L stream of the last pair | `PASS_L` row M-1 |

The L work runs one row later than the H work, so the L half needs one more
stored row than the H half. That is seven line buffers of M words, 3.5N
words in all:

| buffer | holds | written |
|---|---|---|
| `h_even` | H(2i) | rows 0 and 2i+2 |
| `h_odd` | H(2i+1) | odd rows |
| `hh_prev` | HH(i-1) | even rows >= 2 |
| `l_even` | L(2i) | row 0; odd rows >= 3 (copied from `l_new`) |
| `l_odd` | L(2i+1) | odd rows |
| `l_new` | L(2i+2) | even rows >= 2 |
| `lh_prev` | LH(i-1) | odd rows >= 3 |

Each buffer is read and rewritten at the current column (`line_buffer`:
asynchronous read, synchronous write, old value on read-during-write). For
the first row pair, the update uses the fresh HH or LH value twice, which
is the mirror HH(-1) = HH(0).

Because the bottom edge is mirrored, the last row pair needs no more input.
After the last image row, the filter runs two rows' worth of cycles on its
own (`busy`), and the core holds `in_ready` low meanwhile.

## Inverse processor (`idwt53_core`)

```
 (HL,HH) / (LL,LH)       (L,H) per clock, rows in order      pixel pairs
 ------------------> idwt53_ivf -------------------------> idwt53_ihf ------->
                     PE(beta) -> PE(alpha)                 PE(beta) -> PE(alpha)
                     5 line buffers (2.5N words)           1 pending pair
```

The input order is the forward processor's output order, so the two can be
wired together directly. Each subband row i comes as M beats (HL, HH)
followed by M beats (LL, LH).

### Inverse vertical filter (`idwt53_ivf`)

While the (HL, HH) beats of subband row i arrive, the filter does two
steps. PE(beta) forms H(2i) = HL - beta(HH(i) + HH(i-1)). PE(alpha) then
forms H(2i-1) from HH(i-1), H(2i-2) and the new H(2i). The (LL, LH) beats
do the same for L. The output must pair L and H of the same row, with rows
in order:

* during the H beats of subband row i, row 2i-2 leaves. Both of its halves
  come from storage.
* during the L beats, row 2i-1 leaves. Its L half was just computed; its H
  half was stored a beat row earlier.

After the last input, two flush beat rows emit rows N-2 and N-1, using the
mirror H(N) = H(N-2). The storage is `hh_prev`, `h_even`, `h_odd`,
`lh_prev` and `l_even`: five buffers of M words.

### Inverse horizontal filter (`idwt53_ihf`)

This mirrors the forward horizontal filter. PE(beta) rebuilds x(2j) from the
arriving (L(j), H(j)). PE(alpha) then completes the held pair's odd sample
x(2j-1), which needs the new x(2j). A one-cycle flush ends the frame.

## Interfaces and timing

The top level, `dwt53_top`, puts the two processors side by side. They share
only `clk` and the asynchronous active-low `rst_n`.

| signal | forward (`dwt_`) | inverse (`idwt_`) |
|---|---|---|
| `cfg_m` | pairs per row = width/2, sampled with the first pair of a frame | columns per subband row |
| `in_valid` / `in_ready` | pixel pair handshake | subband beat handshake |
| input data | `in_even` = x(r,2j), `in_odd` = x(r,2j+1) | `in_lo` = HL then LL, `in_hi` = HH then LH |
| `out_valid` | one beat per cycle, no back-pressure | one pixel pair per cycle, no back-pressure |
| output data | `out_pass` (`PASS_H`/`PASS_L`), `out_row` i, `out_col` j, `out_lo` (HL/LL), `out_hi` (HH/LH) | `out_row` r, `out_col` j, `out_even`, `out_odd` |
| `frame_done` | high with the last beat of a frame | high with the last pair |

* Inputs may pause at any time. A paused input only stretches the frame.
* A frame of an N x N image takes N²/2 cycles to enter.
* The forward processor's last subband beat leaves **N + 3** cycles after the
  last input pair. The inverse processor's last pixel pair also leaves
  N + 3 cycles after its last input beat.
* `in_ready` is low for those N + 3 cycles, so frames do not overlap.
* Sample data are signed 16-bit. Apply pixels zero-extended.
* `cfg_m` can be any value from 1 to N/2, so the image may be smaller than N
  x N. This is how multi-level transforms reuse the processor.
* Results leave in their own order, not in raster subband order. Each
  forward beat carries its subband row and column. The inverse output comes
  out in raster order.

For one level of a gap-free 512 x 512 frame, the forward processor takes
131,587 cycles from the first input to the last subband. The analytical
figure (4N²(1-4^-j) + 9N)/6 that motivates this architecture gives 131,840
for j = 1.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` (all cores and filters) | 8 | largest image side. The line buffers hold N/2 words. The default is the 8 x 8 size of the reference implementation. |
| `dwt53_pkg::COEF_W` | 16 | coefficient width |
| `line_buffer.DEPTH` | 4 | words per line buffer (N/2) |
| `pe_alpha.INVERSE`, `pe_beta.INVERSE` | 0 | 1 selects the inverse lifting step |

To process a 512 x 512 image, instantiate `dwt53_top #(.N(512))`.

## Where this design makes its own choices

The architecture follows a published lifting design: horizontal filter,
then vertical filter; four PEs per processor; one shared PE pair in the
vertical filter; 3.5N words of forward line storage; 100 % PE use. The
points below are this implementation's own, or depart from that design:

* **Rounding.** The reference design quantises the coefficients and reports
  a lossy fixed-point result (about 44 dB PSNR on a 512 x 512 photograph).
  This design uses the reversible integer form above, so the round trip is
  exact.
* **Edges.** Symmetric extension, as in JPEG 2000. The reference does not
  specify its edge rule.
* **Word width, handshakes, reset and the output order** are this design's
  choices.
* **Pipelining.** Within each filter, PE(alpha) and PE(beta) are chained
  combinationally in one cycle, and the result is registered. The
  reference's finer pipelining is not reproduced. Its latency figure
  (N²/2 + 1.5N for one level) differs from this design's
  N²/2 + N + 3.
* **Inverse storage.** The inverse vertical filter uses 2.5N words of line
  storage. The reference quotes 2N + 15 registers and ten multiplexers for
  the whole inverse processor. The schedule that saves the extra half line
  is not reproduced.
* **PE(alpha/beta).** The reference mentions a processing element that can
  do either lifting step. In this schedule, each filter needs exactly one
  alpha step and one beta step on every cycle, so only fixed PEs are used.
* **Multi-level control.** Levels are sequenced outside the processors. The
  LL subband of one level (N²/4 words) is stored externally and sent back
  with `cfg_m` halved. Neither design counts that frame store in its line
  storage.
* **Frame overlap.** There is none: the N + 3 flush cycles at the end of a
  frame are not overlapped with the next frame.

## Files

| file | contents |
|---|---|
| `rtl/dwt53_pkg.sv` | coefficient type, lifting shift constants, `pass_e` |
| `rtl/pe_alpha.sv`, `rtl/pe_beta.sv` | lifting processing elements (forward/inverse) |
| `rtl/line_buffer.sv` | column-addressed line delay |
| `rtl/dwt53_hf.sv`, `rtl/dwt53_vf.sv`, `rtl/dwt53_core.sv` | forward processor |
| `rtl/idwt53_ivf.sv`, `rtl/idwt53_ihf.sv`, `rtl/idwt53_core.sv` | inverse processor |
| `rtl/dwt53_top.sv` | both processors side by side |
| `tb/dwt53_ref_pkg.sv` | reference model: 1-D/2-D forward and inverse 5/3 transform with explicit floor division |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_dwt53_512` |

## Verification

Every testbench checks the design against the reference model, which is
written from the equations independently of the RTL. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* **PEs:** corner cases, 2,000 random operand sets, and forward-then-inverse
  identity.
* **Line buffer:** random reads and writes against a shadow copy, including
  read-during-write.
* **Filters and cores:** random images at sizes 8, 4 and 2, with random
  input pauses. Every output beat is checked in order, with its tags. The
  cores also check:
  * input offered during the drain, which must not be taken;
  * the flush length and `frame_done`;
  * the exact latencies given above.
* **`tb_dwt53_top`:** runs at default parameters.
  * Three images go through the forward processor chained directly into the
    inverse one. Each subband and each reconstructed pixel is checked.
  * A two-level decomposition and its two-level reconstruction.
  * A gap-free timing check.
  * It counts each mechanism and fails if one never happened: input stalls
    on both processors, input pauses, flushes, size switches and chained
    frames.
* **`tb_dwt53_512`:** N = 512. A synthetic 512 x 512 test image (gradients,
  a sharp disc and noise) is transformed and reconstructed without a single
  differing pixel. Its LL subband is then taken through two more levels.
  The whole run takes under a second.

Each testbench was also shown to fail against a deliberately broken copy of
its module, for example a missing edge mirror or a dropped rounding offset.

What is not verified: timing closure and area in any technology. Nothing
was synthesised beyond generic coarse synthesis.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dwt53_pkg.sv tb/dwt53_ref_pkg.sv tb/tb_dwt53_top.sv --top-module tb_dwt53_top
./obj_dir/Vtb_dwt53_top
```

Replace `tb_dwt53_top` with any other `tb/tb_*.sv` module name to run that
testbench. Lint a module with `verilator --lint-only -Wall -Irtl -y rtl
rtl/dwt53_pkg.sv rtl/<module>.sv`. Verilator reports `SYNCASYNCNET` on the
cores. It comes from the handshake assertions, which use the reset in their
`disable iff` clause, and is harmless.
