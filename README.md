# FSRCNN super-resolution accelerator: three convolution processors and a deconvolution computed as a convolution

This is synthesizable SystemVerilog for an accelerator that runs FSRCNN, a compact
super-resolution CNN. FSRCNN takes a low-resolution (LR) image, computes seven
convolution layers at low resolution, and ends with one deconvolution
(transposed convolution) layer that produces an image `S_D` times larger in each
direction. Two ideas shape the hardware:

1. **Transformed deconvolution (TDC).** A stride-`S_D` deconvolution is
   normally computed by scattering each input pixel through a `K_D x K_D` kernel
   and adding up the overlapping contributions. That takes extra adders and
   memory traffic, and the loops run over the large high-resolution image.
   Instead, the layer is rewritten as an ordinary stride-1 convolution over the
   *low-resolution* grid with `S_D*S_D` output channels and a smaller
   `K_C x K_C` kernel. Output channel `(py, px)` holds the high-resolution
   pixels `(S_D*y + py, S_D*x + px)`. No overlaps need summing, all
   `S_D*S_D` sub-pixels of an output block are computed in parallel, and the
   kernel shrinks from 9x9 to 5x5 for `S_D = 2`.
2. **Multi-CLP.** FSRCNN is "hourglass" shaped: the channel count goes
   1 → 56 → 12 → 12 → 12 → 12 → 12 → 56 → 1 (or `S_D^2` after TDC). A single
   convolutional layer processor (CLP) with one fixed `Tm x Tn` multiplier
   array leaves most multipliers idle on the narrow layers. Here the
   multipliers are split into three CLPs, each shaped for the layers it runs.
   All three CLPs work at the same time.

The arithmetic is IEEE-754 single precision throughout.

## Block diagram

```
                 frame_start ──► epoch barrier ──► epoch_done
                                   │   │   │
          ┌────────────────────────┘   │   └────────────────────────┐
   scheduler 0                   scheduler 1                  scheduler 2
   Conv1, Conv7                  Conv2, Conv8(TDC)            Conv3..Conv6
        │ tile_req/store_req          │                            │
        ▼                             ▼                            ▼
   CLP0 <Tn=2, Tm=56>            CLP1 <Tn=56, Tm=4>           CLP2 <Tn=12, Tm=12>
   in/weight/out buffers         in/weight/out buffers        in/weight/out buffers
   2x56 fp32 MACs                56x4 fp32 MACs               12x12 fp32 MACs
                                      ▲
                     tdc_weight_mapper (9x9 kernel → 4 kernels of 5x5)
```

Together the three CLPs have 2*56 + 56*4 + 12*12 = 480 floating-point
multiply-accumulate lanes (the single-CLP alternative, `<56, 9>`, has 504).
The host, which owns the off-chip memory, moves tiles in and out of the CLP
buffers when a scheduler asks for them.

## The transformed deconvolution

The deconvolution is taken as

```
out[S_D*i + k - PO] += in[i] * W_D[k]          (per dimension, k = 0..K_D-1)
```

Fix an output pixel `o = S_D*y + p` (LR position `y`, phase `p` in
`0..S_D-1`). The inputs that reach it are `i = y + d` with
`k = p + PO - S_D*d` inside `0..K_D-1`. So every output of phase `p` is a
convolution of the LR input around `y`, using the taps `W_D[p + PO - S_D*d]`.
Collect the offsets `d` over all phases into one window `j = d + K_C/2`,
`j = 0..K_C-1`. This gives the *inverse coefficient mapping* that
`tdc_weight_mapper` implements:

```
W_C[py*S_D+px][jy][jx] = W_D[ky][kx]   with ky = py + PO - S_D*(jy - K_C/2)
                                            kx = px + PO - S_D*(jx - K_C/2)
                       = 0             when ky or kx is outside 0..K_D-1
```

The kernel size comes from the formula below. `h = floor(K_D/2)`, and `D` is
the fractional part of `h/S_D`:

```
K_C = 2*floor(h/S_D) + 1   if D < 0.5
K_C = 2*floor(h/S_D) + 2   otherwise
```

With `K_D = 9` this gives `K_C = 5, 3, 3` for `S_D = 2, 3, 4`.

The phase offset `PO = floor(K_D/2) - floor(S_D/2)` (3 for `S_D = 2`) is a
choice of this implementation. It is the value for which these `K_C` cover
every tap at all three upscaling factors. A different `PO` shifts the
high-resolution output by whole sub-pixels and may need a larger window.

For `S_D = 2` the converted layer has 56 input channels and 4 output
channels with 5x5 kernels. That is exactly CLP1's `Tn = 56, Tm = 4` array, so
all four sub-pixels of a 2x2 output block come out of one pass. The HR image
is `HR[2y+py][2x+px] = out[py*2+px][y][x]`. Zero coefficients stay in the
kernel: each phase uses only some of the 25 positions, and the rest
multiply by zero.

The mapper is loaded with one 81-word kernel (row-major), started, and then
emits `S_D^2 * K_C^2 = 100` coefficients, one per cycle, tagged with the
sub-pixel index `wc_sub` and the kernel address `jy*5 + jx`. In the top
module, `tdc_mode = 1` routes this stream straight into CLP1's weight buffer:
output channel `wc_sub`, input channel `wd_n`.

## Convolutional layer processor (`clp`)

A CLP computes one output tile of a stride-1 convolution:

```
for kh, kw                      (kernel position, outermost)
  for r, c                      (tile pixel, one per cycle)
    for m < Tm, n < Tn          (unrolled: the multiplier array)
      out[m][r][c] += in[n][r+kh][c+kw] * w[m][n][kh][kw]
```

- **Input buffer:** `Tn` banks, one per input channel. Each bank holds a
  `(TR+KMAX-1) x (TC+KMAX-1)` tile including its halo, row-major with pitch
  `TC+KMAX-1` (20 words for the default 16x16 tiles).
- **Weight buffer:** one `KMAX x KMAX` store per multiplier. All `Tm*Tn`
  weights of the current kernel position are read in one cycle.
- **Compute engine:** for each output channel, `Tn` multipliers feed a
  binary adder tree (unused leaves are +0). A final adder adds the partial
  sum read from the output buffer.
- **Output buffer:** `Tm` banks of `TR*TC` partial sums, read and written back
  by the engine. A separate port lets the host read the finished tile.
- **Controller:** walks the loop nest above and raises `done` with the last
  write-back.

**Pipeline and timing.** Cycle *t* issues addresses. The buffers return data
in *t+1*, products are registered at the end of *t+1*, and the sum is
registered and written back in *t+3*. A tile therefore takes
**`k*k*rows*cols + 3` cycles** from `start` to `done`: `k*k` cycles per
output pixel plus the pipeline depth once per tile.

The kernel loops are outermost, so an output address comes back only every
`rows*cols` cycles. That must exceed the 3-cycle read-to-write distance, and
an assertion checks `rows*cols > 3`.

**Input channels beyond `Tn`.** A layer with `N > Tn` input channels is
computed in `ceil(N/Tn)` runs:

- the first run has `clear = 1`, so partial sums start from zero;
- each later run has `clear = 0` and adds onto what the output buffer holds.

Unused lanes (when `N` or `M` is not a multiple of `Tn` or `Tm`) must be
loaded with zero weights and zero pixels.

## Multi-CLP schedule

| CLP | `<Tn, Tm>` | layers (shape N→M, kernel) |
|-----|-----------|---------------------------|
| 0 | <2, 56>  | Conv1 (1→56, 5x5), Conv7 (12→56, 1x1) |
| 1 | <56, 4>  | Conv2 (56→12, 1x1), Conv8 = TDC deconvolution (56→4, 5x5) |
| 2 | <12, 12> | Conv3, Conv4, Conv5, Conv6 (12→12, 3x3) |

`frame_start` starts all three schedulers together (an *epoch*). Each
scheduler (`multi_clp_scheduler`) walks its CLP's layers and, per layer, the
output-channel tiles, tile rows, tile columns and, innermost, input-channel
tiles. For every step it:

1. raises `tile_req` with a `tile_desc` until the host answers `tile_ack`.
   The descriptor holds the layer, the `mt`/`nt`/`rt`/`ct` tile indices and
   the tile's rows and columns (edge tiles are shorter).
2. starts the CLP with the layer's kernel size, the tile size and
   `clear = (nt == 0)`.
3. waits for the CLP to finish. After the last input-channel tile it raises
   `store_req` until `store_ack`.

`clp_finished` shows which CLPs have finished their list. `epoch_done`
pulses when all three have finished, and only then is the next
`frame_start` accepted.

Within an epoch each CLP works on its own data, as in a streaming pipeline
over successive images. Conv1 of image *i+1* runs while Conv2 of image *i*
and Conv3–6 of image *i-1* run. CLP2 chains Conv3→Conv6 inside one epoch.
An image therefore needs five epochs to pass through all eight layers.

## Driving it as the host

For a `tile_req` from CLP `g` with descriptor `d`, kernel `k` and
`h = (k-1)/2`:

- **Inputs:** for lane `i < Tn`, write input channel `d.nt*Tn + i` at LR
  position `(d.rt*16 - h + y, d.ct*16 - h + x)` for `y < rows+k-1`,
  `x < cols+k-1`. Use `in_bank[g] = i` and `in_addr[g] = y*20 + x`. Write
  zero outside the image and for lanes past `N`.
- **Weights:** `w_m[g] = m`, `w_n[g] = i`, `w_addr[g] = kh*5 + kw`, for the
  `(d.mt*Tm + m, d.nt*Tn + i)` kernel. For Conv8, set `tdc_mode = 1` instead.
  For each input channel, write its 9x9 kernel through `wd_*`, set
  `wd_n = i`, pulse `wd_start` and wait for `wd_busy` to fall (102 cycles).
- Then pulse `tile_ack[g]`.

For a `store_req`, read `o_data[g]` one cycle after setting
`o_bank[g] = m` and `o_addr[g] = r*16 + c`, then pulse `store_ack[g]`.

## Arithmetic

`fp32_mul` and `fp32_add` are combinational IEEE-754 binary32 units:

- rounding is to nearest, ties to even;
- subnormal inputs and results are flushed to signed zero;
- overflow gives infinity;
- NaN inputs, `inf*0` and `inf-inf` give `0x7FC00000`;
- an exact cancellation gives +0.

The adder tree sums in a fixed order: leaf pairs first, with missing leaves
+0. Results are therefore bit-reproducible, and the testbenches check them
bit for bit.

## Performance

With 16x16 tiles on a 256x256 LR image, the compute cycles per epoch are:

| CLP | layers | cycles |
|-----|--------|--------|
| CLP0 | Conv1 + Conv7 | 1639k + 398k |
| CLP1 | Conv2 + Conv8 | 199k + 1639k |
| CLP2 | Conv3..6 | 4 × 590k = 2362k |

An epoch is bound by CLP2 at about 2.36 M cycles. That is within 0.2% of
the 2359k-cycle multi-CLP figure this design is based on; the difference is
the 3-cycle pipeline fill per tile. A single CLP of similar size (`<56, 9>`)
needs about 18.4 M cycles for the same network, 7.8 times more.

In general a layer takes
`ceil(M/Tm) * ceil(N/Tn) * tiles * (k*k*rows*cols + 3)` cycles. After TDC,
`M` is `S_D^2` times the deconvolution's output channels and `k = K_C`.
The unroll factors are fixed in `fsrcnn_pkg`. No search over them is
included.

Host transfers are not included. They overlap with compute only if the
host uses the time while a CLP is busy, and the buffers are not double
buffered, so the next tile's load starts only after the current tile
finishes.

## Departures, limits and choices

- **`S_D` is fixed to 2.** The CLP tiling and the direct TDC path (sub-pixel
  `p` goes to CLP1 output channel `p`, asserted `< Tm = 4`) are those of
  `S_D = 2`. `S_D = 3` and `4` need 9 and 16 sub-pixel channels and a
  different tiling (`<56,5>`, `<56,6>` and a changed layer assignment). The
  mapper itself is parameterised and tested for all three factors.
- **No activation and no bias.** FSRCNN uses PReLU after each convolution;
  neither activation nor bias is built.
- **No DMA or external memory controller.** Tiles move through the host
  ports, one word per cycle per CLP.
- **Choices of this implementation:**
  - 16x16 tiles, and buffer depths that follow from them;
  - single-port buffer writes and three-port output buffers;
  - a 3-cycle pipeline;
  - the loop order inside a layer;
  - the req/ack protocol and the epoch barrier;
  - the TDC offset `PO`;
  - the floating-point corner cases.
- **Timing closure.** The floating-point units are combinational and sit
  between pipeline registers. At FPGA clock rates the multiplier and the
  adder tree (six adders deep for `Tn = 56`) would need more pipeline
  stages. Only the constant 3 in the tile time would change.
- **Synthesis size.** Weight and output buffers are written as arrays with
  wide parallel reads: all `Tm*Tn` weights and all `Tm` partial sums in one
  cycle. On an FPGA, the weight stores map to distributed RAM or registers.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `fsrcnn_pkg.sv` | fp32 type, layer table, CLP tilings, `K_C`/`PO` functions, tile descriptor |
| `fp32_mul.sv`, `fp32_add.sv` | single-precision multiplier and adder |
| `fp32_adder_tree.sv` | balanced tree of `fp32_add` |
| `clp_compute_engine.sv` | `Tm x Tn` multiply, tree, accumulate; 2-cycle pipeline |
| `clp_input_buffer.sv`, `clp_weight_buffer.sv`, `clp_output_buffer.sv` | CLP on-chip buffers |
| `clp_controller.sv` | loop counters, addresses, write-back timing |
| `clp.sv` | one convolutional layer processor |
| `tdc_weight_mapper.sv` | deconvolution → convolution weight conversion |
| `multi_clp_scheduler.sv` | per-CLP layer and tile sequencer with host handshakes |
| `fsrcnn_accel_top.sv` | three schedulers, three CLPs, TDC path, epoch barrier |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`, and
`fp32_ref_pkg.sv`, a reference fp32 model built on `real`.

`tb_fsrcnn_accel_top` runs the top at its default parameters. It plays the
host over five epochs on a 20x20 LR image, so there are 2x2 tiles per layer,
with edge tiles. It compares every output of every layer bit-exactly with a
reference that adds in the hardware's order. In the first epoch it also
compares the 40x40 HR output with a directly computed stride-2 9x9
deconvolution.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fsrcnn_pkg.sv tb/fp32_ref_pkg.sv tb/tb_fsrcnn_accel_top.sv \
    --top-module tb_fsrcnn_accel_top -j 8
./obj_dir/Vtb_fsrcnn_accel_top
```

Any other testbench works the same way; replace the last file and the top
module name. Each prints `TB_RESULT checks=N failures=M`. Building the full
top takes a few minutes, because the 480 floating-point units are flattened
into C++. The end-to-end run itself takes seconds.
