# Overlap-and-add FFT convolution accelerator (FP32, SystemVerilog)

A convolutional layer spends most of its arithmetic in 2D convolutions of
large feature maps with small kernels. This accelerator computes them in the
frequency domain with the overlap-and-add (OaA) method:

1. cut each input feature map into L x L tiles and zero-pad each tile to
   P x P (here P = 16, so L = 17 - F for an F x F kernel);
2. take the 2D FFT of every tile and of every kernel (also zero-padded to P x P);
3. for each output channel, multiply tile and kernel spectra element by element
   (Hadamard product) and sum over the input channels;
4. take the 2D inverse FFT of the sum, giving a P x P block of the linear
   convolution;
5. add the blocks into the output map at a stride of L, so that neighbouring
   blocks overlap by F - 1 rows and columns.

The input spectra of a tile are computed once and reused for every output
channel, and the kernel spectra once per layer. The design targets an
FPGA attached to a host CPU through a shared-memory link. The FPGA runs
the convolutions and the CPU does the rest of the network (ReLU, pooling,
fully connected layers). It follows the architecture published as
"Frequency Domain Acceleration of Convolutional Neural Networks on CPU-FPGA
Shared Memory System", and it departs from that architecture where noted
below. All arithmetic is IEEE-754 single precision.

## Data path

```
 host rows ──► pad ──► fft2d (fwd) ──┬─► kernel_buffer ─┐
 (16 x FP32)                         └─► image_buffer ──┴─► hadamard_mac ──► fft2d (inv) ──► oaa_unit ──► map read port
                                         (2 halves)
```

| module | role |
|---|---|
| `oaa_conv_accel` | top: padding, control, layer protocol |
| `fft2d` | 2D FFT/IFFT: row FFT, transpose, column FFT |
| `fft1d_var` | variable-length radix-4 FFT on one vector per cycle |
| `r4_butterfly` | radix-4 butterfly with constant twiddles |
| `cmul_gated` | FP32 complex multiplier that bypasses trivial operands |
| `spn` | three-stage streaming permutation network |
| `spn_transpose` | P x P transpose controller on top of `spn` |
| `hadamard_mac` | spectrum multiply-accumulate over input channels |
| `image_buffer` | double-buffered input-tile spectra |
| `kernel_buffer` | kernel spectra of the layer |
| `oaa_unit` | overlap-and-add into on-chip output maps |
| `oaa_pkg` | FP32 types and arithmetic, twiddle table, `FFT_P` |

Everything is one clock domain with an asynchronous active-low reset. There
is no stall inside the pipeline. The only flow control is `in_ready` at
the input.

## The FFT

`fft1d_var` transforms an N-word complex vector every cycle (N = 64 by
default, 16 in the convolver). It is a radix-4 decimation-in-time FFT with
log4 N butterfly stages and a register after each stage. The input goes
through a base-4 digit reversal, which is only wiring, and the output comes
out in natural order.

It has two lengths. In quarter mode (`in_mode = 1`) the last stage is
bypassed. The first log4 N − 1 stages then compute four independent
N/4-point FFTs, one on each quarter of the lanes. This is how the 64-point
machine computes 16-point FFTs with two of its three stages. Only the input
digit reversal changes with the mode: it reverses all digits in full mode,
and only the low digits of each quarter in quarter mode.

Twiddles are constants. They are FP32 values of cos(2πk/64) for k = 0…16,
and every other W64^e follows from quadrant symmetry. A twiddle of 1, −1, j
or −j is applied by swapping and negating the real and imaginary parts. Any
other twiddle goes through `cmul_gated`. The inverse transform conjugates the
twiddles and the ±j terms, and it scales by 1/N by decrementing the exponent.

`cmul_gated` checks both operands at run time. When either one is exactly 0,
1, j or −j, the result comes from a bypass path and the four multipliers get
zero operands. This is the accelerator's "disable the FP unit on trivial
inputs" power saving, done here as operand isolation rather than clock
gating. In the MAC this happens whenever a spectrum is zero, for example
for an all-zero input tile.

## Transpose with the streaming permutation network

`fft2d` runs the row FFT, then `spn_transpose`, then the column FFT. A tile
enters as 16 row beats and leaves as 16 column beats. The transpose uses a
folded Clos network (`spn`) with three stages:

* stage 0 is a 16-to-16 crossbar into the banks;
* stage 1 is 16 memory banks, each with 2 × 16 words;
* stage 2 is a 16-to-16 crossbar out of the banks.

The `spn` block itself is general. The crossbar selects and the bank
addresses are inputs, so any permutation can be streamed through it as long
as each beat touches each bank once. `spn_transpose` supplies the control for
a transpose:

* element (r, c) is stored in bank (r + c) mod 16 at address r;
* input row r therefore fills all 16 banks, and stage 0 is a rotation by r;
* output column c reads row (b − c) mod 16 from bank b, and stage 2 is a
  rotation by c.

The two halves of each bank alternate (ping-pong), so the next tile is
written while the previous one is read. The first column leaves 2 cycles
after the last row arrives.

Spectra therefore stay in column order: beat v holds frequency column v, and
lane u holds frequency row u. Image and kernel spectra share this order, so
the Hadamard product does not care. The inverse `fft2d` applies the same
transpose and returns the spatial block in row order. At P = 16 the latency
of `fft2d` is 21 cycles from first beat in to first beat out.

## Layer protocol and scheduling

1. **Start.** Pulse `start` with `cfg_din`, `cfg_dout` and `cfg_f`. The
   output maps are cleared. Clearing takes OUT_MAX² × D_OUT_MAX / 16 =
   4096 cycles and runs alongside kernel loading.
2. **Kernels.** Send `cfg_dout × cfg_din` kernels, d_out-major, as 16 rows of
   16 FP32 words each. Only the top-left F × F words are used; the rest are
   masked to zero on chip. Each kernel is transformed and stored at
   `(d_out·D_in + d_in)·16 + beat`.
3. **Tiles.** For each tile, send `cfg_din` channels of 16 rows. Only the
   top-left L × L words are used. `in_ty`/`in_tx` are taken with the tile's
   first row. A tile's spectra fill one half of the image buffer. When a
   half is full and the kernels and the clear are done, the compute side
   runs through every d_out, every d_in and the 16 beats. The MAC emits the
   summed spectrum on the last d_in. The inverse FFT returns the block, and
   `oaa_unit` adds it at (ty·L, tx·L) of map d_out.
4. **Overlap.** While one half is being computed, the next tile loads into
   the other half. `in_ready` drops only when both halves are taken. A half
   is released once its last block row has been added. `tiles_done` counts
   finished tiles.
5. **Read.** When `busy` is low, read elements through `rd_*` (one cycle
   latency). Map element (y, x) is the full linear convolution. For an
   N × N input, the CNN "valid" output is rows and columns F−1 … N−1. CNN
   layers compute a correlation, so give the kernel flipped in both axes.

A 16-word FP32 row is exactly one 64-byte cache line, the unit in which the
FPGA of the target platform reads shared memory. The shared-memory link
itself (QPI endpoint and cache) is platform IP. Here it is replaced by the
valid/ready row stream and the read port.

## Overlap-and-add memory

`oaa_unit` holds D_OUT_MAX maps of OUT_MAX × OUT_MAX FP32 words in 16 banks.
Bank b holds the map columns x ≡ b (mod 16). The 16 consecutive columns of a
block row therefore always land in 16 different banks, with the lanes
rotated by `col0 mod 16`. Each beat is a read-modify-write: read in the
first cycle, FP32 add and write in the next. Consecutive beats carry
different rows, so they never collide. Parts of a block outside the map are
dropped.

## Arithmetic

`oaa_pkg` holds `fp_add` and `fp_mul`, combinational FP32 functions with
these rules:

* rounding is to nearest even;
* subnormal inputs and results are flushed to zero;
* overflow saturates to infinity;
* NaN is not propagated.

Every call site is a full adder or multiplier. Nothing is pipelined inside
the arithmetic. Each FFT stage is one cycle of combinational FP logic, so
timing closure at a few hundred MHz would need registers inside the
butterflies.

## Parameters

| parameter | default | where |
|---|---|---|
| `FFT_P` | 16 | `oaa_pkg`; FFT size and tile beat width of the convolver |
| `N` | 64 | `fft1d_var` (16 in the convolver) |
| `D_IN_MAX` | 64 | input channels held in `image_buffer` |
| `D_OUT_MAX` | 16 | output channels (kernel buffer and maps) |
| `OUT_MAX` | 64 | output map side, full-convolution size |

At the defaults the on-chip storage is about 2.5 MB:

* kernel buffer: 16 × 64 × 16 beats × 1024 bit = 2 MB;
* image buffer: 256 KB;
* output maps: 256 KB.

## Departures from the published architecture and limits

* **FFT organisation.** The published FFT is a streaming core with
  configurable vertical parallelism and several FFT processors, plus
  memory-scheduling and data-remapping power optimisations. Here
  `fft1d_var` is fully parallel: one vector per cycle. That takes far more
  multipliers than the 224 reported for the original implementation.
* **FFT size.** The convolver is built for P = 16 only. The variable-length
  unit is used in full mode, and its quarter mode (16 out of 64, 4 out of
  16) is exercised only by its own testbench. FFT sizes 4, 8 and 32, which
  suit other kernel sizes, are not built.
* **Parallelism.** Only one image buffer and one kernel buffer exist, so
  T_i = T_k = 1. The system parallelism T_i·T_k is not replicated.
* **Stride and cropping.** Stride is 1 only, and there is no cropping,
  ReLU or pooling. Those run on the host, as in the original system split.
* **Capacity.** Layers larger than the buffers must be split by the host.
  Input channels beyond 64 need partial sums added on the CPU, because
  `start` clears the maps. Output channels go in groups of 16. Maps
  larger than 64 need partitioning.
* **Memory ports.** The SPN banks have one read and one write port and twice
  the minimum depth, so that tiles stream without gaps.

## Verification

Every module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog. The reference
values are computed in double precision in the testbench (`tb_fp_pkg`
converts between `real` and FP32 bit patterns).

* `tb_cmul_gated`: 2000 random products, and each trivial operand value on
  either side against 50 random operands.
* `tb_r4_butterfly`: forward and inverse butterflies against direct sums.
* `tb_fft1d_var`: 64-point forward and 16-point inverse units, in both
  modes, against a direct DFT, plus the latency and the bypass flag.
* `tb_spn`: random rotations and random beat orders through the bank
  halves.
* `tb_spn_transpose`: three back-to-back tiles, the data and the 2-cycle
  latency.
* `tb_fft2d`: 2D DFT check of the forward output, the round trip through the
  inverse, and the 21-cycle latency.
* `tb_hadamard_mac`: three channels, twice, with trivial kernel values mixed
  in.
* `tb_image_buffer`, `tb_kernel_buffer`: ping-pong and random-address
  storage.
* `tb_oaa_unit`: 16 × 16 blocks on a 12-pixel stride, including blocks that
  run past the map edge.
* `tb_oaa_conv_accel` (top, default parameters): a 20 × 20 input with 2 input
  and 2 output channels and 5 × 5 kernels, run as four tiles. It checks all
  2048 map words read back against a direct double-precision convolution.
  Random garbage outside the kernel and tile windows tests the padding. The
  testbench also requires each mechanism to occur: input stalls, loading
  overlapped with compute, MAC bypass, and positions summed from two or more
  tiles.
* `tb_cnn_layer_slices` (top, default parameters): three CNN layer shapes run
  back to back, each with its own `start`, so the kernel size and tile size
  change between layers. It checks every output word (9100 in total)
  against a direct convolution:
  * AlexNet conv2: 27 × 27 input, 5 × 5 kernels, 9 tiles;
  * AlexNet conv3: 13 × 13 input, 3 × 3 kernels, 1 tile;
  * VGG16 conv3 block: 56 × 56 input, 3 × 3 kernels, 16 tiles.

  Each layer uses 3 input and 2 output channels. The real layers differ
  only in their channel counts, which the host handles in passes (see
  Capacity above).

Run one with plain Verilator from the repository root, for example:

```
verilator --binary --timing --top-module tb_oaa_conv_accel -y rtl -y tb +libext+.sv \
    rtl/oaa_pkg.sv tb/tb_fp_pkg.sv tb/tb_oaa_conv_accel.sv
./obj_dir/Vtb_oaa_conv_accel
```

The FP functions are inlined at every call site, so the C++ compile of the
larger testbenches takes a few minutes. The top build takes about 35 s. The
64-point FFT testbench takes about 2–3 minutes.
