# Bit-serial Sobel edge detector

This is a Sobel edge detector built for small area rather than speed. Each
3x3 convolution is computed **bit-serially by distributed arithmetic (DA)**.
No multipliers are used, and there is no parallel adder tree over the nine
window pixels. The pixels of the window are shifted out one bit per clock.
In each clock, the nine current bits address a small table of pre-computed
sums of mask coefficients. A shift-and-add accumulator with 2^-1 scaling then
builds up the full convolution result over 8 clocks. The cost is throughput:
the datapath accepts one 8-bit pixel every 8 clocks. At a 148 MHz clock that
is about 18.5 Mpixel/s, or a 256 x 256 frame in 3.55 ms.

The edge decision uses the usual cheap form of the gradient size,
G = |Gx| + |Gy|. A pixel is an edge when G is strictly greater than a
run-time threshold.

## Data flow

```
 host write ──► gray frame_ram ──► image_serializer ──► pixel stream, 1 pixel / 8 clocks
                                        ▲                     │
                          load_strobe_gen (clk/8)             ├──────────────► row 2 (current line)
                                                              ▼
                                                        line_buffer ─────────► row 1 (one line up)
                                                              ▼
                                                        line_buffer ─────────► row 0 (two lines up)

   rows 0..2 ──► da_filter_3x3 (MASK_X) ──► Gx ─┐
             └─► da_filter_3x3 (MASK_Y) ──► Gy ─┼─► gradient_threshold ──► image_deserializer ──► edge frame_ram ──► host read
   stream flags ──► filter_delay (9 clocks) ────┘      |Gx|+|Gy| > thr       (centre address,
                                                                               border = 0)
```

| Module | Role |
|---|---|
| `sobel_pkg` | widths, the two masks, the stream flag struct |
| `frame_ram` | one frame in raster order, synchronous read (used twice: gray in, edges out) |
| `load_strobe_gen` | the clk/n load strobe: one clock in every N = 8 |
| `image_serializer` | reads the gray frame in raster order, one pixel per strobe, then IMG_W+1 zero pad pixels |
| `line_buffer` | delay of exactly one image line (circular buffer, asynchronous read) |
| `da_filter_3x3` | one bit-serial 3x3 convolution, built from the next four modules |
| `piso` | parallel-in serial-out register, LSB first |
| `serial_shift_reg` | N-bit serial delay: replays the previous pixel's bits |
| `da_lut` | 512-entry table of coefficient subset sums, computed from the mask at elaboration |
| `shift_accumulator` | adder, register and 2^-1 scaler; holds the product after N bits |
| `filter_delay` | register delay line that keeps the stream's valid/start-of-frame flags in step with the filters |
| `gradient_threshold` | \|Gx\| + \|Gy\| and the comparison with the threshold, registered |
| `image_deserializer` | puts each result at its window-centre address; writes the border as 0 |
| `sobel_edge_detector` | top level |

## The distributed-arithmetic filter

This is the part that needs the most care. A Sobel result is a dot product of
nine pixels p_k and nine fixed coefficients m_k:

    G = Σ_k m_k · p_k = Σ_k m_k · Σ_j 2^j · p_k[j] = Σ_j 2^j · ( Σ_k m_k · p_k[j] )

The inner sum depends only on the nine bits p_k[j]. There are just 2^9 values
it can take. `da_lut` holds all of them, and entry `a` is the sum of the
`m_k` whose bit k of `a` is set. Address bit k = 3·row + col. Row 0 is the
oldest line and col 0 is the oldest (leftmost) pixel. The table is a constant
computed from the `MASK` parameter, so changing the mask changes the table
with no run-time loading.

**Getting the nine bits together.** `da_filter_3x3` has three identical
chains, one per window row:

```
 row_pix[r] ─► piso ──┬──────────────────────────► tap (r, col 2)   newest pixel
                      └► serial_shift_reg ──┬────► tap (r, col 1)
                                            └► serial_shift_reg ─► tap (r, col 0)   oldest pixel
```

The `piso` is loaded with a new pixel on each strobe and shifts it out LSB
first. Each serial shift register is N bits long, and strobes come exactly N
clocks apart. The first shift register therefore outputs bit j of the
previous pixel in the same clock that the `piso` outputs bit j of the current
pixel. The second shift register does the same for the pixel before that. The
horizontal window lives entirely in these bit streams, so no 3x3 register
window is needed.

**Accumulating.** The pixel bits come LSB first. So `shift_accumulator` adds
each table word at weight 2^(N-1) and halves the running sum every clock (the
2^-1 scaler):

    S_0 = P_0 · 2^(N-1),    S_j = S_(j-1) / 2 + P_j · 2^(N-1),    S_(N-1) = Σ_j P_j · 2^j

The division is an arithmetic right shift. It never drops a 1 bit: at step j
the sum is a multiple of 2^(N-j). So the result is exact, with no rounding
and no correction. Pixels are unsigned, so no sign-bit step is needed either.
The register is LUT_W + N = 14 bits wide. The Sobel results fit in 12 signed
bits (|G| ≤ 4·255), and the filter outputs those 12 bits.

**Timing.** The strobe comes in clock t. Bit j is on the serial taps in clock
t+1+j. The last bit is in clock t+N, the same clock as the next strobe. The
result register updates at the end of that clock, and `result_valid` is high
in clock t+N+1. Strobes must keep coming every N clocks while a frame
streams. After a pause of 3N clocks or more, the shift registers hold zeros,
so the first two windows after the pause see zero pixels on the left.

Hardware per filter: 3 × (8 + 8 + 8) serial register bits, a 512 x 6 constant
table (mostly zero taps; synthesis can shrink it), one 14-bit adder and
register, and a 3-bit bit counter.

## Framing: padding, window centres and the border

The result that leaves the filters with stream pixel k (k = 0 is the first
pixel of the frame) belongs to the window whose centre is raster pixel
k − (IMG_W + 1). This holds because the newest window pixel is one line and
one pixel past the centre. Two things follow:

* After the IMG_W·IMG_H image pixels, the serializer sends IMG_W + 1 zero
  padding pixels. These complete the windows centred on the last line. A
  frame is therefore IMG_W·IMG_H + IMG_W + 1 pixel slots long.
* The deserializer drops the first IMG_W + 1 results. It writes the rest to
  consecutive raster addresses.

Windows centred on the one-pixel border of the image reach outside it. For
those windows the line buffers and serial registers hold pixels from the other
end of a line, the previous frame, or the padding. The deserializer writes
every border pixel as 0. Inside the border, an edge is written as 0xFF and a
non-edge as 0x00. The output frame has the same size as the input.

## Top-level interface and timing

`sobel_edge_detector #(IMG_W = 256, IMG_H = 256)`, 8-bit pixels, 12-bit
gradients, one clock, asynchronous active-low `rst_n`.

| Port | Dir | Meaning |
|---|---|---|
| `in_we`, `in_addr`, `in_data` | in | write one gray pixel at a raster address |
| `start` | in | one-clock pulse: process the stored frame (ignored while `busy`) |
| `threshold` | in | 12-bit edge threshold; edge when \|Gx\|+\|Gy\| > threshold |
| `busy` | out | high from `start` until the edge frame is complete |
| `done` | out | one-clock pulse one clock after the last output pixel is written |
| `out_addr` → `out_data` | in → out | read the edge frame; data one clock after the address |
| `grad_valid`, `grad_mag`, `grad_edge` | out | the result stream, one result per 8 clocks, before the deserializer |

From `start` to `done` takes 8·(IMG_W·IMG_H + IMG_W + 1) + 12 clocks. That is
526,356 clocks at 256 x 256. Do not write the input frame while a frame is in
flight. The output frame may be read once `done` has been seen. A new `start`
may follow `done` right away. The input memory may be rewritten between
frames.

The sizes, the frame memories, this host handshake, the reset style and the
border value are this design's own choices. The pipeline order (serializer,
line buffers, 3x3 filters, filter delays, deserializer), the masks, the
|Gx|+|Gy| gradient, the threshold rule, and the DA structure (PISO loaded at
clk/n, chained serial shift registers addressing a table of pre-computed sums,
adder with register and 2^-1 feedback) follow the published architecture
that this RTL implements.

## Interpretation and departures

* **What is serial and what is in the table.** A DA table can only hold
  pre-computed sums of *fixed* values. Here the mask coefficients are in the
  table and the image pixels are the serial words. One reading of the
  architecture puts it the other way round, with the masks in the shift
  registers and the pixels feeding the table. The dot product is the same
  either way.
* **Sign of Gy.** The vertical mask used is [-1 0 1; -2 0 2; -1 0 1] (right
  column minus left). One written form of the Gy equation has the opposite
  sign. Only the sign of Gy differs, and |Gy| and the output do not change.
* **Nine table address bits** are used, including the zero-coefficient
  taps. The table is the general one for any 3x3 mask. A six-tap table
  (64 entries) per mask would be smaller.
* **Two independent filters.** Gx and Gy each have their own serial
  registers. Sharing one set of nine taps between both tables would save
  72 flip-flops.
* **One clock.** The clk/n rate is a load enable from a counter, not a
  divided clock.
* **Interface width.** The reference implementation used very few device
  pins (14 bonded I/Os), with the image presumably streamed from outside.
  This top brings out full frame-memory ports instead.
* **Size.** Coarse synthesis of the top (yosys) gives 328 flip-flop bits,
  plus 1,058,816 memory bits. The memory is two 512 Kbit frame stores, two
  2 Kbit line buffers and two 3 Kbit constant tables. For comparison, the
  reference FPGA implementation reported 482 slice flip-flops, 353 4-input
  LUTs and 371 slices on a Virtex-II Pro xc2vp30, at 148.133 MHz. That
  figure does not necessarily include frame storage. Timing of this RTL on
  an FPGA has not been measured.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/sobel_ref_pkg.sv` is the reference model
used by the two end-to-end tests.

* `tb_sobel_edge_detector`: 16 x 10 frames. It covers noise, vertical and
  horizontal steps, a flat image, a checkerboard, back-to-back frames and an
  ignored start while busy. It checks every output pixel, every streamed
  gradient, the 8-clock result spacing and the frame time. It also counts that
  edges, non-edges, border pixels, negative Gx and Gy, padding pixels and
  line-buffer wrap-around all occurred.
* `tb_sobel_full`: one 256 x 256 frame at the default parameters. The
  generated aerial-like test image has fields, a road, a bright block and
  noise. It checks all 65,536 output pixels and the frame time. It runs in
  under a second.

Example, with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sobel_full \
    -y rtl -y tb +libext+.sv -Irtl rtl/sobel_pkg.sv tb/sobel_ref_pkg.sv tb/tb_sobel_full.sv
./obj_dir/Vtb_sobel_full
```

For a block testbench, replace the top module and the last file, for example
`--top-module tb_da_filter_3x3 ... tb/tb_da_filter_3x3.sv`. The package file
must come first. The testbenches need no files besides `rtl/` and `tb/`.

To change the image size, set `IMG_W`/`IMG_H` on the top. The pixel width
(`PIX_W`, also the serial word length N) and the masks are in `sobel_pkg`.
Any 3x3 mask with coefficients in −2..2 fits the table format.
