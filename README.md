# DCT-domain visible watermarking co-processor

A visible watermark is a second image blended into a host image so that it
can be seen but does not destroy the picture. This design does the blending
in the frequency domain: the host (cover) block and the watermark block are
each taken through an 8x8 two-dimensional discrete cosine transform (DCT),
their coefficients are mixed as

    mixed = 0.85 * DCT(cover) + 0.15 * DCT(watermark)

and the mix is taken back to pixels with the inverse DCT. The transform is
the expensive step, so it lives in hardware; an embedded processor does the
rest in software (reading the images, separating the R, G and B components,
cutting them into 8x8 blocks, putting the result back together and sending
it to the display). The RTL here is that hardware part: a peripheral on the
processor's On-chip Peripheral Bus (OPB) that holds a DCT/IDCT core and an
embedder core and can run the whole chain on one block by itself.

Because the DCT is linear, the chain above is, up to rounding, the same as
`0.85 * cover + 0.15 * watermark` pixel by pixel. The frequency-domain form
is kept because it is the algorithm's stated method and because it leaves
room to weight coefficients differently.

## Block diagram

```
             OPB
              |
        opb_slave_if            register port (1 KB window)
              |
   +----------+--------------------------------------------+
   |  buffers A, B (cover / watermark, bus read/write)      |
   |  buffer OUT (result, bus read)                         |
   |  buffers C1, C2 (internal coefficients)                |
   |                                                        |
   |   wm_ctrl --- dct2d_core  (one MAC, DCT or IDCT)       |
   |          \--- wm_embedder (0.85 / 0.15 mix)            |
   +--------------------------------------------------------+
                  wm_coprocessor (top)
```

| Module | Role |
|---|---|
| `wm_pkg` | shared widths, operation codes, DCT basis, embedding weights |
| `dct2d_core` | 8x8 forward/inverse DCT by direct double sum |
| `wm_embedder` | weighted sum of two coefficients per cycle |
| `wm_ctrl` | sequencer of the four operations |
| `opb_slave_if` | OPB slave: address decode, acknowledge, read-data gating |
| `wm_coprocessor` | top: buffers, muxing, status registers |

## The transform core

`dct2d_core` evaluates the orthonormal 2-D DCT straight from its definition
rather than as two passes of 1-D transforms:

    forward  X[u][v] = sum over i,j of a[i][j] * T[u][i] * T[v][j]
    inverse  a[i][j] = sum over u,v of X[u][v] * T[u][i] * T[v][j]
    T[u][i]  = c(u) * cos((2i+1) * u * pi / 16),  c(0) = 1/sqrt(8), c(u>0) = 1/2

Both directions use the same 8x8 table `T`; only which index is the
frequency changes. For output `(r,c)` and term `(s_r,s_c)` the core uses
`T[r][s_r] * T[c][s_c]` in forward mode and `T[s_r][r] * T[s_c][c]` in
inverse mode. The table is not stored as data: `wm_pkg::dct_basis(u, i)`
folds the angle `(2i+1)u` modulo 32 (units of pi/16) onto the nine values
`0.5 * cos(k * pi / 16)`, k = 0..8, with the sign from the quadrant, and
returns `1/sqrt(8)` for `u = 0`. Synthesis reduces it to constants.

One multiply-accumulate unit serves everything. For each of the 64 outputs
the core sweeps all 64 source samples, one per clock:

1. issue: source address = term index; the two basis entries are looked up
   and multiplied (Q15 x Q15), then cut to Q20;
2. the sample and the basis product are registered;
3. sample x basis product is registered;
4. accumulate; on the 64th term the sum is rounded half up, saturated and
   written out.

A block therefore takes 4096 issue cycles plus 3 pipeline cycles: `done`
comes 4099 cycles after `start`. Results appear every 64 cycles in
row-major order. The source is read through a same-cycle read port and must
not change while the core runs.

With inputs of pixel size the error against a double-precision DCT is well
below one unit; the test bench checks forward, inverse and round-trip
results to within 1.

## Number formats and accuracy

| Where | Format |
|---|---|
| bus, buffers A, B, OUT | signed 16-bit integer in bits 15:0 of a 32-bit word |
| datapath, buffers C1, C2 | signed 20-bit, 4 fractional bits |
| basis entries | signed Q15 (16 bit) |
| basis products | signed Q20 (21 bit) |
| embedding weights | unsigned Q16: 55706 (0.8500061) and 9830 (0.1499939), sum exactly 1.0 |

Samples entering the datapath from A or B are shifted left by 4 (exact).
Values leaving for OUT are rounded half up to integers and saturated to 16
bits. The coefficients passed from the DCT to the embedder and from the
embedder to the IDCT keep their 4 fractional bits, so the full chain rounds
to whole numbers only once; with integer intermediates the error would grow
past one grey level. The final pixels of `OP_WATERMARK` are clamped to
0..255. The end-to-end test compares every pixel with a double-precision
model and accepts a difference of at most 1.

For a constant 8x8 block of value `v` the forward DCT gives a DC
coefficient of `8 * v` and zeros elsewhere: 62, 57 and 63 give 496, 456 and
504. A reference software implementation that truncates instead of rounding
prints one less (495, 455, 503).

## Operations and register map

Byte offsets from `BASEADDR` (default `32'h7E00_0000`, window 1 KB):

| Offset | Name | Access | Contents |
|---|---|---|---|
| 0x000-0x0FC | A | R/W | 64 samples, row-major: cover block or coefficient block |
| 0x100-0x1FC | B | R/W | 64 samples: watermark block |
| 0x200-0x2FC | OUT | R | 64 results |
| 0x300 | CTRL | W: start, R: last accepted code | bits 2:0 operation code |
| 0x304 | STATUS | R | bit 0 busy, bit 1 done, bit 2 rejected, bit 3 write dropped, bit 4 core busy |
| 0x308 | CYCLES | R | length of the last operation in clock cycles |

| Code | Operation | What it does | Cycles |
|---|---|---|---|
| 1 | `OP_DCT` | DCT(A) -> OUT | 4101 |
| 2 | `OP_IDCT` | IDCT(A) -> OUT | 4101 |
| 3 | `OP_EMBED` | 0.85 A + 0.15 B -> OUT (A, B hold coefficients) | 66 |
| 4 | `OP_WATERMARK` | DCT(A) -> C1, DCT(B) -> C2, embed -> C1, IDCT(C1) clamped -> OUT | 12366 |

`OP_WATERMARK` is three transforms of 4099 cycles, 64 embedder cycles and
the hand-offs between phases; at a 100 MHz bus clock a block takes about
124 us. The separate operations let software do any step itself, for
example embed in software with other weights.

Rules a driver must follow:

* Load A (and B), write CTRL, poll STATUS until bit 0 is clear, read OUT.
* A start while busy, or an unknown code (0, 5, 6, 7), is ignored and sets
  STATUS bit 2.
* Writes to A or B while busy are dropped and set STATUS bit 3, so the
  sources of a running operation cannot be corrupted.
* Sticky bits 1 to 3 clear when an operation is accepted.
* A buffer write needs byte enables 1:0; a CTRL write byte enable 0.

## OPB attachment

`opb_slave_if` answers transfers whose address falls in its window. In the
first cycle of a transfer it raises a one-cycle register access; the next
cycle it raises `Sl_xferAck` and, for a read, drives the data on `Sl_DBus`.
Every transfer takes two cycles. `Sl_DBus` is zero whenever no read is
acknowledged, as the OR-combined OPB data bus needs. Retry, error and
timeout suppression are tied low: no access takes longer than two cycles.
Bit 0 is the least significant bit throughout (the IBM convention numbers
the same wires the other way round). Three assertions state the slave's
bus rules: acknowledge only while selected, idle data bus at zero, and
one-cycle acknowledges.

## Clock and reset

Everything runs on `OPB_Clk`. `OPB_Rst` is active high; inside, it becomes
the active-low asynchronous reset of the sequencer, core and embedder. The
block buffers are not reset; software loads them before use.

## The surrounding system

The peripheral was designed for an FPGA system built from vendor library
cores around a hard PowerPC 405 at 100 MHz: a Processor Local Bus (PLB)
with DDR SDRAM (256 MB) and 64 KB block-RAM controllers, a PLB-to-OPB
bridge, a VGA controller reached through an OPB-to-DCR bridge, and OPB
peripherals for CompactFlash (the image source), UART (a serial console),
GPIO and AC97. None of those are part of this RTL; the testbenches replace
the processor with an OPB bus-functional master.

## Where this design makes its own choices

The algorithm (8x8 blocks, orthonormal DCT, weights 0.85 for the cover and
0.15 for the watermark, DCT -> add -> IDCT), the use of a hardware DCT/IDCT
core on the OPB and the presence of an embedder core are given. Chosen here:

* direct double-sum evaluation on one shared MAC, and its pipeline;
* all number formats and the rounding (half up) and saturation;
* the clamp of final pixels to 0..255;
* the embedder in hardware next to the DCT core (one system description
  places embedding in software; both are possible with the operations
  above);
* the register map, operation codes, status bits, drop/reject behaviour,
  base address and two-cycle bus timing;
* one block of one colour component per operation; software loops over
  components and blocks.

The reported implementation ran at up to about 131 MHz on a Virtex-II Pro;
the sizes and speed of this RTL have not been measured on any FPGA.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/wm_pkg.sv tb/tb_wm_coprocessor.sv --top-module tb_wm_coprocessor
./obj_dir/Vtb_wm_coprocessor
```

| Testbench | Covers |
|---|---|
| `tb_dct2d_core` | constant block, random blocks against a `$cos` model, inverse, round trip, 4099-cycle latency |
| `tb_wm_embedder` | hand-worked and random pairs against floating point |
| `tb_wm_ctrl` | phase order and operation lengths with stub core and embedder, rejections |
| `tb_opb_slave_if` | write/read-back, two-cycle transfers, address window, idle data bus |
| `tb_wm_coprocessor` | the whole peripheral at default parameters through the OPB: the three constant R/G/B blocks, DCT, IDCT, EMBED, random images through WATERMARK, clamping, rejected starts, dropped writes, CYCLES |
| `tb_wm_image` | a 16x16 RGB image watermarked block by block: RGB separation and reassembly in the testbench, 12 `OP_WATERMARK` runs, every pixel against the model |

The end-to-end testbench counts how often each mechanism happened (each
operation, clamping, both kinds of rejection, dropped writes) and fails if
any never did. It runs in well under a second.

## Changing the design

* Other weights: `EMB_K_COVER`/`EMB_K_WM` in `wm_pkg` or the embedder
  parameters; keep them summing to `2**EMB_FRAC` so flat areas are unchanged.
* More precision: raise `COEF_FRAC` in `wm_pkg` (the datapath width follows).
* Faster transform: replace `dct2d_core` with a row-column or multi-MAC
  version keeping the same start/done and read/write ports; `wm_ctrl` only
  waits for `done`.
