# Gesture-recognition vision front end on an FPGA

This RTL is the pixel-level front end of a smart-camera gesture recogniser.
An image group comes in. It holds a luminance frame (Y), a background frame and a downsampled chroma frame (Cr/Cb), each 384 × 240 pixels of one byte.
Three stages follow, in a chain:

1. **Region** compares each pixel with the background and with thresholds. It writes two marked images: one of skin-tone regions and one of non-skin regions.
2. **Contour** scans each marked image. It traces the boundary of every region it finds and sends the boundary pixels out as (x, y) coordinates, one packet per contour.
3. **Ellipse** turns each packet into the five parameters of a fitted ellipse: centre, orientation and the two semi-axes. It works in two blocks. `ellipse_moments` computes the count, centre and second moments. `ellipse_axes` computes the orientation and axes from those moments.

The ellipse parameters feed a later matching stage, which labels ellipses as head, torso or hands. That stage is not part of this RTL. Its inputs leave the top on the `ell_*` stream.

The target is a Xilinx Virtex-II (XC2V2000) multimedia board with five independent 512K × 32 ZBT SRAM banks. All images live in those banks. The FPGA holds only pipelines and state machines.

## Structure

```
 host bytes ──rx──►┌──────────────┐          ┌───────────────┐
                   │  ctrl_fsm    │◄────────►│ 5 × zbt_ctrl  │◄──► 5 external ZBT banks
 host bytes ◄─tx───│ (sequencer)  │          └───────────────┘
                   │              │──4 px──►┌────────────────┐
                   │              │◄─4 px───│ 4 × region_pixel│
                   │              │         └────────────────┘
                   │              │◄──mem──►┌─────────┐ (x,y,eop) ┌─────────────────┐   ┌──────────────┐
                   └──────────────┘         │ contour │──────────►│ ellipse_moments │──►│ ellipse_axes │──► ell_*
                                            └─────────┘ valid/ready└─────────────────┘   └──────────────┘
```

`gesture_fpga_top` wires these together. Its ports are the host byte link, the threshold word, the ZBT pins of the five banks (one packed struct per bank) and the ellipse result stream (`ell_valid`/`ell_ready`, with count, centre, moments, orientation and axes).

### Memory layout

Each image has its own bank, with four consecutive pixels packed into one 32-bit word. Pixel *i* of an image sits in byte `i % 4` (bits `8*(i%4)+7 : 8*(i%4)`) of word `i / 4`. One image is therefore 23 040 words.

| bank | contents |
|------|----------|
| 0 | Image 1: luminance Y (input) |
| 1 | Image 2: background (input) |
| 2 | Image 3: Cr/Cb chroma (input) |
| 3 | Image 1′: skin regions, later with contours marked |
| 4 | Image 3′: non-skin regions, later with contours marked |

Why this layout: in one clock the Region pass reads one word from each of the three input banks and writes one word to each of the two output banks. So a whole image group takes 23 040 memory cycles. Other layouts need fewer banks but cost two or four times the cycles.

Pixel codes in the marked images: `00` background, `FF` region, `80` contour (boundary pixel already traced).

### Sequence of one run (`ctrl_fsm`)

A `start` pulse begins a run. `phase` then steps through these phases:

| phase | what happens |
|-------|--------------|
| `PH_LOAD` | Takes 3 × 92 160 bytes from `rx_valid`/`rx_data`: Image 1, then 2, then 3, each in raster order. Packs four bytes into a word (first byte in the low byte) and writes banks 0, 1 and 2. There is no `rx_ready`, so the link must not send faster than one byte per cycle. Gaps are fine. |
| `PH_REGION` | Reads word *k* of banks 0–2 in the same cycle, for *k* = 0 … 23 039 back to back. Feeds the four lanes and writes their results to word *k* of banks 3 and 4. |
| `PH_CONTOUR_Y` | Runs Contour on bank 3. |
| `PH_CONTOUR_C` | Runs Contour on bank 4. |
| `PH_UNLOAD` | Sends bank 3, then bank 4, as bytes on `tx_valid`/`tx_ready`/`tx_data`, in raster order. |
| `PH_DONE` | One cycle, with `done` high. Then the sequencer is idle again. |

At full size, with a byte per cycle on the link, the end-to-end test measures:
- Region: 23 048 cycles (23 040 words plus 8 cycles of memory and pipeline latency)
- Contour on both test images: about 70 000 cycles
- load and unload: bounded by the host link

## Region (`region_pixel`, four lanes)

There is one lane per byte of the memory word, and each lane is a four-stage pipeline. Let Y, BG and C be the pixel's bytes from Images 1, 2 and 3, and t1 … t5 the thresholds (`thr.t1` … `thr.t5`, 8 bits each, set at run time):

```
A = |Y − BG|
B = C > t1                               (skin chroma)
C = (A > t2) and (t3 > Y) and (Y > t4)   (foreground, sensible brightness)
D = A > t5
Image 1′ = (C and D)              ? FF : 00
Image 3′ = (not(C·D) or not(C·B)) ? FF : 00
```

The four stages are:
1. register the inputs
2. compute A and B
3. compute C and D
4. register both output bytes

Throughput is one pixel per lane per cycle. `out_valid` follows `in_valid` by exactly 4 cycles. All comparisons are strict and unsigned.

The Image 3′ expression is taken literally from the equation of the original design. Its reading is ambiguous, and ¬C·D + ¬C·B would be the other candidate. To change it, edit one line in stage 4 of `region_pixel.sv` and the reference model in the testbenches.

## Contour (`contour`)

This is the hardest part of the design. It works on one marked image in memory, through an in-order memory port: `req`/`req_ready` out, and `rsp` back with any fixed latency. It streams tokens `(out_x, out_y, out_eop)` with a valid/ready handshake. It is a self-timed state machine with four working parts:

**A – scan.** Reads the image word by word with up to 8 reads in flight, and examines the four pixels of each word in turn. A pixel *starts a contour* when it is `FF` and either it is in column 0 or its left neighbour is `00`. Pixels already marked `80` never start a contour. So each outer boundary and each hole boundary is traced exactly once. When a start is found, read data still in flight is drained and thrown away.

**B – start.** Records the start pixel p0 and sets the search direction to "west".

**C – look.** Moore-neighbour tracing with the 8 directions numbered E, SE, S, SW, W, NW, N, NE (0 … 7, y growing downward):
- From the current pixel it reads neighbours s+1, s+2, … s+7 in turn, one memory read each, until it finds one that is not `00`. Neighbours outside the image count as background.
- It moves to that pixel. The new search start is d+5 when the move direction d is diagonal and d+6 otherwise, so the search always begins just outside the region.
- The trace ends in one of three ways:
  - it is back at p0 and about to repeat the very first move
  - the start pixel has no neighbours (a one-pixel region)
  - a guard of 4·W·H steps runs out (never reached on real boundaries)

**D – emit.** For every boundary pixel still at `FF`, it byte-writes `80` into the image and sends `(x, y)`. It waits until both the write and the token have been accepted, in either order. A pixel already at `80` is walked through but not sent again, so a pixel on a one-pixel-wide neck is reported once.

After the trace an end-of-packet token is sent (`out_eop` = 1, with x and y = p0). Scanning then resumes just right of p0. `done` pulses when the last word has been scanned. The image left in memory shows every traced boundary as `80`, and these images are what the unload phase returns.

Throughput depends on the picture:
- scanning costs one cycle per pixel, plus the read latency once per start
- tracing costs roughly one memory round trip per neighbour looked at

The tracing rule, the start rule and the marking code are choices of this design. The only requirements are that every region of both images is scanned, its periphery is traced, and the boundary pixels are sent as a list per region.

## Ellipse moments (`ellipse_moments`)

This block accumulates six sums per packet: n, Σx, Σy, Σx², Σy² and Σxy. That costs five additions and three multiplications per pixel, which is the shape of the cheaper "transformed" form of the moment formula:

```
x̄   = Σx / n            ȳ = Σy / n
mxx = Σx²/n − x̄²        myy = Σy²/n − ȳ²        mxy = Σxy/n − x̄·ȳ
```

On the end-of-packet token, one bit-serial restoring divider produces the five quotients `(S << FRAC) / n`, one after the other and truncated. Three products and subtractions follow. The results are fixed point with `FRAC` = 8 fraction bits:
- `out_xavg`, `out_yavg` are unsigned
- `out_mxx`, `out_myy`, `out_mxy` are signed, `MW` = 27 bits at full size

The result appears `5·(DIVW+1)+2` cycles after the end-of-packet token is accepted, where DIVW = 2·max(XW,YW) + NW + FRAC = 43 at full size. It is held until `out_ready`. During division `in_ready` is low, which stalls Contour. An empty packet gives no result.

Fixed point is this design's choice. The original work used floating point of about 18–20 bits, and found that such an Ellipse does not fit the XC2V2000 at that precision. The sums here are exact, so only the divisions round.

## Ellipse axes (`ellipse_axes`)

This block completes the fit. From the three moments it computes the orientation and the two semi-axis lengths:

```
rot = ½ · atan2(2·mxy, mxx − myy)
R   = √((mxx − myy)² + (2·mxy)²)
ax  = √(mxx + myy + R)        ay = √(mxx + myy − R)
```

mxx + myy ± R is twice the larger or smaller eigenvalue of the moment matrix. Points spread evenly along the outline of an ellipse with semi-axes a and b give eigenvalues a²/2 and b²/2. Contour pixels are such outline points, so `ax` and `ay` estimate a and b directly. (A filled region would need a factor √2 more.)

The hardware works in three steps:
1. **CORDIC.** One unit in vectoring mode, with 16 iterations (one per cycle) and 16 guard bits, turns the vector (mxx − myy, 2·mxy) onto the x axis.
   - The summed rotation angles give atan2.
   - The final x is R times the CORDIC gain. One multiplication by 39797 / 2¹⁶ ≈ 1/1.64676 removes the gain.
   - Vectors in the left half-plane are first turned by 180°.
2. **Square roots.** Two bit-serial restoring square roots run side by side, one result bit per cycle. A negative operand, which only rounding can produce, gives 0.
3. **Output.** The result is loaded onto the output ports.

Output formats:
- `ell_rot`: signed radians with 16 fraction bits, in (−π/2, π/2]
- `ell_ax`, `ell_ay`: unsigned with 8 fraction bits

Count, centre and moments pass through with the result. Latency is 38 cycles from acceptance (16 + 19 + 3). One result is held at a time, and a busy unit stalls `ellipse_moments`.

Accuracy against real arithmetic:
- The angle is within 24/65 536 rad whenever R ≥ 0.25 pixel².
- For near-circular contours the orientation is not meaningful.
- The axes are within a few LSBs.

The formulas and hardware are this design's choice. The original gives only the five parameters and notes that an arctangent and square roots are involved.

## ZBT controller (`zbt_ctrl`)

`zbt_ctrl` controls one bank. It takes one request per cycle (`req_ready` is always 1): a word read or a byte-masked write, in order. It uses pipelined ZBT timing:
- the command goes out on the pins one cycle after the request
- write data is driven two cycles later
- read data is sampled two cycles after the command and returned on `rsp` one cycle after that

So the read latency is 3 cycles from acceptance. `adv_ld_n` and `cke_n` are tied active: bursts and clock-enable stalls are unused. The 36-bit parts are used as 32 bits, with no parity. The bidirectional data bus is split into `dq_o`, `dq_oe` and `dq_i`, so the pad must be added at the board level.

## What follows the original design and what does not

**Follows it:**
- the Region → Contour → Ellipse chain
- the actor equations of Region and its four-stage pipeline
- Contour as a serial, self-timed process over the whole image
- the five-bank layout with four pixels per word, giving 23 040-cycle Region passes
- the moment formula with the per-pixel cost above
- the five ellipse parameters (centre, orientation, two axes) found with an arctangent and square roots
- 384 × 240 pixel images and 512K × 32 ZBT banks

**Own choices:**
- four parallel Region lanes
- the Contour tracing, start and stop rules and the `80` marking code
- fixed point instead of floating point
- the exact fitting formulas (eigenvalue form, outline scaling) and the CORDIC and square-root hardware
- the host link as a plain byte stream with result images sent back
- the phase sequencer
- the direct Contour → Ellipse handshake with no buffer
- ZBT latency details
- active-low asynchronous reset everywhere

**Not built:**
- the Match classifier (its rules are not available)
- floating-point arithmetic in Ellipse
- the RS-232 serial core. Only its byte streams are used, so a UART with a byte interface must be attached.
- the external SRAMs and the host

## Files

| file | contents |
|------|----------|
| `rtl/hpdf_pkg.sv` | sizes, bank map, pixel codes, request/response and pin structs, phase enum |
| `rtl/region_pixel.sv` | one Region lane |
| `rtl/contour.sv` | contour scan and trace |
| `rtl/ellipse_moments.sv` | moment accumulator and divider |
| `rtl/ellipse_axes.sv` | orientation and semi-axes (CORDIC, square roots) |
| `rtl/zbt_ctrl.sv` | one ZBT bank controller |
| `rtl/ctrl_fsm.sv` | load / Region / Contour / unload sequencer |
| `rtl/gesture_fpga_top.sv` | top level |
| `tb/zbt_sram_model.sv` | behavioural ZBT SRAM (simulation only) |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/gesture_tb_body.svh` | shared end-to-end test |
| `tb/tb_gesture_fpga_top.sv` | end-to-end test at 64 × 32 |
| `tb/tb_gesture_fpga_top_full.sv` | end-to-end test at the full 384 × 240 size, with default parameters |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops, and each has a watchdog. Build and run one with Verilator 5 from the project root, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/hpdf_pkg.sv tb/tb_gesture_fpga_top_full.sv --top-module tb_gesture_fpga_top_full
./obj_dir/Vtb_gesture_fpga_top_full
```

The end-to-end test works as follows:
- It draws a picture on a textured background: a skin-coloured disc, a block, a ring with a hole, a single pixel and a bar on the image border.
- It sends the picture through the host link with gaps.
- It computes its own reference for the marked images, the contour order and the moments.
- It compares every returned byte and the count, centre and moments of every ellipse result exactly with that reference. It checks orientation and axes within tolerance, and checks the Region pass length.
- It counts these events and fails if any never happened: Region word passes, contours in both images, a one-pixel contour, neighbour reads outside the image, reads dropped at a contour start, re-met boundary pixels, Contour stalled by Ellipse, moments held by a busy axis unit, orientations computed, held results, rx gaps and tx back-pressure.

The full-size run takes about a second of simulation time.

Assertions in the RTL cover:
- the Contour output holding steady while stalled
- no data driven during ZBT reads
- the four Region lanes staying in step
- Contour being active only in its phases

They are written with `disable iff (!rst_n)`, so Verilator notes `rst_n` as used both synchronously and asynchronously. This is harmless.
