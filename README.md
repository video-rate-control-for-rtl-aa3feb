# Rate control for SoC video encoders: a table-driven hardware loop and an out-of-loop complexity estimator

A video encoder must keep its output near a target bitrate. It does so by choosing a
quantizer (QP) for every frame, or for every 16x16 macroblock (MB). Software encoders
make this choice with a rate-distortion (R-D) model. The model needs the complexity of
the content, usually the sum of absolute differences (SAD) from motion estimation, and
it needs multiplications and divisions. On an SoC the MB loop (motion estimation,
DCT, quantization, entropy coding) runs in a hardware accelerator and the model runs
on a microcontroller (MCU). Per-MB rate control then costs an interrupt and two bus
transfers per MB: SAD to the MCU, QP back. For CIF video at 30 frames/s that is
11,880 round trips per second. With 60 + 30 cycles per round trip, the accelerator
waits about 1% of its time and the MCU spends about 1.4% of its time on interrupts,
before it computes anything.

This RTL implements the two answers of the scheme it is based on (a thesis on rate
control for co-designed and pure-hardware MPEG-4 encoders):

1. **Table-based rate control (`hw_rate_control`)**, for an encoder without MCU
   involvement. The R-D model is replaced by a 32x32 table of QPs, indexed by the
   texture bits available for the MB and the MB's SAD. The table is refreshed with
   the QPs that were actually used, so it follows the content without any model
   arithmetic. The loop needs one divider, shifts, adders and a 5 kbit SRAM, and it
   sits next to the motion estimator.
2. **Out-of-loop complexity estimator (`complexity_estimator`)**, for a co-design in
   which the MCU keeps the R-D model. The estimator predicts the frame's SAD, and the
   SAD of each group ("pack") of MBs, from simple statistics of the frame
   difference. It needs no motion estimation. The MCU can then fix all QPs before
   the MB loop starts and talk to the accelerator once per frame. The same
   statistic detects scene changes.

`video_rc_top` instantiates both side by side. They are alternatives for different
SoC partitions and share only clock and reset.

```
video_rc_top
 |- hw_rate_control          table-based rate control (TBRC)
 |   |- buffer_size_update   decoder-buffer model, frame target bits
 |   |- rc_divider           one sequential divider, shared by two divisions
 |   |- table_rom            initial table (computed from a formula)
 |   |- table_initiator      ROM -> SRAM copy at start-up
 |   |- modeling_table       1024 x 5-bit SRAM
 |   |- avg_qp_unit          TotalQP, No_MBs, AverageQP by shifting
 |   `- qp_refine            weighting with AverageQP, +/-2 QP limit
 `- complexity_estimator     out-of-loop estimation
     |- region_stats         mean / deviation of |cur-ref| per 1x16 region (N = 1)
     |- band_region_stats    the same per Nx16 region, N > 1 (selected by N)
     |- chi_accumulator      chi per frame and per 2x2-MB pack, C_hat = a*chi>>16
     `- scene_change_detector
rc_pkg                       shared types (rc_cfg_t, est_cfg_t, qp_t) and constants
```

## 1. The table-based rate control

### 1.1 The modeling table

The table has 32 texture-bit bins by 32 SAD bins, with a 5-bit QP (1..31, MPEG-4)
in each entry. The bins are powers of two, so indexing is a shift:

| index | bin width | range covered | bin number |
|---|---|---|---|
| texture bits per MB (`B_mb_text_bit`) | 64 | 0..2047 | `min(B_mb_text_bit >> 6, 31)` |
| MB SAD | 128 | 0..4095 | `min(SAD >> 7, 31)` |

Address = `{text_bin, sad_bin}`. A larger value than the range saturates into bin 31.
The table should have the expected R-D shape: at equal SAD, more bits means a lower
QP; at equal bits, more SAD means a higher QP.

**Initial content.** In the original scheme the start-up table comes from encoding
a training sequence, with missing entries interpolated. It sits in an off-chip ROM,
and an initiator copies it into the SRAM when encoding starts. No training data is
available, so `table_rom` computes its content from the first-order model
`R = alpha*SAD/QP` with alpha = 4, taken at the bin centres:

```
QP(t, s) = clamp( (16*(2s+1) + (2t+1)) / (2*(2t+1)), 1, 31 )      // = round(8*(2s+1)/(2t+1))
```

This is an assumption of this implementation. The table adapts away from it (see
1.5), but slowly where the bits per MB are small (section 4). To use a trained
table, replace the function in `table_rom.sv`.

### 1.2 Frame start: budget

`buffer_size_update` keeps a decoder-buffer model. With `B/F` the bits per frame
(bitrate / frame rate), `N` a window in frames and `w` the intended buffer usage:

```
V0       = N * B/F * (1 - w)          initial available buffer (set by cfg_load)
V'       = V - K + B/F                after a frame of K bits
P_target = V + B/F - V0               target of the next P frame
I_target = k * P_target               k = 4..9 (I frames are several times larger)
```

At `frame_start` the controller then sets up:

```
B_text_bit = B_frame - B_OH_bit       texture budget; B_OH_bit = overhead bits of the previous frame
B_mb_OH    = B_OH_bit / MBsInFrame    expected overhead per MB (divider, once per frame)
```

### 1.3 Per MB: QP

For each MB request (SAD from the motion estimator):

```
B_mb_text_bit = B_text_bit / (MBsInFrame - No_MBs)     (divider; skipped if B_text_bit < 0)
QP_lut        = table[{bin(B_mb_text_bit), bin(SAD)}]
```

`qp_refine` then blends the table value with `AverageQP`, the average QP of the MBs
coded so far. This guards against a table entry that does not fit the current
content:

| condition | MB QP |
|---|---|
| `B_mb_text_bit < 0` (budget exhausted) | 31 |
| `B_mb_text_bit > TEXT_THRESHOLD` (plenty of bits) | `(2*QP_lut + AverageQP) / 4` |
| otherwise | `(QP_lut + AverageQP) / 2` |

The result is clamped to 1..31. MPEG-4 syntax allows a QP change of at most +/-2
from one MB to the next, so the QP is then limited to `prev_QP +/- 2`. A MB whose mode
cannot carry a QP change (not coded, four motion vectors) is flagged by the encoder
with `mb_qp_locked` and keeps `prev_QP`. The first MB of a frame is not limited,
because its QP goes into the picture header.

The first blending rule takes only about 3/4 of the table value when bits are plentiful.
It is kept as specified. `TEXT_THRESHOLD` is not specified; it is a parameter with
default 1024, half of the 2048 range.

### 1.4 Per MB: bookkeeping after coding

The encoder returns the MB's texture bits `T`, overhead bits `O` and the QP it
actually used `q` (normally the QP it was given):

```
B_text_bit = B_text_bit - T + B_mb_OH - O     budget corrected for the overhead prediction error
No_MBs     = No_MBs + 1
TotalQP    = TotalQP + q
AverageQP  = TotalQP >> log2(No_MBs)          only when No_MBs is a power of two, else held
```

`avg_qp_unit` does the last line. The average is refreshed after MBs 1, 2, 4, ...,
256 of a frame, so no divider is needed. It keeps its value into the next frame,
which gives the first MBs of a frame a sensible reference.

### 1.5 Table update

The real outcome (q was used and gave T texture bits at this SAD) is written into the
entry it belongs to. That is the entry for the *actual* bits, which is not
necessarily the entry that was looked up:

```
table[{bin(T), bin(SAD)}] = (table[{bin(T), bin(SAD)}] + q) / 2
```

Halving keeps some history. This refresh is what makes the table adapt.

### 1.6 Frame end

The encoder reports the frame's total bits `K` and its overhead bits. `V` is
updated, and the overhead becomes `B_OH_bit` for the next frame.

### 1.7 Sequence and timing

The controller is one FSM (`hw_rate_control.sv`). Each transfer uses a valid/ready
handshake (this implementation's choice):

```
cfg_load ─► table copy (init_busy, 1025 cycles) ─► ready_for_frame
frame_start ─► B_mb_OH division (33 cycles)
  repeat MBsInFrame times:
    mb_req (SAD, locked) ─► qp_valid/qp      36 cycles after the request (3 if budget exhausted)
    mb_res (T, O, q)     ─► table refresh     2 cycles
frame_end (K, frame overhead) ─► ready_for_frame
```

The divider is radix-2 (one quotient bit per cycle). It is shared by the per-frame
and per-MB divisions, which never overlap. A CIF frame of 396 MBs needs about 16k
cycles of rate-control time. At a 100 MHz accelerator clock and 30 frames/s a frame
lasts 3.3M cycles, so the QP latency can be hidden behind motion estimation of the
next MB. `cfg_load` is taken only while idle, and reloads the buffer model,
AverageQP and the table.

Configuration (`rc_cfg_t`): `bits_per_frame` (24 bits), `window_n`, `omega_q8` (w in
1/256), `k_iframe`, `init_qp`. Status outputs: `frame_target_bits`,
`text_bits_left` (B_text_bit), `mb_text_target` (B_mb_text_bit, -1 when exhausted),
`avg_qp`. Two assertions check that `qp` holds while `qp_valid` waits for
`qp_ready`, and that it stays in 1..31.

## 2. The out-of-loop complexity estimator

### 2.1 What is estimated

For a P frame, take the luma difference `d = |cur - ref|` against the reference
frame. For each region R of N lines by 16 pixels (by default N = 1, a piece of one
scanline; 16/SUB pixels with subsampled input, see 2.2):

```
mean(R)      = (sum d) >> log2(16*N)
deviation(R) = sum |d - mean(R)|
chi          = sum over regions of mean(R) * deviation(R)
C_hat        = (a * chi) >> 16          estimated frame SAD; a from the host
```

The mean measures how much changed; the deviation measures how irregular the change
is, which is what motion compensation cannot remove. For a frame to be coded intra,
`d` is the luma itself and the factor `I_a` replaces `a`. The host refines both
after each frame (`a = 2^16 * SAD_true / chi`, `I_a = I_a * R_target / R_true`).
Those divisions stay in the MCU.

For MB-level control the same sum is kept per pack of `PACK_W` x `PACK_H` MBs
(2x2 by default, 99 packs in CIF; any rectangle can be set).
The host reads `chi_pack(i)` through `pack_rd_addr`/`pack_chi`. It scales each pack
with its own factor and sets one QP per pack before the MB loop.

### 2.2 How the blocks do it

* `region_stats` needs the mean before the deviation, so each region is buffered.
  Two 16-byte buffers alternate: one region fills while the deviation of the
  previous one is summed. The block therefore takes one pixel per cycle without
  stalls.
* `band_region_stats` replaces it when the estimator's parameter `N` is above 1
  (a power of two up to 16). A region is then complete only when its last line
  arrives, so a whole band of N lines is stored: two band buffers of N x WIDTH
  bytes alternate. A running sum per region column is built while a band is
  written. At the band's end all means are latched. The deviation pass then walks
  the stored band region by region while the next band is written. Both directions
  take N*WIDTH cycles per band, so the rate stays one pixel per cycle. The cost is
  2*N*WIDTH bytes (1408 bytes for N = 2 in CIF) against 32 bytes at N = 1. That
  is why N = 1 is the default.
* `chi_accumulator` knows each region's position from the raster order, and hence
  its pack. The first region of each pack in a frame *writes* its product instead
  of adding it, so the pack memory needs no clearing pass between frames.
  `frame_done` pulses 18 cycles after the last pixel with `chi` and `C_hat`
  (N*WIDTH+2 cycles for N > 1, after the last band's deviation pass).
* Subsampled input (`SUB` = 2 or 4): to save memory bandwidth the pixel source
  may deliver only every SUB-th pixel of every SUB-th line. `WIDTH`/`HEIGHT` stay
  the coded frame size. The estimator then expects (WIDTH/SUB) x (HEIGHT/SUB)
  pixels, treats 16/SUB pixels as one MB, and shrinks the region to 16/SUB
  pixels, so regions and packs still line up with the MBs the encoder codes.
  `a` and `I_a` absorb the change of scale.
* `scene_change_detector` flags a scene change when `chi > sc_threshold` and at least
  `min_i_dist` frames have passed since the last I-frame. Such a frame should be
  coded as an I-frame. The distance rule avoids strings of I-frames during long
  transitions. Both values are host registers: the threshold is tuned by
  experiment, and the distance is meant to depend on chi's size, by a rule the
  scheme leaves open.

Configuration (`est_cfg_t`): `scale_a`, `scale_ia` (24 bits), `sc_threshold`
(48 bits), `min_i_dist`.

## 3. Where this RTL departs from, or adds to, the scheme

Own choices where the scheme gives no detail:

* Initial table content: the formula of 1.1 instead of trained data. The ROM is
  on-chip logic rather than an off-chip device.
* `TEXT_THRESHOLD` = 1024 bits.
* All handshakes, the one-entry-per-cycle table copy, and the radix-2 divider.
* The SRAM has one synchronous read port and one write port.
* `B_OH_bit` starts at 0. AverageQP starts at `init_qp` and carries across frames.
  TotalQP and No_MBs restart every frame.
* +/-2 limit: the first MB of a frame is free, and locked MBs keep the previous QP.
* A negative frame target is not clamped. Every MB then gets QP 31 until the buffer
  model recovers.
* Estimator: the region is Nx16 with N = 1 by default (the scheme allows NxM and
  suggests N = 1 when memory traffic matters). N*16 must be a power of two so the
  mean is a shift. The difference is taken as absolute. The mean truncates. The
  pack is 2x2 MBs. The subsampling ratio for `SUB` > 1 is own choice (2:1 or 4:1
  in both directions).

Parts of the scheme not in this RTL:

* The MCU's R-D model (first-order model `QP = beta*C*R_prev*Q_prev/(C_prev*R)`,
  its beta adaptation, the per-pack QP formula), the refinement of `a`, `a_pack(i)`
  and `I_a`, and the per-pack scaling. These are firmware by design.
* Packs of irregular shape (the scheme allows any grouping of MBs). Packs here are
  rectangles of `PACK_W` x `PACK_H` MBs.
* Choosing which pixels to fetch for a subsampled frame. That belongs to the pixel
  source; the estimator only has to be told the ratio (`SUB`, see 2.2).
* The motion estimator, DCT, quantizer and entropy coder, which feed and consume
  the rate control.

## 4. Verification

Every module has a self-checking testbench in `tb/` that ends with
`TB_RESULT checks=N failures=M`. Expected values are computed in the testbench
independently of the RTL: real-arithmetic ROM values, a reference model of the
whole table-based algorithm (`TbrcModel`, a class inside the rate-control
testbenches), and a pixel-level model of chi.

| testbench | what it shows |
|---|---|
| `tb_rc_divider` | 205 divisions incl. /0 and extremes; latency 33 cycles |
| `tb_buffer_size_update` | V0, V', P and I targets over 60 frames |
| `tb_table_rom` | all 1024 entries, and monotonic in both indices |
| `tb_modeling_table` | random read/write against a shadow copy, read-during-write |
| `tb_table_initiator` | SRAM equals ROM after a 1024-cycle copy |
| `tb_qp_refine` | 6144 combinations of the weighting and the +/-2 limit |
| `tb_avg_qp_unit` | AverageQP refreshed only at powers of two, over two frames |
| `tb_hw_rate_control` | 12 frames of 24 MBs with a synthetic encoder; every QP, target, latency and the whole table after each frame |
| `tb_region_stats` | mean/deviation per region; full rate (64 regions in 64*16+17 cycles) |
| `tb_band_region_stats` | 2-line and 4-line regions on a 64-pixel line, P and I mode, with and without input bubbles; no stall at full rate; first and last region of a band N*16+1 and N*WIDTH+1 cycles after its last pixel |
| `tb_chi_accumulator` | chi, C_hat and all packs over three frames, for 2x2-MB packs (99) and 4x1-MB packs (108) |
| `tb_scene_change_detector` | 200 frames incl. suppressed and accepted scene changes |
| `tb_complexity_estimator` | four CIF frames (intra, moving, cut, post-cut), with N = 1 and, in parallel, N = 2 and 2:1 subsampled input |
| `tb_video_rc_top` | both engines concurrently at default size (396 MBs, 352x288). It counts each mechanism (table copy, I-frame target, budget exhausted, both weighting rules, +/-2 limit, locked QP, table update, AverageQP refresh, intra estimation, scene change, suppressed scene change) and fails if any never happens. |
| `tb_workload_cif_rates` | CIF at 30 frames/s, 256/512/768 kbit/s, 0.5 s buffer, 80 frames each |

The workload test uses a synthetic encoder (texture bits = SAD/(8*QP) + noise), since
no real sequences can be coded in simulation. The average frame size over frames
40..79 comes out at 8534, 16890 and 25400 bits for targets of 8533, 17066 and
25600. The test accepts +/-10%. At the higher rates the loop needs about 40 frames
to settle from the formula table. The per-MB texture targets (20..60 bits) all fall
in the first one or two 64-bit bins. Within them the table only learns through the
AverageQP blend and the +/-2 steps. This is a property of the table resolution,
and a trained initial table would shorten it. These numbers say nothing about
picture quality (PSNR), which would need a real encoder.

## 5. Simulating and changing it

Every file is one module or package, named after it. With Verilator 5:

```
# one block, e.g. the rate control
verilator --binary --timing --assert -Irtl -y rtl rtl/rc_pkg.sv tb/tb_hw_rate_control.sv \
          --top-module tb_hw_rate_control -o sim && ./obj_dir/sim

# the whole design at full size
verilator --binary --timing --assert -Irtl -y rtl rtl/rc_pkg.sv tb/tb_video_rc_top.sv \
          --top-module tb_video_rc_top -o sim && ./obj_dir/sim

# lint
verilator --lint-only -Wall -Irtl -y rtl rtl/rc_pkg.sv rtl/video_rc_top.sv --top-module video_rc_top
```

Each simulation takes a few seconds at most. The lint run reports a few unused
package constants and bits, and `SYNCASYNCNET` for `rst_n`. The asynchronous reset
also appears in the `disable iff` of the handshake assertions. These warnings are
harmless.

Main parameters: `MBS_IN_FRAME` (396), `TEXT_THRESHOLD` (1024), `TEXT_BIN_SHIFT`
/ `SAD_BIN_SHIFT` (6 / 7) on `hw_rate_control`; `WIDTH`/`HEIGHT` (352/288) on
`complexity_estimator` and the top; `N` (1), the region height, on both;
`PACK_W`, `PACK_H` (2, 2), the pack shape in MBs, and `SUB` (1), the input
subsampling, on both; `M` and `MB` (16, 16) on the estimator's submodules. The
table stays 32x32 entries (`rc_pkg::BIN_BITS`). Changing the bin shifts changes
the ranges covered, not the table size.

After coarse synthesis the whole design is about 650 flip-flops, some 420 word-level
cells and 10 kbit of memory: the 5 kbit table, 4.75 kbit of pack sums and the two
16-byte region buffers. With 2-line regions (`N` = 2) the band buffers of
`band_region_stats` add about 11 kbit (2 x 2 x 352 bytes) in CIF.
