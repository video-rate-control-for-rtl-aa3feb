// complexity_estimator: out-of-loop frame complexity estimation and scene-change
// detection for a co-designed encoder.
//
// In a hardware/software encoder the MCU runs the R-D model, but it needs the
// frame complexity (SAD) before the accelerator's macroblock loop starts. Then the
// MCU and the accelerator need not exchange data per MB. This block estimates
// that complexity from the input video alone, as a video preprocessor would,
// without motion estimation:
//   region_stats           mean and deviation of |cur - ref| per 1x16 region
//   band_region_stats      the same per Nx16 region, used when N > 1
//   chi_accumulator        chi = sum mean*deviation per frame and per pack of
//                          PACK_W x PACK_H MBs (2x2 by default, any rectangle
//                          allowed), C_hat = a*chi >> 16
//   scene_change_detector  chi > threshold and minimal I distance -> I-frame
// For a frame to be coded intra, the luma itself replaces the difference, and
// I_a replaces a.
//
// The region is N lines by one macroblock width. The default N = 1 works on
// single scanlines and needs only two 16-byte buffers, which is the choice the
// design recommends when memory access matters. N > 1 (a power of two dividing
// the MB size) keeps two bands of N lines, 2*N*WIDTH bytes.
//
// To save memory bandwidth the frames may be subsampled SUB:1 in both directions
// before they reach the estimator (SUB = 1, 2 or 4). WIDTH and HEIGHT remain
// the coded frame size. The block then takes (WIDTH/SUB) x (HEIGHT/SUB) pixels,
// a macroblock covers 16/SUB of them each way, and regions shrink to 16/SUB
// pixels so that they still align with macroblocks and packs. The subsampling
// itself, which pixels are fetched, is up to the pixel source.
//
// Interface: pulse `frame_start` with `intra` to begin a frame, then stream
// (WIDTH/SUB)*(HEIGHT/SUB) pixels in raster order with pix_valid/pix_ready. `frame_done`
// pulses with chi and c_hat. `sc_valid` follows one cycle later with
// scene_change. chi per pack is read through pack_rd_addr/pack_chi. Throughput is
// one pixel per cycle. frame_done comes 16/SUB+2 cycles after the cycle of the
// last pixel for N = 1 (18 without subsampling). For N > 1 it comes
// N*WIDTH/SUB+2 cycles after, once the last band's deviation pass has ended.
module complexity_estimator
  import rc_pkg::*;
#(
  parameter int unsigned WIDTH  = 352,
  parameter int unsigned HEIGHT = 288,
  parameter int unsigned N      = 1,
  parameter int unsigned PACK_W = 2,
  parameter int unsigned PACK_H = 2,
  parameter int unsigned SUB    = 1,
  localparam int unsigned NPACK = ((((WIDTH + 15) / 16) + PACK_W - 1) / PACK_W)
                                * ((((HEIGHT + 15) / 16) + PACK_H - 1) / PACK_H),
  localparam int unsigned PAW   = $clog2(NPACK)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  est_cfg_t       cfg,
  input  logic           frame_start,
  input  logic           intra,
  input  logic           pix_valid,
  output logic           pix_ready,
  input  logic [7:0]     cur,
  input  logic [7:0]     ref_luma,
  output logic           frame_done,
  output logic [47:0]    chi,
  output logic [47:0]    c_hat,
  output logic           sc_valid,
  output logic           scene_change,
  output logic [7:0]     frames_since_i,
  input  logic [PAW-1:0] pack_rd_addr,
  output logic [47:0]    pack_chi
);
  localparam int unsigned MB = 16 / SUB;           // MB size in input pixels
  localparam int unsigned M  = MB;                 // region width
  localparam int unsigned FW = WIDTH / SUB;
  localparam int unsigned FH = HEIGHT / SUB;
  localparam int unsigned DW = $clog2(N * M * 255 + 1);

  logic          intra_q;
  logic          r_valid;
  logic [7:0]    r_mean;
  logic [DW-1:0] r_dev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           intra_q <= 1'b0;
    else if (frame_start) intra_q <= intra;
  end

  if (N == 1) begin : g_line
    region_stats #(.M (M)) u_stats (
      .clk, .rst_n,
      .in_valid  (pix_valid),
      .in_ready  (pix_ready),
      .cur       (cur),
      .ref_luma  (ref_luma),
      .intra     (intra_q),
      .out_valid (r_valid),
      .mean      (r_mean),
      .dev       (r_dev)
    );
  end else begin : g_band
    band_region_stats #(.WIDTH (FW), .N (N), .M (M)) u_stats (
      .clk, .rst_n,
      .in_valid  (pix_valid),
      .in_ready  (pix_ready),
      .cur       (cur),
      .ref_luma  (ref_luma),
      .intra     (intra_q),
      .out_valid (r_valid),
      .mean      (r_mean),
      .dev       (r_dev)
    );
  end

  chi_accumulator #(
    .WIDTH (FW), .HEIGHT (FH), .N (N), .M (M), .PACK_W (PACK_W), .PACK_H (PACK_H), .MB (MB)
  ) u_acc (
    .clk, .rst_n,
    .frame_start  (frame_start),
    .intra        (intra_q),
    .in_valid     (r_valid),
    .mean         (r_mean),
    .dev          (r_dev),
    .scale_a      (cfg.scale_a),
    .scale_ia     (cfg.scale_ia),
    .frame_done   (frame_done),
    .chi          (chi),
    .c_hat        (c_hat),
    .pack_rd_addr (pack_rd_addr),
    .pack_chi     (pack_chi)
  );

  scene_change_detector u_sc (
    .clk, .rst_n,
    .chi_valid      (frame_done),
    .chi            (chi),
    .frame_is_intra (intra_q),
    .threshold      (cfg.sc_threshold),
    .min_dist       (cfg.min_i_dist),
    .sc_valid       (sc_valid),
    .scene_change   (scene_change),
    .since_i        (frames_since_i)
  );

endmodule
