// video_rc_top: the two rate-control engines for SoC video encoders, side by side.
//
//  * hw_rate_control (table-based rate control) sits inside the encoding
//    accelerator. It takes each macroblock's SAD from the motion estimator and
//    returns its QP. After the MB is coded it takes the MB's texture and overhead
//    bits and refines its table. It needs no help from the MCU.
//  * complexity_estimator belongs to the hardware/software co-design. It works
//    beside the encoding loop, on the input video, and gives the MCU an estimated
//    frame SAD (C_hat), a complexity per 2x2-MB pack and a scene-change flag. The
//    MCU can then choose all QPs of a frame before the loop starts.
// The design offers them as alternatives for different SoC partitions, so they
// share only the clock and reset here. Each brings its own ports out, with the
// prefixes rc_ and est_.
module video_rc_top
  import rc_pkg::*;
#(
  parameter int unsigned MBS_IN_FRAME = 396,
  parameter int unsigned WIDTH        = 352,
  parameter int unsigned HEIGHT       = 288,
  parameter int unsigned N            = 1,     // estimator region height in lines
  parameter int unsigned PACK_W       = 2,     // estimator pack size in MBs
  parameter int unsigned PACK_H       = 2,
  parameter int unsigned SUB          = 1,     // estimator input subsampling SUB:1
  localparam int unsigned NPACK = ((((WIDTH + 15) / 16) + PACK_W - 1) / PACK_W)
                                * ((((HEIGHT + 15) / 16) + PACK_H - 1) / PACK_H),
  localparam int unsigned PAW   = $clog2(NPACK)
) (
  input  logic               clk,
  input  logic               rst_n,
  // ---- table-based hardware rate control ----
  input  rc_cfg_t            rc_cfg,
  input  logic               rc_cfg_load,
  output logic               rc_init_busy,
  output logic               rc_ready_for_frame,
  input  logic               rc_frame_start,
  input  logic               rc_frame_is_intra,
  input  logic               rc_mb_req_valid,
  output logic               rc_mb_req_ready,
  input  logic [15:0]        rc_mb_sad,
  input  logic               rc_mb_qp_locked,
  output logic               rc_qp_valid,
  input  logic               rc_qp_ready,
  output qp_t                rc_qp,
  input  logic               rc_mb_res_valid,
  output logic               rc_mb_res_ready,
  input  logic [15:0]        rc_mb_text_bits,
  input  logic [15:0]        rc_mb_oh_bits,
  input  qp_t                rc_mb_qp_used,
  input  logic               rc_frame_end_valid,
  output logic               rc_frame_end_ready,
  input  logic [31:0]        rc_frame_bits,
  input  logic [31:0]        rc_frame_oh_bits,
  output logic signed [31:0] rc_frame_target_bits,
  output logic signed [31:0] rc_text_bits_left,
  output logic signed [31:0] rc_mb_text_target,
  output qp_t                rc_avg_qp,
  // ---- out-of-loop complexity estimator ----
  input  est_cfg_t           est_cfg,
  input  logic               est_frame_start,
  input  logic               est_intra,
  input  logic               est_pix_valid,
  output logic               est_pix_ready,
  input  logic [7:0]         est_cur,
  input  logic [7:0]         est_ref,
  output logic               est_frame_done,
  output logic [47:0]        est_chi,
  output logic [47:0]        est_c_hat,
  output logic               est_sc_valid,
  output logic               est_scene_change,
  output logic [7:0]         est_frames_since_i,
  input  logic [PAW-1:0]     est_pack_rd_addr,
  output logic [47:0]        est_pack_chi
);

  hw_rate_control #(.MBS_IN_FRAME (MBS_IN_FRAME)) u_rc (
    .clk, .rst_n,
    .cfg               (rc_cfg),
    .cfg_load          (rc_cfg_load),
    .init_busy         (rc_init_busy),
    .ready_for_frame   (rc_ready_for_frame),
    .frame_start       (rc_frame_start),
    .frame_is_intra    (rc_frame_is_intra),
    .mb_req_valid      (rc_mb_req_valid),
    .mb_req_ready      (rc_mb_req_ready),
    .mb_sad            (rc_mb_sad),
    .mb_qp_locked      (rc_mb_qp_locked),
    .qp_valid          (rc_qp_valid),
    .qp_ready          (rc_qp_ready),
    .qp                (rc_qp),
    .mb_res_valid      (rc_mb_res_valid),
    .mb_res_ready      (rc_mb_res_ready),
    .mb_text_bits      (rc_mb_text_bits),
    .mb_oh_bits        (rc_mb_oh_bits),
    .mb_qp_used        (rc_mb_qp_used),
    .frame_end_valid   (rc_frame_end_valid),
    .frame_end_ready   (rc_frame_end_ready),
    .frame_bits        (rc_frame_bits),
    .frame_oh_bits     (rc_frame_oh_bits),
    .frame_target_bits (rc_frame_target_bits),
    .text_bits_left    (rc_text_bits_left),
    .mb_text_target    (rc_mb_text_target),
    .avg_qp            (rc_avg_qp)
  );

  complexity_estimator #(
    .WIDTH (WIDTH), .HEIGHT (HEIGHT), .N (N), .PACK_W (PACK_W), .PACK_H (PACK_H),
    .SUB (SUB)
  ) u_est (
    .clk, .rst_n,
    .cfg            (est_cfg),
    .frame_start    (est_frame_start),
    .intra          (est_intra),
    .pix_valid      (est_pix_valid),
    .pix_ready      (est_pix_ready),
    .cur            (est_cur),
    .ref_luma       (est_ref),
    .frame_done     (est_frame_done),
    .chi            (est_chi),
    .c_hat          (est_c_hat),
    .sc_valid       (est_sc_valid),
    .scene_change   (est_scene_change),
    .frames_since_i (est_frames_since_i),
    .pack_rd_addr   (est_pack_rd_addr),
    .pack_chi       (est_pack_chi)
  );

endmodule
