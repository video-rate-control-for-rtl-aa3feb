// rc_pkg: types and constants shared by the video rate-control blocks.
//
// Two rate-control engines use this package. The first is the table-based
// hardware rate control, which picks a macroblock (MB) quantizer from a 32x32 table
// indexed by texture-bit bin and SAD bin. The second is the out-of-loop complexity
// estimator, which predicts a frame's SAD from frame-difference statistics. The
// table geometry (32x32 entries of 5-bit QP, bin widths 64 bits and 128 SAD) and
// the CIF frame (22x18 MBs) follow the design description. The configuration
// structs are this implementation's own grouping of the registers.
package rc_pkg;

  // MPEG-4 quantizer range.
  localparam int unsigned QPW    = 5;
  localparam int unsigned QP_MIN = 1;
  localparam int unsigned QP_MAX = 31;

  // Modeling table: 2^5 texture bins x 2^5 SAD bins.
  localparam int unsigned BIN_BITS   = 5;
  localparam int unsigned TBL_AW     = 2 * BIN_BITS;
  localparam int unsigned TBL_DEPTH  = 1 << TBL_AW;

  typedef logic [QPW-1:0]    qp_t;
  typedef logic [TBL_AW-1:0] tbl_addr_t;

  // Frame-level configuration of the hardware rate control (written by the host).
  typedef struct packed {
    logic [23:0] bits_per_frame; // B/F, target bitrate over frame rate
    logic [7:0]  window_n;       // N, sliding window in frames
    logic [7:0]  omega_q8;       // w, intended buffer usage in 1/256 units
    logic [3:0]  k_iframe;       // I-frame target multiplier k
    qp_t         init_qp;        // AverageQP before the first MB is coded
  } rc_cfg_t;

  // Configuration of the complexity estimator (written by the host).
  typedef struct packed {
    logic [23:0] scale_a;        // a, P-frame scale (C_hat = a*chi >> 16)
    logic [23:0] scale_ia;       // I_a, I-frame scale
    logic [47:0] sc_threshold;   // chi above this marks a scene change
    logic [7:0]  min_i_dist;     // minimal distance between I-frames
  } est_cfg_t;

  // Table address from the two bin numbers.
  function automatic tbl_addr_t tbl_addr(input logic [BIN_BITS-1:0] text_bin,
                                         input logic [BIN_BITS-1:0] sad_bin);
    return {text_bin, sad_bin};
  endfunction

endpackage
