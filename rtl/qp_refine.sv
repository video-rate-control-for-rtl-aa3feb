// qp_refine: turns the QP read from the modeling table into the MB's QP.
//
// The table QP may not suit the current content, so it is blended with the
// average QP of the MBs already coded in the frame. The rules follow the design:
//   B_mb_text_bit < 0               -> largest QP (texture bits exhausted)
//   B_mb_text_bit > TEXT_THRESHOLD  -> (2*QP + AverageQP) / 4
//   otherwise                       -> (QP + AverageQP) / 2
// The result is kept in 1..31. MPEG-4 syntax then lets a MB's QP differ from the
// previous MB's by at most +/-2. Also, some MB modes (not coded, 4 motion vectors)
// cannot change QP at all. The second stage here enforces both rules. The first MB
// of a frame is not limited because its QP is sent in the picture header.
// TEXT_THRESHOLD is not given by the design. Its default of 1024 bits (half the
// 2048 maximum) is an own choice. Integer divisions truncate.
//
// Purely combinational.
module qp_refine
  import rc_pkg::*;
#(
  parameter int signed   TEXT_THRESHOLD = 1024,
  parameter int unsigned DQ_MAX         = 2
) (
  input  qp_t                lut_qp,
  input  qp_t                avg_qp,
  input  logic signed [31:0] mb_text_bits,
  input  logic               first_mb,
  input  qp_t                prev_qp,
  input  logic               qp_locked,
  output qp_t                qp_weighted,
  output qp_t                qp_out
);
  logic [7:0] w, lo, hi;

  always_comb begin
    if (mb_text_bits < 0)
      w = 8'(QP_MAX);
    else if (mb_text_bits > TEXT_THRESHOLD)
      w = (8'(lut_qp) * 8'd2 + 8'(avg_qp)) >> 2;
    else
      w = (8'(lut_qp) + 8'(avg_qp)) >> 1;
    if (w < 8'(QP_MIN)) w = 8'(QP_MIN);
    if (w > 8'(QP_MAX)) w = 8'(QP_MAX);
    qp_weighted = qp_t'(w);

    lo = (8'(prev_qp) > 8'(QP_MIN + DQ_MAX)) ? 8'(prev_qp) - 8'(DQ_MAX) : 8'(QP_MIN);
    hi = (8'(prev_qp) + 8'(DQ_MAX) < 8'(QP_MAX)) ? 8'(prev_qp) + 8'(DQ_MAX) : 8'(QP_MAX);
    if (first_mb)
      qp_out = qp_weighted;
    else if (qp_locked)
      qp_out = prev_qp;
    else if (w < lo)
      qp_out = qp_t'(lo);
    else if (w > hi)
      qp_out = qp_t'(hi);
    else
      qp_out = qp_weighted;
  end

endmodule
