// table_rom: initial R-D modeling table of the hardware rate control.
//
// The table maps (texture-bit bin, SAD bin) to a quantizer. The texture bin is
// B_mb_text_bit/64 and the SAD bin is SAD/128. In the design the initial table
// comes from encoding a training sequence and is kept in a ROM, which the rate
// control copies into its SRAM at start-up. No such data is given, so this ROM is
// filled from the first-order R-D model R = alpha*C/Q with alpha = 4, evaluated at
// the bin centres:
//   QP(t,s) = clamp( round( 4 * (s+0.5)*128 / ((t+0.5)*64) ), 1, 31 )
//           = clamp( (16*(2s+1) + (2t+1)) / (2*(2t+1)), 1, 31 )
// The table therefore has the expected shape: QP grows with SAD and falls as more
// texture bits are available. The whole ROM content is this formula, an own choice.
//
// Interface: combinational read, addr = {text_bin, sad_bin}.
module table_rom
  import rc_pkg::*;
#(
  parameter int unsigned TBINS = 32,
  parameter int unsigned SBINS = 32
) (
  input  tbl_addr_t addr,
  output qp_t       qp
);
  function automatic qp_t model_qp(input int unsigned t, input int unsigned s);
    int unsigned num, den, v;
    num = 16 * (2 * s + 1) + (2 * t + 1);
    den = 2 * (2 * t + 1);
    v   = num / den;
    if (v < QP_MIN) v = QP_MIN;
    if (v > QP_MAX) v = QP_MAX;
    return qp_t'(v);
  endfunction

  logic [BIN_BITS-1:0] t_bin, s_bin;
  assign t_bin = addr[TBL_AW-1:BIN_BITS];
  assign s_bin = addr[BIN_BITS-1:0];

  always_comb begin
    if (int'(t_bin) < TBINS && int'(s_bin) < SBINS)
      qp = model_qp(int'(t_bin), int'(s_bin));
    else
      qp = qp_t'(QP_MAX);
  end

endmodule
