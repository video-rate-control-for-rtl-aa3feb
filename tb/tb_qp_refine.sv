// tb_qp_refine: exhaustive-ish check of the QP weighting and the +/-2 limit.
// The expected QP is computed here from the rules: largest QP when the MB
// texture target is negative, (2*QP+Avg)/4 above 1024 bits, (QP+Avg)/2
// otherwise, clamped to 1..31, then limited to prev+/-2 unless first MB, or held
// at prev when the MB mode cannot change QP.
module tb_qp_refine;
  import rc_pkg::*;
  qp_t lut_qp, avg_qp, prev_qp, qw, qo;
  logic signed [31:0] bits;
  logic first_mb, locked;
  int checks = 0, failures = 0;

  qp_refine dut (.lut_qp, .avg_qp, .mb_text_bits(bits), .first_mb, .prev_qp, .qp_locked(locked),
                 .qp_weighted(qw), .qp_out(qo));

  function automatic int exp_w(int l, int a, int b);
    int w;
    if (b < 0) w = 31;
    else if (b > 1024) w = (2 * l + a) / 4;
    else w = (l + a) / 2;
    if (w < 1) w = 1;
    if (w > 31) w = 31;
    return w;
  endfunction

  initial begin
    int bl [6] = '{-5, 0, 500, 1024, 1025, 3000};
    for (int l = 0; l < 32; l++)
      for (int a = 0; a < 32; a++)
        for (int bi = 0; bi < 6; bi++) begin
          int w, e, p;
          lut_qp = qp_t'(l); avg_qp = qp_t'(a); bits = bl[bi];
          p = 1 + ($urandom % 31); prev_qp = qp_t'(p);
          first_mb = ($urandom % 4) == 0;
          locked = ($urandom % 8) == 0;
          #1;
          w = exp_w(l, a, bl[bi]);
          if (first_mb) e = w;
          else if (locked) e = p;
          else if (w < p - 2) e = (p - 2 < 1) ? 1 : p - 2;
          else if (w > p + 2) e = (p + 2 > 31) ? 31 : p + 2;
          else e = w;
          checks++;
          if (int'(qw) != w || int'(qo) != e) begin
            failures++;
            $display("FAIL l=%0d a=%0d b=%0d p=%0d f=%0d k=%0d got %0d/%0d exp %0d/%0d", l, a, bl[bi], p, first_mb, locked, qw, qo, w, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
