// tb_video_rc_top: end-to-end test of the whole design at its default size
// (CIF: 396 macroblocks, 352x288 pixels; no parameter overrides). Two
// encoders run at the same time, as two independent threads.
//  * Rate control: after the start-up table copy, an encoder model codes eight
//    frames of 396 MBs: an I-frame (k = 9), P-frames, and a "hard" P-frame whose
//    bits overrun the budget. A reference model predicts every QP, texture
//    target, frame target, AverageQP and the full table.
//  * Complexity estimator: four frames of pixels (intra, moving gradient, a cut
//    to noise, more noise). chi, C_hat and the scene-change decisions are
//    checked against values computed here.
// Each mechanism of the design is counted, and a count of zero is a failure:
// table copy, I-frame target, texture budget exhausted, weighting above and below
// TEXT_THRESHOLD, +/-2 QP limit, locked MB QP, table update, AverageQP refresh,
// intra estimation, scene change, and a scene change suppressed by the minimal
// I-frame distance.
module tb_video_rc_top;
  import rc_pkg::*;
  localparam int MBS = 396;
  localparam int ENC_DIV = 4, NOISE = 32, OH_BASE = 10, OH_RANGE = 30;
  localparam bit VERBOSE = 1'b1;
  localparam int W = 352, H = 288;
  logic clk = 1'b0, rst_n = 1'b0;
  rc_cfg_t rc_cfg;
  logic rc_cfg_load = 1'b0, rc_init_busy, rc_ready_for_frame;
  logic rc_frame_start = 1'b0, rc_frame_is_intra = 1'b0;
  logic rc_mb_req_valid = 1'b0, rc_mb_req_ready, rc_mb_qp_locked = 1'b0;
  logic [15:0] rc_mb_sad = '0;
  logic rc_qp_valid, rc_qp_ready = 1'b0;
  qp_t rc_qp, rc_mb_qp_used = '0, rc_avg_qp;
  logic rc_mb_res_valid = 1'b0, rc_mb_res_ready;
  logic [15:0] rc_mb_text_bits = '0, rc_mb_oh_bits = '0;
  logic rc_frame_end_valid = 1'b0, rc_frame_end_ready;
  logic [31:0] rc_frame_bits = '0, rc_frame_oh_bits = '0;
  logic signed [31:0] rc_frame_target_bits, rc_text_bits_left, rc_mb_text_target;
  int checks = 0, failures = 0;
  longint last_kbits = 0, sad_sum = 0, qp_sum = 0;
  int n_iframe = 0, n_exhaust = 0, n_above = 0, n_below = 0, n_dquant = 0, n_locked = 0, n_tblchg = 0, n_avgref = 0, n_init = 0;

  est_cfg_t est_cfg;
  logic est_fs = 1'b0, est_intra = 1'b0, est_pv = 1'b0, est_pr, est_done, est_scv, est_sc;
  logic [7:0] est_cur = '0, est_ref = '0, est_since;
  logic [47:0] est_chi, est_c_hat, est_pack_chi;
  logic [6:0] est_pack_addr = '0;
  int n_intra_est = 0, n_sc = 0, n_supp = 0;

  video_rc_top dut (
    .clk, .rst_n,
    .rc_cfg, .rc_cfg_load, .rc_init_busy, .rc_ready_for_frame, .rc_frame_start, .rc_frame_is_intra,
    .rc_mb_req_valid, .rc_mb_req_ready, .rc_mb_sad, .rc_mb_qp_locked, .rc_qp_valid, .rc_qp_ready, .rc_qp,
    .rc_mb_res_valid, .rc_mb_res_ready, .rc_mb_text_bits, .rc_mb_oh_bits, .rc_mb_qp_used,
    .rc_frame_end_valid, .rc_frame_end_ready, .rc_frame_bits, .rc_frame_oh_bits,
    .rc_frame_target_bits, .rc_text_bits_left, .rc_mb_text_target, .rc_avg_qp,
    .est_cfg, .est_frame_start(est_fs), .est_intra, .est_pix_valid(est_pv), .est_pix_ready(est_pr),
    .est_cur, .est_ref, .est_frame_done(est_done), .est_chi, .est_c_hat, .est_sc_valid(est_scv),
    .est_scene_change(est_sc), .est_frames_since_i(est_since), .est_pack_rd_addr(est_pack_addr),
    .est_pack_chi);
  always #5 clk = ~clk;

  // Reference model of the table-based rate control, written from the
  // algorithm description independently of the RTL structure.
  class TbrcModel;
    int mbs;
    int tbl[1024];
    longint v, v0;
    int bpf, n, omega, k, init_qp;
    longint b_oh_bit, b_text, b_mb_oh;
    int no_mbs, total_qp, avg, prev_qp;
    bit first;
    // results of the last mb_qp() call, for coverage
    int last_tgt, last_w, last_lut;
    bit last_clamped;

    function new(int mbs_in_frame);
      mbs = mbs_in_frame;
    endfunction

    static function int rom_qp(int t, int s);
      int q;
      q = (16 * (2 * s + 1) + (2 * t + 1)) / (2 * (2 * t + 1));
      return (q < 1) ? 1 : (q > 31) ? 31 : q;
    endfunction

    static function int bin(longint x, int sh);
      longint b;
      b = x >> sh;
      return (b > 31) ? 31 : int'(b);
    endfunction

    function void load(int bpf_i, int n_i, int omega_i, int k_i, int qp0);
      bpf = bpf_i; n = n_i; omega = omega_i; k = k_i; init_qp = qp0;
      v0 = (longint'(n) * bpf * (256 - omega)) >> 8;
      v = v0;
      b_oh_bit = 0;
      avg = qp0;
      for (int t = 0; t < 32; t++)
        for (int s = 0; s < 32; s++) tbl[t * 32 + s] = rom_qp(t, s);
    endfunction

    function longint target(bit intra);
      longint p;
      p = v + bpf - v0;
      return intra ? p * k : p;
    endfunction

    function void frame_start(bit intra);
      b_text   = target(intra) - b_oh_bit;
      b_mb_oh  = ((b_oh_bit < 0) ? 0 : b_oh_bit) / mbs;
      no_mbs   = 0;
      total_qp = 0;
      first    = 1;
    endfunction

    function int mb_qp(int sad, bit locked);
      int w, lo, hi, q;
      last_tgt = (b_text < 0) ? -1 : int'(b_text / (mbs - no_mbs));
      last_lut = tbl[((last_tgt < 0) ? 0 : bin(last_tgt, 6)) * 32 + bin(sad, 7)];
      if (last_tgt < 0) w = 31;
      else if (last_tgt > 1024) w = (2 * last_lut + avg) / 4;
      else w = (last_lut + avg) / 2;
      if (w < 1) w = 1;
      if (w > 31) w = 31;
      last_w = w;
      lo = (prev_qp - 2 < 1) ? 1 : prev_qp - 2;
      hi = (prev_qp + 2 > 31) ? 31 : prev_qp + 2;
      if (first) q = w;
      else if (locked) q = prev_qp;
      else q = (w < lo) ? lo : (w > hi) ? hi : w;
      last_clamped = !first && !locked && (q != w);
      return q;
    endfunction

    function void mb_result(int sad, int text, int oh, int qpu);
      int a;
      b_text = b_text - text + b_mb_oh - oh;
      a = bin(text, 6) * 32 + bin(sad, 7);
      tbl[a] = (tbl[a] + qpu) / 2;
      no_mbs++;
      total_qp += qpu;
      if ((no_mbs & (no_mbs - 1)) == 0) avg = total_qp / no_mbs;
      prev_qp = qpu;
      first = 0;
    endfunction

    function void frame_end(longint kbits, longint oh);
      v = v - kbits + bpf;
      b_oh_bit = oh;
    endfunction
  endclass

  TbrcModel model = new(MBS);

  // Drives one frame through the rate control as an encoder would. It checks
  // every MB's QP, texture target and response time, then the frame's
  // target and the whole table.
  task automatic run_frame(input int f, input bit intra, input int hard);
    longint kbits, ohbits, tgt;
    tgt = model.target(intra);
    while (!rc_ready_for_frame) @(negedge clk);
    rc_frame_is_intra = intra; rc_frame_start = 1'b1;
    model.frame_start(intra);
    @(negedge clk);
    rc_frame_start = 1'b0;
    checks++;
    if (rc_frame_target_bits != 32'(tgt)) begin failures++; $display("FAIL f%0d target %0d/%0d", f, rc_frame_target_bits, tgt); end
    if (intra) n_iframe++;
    kbits = 200; ohbits = 200;
    for (int m = 0; m < MBS; m++) begin
      int sad, eq, text, oh, lat;
      bit lock;
      sad = (hard != 0) ? 3000 + $urandom % 3000 : 200 + $urandom % 3500;
      sad_sum += sad;
      lock = (m > 0) && ($urandom % 12 == 0);
      while (!rc_mb_req_ready) @(negedge clk);
      rc_mb_req_valid = 1'b1; rc_mb_sad = 16'(sad); rc_mb_qp_locked = lock;
      @(negedge clk);
      rc_mb_req_valid = 1'b0;
      eq = model.mb_qp(sad, lock);
      lat = 1;
      while (!rc_qp_valid) begin @(negedge clk); lat++; end
      repeat ($urandom % 3) @(negedge clk);
      checks++;
      if (int'(rc_qp) != eq || rc_mb_text_target != 32'(model.last_tgt)) begin
        failures++; $display("FAIL f%0d mb%0d qp %0d/%0d tgt %0d/%0d", f, m, rc_qp, eq, rc_mb_text_target, model.last_tgt);
      end
      checks++;
      if (lat != ((model.last_tgt < 0) ? 3 : 36)) begin failures++; $display("FAIL f%0d mb%0d QP latency %0d", f, m, lat); end
      if (model.last_tgt < 0) n_exhaust++;
      else if (model.last_tgt > 1024) n_above++;
      else n_below++;
      if (model.last_clamped) n_dquant++;
      if (lock) n_locked++;
      rc_qp_ready = 1'b1;
      @(negedge clk);
      rc_qp_ready = 1'b0;
      // encoder: texture bits from a rough R = c*SAD/QP law, plus noise
      text = ((hard != 0) ? 12 : 1) * sad / (eq * ENC_DIV) + int'($urandom % NOISE);
      if (text > 65535) text = 65535;
      oh = OH_BASE + int'($urandom % OH_RANGE);
      repeat ($urandom % 4) @(negedge clk);
      while (!rc_mb_res_ready) @(negedge clk);
      rc_mb_res_valid = 1'b1; rc_mb_text_bits = 16'(text); rc_mb_oh_bits = 16'(oh); rc_mb_qp_used = qp_t'(eq);
      @(negedge clk);
      rc_mb_res_valid = 1'b0;
      if (model.tbl[TbrcModel::bin(text, 6) * 32 + TbrcModel::bin(sad, 7)] != (model.tbl[TbrcModel::bin(text, 6) * 32 + TbrcModel::bin(sad, 7)] + eq) / 2)
        n_tblchg++;
      if (((model.no_mbs + 1) & model.no_mbs) == 0) n_avgref++;
      model.mb_result(sad, text, oh, eq);
      kbits += text + oh; ohbits += oh;
      qp_sum += eq;
    end
    while (!rc_frame_end_ready) @(negedge clk);
    rc_frame_end_valid = 1'b1; rc_frame_bits = 32'(kbits); rc_frame_oh_bits = 32'(ohbits);
    @(negedge clk);
    rc_frame_end_valid = 1'b0;
    model.frame_end(kbits, ohbits);
    @(negedge clk);
    checks++;
    if (int'(rc_avg_qp) != model.avg) begin failures++; $display("FAIL f%0d avg %0d/%0d", f, rc_avg_qp, model.avg); end
    for (int i = 0; i < 1024; i++) begin
      checks++;
      if (int'(dut.u_rc.u_tbl.mem[i]) != model.tbl[i]) begin failures++; $display("FAIL f%0d table %0d %0d/%0d", f, i, dut.u_rc.u_tbl.mem[i], model.tbl[i]); end
    end
    last_kbits = kbits;
    if (VERBOSE) $display("frame %0d %s: target %0d bits, coded %0d bits, avg QP %0d", f, intra ? "I" : "P", tgt, kbits, model.avg);
  endtask

  logic [7:0] prev_frame [W*H];
  logic [7:0] this_frame [W*H];

  task automatic est_frame(input int f, input bit intra, input bit exp_sc);
    longint echi;
    for (int i = 0; i < W * H; i++)
      this_frame[i] = (f < 2) ? 8'((i % W) * 2 + (i / W) + f * 3 + ($urandom % 4)) : 8'($urandom);
    echi = 0;
    for (int y = 0; y < H; y++)
      for (int rx = 0; rx < W / 16; rx++) begin
        int d[16], s, m, dv;
        s = 0;
        for (int i = 0; i < 16; i++) begin
          int c, r;
          c = this_frame[y*W + rx*16 + i];
          r = prev_frame[y*W + rx*16 + i];
          d[i] = intra ? c : ((c > r) ? c - r : r - c);
          s += d[i];
        end
        m = s / 16; dv = 0;
        for (int i = 0; i < 16; i++) dv += (d[i] > m) ? d[i] - m : m - d[i];
        echi += longint'(m) * dv;
      end
    est_intra = intra; est_fs = 1'b1;
    @(negedge clk);
    est_fs = 1'b0;
    for (int i = 0; i < W * H; i++) begin
      est_pv = 1'b1; est_cur = this_frame[i]; est_ref = prev_frame[i];
      @(negedge clk);
      while (!est_pr) @(negedge clk);
    end
    est_pv = 1'b0;
    while (!est_scv) @(negedge clk);
    checks++;
    if (est_chi != 48'(echi) || est_c_hat != 48'((echi * longint'(intra ? est_cfg.scale_ia : est_cfg.scale_a)) >>> 16)) begin
      failures++; $display("FAIL est frame %0d chi %0d/%0d", f, est_chi, echi);
    end
    checks++;
    if (est_sc != exp_sc) begin failures++; $display("FAIL est frame %0d scene change %0d", f, est_sc); end
    if (intra) n_intra_est++;
    if (est_sc) n_sc++;
    if (!intra && !est_sc && est_chi > est_cfg.sc_threshold) n_supp++;
    $display("estimator frame %0d: chi=%0d C_hat=%0d scene_change=%0d", f, est_chi, est_c_hat, est_sc);
    foreach (prev_frame[i]) prev_frame[i] = this_frame[i];
    @(negedge clk);
  endtask

  initial begin
    int busy_cycles;
    rc_cfg.bits_per_frame = 24'd51200; rc_cfg.window_n = 8'd15; rc_cfg.omega_q8 = 8'd128;
    rc_cfg.k_iframe = 4'd9; rc_cfg.init_qp = 5'd10;
    est_cfg.scale_a = 24'd90000; est_cfg.scale_ia = 24'd20000;
    est_cfg.sc_threshold = 48'd20000000; est_cfg.min_i_dist = 8'd2;
    foreach (prev_frame[i]) prev_frame[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    fork
      begin
        rc_cfg_load = 1'b1;
        model.load(51200, 15, 128, 9, 10);
        @(negedge clk);
        rc_cfg_load = 1'b0;
        busy_cycles = 0;
        while (rc_init_busy) begin @(negedge clk); busy_cycles++; end
        checks++;
        if (busy_cycles != 1025) begin failures++; $display("FAIL table copy %0d cycles", busy_cycles); end
        else n_init++;
        for (int f = 0; f < 8; f++) run_frame(f, f == 0, (f == 3) ? 1 : 0);
      end
      begin
        est_frame(0, 1'b1, 1'b0);
        est_frame(1, 1'b0, 1'b0);
        est_frame(2, 1'b0, 1'b1);
        est_frame(3, 1'b0, 1'b0);
      end
    join
    $display("mechanisms: table_copy=%0d I_frame_target=%0d budget_exhausted=%0d above_threshold=%0d below_threshold=%0d dquant_limited=%0d locked_qp=%0d table_updates=%0d avg_refresh=%0d",
             n_init, n_iframe, n_exhaust, n_above, n_below, n_dquant, n_locked, n_tblchg, n_avgref);
    $display("mechanisms: intra_estimation=%0d scene_change=%0d scene_change_suppressed=%0d", n_intra_est, n_sc, n_supp);
    checks++;
    if (n_init == 0 || n_iframe == 0 || n_exhaust == 0 || n_above == 0 || n_below == 0 || n_dquant == 0 ||
        n_locked == 0 || n_tblchg == 0 || n_avgref == 0 || n_intra_est == 0 || n_sc == 0 || n_supp == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
