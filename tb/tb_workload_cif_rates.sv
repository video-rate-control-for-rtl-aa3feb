// tb_workload_cif_rates: runs the rate control of the full design (default
// parameters, CIF 396 MBs) at the three operating points of the experiments:
// CIF at 30 frames/s with targets of 256, 512 and 768 kbit/s (8533, 17067 and
// 25600 bits per frame), coding pattern I P P P ..., and a decoder buffer of
// 0.5 s (window N = 15 frames, w = 1/2). Each point starts with a fresh
// configuration and table copy and codes 80 frames. Real sequences cannot be
// simulated here. A synthetic encoder gives each MB a random SAD of
// 200..3700 and codes it with SAD/(8*QP) texture bits plus small noise and
// overhead. Every QP and table entry is still checked against the reference
// model. The rate check: the average frame size over frames 40..79 must lie
// within 10% of B/F.
module tb_workload_cif_rates;
  import rc_pkg::*;
  localparam int MBS = 396;
  localparam int ENC_DIV = 8, NOISE = 8, OH_BASE = 5, OH_RANGE = 10;
  localparam bit VERBOSE = 1'b0;
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
  logic est_pr, est_done, est_scv, est_sc;
  logic [7:0] est_since;
  logic [47:0] est_chi, est_c_hat, est_pack_chi;

  video_rc_top dut (
    .clk, .rst_n,
    .rc_cfg, .rc_cfg_load, .rc_init_busy, .rc_ready_for_frame, .rc_frame_start, .rc_frame_is_intra,
    .rc_mb_req_valid, .rc_mb_req_ready, .rc_mb_sad, .rc_mb_qp_locked, .rc_qp_valid, .rc_qp_ready, .rc_qp,
    .rc_mb_res_valid, .rc_mb_res_ready, .rc_mb_text_bits, .rc_mb_oh_bits, .rc_mb_qp_used,
    .rc_frame_end_valid, .rc_frame_end_ready, .rc_frame_bits, .rc_frame_oh_bits,
    .rc_frame_target_bits, .rc_text_bits_left, .rc_mb_text_target, .rc_avg_qp,
    .est_cfg, .est_frame_start(1'b0), .est_intra(1'b0), .est_pix_valid(1'b0), .est_pix_ready(est_pr),
    .est_cur(8'd0), .est_ref(8'd0), .est_frame_done(est_done), .est_chi, .est_c_hat, .est_sc_valid(est_scv),
    .est_scene_change(est_sc), .est_frames_since_i(est_since), .est_pack_rd_addr(7'd0),
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

  task automatic run_point(input int kbps);
    int bpf;
    longint sum;
    bpf = kbps * 1000 / 30;
    while (!rc_ready_for_frame && rc_init_busy) @(negedge clk);
    rc_cfg.bits_per_frame = 24'(bpf); rc_cfg.window_n = 8'd15; rc_cfg.omega_q8 = 8'd128;
    rc_cfg.k_iframe = 4'd4; rc_cfg.init_qp = 5'd10;
    rc_cfg_load = 1'b1;
    model.load(bpf, 15, 128, 4, 10);
    @(negedge clk);
    rc_cfg_load = 1'b0;
    while (rc_init_busy) @(negedge clk);
    sum = 0; qp_sum = 0;
    for (int f = 0; f < 80; f++) begin
      if (f == 40) qp_sum = 0;
      run_frame(f, f == 0, 0);
      if (f >= 40) sum += last_kbits;
    end
    checks++;
    $display("%0d kbit/s: B/F %0d bits, mean frame %0d bits over frames 40..79 (%0d kbit/s), mean QP %0d",
             kbps, bpf, sum / 40, sum / 40 * 30 / 1000, qp_sum / (40 * MBS));
    if (sum / 40 < bpf * 9 / 10 || sum / 40 > bpf * 11 / 10) begin
      failures++; $display("FAIL %0d kbit/s: rate off target", kbps);
    end
  endtask

  initial begin
    est_cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_point(256);
    run_point(512);
    run_point(768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
