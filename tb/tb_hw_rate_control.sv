// tb_hw_rate_control: end-to-end test of the table-based rate control with a
// frame of 24 MBs (MBS_IN_FRAME overridden to keep the run short; every other
// parameter at its default). An encoder model codes twelve frames: an I-frame,
// ordinary P-frames and two "hard" P-frames whose bits overrun the budget. A
// reference model in this file predicts every MB's QP and texture target, the
// frame targets, AverageQP and the whole modeling table, and all are compared.
// The QP must come 36 cycles after a request that needs the divider and 3
// cycles after one that does not (budget already exhausted). The table copy
// at start-up must keep init_busy high for 1025 cycles (1024 writes and the done cycle).
module tb_hw_rate_control;
  import rc_pkg::*;
  localparam int MBS = 24;
  localparam int ENC_DIV = 1, NOISE = 32, OH_BASE = 10, OH_RANGE = 30;
  localparam bit VERBOSE = 1'b1;
  logic clk = 1'b0, rst_n = 1'b0;
  rc_cfg_t cfg;
  logic cfg_load = 1'b0, init_busy, ready_for_frame;
  logic frame_start = 1'b0, frame_is_intra = 1'b0;
  logic mb_req_valid = 1'b0, mb_req_ready, mb_qp_locked = 1'b0;
  logic [15:0] mb_sad = '0;
  logic qp_valid, qp_ready = 1'b0;
  qp_t qp, mb_qp_used = '0, avg_qp;
  logic mb_res_valid = 1'b0, mb_res_ready;
  logic [15:0] mb_text_bits = '0, mb_oh_bits = '0;
  logic frame_end_valid = 1'b0, frame_end_ready;
  logic [31:0] frame_bits = '0, frame_oh_bits = '0;
  logic signed [31:0] frame_target_bits, text_bits_left, mb_text_target;
  int checks = 0, failures = 0;
  longint last_kbits = 0, sad_sum = 0, qp_sum = 0;
  int n_iframe = 0, n_exhaust = 0, n_above = 0, n_below = 0, n_dquant = 0, n_locked = 0, n_tblchg = 0, n_avgref = 0, n_init = 0;

  hw_rate_control #(.MBS_IN_FRAME(MBS)) dut (.clk, .rst_n, .cfg, .cfg_load, .init_busy, .ready_for_frame,
    .frame_start, .frame_is_intra, .mb_req_valid, .mb_req_ready, .mb_sad, .mb_qp_locked,
    .qp_valid, .qp_ready, .qp, .mb_res_valid, .mb_res_ready, .mb_text_bits, .mb_oh_bits, .mb_qp_used,
    .frame_end_valid, .frame_end_ready, .frame_bits, .frame_oh_bits,
    .frame_target_bits, .text_bits_left, .mb_text_target, .avg_qp);
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
    while (!ready_for_frame) @(negedge clk);
    frame_is_intra = intra; frame_start = 1'b1;
    model.frame_start(intra);
    @(negedge clk);
    frame_start = 1'b0;
    checks++;
    if (frame_target_bits != 32'(tgt)) begin failures++; $display("FAIL f%0d target %0d/%0d", f, frame_target_bits, tgt); end
    if (intra) n_iframe++;
    kbits = 200; ohbits = 200;
    for (int m = 0; m < MBS; m++) begin
      int sad, eq, text, oh, lat;
      bit lock;
      sad = (hard != 0) ? 3000 + $urandom % 3000 : 200 + $urandom % 3500;
      sad_sum += sad;
      lock = (m > 0) && ($urandom % 12 == 0);
      while (!mb_req_ready) @(negedge clk);
      mb_req_valid = 1'b1; mb_sad = 16'(sad); mb_qp_locked = lock;
      @(negedge clk);
      mb_req_valid = 1'b0;
      eq = model.mb_qp(sad, lock);
      lat = 1;
      while (!qp_valid) begin @(negedge clk); lat++; end
      repeat ($urandom % 3) @(negedge clk);
      checks++;
      if (int'(qp) != eq || mb_text_target != 32'(model.last_tgt)) begin
        failures++; $display("FAIL f%0d mb%0d qp %0d/%0d tgt %0d/%0d", f, m, qp, eq, mb_text_target, model.last_tgt);
      end
      checks++;
      if (lat != ((model.last_tgt < 0) ? 3 : 36)) begin failures++; $display("FAIL f%0d mb%0d QP latency %0d", f, m, lat); end
      if (model.last_tgt < 0) n_exhaust++;
      else if (model.last_tgt > 1024) n_above++;
      else n_below++;
      if (model.last_clamped) n_dquant++;
      if (lock) n_locked++;
      qp_ready = 1'b1;
      @(negedge clk);
      qp_ready = 1'b0;
      // encoder: texture bits from a rough R = c*SAD/QP law, plus noise
      text = ((hard != 0) ? 12 : 1) * sad / (eq * ENC_DIV) + int'($urandom % NOISE);
      if (text > 65535) text = 65535;
      oh = OH_BASE + int'($urandom % OH_RANGE);
      repeat ($urandom % 4) @(negedge clk);
      while (!mb_res_ready) @(negedge clk);
      mb_res_valid = 1'b1; mb_text_bits = 16'(text); mb_oh_bits = 16'(oh); mb_qp_used = qp_t'(eq);
      @(negedge clk);
      mb_res_valid = 1'b0;
      if (model.tbl[TbrcModel::bin(text, 6) * 32 + TbrcModel::bin(sad, 7)] != (model.tbl[TbrcModel::bin(text, 6) * 32 + TbrcModel::bin(sad, 7)] + eq) / 2)
        n_tblchg++;
      if (((model.no_mbs + 1) & model.no_mbs) == 0) n_avgref++;
      model.mb_result(sad, text, oh, eq);
      kbits += text + oh; ohbits += oh;
      qp_sum += eq;
    end
    while (!frame_end_ready) @(negedge clk);
    frame_end_valid = 1'b1; frame_bits = 32'(kbits); frame_oh_bits = 32'(ohbits);
    @(negedge clk);
    frame_end_valid = 1'b0;
    model.frame_end(kbits, ohbits);
    @(negedge clk);
    checks++;
    if (int'(avg_qp) != model.avg) begin failures++; $display("FAIL f%0d avg %0d/%0d", f, avg_qp, model.avg); end
    for (int i = 0; i < 1024; i++) begin
      checks++;
      if (int'(dut.u_tbl.mem[i]) != model.tbl[i]) begin failures++; $display("FAIL f%0d table %0d %0d/%0d", f, i, dut.u_tbl.mem[i], model.tbl[i]); end
    end
    last_kbits = kbits;
    if (VERBOSE) $display("frame %0d %s: target %0d bits, coded %0d bits, avg QP %0d", f, intra ? "I" : "P", tgt, kbits, model.avg);
  endtask

  initial begin
    int busy_cycles;
    cfg.bits_per_frame = 24'd25600; cfg.window_n = 8'd15; cfg.omega_q8 = 8'd128;
    cfg.k_iframe = 4'd4; cfg.init_qp = 5'd12;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    cfg_load = 1'b1;
    model.load(25600, 15, 128, 4, 12);
    @(negedge clk);
    cfg_load = 1'b0;
    busy_cycles = 0;
    while (init_busy) begin @(negedge clk); busy_cycles++; end
    checks++;
    if (busy_cycles != 1025) begin failures++; $display("FAIL table copy %0d cycles", busy_cycles); end
    for (int f = 0; f < 12; f++) run_frame(f, f == 0, (f == 5 || f == 6) ? 1 : 0);
    checks++;
    if (n_exhaust == 0 || n_above == 0 || n_below == 0 || n_dquant == 0 || n_locked == 0 || n_tblchg == 0) begin
      failures++;
      $display("FAIL coverage exhaust=%0d above=%0d below=%0d dquant=%0d locked=%0d tblchg=%0d",
               n_exhaust, n_above, n_below, n_dquant, n_locked, n_tblchg);
    end
    $display("coverage: exhausted=%0d above_thr=%0d below_thr=%0d dquant_limited=%0d locked=%0d table_changes=%0d",
             n_exhaust, n_above, n_below, n_dquant, n_locked, n_tblchg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
