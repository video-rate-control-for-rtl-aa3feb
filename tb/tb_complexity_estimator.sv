// tb_complexity_estimator: runs four CIF frames through the estimator:
//   0  intra frame (statistics of the luma itself, scaled by I_a)
//   1  P frame, slowly moving gradient (low chi, no scene change)
//   2  P frame of unrelated noise (chi above threshold -> scene change)
//   3  P frame of new noise right after it (above threshold, but suppressed by
//      the minimal I-frame distance of 2)
// The expected chi, C_hat, per-pack chi and decisions are computed here from
// the same pixels. The frame must stream at one pixel per cycle: no stall, and
// frame_done 18 cycles after the last pixel. A second estimator with 2-line
// regions (N = 2) takes the same pixels. Its results are checked against 2x16
// region statistics worked out here, with frame_done N*WIDTH+2 cycles after
// the last pixel. A third estimator is set for 2:1 subsampled input (SUB = 2).
// It takes only the even pixels of the even lines, and is checked against 1x8
// region statistics of that subsampled frame with 8-pixel macroblocks, and
// frame_done 16/2+2 cycles after its last pixel.
module tb_complexity_estimator;
  import rc_pkg::*;
  localparam int W = 352, H = 288, NP = 99;
  logic clk = 1'b0, rst_n = 1'b0;
  est_cfg_t cfg;
  logic fs = 1'b0, intra = 1'b0, pv = 1'b0, pr, done, scv, sc;
  logic [7:0] cur = '0, refl = '0, since;
  logic [47:0] chi, c_hat, pack_chi;
  logic pr2, done2, scv2, sc2;
  logic [7:0] since2;
  logic [47:0] chi2, c_hat2, pack_chi2;
  logic pv3 = 1'b0, pr3, done3, scv3, sc3;
  logic [7:0] since3;
  logic [47:0] chi3, c_hat3, pack_chi3;
  logic [6:0] pack_addr = '0;
  logic [7:0] prev_frame [W*H];
  logic [7:0] this_frame [W*H];
  int checks = 0, failures = 0, stalls = 0, last_done = 0, last_done2 = 0, last_done3 = 0, cyc = 0;

  complexity_estimator dut (.clk, .rst_n, .cfg, .frame_start(fs), .intra, .pix_valid(pv), .pix_ready(pr),
    .cur, .ref_luma(refl), .frame_done(done), .chi, .c_hat, .sc_valid(scv), .scene_change(sc),
    .frames_since_i(since), .pack_rd_addr(pack_addr), .pack_chi);
  complexity_estimator #(.N(2)) dut2 (.clk, .rst_n, .cfg, .frame_start(fs), .intra, .pix_valid(pv),
    .pix_ready(pr2), .cur, .ref_luma(refl), .frame_done(done2), .chi(chi2), .c_hat(c_hat2),
    .sc_valid(scv2), .scene_change(sc2), .frames_since_i(since2), .pack_rd_addr(pack_addr),
    .pack_chi(pack_chi2));
  complexity_estimator #(.SUB(2)) dut3 (.clk, .rst_n, .cfg, .frame_start(fs), .intra, .pix_valid(pv3),
    .pix_ready(pr3), .cur, .ref_luma(refl), .frame_done(done3), .chi(chi3), .c_hat(c_hat3),
    .sc_valid(scv3), .scene_change(sc3), .frames_since_i(since3), .pack_rd_addr(pack_addr),
    .pack_chi(pack_chi3));
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (pv && !(pr && pr2)) stalls++;
    if (done) last_done = cyc;
    if (done2) last_done2 = cyc;
    if (done3) last_done3 = cyc;
    if (pv3 && !pr3) stalls++;
  end

  initial begin
    longint echi, epack[NP], echi2, epack2[NP], echi3, epack3[NP];
    cfg.scale_a = 24'd90000; cfg.scale_ia = 24'd20000;
    cfg.sc_threshold = 48'd20000000; cfg.min_i_dist = 8'd2;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 4; f++) begin
      int last_pix, last_sub;
      bit expect_sc;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          this_frame[y*W+x] = (f < 2) ? 8'(x * 2 + y + f * 3 + ($urandom % 4)) : 8'($urandom);
      // reference statistics
      echi = 0;
      foreach (epack[i]) epack[i] = 0;
      for (int y = 0; y < H; y++)
        for (int rx = 0; rx < W / 16; rx++) begin
          int d[16], s, m, dv;
          s = 0;
          for (int i = 0; i < 16; i++) begin
            int c, r;
            c = this_frame[y*W + rx*16 + i];
            r = prev_frame[y*W + rx*16 + i];
            d[i] = (f == 0) ? c : ((c > r) ? c - r : r - c);
            s += d[i];
          end
          m = s / 16; dv = 0;
          for (int i = 0; i < 16; i++) dv += (d[i] > m) ? d[i] - m : m - d[i];
          echi += longint'(m) * dv;
          epack[(y / 32) * 11 + rx / 2] += longint'(m) * dv;
        end
      echi2 = 0;
      foreach (epack2[i]) epack2[i] = 0;
      for (int y = 0; y < H; y += 2)
        for (int rx = 0; rx < W / 16; rx++) begin
          int d[32], s, m, dv;
          s = 0;
          for (int i = 0; i < 32; i++) begin
            int c, r;
            c = this_frame[(y + i / 16)*W + rx*16 + i % 16];
            r = prev_frame[(y + i / 16)*W + rx*16 + i % 16];
            d[i] = (f == 0) ? c : ((c > r) ? c - r : r - c);
            s += d[i];
          end
          m = s / 32; dv = 0;
          for (int i = 0; i < 32; i++) dv += (d[i] > m) ? d[i] - m : m - d[i];
          echi2 += longint'(m) * dv;
          epack2[(y / 32) * 11 + rx / 2] += longint'(m) * dv;
        end
      echi3 = 0;
      foreach (epack3[i]) epack3[i] = 0;
      for (int y = 0; y < H / 2; y++)
        for (int rx = 0; rx < W / 16; rx++) begin
          int d[8], s, m, dv;
          s = 0;
          for (int i = 0; i < 8; i++) begin
            int c, r;
            c = this_frame[2*y*W + 2*(rx*8 + i)];
            r = prev_frame[2*y*W + 2*(rx*8 + i)];
            d[i] = (f == 0) ? c : ((c > r) ? c - r : r - c);
            s += d[i];
          end
          m = s / 8; dv = 0;
          for (int i = 0; i < 8; i++) dv += (d[i] > m) ? d[i] - m : m - d[i];
          echi3 += longint'(m) * dv;
          epack3[(y / 16) * 11 + rx / 2] += longint'(m) * dv;
        end
      // stream the frame
      intra = (f == 0);
      fs = 1'b1; @(negedge clk); fs = 1'b0;
      for (int i = 0; i < W * H; i++) begin
        pv = 1'b1; cur = this_frame[i]; refl = prev_frame[i];
        pv3 = ((i / W) % 2 == 0) && ((i % W) % 2 == 0);
        @(negedge clk);
        if (pv3) last_sub = cyc;
      end
      pv = 1'b0; pv3 = 1'b0;
      last_pix = cyc;
      repeat (2 * W + 10) @(negedge clk);
      checks++;
      if (last_done - last_pix != 18 || stalls != 0) begin
        failures++; $display("FAIL frame %0d latency %0d stalls %0d", f, last_done - last_pix, stalls);
      end
      checks++;
      if (chi != 48'(echi) || c_hat != 48'((echi * longint'(f == 0 ? cfg.scale_ia : cfg.scale_a)) >>> 16)) begin
        failures++; $display("FAIL frame %0d chi %0d/%0d c_hat %0d", f, chi, echi, c_hat);
      end
      checks++;
      if (last_done2 - last_pix != 2 * W + 2) begin
        failures++; $display("FAIL N=2 frame %0d latency %0d", f, last_done2 - last_pix);
      end
      checks++;
      if (chi2 != 48'(echi2) || c_hat2 != 48'((echi2 * longint'(f == 0 ? cfg.scale_ia : cfg.scale_a)) >>> 16)) begin
        failures++; $display("FAIL N=2 frame %0d chi %0d/%0d c_hat %0d", f, chi2, echi2, c_hat2);
      end
      checks++;
      if (last_done3 - last_sub != 10) begin
        failures++; $display("FAIL SUB=2 frame %0d latency %0d", f, last_done3 - last_sub);
      end
      checks++;
      if (chi3 != 48'(echi3) || c_hat3 != 48'((echi3 * longint'(f == 0 ? cfg.scale_ia : cfg.scale_a)) >>> 16)) begin
        failures++; $display("FAIL SUB=2 frame %0d chi %0d/%0d c_hat %0d", f, chi3, echi3, c_hat3);
      end
      expect_sc = (f == 2);
      checks++;
      if (sc3 != (f == 2)) begin failures++; $display("FAIL SUB=2 frame %0d scene change %0d chi %0d", f, sc3, chi3); end
      checks++;
      if (sc2 != expect_sc) begin failures++; $display("FAIL N=2 frame %0d scene change %0d chi %0d", f, sc2, chi2); end
      checks++;
      if (sc != expect_sc) begin failures++; $display("FAIL frame %0d scene change %0d chi %0d", f, sc, chi); end
      if (f == 3) begin
        checks++;
        if (chi <= cfg.sc_threshold) begin failures++; $display("FAIL frame 3 should be above threshold"); end
      end
      for (int i = 0; i < NP; i++) begin
        pack_addr = 7'(i); #1;
        checks++;
        if (pack_chi != 48'(epack[i])) begin failures++; $display("FAIL frame %0d pack %0d", f, i); end
        checks++;
        if (pack_chi2 != 48'(epack2[i])) begin failures++; $display("FAIL N=2 frame %0d pack %0d", f, i); end
        checks++;
        if (pack_chi3 != 48'(epack3[i])) begin failures++; $display("FAIL SUB=2 frame %0d pack %0d", f, i); end
      end
      @(negedge clk);
      $display("frame %0d: chi=%0d c_hat=%0d scene_change=%0d since_i=%0d | N=2 chi=%0d since_i=%0d | SUB=2 chi=%0d since_i=%0d", f, chi, c_hat, sc, since, chi2, since2, chi3, since3);
      foreach (prev_frame[i]) prev_frame[i] = this_frame[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
