// tb_scene_change_detector: presents a sequence of frame complexities and
// planned frame types. It checks the scene-change decision and the
// frames-since-I counter against the rules: chi above the threshold, far enough
// from the last I-frame, and not already planned as intra. It covers a scene
// change suppressed by the minimal distance and one accepted after it.
module tb_scene_change_detector;
  logic clk = 1'b0, rst_n = 1'b0, v = 1'b0, intra = 1'b0, scv, sc;
  logic [47:0] chi = '0, thr = 48'd1000000;
  logic [7:0] mind = 8'd4, since;
  int checks = 0, failures = 0, rsince = 0, n_sc = 0, n_supp = 0;

  scene_change_detector dut (.clk, .rst_n, .chi_valid(v), .chi, .frame_is_intra(intra),
    .threshold(thr), .min_dist(mind), .sc_valid(scv), .scene_change(sc), .since_i(since));
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 200; f++) begin
      bit esc, hi;
      intra = (f == 0) || (f % 50 == 0);
      hi = ($urandom % 4 == 0);
      chi = hi ? 48'(1000001 + $urandom % 5000) : 48'($urandom % 1000001);
      if (f == 1 || f == 2) chi = 48'd5000000;   // right after an I-frame
      esc = !intra && (chi > thr) && (rsince + 1 >= int'(mind));
      if (!intra && chi > thr && !esc) n_supp++;
      v = 1'b1; @(negedge clk); v = 1'b0;
      if (intra || esc) rsince = 0; else if (rsince < 255) rsince++;
      if (esc) n_sc++;
      checks++;
      if (!scv || sc != esc || int'(since) != rsince) begin
        failures++; $display("FAIL f%0d sc %0d/%0d since %0d/%0d", f, sc, esc, since, rsince);
      end
      repeat ($urandom % 3) @(negedge clk);
    end
    checks++;
    if (n_sc == 0 || n_supp == 0) begin failures++; $display("FAIL coverage sc=%0d suppressed=%0d", n_sc, n_supp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
