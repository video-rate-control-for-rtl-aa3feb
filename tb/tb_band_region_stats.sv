// tb_band_region_stats: streams random luma pairs into band_region_stats with
// 2-line regions over a 64-pixel line, in P mode (|cur - ref|) and I mode (luma).
// For every band the testbench keeps the pixel values. It computes each region's
// mean (sum >> log2(N*M)) and deviation itself and compares them in raster
// order of regions. Run 1 sends 8 bands back to back. The block must take a
// pixel every cycle without stalling. The first region of the last band must
// appear N*M+1 cycles after its last pixel, and the last region
// N*WIDTH+1 cycles after. Run 2 inserts random bubbles in the input, and run 3
// uses 4-line regions.
module tb_band_region_stats;
  localparam int W  = 64;
  localparam int M  = 16;
  localparam int RX = W / M;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, intra = 1'b0;
  logic [7:0] cur = '0, refl = '0;
  logic in_ready2, out_valid2, in_ready4, out_valid4;
  logic [7:0] mean2, mean4;
  logic [12:0] dev2;
  logic [13:0] dev4;
  logic sel4 = 1'b0;
  int checks = 0, failures = 0;
  int exp_mean[$], exp_dev[$];
  int got = 0, stalls = 0;
  longint t_last_pix, t_first_out, t_last_out;

  band_region_stats #(.WIDTH(W), .N(2), .M(M)) dut2 (
    .clk, .rst_n, .in_valid(in_valid && !sel4), .in_ready(in_ready2), .cur, .ref_luma(refl),
    .intra, .out_valid(out_valid2), .mean(mean2), .dev(dev2));
  band_region_stats #(.WIDTH(W), .N(4), .M(M)) dut4 (
    .clk, .rst_n, .in_valid(in_valid && sel4), .in_ready(in_ready4), .cur, .ref_luma(refl),
    .intra, .out_valid(out_valid4), .mean(mean4), .dev(dev4));
  always #5 clk = ~clk;

  wire       in_ready  = sel4 ? in_ready4 : in_ready2;
  wire       out_valid = sel4 ? out_valid4 : out_valid2;
  wire [7:0] mean      = sel4 ? mean4 : mean2;
  wire [13:0] dev      = sel4 ? dev4 : 14'(dev2);

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int em, ed;
      em = exp_mean.pop_front(); ed = exp_dev.pop_front();
      checks++; got++;
      if (got % RX == 1) t_first_out = $time;
      t_last_out = $time;
      if (int'(mean) != em || int'(dev) != ed) begin
        failures++; $display("FAIL region %0d mean %0d/%0d dev %0d/%0d", got, mean, em, dev, ed);
      end
    end
    if (in_valid && !in_ready) stalls++;
  end

  task automatic send_bands(input int nbands, input int n, input bit gaps, input bit mode);
    int d[4][W];
    intra = mode;
    for (int b = 0; b < nbands; b++) begin
      for (int y = 0; y < n; y++)
        for (int x = 0; x < W; x++) begin
          logic [7:0] c, rf;
          c  = 8'($urandom);
          rf = ((x / M + b) % 3 == 0) ? c ^ 8'($urandom % 16) : 8'($urandom);
          d[y][x] = mode ? int'(c) : ((c > rf) ? int'(c) - int'(rf) : int'(rf) - int'(c));
          while (gaps && ($urandom % 4 == 0)) begin in_valid = 1'b0; @(negedge clk); end
          in_valid = 1'b1; cur = c; refl = rf;
          @(negedge clk);
          while (!in_ready) @(negedge clk);
          t_last_pix = $time - 10;
        end
      for (int r = 0; r < RX; r++) begin
        int s, m, dv;
        s = 0; dv = 0;
        for (int y = 0; y < n; y++) for (int x = r * M; x < r * M + M; x++) s += d[y][x];
        m = s / (n * M);
        for (int y = 0; y < n; y++) for (int x = r * M; x < r * M + M; x++)
          dv += (d[y][x] > m) ? d[y][x] - m : m - d[y][x];
        exp_mean.push_back(m); exp_dev.push_back(dv);
      end
    end
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // run 1: continuous input, N = 2
    send_bands(8, 2, 1'b0, 1'b0);
    while (got < 8 * RX) @(negedge clk);
    checks++;
    if (stalls != 0) begin failures++; $display("FAIL %0d stalls at full rate", stalls); end
    checks++;
    if ((t_first_out - t_last_pix) / 10 != 2 * M + 1 || (t_last_out - t_last_pix) / 10 != 2 * W + 1) begin
      failures++;
      $display("FAIL latency first %0d last %0d", (t_first_out - t_last_pix) / 10, (t_last_out - t_last_pix) / 10);
    end
    // run 2: bubbles, both modes
    send_bands(6, 2, 1'b1, 1'b1);
    send_bands(6, 2, 1'b1, 1'b0);
    while (got < 20 * RX) @(negedge clk);
    // run 3: N = 4
    repeat (4) @(negedge clk);
    sel4 = 1'b1;
    send_bands(5, 4, 1'b0, 1'b0);
    send_bands(5, 4, 1'b1, 1'b1);
    repeat (4 * W + 20) @(negedge clk);
    checks++;
    if (got != 30 * RX || exp_mean.size() != 0) begin failures++; $display("FAIL region count %0d", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
