// tb_region_stats: streams random luma pairs (P and I mode) into region_stats and
// checks each region's mean and deviation against values computed here from
// the same pixels. With a pixel every cycle the block must never stall, and
// 64 regions must finish in 64*16 + 17 cycles. A second run inserts random
// bubbles in the input.
module tb_region_stats;
  localparam int M = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, intra = 1'b0, out_valid;
  logic [7:0] cur = '0, refl = '0, mean;
  logic [11:0] dev;
  int checks = 0, failures = 0;
  int exp_mean[$], exp_dev[$];
  int got = 0, stalls = 0;

  region_stats #(.M(M)) dut (.clk, .rst_n, .in_valid, .in_ready, .cur, .ref_luma(refl), .intra,
                             .out_valid, .mean, .dev);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (out_valid) begin
      int em, ed;
      em = exp_mean.pop_front(); ed = exp_dev.pop_front();
      checks++; got++;
      if (int'(mean) != em || int'(dev) != ed) begin
        failures++; $display("FAIL region %0d mean %0d/%0d dev %0d/%0d", got, mean, em, dev, ed);
      end
    end
    if (in_valid && !in_ready) stalls++;
  end

  task automatic send_regions(input int nreg, input bit gaps, input bit mode);
    int d[M];
    intra = mode;
    for (int r = 0; r < nreg; r++) begin
      int s, m, dv;
      s = 0;
      for (int i = 0; i < M; i++) begin
        logic [7:0] c, rf;
        c = 8'($urandom); rf = (r % 3 == 0) ? c ^ 8'($urandom % 8) : 8'($urandom);
        d[i] = mode ? int'(c) : ((c > rf) ? int'(c - rf) : int'(rf - c));
        s += d[i];
        while (gaps && ($urandom % 3 == 0)) begin in_valid = 1'b0; @(negedge clk); end
        in_valid = 1'b1; cur = c; refl = rf;
        @(negedge clk);
        while (!in_ready) @(negedge clk);
      end
      m = s / M; dv = 0;
      for (int i = 0; i < M; i++) dv += (d[i] > m) ? d[i] - m : m - d[i];
      exp_mean.push_back(m); exp_dev.push_back(dv);
    end
    in_valid = 1'b0;
  endtask

  initial begin
    int t0, t1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    t0 = $time;
    send_regions(64, 1'b0, 1'b0);
    while (got < 64) @(negedge clk);
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 != 64 * M + 17 || stalls != 0) begin
      failures++; $display("FAIL throughput: %0d cycles, %0d stalls", (t1 - t0) / 10, stalls);
    end
    send_regions(40, 1'b1, 1'b1);
    send_regions(40, 1'b1, 1'b0);
    repeat (40) @(negedge clk);
    checks++;
    if (got != 144 || exp_mean.size() != 0) begin failures++; $display("FAIL region count %0d", got); end
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
