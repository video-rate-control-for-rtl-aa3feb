// tb_chi_accumulator: feeds the region results of three CIF frames (random mean
// and deviation, 22 regions per line, 288 lines) into chi_accumulator. After each
// frame it checks chi, C_hat = a*chi >> 16 (I_a for the intra frame) and the chi
// of all 99 packs of 2x2 macroblocks against sums kept here. The second and third
// frames show that the pack memory restarts correctly without a clearing pass.
// A second instance with rectangular packs of 4x1 macroblocks (6 x 18 = 108
// packs, the last pack of each row only 2 MBs wide) takes the same regions and is
// checked in the same way.
module tb_chi_accumulator;
  localparam int W = 352, H = 288, M = 16, RX = W / M, PX = 11, NP = 99;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fs = 1'b0, intra = 1'b0, in_valid = 1'b0, done;
  logic [7:0] mean = '0;
  logic [11:0] dev = '0;
  logic [23:0] a = 24'd70000, ia = 24'd30000;
  logic [47:0] chi, c_hat, pack_chi;
  logic [6:0] pack_addr = '0;
  localparam int PX2 = 6, NP2 = 108;
  logic [47:0] chi2, c_hat2, pack_chi2;
  logic done2;
  longint exp_pack[NP], exp_pack2[NP2];
  longint exp_chi;
  int checks = 0, failures = 0, dones = 0;

  chi_accumulator dut (.clk, .rst_n, .frame_start(fs), .intra, .in_valid, .mean, .dev,
    .scale_a(a), .scale_ia(ia), .frame_done(done), .chi, .c_hat, .pack_rd_addr(pack_addr), .pack_chi);
  chi_accumulator #(.PACK_W(4), .PACK_H(1)) dut2 (.clk, .rst_n, .frame_start(fs), .intra, .in_valid,
    .mean, .dev, .scale_a(a), .scale_ia(ia), .frame_done(done2), .chi(chi2), .c_hat(c_hat2),
    .pack_rd_addr(pack_addr), .pack_chi(pack_chi2));
  always #5 clk = ~clk;
  always @(posedge clk) if (done) dones++;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 3; f++) begin
      longint sc;
      intra = (f == 1);
      fs = 1'b1; @(negedge clk); fs = 1'b0;
      exp_chi = 0;
      foreach (exp_pack[i]) exp_pack[i] = 0;
      foreach (exp_pack2[i]) exp_pack2[i] = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < RX; x++) begin
          int p;
          mean = 8'($urandom); dev = 12'($urandom % 4081);
          if (f == 2) begin mean = 8'(x + y); dev = 12'(y * 3); end
          p = (y / 32) * PX + (x / 2);
          exp_chi += longint'(mean) * longint'(dev);
          exp_pack[p] += longint'(mean) * longint'(dev);
          exp_pack2[(y / 16) * PX2 + (x / 4)] += longint'(mean) * longint'(dev);
          in_valid = ($urandom % 4) != 0;
          @(negedge clk);
          while (!in_valid) begin in_valid = 1'b1; @(negedge clk); end
        end
      in_valid = 1'b0;
      @(negedge clk);
      sc = (exp_chi * longint'(intra ? ia : a)) >>> 16;
      checks++;
      if (chi != 48'(exp_chi) || c_hat != 48'(sc) || dones != f + 1) begin
        failures++; $display("FAIL frame %0d chi %0d/%0d c_hat %0d/%0d dones %0d", f, chi, exp_chi, c_hat, sc, dones);
      end
      for (int i = 0; i < NP; i++) begin
        pack_addr = 7'(i); #1;
        checks++;
        if (pack_chi != 48'(exp_pack[i])) begin failures++; $display("FAIL frame %0d pack %0d %0d/%0d", f, i, pack_chi, exp_pack[i]); end
      end
      checks++;
      if (chi2 != chi || c_hat2 != c_hat) begin failures++; $display("FAIL frame %0d 4x1 chi %0d", f, chi2); end
      for (int i = 0; i < NP2; i++) begin
        pack_addr = 7'(i); #1;
        checks++;
        if (pack_chi2 != 48'(exp_pack2[i])) begin failures++; $display("FAIL frame %0d 4x1 pack %0d %0d/%0d", f, i, pack_chi2, exp_pack2[i]); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
