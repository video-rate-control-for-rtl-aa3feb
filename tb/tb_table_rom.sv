// tb_table_rom: checks every entry of the initial modeling table against the
// formula QP = clamp(round(4*SAD_mid/TEXT_mid),1,31), evaluated here in real
// arithmetic. It also checks the monotonic shape: QP never falls as SAD grows
// and never rises as texture bits grow.
module tb_table_rom;
  import rc_pkg::*;
  tbl_addr_t addr;
  qp_t qp;
  qp_t grid [32][32];
  int checks = 0, failures = 0;

  table_rom dut (.addr, .qp);

  initial begin
    for (int t = 0; t < 32; t++)
      for (int s = 0; s < 32; s++) begin
        real e;
        int ei;
        addr = tbl_addr(5'(t), 5'(s));
        #1;
        grid[t][s] = qp;
        e  = 4.0 * (s + 0.5) * 128.0 / ((t + 0.5) * 64.0);
        ei = int'($floor(e + 0.5));
        if (ei < 1) ei = 1;
        if (ei > 31) ei = 31;
        checks++;
        if (int'(qp) != ei) begin failures++; $display("FAIL t=%0d s=%0d qp=%0d exp=%0d", t, s, qp, ei); end
      end
    for (int t = 0; t < 32; t++)
      for (int s = 1; s < 32; s++) begin
        checks++;
        if (grid[t][s] < grid[t][s-1]) begin failures++; $display("FAIL SAD monotonic t=%0d s=%0d", t, s); end
      end
    for (int t = 1; t < 32; t++)
      for (int s = 0; s < 32; s++) begin
        checks++;
        if (grid[t][s] > grid[t-1][s]) begin failures++; $display("FAIL text monotonic t=%0d s=%0d", t, s); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
