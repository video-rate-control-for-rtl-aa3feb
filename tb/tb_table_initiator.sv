// tb_table_initiator: runs the ROM-to-SRAM copy with the real ROM and SRAM and
// checks that every SRAM entry equals the ROM entry afterwards. The copy must
// take exactly 1024 cycles (busy) before done.
module tb_table_initiator;
  import rc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  tbl_addr_t rom_addr, wr_addr, rd_addr = '0, chk_addr;
  qp_t rom_qp, wr_data, rd_data, chk_qp;
  logic wr_en, busy, done, rd_en = 1'b0;
  int checks = 0, failures = 0, cyc = 0;

  table_rom u_rom (.addr(rom_addr), .qp(rom_qp));
  table_rom u_ref (.addr(chk_addr), .qp(chk_qp));
  table_initiator dut (.clk, .rst_n, .start, .rom_addr, .rom_qp, .wr_en, .wr_addr, .wr_data, .busy, .done);
  modeling_table u_tbl (.clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != TBL_DEPTH) begin failures++; $display("FAIL copy took %0d cycles", cyc); end
    for (int i = 0; i < TBL_DEPTH; i++) begin
      rd_en = 1'b1; rd_addr = tbl_addr_t'(i); chk_addr = tbl_addr_t'(i);
      @(negedge clk);
      checks++;
      if (rd_data != chk_qp) begin failures++; $display("FAIL entry %0d = %0d exp %0d", i, rd_data, chk_qp); end
    end
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
