// tb_modeling_table: writes random QPs to random addresses of the table SRAM and
// reads them back against a shadow array. Each read must deliver its data
// exactly one cycle after rd_en. A read and a write of the same address in one
// cycle must return the old value.
module tb_modeling_table;
  import rc_pkg::*;
  logic clk = 1'b0;
  logic rd_en = 1'b0, wr_en = 1'b0;
  tbl_addr_t rd_addr = '0, wr_addr = '0;
  qp_t wr_data = '0, rd_data;
  qp_t shadow [TBL_DEPTH];
  int checks = 0, failures = 0;

  modeling_table dut (.clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < TBL_DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = tbl_addr_t'(i); wr_data = qp_t'($urandom);
      shadow[i] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      tbl_addr_t a;
      qp_t old;
      a = tbl_addr_t'($urandom);
      old = shadow[a];
      rd_en = 1'b1; rd_addr = a;
      wr_en = ($urandom % 2) == 1; wr_addr = ($urandom % 4 == 0) ? a : tbl_addr_t'($urandom);
      wr_data = qp_t'($urandom);
      @(negedge clk);
      if (wr_en) shadow[wr_addr] = wr_data;
      rd_en = 1'b0; wr_en = 1'b0;
      checks++;
      if (rd_data != old) begin failures++; $display("FAIL addr %0d got %0d exp %0d", a, rd_data, old); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
