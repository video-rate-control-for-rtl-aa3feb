// modeling_table: on-chip SRAM holding the rate-control modeling table.
//
// It has 1024 entries of 5-bit QP, 32 texture bins by 32 SAD bins, addressed as
// {text_bin, sad_bin}. It is read when a MB's QP is looked up and when an entry is
// refreshed after the MB is coded. It is written by the start-up copy from the
// ROM and by the refresh. The size follows the design. The port arrangement is an
// own choice: one synchronous read port (data one cycle after rd_en) and one
// write port, like a simple dual-port SRAM macro. A read and a write of the same
// address in one cycle return the old data.
module modeling_table
  import rc_pkg::*;
#(
  parameter int unsigned DEPTH = TBL_DEPTH
) (
  input  logic      clk,
  input  logic      rd_en,
  input  tbl_addr_t rd_addr,
  output qp_t       rd_data,
  input  logic      wr_en,
  input  tbl_addr_t wr_addr,
  input  qp_t       wr_data
);
  qp_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
