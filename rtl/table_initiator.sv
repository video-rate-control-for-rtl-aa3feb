// table_initiator: copies the initial modeling table from ROM into the SRAM.
//
// When encoding starts, the rate control's initiator logic moves the initial table
// from the ROM into its internal memory, as the design describes. On `start` this
// block walks the addresses 0..DEPTH-1, one per cycle (own choice). It presents
// each address to the combinational ROM and writes the ROM's answer into the SRAM
// in the same cycle, so wr_data is the ROM output wired through. `busy` is high for DEPTH cycles and `done` pulses on the
// cycle after the last write.
module table_initiator
  import rc_pkg::*;
#(
  parameter int unsigned DEPTH = TBL_DEPTH
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  output tbl_addr_t rom_addr,
  input  qp_t       rom_qp,
  output logic      wr_en,
  output tbl_addr_t wr_addr,
  output qp_t       wr_data,
  output logic      busy,
  output logic      done
);
  tbl_addr_t addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      addr <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        addr <= '0;
      end else if (busy) begin
        if (int'(addr) == DEPTH - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          addr <= '0;
        end else begin
          addr <= addr + 1'b1;
        end
      end
    end
  end

  assign rom_addr = addr;
  assign wr_en    = busy;
  assign wr_addr  = addr;
  assign wr_data  = rom_qp;

endmodule
