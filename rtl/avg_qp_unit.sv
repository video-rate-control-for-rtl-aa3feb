// avg_qp_unit: running average of the QPs of the coded MBs of a frame.
//
// It keeps TotalQP and No_MBs. As the design prescribes, AverageQP is not found
// with a divider: it is refreshed as TotalQP >> log2(No_MBs) only when No_MBs
// reaches a power of two (1, 2, 4, ... 256) and holds its value in between.
// Own choices: `frame_start` clears TotalQP and No_MBs, AverageQP carries over
// from the previous frame, and `init` loads it with an initial QP before the first
// frame.
//
// Timing: `mb_done` with `mb_qp` updates all three outputs on the next edge.
module avg_qp_unit
  import rc_pkg::*;
#(
  parameter int unsigned MBS_IN_FRAME = 396
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  qp_t         init_qp,
  input  logic        frame_start,
  input  logic        mb_done,
  input  qp_t         mb_qp,
  output qp_t         avg_qp,
  output logic [$clog2(MBS_IN_FRAME+1)-1:0] no_mbs,
  output logic [$clog2(MBS_IN_FRAME*QP_MAX+1)-1:0] total_qp
);
  localparam int unsigned NW = $clog2(MBS_IN_FRAME + 1);
  localparam int unsigned TW = $clog2(MBS_IN_FRAME * QP_MAX + 1);

  logic [NW-1:0] n_next;
  logic [TW-1:0] t_next;
  logic [TW-1:0] shifted;

  always_comb begin
    n_next  = no_mbs + 1'b1;
    t_next  = total_qp + TW'(mb_qp);
    shifted = t_next;
    for (int i = 0; i < NW; i++)
      if (n_next[i]) shifted = t_next >> i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avg_qp   <= qp_t'(QP_MIN);
      no_mbs   <= '0;
      total_qp <= '0;
    end else if (init) begin
      avg_qp   <= init_qp;
      no_mbs   <= '0;
      total_qp <= '0;
    end else if (frame_start) begin
      no_mbs   <= '0;
      total_qp <= '0;
    end else if (mb_done) begin
      no_mbs   <= n_next;
      total_qp <= t_next;
      if ((n_next & (n_next - 1'b1)) == '0)
        avg_qp <= qp_t'(shifted);
    end
  end

endmodule
