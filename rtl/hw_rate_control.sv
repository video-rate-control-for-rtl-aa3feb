// hw_rate_control: table-based rate control that runs inside the encoder.
//
// The idea: a pure-hardware rate control does not evaluate an R-D model. It
// keeps a table of the QPs that were actually used before, indexed by
// (texture bits per MB, SAD). It looks up a QP for each macroblock (MB) and
// rewrites the entry once the MB's real bit count is known. The table thus
// follows the content the way model parameters would, without multiplications.
//
// Per frame (following the design):
//   B_frame    = target from buffer_size_update (P: V+B/F-V0, I: k times that)
//   B_text_bit = B_frame - B_OH_bit          (overhead bits of previous frame)
//   B_mb_OH    = B_OH_bit / MBsInFrame        (shared divider)
// Per MB:
//   B_mb_text  = B_text_bit / (MBsInFrame - No_MBs)   (shared divider;
//                skipped and taken as negative when B_text_bit < 0)
//   address    = {min(B_mb_text/64,31), min(SAD/128,31)}
//   QP         = qp_refine(table QP, AverageQP, B_mb_text), +/-2 limited
// After the MB is coded (texture bits T, overhead bits O, QP used q):
//   B_text_bit += -T + B_mb_OH - O ; TotalQP += q ; No_MBs += 1
//   table[{bin(T), bin(SAD)}] = (table entry + q) / 2
//   AverageQP refreshed by a shift when No_MBs is a power of two (avg_qp_unit)
// At frame end the buffer model takes the frame's bits K, and the frame's
// overhead bits become B_OH_bit for the next frame.
//
// Interface (all handshakes valid/ready, this implementation's own choice):
//   cfg_load     loads rc_cfg_t, resets the buffer model and copies the ROM into
//                the table (1024 cycles, `init_busy`).
//   frame_start  accepted when `ready_for_frame`.
//   mb_req_*     SAD of the next MB; qp_valid/qp_ready returns its QP.
//   mb_res_*     texture/overhead bits and QP actually used for that MB.
//   frame_end_*  whole-frame bits K and frame overhead bits.
// Timing: qp_valid rises 36 cycles after the request is accepted (33-cycle
// division, table read, refinement), or 3 cycles after it when the budget is
// already exhausted. An MB result is absorbed in 2 cycles. The start-up table copy
// keeps init_busy high for 1025 cycles. At a
// 100 MHz clock and 396 MBs per frame this is about 16k of the 3.3M cycles of a
// 30 Hz frame.
module hw_rate_control
  import rc_pkg::*;
#(
  parameter int unsigned MBS_IN_FRAME   = 396,
  parameter int unsigned TEXT_BIN_SHIFT = 6,
  parameter int unsigned SAD_BIN_SHIFT  = 7,
  parameter int signed   TEXT_THRESHOLD = 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  input  rc_cfg_t            cfg,
  input  logic               cfg_load,
  output logic               init_busy,
  output logic               ready_for_frame,
  input  logic               frame_start,
  input  logic               frame_is_intra,
  input  logic               mb_req_valid,
  output logic               mb_req_ready,
  input  logic [15:0]        mb_sad,
  input  logic               mb_qp_locked,
  output logic               qp_valid,
  input  logic               qp_ready,
  output qp_t                qp,
  input  logic               mb_res_valid,
  output logic               mb_res_ready,
  input  logic [15:0]        mb_text_bits,
  input  logic [15:0]        mb_oh_bits,
  input  qp_t                mb_qp_used,
  input  logic               frame_end_valid,
  output logic               frame_end_ready,
  input  logic [31:0]        frame_bits,
  input  logic [31:0]        frame_oh_bits,
  output logic signed [31:0] frame_target_bits,
  output logic signed [31:0] text_bits_left,
  output logic signed [31:0] mb_text_target,
  output qp_t                avg_qp
);
  localparam int unsigned NW = $clog2(MBS_IN_FRAME + 1);
  localparam int unsigned TW = $clog2(MBS_IN_FRAME * QP_MAX + 1);
  localparam logic [BIN_BITS-1:0] BIN_SAT = '1;

  typedef enum logic [3:0] {
    S_NOTABLE, S_INIT, S_IDLE, S_DIV_OH, S_WAIT_MB, S_DIV_MB,
    S_RD, S_QP, S_QP_OUT, S_WAIT_RES, S_UPD, S_FRAME_END
  } state_t;

  state_t state;

  // ---------------- buffer model ----------------
  logic signed [31:0] target_bits, v0, buf_level;
  logic               buf_frame_done;
  logic               intra_q;

  buffer_size_update u_buf (
    .clk, .rst_n,
    .cfg_load       (cfg_load && (state == S_NOTABLE || state == S_IDLE)),
    .bits_per_frame (cfg.bits_per_frame),
    .window_n       (cfg.window_n),
    .omega_q8       (cfg.omega_q8),
    .k_iframe       (cfg.k_iframe),
    .frame_is_intra (frame_is_intra),
    .frame_done     (buf_frame_done),
    .frame_bits     (frame_bits),
    .target_bits    (target_bits),
    .v0             (v0),
    .buf_level      (buf_level)
  );

  // ---------------- shared divider ----------------
  logic        div_start, div_busy, div_done;
  logic [31:0] div_a, div_b, div_q, div_r;

  rc_divider #(.WIDTH(32)) u_div (
    .clk, .rst_n,
    .start (div_start), .dividend (div_a), .divisor (div_b),
    .busy (div_busy), .done (div_done), .quotient (div_q), .remainder (div_r)
  );

  // ---------------- modeling table, ROM, initiator ----------------
  tbl_addr_t rom_addr, ini_wr_addr, rd_addr, upd_addr;
  qp_t       rom_qp, ini_wr_data, tbl_rd_data, upd_data;
  logic      ini_wr_en, ini_busy, ini_done, ini_start, tbl_rd_en, upd_wr_en;

  table_rom u_rom (.addr (rom_addr), .qp (rom_qp));

  table_initiator u_ini (
    .clk, .rst_n, .start (ini_start),
    .rom_addr (rom_addr), .rom_qp (rom_qp),
    .wr_en (ini_wr_en), .wr_addr (ini_wr_addr), .wr_data (ini_wr_data),
    .busy (ini_busy), .done (ini_done)
  );

  modeling_table u_tbl (
    .clk,
    .rd_en   (tbl_rd_en),
    .rd_addr (rd_addr),
    .rd_data (tbl_rd_data),
    .wr_en   (ini_wr_en || upd_wr_en),
    .wr_addr (ini_wr_en ? ini_wr_addr : upd_addr),
    .wr_data (ini_wr_en ? ini_wr_data : upd_data)
  );

  // ---------------- average QP ----------------
  logic           avg_frame_start, avg_mb_done;
  logic [NW-1:0]  no_mbs;
  logic [TW-1:0]  total_qp;

  avg_qp_unit #(.MBS_IN_FRAME (MBS_IN_FRAME)) u_avg (
    .clk, .rst_n,
    .init        (cfg_load && (state == S_NOTABLE || state == S_IDLE)),
    .init_qp     (cfg.init_qp),
    .frame_start (avg_frame_start),
    .mb_done     (avg_mb_done),
    .mb_qp       (mb_qp_used),
    .avg_qp      (avg_qp),
    .no_mbs      (no_mbs),
    .total_qp    (total_qp)
  );

  // ---------------- QP refinement ----------------
  logic [15:0]        sad_q;
  logic               locked_q, first_mb;
  qp_t                prev_qp, qp_w, qp_r, qp_reg;
  logic signed [31:0] b_oh_bit, b_mb_oh;

  qp_refine #(.TEXT_THRESHOLD (TEXT_THRESHOLD)) u_ref (
    .lut_qp       (tbl_rd_data),
    .avg_qp       (avg_qp),
    .mb_text_bits (mb_text_target),
    .first_mb     (first_mb),
    .prev_qp      (prev_qp),
    .qp_locked    (locked_q),
    .qp_weighted  (qp_w),
    .qp_out       (qp_r)
  );

  // Bin numbers, saturating at the last bin.
  function automatic logic [BIN_BITS-1:0] bin_of(input logic [31:0] v, input int unsigned sh);
    logic [31:0] b;
    b = v >> sh;
    return (b > 32'(BIN_SAT)) ? BIN_SAT : b[BIN_BITS-1:0];
  endfunction

  logic [BIN_BITS-1:0] sad_bin, text_bin, act_bin, upd_bin_q;
  assign sad_bin  = bin_of(32'(sad_q), SAD_BIN_SHIFT);
  assign text_bin = (mb_text_target < 0) ? '0 : bin_of(mb_text_target, TEXT_BIN_SHIFT);
  assign act_bin  = bin_of(32'(mb_text_bits), TEXT_BIN_SHIFT);

  // ---------------- control ----------------
  always_comb begin
    ini_start       = cfg_load && (state == S_NOTABLE || state == S_IDLE);
    div_start       = 1'b0;
    div_a           = '0;
    div_b           = 32'(MBS_IN_FRAME);
    tbl_rd_en       = 1'b0;
    rd_addr         = tbl_addr(text_bin, sad_bin);
    upd_wr_en       = 1'b0;
    upd_addr        = tbl_addr(upd_bin_q, sad_bin);
    upd_data        = qp_t'((6'(tbl_rd_data) + 6'(qp_reg)) >> 1);
    avg_frame_start = 1'b0;
    avg_mb_done     = 1'b0;
    buf_frame_done  = 1'b0;
    mb_req_ready    = (state == S_WAIT_MB);
    mb_res_ready    = (state == S_WAIT_RES);
    frame_end_ready = (state == S_FRAME_END);
    qp_valid        = (state == S_QP_OUT);
    ready_for_frame = (state == S_IDLE);
    init_busy       = (state == S_INIT);
    case (state)
      S_IDLE: if (frame_start && !cfg_load) begin
        div_start       = 1'b1;
        div_a           = (b_oh_bit < 0) ? '0 : b_oh_bit;
        div_b           = 32'(MBS_IN_FRAME);
        avg_frame_start = 1'b1;
      end
      S_WAIT_MB: if (mb_req_valid && text_bits_left >= 0) begin
        div_start = 1'b1;
        div_a     = text_bits_left;
        div_b     = 32'(MBS_IN_FRAME) - 32'(no_mbs);
      end
      S_RD: tbl_rd_en = 1'b1;
      S_WAIT_RES: if (mb_res_valid) begin
        tbl_rd_en   = 1'b1;
        rd_addr     = tbl_addr(act_bin, sad_bin);
        avg_mb_done = 1'b1;
      end
      S_UPD: upd_wr_en = 1'b1;
      S_FRAME_END: buf_frame_done = frame_end_valid;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state             <= S_NOTABLE;
      intra_q           <= 1'b0;
      frame_target_bits <= '0;
      text_bits_left    <= '0;
      mb_text_target    <= '0;
      b_oh_bit          <= '0;
      b_mb_oh           <= '0;
      sad_q             <= '0;
      locked_q          <= 1'b0;
      first_mb          <= 1'b1;
      prev_qp           <= qp_t'(QP_MIN);
      qp_reg            <= qp_t'(QP_MIN);
      upd_bin_q         <= '0;
    end else begin
      case (state)
        S_NOTABLE: if (cfg_load) begin
          state    <= S_INIT;
          b_oh_bit <= '0;
        end
        S_INIT: if (ini_done) state <= S_IDLE;
        S_IDLE: begin
          if (cfg_load) begin
            state    <= S_INIT;
            b_oh_bit <= '0;
          end else if (frame_start) begin
            intra_q           <= frame_is_intra;
            frame_target_bits <= target_bits;
            text_bits_left    <= target_bits - b_oh_bit;
            first_mb          <= 1'b1;
            state             <= S_DIV_OH;
          end
        end
        S_DIV_OH: if (div_done) begin
          b_mb_oh <= div_q;
          state   <= S_WAIT_MB;
        end
        S_WAIT_MB: if (mb_req_valid) begin
          sad_q    <= mb_sad;
          locked_q <= mb_qp_locked;
          if (text_bits_left < 0) begin
            mb_text_target <= -32'sd1;
            state          <= S_RD;
          end else begin
            state <= S_DIV_MB;
          end
        end
        S_DIV_MB: if (div_done) begin
          mb_text_target <= div_q;
          state          <= S_RD;
        end
        S_RD: state <= S_QP;
        S_QP: begin
          qp_reg <= qp_r;
          state  <= S_QP_OUT;
        end
        S_QP_OUT: if (qp_ready) state <= S_WAIT_RES;
        S_WAIT_RES: if (mb_res_valid) begin
          text_bits_left <= text_bits_left - 32'(mb_text_bits) + b_mb_oh - 32'(mb_oh_bits);
          prev_qp        <= mb_qp_used;
          qp_reg         <= mb_qp_used;
          first_mb       <= 1'b0;
          upd_bin_q      <= act_bin;
          state          <= S_UPD;
        end
        S_UPD: state <= (32'(no_mbs) >= 32'(MBS_IN_FRAME)) ? S_FRAME_END : S_WAIT_MB;
        S_FRAME_END: if (frame_end_valid) begin
          b_oh_bit <= $signed(frame_oh_bits);
          state    <= S_IDLE;
        end
        default: state <= S_NOTABLE;
      endcase
    end
  end

  assign qp = qp_reg;

  logic unused_ok;
  assign unused_ok = ^{div_busy, div_r, v0, buf_level, total_qp, qp_w, intra_q, ini_busy};

  // Handshake rules.
  a_qp_stable: assert property (@(posedge clk) disable iff (!rst_n)
    qp_valid && !qp_ready |=> qp_valid && $stable(qp));
  a_qp_range: assert property (@(posedge clk) disable iff (!rst_n)
    qp_valid |-> (qp >= qp_t'(QP_MIN)) && (qp <= qp_t'(QP_MAX)));

endmodule
