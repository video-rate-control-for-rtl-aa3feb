// buffer_size_update: decoder-buffer model and frame target bits.
//
// This follows the frame-level buffer control of the design. B/F is the average
// frame budget. N is a sliding window of frames and w the intended buffer usage.
// The initial available decoder buffer is V0 = (N*B/F)*(1-w). After a frame of K
// bits the available buffer becomes V = V - K + B/F. The target of the next P frame
// is P_target = V + B/F - V0, and an I frame gets k*P_target.
//
// Own choices: w is an 8-bit fraction of 256 and k is a 4-bit register.
// `cfg_load` sets V to V0. A negative target is passed on as is: the MB loop then
// uses the largest QP.
//
// Timing: `target_bits` is combinational from the current V. `frame_done`
// updates V on the next clock edge.
module buffer_size_update #(
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cfg_load,
  input  logic [23:0]         bits_per_frame,
  input  logic [7:0]          window_n,
  input  logic [7:0]          omega_q8,
  input  logic [3:0]          k_iframe,
  input  logic                frame_is_intra,
  input  logic                frame_done,
  input  logic [31:0]         frame_bits,
  output logic signed [W-1:0] target_bits,
  output logic signed [W-1:0] v0,
  output logic signed [W-1:0] buf_level
);
  logic signed [W-1:0] bpf_s, v0_calc, p_target;
  logic [47:0]         win_bits;

  always_comb begin
    bpf_s    = W'($signed({1'b0, bits_per_frame}));
    win_bits = (48'(window_n) * 48'(bits_per_frame)) * 48'(9'd256 - {1'b0, omega_q8});
    v0_calc  = W'(win_bits >> 8);
    p_target = buf_level + bpf_s - v0;
    target_bits = frame_is_intra ? W'(p_target * $signed({1'b0, k_iframe})) : p_target;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0        <= '0;
      buf_level <= '0;
    end else if (cfg_load) begin
      v0        <= v0_calc;
      buf_level <= v0_calc;
    end else if (frame_done) begin
      buf_level <= buf_level - W'($signed({1'b0, frame_bits})) + bpf_s;
    end
  end

endmodule
