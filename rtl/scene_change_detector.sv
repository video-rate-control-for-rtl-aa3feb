// scene_change_detector: decides when a frame should be coded as an I-frame.
//
// A frame whose estimated complexity chi exceeds a threshold cannot be predicted
// well from the previous frame, and it is coded as an I-frame. To avoid bursts of
// I-frames in long transitions or at low frame rates, a minimal distance between
// I-frames is enforced. Both rules follow the design. The threshold and the
// minimal distance are host registers (own choice): the design sets the
// threshold by experiment and ties the distance to the size of chi without
// giving the mapping.
//
// Behaviour: `since_i` counts frames since the last I-frame. At each
// `chi_valid` the frame is a scene change if chi > threshold and
// since_i + 1 >= min_dist and the frame was not already planned as intra. The
// counter then restarts at 0 for an I-frame (planned or detected) and otherwise
// counts up, saturating at 255. `scene_change` is registered and valid with
// `sc_valid`, one cycle after chi_valid.
module scene_change_detector (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        chi_valid,
  input  logic [47:0] chi,
  input  logic        frame_is_intra,
  input  logic [47:0] threshold,
  input  logic [7:0]  min_dist,
  output logic        sc_valid,
  output logic        scene_change,
  output logic [7:0]  since_i
);
  logic       sc;
  logic [8:0] dist_next;

  always_comb begin
    dist_next = 9'(since_i) + 9'd1;
    sc        = !frame_is_intra && (chi > threshold) && (dist_next >= 9'(min_dist));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sc_valid     <= 1'b0;
      scene_change <= 1'b0;
      since_i      <= '0;
    end else begin
      sc_valid <= chi_valid;
      if (chi_valid) begin
        scene_change <= sc;
        if (frame_is_intra || sc)
          since_i <= '0;
        else if (since_i != 8'hFF)
          since_i <= since_i + 1'b1;
      end
    end
  end

endmodule
