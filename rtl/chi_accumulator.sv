// chi_accumulator: frame and pack complexity chi, and its scaling to SAD units.
//
// Second stage of the out-of-loop complexity estimator. Each region result
// (mean, deviation) adds mean*deviation to
//   chi         = sum over the frame          (frame-level estimate)
//   chi_pack(i) = sum over the regions of pack i   (MB-level estimate)
// A pack is a PACK_W x PACK_H group of macroblocks. A macroblock covers MB x MB
// input pixels: 16, or less when the frames are subsampled before estimation
// (MB = 8 at 2:1). WIDTH and HEIGHT are the frame size as it arrives. Regions of N lines
// by M pixels arrive in raster order, so the block tracks the region's column
// and band (N lines) to find its pack. N must divide MB and M must divide
// MB*PACK_W, so no region straddles two packs. The first region of each pack in a frame
// writes its product instead of adding it. The pack memory therefore needs no
// clearing pass.
// When the frame's last region has been added, `frame_done` pulses and chi is
// scaled to the SAD scale:
//   C_hat = (a * chi) >> B_SHIFT
// a is the P-frame factor, or I_a for a frame measured on the luma itself
// (`intra`). The host refines a and I_a after each frame from the true SAD or the
// true frame size.
//
// Design versus own choices: the sums, the shift scaling with b = 2^16 and the
// separate I-frame factor follow the design. The 2x2-MB pack (the design's
// example) and the port widths are own choices.
//
// Interface: `frame_start` resets the region position. `in_valid` carries one
// region. chi, c_hat and `frame_done` are registered. pack_chi is a
// combinational read of the pack memory at pack_rd_addr.
module chi_accumulator #(
  parameter int unsigned WIDTH   = 352,
  parameter int unsigned HEIGHT  = 288,
  parameter int unsigned N       = 1,
  parameter int unsigned M       = 16,
  parameter int unsigned PACK_W  = 2,
  parameter int unsigned PACK_H  = 2,
  parameter int unsigned B_SHIFT = 16,
  parameter int unsigned MB      = 16,
  localparam int unsigned MBS_X   = (WIDTH + MB - 1) / MB,
  localparam int unsigned MBS_Y   = (HEIGHT + MB - 1) / MB,
  localparam int unsigned PACKS_X = (MBS_X + PACK_W - 1) / PACK_W,
  localparam int unsigned PACKS_Y = (MBS_Y + PACK_H - 1) / PACK_H,
  localparam int unsigned NPACK   = PACKS_X * PACKS_Y,
  localparam int unsigned PAW     = $clog2(NPACK)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       frame_start,
  input  logic                       intra,
  input  logic                       in_valid,
  input  logic [7:0]                 mean,
  input  logic [$clog2(N*M*255+1)-1:0] dev,
  input  logic [23:0]                scale_a,
  input  logic [23:0]                scale_ia,
  output logic                       frame_done,
  output logic [47:0]                chi,
  output logic [47:0]                c_hat,
  input  logic [PAW-1:0]             pack_rd_addr,
  output logic [47:0]                pack_chi
);
  localparam int unsigned RX = WIDTH / M;            // regions per line
  localparam int unsigned XW = $clog2(RX + 1);
  localparam int unsigned RY = HEIGHT / N;           // region bands per frame
  localparam int unsigned YW = $clog2(RY + 1);

  logic [47:0]    pack_mem [NPACK];
  logic [XW-1:0]  rx;
  logic [YW-1:0]  ly;
  logic [47:0]    acc, prod, acc_next, pack_old;
  logic [PAW-1:0] pidx;
  logic           first_touch, last_region;
  logic [71:0]    scaled;

  always_comb begin
    prod        = 48'(mean) * 48'(dev);
    pidx        = PAW'((32'(ly) * N / (MB * PACK_H)) * PACKS_X + ((32'(rx) * M) / MB) / PACK_W);
    first_touch = ((32'(ly) * N % (MB * PACK_H)) == 0) && (((32'(rx) * M) % (MB * PACK_W)) == 0);
    pack_old    = pack_mem[pidx];
    acc_next    = acc + prod;
    last_region = (32'(rx) == RX - 1) && (32'(ly) == RY - 1);
    scaled      = 72'(acc_next) * 72'(intra ? scale_ia : scale_a);
    pack_chi    = pack_mem[pack_rd_addr];
  end

  always_ff @(posedge clk) begin
    if (in_valid && !frame_start)
      pack_mem[pidx] <= first_touch ? prod : pack_old + prod;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx         <= '0;
      ly         <= '0;
      acc        <= '0;
      chi        <= '0;
      c_hat      <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (frame_start) begin
        rx  <= '0;
        ly  <= '0;
        acc <= '0;
      end else if (in_valid) begin
        acc <= acc_next;
        if (32'(rx) == RX - 1) begin
          rx <= '0;
          ly <= ly + 1'b1;
        end else begin
          rx <= rx + 1'b1;
        end
        if (last_region) begin
          chi        <= acc_next;
          c_hat      <= 48'(scaled >> B_SHIFT);
          frame_done <= 1'b1;
        end
      end
    end
  end

endmodule
