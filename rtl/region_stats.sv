// region_stats: mean and deviation of the luma difference over 1xM regions.
//
// This is the first stage of the out-of-loop complexity estimator. For a P frame
// each pixel contributes d = |cur - ref|, the luma difference to the reference
// frame. For an I frame it contributes the luma itself (`intra`). For every region
// of M consecutive pixels of a scanline the block computes
//   mean = (sum d) >> log2(M)        deviation = sum |d - mean|
// The deviation needs the mean first, so each region is held in a small buffer.
// There are two buffers: while one region's deviation is summed (M cycles), the
// next region fills the other. The block thus takes one pixel per cycle.
// `in_ready` drops only if a region completes before the previous deviation pass
// has finished, which cannot happen at one pixel per cycle.
//
// Design versus own choices: the statistics and the N=1 (scanline) option follow
// the design. M=16 (one MB wide), the absolute difference and the truncating mean
// are own choices. Regions of more than one line are handled by
// band_region_stats.
//
// Timing: results come out in input order, one `out_valid` pulse per region,
// M+1 cycles after the region's last pixel.
module region_stats #(
  parameter int unsigned M = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [7:0]                  cur,
  input  logic [7:0]                  ref_luma,
  input  logic                        intra,
  output logic                        out_valid,
  output logic [7:0]                  mean,
  output logic [$clog2(M*255+1)-1:0]  dev
);
  localparam int unsigned LM = $clog2(M);
  localparam int unsigned SW = $clog2(M * 255 + 1);
  localparam int unsigned IW = (LM > 0) ? LM : 1;

  logic [7:0]    buf_mem [2][M];
  logic          fill_bank, dev_bank, dev_active;
  logic [IW-1:0] fill_idx, dev_idx;
  logic [SW-1:0] fill_sum, dev_acc;
  logic [7:0]    dev_mean;
  logic [7:0]    d, x, absd;
  logic [SW-1:0] sum_total;
  logic          last_pix, dev_last, accept;

  always_comb begin
    d         = intra ? cur : ((cur > ref_luma) ? cur - ref_luma : ref_luma - cur);
    last_pix  = (32'(fill_idx) == M - 1);
    dev_last  = (32'(dev_idx) == M - 1);
    in_ready  = !(last_pix && dev_active && !dev_last);
    accept    = in_valid && in_ready;
    sum_total = fill_sum + SW'(d);
    x         = buf_mem[dev_bank][dev_idx];
    absd      = (x > dev_mean) ? x - dev_mean : dev_mean - x;
  end

  always_ff @(posedge clk) begin
    if (accept) buf_mem[fill_bank][fill_idx] <= d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_bank  <= 1'b0;
      fill_idx   <= '0;
      fill_sum   <= '0;
      dev_bank   <= 1'b0;
      dev_active <= 1'b0;
      dev_idx    <= '0;
      dev_acc    <= '0;
      dev_mean   <= '0;
      out_valid  <= 1'b0;
      mean       <= '0;
      dev        <= '0;
    end else begin
      out_valid <= 1'b0;
      // deviation pass
      if (dev_active) begin
        dev_acc <= dev_acc + SW'(absd);
        dev_idx <= dev_idx + 1'b1;
        if (dev_last) begin
          dev_active <= 1'b0;
          out_valid  <= 1'b1;
          mean       <= dev_mean;
          dev        <= dev_acc + SW'(absd);
        end
      end
      // gathering
      if (accept) begin
        if (last_pix) begin
          fill_idx   <= '0;
          fill_sum   <= '0;
          fill_bank  <= ~fill_bank;
          dev_active <= 1'b1;
          dev_bank   <= fill_bank;
          dev_idx    <= '0;
          dev_acc    <= '0;
          dev_mean   <= 8'(sum_total >> LM);
        end else begin
          fill_idx <= fill_idx + 1'b1;
          fill_sum <= sum_total;
        end
      end
    end
  end

endmodule
