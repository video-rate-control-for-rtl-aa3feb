// band_region_stats: mean and deviation of the luma difference over NxM regions
// (N > 1 lines).
//
// This is the general form of the first estimator stage. region_stats covers the
// scanline case N = 1. A region of N lines by M pixels is complete only when the
// last of its N lines arrives. Its deviation needs its mean, and so a whole band
// of N lines is kept. Each pixel contributes d = |cur - ref| (or the luma itself
// for an intra frame, `intra`). The block then computes
//   mean = (sum d) >> log2(N*M)      deviation = sum |d - mean|
// over each region.
//
// How it works: two band buffers of N x WIDTH bytes alternate. While a band is
// written, a running sum per region column is kept. Its first pixel writes the
// sum and the others add to it. At the band's last pixel all region means are
// latched at once and the buffers swap. The deviation pass then walks the stored
// band region by region, one pixel per cycle, while the next band is written. A
// band of N*WIDTH pixels takes N*WIDTH cycles in either direction, so the input
// runs at one pixel per cycle. `in_ready` drops only if a band completes before
// the previous deviation pass has ended.
//
// Design versus own choices: the NxM region and its statistics follow the
// design. The band double buffer, the column-wise walk and the requirement that
// N*M is a power of two (so the mean is a shift) are own choices. The memory
// cost, 2*N*WIDTH bytes, is why the design suggests N = 1 when memory access
// matters.
//
// Timing: regions come out in raster order of regions (band by band, left to
// right), one `out_valid` pulse each. The first region of a band appears N*M+1
// cycles after the band's last pixel, then one region every N*M cycles.
module band_region_stats #(
  parameter int unsigned WIDTH = 352,
  parameter int unsigned N     = 2,
  parameter int unsigned M     = 16,
  localparam int unsigned DW   = $clog2(N * M * 255 + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [7:0]    cur,
  input  logic [7:0]    ref_luma,
  input  logic          intra,
  output logic          out_valid,
  output logic [7:0]    mean,
  output logic [DW-1:0] dev
);
  localparam int unsigned RX   = WIDTH / M;
  localparam int unsigned LNM  = $clog2(N * M);
  localparam int unsigned BAND = N * WIDTH;
  localparam int unsigned AW   = $clog2(BAND);
  localparam int unsigned XW   = $clog2(WIDTH);
  localparam int unsigned RW   = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned CW   = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned KW   = (RX > 1) ? $clog2(RX) : 1;

  initial begin
    assert ((N * M) == (1 << LNM)) else $error("N*M must be a power of two");
    assert ((RX * M) == WIDTH) else $error("WIDTH must be a multiple of M");
  end

  logic [7:0]    band_mem [2][BAND];
  logic [DW-1:0] sums  [RX];
  logic [7:0]    means [RX];

  // write side
  logic          fill_bank;
  logic [XW-1:0] fill_x;
  logic [RW-1:0] fill_row;
  logic [KW-1:0] fill_rx;
  logic [CW-1:0] fill_c;
  // deviation side
  logic          dev_bank, dev_active;
  logic [KW-1:0] dev_rx;
  logic [RW-1:0] dev_row;
  logic [CW-1:0] dev_c;
  logic [DW-1:0] dev_acc;

  logic [7:0]    d, x, absd;
  logic [DW-1:0] sum_next;
  logic [AW-1:0] wr_addr, rd_addr;
  logic          band_last, dev_last, region_last, accept;

  always_comb begin
    d           = intra ? cur : ((cur > ref_luma) ? cur - ref_luma : ref_luma - cur);
    band_last   = (32'(fill_row) == N - 1) && (32'(fill_x) == WIDTH - 1);
    region_last = (32'(dev_row) == N - 1) && (32'(dev_c) == M - 1);
    dev_last    = region_last && (32'(dev_rx) == RX - 1);
    in_ready    = !(band_last && dev_active && !dev_last);
    accept      = in_valid && in_ready;
    sum_next    = ((fill_row == '0 && fill_c == '0) ? '0 : sums[fill_rx]) + DW'(d);
    wr_addr     = AW'(32'(fill_row) * WIDTH + 32'(fill_x));
    rd_addr     = AW'(32'(dev_row) * WIDTH + 32'(dev_rx) * M + 32'(dev_c));
    x           = band_mem[dev_bank][rd_addr];
    absd        = (x > means[dev_rx]) ? x - means[dev_rx] : means[dev_rx] - x;
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      band_mem[fill_bank][wr_addr] <= d;
      sums[fill_rx]                <= sum_next;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_bank  <= 1'b0;
      fill_x     <= '0;
      fill_row   <= '0;
      fill_rx    <= '0;
      fill_c     <= '0;
      dev_bank   <= 1'b0;
      dev_active <= 1'b0;
      dev_rx     <= '0;
      dev_row    <= '0;
      dev_c      <= '0;
      dev_acc    <= '0;
      out_valid  <= 1'b0;
      mean       <= '0;
      dev        <= '0;
      for (int r = 0; r < RX; r++) means[r] <= '0;
    end else begin
      out_valid <= 1'b0;
      // deviation pass: column within region, then line, then region
      if (dev_active) begin
        if (region_last) begin
          dev_acc   <= '0;
          out_valid <= 1'b1;
          mean      <= means[dev_rx];
          dev       <= dev_acc + DW'(absd);
          dev_c     <= '0;
          dev_row   <= '0;
          dev_rx    <= dev_rx + 1'b1;
          if (dev_last) dev_active <= 1'b0;
        end else begin
          dev_acc <= dev_acc + DW'(absd);
          if (32'(dev_c) == M - 1) begin
            dev_c   <= '0;
            dev_row <= dev_row + 1'b1;
          end else begin
            dev_c <= dev_c + 1'b1;
          end
        end
      end
      // band writing
      if (accept) begin
        if (32'(fill_c) == M - 1) begin
          fill_c  <= '0;
          fill_rx <= (32'(fill_rx) == RX - 1) ? '0 : fill_rx + 1'b1;
        end else begin
          fill_c <= fill_c + 1'b1;
        end
        if (32'(fill_x) == WIDTH - 1) begin
          fill_x   <= '0;
          fill_row <= (32'(fill_row) == N - 1) ? '0 : fill_row + 1'b1;
        end else begin
          fill_x <= fill_x + 1'b1;
        end
        if (band_last) begin
          for (int r = 0; r < RX; r++)
            means[r] <= 8'(((r == RX - 1) ? sum_next : sums[r]) >> LNM);
          fill_bank  <= ~fill_bank;
          dev_bank   <= fill_bank;
          dev_active <= 1'b1;
          dev_rx     <= '0;
          dev_row    <= '0;
          dev_c      <= '0;
          dev_acc    <= '0;
        end
      end
    end
  end

endmodule
