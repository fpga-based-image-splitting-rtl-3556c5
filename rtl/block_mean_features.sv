// block_mean_features: row means and column means of every split block, the
// feature set that image retrieval builds on split images.
//
// The unit watches the write stream of image_splitter (one pixel per clock,
// frame raster order) for one component, the luma. For each block it sums the
// pixels of every block row and every block column:
//   row_mean[b][sy] = floor(sum_sx P_b(sx, sy) / SUB_W)
//   col_mean[b][sx] = floor(sum_sy P_b(sx, sy) / SUB_H)
// Pixels of one block row arrive consecutively, so a single running row sum
// suffices; column sums are kept in one accumulator per block column. A mean is
// written into the result memory when its last pixel arrives, so the results
// are complete on the clock after the splitter's last write, and ready rises
// one clock later.
//
// Interface: clear (one clock, with the split start) empties the results and
// drops ready; the wr_* inputs mirror the splitter's block-memory write port;
// ready rises once all NBLK*(SUB_W+SUB_H) means are written. Results are read
// with rd_blk, rd_col (0 = row means, 1 = column means) and rd_idx; rd_data
// follows one clock later.
// The source paper says that the row mean and column mean of each part are obtained;
// the choice of the luma, floor division and the read port are this design's.
module block_mean_features
  import split_pkg::*;
#(
  parameter int unsigned SUB_W   = IMG_W / SPLIT_X,
  parameter int unsigned SUB_H   = IMG_H / SPLIT_Y,
  parameter int unsigned NBLK    = SPLIT_X * SPLIT_Y,
  parameter int unsigned SADDR_W = $clog2(SUB_W * SUB_H),
  parameter int unsigned BIW     = (NBLK > 1) ? $clog2(NBLK) : 1,
  parameter int unsigned IDXW    = $clog2(((SUB_W > SUB_H) ? SUB_W : SUB_H) + 1)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               clear,
  input  logic [NBLK-1:0]    wr_en,
  input  logic [SADDR_W-1:0] wr_addr,
  input  pix_t               wr_data,
  output logic               ready,
  input  logic [BIW-1:0]     rd_blk,
  input  logic               rd_col,
  input  logic [IDXW-1:0]    rd_idx,
  output pix_t               rd_data
);

  localparam int unsigned RSW = $clog2(SUB_W * 255 + 1);   // row sum width
  localparam int unsigned CSW = $clog2(SUB_H * 255 + 1);   // column sum width
  localparam int unsigned NRES = NBLK * (SUB_W + SUB_H);
  localparam int unsigned CNTW = $clog2(NRES + 1);
  localparam int unsigned CIW  = $clog2(NBLK * SUB_W);

  logic [RSW-1:0] row_sum;
  logic [CSW-1:0] col_sum [NBLK * SUB_W];
  pix_t           row_mean [NBLK * SUB_H];
  pix_t           col_mean [NBLK * SUB_W];
  logic [CNTW-1:0] n_written;

  // decode the write
  logic           any_wr;
  logic [BIW-1:0] blk;
  int unsigned    sx, sy;
  logic [CIW-1:0] ci;
  logic [RSW-1:0] row_tot;
  logic [CSW-1:0] col_tot;

  always_comb begin
    any_wr = |wr_en;
    blk = '0;
    for (int b = 0; b < NBLK; b++) if (wr_en[b]) blk = BIW'(b);
    sx = int'(wr_addr) % SUB_W;
    sy = int'(wr_addr) / SUB_W;
    ci = CIW'(int'(blk) * SUB_W + sx);
    row_tot = ((sx == 0) ? '0 : row_sum) + RSW'(wr_data);
    col_tot = ((sy == 0) ? '0 : col_sum[ci]) + CSW'(wr_data);
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      row_sum   <= '0;
      n_written <= '0;
      ready     <= 1'b0;
    end else begin
      if (any_wr) begin
        row_sum     <= row_tot;
        col_sum[ci] <= col_tot;
        if (sx == SUB_W - 1) row_mean[int'(blk) * SUB_H + sy] <= pix_t'(row_tot / RSW'(SUB_W));
        if (sy == SUB_H - 1) col_mean[ci] <= pix_t'(col_tot / CSW'(SUB_H));
        n_written <= n_written + CNTW'(sx == SUB_W - 1) + CNTW'(sy == SUB_H - 1);
      end
      ready <= (n_written == CNTW'(NRES));
    end
  end

  always_ff @(posedge clk) begin
    rd_data <= rd_col ? col_mean[int'(rd_blk) * SUB_W + int'(rd_idx)]
                      : row_mean[int'(rd_blk) * SUB_H + int'(rd_idx)];
  end

endmodule
