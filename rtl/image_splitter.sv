// image_splitter: cuts a stored frame into SPLIT_X x SPLIT_Y non-overlapping
// sub-images and writes each into its own block memory.
//
// After a one-clock start pulse it reads the frame memories once in raster
// order (one pixel per clock, all NCH components in parallel) and routes each
// pixel to block (y / SUB_H) * SPLIT_X + (x / SUB_W), at address
// (y mod SUB_H) * SUB_W + (x mod SUB_W). The block/offset split is kept in
// separate counters, so no division is built. With the defaults a 256 x 256
// frame gives four 128 x 128 blocks: 0 top-left, 1 top-right, 2 bottom-left,
// 3 bottom-right.
//
// Timing: W*H read cycles; the write of a pixel follows its read by one clock
// (frame memory read latency). busy is high from the clock after start until
// the last write; done pulses with the last write. start while busy is ignored.
// The source paper gives the split into four non-overlapping 128 x 128 parts stored in
// separate memories; the scan order and handshake are this design's choices.
module image_splitter
  import split_pkg::*;
#(
  parameter int unsigned W        = IMG_W,
  parameter int unsigned H        = IMG_H,
  parameter int unsigned SPLIT_X_P = SPLIT_X,
  parameter int unsigned SPLIT_Y_P = SPLIT_Y,
  parameter int unsigned NCH_P    = NCH,
  parameter int unsigned WIDTH    = PIX_W,
  parameter int unsigned SUB_W    = W / SPLIT_X_P,
  parameter int unsigned SUB_H    = H / SPLIT_Y_P,
  parameter int unsigned NBLK     = SPLIT_X_P * SPLIT_Y_P,
  parameter int unsigned ADDR_W   = $clog2(W * H),
  parameter int unsigned SADDR_W  = $clog2(SUB_W * SUB_H)
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         start,
  output logic                         busy,
  output logic                         done,
  // frame memory read port (shared address, one data word per component)
  output logic [ADDR_W-1:0]            fb_rd_addr,
  input  logic [NCH_P-1:0][WIDTH-1:0]  fb_rd_data,
  // block memory write port (shared address and data, one enable per block)
  output logic [NBLK-1:0]              blk_wr_en,
  output logic [SADDR_W-1:0]           blk_wr_addr,
  output logic [NCH_P-1:0][WIDTH-1:0]  blk_wr_data
);

  localparam int unsigned BXW = (SPLIT_X_P > 1) ? $clog2(SPLIT_X_P) : 1;
  localparam int unsigned BYW = (SPLIT_Y_P > 1) ? $clog2(SPLIT_Y_P) : 1;
  localparam int unsigned SXW = (SUB_W > 1) ? $clog2(SUB_W) : 1;
  localparam int unsigned SYW = (SUB_H > 1) ? $clog2(SUB_H) : 1;
  localparam int unsigned BIW = (NBLK > 1) ? $clog2(NBLK) : 1;

  logic               scanning;
  logic [SXW-1:0]     sx;
  logic [BXW-1:0]     bx;
  logic [SYW-1:0]     sy;
  logic [BYW-1:0]     by;
  logic               last_pix;
  // read-side pipeline register: where the pixel being read goes
  logic               p_valid, p_last;
  logic [BIW-1:0]     p_blk;
  logic [SADDR_W-1:0] p_saddr;

  assign last_pix = (sx == SXW'(SUB_W - 1)) && (bx == BXW'(SPLIT_X_P - 1)) &&
                    (sy == SYW'(SUB_H - 1)) && (by == BYW'(SPLIT_Y_P - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      scanning   <= 1'b0;
      sx <= '0; bx <= '0; sy <= '0; by <= '0;
      fb_rd_addr <= '0;
      p_valid <= 1'b0; p_last <= 1'b0; p_blk <= '0; p_saddr <= '0;
    end else begin
      p_valid <= 1'b0;
      p_last  <= 1'b0;
      if (start && !busy) begin
        scanning   <= 1'b1;
        sx <= '0; bx <= '0; sy <= '0; by <= '0;
        fb_rd_addr <= '0;
      end else if (scanning) begin
        // the address on fb_rd_addr is being read now
        p_valid <= 1'b1;
        p_last  <= last_pix;
        p_blk   <= BIW'(by * SPLIT_X_P + bx);
        p_saddr <= SADDR_W'(sy * SUB_W + sx);
        fb_rd_addr <= fb_rd_addr + 1'b1;
        if (last_pix) scanning <= 1'b0;
        if (sx == SXW'(SUB_W - 1)) begin
          sx <= '0;
          if (bx == BXW'(SPLIT_X_P - 1)) begin
            bx <= '0;
            if (sy == SYW'(SUB_H - 1)) begin
              sy <= '0;
              by <= by + 1'b1;
            end else begin
              sy <= sy + 1'b1;
            end
          end else begin
            bx <= bx + 1'b1;
          end
        end else begin
          sx <= sx + 1'b1;
        end
      end
    end
  end

  always_comb begin
    blk_wr_en = '0;
    if (p_valid) blk_wr_en[p_blk] = 1'b1;
  end
  assign blk_wr_addr = p_saddr;
  assign blk_wr_data = fb_rd_data;
  assign busy        = scanning | p_valid;
  assign done        = p_valid & p_last;

endmodule
