// gray_rom_splitter: the compact gray-image splitting circuit. A free-running
// address counter reads four ROMs in step; each ROM holds one of the four
// non-overlapping blocks of a gray image, so the four outputs are the four
// split blocks streamed in raster order, one pixel per clock each.
//
// ROM b holds block b (0 top-left, 1 top-right, 2 bottom-left, 3 bottom-right)
// of an IMG_W x IMG_H gray image: ROM b, address a = sy*SUB_W + sx holds image
// pixel (bx*SUB_W + sx, by*SUB_H + sy) with b = by*SPLIT_X + bx. The image is
// the fixed test picture gray_pixel() below, computed when the ROMs are built.
//
// Interface and timing: while en is high the counter advances by one per clock
// and wraps after SUB_W*SUB_H addresses. addr shows the counter; pix[b] shows
// the ROM word for the counter value of the previous clock (registered ROM),
// and pix_valid / pix_addr tell which address that word belongs to.
// The counter-plus-ROM structure, the four ROMs and the block size follow the
// source paper; the ROM contents (a computed test picture) and the handshake are
// this design's choices.
module gray_rom_splitter
  import split_pkg::*;
#(
  parameter int unsigned W       = IMG_W,
  parameter int unsigned H       = IMG_H,
  parameter int unsigned SUB_W   = W / SPLIT_X,
  parameter int unsigned SUB_H   = H / SPLIT_Y,
  parameter int unsigned NBLK    = SPLIT_X * SPLIT_Y,
  parameter int unsigned SADDR_W = $clog2(SUB_W * SUB_H)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  output logic [SADDR_W-1:0]       addr,
  output logic                     pix_valid,
  output logic [SADDR_W-1:0]       pix_addr,
  output logic [NBLK-1:0][PIX_W-1:0] pix
);

  localparam int unsigned DEPTH = SUB_W * SUB_H;

  // Test picture: smooth diagonal ramp with a bright square and a dark bar, so
  // that every block differs and holds both flat areas and sharp edges.
  function automatic pix_t gray_pixel(input int unsigned x, input int unsigned y);
    pix_t v;
    v = pix_t'((x + 2 * y) / 3);
    if (x >= W / 8 && x < W / 3 && y >= H / 8 && y < H / 3) v = 8'd254;
    if (y >= (5 * H) / 8 && y < (11 * H) / 16) v = 8'd10;
    return v;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      addr      <= '0;
      pix_valid <= 1'b0;
      pix_addr  <= '0;
    end else begin
      pix_valid <= en;
      if (en) begin
        pix_addr <= addr;
        addr     <= (addr == SADDR_W'(DEPTH - 1)) ? '0 : addr + 1'b1;
      end
    end
  end

  for (genvar b = 0; b < NBLK; b++) begin : g_rom
    pix_t rom [DEPTH];
    initial begin
      for (int unsigned a = 0; a < DEPTH; a++)
        rom[a] = gray_pixel((b % SPLIT_X) * SUB_W + a % SUB_W,
                            (b / SPLIT_X) * SUB_H + a / SUB_W);
    end
    always_ff @(posedge clk) begin
      if (en) pix[b] <= rom[addr];
    end
  end

endmodule
