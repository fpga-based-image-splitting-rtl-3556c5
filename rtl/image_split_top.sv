// image_split_top: splits each camera frame into four blocks and shows every
// block enlarged to full frame size, as four output video streams; next to it,
// the compact ROM-based gray splitting circuit.
//
// Colour path (one frame at a time):
//   camera RGB stream -> video_resize (to IMG_W x IMG_H) -> rgb2ycbcr
//   -> three frame_store (Y, Cb, Cr: serial stream into frame memories)
//   -> image_splitter (frame memories -> NBLK x NCH block memories, dp_ram)
//      (block_mean_features takes the row / column means on the way)
//   -> NBLK bicubic_upscale2x (block -> IMG_W x IMG_H, all components together)
//   -> NBLK ycbcr2rgb -> four RGB output streams, one per block.
// split_sequencer lets the capture of the next frame overlap the interpolation
// of the current one and drops frames that arrive while the frame memories are
// still full.
//
// Interfaces: the camera stream (cam_valid, cam_sof on the first pixel,
// cam_pix) has no back-pressure and delivers CAM_W x CAM_H pixels per frame.
// Each output stream b carries block b (0 top-left, 1 top-right, 2 bottom-left,
// 3 bottom-right) as IMG_W x IMG_H pixels in raster order with out_sof[b] on
// the first; the four streams run in step, one pixel every 16 clocks.
// Timing per frame: CAM_W*CAM_H clocks of capture (at one pixel per clock),
// IMG_W*IMG_H + 1 clocks of splitting, 16*IMG_W*IMG_H clocks of output.
//
// resize_overflow pulses if the camera delivers rows faster than the resize
// step can produce its output rows (only possible when enlarging).
//
// block_mean_features collects the row and column means of the luma of each
// block while the splitter writes it; feat_ready rises when they are complete
// and they are read through feat_rd_*, one clock of latency.
//
// Gray path: gray_rom_splitter, driven by gray_en, streams the four blocks of
// a stored gray image on gray_pix.
//
// The chain of steps, the 256 x 256 frame, the four 128 x 128 blocks in separate
// memories and bicubic enlargement follow the source paper; the stream interfaces,
// the sequencing and all arithmetic details are this design's choices.
module image_split_top
  import split_pkg::*;
#(
  parameter int unsigned CAM_W   = 640,
  parameter int unsigned CAM_H   = 480,
  parameter int unsigned W       = IMG_W,
  parameter int unsigned H       = IMG_H,
  parameter int unsigned NBLK    = SPLIT_X * SPLIT_Y,
  parameter int unsigned SUB_W   = W / SPLIT_X,
  parameter int unsigned SUB_H   = H / SPLIT_Y,
  parameter int unsigned ADDR_W  = $clog2(W * H),
  parameter int unsigned SADDR_W = $clog2(SUB_W * SUB_H),
  parameter int unsigned CNT_W   = 16
) (
  input  logic                       clk,
  input  logic                       rst,
  // camera stream
  input  logic                       cam_valid,
  input  logic                       cam_sof,
  input  rgb_t                       cam_pix,
  // display streams, one per block
  output logic [NBLK-1:0]            out_valid,
  output logic [NBLK-1:0]            out_sof,
  output rgb_t [NBLK-1:0]            out_pix,
  // status
  output logic                       resize_overflow,
  output logic                       frame_held,
  output logic                       blocks_busy,
  output logic [CNT_W-1:0]           dropped_frames,
  output logic [CNT_W-1:0]           frames_out,
  // row / column means of the luma of each block
  output logic                       feat_ready,
  input  logic [$clog2(NBLK)-1:0]    feat_rd_blk,
  input  logic                       feat_rd_col,
  input  logic [$clog2(SUB_W)-1:0]   feat_rd_idx,
  output logic [PIX_W-1:0]           feat_rd_data,
  // gray ROM splitting circuit
  input  logic                       gray_en,
  output logic [SADDR_W-1:0]         gray_addr,
  output logic                       gray_valid,
  output logic [SADDR_W-1:0]         gray_pix_addr,
  output logic [NBLK-1:0][PIX_W-1:0] gray_pix
);

  // ---------------- resize and colour conversion ----------------
  logic rs_valid, rs_sof;
  rgb_t rs_pix;
  logic yc_valid, yc_sof;
  ycc_t yc_pix;

  video_resize #(.SRC_W(CAM_W), .SRC_H(CAM_H), .DST_W(W), .DST_H(H)) u_resize (
    .clk, .rst,
    .in_valid(cam_valid), .in_sof(cam_sof), .in_pix(cam_pix),
    .out_valid(rs_valid), .out_sof(rs_sof), .out_pix(rs_pix),
    .overflow(resize_overflow)
  );

  rgb2ycbcr u_rgb2ycc (
    .clk, .rst,
    .in_valid(rs_valid), .in_sof(rs_sof), .in_pix(rs_pix),
    .out_valid(yc_valid), .out_sof(yc_sof), .out_pix(yc_pix)
  );

  // ---------------- frame memories (component 0 = Y, 1 = Cb, 2 = Cr) ----------
  logic                      capture_en;
  logic [NCH-1:0]            fs_capturing, fs_done;
  logic [ADDR_W-1:0]         fb_rd_addr;
  logic [NCH-1:0][PIX_W-1:0] fb_rd_data, fs_in;

  assign fs_in = {yc_pix.cr, yc_pix.cb, yc_pix.y};

  for (genvar c = 0; c < NCH; c++) begin : g_fs
    frame_store #(.W(W), .H(H), .WIDTH(PIX_W), .ADDR_W(ADDR_W)) u_fs (
      .clk, .rst,
      .capture_en (capture_en),
      .in_valid   (yc_valid),
      .in_sof     (yc_sof),
      .in_data    (fs_in[c]),
      .capturing  (fs_capturing[c]),
      .frame_done (fs_done[c]),
      .rd_addr    (fb_rd_addr),
      .rd_data    (fb_rd_data[c])
    );
  end

  // ---------------- splitting into block memories ----------------
  logic                      split_start, split_busy, split_done;
  logic [NBLK-1:0]           blk_wr_en;
  logic [SADDR_W-1:0]        blk_wr_addr;
  logic [NCH-1:0][PIX_W-1:0] blk_wr_data;

  image_splitter #(
    .W(W), .H(H), .SPLIT_X_P(SPLIT_X), .SPLIT_Y_P(SPLIT_Y), .NCH_P(NCH), .WIDTH(PIX_W),
    .SUB_W(SUB_W), .SUB_H(SUB_H), .NBLK(NBLK), .ADDR_W(ADDR_W), .SADDR_W(SADDR_W)
  ) u_split (
    .clk, .rst,
    .start(split_start), .busy(split_busy), .done(split_done),
    .fb_rd_addr, .fb_rd_data,
    .blk_wr_en, .blk_wr_addr, .blk_wr_data
  );

  // ---------------- row and column means of the split blocks ----------------
  block_mean_features #(.SUB_W(SUB_W), .SUB_H(SUB_H), .NBLK(NBLK), .SADDR_W(SADDR_W),
                        .BIW($clog2(NBLK)), .IDXW($clog2(SUB_W))) u_means (
    .clk, .rst,
    .clear  (split_start),
    .wr_en  (blk_wr_en),
    .wr_addr(blk_wr_addr),
    .wr_data(blk_wr_data[0]),
    .ready  (feat_ready),
    .rd_blk (feat_rd_blk),
    .rd_col (feat_rd_col),
    .rd_idx (feat_rd_idx),
    .rd_data(feat_rd_data)
  );

  // ---------------- block memories and interpolation ----------------
  logic                      up_start;
  logic [NBLK-1:0]           up_busy, up_done, up_valid, up_sof;
  logic [NBLK-1:0][SADDR_W-1:0]           up_rd_addr;
  logic [NBLK-1:0][NCH-1:0][PIX_W-1:0]    up_rd_data, up_pix;

  for (genvar b = 0; b < NBLK; b++) begin : g_blk
    for (genvar c = 0; c < NCH; c++) begin : g_mem
      dp_ram #(.DEPTH(SUB_W * SUB_H), .WIDTH(PIX_W), .ADDR_W(SADDR_W)) u_mem (
        .clk,
        .wr_en  (blk_wr_en[b]),
        .wr_addr(blk_wr_addr),
        .wr_data(blk_wr_data[c]),
        .rd_addr(up_rd_addr[b]),
        .rd_data(up_rd_data[b][c])
      );
    end

    bicubic_upscale2x #(
      .SUB_W(SUB_W), .SUB_H(SUB_H), .NCH_P(NCH), .WIDTH(PIX_W), .SADDR_W(SADDR_W)
    ) u_up (
      .clk, .rst,
      .start    (up_start),
      .busy     (up_busy[b]),
      .done     (up_done[b]),
      .rd_addr  (up_rd_addr[b]),
      .rd_data  (up_rd_data[b]),
      .out_valid(up_valid[b]),
      .out_sof  (up_sof[b]),
      .out_pix  (up_pix[b])
    );

    ycbcr2rgb u_ycc2rgb (
      .clk, .rst,
      .in_valid (up_valid[b]),
      .in_sof   (up_sof[b]),
      .in_pix   ('{y: up_pix[b][0], cb: up_pix[b][1], cr: up_pix[b][2]}),
      .out_valid(out_valid[b]),
      .out_sof  (out_sof[b]),
      .out_pix  (out_pix[b])
    );
  end

  // ---------------- frame sequencing ----------------
  split_sequencer #(.CNT_W(CNT_W)) u_seq (
    .clk, .rst,
    .in_sof        (yc_valid & yc_sof),
    .capture_en    (capture_en),
    .frame_done    (fs_done[0]),
    .split_start   (split_start),
    .split_done    (split_done),
    .upscale_start (up_start),
    .upscale_done  (up_done[0]),
    .fb_full       (frame_held),
    .blocks_busy   (blocks_busy),
    .dropped_frames(dropped_frames),
    .frames_out    (frames_out)
  );

  // ---------------- gray ROM splitting circuit ----------------
  gray_rom_splitter #(.W(W), .H(H), .SUB_W(SUB_W), .SUB_H(SUB_H), .NBLK(NBLK),
                      .SADDR_W(SADDR_W)) u_gray (
    .clk, .rst,
    .en       (gray_en),
    .addr     (gray_addr),
    .pix_valid(gray_valid),
    .pix_addr (gray_pix_addr),
    .pix      (gray_pix)
  );

  // the interpolators enlarge by exactly two, so the frame must be split 2 x 2
  initial begin
    assert (SPLIT_X == 2 && SPLIT_Y == 2 && SUB_W * 2 == W && SUB_H * 2 == H)
      else $error("image_split_top: the 2x interpolation needs a 2 x 2 split");
  end

  // the components and blocks run in lock-step
  a_fs_lockstep: assert property (@(posedge clk) disable iff (rst)
    (fs_done == '0 || fs_done == '1) && (fs_capturing == '0 || fs_capturing == '1));
  // the block memories are never written while they are being interpolated
  a_blk_exclusive: assert property (@(posedge clk) disable iff (rst)
    split_busy |-> up_busy == '0);
  a_up_lockstep: assert property (@(posedge clk) disable iff (rst)
    up_done == '0 || up_done == '1);

endmodule
