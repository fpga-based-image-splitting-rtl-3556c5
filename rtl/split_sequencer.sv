// split_sequencer: orders the three frame-level steps of the pipeline.
//
//   capture   a converted frame is written into the frame memories
//   split     the frame memories are copied into the block memories
//   upscale   the block memories are interpolated to the output streams
//
// The frame memories hold one frame until it has been split; the block memories
// hold one set of blocks until they have been interpolated. So the capture of
// the next frame overlaps the interpolation of the current one, and a split
// waits until the previous interpolation has finished. A frame whose first
// pixel arrives while the frame memories still hold an unsplit frame is
// dropped whole (the camera cannot be stalled); dropped_frames counts them.
//
// Timing: split_start is a one-clock pulse on the clock after the frame
// memories are full and the block memories are free; upscale_start is a
// one-clock pulse on the clock after split_done. The source paper shows the order of
// these steps; the overlap and the drop rule are this design's choices.
module split_sequencer #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_sof,          // first pixel of a frame arriving
  output logic             capture_en,      // frame memories may take a new frame
  input  logic             frame_done,      // frame memories full
  output logic             split_start,
  input  logic             split_done,
  output logic             upscale_start,
  input  logic             upscale_done,
  output logic             fb_full,
  output logic             blocks_busy,
  output logic [CNT_W-1:0] dropped_frames,
  output logic [CNT_W-1:0] frames_out
);

  typedef enum logic [1:0] {BLK_IDLE, BLK_SPLIT, BLK_UPSCALE} blk_state_e;
  blk_state_e blk_state;

  assign capture_en  = !fb_full;
  assign blocks_busy = (blk_state != BLK_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      blk_state      <= BLK_IDLE;
      fb_full        <= 1'b0;
      split_start    <= 1'b0;
      upscale_start  <= 1'b0;
      dropped_frames <= '0;
      frames_out     <= '0;
    end else begin
      split_start   <= 1'b0;
      upscale_start <= 1'b0;
      if (in_sof && !capture_en) dropped_frames <= dropped_frames + 1'b1;
      if (frame_done) fb_full <= 1'b1;
      unique case (blk_state)
        BLK_IDLE: if (fb_full && !split_start) begin
          split_start <= 1'b1;
          blk_state   <= BLK_SPLIT;
        end
        BLK_SPLIT: if (split_done) begin
          fb_full       <= 1'b0;
          upscale_start <= 1'b1;
          blk_state     <= BLK_UPSCALE;
        end
        BLK_UPSCALE: if (upscale_done) begin
          frames_out <= frames_out + 1'b1;
          blk_state  <= BLK_IDLE;
        end
        default: blk_state <= BLK_IDLE;
      endcase
    end
  end

  // a frame cannot complete while the memories still hold an unsplit frame
  a_no_overwrite: assert property (@(posedge clk) disable iff (rst) frame_done |-> !fb_full);

endmodule
