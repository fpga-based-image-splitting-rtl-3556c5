// tb_split_sequencer: plays the frame events of the pipeline with scripted
// timing and checks the sequencer's decisions: split starts one clock after the
// frame memories are full, interpolation starts one clock after the split ends,
// a split waits for a running interpolation, capture is refused (and the frame
// counted as dropped) while an unsplit frame is held, and frames_out counts.
module tb_split_sequencer;
  logic clk = 0, rst = 1;
  logic in_sof = 0, capture_en, frame_done = 0, split_start, split_done = 0;
  logic upscale_start, upscale_done = 0, fb_full, blocks_busy;
  logic [15:0] dropped_frames, frames_out;
  int checks = 0, failures = 0;

  split_sequencer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check(capture_en && !fb_full && !blocks_busy, "idle after reset");
    // frame 1 arrives and completes
    pulse(in_sof);
    check(dropped_frames == 0, "frame 1 accepted");
    @(negedge clk) frame_done = 1;
    @(negedge clk) frame_done = 0;
    check(fb_full && !capture_en && !split_start, "frame memories full");
    @(negedge clk);
    check(split_start, "split starts on the clock after fb_full");
    @(negedge clk);
    check(!split_start, "split_start is one clock");
    // a frame arriving during the split is dropped
    pulse(in_sof);
    check(dropped_frames == 1, "frame 2 dropped");
    // split ends -> interpolation
    @(negedge clk) split_done = 1;
    @(negedge clk) split_done = 0;
    check(upscale_start && !fb_full && capture_en, "upscale starts, frame memories free");
    // frame 3 captured while interpolation runs
    pulse(in_sof);
    check(dropped_frames == 1, "frame 3 accepted during interpolation");
    @(negedge clk) frame_done = 1;
    @(negedge clk) frame_done = 0;
    repeat (5) begin
      check(!split_start && fb_full && blocks_busy, "split waits for interpolation");
      @(negedge clk);
    end
    pulse(in_sof);
    check(dropped_frames == 2, "frame 4 dropped while frame 3 held");
    check(frames_out == 0, "nothing out yet");
    @(negedge clk) upscale_done = 1;
    @(negedge clk) upscale_done = 0;
    check(frames_out == 1, "one frame out");
    @(negedge clk);
    check(split_start, "held frame split after interpolation");
    @(negedge clk) split_done = 1;
    @(negedge clk) split_done = 0;
    check(upscale_start, "second interpolation");
    @(negedge clk) upscale_done = 1;
    @(negedge clk) upscale_done = 0;
    repeat (2) @(negedge clk);
    check(frames_out == 2 && !blocks_busy && !fb_full && !split_start, "back to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
