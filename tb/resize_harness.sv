// resize_harness: drives one video_resize instance with NFR frames of random
// pixels (GAP idle clocks after each valid pixel, 0 = full rate) and checks each
// output pixel against out(ox, oy) = in(floor(ox*SRC_W/DST_W),
// floor(oy*SRC_H/DST_H)), out_sof, and the pixel count per frame. With
// EXPECT_OVF = 0 any overflow pulse is a failure; with EXPECT_OVF = 1 at least
// one overflow must be seen (pixel checks are then skipped).
module resize_harness
  import split_pkg::*;
#(
  parameter int SRC_W = 8, parameter int SRC_H = 4,
  parameter int DST_W = 4, parameter int DST_H = 4,
  parameter int GAP = 0, parameter int NFR = 2,
  parameter bit EXPECT_OVF = 0
) (
  input  logic clk,
  input  logic rst,
  output logic finished,
  output int   checks,
  output int   failures
);
  logic iv = 0, is = 0, ov, os, ovf;
  rgb_t ip = '0, op;
  rgb_t img [SRC_W * SRC_H];
  int cnt = 0, n_ovf = 0;

  video_resize #(.SRC_W(SRC_W), .SRC_H(SRC_H), .DST_W(DST_W), .DST_H(DST_H)) dut (
    .clk, .rst, .in_valid(iv), .in_sof(is), .in_pix(ip),
    .out_valid(ov), .out_sof(os), .out_pix(op), .overflow(ovf));

  initial begin checks = 0; failures = 0; finished = 0; end

  always @(posedge clk) if (!rst) begin
    if (ovf) n_ovf++;
    if (ov) begin
      int ox, oy;
      ox = cnt % DST_W; oy = cnt / DST_W;
      if (!EXPECT_OVF) begin
        checks++;
        if (op !== img[(oy * SRC_H / DST_H) * SRC_W + ox * SRC_W / DST_W] || os !== (cnt == 0)) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0dx%0d->%0dx%0d pixel %0d,%0d", SRC_W, SRC_H, DST_W, DST_H, ox, oy);
        end
      end
      cnt++;
    end
  end

  initial begin
    @(negedge rst);
    for (int f = 0; f < NFR; f++) begin
      cnt = 0;
      for (int i = 0; i < SRC_W * SRC_H; i++) img[i] = rgb_t'($urandom);
      for (int i = 0; i < SRC_W * SRC_H; i++) begin
        @(negedge clk);
        iv = 1; is = (i == 0); ip = img[i];
        if (GAP > 0) begin
          @(negedge clk) iv = 0; is = 0;
          repeat (GAP - 1) @(negedge clk);
        end
      end
      @(negedge clk) iv = 0; is = 0;
      repeat (3 * DST_W * (DST_H / SRC_H + 1) + 10) @(negedge clk);
      if (!EXPECT_OVF) begin
        checks++;
        if (cnt != DST_W * DST_H) begin
          failures++;
          $display("FAIL %0dx%0d->%0dx%0d frame %0d gave %0d pixels", SRC_W, SRC_H, DST_W, DST_H, f, cnt);
        end
      end
    end
    checks++;
    if (EXPECT_OVF ? (n_ovf == 0) : (n_ovf != 0)) begin
      failures++;
      $display("FAIL %0dx%0d->%0dx%0d overflow count %0d", SRC_W, SRC_H, DST_W, DST_H, n_ovf);
    end
    finished = 1;
  end
endmodule
