// tb_image_split_top: end-to-end test of the whole design at its default sizes
// (640 x 480 camera, 256 x 256 frame, four 128 x 128 blocks).
//
// A camera model sends four frames back to back (with a short blanking gap).
// Frames 1 and 3 must be captured; frame 2 arrives while frame 1 is being split
// and frame 4 while frame 3 waits for the interpolation of frame 1, so both
// must be dropped. For every captured frame the testbench computes the four
// expected output images from the defining formulas (nearest-neighbour resize,
// BT.601 conversion, 2 x 2 split, real-arithmetic bicubic enlargement,
// conversion back to RGB) and compares every pixel of the four output streams.
// It also checks the output spacing of 16 clocks, the lock-step of the four
// streams, out_sof, the status counters, the row and column means of each
// split, and streams the gray ROM circuit.
// Mechanisms counted (each must occur): dropped frame, capture overlapping
// interpolation, border replication in the interpolation, interpolation
// overshoot clamped, RGB clamping after conversion.
module tb_image_split_top;
  import split_pkg::*;
  import tb_ref_pkg::*;

  localparam int CW = 640, CH = 480, W = 256, H = 256, SW = 128, SH = 128;
  localparam int NFRAMES = 4, GAP = 1000;

  logic clk = 0, rst = 1;
  logic cam_valid = 0, cam_sof = 0;
  rgb_t cam_pix = '0;
  logic [3:0] out_valid, out_sof;
  rgb_t [3:0] out_pix;
  logic frame_held, blocks_busy, resize_overflow;
  logic [15:0] dropped_frames, frames_out;
  logic gray_en = 0, gray_valid;
  logic [13:0] gray_addr, gray_pix_addr;
  logic [3:0][7:0] gray_pix;
  logic feat_ready, feat_rd_col = 0;
  logic [1:0] feat_rd_blk = '0;
  logic [6:0] feat_rd_idx = '0;
  logic [7:0] feat_rd_data;

  image_split_top dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  int checks = 0, failures = 0;
  int n_resize_ovf = 0, n_drop_seen = 0, n_overlap = 0, n_border = 0, n_interp_sat = 0, n_rgb_sat = 0;

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  function automatic rgb_t cam_pixel(input int x, input int y, input int f);
    rgb_t p;
    if (x < CW / 2) begin
      // hard-edged checkerboard of saturated colours
      logic on;
      on = (((x / 8) + (y / 8) + f) % 2) == 1;
      p.r = on ? 8'd255 : 8'd0;
      p.g = ((x / 16 + f) % 2 == 1) ? 8'd255 : 8'd0;
      p.b = on ? 8'd0 : 8'd255;
    end else begin
      p = rgb_t'($urandom);
    end
    return p;
  endfunction

  rgb_t frames [NFRAMES][];
  // expected YCbCr blocks of the frames that are to be captured (1 and 3)
  int exp_blk [$][4][3][];

  task automatic build_expected(input int f);
    int blk [4][3][];
    for (int b = 0; b < 4; b++)
      for (int c = 0; c < 3; c++) blk[b][c] = new[SW * SH];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        rgb_t s;
        ycc_t v;
        int b, a;
        s = frames[f][(y * CH / H) * CW + (x * CW / W)];
        v = ref_rgb2ycc(s);
        b = (y / SH) * 2 + x / SW;
        a = (y % SH) * SW + x % SW;
        blk[b][0][a] = int'(v.y);
        blk[b][1][a] = int'(v.cb);
        blk[b][2][a] = int'(v.cr);
      end
    exp_blk.push_back(blk);
  endtask

  initial begin
    for (int f = 0; f < NFRAMES; f++) begin
      frames[f] = new[CW * CH];
      for (int y = 0; y < CH; y++)
        for (int x = 0; x < CW; x++) frames[f][y * CW + x] = cam_pixel(x, y, f);
    end
    build_expected(0);
    build_expected(2);
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 0;
    gray_en = 1;
    for (int f = 0; f < NFRAMES; f++) begin
      for (int i = 0; i < CW * CH; i++) begin
        @(negedge clk);
        cam_valid = 1; cam_sof = (i == 0); cam_pix = frames[f][i];
      end
      @(negedge clk) cam_valid = 0; cam_sof = 0;
      repeat (GAP) @(negedge clk);
    end
  end

  // ---------------- mechanism monitors ----------------
  always @(posedge clk) if (!rst) begin
    if (dut.u_seq.in_sof && !dut.u_seq.capture_en) n_drop_seen++;
    if (dut.g_fs[0].u_fs.capturing && blocks_busy) n_overlap++;
    if (resize_overflow) n_resize_ovf++;
  end

  // ---------------- row / column means ----------------
  // After each split, read all row and column means of the luma of the four
  // blocks and compare with means of the expected blocks.
  int feat_sets = 0;
  initial begin
    for (int fr = 0; fr < 2; fr++) begin
      wait (feat_ready == 0);
      wait (feat_ready == 1);
      @(negedge clk);
      for (int b = 0; b < 4; b++)
        for (int col = 0; col < 2; col++)
          for (int i = 0; i < SW; i++) begin
            int s;
            s = 0;
            for (int j = 0; j < SW; j++)
              s += col ? exp_blk[fr][b][0][j * SW + i] : exp_blk[fr][b][0][i * SW + j];
            feat_rd_blk = 2'(b); feat_rd_col = col[0]; feat_rd_idx = 7'(i);
            @(negedge clk);
            checks++;
            if (int'(feat_rd_data) != s / SW) begin
              failures++;
              if (failures < 20) $display("FAIL mean frame %0d block %0d %s %0d: %0d vs %0d",
                                          fr, b, col ? "col" : "row", i, feat_rd_data, s / SW);
            end
          end
      feat_sets++;
    end
  end

  // ---------------- gray circuit ----------------
  function automatic int picture(input int x, input int y);
    int v;
    v = (x + 2 * y) / 3;
    if (x >= 32 && x < 85 && y >= 32 && y < 85) v = 254;
    if (y >= 160 && y < 176) v = 10;
    return v % 256;
  endfunction

  int gray_seen = 0;
  always @(posedge clk) if (!rst && gray_valid && gray_seen < SW * SH) begin
    int a;
    a = int'(gray_pix_addr);
    for (int b = 0; b < 4; b++) begin
      checks++;
      if (int'(gray_pix[b]) != picture((b % 2) * SW + a % SW, (b / 2) * SH + a / SW)) begin
        failures++;
        if (failures < 20) $display("FAIL gray rom %0d addr %0d", b, a);
      end
    end
    gray_seen++;
  end

  // ---------------- output checker ----------------
  int out_cnt = 0, out_frame = 0, last_out = -1;
  int frame_end [2];
  logic frame_checked [2] = '{0, 0};

  always @(posedge clk) if (!rst && (out_valid != 0)) begin
    int ox, oy, u;
    checks++;
    if (out_valid != 4'hF) begin
      failures++;
      $display("FAIL streams out of step: %b", out_valid);
    end
    if (out_frame >= 2) begin
      failures++;
      $display("FAIL unexpected output frame");
    end else begin
      ox = out_cnt % W; oy = out_cnt / W;
      if (ox < 2 || oy < 2 || ox > W - 3 || oy > H - 3) n_border++;
      for (int b = 0; b < 4; b++) begin
        ycc_t e;
        rgb_t er;
        int yv, cbv, crv;
        yv  = ref_bicubic(exp_blk[out_frame][b][0], SW, SH, ox, oy, u);
        if (u < 0 || u > 255) n_interp_sat++;
        cbv = ref_bicubic(exp_blk[out_frame][b][1], SW, SH, ox, oy, u);
        if (u < 0 || u > 255) n_interp_sat++;
        crv = ref_bicubic(exp_blk[out_frame][b][2], SW, SH, ox, oy, u);
        if (u < 0 || u > 255) n_interp_sat++;
        e = '{y: pix_t'(yv), cb: pix_t'(cbv), cr: pix_t'(crv)};
        er = ref_ycc2rgb(e);
        begin
          int c, d, ee;
          c = int'(e.y) - 16; d = int'(e.cb) - 128; ee = int'(e.cr) - 128;
          if ((298 * c + 409 * ee + 128) / 256 > 255 || (298 * c + 409 * ee + 128) < 0 ||
              (298 * c - 100 * d - 208 * ee + 128) / 256 > 255 ||
              (298 * c - 100 * d - 208 * ee + 128) < 0 ||
              (298 * c + 516 * d + 128) / 256 > 255 || (298 * c + 516 * d + 128) < 0)
            n_rgb_sat++;
        end
        checks++;
        if (out_pix[b] !== er || out_sof[b] !== (out_cnt == 0)) begin
          failures++;
          if (failures < 20)
            $display("FAIL frame %0d block %0d pixel (%0d,%0d): got %h expected %h",
                     out_frame, b, ox, oy, out_pix[b], er);
        end
      end
      if (last_out >= 0 && out_cnt != 0) begin
        checks++;
        if (cyc - last_out != 16) begin
          failures++;
          $display("FAIL output spacing %0d", cyc - last_out);
        end
      end
      last_out = cyc;
      out_cnt++;
      if (out_cnt == W * H) begin
        frame_checked[out_frame] = 1;
        frame_end[out_frame] = cyc;
        $display("output frame %0d checked at cycle %0d", out_frame, cyc);
        out_cnt = 0; out_frame++; last_out = -1;
      end
    end
  end

  // ---------------- end of test ----------------
  initial begin
    wait (frame_checked[1]);
    repeat (50) @(posedge clk);
    checks++;
    if (dropped_frames != 2 || frames_out != 2) begin
      failures++;
      $display("FAIL counters: dropped %0d out %0d", dropped_frames, frames_out);
    end
    // steady-state frame period: split (65536 + 1) plus interpolation
    // (16 * 65536 + 3) plus a few clocks of hand-over; 30 frames/s then needs
    // a clock of about 33.5 MHz
    checks++;
    $display("frame period %0d clocks", frame_end[1] - frame_end[0]);
    if (frame_end[1] - frame_end[0] > 65537 + 16 * 65536 + 3 + 8) begin
      failures++; $display("FAIL frame period too long");
    end
    checks++;
    if (feat_sets != 2) begin failures++; $display("FAIL mean sets read: %0d", feat_sets); end
    checks++;
    if (n_resize_ovf != 0) begin failures++; $display("FAIL resize overflow"); end
    checks++;
    if (gray_seen != SW * SH) begin failures++; $display("FAIL gray pixels %0d", gray_seen); end
    $display("mechanisms: dropped=%0d overlap_cycles=%0d border_px=%0d interp_clamps=%0d rgb_clamps=%0d",
             n_drop_seen, n_overlap, n_border, n_interp_sat, n_rgb_sat);
    checks++; if (n_drop_seen == 0)   begin failures++; $display("FAIL no dropped frame"); end
    checks++; if (n_overlap == 0)     begin failures++; $display("FAIL no capture/interpolation overlap"); end
    checks++; if (n_border == 0)      begin failures++; $display("FAIL no border pixels"); end
    checks++; if (n_interp_sat == 0)  begin failures++; $display("FAIL no interpolation clamp"); end
    checks++; if (n_rgb_sat == 0)     begin failures++; $display("FAIL no RGB clamp"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
