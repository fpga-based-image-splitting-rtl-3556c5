// tb_image_splitter: a behavioural frame memory (one clock read latency) feeds
// the splitter; the block writes are captured into per-block arrays. Run twice
// (2 x 2 split of 8 x 6, 3 x 2 split of 9 x 4). Checks every block pixel against
// frame pixel (bx*SUB_W + sx, by*SUB_H + sy), that each block address is written
// exactly once, the busy/done handshake and the W*H+1 clock duration.
module tb_image_splitter;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------- configuration A: 8 x 6, 2 x 2 ----------
  localparam int AW = 8, AH = 6, AX = 2, AY = 2, ASW = AW / AX, ASH = AH / AY, AB = AX * AY;
  logic a_start = 0, a_busy, a_done;
  logic [5:0] a_rd_addr;
  logic [1:0][7:0] a_rd_data, a_wr_data;
  logic [AB-1:0] a_wr_en;
  logic [3:0] a_wr_addr;
  logic [1:0][7:0] a_frame [AW * AH];
  logic [1:0][7:0] a_blk [AB][ASW * ASH];
  int a_wcnt [AB][ASW * ASH];

  image_splitter #(.W(AW), .H(AH), .SPLIT_X_P(AX), .SPLIT_Y_P(AY), .NCH_P(2), .WIDTH(8)) dut_a (
    .clk, .rst, .start(a_start), .busy(a_busy), .done(a_done),
    .fb_rd_addr(a_rd_addr), .fb_rd_data(a_rd_data),
    .blk_wr_en(a_wr_en), .blk_wr_addr(a_wr_addr), .blk_wr_data(a_wr_data));

  always @(posedge clk) begin
    a_rd_data <= a_frame[a_rd_addr];
    for (int b = 0; b < AB; b++) if (a_wr_en[b]) begin
      a_blk[b][a_wr_addr] = a_wr_data;
      a_wcnt[b][a_wr_addr]++;
    end
  end

  // ---------- configuration B: 9 x 4, 3 x 2 ----------
  localparam int BW = 9, BH = 4, BX = 3, BY = 2, BSW = BW / BX, BSH = BH / BY, BB = BX * BY;
  logic b_start = 0, b_busy, b_done;
  logic [5:0] b_rd_addr;
  logic [0:0][7:0] b_rd_data, b_wr_data;
  logic [BB-1:0] b_wr_en;
  logic [2:0] b_wr_addr;
  logic [0:0][7:0] b_frame [BW * BH];
  logic [0:0][7:0] b_blk [BB][BSW * BSH];
  int b_wcnt [BB][BSW * BSH];

  image_splitter #(.W(BW), .H(BH), .SPLIT_X_P(BX), .SPLIT_Y_P(BY), .NCH_P(1), .WIDTH(8)) dut_b (
    .clk, .rst, .start(b_start), .busy(b_busy), .done(b_done),
    .fb_rd_addr(b_rd_addr), .fb_rd_data(b_rd_data),
    .blk_wr_en(b_wr_en), .blk_wr_addr(b_wr_addr), .blk_wr_data(b_wr_data));

  always @(posedge clk) begin
    b_rd_data <= b_frame[b_rd_addr];
    for (int b = 0; b < BB; b++) if (b_wr_en[b]) begin
      b_blk[b][b_wr_addr] = b_wr_data;
      b_wcnt[b][b_wr_addr]++;
    end
  end

  initial begin
    int n;
    for (int i = 0; i < AW * AH; i++) a_frame[i] = 16'($urandom);
    for (int i = 0; i < BW * BH; i++) b_frame[i] = 8'($urandom);
    a_wcnt = '{default: '{default: 0}};
    b_wcnt = '{default: '{default: 0}};
    a_rd_data = '0; b_rd_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check(!a_busy && !b_busy, "idle after reset");
    // A
    @(negedge clk) a_start = 1;
    @(negedge clk) a_start = 0;
    n = 1;
    while (!a_done) begin @(negedge clk); n++; end
    check(n == AW * AH + 1, $sformatf("A took %0d clocks", n));
    @(negedge clk);
    check(!a_busy, "A idle after done");
    for (int y = 0; y < AH; y++)
      for (int x = 0; x < AW; x++) begin
        int b, a;
        b = (y / ASH) * AX + x / ASW;
        a = (y % ASH) * ASW + x % ASW;
        check(a_blk[b][a] == a_frame[y * AW + x] && a_wcnt[b][a] == 1,
              $sformatf("A pixel %0d,%0d", x, y));
      end
    // B, with a second start pulse during the run (ignored)
    @(negedge clk) b_start = 1;
    @(negedge clk) b_start = 0;
    repeat (5) @(negedge clk);
    b_start = 1;
    @(negedge clk) b_start = 0;
    while (!b_done) @(negedge clk);
    @(negedge clk);
    for (int y = 0; y < BH; y++)
      for (int x = 0; x < BW; x++) begin
        int b, a;
        b = (y / BSH) * BX + x / BSW;
        a = (y % BSH) * BSW + x % BSW;
        check(b_blk[b][a] == b_frame[y * BW + x] && b_wcnt[b][a] == 1,
              $sformatf("B pixel %0d,%0d", x, y));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
