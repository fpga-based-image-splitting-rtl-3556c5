// tb_block_mean_features: feeds the write stream a 2 x 2 splitter produces for a
// 10 x 6 frame (blocks of 5 x 3, frame raster order, one pixel per clock) and
// checks all row and column means of all blocks against sums computed here,
// the ready timing, and that clear restarts the collection for a second frame.
module tb_block_mean_features;
  import split_pkg::*;
  localparam int SW = 5, SH = 3, NB = 4, FW = 2 * SW, FH = 2 * SH;
  logic clk = 0, rst = 1, clear = 0, ready, rd_col = 0;
  logic [NB-1:0] wr_en = '0;
  logic [3:0] wr_addr = '0;
  pix_t wr_data = '0, rd_data;
  logic [1:0] rd_blk = '0;
  logic [2:0] rd_idx = '0;
  int img [FW * FH];
  int checks = 0, failures = 0;

  block_mean_features #(.SUB_W(SW), .SUB_H(SH), .NBLK(NB)) dut (.*);
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

  task automatic run_frame(input int f);
    int n;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    check(!ready, "ready cleared");
    for (int i = 0; i < FW * FH; i++) img[i] = (f == 0 && i < 8) ? 255 : $urandom_range(255);
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        wr_en = '0;
        wr_en[(y / SH) * 2 + x / SW] = 1'b1;
        wr_addr = 4'((y % SH) * SW + x % SW);
        wr_data = pix_t'(img[y * FW + x]);
        if (y == FH - 1 && x == FW - 1) begin
          @(negedge clk) wr_en = '0;
          n = 0;
        end else begin
          @(negedge clk);
          check(!ready, "ready only after the last pixel");
        end
      end
    wr_en = '0;
    check(!ready, "ready one clock after the results");
    @(negedge clk);
    check(ready, "ready two clocks after the last write");
    for (int b = 0; b < NB; b++) begin
      for (int r = 0; r < SH; r++) begin
        int s = 0;
        for (int c = 0; c < SW; c++) s += img[((b / 2) * SH + r) * FW + (b % 2) * SW + c];
        rd_blk = 2'(b); rd_col = 0; rd_idx = 3'(r);
        @(negedge clk);
        check(int'(rd_data) == s / SW, $sformatf("row mean b%0d r%0d: %0d vs %0d", b, r, rd_data, s / SW));
      end
      for (int c = 0; c < SW; c++) begin
        int s = 0;
        for (int r = 0; r < SH; r++) s += img[((b / 2) * SH + r) * FW + (b % 2) * SW + c];
        rd_blk = 2'(b); rd_col = 1; rd_idx = 3'(c);
        @(negedge clk);
        check(int'(rd_data) == s / SH, $sformatf("col mean b%0d c%0d: %0d vs %0d", b, c, rd_data, s / SH));
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    run_frame(0);
    run_frame(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
