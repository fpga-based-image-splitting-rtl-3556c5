// tb_frame_store: captures frames into a small frame memory and reads them back.
// Checks: a frame starting while capture_en is low is ignored, the frame_done
// pulse comes with the last pixel (W*H valid pixels after sof), the stored
// image equals the sent one, and a capture restarts on an early sof.
module tb_frame_store;
  localparam int W = 8, H = 4, N = W * H;
  logic clk = 0, rst = 1;
  logic capture_en = 0, in_valid = 0, in_sof = 0, capturing, frame_done;
  logic [7:0] in_data = 0, rd_data;
  logic [4:0] rd_addr = 0;
  logic [7:0] img [N];
  int checks = 0, failures = 0, done_cnt = 0;

  frame_store #(.W(W), .H(H), .WIDTH(8)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && frame_done) done_cnt++;

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

  task automatic send(input int npix, input bit gaps);
    for (int i = 0; i < npix; i++) begin
      @(negedge clk);
      while (gaps && $urandom_range(1) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_sof = (i == 0); in_data = 8'($urandom);
      if (i < N) img[i] = in_data;
    end
    @(negedge clk) in_valid = 0; in_sof = 0;
  endtask

  task automatic readback(input string what);
    for (int a = 0; a < N; a++) begin
      @(negedge clk) rd_addr = 5'(a);
      @(negedge clk) check(rd_data == img[a], what);
    end
  endtask

  initial begin
    logic [7:0] keep [N];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // 1: capture with gaps
    capture_en = 1;
    send(N, 1);
    @(negedge clk);
    check(done_cnt == 1, "one frame_done after a full frame");
    check(!capturing, "capture ended");
    readback("frame 1 contents");
    // 2: frame while capture_en low is ignored
    keep = img;
    capture_en = 0;
    send(N, 0);
    repeat (2) @(negedge clk);
    check(done_cnt == 1, "no frame_done while disabled");
    img = keep;
    readback("frame 1 kept");
    // 3: short frame then a full one: capture restarts at the second sof
    capture_en = 1;
    send(N / 2, 0);
    check(done_cnt == 1 && capturing, "partial frame in progress");
    send(N, 0);
    @(negedge clk);
    check(done_cnt == 2, "frame_done after restarted frame");
    readback("restarted frame contents");
    // 4: frame_done timing: pulse on the clock after the last pixel
    fork
      send(N, 0);
      begin
        int n = 0;
        while (!(in_valid && in_sof)) @(posedge clk);
        while (!frame_done) begin @(posedge clk); n++; end
        check(n == N, $sformatf("frame_done %0d clocks after sof", n));
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
