// tb_video_resize: runs the resize step in six configurations through
// resize_harness: the default 640x480 -> 256x256 at full input rate, an odd
// shrink with pass-through width, a 2x/odd enlargement and a mixed
// shrink/enlarge (both with idle clocks between input pixels, as the rate rule
// requires), equal sizes at full rate, and an enlargement at full rate that
// must raise overflow.
module tb_video_resize;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  localparam int N = 6;
  logic [N-1:0] fin;
  int c [N], f [N];

  resize_harness #(.SRC_W(640), .SRC_H(480), .DST_W(256), .DST_H(256), .GAP(0), .NFR(1)) h0 (.clk, .rst, .finished(fin[0]), .checks(c[0]), .failures(f[0]));
  resize_harness #(.SRC_W(11), .SRC_H(9), .DST_W(11), .DST_H(4), .GAP(0), .NFR(3)) h1 (.clk, .rst, .finished(fin[1]), .checks(c[1]), .failures(f[1]));
  resize_harness #(.SRC_W(5), .SRC_H(3), .DST_W(12), .DST_H(7), .GAP(10), .NFR(2)) h2 (.clk, .rst, .finished(fin[2]), .checks(c[2]), .failures(f[2]));
  resize_harness #(.SRC_W(9), .SRC_H(4), .DST_W(4), .DST_H(10), .GAP(4), .NFR(2)) h3 (.clk, .rst, .finished(fin[3]), .checks(c[3]), .failures(f[3]));
  resize_harness #(.SRC_W(6), .SRC_H(5), .DST_W(6), .DST_H(5), .GAP(0), .NFR(3)) h4 (.clk, .rst, .finished(fin[4]), .checks(c[4]), .failures(f[4]));
  resize_harness #(.SRC_W(4), .SRC_H(4), .DST_W(8), .DST_H(8), .GAP(0), .NFR(1), .EXPECT_OVF(1)) h5 (.clk, .rst, .finished(fin[5]), .checks(c[5]), .failures(f[5]));

  int checks, failures;

  initial begin
    repeat (1_000_000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < N; i++) begin checks += c[i]; failures += f[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (&fin);
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
