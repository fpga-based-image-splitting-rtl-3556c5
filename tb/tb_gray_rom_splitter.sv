// tb_gray_rom_splitter: runs the counter through all addresses of the default
// 256 x 256 picture (four 128 x 128 ROMs) and compares every ROM word with the
// test picture at the corresponding image position; checks the one-clock ROM
// latency, that the counter holds while en is low and that it wraps.
module tb_gray_rom_splitter;
  import split_pkg::*;
  localparam int W = 256, H = 256, SW = 128, SH = 128, N = SW * SH;
  logic clk = 0, rst = 1, en = 0;
  logic [13:0] addr, pix_addr;
  logic pix_valid;
  logic [3:0][7:0] pix;
  int checks = 0, failures = 0;

  gray_rom_splitter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected picture: diagonal ramp (x + 2y) / 3, a 254 square over
  // x, y in [32, 85), a 10 bar over rows [160, 176)
  function automatic int picture(input int x, input int y);
    int v;
    v = (x + 2 * y) / 3;
    if (x >= 32 && x < 85 && y >= 32 && y < 85) v = 254;
    if (y >= 160 && y < 176) v = 10;
    return v % 256;
  endfunction

  int seen = 0;
  always @(posedge clk) if (!rst && pix_valid) begin
    int a, sx, sy;
    a = int'(pix_addr); sx = a % SW; sy = a / SW;
    for (int b = 0; b < 4; b++) begin
      checks++;
      if (int'(pix[b]) != picture((b % 2) * SW + sx, (b / 2) * SH + sy)) begin
        failures++;
        if (failures < 10) $display("FAIL rom %0d addr %0d: %0d", b, a, pix[b]);
      end
    end
    checks++;
    if (a != seen % N) begin failures++; $display("FAIL order %0d", a); end
    seen++;
  end

  initial begin
    logic [13:0] held;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk) en = 1;
    repeat (100) @(negedge clk);
    en = 0;
    held = addr;
    repeat (10) @(negedge clk);
    checks++;
    if (addr != held || addr != 14'd100) begin failures++; $display("FAIL hold %0d", addr); end
    en = 1;
    repeat (N - 100 + 20) @(negedge clk);
    en = 0;
    @(negedge clk);
    checks++;
    if (seen != N + 20 || addr != 14'd20) begin failures++; $display("FAIL wrap %0d %0d", seen, addr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
