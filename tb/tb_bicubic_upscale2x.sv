// tb_bicubic_upscale2x: two components of a small block (7 x 5) held in a
// behavioural block memory are enlarged to 14 x 10. Component 0 is random,
// component 1 a black/white checkerboard with sharp edges, which makes the
// negative kernel lobes overshoot and exercises the saturation. Every output
// pixel is compared with the real-arithmetic Keys reference (clamped borders,
// round half up); the test also checks 16 clocks per output pixel, out_sof,
// the busy/done handshake and a second block run back to back.
module tb_bicubic_upscale2x;
  import tb_ref_pkg::*;
  localparam int SW = 7, SH = 5, OW = 2 * SW, OH = 2 * SH, NC = 2;
  logic clk = 0, rst = 1;
  logic start = 0, busy, done, out_valid, out_sof;
  logic [5:0] rd_addr;
  logic [NC-1:0][7:0] rd_data, out_pix;
  int img [NC][];
  int checks = 0, failures = 0, cnt = 0, last_t = -1, cyc = 0;
  int sat_hi = 0, sat_lo = 0, runs_done = 0;

  bicubic_upscale2x #(.SUB_W(SW), .SUB_H(SH), .NCH_P(NC), .WIDTH(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural block memory, one clock read latency
  always @(posedge clk) for (int c = 0; c < NC; c++) rd_data[c] <= 8'(img[c][rd_addr]);

  always @(posedge clk) begin
    cyc++;
    if (!rst && out_valid) begin
      int ox, oy, e, u;
      ox = cnt % OW; oy = cnt / OW;
      for (int c = 0; c < NC; c++) begin
        e = ref_bicubic(img[c], SW, SH, ox, oy, u);
        if (u > 255) sat_hi++;
        if (u < 0) sat_lo++;
        checks++;
        if (int'(out_pix[c]) != e) begin
          failures++;
          $display("FAIL c%0d (%0d,%0d): got %0d expected %0d", c, ox, oy, out_pix[c], e);
        end
      end
      checks++;
      if (out_sof !== (cnt == 0)) begin failures++; $display("FAIL sof at %0d", cnt); end
      if (last_t >= 0 && cnt != 0) begin
        checks++;
        if (cyc - last_t != 16) begin failures++; $display("FAIL spacing %0d", cyc - last_t); end
      end
      last_t = cyc;
      cnt++;
      if (done) runs_done++;
      checks++;
      if (done !== (cnt == OW * OH)) begin failures++; $display("FAIL done at %0d", cnt); end
    end
  end

  initial begin
    int t0;
    for (int c = 0; c < NC; c++) img[c] = new[SW * SH];
    for (int i = 0; i < SW * SH; i++) begin
      img[0][i] = $urandom_range(255);
      img[1][i] = (((i % SW) + (i / SW)) % 2 == 0) ? 255 : 0;
    end
    rd_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int run = 0; run < 2; run++) begin
      cnt = 0; last_t = -1;
      @(negedge clk) start = 1;
      t0 = cyc;
      @(negedge clk) start = 0;
      checks++;
      if (!busy) begin failures++; $display("FAIL busy"); end
      while (!(out_valid && done)) @(negedge clk);
      checks++;
      // the first pixel needs 16 taps plus 3 pipeline clocks; then 16 per pixel
      if (cyc - t0 != 16 * OW * OH + 3) begin
        failures++; $display("FAIL block took %0d clocks", cyc - t0);
      end
      @(negedge clk);
      checks++;
      if (busy || cnt != OW * OH) begin failures++; $display("FAIL end of run, %0d pixels", cnt); end
      // second run: new random data in component 0
      for (int i = 0; i < SW * SH; i++) img[0][i] = $urandom_range(255);
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin
      failures++; $display("FAIL saturation not exercised (%0d high, %0d low)", sat_hi, sat_lo);
    end
    $display("saturated high %0d, low %0d", sat_hi, sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
