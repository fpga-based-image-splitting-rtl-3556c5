// bicubic_upscale2x: enlarges one split block to twice its width and height
// with bicubic interpolation, all colour components in parallel.
//
// The block is read from its block memories (one per component, shared read
// address). Each output pixel (ox, oy) is the 4 x 4 weighted sum
//   sum_{ky,kx} wy(ky) * wx(kx) * P(row(ky), col(kx)) / 16384
// with the Keys (a = -0.5) taps of split_pkg::bicubic_tap. For an odd output
// coordinate 2i+1 the taps cover source i-1..i+2, for an even one 2i they cover
// i-2..i+1. Source coordinates outside the block are clamped to its edge
// (border replication). The sum is rounded to nearest and saturated to 0..255,
// since the negative lobes can overshoot at sharp edges.
//
// Architecture: one multiply-accumulate per component, one tap per clock, so
// an output pixel takes 16 clocks and a block of OUT_W*OUT_H pixels takes
// 16*OUT_W*OUT_H clocks; consecutive pixels overlap in the pipeline, so the
// output rate is exactly one pixel every 16 clocks. Output is a raster stream
// (out_sof on the first pixel) without back-pressure.
// Handshake: start (one clock) begins a block; busy stays high until the last
// output pixel, which pulses done with it.
// The source paper asks for bicubic interpolation of each split block back to the
// original size; kernel, edge rule, rounding and the serial MAC are this
// design's choices.
module bicubic_upscale2x
  import split_pkg::*;
#(
  parameter int unsigned SUB_W   = IMG_W / SPLIT_X,
  parameter int unsigned SUB_H   = IMG_H / SPLIT_Y,
  parameter int unsigned NCH_P   = NCH,
  parameter int unsigned WIDTH   = PIX_W,
  parameter int unsigned SADDR_W = $clog2(SUB_W * SUB_H)
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         start,
  output logic                         busy,
  output logic                         done,
  output logic [SADDR_W-1:0]           rd_addr,
  input  logic [NCH_P-1:0][WIDTH-1:0]  rd_data,
  output logic                         out_valid,
  output logic                         out_sof,
  output logic [NCH_P-1:0][WIDTH-1:0]  out_pix
);

  localparam int unsigned OUT_W = 2 * SUB_W;
  localparam int unsigned OUT_H = 2 * SUB_H;
  localparam int unsigned OXW   = $clog2(OUT_W);
  localparam int unsigned OYW   = $clog2(OUT_H);

  // issue stage counters
  logic           running;
  logic [OXW-1:0] ox;
  logic [OYW-1:0] oy;
  logic [3:0]     k;      // {ky, kx}
  logic           last_issue;

  // source coordinates of the current tap, clamped to the block
  logic signed [OXW+1:0] sc_raw;
  logic signed [OYW+1:0] sr_raw;
  logic [OXW-1:0]        sc;
  logic [OYW-1:0]        sr;
  logic signed [15:0]    w;

  always_comb begin
    sc_raw = $signed({2'b00, ox >> 1}) - (ox[0] ? (OXW+2)'(1) : (OXW+2)'(2))
           + $signed({{(OXW-1){1'b0}}, k[1:0]});
    sr_raw = $signed({2'b00, oy >> 1}) - (oy[0] ? (OYW+2)'(1) : (OYW+2)'(2))
           + $signed({{(OYW-1){1'b0}}, k[3:2]});
    if (sc_raw < 0)                             sc = '0;
    else if (sc_raw > $signed(OXW+2)'(SUB_W-1)) sc = OXW'(SUB_W - 1);
    else                                        sc = sc_raw[OXW-1:0];
    if (sr_raw < 0)                             sr = '0;
    else if (sr_raw > $signed(OYW+2)'(SUB_H-1)) sr = OYW'(SUB_H - 1);
    else                                        sr = sr_raw[OYW-1:0];
    w = bicubic_tap(oy[0], k[3:2]) * bicubic_tap(ox[0], k[1:0]);
  end

  assign last_issue = (k == 4'd15) && (ox == OXW'(OUT_W - 1)) && (oy == OYW'(OUT_H - 1));

  // pipeline: stage 1 = address registered, stage 2 = data from memory
  logic               v1, v2, f1, f2, l1, l2, s1, s2, e1, e2;
  logic signed [15:0] w1, w2;
  logic signed [31:0] acc [NCH_P];

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      ox <= '0; oy <= '0; k <= '0;
      rd_addr <= '0;
      v1 <= 1'b0; v2 <= 1'b0; f1 <= 1'b0; f2 <= 1'b0; l1 <= 1'b0; l2 <= 1'b0;
      s1 <= 1'b0; s2 <= 1'b0; e1 <= 1'b0; e2 <= 1'b0; w1 <= '0; w2 <= '0;
    end else begin
      if (start && !busy) begin
        running <= 1'b1;
        ox <= '0; oy <= '0; k <= '0;
      end else if (running) begin
        k <= k + 1'b1;
        if (k == 4'd15) begin
          if (ox == OXW'(OUT_W - 1)) begin
            ox <= '0;
            oy <= oy + 1'b1;
          end else begin
            ox <= ox + 1'b1;
          end
        end
        if (last_issue) running <= 1'b0;
      end
      // stage 1
      v1 <= running;
      f1 <= (k == 4'd0);
      l1 <= (k == 4'd15);
      s1 <= (ox == '0) && (oy == '0);
      e1 <= last_issue;
      w1 <= w;
      rd_addr <= SADDR_W'(sr * SUB_W + sc);
      // stage 2
      v2 <= v1; f2 <= f1; l2 <= l1; s2 <= s1; e2 <= e1; w2 <= w1;
    end
  end

  // multiply-accumulate and output, per component
  logic signed [31:0] prod [NCH_P];
  logic signed [31:0] total [NCH_P];

  always_comb begin
    for (int c = 0; c < NCH_P; c++) begin
      prod[c]  = 32'(w2) * $signed({24'd0, rd_data[c]});
      total[c] = (f2 ? 32'sd0 : acc[c]) + prod[c];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      done      <= 1'b0;
      out_pix   <= '0;
      for (int c = 0; c < NCH_P; c++) acc[c] <= '0;
    end else begin
      out_valid <= v2 && l2;
      out_sof   <= v2 && l2 && s2;
      done      <= v2 && e2;
      if (v2) begin
        for (int c = 0; c < NCH_P; c++) begin
          acc[c] <= total[c];
          if (l2) out_pix[c] <= sat8((total[c] + 32'sd8192) >>> 14);
        end
      end
    end
  end

  assign busy = running | v1 | v2 | done;

endmodule
