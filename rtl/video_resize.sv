// video_resize: brings the camera picture to the working frame size by
// nearest-neighbour resampling of a raster pixel stream; it can shrink and
// enlarge, independently in each direction.
//
// Output pixel (ox, oy) is source pixel (floor(ox*SRC_W/DST_W),
// floor(oy*SRC_H/DST_H)). Incoming rows are written into a two-row line memory
// (one bank per row parity). When a source row is complete, every output row
// that maps onto it is read out of its bank, zero times (rows skipped when
// shrinking), once, or several times (when enlarging), while the next source
// row fills the other bank. Within an output row the source column is stepped
// with an integer DDA (quotient plus remainder carry), so no divider is built.
//
// Interface: raster streams without back-pressure. in_sof marks the first pixel
// of a frame; a frame is SRC_W*SRC_H valid pixels. The output has DST_W*DST_H
// pixels per frame, out_sof on the first, and comes in bursts of one pixel per
// clock, one source row behind the input.
// Rate rule: the output rows of a source row must be read out before the next
// source row is complete, i.e. ceil(DST_H/SRC_H)*DST_W clocks must fit in the
// time the camera takes for one row. A shrinking resize meets this even at one
// input pixel per clock; an enlarging one needs gaps in the input. overflow
// pulses (and an assertion fires) if the rule is broken.
//
// The source paper says the resize step enlarges or shrinks the image to a size such as
// 256 x 256. Nearest-neighbour selection, the camera size 640 x 480, the line
// memory and the stream format are this design's choices.
module video_resize
  import split_pkg::*;
#(
  parameter int unsigned SRC_W = 640,
  parameter int unsigned SRC_H = 480,
  parameter int unsigned DST_W = IMG_W,
  parameter int unsigned DST_H = IMG_H
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  logic in_sof,
  input  rgb_t in_pix,
  output logic out_valid,
  output logic out_sof,
  output rgb_t out_pix,
  output logic overflow
);

  localparam int unsigned XW  = $clog2(SRC_W + 1);
  localparam int unsigned YW  = $clog2(SRC_H + 1);
  localparam int unsigned OXW = $clog2(DST_W + 1);
  localparam int unsigned OYW = $clog2(DST_H + 1);
  localparam int unsigned LAW = $clog2(2 * SRC_W);
  // remainders run up to DST_x - 1 and get RX/RY added before the compare
  localparam int unsigned RXW = $clog2(SRC_W + DST_W + 1);
  localparam int unsigned RYW = $clog2(SRC_H + DST_H + 1);
  localparam int unsigned QX  = SRC_W / DST_W;
  localparam int unsigned RX  = SRC_W % DST_W;
  localparam int unsigned QY  = SRC_H / DST_H;
  localparam int unsigned RY  = SRC_H % DST_H;

  // ---------------- write side: input position and line memory ----------------
  logic [XW-1:0] x_q, cx;
  logic [YW-1:0] y_q, cy;
  logic          row_done;      // last pixel of a source row written this clock
  logic [YW-1:0] done_row;      // which row
  logic [LAW-1:0] wr_addr;

  assign cx = in_sof ? '0 : x_q;
  assign cy = in_sof ? '0 : y_q;
  assign wr_addr = cy[0] ? LAW'(SRC_W + cx) : LAW'(cx);

  always_ff @(posedge clk) begin
    if (rst) begin
      x_q <= '0; y_q <= '0; row_done <= 1'b0; done_row <= '0;
    end else begin
      row_done <= 1'b0;
      if (in_valid) begin
        if (cx == XW'(SRC_W - 1)) begin
          x_q      <= '0;
          y_q      <= cy + 1'b1;
          row_done <= (cy < YW'(SRC_H));
          done_row <= cy;
        end else begin
          x_q <= cx + 1'b1;
          y_q <= cy;
        end
      end
    end
  end

  // ---------------- read side: output rows of the completed source row ----------
  logic           emitting;
  logic [YW-1:0]  e_row;        // source row being read out
  logic [OXW-1:0] ox;
  logic [XW-1:0]  sx;
  logic [RXW-1:0] remx;
  logic [OYW-1:0] oy;           // output row being produced
  logic [YW-1:0]  ty, ty_n;     // source row of output row oy / oy + 1
  logic [RYW-1:0] remy, remy_n;
  logic [LAW-1:0] rd_addr;
  logic           last_px, take;
  logic [YW-1:0]  s_ty;         // source row of the next output row, at row start
  logic [OYW-1:0] s_oy;

  assign last_px = emitting && (ox == OXW'(DST_W - 1));

  // next output row's source row
  always_comb begin
    if (remy + RYW'(RY) >= RYW'(DST_H)) begin
      ty_n   = ty + YW'(QY) + 1'b1;
      remy_n = remy + RYW'(RY) - RYW'(DST_H);
    end else begin
      ty_n   = ty + YW'(QY);
      remy_n = remy + RYW'(RY);
    end
  end

  // a new completed row can be taken when idle or on the last pixel of a row
  // whose source row is not needed again
  assign take = row_done && (!emitting || (last_px && ty_n != e_row));
  // row / source-row pair the emitter would start from for the new row
  assign s_ty = (done_row == '0) ? '0 : (emitting ? ty_n : ty);
  assign s_oy = (done_row == '0) ? '0 : (emitting ? oy + 1'b1 : oy);

  logic           p_valid, p_sof;

  always_ff @(posedge clk) begin
    if (rst) begin
      emitting <= 1'b0; e_row <= '0;
      ox <= '0; sx <= '0; remx <= '0;
      oy <= '0; ty <= '0; remy <= '0;
      rd_addr <= '0; p_valid <= 1'b0; p_sof <= 1'b0;
      overflow <= 1'b0;
    end else begin
      p_valid  <= 1'b0;
      p_sof    <= 1'b0;
      overflow <= row_done && !take;
      if (emitting) begin
        // issue the read of output pixel (ox, oy)
        rd_addr <= e_row[0] ? LAW'(SRC_W + sx) : LAW'(sx);
        p_valid <= 1'b1;
        p_sof   <= (ox == '0) && (oy == '0);
        if (remx + RXW'(RX) >= RXW'(DST_W)) begin
          sx   <= sx + XW'(QX) + 1'b1;
          remx <= remx + RXW'(RX) - RXW'(DST_W);
        end else begin
          sx   <= sx + XW'(QX);
          remx <= remx + RXW'(RX);
        end
        ox <= ox + 1'b1;
        if (last_px) begin
          ox <= '0; sx <= '0; remx <= '0;
          oy <= oy + 1'b1; ty <= ty_n; remy <= remy_n;
          // another output row from the same source row?
          emitting <= (ty_n == e_row) && (oy + 1'b1 < OYW'(DST_H));
        end
      end
      if (take) begin
        e_row <= done_row;
        if (done_row == '0) begin
          oy <= '0; ty <= '0; remy <= '0;
        end
        ox <= '0; sx <= '0; remx <= '0;
        emitting <= (s_ty == done_row) && (s_oy < OYW'(DST_H));
      end
    end
  end

  dp_ram #(.DEPTH(2 * SRC_W), .WIDTH($bits(rgb_t)), .ADDR_W(LAW)) u_line (
    .clk,
    .wr_en  (in_valid),
    .wr_addr(wr_addr),
    .wr_data(in_pix),
    .rd_addr(rd_addr),
    .rd_data(out_pix)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
    end else begin
      out_valid <= p_valid;
      out_sof   <= p_sof;
    end
  end

  a_rate: assert property (@(posedge clk) disable iff (rst) row_done |-> take)
    else $warning("video_resize: input rows arrive faster than output rows can be produced");

endmodule
