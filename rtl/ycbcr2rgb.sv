// ycbcr2rgb: colour conversion of a pixel stream from YCbCr back to RGB.
//
// Inverse of the BT.601 studio-range conversion used by rgb2ycbcr, with
// coefficients scaled by 256:
//   R = sat((298 (Y-16)              + 409 (Cr-128) + 128) >> 8)
//   G = sat((298 (Y-16) - 100 (Cb-128) - 208 (Cr-128) + 128) >> 8)
//   B = sat((298 (Y-16) + 516 (Cb-128)               + 128) >> 8)
// where ">>" is an arithmetic shift and sat() clamps to 0..255 (interpolated
// chroma and luma can leave their nominal ranges, so the clamp is needed).
// Timing: two register stages; valid and sof travel with the data. The text
// names the conversion back to RGB before display; the coefficients are this
// design's choice, matched to rgb2ycbcr.
module ycbcr2rgb
  import split_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  logic in_sof,
  input  ycc_t in_pix,
  output logic out_valid,
  output logic out_sof,
  output rgb_t out_pix
);

  logic signed [19:0] sr, sg, sb;
  logic signed [9:0]  c, d, e;
  logic [1:0] v_q, s_q;

  assign c = $signed({2'b00, in_pix.y})  - 10'sd16;
  assign d = $signed({2'b00, in_pix.cb}) - 10'sd128;
  assign e = $signed({2'b00, in_pix.cr}) - 10'sd128;

  always_ff @(posedge clk) begin
    if (rst) begin
      v_q <= '0; s_q <= '0;
      sr <= '0; sg <= '0; sb <= '0;
      out_pix <= '0;
    end else begin
      v_q <= {v_q[0], in_valid};
      s_q <= {s_q[0], in_valid & in_sof};
      sr <= 20'sd298 * c + 20'sd409 * e + 20'sd128;
      sg <= 20'sd298 * c - 20'sd100 * d - 20'sd208 * e + 20'sd128;
      sb <= 20'sd298 * c + 20'sd516 * d + 20'sd128;
      out_pix.r <= sat8(32'(sr >>> 8));
      out_pix.g <= sat8(32'(sg >>> 8));
      out_pix.b <= sat8(32'(sb >>> 8));
    end
  end

  assign out_valid = v_q[1];
  assign out_sof   = s_q[1];

endmodule
