// rgb2ycbcr: colour conversion of a pixel stream from RGB to YCbCr.
//
// ITU-R BT.601 with studio range (Y in 16..235, Cb/Cr in 16..240), coefficients
// scaled by 256 and rounded:
//   Y  =  16 + ((  66 R + 129 G +  25 B + 128) >> 8)
//   Cb = 128 + (( -38 R -  74 G + 112 B + 128) >> 8)
//   Cr = 128 + (( 112 R -  94 G -  18 B + 128) >> 8)
// (">>" is an arithmetic shift, i.e. floor). The results never leave 0..255,
// so no saturation is needed.
// Timing: two register stages (products, then sum and offset); valid and sof
// travel with the data. The source paper names the conversion to luma and chroma; the
// standard, range and fixed-point scaling are this design's choices.
module rgb2ycbcr
  import split_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  logic in_sof,
  input  rgb_t in_pix,
  output logic out_valid,
  output logic out_sof,
  output ycc_t out_pix
);

  logic signed [17:0] sy, scb, scr;
  logic [1:0] v_q, s_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      v_q <= '0; s_q <= '0;
      sy <= '0; scb <= '0; scr <= '0;
      out_pix <= '0;
    end else begin
      v_q <= {v_q[0], in_valid};
      s_q <= {s_q[0], in_valid & in_sof};
      // stage 1: weighted sums
      sy  <= 18'sd66  * $signed({1'b0, in_pix.r}) + 18'sd129 * $signed({1'b0, in_pix.g})
           + 18'sd25  * $signed({1'b0, in_pix.b}) + 18'sd128;
      scb <= -18'sd38 * $signed({1'b0, in_pix.r}) - 18'sd74  * $signed({1'b0, in_pix.g})
           + 18'sd112 * $signed({1'b0, in_pix.b}) + 18'sd128;
      scr <= 18'sd112 * $signed({1'b0, in_pix.r}) - 18'sd94  * $signed({1'b0, in_pix.g})
           - 18'sd18  * $signed({1'b0, in_pix.b}) + 18'sd128;
      // stage 2: scale and offset
      out_pix.y  <= pix_t'((sy  >>> 8) + 18'sd16);
      out_pix.cb <= pix_t'((scb >>> 8) + 18'sd128);
      out_pix.cr <= pix_t'((scr >>> 8) + 18'sd128);
    end
  end

  assign out_valid = v_q[1];
  assign out_sof   = s_q[1];

endmodule
