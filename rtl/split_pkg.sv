// split_pkg: types, sizes and shared arithmetic of the image splitting design.
//
// The design takes a camera image, brings it to a square working frame of
// IMG_W x IMG_H pixels (256 x 256, the size named for the resize step), converts
// it to YCbCr, cuts it into SPLIT_X x SPLIT_Y non-overlapping blocks (2 x 2, four
// blocks of 128 x 128) and enlarges each block back to the working size with
// bicubic interpolation. Pixel components are 8-bit unsigned.
//
// The bicubic kernel is Keys' cubic convolution with a = -0.5. For an exact 2x
// enlargement with pixel-centre alignment, an output pixel lies a quarter or
// three quarters of a pixel from its source neighbours, and the four kernel taps
// are then exact multiples of 1/128:
//   quarter-phase      (-9, 111, 29, -3) / 128
//   three-quarter      (-3, 29, 111, -9) / 128
// Kernel, coefficient a and alignment are this design's choices; the source paper only
// asks for bicubic interpolation.
package split_pkg;

  localparam int unsigned PIX_W   = 8;    // bits per colour component
  localparam int unsigned IMG_W   = 256;  // working frame width
  localparam int unsigned IMG_H   = 256;  // working frame height
  localparam int unsigned SPLIT_X = 2;    // blocks across
  localparam int unsigned SPLIT_Y = 2;    // blocks down
  localparam int unsigned NCH     = 3;    // colour components per pixel

  typedef logic [PIX_W-1:0] pix_t;

  typedef struct packed {
    pix_t r;
    pix_t g;
    pix_t b;
  } rgb_t;

  typedef struct packed {
    pix_t y;
    pix_t cb;
    pix_t cr;
  } ycc_t;

  // Signed kernel tap (in 1/128) for tap k = 0..3 of a 2x enlargement.
  // odd = 1: output pixel 2i+1, taps on source i-1 .. i+2 (quarter phase).
  // odd = 0: output pixel 2i,   taps on source i-2 .. i+1 (three-quarter phase).
  function automatic logic signed [7:0] bicubic_tap(input logic odd, input logic [1:0] k);
    logic signed [7:0] t;
    if (odd) begin
      case (k)
        2'd0: t = -8'sd9;
        2'd1: t = 8'sd111;
        2'd2: t = 8'sd29;
        default: t = -8'sd3;
      endcase
    end else begin
      case (k)
        2'd0: t = -8'sd3;
        2'd1: t = 8'sd29;
        2'd2: t = 8'sd111;
        default: t = -8'sd9;
      endcase
    end
    return t;
  endfunction

  // Saturate a signed intermediate result to an 8-bit pixel.
  function automatic pix_t sat8(input logic signed [31:0] v);
    if (v < 0) return '0;
    if (v > 255) return 8'd255;
    return v[7:0];
  endfunction

endpackage
