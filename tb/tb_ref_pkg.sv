// tb_ref_pkg: reference models used by the testbenches, written from the
// defining formulas rather than from the RTL structure.
//   - BT.601 studio-range colour conversion in integer form with floor division
//   - bicubic 2x enlargement evaluated in real arithmetic from the Keys kernel
//     (a = -0.5) at the geometric source position u = (o + 0.5) / 2 - 0.5,
//     with clamped (replicated) borders and round-half-up to 0..255
package tb_ref_pkg;
  import split_pkg::*;

  function automatic int floor_div(input int a, input int b);
    int q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  function automatic int clamp255(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  function automatic ycc_t ref_rgb2ycc(input rgb_t p);
    ycc_t o;
    int r, g, b;
    r = int'(p.r); g = int'(p.g); b = int'(p.b);
    o.y  = pix_t'(16  + floor_div( 66 * r + 129 * g +  25 * b + 128, 256));
    o.cb = pix_t'(128 + floor_div(-38 * r -  74 * g + 112 * b + 128, 256));
    o.cr = pix_t'(128 + floor_div(112 * r -  94 * g -  18 * b + 128, 256));
    return o;
  endfunction

  function automatic rgb_t ref_ycc2rgb(input ycc_t p);
    rgb_t o;
    int c, d, e;
    c = int'(p.y) - 16; d = int'(p.cb) - 128; e = int'(p.cr) - 128;
    o.r = pix_t'(clamp255(floor_div(298 * c           + 409 * e + 128, 256)));
    o.g = pix_t'(clamp255(floor_div(298 * c - 100 * d - 208 * e + 128, 256)));
    o.b = pix_t'(clamp255(floor_div(298 * c + 516 * d           + 128, 256)));
    return o;
  endfunction

  // Keys cubic convolution kernel, a = -0.5
  function automatic real keys(input real x);
    real ax;
    ax = (x < 0.0) ? -x : x;
    if (ax <= 1.0) return 1.5 * ax * ax * ax - 2.5 * ax * ax + 1.0;
    if (ax < 2.0)  return -0.5 * ax * ax * ax + 2.5 * ax * ax - 4.0 * ax + 2.0;
    return 0.0;
  endfunction

  // Source index range and weights for output coordinate o of a 2x enlargement.
  function automatic void taps(input int o, output int first, output real w[4]);
    real u;
    int  f;
    u = (real'(o) + 0.5) / 2.0 - 0.5;
    f = $floor(u);
    first = f - 1;
    for (int k = 0; k < 4; k++) w[k] = keys(u - real'(first + k));
  endfunction

  // Bicubic value of output pixel (ox, oy) of block image img (sw x sh, row-major).
  // unclamped returns the rounded value before saturation.
  function automatic int ref_bicubic(const ref int img[], input int sw, input int sh,
                                     input int ox, input int oy, output int unclamped);
    int  fx, fy, sx, sy;
    real wx[4], wy[4];
    real s;
    taps(ox, fx, wx);
    taps(oy, fy, wy);
    s = 0.0;
    for (int ky = 0; ky < 4; ky++) begin
      sy = fy + ky;
      if (sy < 0) sy = 0;
      if (sy > sh - 1) sy = sh - 1;
      for (int kx = 0; kx < 4; kx++) begin
        sx = fx + kx;
        if (sx < 0) sx = 0;
        if (sx > sw - 1) sx = sw - 1;
        s += wy[ky] * wx[kx] * real'(img[sy * sw + sx]);
      end
    end
    unclamped = int'($floor(s + 0.5));
    return clamp255(unclamped);
  endfunction

endpackage
