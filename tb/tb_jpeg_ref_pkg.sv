// tb_jpeg_ref_pkg: floating-point reference models for the JPEG testbenches.
//
// fdct_ref / idct_ref evaluate the 8x8 DCT definition directly in real arithmetic,
// F(u,v) = 1/4 C(u) C(v) sum_x sum_y f(x,y) cos((2x+1)u pi/16) cos((2y+1)v pi/16),
// with no separation into passes and no fixed point, so they share nothing with
// the RTL. quant_ref and dequant_ref give the integer quantizer and dequantizer
// results. luma_q is the JPEG standard luminance table (Annex K), entered here
// row by row.
package tb_jpeg_ref_pkg;

  typedef real blk_r [64];
  typedef int  blk_i [64];

  localparam real PI = 3.14159265358979323846;

  function automatic real cu(int u);
    return (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  // element index = row*8 + col; row is the vertical frequency/position
  function automatic blk_r fdct_ref(blk_i f);
    blk_r F;
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        real s = 0.0;
        for (int x = 0; x < 8; x++)
          for (int y = 0; y < 8; y++)
            s += f[x*8+y] * $cos((2*x+1)*u*PI/16.0) * $cos((2*y+1)*v*PI/16.0);
        F[u*8+v] = 0.25 * cu(u) * cu(v) * s;
      end
    return F;
  endfunction

  function automatic blk_r idct_ref(blk_i F);
    blk_r f;
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++) begin
        real s = 0.0;
        for (int u = 0; u < 8; u++)
          for (int v = 0; v < 8; v++)
            s += cu(u) * cu(v) * F[u*8+v] * $cos((2*x+1)*u*PI/16.0) * $cos((2*y+1)*v*PI/16.0);
        f[x*8+y] = 0.25 * s;
      end
    return f;
  endfunction

  function automatic int round_r(real r);
    return (r >= 0.0) ? int'($floor(r + 0.5)) : -int'($floor(-r + 0.5));
  endfunction

  function automatic int clamp(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int quant_ref(int s, int q);
    int m = (s < 0) ? -s : s;
    int r = (m + q / 2) / q;
    return (s < 0) ? -r : r;
  endfunction

  function automatic int dequant_ref(int s, int q);
    return clamp(s * q, -2048, 2047);
  endfunction

  function automatic int luma_q(int i);
    int t [64] = '{16, 11, 10, 16, 24, 40, 51, 61,
                   12, 12, 14, 19, 26, 58, 60, 55,
                   14, 13, 16, 24, 40, 57, 69, 56,
                   14, 17, 22, 29, 51, 87, 80, 62,
                   18, 22, 37, 56, 68, 109, 103, 77,
                   24, 35, 55, 64, 81, 104, 113, 92,
                   49, 64, 78, 87, 103, 121, 120, 101,
                   72, 92, 95, 98, 112, 100, 103, 99};
    return t[i];
  endfunction

endpackage
