// jpeg_pkg: constants shared by the baseline-JPEG still-image datapath.
//
// DCT basis: the 8-point DCT matrix A[u][x] = 0.5 * C(u) * cos((2x+1) u pi / 16),
// C(0) = 1/sqrt(2), C(u>0) = 1, held as signed integers scaled by 2^COEF_FRAC.
// The 2-D forward transform of an 8x8 block X is A X A^T and the inverse is
// A^T Y A. Only the nine values round(2^13 * cos(k pi / 16)), k = 0..8, are stored;
// every matrix entry follows from them by the symmetry of the cosine.
//
// Quantization: the default table is the luminance table of the JPEG standard
// (ITU-T T.81 Annex K, Table K.1), in raster order, row 0 first. It is only the
// reset contents of the loadable table memory.
package jpeg_pkg;

  localparam int COEF_FRAC = 14;           // fraction bits of the DCT matrix entries
  localparam int COEF_W    = 16;           // width of a DCT matrix entry
  localparam int NCOEF     = 64;           // coefficients in an 8x8 block
  localparam int PIX_W     = 8;            // pixel sample width
  localparam int DCT_W     = 12;           // width of a (de)quantized DCT coefficient
  localparam int Q_W       = 8;            // width of a quantization table entry

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic [NCOEF-1:0][COEF_W-1:0] kmat_t;
  typedef logic [NCOEF-1:0][Q_W-1:0] qtab_t;

  // round(2^13 * cos(k*pi/16)) for k = 0..8
  function automatic int half_cos(input int k);
    case (k)
      0: return 8192;  1: return 8035;  2: return 7568;
      3: return 6811;  4: return 5793;  5: return 4551;
      6: return 3135;  7: return 1598;  default: return 0;
    endcase
  endfunction

  // A[u][x] scaled by 2^COEF_FRAC
  function automatic int dct_a(input int u, input int x);
    int n;
    if (u == 0) return 5793;               // 0.5 / sqrt(2) * 2^14
    n = ((2 * x + 1) * u) % 32;            // angle in units of pi/16
    if (n <= 8)       return  half_cos(n);
    else if (n <= 16) return -half_cos(16 - n);
    else if (n <= 24) return -half_cos(n - 16);
    else              return  half_cos(32 - n);
  endfunction

  // Kernel K[k][j] used by both passes of the row-column transform:
  // forward K = A, inverse K = A^T. Entry k*8+j.
  function automatic kmat_t dct_kernel(input bit inverse);
    kmat_t m;
    for (int k = 0; k < 8; k++)
      for (int j = 0; j < 8; j++)
        m[k*8+j] = COEF_W'(inverse ? dct_a(j, k) : dct_a(k, j));
    return m;
  endfunction

  localparam qtab_t STD_LUMA_Q = {
    // entry 63 first, entry 0 last (packed array, index 0 is the LSBs)
    8'd99,  8'd103, 8'd100, 8'd112, 8'd98,  8'd95,  8'd92,  8'd72,
    8'd101, 8'd120, 8'd121, 8'd103, 8'd87,  8'd78,  8'd64,  8'd49,
    8'd92,  8'd113, 8'd104, 8'd81,  8'd64,  8'd55,  8'd35,  8'd24,
    8'd77,  8'd103, 8'd109, 8'd68,  8'd56,  8'd37,  8'd22,  8'd18,
    8'd62,  8'd80,  8'd87,  8'd51,  8'd29,  8'd22,  8'd17,  8'd14,
    8'd56,  8'd69,  8'd57,  8'd40,  8'd24,  8'd16,  8'd13,  8'd14,
    8'd55,  8'd60,  8'd58,  8'd26,  8'd19,  8'd14,  8'd12,  8'd12,
    8'd61,  8'd51,  8'd40,  8'd24,  8'd16,  8'd10,  8'd11,  8'd16
  };

endpackage
