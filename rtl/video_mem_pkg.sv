// Shared types and table contents for the video memory structures.
//
// The memories serve a DCT/quantization stage working on 8x8 pixel blocks:
// a row of eight 8-bit pixels travels as one 64-bit word, byte c holding
// column c. This package fixes that layout (pixel_t, row_t) and computes the
// two read-only tables at elaboration time from their formulas, so no data
// file is needed:
//
//  * dct_rom_init(): the 8x8 DCT-II basis matrix, one basis row per 64-bit
//    word, each coefficient signed 8-bit:
//        C[k][n] = round(256 * c(k) * cos((2n+1)*k*pi/16)),
//        c(0) = 1/sqrt(8), c(k>0) = 1/2,
//    coefficient n stored in byte n of word k. Which constants the
//    dual-address table holds is this design's choice; the source only says
//    it serves DCT and quantization.
//  * qrecip_rom_init(): reciprocals of the quantization parameters,
//        R[i] = round(RECIP_ONE / Q[i])   (RECIP_ONE = 1024, unsigned 8-bit),
//    with Q the MPEG default intra quantizer matrix in raster order. Storing
//    reciprocals (so quantization multiplies instead of divides) follows the
//    source; the matrix and the scale are this design's choice.
package video_mem_pkg;

  localparam int unsigned PIX_W   = 8;            // monochrome pixel
  localparam int unsigned BLK_N   = 8;            // 8x8 block
  localparam int unsigned ROW_W   = PIX_W * BLK_N; // 64-bit row / column word

  typedef logic [PIX_W-1:0] pixel_t;
  typedef logic [ROW_W-1:0] row_t;

  // Scale of the stored reciprocals: R = round(RECIP_ONE / Q).
  localparam int unsigned RECIP_ONE = 1024;

  // MPEG default intra quantizer matrix, raster order (row 0 first).
  localparam int unsigned QMAT [64] = '{
     8, 16, 19, 22, 26, 27, 29, 34,
    16, 16, 22, 24, 27, 29, 34, 37,
    19, 22, 26, 27, 29, 34, 34, 38,
    22, 22, 26, 27, 29, 34, 37, 40,
    22, 26, 27, 29, 32, 35, 40, 48,
    26, 27, 29, 32, 35, 40, 48, 58,
    26, 27, 29, 34, 38, 46, 56, 69,
    27, 29, 35, 38, 46, 56, 69, 83
  };

  localparam real PI = 3.14159265358979323846;

  // One signed 8-bit DCT-II coefficient, rounded half away from zero.
  function automatic logic [7:0] dct_coef(int k, int n);
    real c, v;
    c = (k == 0) ? 0.35355339059327376 : 0.5;
    v = 256.0 * c * $cos(real'((2*n+1)*k) * PI / 16.0);
    v = (v >= 0.0) ? v + 0.5 : v - 0.5;   // $rtoi truncates toward zero
    return PIX_W'($rtoi(v));
  endfunction

  typedef row_t dct_rom_t [BLK_N];

  function automatic dct_rom_t dct_rom_init();
    dct_rom_t t;
    row_t     w;
    for (int k = 0; k < BLK_N; k++) begin
      for (int n = 0; n < BLK_N; n++)
        w[n*PIX_W +: PIX_W] = dct_coef(k, n);
      t[k] = w;
    end
    return t;
  endfunction

  typedef pixel_t qrecip_rom_t [64];

  function automatic qrecip_rom_t qrecip_rom_init();
    qrecip_rom_t t;
    for (int i = 0; i < 64; i++)
      t[i] = pixel_t'((RECIP_ONE + QMAT[i] / 2) / QMAT[i]);
    return t;
  endfunction

endpackage
