// idct_pkg: types and constants shared by the multistandard 1-D IDCT.
//
// idct_mode_e selects the transform a row is processed with. Every input row
// carries its own mode, so consecutive rows may use different standards.
//   MODE_MPEG8  MPEG-2 / MPEG-4 ASP 8-point IDCT. The real cosine constants
//               are carried as integers scaled by 2^8 (this design's
//               choice of precision): a=181 b=251 c=213 d=142 e=50 f=237 g=98.
//   MODE_AVC8   H.264/AVC 8-point integer IDCT, matrix form
//               a=8 b=12 c=10 d=6 e=3 f=8 g=4 (eight times the standard's
//               butterfly result; the final normalisation is left to the user).
//   MODE_VC1_8  VC-1 8-point integer IDCT, a=12 b=16 c=15 d=9 e=4 f=16 g=6.
//   MODE_VC1_4  VC-1 4-point integer IDCT, a=17 f=22 g=10.
//   MODE_AVC4   H.264/AVC 4-point integer IDCT, a=1 f=1 g=1/2 (the half is a
//               one-bit arithmetic right shift, as the standard does it).
//   MODE_HAD4   H.264/AVC 4-point Hadamard transform of the DC terms,
//               a=f=g=1.
// 8x4 and 4x8 VC-1 blocks are made of 8-point rows and 4-point columns (or
// the reverse) by choosing the mode per pass.
package idct_pkg;

  typedef enum logic [2:0] {
    MODE_MPEG8 = 3'd0,
    MODE_AVC8  = 3'd1,
    MODE_VC1_8 = 3'd2,
    MODE_VC1_4 = 3'd3,
    MODE_AVC4  = 3'd4,
    MODE_HAD4  = 3'd5
  } idct_mode_e;

  // Extra bits a product needs over its input (largest constant is 251).
  localparam int PROD_GROW = 9;

  // Extra bits a full 8-term output needs over its input.
  localparam int OUT_GROW = 12;

  // True for the transforms that use only the 4-point (even) half.
  function automatic logic is_4pt(idct_mode_e m);
    return (m == MODE_VC1_4) || (m == MODE_AVC4) || (m == MODE_HAD4);
  endfunction

endpackage
