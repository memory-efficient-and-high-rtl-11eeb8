// dwt53_pkg: types and constants shared by the 5/3 lifting DWT and IDWT
// processors.
//
// All filter datapaths carry signed coefficients of COEF_W bits. Image
// pixels enter the forward transform zero-extended to that width, so that a
// low-low subband produced by one decomposition level can be fed straight
// back in as the image of the next level.
//
// The lifting constants are alpha = -1/2 and beta = 1/4. They are realised
// as shifts: alpha*(b+c) becomes -((b+c) >>> 1) and beta*(b+c) becomes
// (b+c+2) >>> 2, the integer (reversible) form of the 5/3 lifting steps, so
// that the inverse processor reconstructs the image exactly. The word width
// and the rounding offset of the beta step are this design's choices.
package dwt53_pkg;

  // Coefficient word width (two's complement).
  localparam int unsigned COEF_W = 16;

  typedef logic signed [COEF_W-1:0] coef_t;

  // Shift amounts that replace the multiplications by alpha and beta.
  localparam int unsigned ALPHA_SHIFT = 1;   // |alpha| = 1/2
  localparam int unsigned BETA_SHIFT  = 2;   // beta    = 1/4
  localparam int signed   BETA_ROUND  = 2;   // rounding offset, half of 4

  // Which pair of subbands a forward-transform output beat (and an
  // inverse-transform input beat) carries. Each subband row i is sent as an
  // H-pass beat row (HL(i,j), HH(i,j)) followed by an L-pass beat row
  // (LL(i,j), LH(i,j)).
  typedef enum logic {
    PASS_H = 1'b0,   // lo = HL, hi = HH
    PASS_L = 1'b1    // lo = LL, hi = LH
  } pass_e;

endpackage
