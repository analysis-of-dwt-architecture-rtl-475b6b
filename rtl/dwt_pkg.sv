// dwt_pkg: shared widths, lifting constants and tag types of the multi-level
// lifting 2-D DWT.
//
// The transform is the 9/7 wavelet computed in flipped lifting form: every
// lifting step is rewritten so that the step's own sample is multiplied by the
// reciprocal of the lifting coefficients and its two neighbours enter the adder
// unmultiplied. Each of the three adder inputs is shifted right by K bits
// (overflow prevention factor 2^-K, K = 1 as in the architecture), so the
// per-step reciprocals below already contain the matching 2^-K:
//   C1 = 1/alpha, C2 = 1/(alpha*beta*2^K), C3 = 1/(beta*gamma*2^K),
//   C4 = 1/(gamma*delta*2^K)
// with alpha=-1.586134342, beta=-0.052980118, gamma=0.882911076,
// delta=0.443506852, zeta=1.149604399, held in Q.COEF_FRAC fixed point.
// The scaling units multiply the unscaled outputs by
//   kL = zeta*alpha*beta*gamma*delta*2^(4K),  kH = alpha*beta*gamma*2^(3K)/zeta
// (LL: kL*kL, LH and HL: kL*kH, HH: kH*kH) in Q.SCALE_FRAC fixed point.
// Widths, fraction lengths and rounding (plain truncation) are this design's
// own choices; the architecture does not fix them.
package dwt_pkg;

  parameter int PIX_W      = 8;   // input pixel width (unsigned)
  parameter int DW         = 20;  // signed internal coefficient width
  parameter int CW         = 18;  // signed constant width
  parameter int COEF_FRAC  = 12;  // fraction bits of the lifting constants
  parameter int SCALE_FRAC = 14;  // fraction bits of the scaling constants
  parameter int KSH        = 1;   // overflow prevention shift K
  parameter int NOVL       = 7;   // overlapped pixels per row of a stripe

  typedef logic signed [DW-1:0] coef_t;
  typedef logic signed [CW-1:0] const_t;

  // flipped lifting constants, round(C * 2^COEF_FRAC)
  parameter const_t C1 = -18'sd2582;   // 1/alpha
  parameter const_t C2 =  18'sd24371;  // 1/(alpha*beta*2)
  parameter const_t C3 = -18'sd43782;  // 1/(beta*gamma*2)
  parameter const_t C4 =  18'sd5230;   // 1/(gamma*delta*2)

  // subband scaling constants, round(k * 2^SCALE_FRAC)
  parameter const_t K_LL = 18'sd6002;  // kL*kL
  parameter const_t K_LH = 18'sd5120;  // kL*kH
  parameter const_t K_HL = 18'sd5120;  // kH*kL
  parameter const_t K_HH = 18'sd4368;  // kH*kH

  // tag that travels with a row segment through a decomposition level
  typedef struct packed {
    logic [15:0] stripe;  // stripe number within the image
    logic [15:0] row;     // row number (row pair number after transposition)
    logic [7:0]  seg;     // segment of the row (0 at level 1)
    logic        hi;      // after transposition: 1 = column of row-high (H) values
  } tag_t;

endpackage
