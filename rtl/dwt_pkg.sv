// dwt_pkg: shared types and constants of the lifting-based (9,7) DWT.
//
// Numbers: samples are signed fixed point, DATA_W bits wide with FRAC
// fraction bits; input pixels are PIX_W-bit unsigned integers shifted left by
// FRAC.  Lifting coefficients are signed integers with CF fraction bits, i.e.
// coefficient_q = round(coefficient * 2^CF).  The four (9,7) lifting
// coefficients alpha..delta and the scale factor zeta are the published
// JPEG2000 values; the word widths and the rounding are this design's own.
// ZETA2_Q = round(zeta^2 * 2^CF) and INV_ZETA2_Q = round(2^CF / zeta^2) are the
// combined row-and-column scale factors of the LL and HH subbands.
package dwt_pkg;

  localparam int PIX_W  = 8;   // input pixel width (unsigned)
  localparam int DATA_W = 24;  // internal sample width (signed)
  localparam int FRAC   = 6;   // fraction bits of an internal sample
  localparam int CF     = 14;  // fraction bits of a coefficient
  localparam int CW     = 16;  // coefficient width (signed)

  // (9,7) lifting coefficients, round(c * 2^14)
  localparam int ALPHA_Q = -25987;  // alpha = -1.586134342
  localparam int BETA_Q  = -868;    // beta  = -0.05298011854
  localparam int GAMMA_Q = 14466;   // gamma =  0.8829110762
  localparam int DELTA_Q = 7266;    // delta =  0.4435068522
  // scale factor zeta = 1.149604398
  localparam int ZETA2_Q     = 21653;  // zeta^2
  localparam int INV_ZETA2_Q = 12397;  // 1/zeta^2

  // Largest number of lifting steps a 1-D datapath may be built with.
  localparam int MAX_STEPS = 8;
  typedef int coef_vec_t [MAX_STEPS];

  // Lifting steps of the (9,7) filter in order: predict, update, predict, update.
  localparam coef_vec_t COEFS_97 = '{ALPHA_Q, BETA_Q, GAMMA_Q, DELTA_Q, 0, 0, 0, 0};

  // The four categories of basic processing element.
  typedef enum logic [1:0] {
    PE_SYM     = 2'd0,  // (a) D = A + alpha*(B + C)
    PE_ANTI    = 2'd1,  // (b) D = A + alpha*(B - C)
    PE_SINGLE  = 2'd2,  // (c) D = A + alpha*B
    PE_GENERAL = 2'd3   // (d) D = A + (beta*B + alpha*C)
  } pe_cat_e;

endpackage
