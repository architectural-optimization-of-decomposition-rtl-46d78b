// decomp_pkg: constants shared by the fixed-point matrix decomposition cores.
//
// The cores work on signed two's-complement fixed-point words of WIDTH bits,
// FRAC of which are fractional. The defaults are the configuration of the
// adaptive-weight-calculation core: 4x4 matrices and 20-bit data words. The
// split of those 20 bits into integer and fractional parts is this design's
// own choice (12 fractional bits, 8 integer bits including the sign).
package decomp_pkg;

  // Default data word width in bits (20-bit fixed point).
  localparam int unsigned DEF_WIDTH = 20;
  // Default number of fractional bits (own choice).
  localparam int unsigned DEF_FRAC  = 12;
  // Default matrix dimension (4x4).
  localparam int unsigned DEF_N     = 4;

  // Which result matrix the QR core's read port returns.
  typedef enum logic {
    SEL_Q = 1'b0,   // orthonormal columns Q (m x n)
    SEL_R = 1'b1    // upper-triangular R (n x n, plus right-hand-side columns)
  } qr_sel_e;

endpackage
