// ica_pkg: number formats and types shared by the CORDIC-based FastICA.
//
// Data words (whitened samples, estimator vectors, CORDIC x/y) are signed
// CW-bit fixed point with CFRAC fractional bits (range +-2^(CW-CFRAC-1)).
// Angles are binary angles of AW bits: the full circle is 2^AW, so
// pi = 2^(AW-1) and the signed range is [-pi, pi). These formats are this
// design's choice; the source gives no word lengths.
package ica_pkg;

  parameter int unsigned CW    = 24;
  parameter int unsigned CFRAC = 16;
  parameter int unsigned AW    = 24;
  // Micro-rotations per CORDIC operation.
  parameter int unsigned CITER = 20;
  // Accumulator width of the E[z G^3] sums.
  parameter int unsigned ACCW  = 64;

  typedef logic signed [CW-1:0] word_t;
  typedef logic signed [AW-1:0] angle_t;

  // Vectoring: rotate (x, y) onto the x axis, giving its length and angle.
  // Rotation:  rotate (x, y) by a given angle.
  typedef enum logic {CORDIC_VEC = 1'b0, CORDIC_ROT = 1'b1} cordic_mode_t;

  localparam word_t ONE = word_t'(1) <<< CFRAC;

  // atan(2^-i) as a binary angle.
  function automatic angle_t atan_tab(input int i);
    return angle_t'($rtoi($atan(2.0 ** (-i)) / 3.14159265358979323846 * (2.0 ** (AW - 1)) + 0.5));
  endfunction

endpackage
