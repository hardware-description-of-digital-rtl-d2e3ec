// iir_pkg - shared constants of the Equation-Error LMS adaptive IIR filter.
//
// Samples and coefficients are signed two's-complement integers that stand
// for value/128 (seven fraction bits), so a coefficient of 64 means 0.5.
// The step size mu = 0.25 is a right shift by two. These four numbers are the
// defaults of every module's parameters. The 8-bit word length is this
// design's reading of the register counts reported for the filter; the
// scaling by 128 and mu = 0.25 are the published operating point.
package iir_pkg;
  localparam int unsigned DATA_W    = 8;  // sample width x(n), d(n), y(n), e(n)
  localparam int unsigned COEF_W    = 8;  // coefficient width a_i, b_j
  localparam int unsigned FRAC_BITS = 7;  // samples and coefficients scaled by 128
  localparam int unsigned MU_SHIFT  = 2;  // mu = 2^-2 = 0.25
endpackage
