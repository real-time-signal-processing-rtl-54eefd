// systolic_pkg: constants shared by the systolic and wavefront arrays.
//
// All arrays carry two's-complement integer samples, coefficients, products and
// sums in one word of DATA_W bits. Arithmetic wraps modulo 2**DATA_W, the way a
// 16-bit integer in the reference software model of these arrays does; products
// and sums are not widened or saturated. The word width is this design's choice:
// the arrays are specified only as operating on integers.
package systolic_pkg;

  // Default word width of every data line.
  parameter int unsigned DATA_W = 16;

  // Default sizes of the example arrays.
  parameter int unsigned FIR_TAPS  = 3;   // taps of the forward, backward and wavefront FIRs
  parameter int unsigned MM_N      = 4;   // the matrix multiplier is MM_N x MM_N
  parameter int unsigned ARMA_SECT = 3;   // sections of the systolic ARMA filter

endpackage
