// fir_pkg: word widths shared by the parallel symmetric FIR filters.
//
// DATA_W and COEF_W are the input-sample and coefficient widths (two's
// complement). GUARD_W extra bits are carried in every accumulator so that a
// sub-filter sum, the pre-adder growth and the post-processing sums all fit:
// ACC_W = DATA_W + COEF_W + GUARD_W. The published design gives no word lengths; these
// are this design's choice.
package fir_pkg;
  localparam int unsigned DATA_W  = 16;
  localparam int unsigned COEF_W  = 16;
  localparam int unsigned GUARD_W = 8;
  localparam int unsigned ACC_W   = DATA_W + COEF_W + GUARD_W;
endpackage
