// bcd_pkg: types and constants shared by the double-mode BCD adder.
//
// A BCD digit is a 4-bit binary code for one decimal digit, 0 to 9. When the
// binary sum of two digits plus a carry exceeds 9, adding 6 (0110) wraps it
// back into a valid digit and frees the decimal carry. The digit width and
// the correction constant follow the decimal arithmetic
// the design is built on. The typedef is this design's own convenience.
package bcd_pkg;

  localparam int unsigned DIGIT_W = 4;

  typedef logic [DIGIT_W-1:0] bcd_digit_t;

  // Constant added to a binary digit sum above 9 to correct it.
  localparam bcd_digit_t BCD_CORR = 4'b0110;

endpackage
