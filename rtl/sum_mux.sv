// sum_mux: per-digit 2:1 multiplexer of the double-mode BCD adder.
//
// Picks the final BCD digit from the two candidates a bcd_dm_digit offers:
// the uncorrected binary sum when the digit's decimal carry-out is 0 and the
// sum plus 6 when it is 1. One such multiplexer sits under each digit adder,
// selected by that digit's own carry-out, as the described design does.
//
// Interface: purely combinational. sum, sum6: candidates; sel: the digit's
// decimal carry-out; digit: the selected BCD digit.
module sum_mux
  import bcd_pkg::*;
(
  input  bcd_digit_t sum,
  input  bcd_digit_t sum6,
  input  logic       sel,
  output bcd_digit_t digit
);

  always_comb begin
    unique case (sel)
      1'b0: digit = sum;
      1'b1: digit = sum6;
    endcase
  end

endmodule
