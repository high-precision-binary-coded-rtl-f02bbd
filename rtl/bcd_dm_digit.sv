// bcd_dm_digit: one-digit modified double-mode BCD adder.
//
// Adds two BCD digits and a carry-in and hands out both candidate results,
// leaving the choice between them to a 2:1 multiplexer outside (sum_mux):
//   sum   = low 4 bits of the binary sum  s = x + y + cin
//   sum6  = low 4 bits of s + 6           (the corrected digit)
//   cout  = decimal carry: 1 when s > 9
// The digit result is sum when cout is 0 and sum6 when cout is 1.
//
// How it works. A dual_mode_adder produces x+y and x+y+1 from one shared set
// of propagate/generate prefix signals; the carry-in selects between them,
// which is the carry term GEN_{i-1} | (N_{i-1} & cin). The +6 path applies the
// same generate/transmit/propagate equations to s and the constant 0110:
// bit 0 of sum6 equals bit 0 of sum, and carries are forced into bits 1 and 2.
// The decimal carry is the binary carry out of bit 3 OR'ed with the test
// s[3] & (s[2] | s[1]) for the values 10 to 15.
//
// The sum/sum+6 outputs, bit 0 being shared, the forced carries into the two
// positions where 6 has a one, and the selection by the carry-out follow the
// described design. The decimal-carry expression is the standard one
// (s3&s2 | s3&s1); the text's variant (s3&s2 | s2&s1) would flag 6 and 7 as
// overflows and miss 10 and 11, so it is not used.
//
// Interface: purely combinational, no clock. x, y: BCD digits 0..9. Inputs
// above 9 are outside its range; the outputs are then meaningless.
module bcd_dm_digit
  import bcd_pkg::*;
(
  input  bcd_digit_t x,
  input  bcd_digit_t y,
  input  logic       cin,
  output bcd_digit_t sum,
  output bcd_digit_t sum6,
  output logic       cout
);

  bcd_digit_t s0, s1;       // x+y and x+y+1
  logic       c0, c1;       // their binary carry-outs
  logic       cbin;         // binary carry-out of x+y+cin

  dual_mode_adder #(.WIDTH(DIGIT_W)) u_dm (
    .x      (x),
    .y      (y),
    .sum    (s0),
    .cout   (c0),
    .sum_p1 (s1),
    .cout_p1(c1)
  );

  assign sum  = cin ? s1 : s0;
  assign cbin = cin ? c1 : c0;

  // sum + 6: generate/transmit/propagate of sum against the constant 0110.
  // Carry into each position of the +6 path. The carry out of bit 3 is dropped:
  // it is the wrap that turns 10..19 into 0..9.
  logic [DIGIT_W-1:0] ca6;

  assign ca6[0] = 1'b0;
  for (genvar i = 0; i < DIGIT_W; i++) begin : g_plus6
    assign sum6[i]  = (sum[i] ^ BCD_CORR[i]) ^ ca6[i];
    if (i < DIGIT_W-1) begin : g_carry
      assign ca6[i+1] = (sum[i] & BCD_CORR[i]) | ((sum[i] | BCD_CORR[i]) & ca6[i]);
    end
  end

  assign cout = cbin | (sum[3] & (sum[2] | sum[1]));

endmodule
