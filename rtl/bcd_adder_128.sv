// bcd_adder_128: 128-bit (32-digit) double-mode BCD adder.
//
// Adds two unsigned 32-digit packed-BCD numbers. Each 4-bit digit has its own
// modified double-mode adder (bcd_dm_digit), which forms the binary digit sum
// and that sum plus 6 side by side, and a 2:1 multiplexer (sum_mux) that takes
// the sum plus 6 when the digit's decimal carry-out is set. That carry-out,
// cb_i, is also the carry-in of the next digit up, so the decimal carry
// passes from digit to digit while both candidates of every digit are
// already formed.
//
// Digit i (0 = least significant) uses bits [4i+3:4i] of each operand and of
// the result. The digit count and this arrangement follow the described
// 128-bit adder. The external carry-in into digit 0 and the carry-out of the
// top digit are this design's additions, so that wider numbers can be built
// from several of these adders; tie cin to 0 for a plain 128-bit addition.
// The adder is combinational. The description mentions pipelining but never
// says where registers sit or how many, so none are placed here; a user can
// register the ports.
//
// Interface: x, y: operands, 4*NDIGITS bits, every digit 0..9. cin: carry
// into digit 0. sum: result digits. cout: decimal carry out of the top digit.
module bcd_adder_128
  import bcd_pkg::*;
#(
  parameter int unsigned NDIGITS = 32
) (
  input  logic [DIGIT_W*NDIGITS-1:0] x,
  input  logic [DIGIT_W*NDIGITS-1:0] y,
  input  logic                       cin,
  output logic [DIGIT_W*NDIGITS-1:0] sum,
  output logic                       cout
);

  logic [NDIGITS:0] cb;     // cb[i]: decimal carry into digit i

  assign cb[0] = cin;

  for (genvar i = 0; i < NDIGITS; i++) begin : g_digit
    bcd_digit_t s, s6;

    bcd_dm_digit u_add (
      .x   (x[DIGIT_W*i +: DIGIT_W]),
      .y   (y[DIGIT_W*i +: DIGIT_W]),
      .cin (cb[i]),
      .sum (s),
      .sum6(s6),
      .cout(cb[i+1])
    );

    sum_mux u_mux (
      .sum  (s),
      .sum6 (s6),
      .sel  (cb[i+1]),
      .digit(sum[DIGIT_W*i +: DIGIT_W])
    );
  end

  assign cout = cb[NDIGITS];

endmodule
