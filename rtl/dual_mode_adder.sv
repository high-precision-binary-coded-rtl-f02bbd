// dual_mode_adder: parallel-prefix adder that delivers x+y and x+y+1 at once.
//
// Every bit position forms three local signals from its operand bits:
//   pro_i = x_i ^ y_i    (half-sum, "propagate")
//   gen_i = x_i & y_i    (generate)
//   n_i   = x_i | y_i    (carry-transmit, the OR form of propagate)
// A prefix over the positions gives the group generate GEN_i (a carry leaves
// bit i with no carry into bit 0) and the group transmit N_i (AND of n_0..n_i:
// a carry into bit 0 would reach past bit i). The carry into bit i is then
//   GEN_{i-1}              when the carry into bit 0 is 0, and
//   GEN_{i-1} | N_{i-1}    when it is 1,
// so both sums share one set of prefix signals and differ only in one OR gate
// and one XOR gate per bit:
//   sum_i    = GEN_{i-1} ^ pro_i
//   sum_p1_i = (GEN_{i-1} | N_{i-1}) ^ pro_i
// The two carry-outs come from the top position in the same way. A caller with
// a real carry-in picks one of the two sums; this is the same thing as the
// carry GEN_{i-1} | (N_{i-1} & cin).
//
// The structure and signal names follow the described double-mode adder. The
// prefix is written as a linear scan, which leaves its tree shape to synthesis.
// This is a design choice, as is the WIDTH parameter (default 4, one BCD digit).
//
// Interface: purely combinational, no clock. x, y: operands. sum, cout: x+y.
// sum_p1, cout_p1: x+y+1.
module dual_mode_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic [WIDTH-1:0] sum_p1,
  output logic             cout_p1
);

  logic [WIDTH-1:0] pro, gen, n;
  logic [WIDTH-1:0] GEN, N;   // group generate / group transmit over bits 0..i

  assign pro = x ^ y;
  assign gen = x & y;
  assign n   = x | y;

  assign GEN[0] = gen[0];
  assign N[0]   = n[0];
  for (genvar i = 1; i < WIDTH; i++) begin : g_prefix
    assign GEN[i] = gen[i] | (n[i] & GEN[i-1]);
    assign N[i]   = n[i] & N[i-1];
  end

  // Bit 0: the carry in is 0 for sum and 1 for sum_p1.
  assign sum[0]    = pro[0];
  assign sum_p1[0] = ~pro[0];
  for (genvar i = 1; i < WIDTH; i++) begin : g_sum
    assign sum[i]    = GEN[i-1] ^ pro[i];
    assign sum_p1[i] = (GEN[i-1] | N[i-1]) ^ pro[i];
  end

  assign cout    = GEN[WIDTH-1];
  assign cout_p1 = GEN[WIDTH-1] | N[WIDTH-1];

endmodule
