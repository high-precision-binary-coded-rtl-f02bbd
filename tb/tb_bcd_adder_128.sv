// tb_bcd_adder_128: end-to-end self-check of the 32-digit double-mode BCD adder
// at its default size.
//
// Applies directed and random pairs of 32-digit BCD numbers, with carry-in 0
// and 1, and compares sum and cout with a reference computed digit by digit
// in decimal (t = a + b + carry; digit = t mod 10; carry = t / 10). The adder
// is combinational: each vector is held for 1 ns before it is checked.
//
// It counts how often each mechanism of the design is exercised and fails if
// any count is zero:
//   corrections   a digit whose binary sum exceeds 9 takes the sum+6 candidate
//   plain digits  a digit whose binary sum is 0..9 takes the plain sum
//   carries in    a digit receives a decimal carry from the digit below
//   full ripple   a carry entering digit 0 changes all 32 digits (99..9 + 1)
//   carry out     the top digit produces a carry
//   external cin  the carry-in port is 1
module tb_bcd_adder_128;
  import bcd_pkg::*;

  localparam int unsigned ND = 32;
  localparam int unsigned W  = DIGIT_W * ND;

  int checks = 0;
  int failures = 0;
  int n_corr = 0, n_plain = 0, n_cin_digit = 0, n_ripple = 0, n_cout = 0, n_ext_cin = 0;

  logic [W-1:0] x, y, sum;
  logic         cin, cout;

  bcd_adder_128 dut (.x(x), .y(y), .cin(cin), .sum(sum), .cout(cout));

  function automatic logic [W-1:0] rand_bcd();
    logic [W-1:0] v;
    for (int i = 0; i < ND; i++) v[DIGIT_W*i +: DIGIT_W] = 4'($urandom_range(9));
    return v;
  endfunction

  function automatic logic [W-1:0] all_digits(input int d);
    logic [W-1:0] v;
    for (int i = 0; i < ND; i++) v[DIGIT_W*i +: DIGIT_W] = 4'(d);
    return v;
  endfunction

  task automatic apply(input logic [W-1:0] a, input logic [W-1:0] b, input logic c);
    logic [W-1:0] exp_sum;
    int carry, t, da, db;
    bit   whole_ripple;
    x = a;
    y = b;
    cin = c;
    #1;
    carry = int'(c);
    if (c) n_ext_cin++;
    whole_ripple = c;
    for (int i = 0; i < ND; i++) begin
      da = int'(a[DIGIT_W*i +: DIGIT_W]);
      db = int'(b[DIGIT_W*i +: DIGIT_W]);
      t = da + db + carry;
      if (carry != 0) n_cin_digit++;
      if (t > 9) n_corr++; else n_plain++;
      if (da + db != 9) whole_ripple = 0;
      exp_sum[DIGIT_W*i +: DIGIT_W] = 4'(t % 10);
      carry = t / 10;
    end
    if (whole_ripple) n_ripple++;
    if (carry != 0) n_cout++;
    checks++;
    if (sum !== exp_sum || cout !== 1'(carry)) begin
      failures++;
      if (failures <= 5)
        $display("FAIL %h + %h + %0d: got %0d_%h expected %0d_%h",
                 a, b, c, cout, sum, carry, exp_sum);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Directed cases.
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply(all_digits(9), '0, 1'b1);            // carry ripples through all 32 digits
    apply(all_digits(9), all_digits(9), 1'b1); // every digit corrects, carry out
    apply(all_digits(5), all_digits(4), 1'b1); // sums of exactly 9 plus an incoming carry
    apply(all_digits(1), all_digits(9), 1'b0); // the one-digit waveform case, in every digit
    // Random cases.
    for (int k = 0; k < 20000; k++) apply(rand_bcd(), rand_bcd(), 1'($urandom));

    $display("mechanisms: corrections=%0d plain=%0d carries_in=%0d full_ripple=%0d carry_out=%0d ext_cin=%0d",
             n_corr, n_plain, n_cin_digit, n_ripple, n_cout, n_ext_cin);
    if (n_corr == 0)      begin failures++; $display("FAIL no correction exercised"); end
    if (n_plain == 0)     begin failures++; $display("FAIL no plain digit exercised"); end
    if (n_cin_digit == 0) begin failures++; $display("FAIL no digit carry exercised"); end
    if (n_ripple == 0)    begin failures++; $display("FAIL no full ripple exercised"); end
    if (n_cout == 0)      begin failures++; $display("FAIL no carry out exercised"); end
    if (n_ext_cin == 0)   begin failures++; $display("FAIL no external carry-in exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
