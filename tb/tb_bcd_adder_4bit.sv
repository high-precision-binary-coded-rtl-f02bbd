// tb_bcd_adder_4bit: the one-digit (4-bit) configuration of the double-mode
// BCD adder, checked exhaustively.
//
// Instantiates the adder with a single digit: one bcd_dm_digit and one sum_mux.
// Every pair of digits 0..9 with carry-in 0 and 1 is applied and the digit and
// carry-out are compared with (x+y+cin) mod 10 and (x+y+cin) / 10. The counts
// of corrected and plain digits must both be non-zero.
module tb_bcd_adder_4bit;

  int checks = 0;
  int failures = 0;
  int n_corr = 0, n_plain = 0;

  logic [3:0] x, y, sum;
  logic       cin, cout;

  bcd_adder_128 #(.NDIGITS(1)) dut (.x(x), .y(y), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    for (int a = 0; a < 10; a++) begin
      for (int b = 0; b < 10; b++) begin
        for (int c = 0; c < 2; c++) begin
          x = 4'(a);
          y = 4'(b);
          cin = 1'(c);
          #1;
          t = a + b + c;
          if (t > 9) n_corr++; else n_plain++;
          checks++;
          if (sum != 4'(t % 10) || cout != 1'(t / 10)) begin
            failures++;
            $display("FAIL %0d+%0d+%0d: got %0d_%0d", a, b, c, cout, sum);
          end
        end
      end
    end
    if (n_corr == 0 || n_plain == 0) failures++;
    $display("corrections=%0d plain=%0d", n_corr, n_plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
