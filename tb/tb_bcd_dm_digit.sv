// tb_bcd_dm_digit: exhaustive self-check of the one-digit double-mode BCD adder.
//
// For every pair of valid digits and both carry-in values it checks the three
// outputs against integer arithmetic: sum = (x+y+cin) mod 16,
// sum6 = (x+y+cin+6) mod 16 and cout = (x+y+cin > 9). It also checks the
// digit a 2:1 selection by cout yields, and replays the published one-digit
// waveform point 1 + 9 = carry 1, digit 0. Combinational: 1 ns per vector.
module tb_bcd_dm_digit;
  import bcd_pkg::*;

  int checks = 0;
  int failures = 0;

  bcd_digit_t x, y, s, s6, digit;
  logic       cin, cout;

  bcd_dm_digit dut (.x(x), .y(y), .cin(cin), .sum(s), .sum6(s6), .cout(cout));

  assign digit = cout ? s6 : s;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s", what);
    end
  endtask

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
        for (int ci = 0; ci < 2; ci++) begin
          x = 4'(a);
          y = 4'(b);
          cin = 1'(ci);
          #1;
          t = a + b + ci;
          check(s == 4'(t % 16), $sformatf("%0d+%0d+%0d sum=%0d", a, b, ci, s));
          check(s6 == 4'((t + 6) % 16), $sformatf("%0d+%0d+%0d sum6=%0d", a, b, ci, s6));
          check(cout == (t > 9), $sformatf("%0d+%0d+%0d cout=%0d", a, b, ci, cout));
          check(digit == 4'(t % 10), $sformatf("%0d+%0d+%0d digit=%0d", a, b, ci, digit));
        end
      end
    end
    // One-digit waveform point: X = 0001, Y = 1001, Cin = 0 -> S = 0000, Cout = 1.
    x = 4'b0001; y = 4'b1001; cin = 1'b0;
    #1;
    check(digit == 4'b0000 && cout == 1'b1, "1 + 9");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
