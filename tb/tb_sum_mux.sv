// tb_sum_mux: exhaustive self-check of the per-digit 2:1 result multiplexer.
//
// Drives every pair of candidate digits with both select values and checks
// that select 0 yields the uncorrected sum and select 1 the sum plus 6.
module tb_sum_mux;
  import bcd_pkg::*;

  int checks = 0;
  int failures = 0;

  bcd_digit_t s, s6, d;
  logic       sel;

  sum_mux dut (.sum(s), .sum6(s6), .sel(sel), .digit(d));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        for (int k = 0; k < 2; k++) begin
          s = 4'(a);
          s6 = 4'(b);
          sel = 1'(k);
          #1;
          checks++;
          if (d != (k ? 4'(b) : 4'(a))) begin
            failures++;
            $display("FAIL sum=%0d sum6=%0d sel=%0d digit=%0d", a, b, k, d);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
