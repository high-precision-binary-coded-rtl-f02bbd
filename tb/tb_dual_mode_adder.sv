// tb_dual_mode_adder: exhaustive self-check of the 4-bit dual-mode adder.
//
// Drives all 256 operand pairs and compares sum/cout with x+y and
// sum_p1/cout_p1 with x+y+1, both worked out with the simulator's integer
// arithmetic. A 16-bit instance is also driven with random operands to check
// the prefix at a larger width. The adder is combinational; each vector is
// given 1 ns to settle. A watchdog stops the run if it ever hangs.
module tb_dual_mode_adder;

  int checks = 0;
  int failures = 0;

  logic [3:0]  x, y, s, sp1;
  logic        c, cp1;
  logic [15:0] xw, yw, sw, swp1;
  logic        cw, cwp1;

  dual_mode_adder #(.WIDTH(4)) dut (
    .x(x), .y(y), .sum(s), .cout(c), .sum_p1(sp1), .cout_p1(cp1)
  );

  dual_mode_adder #(.WIDTH(16)) dut_w (
    .x(xw), .y(yw), .sum(sw), .cout(cw), .sum_p1(swp1), .cout_p1(cwp1)
  );

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
    int unsigned e0, e1;
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        x = 4'(a);
        y = 4'(b);
        #1;
        e0 = a + b;
        e1 = a + b + 1;
        check({c, s} == 5'(e0), $sformatf("%0d+%0d: got %b_%h", a, b, c, s));
        check({cp1, sp1} == 5'(e1), $sformatf("%0d+%0d+1: got %b_%h", a, b, cp1, sp1));
      end
    end
    for (int k = 0; k < 2000; k++) begin
      xw = 16'($urandom);
      yw = 16'($urandom);
      if (k == 0) begin xw = 16'hFFFF; yw = 16'h0000; end
      #1;
      check({cw, sw} == 17'(xw) + 17'(yw), $sformatf("w %h+%h", xw, yw));
      check({cwp1, swp1} == 17'(xw) + 17'(yw) + 17'd1, $sformatf("w %h+%h+1", xw, yw));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
