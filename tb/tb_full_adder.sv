// tb_full_adder: exhaustive test of the one-bit full adder.
// All eight input combinations are applied; sum, carry, propagate and generate
// are compared with values computed from the arithmetic sum a+b+ci.
module tb_full_adder;
  logic a, b, ci, s, co, p, g;
  int checks = 0, failures = 0;

  full_adder dut (.a, .b, .ci, .s, .co, .p, .g);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, ci} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(ci);
      checks++;
      if ({co, s} != 2'(total) || p != (a != b) || g != (a && b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b -> s=%0b co=%0b p=%0b g=%0b", a, b, ci, s, co, p, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
