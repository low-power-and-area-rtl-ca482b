// tb_cla_adder4: exhaustive test of the four-bit carry look ahead adder.
// All 512 input combinations; {c4, s} must equal a + b + c0, PG the AND of the
// bit propagates and GG the carry out with c0 = 0.
module tb_cla_adder4;
  logic [3:0] a, b, s;
  logic       c0, c4, pg, gg;
  int checks = 0, failures = 0;

  cla_adder4 dut (.a, .b, .c0, .s, .c4, .pg, .gg);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int total;
      {a, b, c0} = 9'(v);
      #1;
      total = int'(a) + int'(b) + int'(c0);
      checks++;
      if ({c4, s} != 5'(total) || pg != &(a ^ b) || gg != (int'(a) + int'(b) > 15)) begin
        failures++;
        $display("FAIL a=%h b=%h c0=%b -> s=%h c4=%b pg=%b gg=%b", a, b, c0, s, c4, pg, gg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
