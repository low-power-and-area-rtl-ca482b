// tb_cla_gen4: exhaustive test of the four-bit lookahead generator.
// For all 512 combinations of p, g and c0 the carries are compared with a
// bit-serial ripple model, c(i+1) = g(i) | p(i)&c(i); PG with the AND of p and
// GG with the carry out obtained for c0 = 0.
module tb_cla_gen4;
  logic [3:0] p, g, c;
  logic       c0, pg, gg;
  int checks = 0, failures = 0;

  cla_gen4 dut (.p, .g, .c0, .c, .pg, .gg);

  function automatic logic [3:0] ripple(input logic [3:0] pp, input logic [3:0] gv, input logic cin);
    logic cy = cin;
    for (int i = 0; i < 4; i++) begin
      cy = gv[i] | (pp[i] & cy);
      ripple[i] = cy;
    end
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {p, g, c0} = 9'(v);
      #1;
      checks++;
      if (c != ripple(p, g, c0) || pg != &p || gg != ripple(p, g, 1'b0)[3]) begin
        failures++;
        $display("FAIL p=%b g=%b c0=%b -> c=%b pg=%b gg=%b", p, g, c0, c, pg, gg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
