// tb_cla_adder: test of the 64-bit carry look ahead adder at its default width,
// plus a 24-bit instance whose group count (6) is not a power of four and a
// 128-bit instance whose top lookahead level has more than one input.
// Corner cases (all-ones propagate chains, zero, single carries) and random
// operands are compared with the built-in addition.
module tb_cla_adder;
  localparam int W = 64;
  localparam int WS = 24;
  logic [W-1:0]  a, b, s;
  logic          ci, co;
  logic [WS-1:0] as, bs, ss;
  logic          cis, cos;
  logic [127:0]  aw, bw, sw;
  logic          cow;
  int checks = 0, failures = 0;

  cla_adder dut (.a, .b, .ci, .s, .co);
  cla_adder #(.W(WS)) dut_s (.a(as), .b(bs), .ci(cis), .s(ss), .co(cos));
  cla_adder #(.W(128)) dut_w (.a(aw), .b(bw), .ci(ci), .s(sw), .co(cow));

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y, input logic c);
    logic [W:0] ref_sum;
    logic [WS:0] ref_s;
    logic [128:0] ref_w;
    a = x; b = y; ci = c;
    aw = {~x, x}; bw = {y, y};
    as = x[WS-1:0]; bs = y[WS-1:0]; cis = c;
    #1;
    ref_sum = {1'b0, x} + {1'b0, y} + (W+1)'(c);
    ref_s   = {1'b0, x[WS-1:0]} + {1'b0, y[WS-1:0]} + (WS+1)'(c);
    ref_w   = {1'b0, ~x, x} + {1'b0, y, y} + 129'(c);
    checks++;
    if ({co, s} != ref_sum) begin
      failures++;
      $display("FAIL W=%0d a=%h b=%h ci=%b -> %b %h", W, x, y, c, co, s);
    end
    checks++;
    if ({cos, ss} != ref_s) begin
      failures++;
      $display("FAIL W=%0d a=%h b=%h ci=%b -> %b %h", WS, x[WS-1:0], y[WS-1:0], c, cos, ss);
    end
    checks++;
    if ({cow, sw} != ref_w) begin
      failures++;
      $display("FAIL W=128 a=%h b=%h ci=%b -> %b %h", aw, bw, c, cow, sw);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);
    apply('1, 64'd1, 1'b0);
    apply('1, '1, 1'b1);
    apply(64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAA, 1'b1);
    for (int i = 0; i < W; i++) begin
      apply((64'd1 << i) - 64'd1, 64'd1, 1'b0);
      apply(~(64'd1 << i), 64'd0, 1'b1);
    end
    for (int i = 0; i < 3000; i++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
