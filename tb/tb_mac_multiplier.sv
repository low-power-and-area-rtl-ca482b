// tb_mac_multiplier: test of the product stage at its default width (32 bits).
// Random signed operands and corner values are applied with in_valid toggling;
// one edge later pp - pn (read as a 64-bit two's complement value) must equal
// a*b, out_valid must follow in_valid with one cycle delay, out_clear must be
// in_valid & in_clear delayed, pn may only use the top bit, and the product
// must hold while in_valid is low.
module tb_mac_multiplier;
  localparam int N = 32;
  logic           clk = 0, rst_n = 0, in_valid = 0, in_clear = 0;
  logic [N-1:0]   a = '0, b = '0;
  logic [2*N-1:0] pp, pn;
  logic           out_valid, out_clear;
  int checks = 0, failures = 0;

  mac_multiplier #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_clear, .a, .b, .pp, .pn, .out_valid, .out_clear);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [2*N-1:0] last_prod;

  initial begin
    static logic [N-1:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h2};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      logic v, c;
      logic signed [2*N-1:0] want, got;
      v = (i < 36) ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      c = 1'($urandom);
      if (i < 36) begin
        a = corner[i % 6]; b = corner[i / 6];
      end else begin
        a = $urandom; b = $urandom;
      end
      in_valid = v; in_clear = c;
      want = v ? $signed(a) * $signed(b) : last_prod;
      @(negedge clk);
      got = pp - pn;
      checks++;
      if (out_valid != v || out_clear != (v & c) || (i > 0 || v) && got != want || pn[2*N-2:0] != '0) begin
        failures++;
        $display("FAIL i=%0d a=%h b=%h v=%b: got %h want %h valid=%b clear=%b", i, a, b, v, got, want, out_valid, out_clear);
      end
      if (v) last_prod = want;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
