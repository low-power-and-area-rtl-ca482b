// tb_mfcf_pa: test of the segmented borrow-save accumulator at its defaults
// (W = 64, SEG = 4).
// Random borrow-save operands are accumulated with random idle cycles and
// occasional clears. After every edge, acc_p - acc_n + car_p - car_n must
// equal a reference sum kept modulo 2^64. Pending carries must sit only at
// segment boundaries, and the test requires that carries were actually
// pending at some point (otherwise the carry flip-flops went untested).
module tb_mfcf_pa;
  localparam int W = 64, SEG = 4;
  logic         clk = 0, rst_n = 0, in_valid = 0, in_clear = 0;
  logic [W-1:0] xp = '0, xn = '0, acc_p, acc_n, car_p, car_n;
  logic [W-1:0] boundary_mask;
  int checks = 0, failures = 0;
  int pending_p = 0, pending_n = 0, clears = 0;

  mfcf_pa #(.W(W), .SEG(SEG)) dut (.clk, .rst_n, .in_valid, .in_clear, .xp, .xn, .acc_p, .acc_n, .car_p, .car_n);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [W-1:0] ref_sum = '0;
    boundary_mask = '0;
    for (int k = 1; k < W / SEG; k++) boundary_mask[SEG*k] = 1'b1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 5000; i++) begin
      logic [W-1:0] got;
      in_valid = 1'($urandom_range(0, 4) != 0);
      in_clear = in_valid && ($urandom_range(0, 63) == 0);
      case ($urandom_range(0, 2))
        0: begin xp = {$urandom, $urandom}; xn = {$urandom, $urandom}; end
        1: begin xp = {$urandom, $urandom}; xn = '0; end
        default: begin xp = '0; xn = {$urandom, $urandom}; end
      endcase
      if (in_valid) ref_sum = (in_clear ? '0 : ref_sum) + xp - xn;
      if (in_clear) clears++;
      @(negedge clk);
      got = acc_p - acc_n + car_p - car_n;
      checks++;
      if (got != ref_sum || (car_p & ~boundary_mask) != '0 || (car_n & ~boundary_mask) != '0) begin
        failures++;
        $display("FAIL i=%0d got %h want %h", i, got, ref_sum);
      end
      if (car_p != '0) pending_p++;
      if (car_n != '0) pending_n++;
    end
    checks++;
    if (pending_p == 0 || pending_n == 0 || clears == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: pending_p=%0d pending_n=%0d clears=%0d", pending_p, pending_n, clears);
    end
    $display("cycles with pending carries: positive %0d, negative %0d; clears %0d", pending_p, pending_n, clears);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
