// tb_bsd_resolve: test of the redundant-to-binary converter at W = 64.
// Random state vectors (including pending carries at arbitrary positions and
// all-ones/all-zero corners) must give acc_p - acc_n + car_p - car_n
// modulo 2^64.
module tb_bsd_resolve;
  localparam int W = 64;
  logic [W-1:0] acc_p, acc_n, car_p, car_n, value;
  int checks = 0, failures = 0;

  bsd_resolve #(.W(W)) dut (.acc_p, .acc_n, .car_p, .car_n, .value);

  task automatic apply(input logic [W-1:0] ap, an, cp, cn);
    logic [W-1:0] want;
    acc_p = ap; acc_n = an; car_p = cp; car_n = cn;
    #1;
    want = ap - an + cp - cn;
    checks++;
    if (value != want) begin
      failures++;
      $display("FAIL %h - %h + %h - %h -> %h, want %h", ap, an, cp, cn, value, want);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0, '0, '0);
    apply('1, '0, '0, '0);
    apply('0, '1, '0, '0);
    apply('1, '1, '1, '1);
    apply('0, 64'd1, '0, '0);
    apply('1, '0, 64'h1111_1111_1111_1110, '0);
    for (int i = 0; i < 3000; i++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, {$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
