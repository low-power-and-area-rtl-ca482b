// tb_mac_bsa_16: end-to-end test of the MAC unit configured for 16-bit
// operands (32-bit sum, 4-bit accumulator segments), the second operand size
// the unit is specified for. Same stimulus and checks as tb_mac_bsa.
// The stream starts with the example 2 x 6 = 12 and then applies a few
// thousand signed operand pairs with random idle cycles, clears and runs of
// extreme values. A reference model keeps the exact sum; the result must
// equal it modulo 2^64 exactly three edges after the operands were accepted,
// result_valid must appear on that cycle only, and result must hold in
// between. The test counts how often each mechanism of the design occurs and
// fails if one never does: a new sum started by clear, a negative product,
// an idle cycle, carries waiting in the segment carry flip-flops, and a sum
// leaving the signed 64-bit range (wrap-around).
module tb_mac_bsa_16;
  import mac_pkg::*;
  localparam int N = 16;
  localparam int W = 2 * N;
  localparam int STEPS = 4000;
  localparam logic [N-1:0] MIN_V = {1'b1, {(N-1){1'b0}}};
  localparam logic signed [127:0] MAX_SUM = (128'sd1 <<< (W - 1)) - 128'sd1;

  logic         clk = 0, rst_n = 0, in_valid = 0, in_clear = 0;
  logic [N-1:0] a = '0, b = '0;
  logic [W-1:0] result;
  logic         result_valid;
  int checks = 0, failures = 0;
  int n_clear = 0, n_negative = 0, n_idle = 0, n_pending = 0, n_wrap = 0;

  mac_bsa #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_clear, .a, .b, .result, .result_valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (STEPS + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic         exp_valid [STEPS];
  logic [W-1:0] exp_value [STEPS];

  initial begin
    static logic signed [127:0] exact = '0;
    static logic [W-1:0]        last = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < STEPS + MAC_LATENCY - 1; i++) begin
      if (i < STEPS) begin
        logic v, c;
        logic signed [127:0] prod;
        if (i == 0) begin
          v = 1; c = 1; a = N'(2); b = N'(6);
        end else begin
          v = 1'($urandom_range(0, 5) != 0);
          c = v && ($urandom_range(0, 99) == 0);
          case ($urandom_range(0, 7))
            0: begin a = MIN_V; b = MIN_V; end
            1: begin a = ~MIN_V; b = MIN_V + N'(1); end
            2: begin a = N'($urandom_range(0, 255)); b = -N'($urandom_range(0, 255)); end
            default: begin a = N'($urandom); b = N'($urandom); end
          endcase
        end
        in_valid = v; in_clear = c;
        if (v) begin
          prod  = 128'($signed(a)) * 128'($signed(b));
          exact = (c ? 128'sd0 : exact) + prod;
          if (c) n_clear++;
          if (prod < 0) n_negative++;
          if (exact > MAX_SUM || exact < -MAX_SUM - 128'sd1) begin
            n_wrap++;
            exact = 128'($signed(exact[W-1:0]));
          end
        end else begin
          n_idle++;
        end
        exp_valid[i] = v;
        exp_value[i] = exact[W-1:0];
      end else begin
        in_valid = 0; in_clear = 0;
      end
      @(negedge clk);
      if (dut.u_acc.car_p != '0 || dut.u_acc.car_n != '0) n_pending++;
      if (i >= MAC_LATENCY - 1) begin
        int j;
        j = i - (MAC_LATENCY - 1);
        checks++;
        if (result_valid != exp_valid[j] || (exp_valid[j] && result != exp_value[j]) ||
            (!exp_valid[j] && result != last)) begin
          failures++;
          $display("FAIL step %0d: result=%h valid=%b, want %h valid=%b", j, result, result_valid,
                   exp_valid[j] ? exp_value[j] : last, exp_valid[j]);
        end
        if (j == 0) begin
          checks++;
          if (result != W'(12)) begin
            failures++;
            $display("FAIL example 2 x 6: result=%0d", result);
          end
        end
        if (exp_valid[j]) last = exp_value[j];
      end else begin
        checks++;
        if (result_valid) begin
          failures++;
          $display("FAIL result_valid early at step %0d", i);
        end
      end
    end
    $display("mechanisms: clear=%0d negative=%0d idle=%0d pending_carry_cycles=%0d wrap=%0d",
             n_clear, n_negative, n_idle, n_pending, n_wrap);
    checks++;
    if (n_clear == 0 || n_negative == 0 || n_idle == 0 || n_pending == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
