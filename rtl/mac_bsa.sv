// mac_bsa: pipelined multiply-accumulate unit with a borrow-save accumulator.
//
// Each cycle with in_valid high, the unit forms a*b (signed, N bits each) and
// adds it to a 2N-bit running sum; in_clear starts a new sum with that
// product. The sum is kept in redundant borrow-save form so that the
// accumulation loop holds no carry chain at all: the adder in the loop is two
// full adders deep whatever the width. It is built from SEG-bit segments whose
// carries wait one cycle in flip-flops (feedforward-cutset-free pipelining),
// and a carry look ahead adder turns the redundant sum back into binary
// outside the loop.
//
// Pipeline (one clock edge each):
//   1. mac_multiplier: product register, recoded as borrow-save.
//   2. mfcf_pa:        borrow-save accumulator with segment carry flip-flops.
//   3. bsd_resolve + result register: two's complement result.
// result_valid goes high MAC_LATENCY = 3 edges after an operand pair is
// accepted, and result then includes that pair. Back-to-back operands are
// accepted every cycle. Arithmetic wraps modulo 2^(2N).
//
// Ports: clk, rst_n (asynchronous, active low), in_valid, in_clear, a, b in;
// result (2N bits), result_valid out.
// Operand width 32 and segment width 4 follow the published configuration;
// signed operands, the 2N-bit sum without guard bits, the clear input and the
// three-stage pipeline are this design's choices.
module mac_bsa
  import mac_pkg::*;
#(
  parameter int N   = MAC_N,
  parameter int SEG = MAC_SEG
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic           in_clear,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] result,
  output logic           result_valid
);
  localparam int W = 2 * N;

  logic [W-1:0] pp, pn;
  logic         p_valid, p_clear;
  logic [W-1:0] acc_p, acc_n, car_p, car_n, value;
  logic         acc_valid;

  mac_multiplier #(.N(N)) u_mul (
    .clk, .rst_n, .in_valid, .in_clear, .a, .b,
    .pp, .pn, .out_valid(p_valid), .out_clear(p_clear)
  );

  mfcf_pa #(.W(W), .SEG(SEG)) u_acc (
    .clk, .rst_n, .in_valid(p_valid), .in_clear(p_clear),
    .xp(pp), .xn(pn), .acc_p, .acc_n, .car_p, .car_n
  );

  bsd_resolve #(.W(W)) u_res (.acc_p, .acc_n, .car_p, .car_n, .value);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_valid    <= 1'b0;
      result_valid <= 1'b0;
      result       <= '0;
    end else begin
      acc_valid    <= p_valid;
      result_valid <= acc_valid;
      if (acc_valid) result <= value;
    end
  end

  // A clear request only means something together with an operand pair.
  // (The reset term here is why rst_n is seen as used both synchronously and
  // asynchronously; the flip-flops themselves reset asynchronously only.)
  a_clear_needs_valid: assert property (@(posedge clk) disable iff (!rst_n) in_clear |-> in_valid)
    else $error("mac_bsa: in_clear without in_valid");
endmodule
