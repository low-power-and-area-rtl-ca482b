// mac_multiplier: first pipeline stage of the MAC unit.
//
// Multiplies two signed N-bit operands and registers the 2N-bit product,
// recoded as a borrow-save number for the accumulator. A two's complement
// value P equals -P[2N-1]*2^(2N-1) + sum(P[i]*2^i, i < 2N-1), so the recoding
// needs no logic: the positive bits pp are P with its sign bit cleared and the
// negative bits pn hold only the sign bit, at position 2N-1.
//
// Timing: operands sampled when in_valid is high appear on pp/pn one clock
// later with out_valid high; in_clear travels alongside as out_clear. When
// in_valid is low the product register holds its value and out_valid drops.
// Reset (asynchronous, active low) clears the valid and clear flags and the
// product.
//
// Constant output bits are intended: pp[2N-1] and pn[2N-2:0] are always 0,
// since the recoding places the sign bit in pn only.
//
// The multiplier array itself is written as a plain signed multiply; its
// internal structure is left to synthesis. Signed operands, the recoding and
// the reset are this design's choices.
module mac_multiplier #(
  parameter int N = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic           in_clear,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] pp,
  output logic [2*N-1:0] pn,
  output logic           out_valid,
  output logic           out_clear
);
  logic signed [2*N-1:0] prod;
  logic        [2*N-1:0] prod_q;

  assign prod = $signed(a) * $signed(b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q    <= '0;
      out_valid <= 1'b0;
      out_clear <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_clear <= in_valid & in_clear;
      if (in_valid) prod_q <= prod;
    end
  end

  always_comb begin
    pp = prod_q;
    pp[2*N-1] = 1'b0;
    pn = '0;
    pn[2*N-1] = prod_q[2*N-1];
  end
endmodule
