// bsa: N-bit borrow-save adder.
//
// A borrow-save number holds one digit in {-1, 0, 1} per bit as a pair of
// bits: X = Xp - Xn. Two such numbers add without any carry chain, in two rows
// of full adders:
//   top row, bit i:    FA(~yn[i], yp[i], ~xn[i]) -> sum t[i], carry u[i]
//                      giving yp-yn-xn = t[i] - 2*(~u[i])
//   bottom row, bit i: FA(t[i], xp[i], v) -> sum w[i], carry q[i]
//                      with v = u[i-1], or ~cin_n for bit 0,
//                      giving t+xp-(~v) = 2*q[i] - (~w[i])
// Outputs: sn[i] = ~w[i]; sp[i+1] = q[i]; sp[0] = cin_p; cpout = q[N-1] and
// cnout = ~u[N-1], both of weight 2^N. Hence
//   sp - sn + 2^N (cpout - cnout) = X + Y + cin_p - cin_n.
// The longest path is two full adders whatever N is. Blocks chain into wider
// ones by wiring cpout to the next cin_p and cnout to the next cin_n.
//
// The cell arrangement and the inverted inputs and outputs follow the
// classic four-bit borrow-save adder. The positive carry input at sp[0] is this
// design's reading of the unlabelled line into that output.
// sp[0] is cin_p passed straight through, as the structure requires.
// Combinational.
module bsa #(
  parameter int N = 4
) (
  input  logic [N-1:0] xp,
  input  logic [N-1:0] xn,
  input  logic [N-1:0] yp,
  input  logic [N-1:0] yn,
  input  logic         cin_p,
  input  logic         cin_n,
  output logic [N-1:0] sp,
  output logic [N-1:0] sn,
  output logic         cpout,
  output logic         cnout
);
  logic [N-1:0] t, u, w, q, v;
  logic [N-1:0] p1_unused, g1_unused, p2_unused, g2_unused;

  assign v = {u[N-2:0], ~cin_n};

  for (genvar i = 0; i < N; i++) begin : g_bit
    full_adder u_top (
      .a (~yn[i]), .b(yp[i]), .ci(~xn[i]),
      .s (t[i]), .co(u[i]), .p(p1_unused[i]), .g(g1_unused[i])
    );
    full_adder u_bot (
      .a (t[i]), .b(xp[i]), .ci(v[i]),
      .s (w[i]), .co(q[i]), .p(p2_unused[i]), .g(g2_unused[i])
    );
  end

  assign sn    = ~w;
  assign sp    = {q[N-2:0], cin_p};
  assign cpout = q[N-1];
  assign cnout = ~u[N-1];

  initial assert (N >= 2) else $error("bsa: N must be at least 2");
endmodule
