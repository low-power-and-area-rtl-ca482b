// bsd_resolve: converts the redundant accumulator state to two's complement.
//
// The state of the pipelined borrow-save accumulator is
//   acc_p - acc_n + car_p - car_n   (mod 2^W).
// One full-width borrow-save addition (bsa, two full adders deep) folds the
// pending carries into a single borrow-save number sp - sn, its own carries out
// of the top bit dropped. A W-bit carry look ahead adder then forms
// sp + ~sn + 1 = sp - sn, the two's complement result.
//
// Ports: the four W-bit state vectors in, value (W bits) out. Combinational.
// Using the carry look ahead adder for this final subtraction is this design's
// choice. W must be a multiple of 4.
module bsd_resolve #(
  parameter int W = 64
) (
  input  logic [W-1:0] acc_p,
  input  logic [W-1:0] acc_n,
  input  logic [W-1:0] car_p,
  input  logic [W-1:0] car_n,
  output logic [W-1:0] value
);
  logic [W-1:0] sp, sn;
  logic         cpout_unused, cnout_unused, co_unused;

  bsa #(.N(W)) u_fold (
    .xp   (car_p), .xn(car_n), .yp(acc_p), .yn(acc_n),
    .cin_p(1'b0), .cin_n(1'b0),
    .sp   (sp), .sn(sn), .cpout(cpout_unused), .cnout(cnout_unused)
  );

  cla_adder #(.W(W)) u_sub (.a(sp), .b(~sn), .ci(1'b1), .s(value), .co(co_unused));
endmodule
