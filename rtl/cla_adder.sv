// cla_adder: W-bit carry look ahead adder.
//
// The operands are cut into four-bit groups, each added by a cla_adder4. The
// group propagate/generate outputs of those blocks drive a lookahead tree
// (cla_lookahead) that returns the carry into every group, so no carry ripples
// from group to group. With W = 64 this is three lookahead levels.
//
// Ports: a, b (W bits), ci in; s (W bits) and co out. Combinational.
// W must be a multiple of 4. Widening the four-bit block through its PG/GG
// outputs is this design's choice.
module cla_adder #(
  parameter int W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  localparam int NG = W / 4;

  logic [NG-1:0] pg, gg, c4_unused;
  logic [NG:0]   gc;

  for (genvar k = 0; k < NG; k++) begin : g_grp
    cla_adder4 u_add (
      .a (a[4*k +: 4]), .b(b[4*k +: 4]), .c0(gc[k]),
      .s (s[4*k +: 4]), .c4(c4_unused[k]), .pg(pg[k]), .gg(gg[k])
    );
  end

  cla_lookahead #(.NG(NG)) u_la (.pg(pg), .gg(gg), .c0(ci), .c(gc));

  assign co = gc[NG];

  initial assert (W % 4 == 0 && W >= 4) else $error("cla_adder: W must be a positive multiple of 4");
endmodule
