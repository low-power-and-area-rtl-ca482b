// cla_adder4: four-bit carry look ahead adder.
//
// Four full adders each contribute their propagate and generate bits to a
// four-bit lookahead generator (cla_gen4), which returns the carries C1..C3 to
// the adders and gives C4, PG and GG out. Bit 0 takes the carry in C0 directly.
// The full adders' own carry outputs are not used.
//
// Ports: a, b (4 bits), c0 in; s (4 bits), c4, pg, gg out. Combinational.
// The structure follows the published four-bit CLA diagram.
module cla_adder4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       c0,
  output logic [3:0] s,
  output logic       c4,
  output logic       pg,
  output logic       gg
);
  logic [3:0] p, g, c;   // c[i] = C(i+1)
  logic [3:0] cin;       // carry into each bit
  logic [3:0] co_unused;

  assign cin = {c[2:0], c0};

  for (genvar i = 0; i < 4; i++) begin : g_fa
    full_adder u_fa (
      .a (a[i]), .b (b[i]), .ci(cin[i]),
      .s (s[i]), .co(co_unused[i]), .p(p[i]), .g(g[i])
    );
  end

  cla_gen4 u_gen (.p(p), .g(g), .c0(c0), .c(c), .pg(pg), .gg(gg));

  assign c4 = c[3];
endmodule
