// cla_gen4: four-bit carry look ahead generator.
//
// From the bit propagate/generate pairs (p[i], g[i]) and the carry in c0 it
// forms every internal carry in two gate levels, without rippling:
//   C(i+1) = G(i) | P(i)G(i-1) | ... | P(i)..P(0)C0.
// It also gives the group terms PG = P3P2P1P0 and GG (the carry the group
// generates on its own), so that generators can be stacked into a second
// lookahead level for wider adders.
//
// Ports: p, g (4 bits), c0 in; c[3:0] = C4..C1, pg, gg out. Combinational.
// The port set follows the classic 4-bit lookahead block; the equations are the
// standard ones.
module cla_gen4 (
  input  logic [3:0] p,
  input  logic [3:0] g,
  input  logic       c0,
  output logic [3:0] c,
  output logic       pg,
  output logic       gg
);
  always_comb begin
    c[0] = g[0] | (p[0] & c0);
    c[1] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c0);
    c[2] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c0);
    gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    pg   = &p;
    c[3] = gg | (pg & c0);
  end
endmodule
