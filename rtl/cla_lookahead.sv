// cla_lookahead: carry look ahead tree over NG four-bit groups.
//
// Given each group's propagate/generate pair (pg[k], gg[k]) and the carry into
// group 0, it returns the carry into every group, c[k], with c[0] = c0 and
// c[NG] the carry out of the whole. It is a fixed three-level tree of
// cla_gen4 blocks:
//   level 1 takes the groups four at a time and gives block PG/GG terms,
//   level 2 takes those four at a time, and
//   level 3, a single block, forms the carries into the level-2 blocks.
// Carries then flow back down: each block's carry in is the carry out of the
// position just below it at the level above. Missing inputs of the last block
// of a level are tied to propagate 0, generate 0, which changes no carry below
// them. Three levels cover up to 64 groups (256 bits); unused levels reduce
// to wires in synthesis. The tree is this design's own way of widening the
// four-bit block; the block itself is the classic one.
//
// Combinational: six gate levels up, six down.
module cla_lookahead #(
  parameter int NG = 16
) (
  input  logic [NG-1:0] pg,
  input  logic [NG-1:0] gg,
  input  logic          c0,
  output logic [NG:0]   c
);
  localparam int N2 = (NG + 3) / 4;   // level-1 blocks
  localparam int N3 = (N2 + 3) / 4;   // level-2 blocks

  logic [4*N2-1:0] pg1, gg1, cout1;
  logic [N2-1:0]   cin1, spg1, sgg1;
  logic [4*N3-1:0] pg2, gg2, cout2;
  logic [N3-1:0]   cin2, spg2, sgg2;
  logic [3:0]      pg3, gg3, cout3;
  logic            spg3_unused, sgg3_unused;

  always_comb begin
    pg1 = '0;  gg1 = '0;  pg1[NG-1:0] = pg;    gg1[NG-1:0] = gg;
    pg2 = '0;  gg2 = '0;  pg2[N2-1:0] = spg1;  gg2[N2-1:0] = sgg1;
    pg3 = '0;  gg3 = '0;  pg3[N3-1:0] = spg2;  gg3[N3-1:0] = sgg2;
  end

  // Carry into block k of a level = carry out of position k-1 one level up.
  always_comb begin
    cin1 = '0;
    cin2 = '0;
    for (int k = 0; k < N2; k++) cin1[k] = (k == 0) ? c0 : cout2[k-1];
    for (int j = 0; j < N3; j++) cin2[j] = (j == 0) ? c0 : cout3[j-1];
  end

  for (genvar k = 0; k < N2; k++) begin : g_l1
    cla_gen4 u_gen (.p(pg1[4*k +: 4]), .g(gg1[4*k +: 4]), .c0(cin1[k]),
                    .c(cout1[4*k +: 4]), .pg(spg1[k]), .gg(sgg1[k]));
  end
  for (genvar j = 0; j < N3; j++) begin : g_l2
    cla_gen4 u_gen (.p(pg2[4*j +: 4]), .g(gg2[4*j +: 4]), .c0(cin2[j]),
                    .c(cout2[4*j +: 4]), .pg(spg2[j]), .gg(sgg2[j]));
  end
  cla_gen4 u_l3 (.p(pg3), .g(gg3), .c0(c0), .c(cout3), .pg(spg3_unused), .gg(sgg3_unused));

  assign c = {cout1[NG-1:0], c0};

  initial assert (NG >= 1 && NG <= 64) else $error("cla_lookahead: NG must be 1..64");
endmodule
