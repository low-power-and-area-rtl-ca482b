// full_adder: one-bit full adder cell.
//
// Purely combinational. Besides the sum and carry it exposes the bit propagate
// (a ^ b) and generate (a & b) terms, so the same cell serves both the carry look
// ahead adder, where a separate generator forms the carries from p and g, and
// the borrow-save adder, where its own carry output is used.
//
// Ports: a, b, ci in; s = a^b^ci, co = majority(a,b,ci), p = a^b, g = a&b.
// The cell and its S/P/G outputs follow the published adder diagrams; taking
// propagate as a^b (rather than a|b) is this design's choice.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co,
  output logic p,
  output logic g
);
  always_comb begin
    p  = a ^ b;
    g  = a & b;
    s  = p ^ ci;
    co = g | (p & ci);
  end
endmodule
