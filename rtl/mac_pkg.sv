// mac_pkg: constants shared by the multiply-accumulate unit and its tests.
//
// MAC_N is the operand width (32 bits; the unit is also meant for 16-bit
// operands, which fit after sign extension). MAC_SEG is the width of one
// borrow-save accumulator segment, i.e. the spacing of the carry flip-flops.
// MAC_LATENCY is the number of clock edges from operands to the result that
// includes them.
package mac_pkg;
  parameter int MAC_N       = 32;
  parameter int MAC_SEG     = 4;
  parameter int MAC_LATENCY = 3;
endpackage
