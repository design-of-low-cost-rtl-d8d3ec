// trc2 -- 2-bit two-rail checker cell.
//
// Inputs are two two-rail pairs (a1,b1) and (a2,b2); a pair is a code word when its
// two rails differ. The outputs are
//   f = a1&a2 | b1&b2      g = a1&b2 | b1&a2
// so (f,g) is a code word (01 or 10) exactly when both input pairs are, and 00 or
// 11 otherwise. The cell is the classic two-level AND-OR two-rail checker: it is
// self-testing and fault-secure for single stuck-at faults on its lines, which is
// why the error indication of the scheme is carried on two rails. Pin names follow
// the usual drawing of the cell; the equations are the standard ones for it.
//
// Combinational.
module trc2 (
  input  logic a1,
  input  logic b1,
  input  logic a2,
  input  logic b2,
  output logic f,
  output logic g
);

  assign f = (a1 & a2) | (b1 & b2);
  assign g = (a1 & b2) | (b1 & a2);

endmodule
