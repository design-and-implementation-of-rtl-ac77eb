// Reversible gate RG2 (3x3): P = A xor C, Q = B, R = A.B xor C.
//
// With C tied to 0 it passes A through P and gives A.B on R; the logic unit
// uses it to form A.C1. Combinational.
module rg2 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a ^ c;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
