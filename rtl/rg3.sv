// Reversible gate RG3 (3x3): P = A, Q = A xor B, R = A'.B xor C.
//
// With C tied to 0 the R output is B gated by the complement of A, while A
// is passed on; the logic and arithmetic slices use it to form terms such as
// A'.C0. The complement is read as applying to the A input, which is what
// the gate's uses in the logic unit require. Combinational.
module rg3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (~a & b) ^ c;
endmodule
