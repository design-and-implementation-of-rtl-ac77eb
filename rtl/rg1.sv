// Reversible gate RG1 (3x3): P = A, Q = A xor B, R = A.B xor C'.
//
// One of the four new reversible gates the ALU is built from. With C tied to
// 1 the R output is the AND of A and B while A is passed on through P; the
// logic unit uses it that way. Combinational.
module rg1 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ ~c;
endmodule
