// Reversible gate RG4 (3x3): P = (A + B) xor C, Q = B, R = A.B xor C.
//
// With C tied to 0 its P output is the OR of A and B; with C used as a data
// input it gives (A + B) xor C, which the arithmetic slice uses to form the
// half sum. Combinational.
module rg4 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = (a | b) ^ c;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
