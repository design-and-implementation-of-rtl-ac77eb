// Toffoli gate (3x3): P = A, Q = B, R = A.B xor C.
//
// With C tied to 0 it is a reversible AND whose inputs are passed on. The
// arithmetic slice uses one to form A.C1. Combinational.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
