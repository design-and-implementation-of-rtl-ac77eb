// Feynman (controlled-NOT) gate (2x2): P = A, Q = A xor B.
//
// Besides the XOR it hands A through unchanged, which is how reversible
// circuits copy a signal (fan-out is not allowed). In the arithmetic slice it
// adds the incoming carry to the half sum. Combinational.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
