// Three-input majority gate: M = A.B + B.C + A.C.
//
// The basic logic element of quantum-dot cellular automata: a device cell
// takes the polarisation held by most of its three neighbours. Fixing one
// input to 0 gives a two-input AND, fixing it to 1 gives an OR. Combinational.
module majority_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic m
);
  assign m = (a & b) | (b & c) | (a & c);
endmodule
