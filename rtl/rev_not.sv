// Reversible NOT gate (1x1): P = A'.
//
// The simplest reversible gate. In this ALU it inverts the select line of the
// majority-gate multiplexer. Combinational, no timing of its own.
module rev_not (
  input  logic a,
  output logic p
);
  assign p = ~a;
endmodule
