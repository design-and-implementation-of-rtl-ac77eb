// Two-to-one multiplexer built from majority gates: Y = S'.D0 + S.D1.
//
// Three majority gates and an inverter, as in the QCA multiplexer layout:
// two majority gates with one input fixed to 0 act as ANDs (D0 with S',
// D1 with S) and a third with one input fixed to 1 ORs them. D0 is taken
// when S is 0; which data input goes with the inverted select is this
// design's choice, made so that S = 0 picks the arithmetic result in the
// ALU. Used as the ALU's output selector and as the carry selector of the
// arithmetic slice. Combinational.
module qca_mux2 (
  input  logic s,
  input  logic d0,
  input  logic d1,
  output logic y
);
  logic s_n, t0, t1;

  rev_not       u_inv  (.a(s), .p(s_n));
  majority_gate u_and0 (.a(d0), .b(s_n), .c(1'b0), .m(t0));
  majority_gate u_and1 (.a(d1), .b(s),   .c(1'b0), .m(t1));
  majority_gate u_or   (.a(t0), .b(t1),  .c(1'b1), .m(y));
endmodule
