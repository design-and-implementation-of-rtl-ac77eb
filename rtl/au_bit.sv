// One bit of the arithmetic unit, built from reversible gates.
//
// Sum:   F    = Y xor B xor Cin,  with Y = A'.C0 + A.C1
// Carry: Cout = (Y xor B) ? Cin : B
//
// C0 and C1 choose the operand Y added to B: 0, A, A' or all ones. For bit 0
// Cin is the control line C2; for the other bits it is the carry of the bit
// below, so a chain of slices computes B + Y + C2.
//
// Gate netlist (sum path as in the design's one-bit arithmetic unit):
//   RG3 (A, C0, 0)      -> A passed on, garbage, W1 = A'.C0
//   TG  (A, C1, 0)      -> garbage, garbage, A.C1
//   RG4 (A.C1, W1, B)   -> W3 = Y xor B, garbage, G4 = B
//   FG  (W3, Cin)       -> G5 = W3, F = W3 xor Cin
// The published slice draws a Toffoli gate in first position and writes the
// sum without a complement, which would give A.C0. This design uses an RG3
// there instead, because the published operation table (B - 1 and the two
// subtractions) needs the complemented term A'.C0; RG3 gives it from the
// same inputs, as it does at the head of the logic unit. The carry is this design's addition, since the published
// design describes a single bit only. It reuses two outputs that would otherwise be
// garbage: G4 equals B because A.C1 and A'.C0 are never both 1, and G5 is the
// propagate signal W3. A majority-gate multiplexer picks Cin when the bit
// propagates and B (the generate case) when it does not.
//
// An immediate assertion checks that G4 equals B in simulation.
//
// Purely combinational; the carry ripples through one multiplexer per bit.
module au_bit (
  input  logic a,
  input  logic b,
  input  logic c0,
  input  logic c1,
  input  logic cin,
  output logic f,
  output logic cout
);
  logic w0, w1, w3, t_ac1;
  logic g0, g1, g2, g3, g4, g5;

  rg3          u_g1 (.a(a),     .b(c0), .c(1'b0), .p(w0), .q(g0), .r(w1));
  toffoli_gate u_g2 (.a(w0),    .b(c1), .c(1'b0), .p(g1), .q(g2), .r(t_ac1));
  rg4          u_g3 (.a(t_ac1), .b(w1), .c(b),    .p(w3), .q(g3), .r(g4));
  feynman_gate u_g4 (.a(w3),    .b(cin),          .p(g5), .q(f));

  qca_mux2     u_carry (.s(g5), .d0(g4), .d1(cin), .y(cout));

  // The carry multiplexer relies on the RG4 copy output being B.
  always_comb
    assert (g4 == b) else $error("au_bit: RG4 output R differs from B");
endmodule
