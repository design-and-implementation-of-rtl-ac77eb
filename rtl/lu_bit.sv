// One bit of the logic unit, built from nine reversible gates.
//
// F = A'B'.C0 + AB'.C1 + A'B.C2 + AB.C3
// The four control lines are the truth table of the function applied to
// (A, B), so all sixteen two-input functions are available (AND 0001, XOR
// 0110, OR 0111, NOR 1000, XNOR 1001, NAND 1110, ...).
//
// Gate netlist, as in the published logic unit:
//   stage 1, A chained through four gates:
//     RG3 (A, C0, 0) -> A'C0     RG2 (A, C1, 0) -> AC1
//     RG3 (A, C2, 0) -> A'C2     RG1 (A, C3, 1) -> AC3
//   stage 2, OR pairs:  RG4 (AC1, A'C0, 0), RG4 (AC3, A'C2, 0)
//   stage 3, gate by B: RG3 (B, AC1 + A'C0, 0) -> B'(...)
//                       RG1 (B, A'C2 + AC3, 1) -> B(...)
//   stage 4, OR:        RG4 (B'(...), B(...), 0) -> F
// The third input of the lower RG1 is tied to 1, which is what makes its
// output B.(A'C2 + AC3) as the output equation requires. The unused outputs
// are the garbage outputs of reversible logic and stay internal.
// Purely combinational.
module lu_bit (
  input  logic a,
  input  logic b,
  input  logic c0,
  input  logic c1,
  input  logic c2,
  input  logic c3,
  output logic f
);
  logic a1, a2, a3;
  logic nac0, ac1, nac2, ac3;
  logic or01, or23;
  logic b1, lo, hi;
  logic [14:1] g;

  // stage 1
  rg3 u_rg3_c0 (.a(a),  .b(c0), .c(1'b0), .p(a1),   .q(g[1]),  .r(nac0));
  rg2 u_rg2_c1 (.a(a1), .b(c1), .c(1'b0), .p(a2),   .q(g[2]),  .r(ac1));
  rg3 u_rg3_c2 (.a(a2), .b(c2), .c(1'b0), .p(a3),   .q(g[3]),  .r(nac2));
  rg1 u_rg1_c3 (.a(a3), .b(c3), .c(1'b1), .p(g[4]), .q(g[5]),  .r(ac3));
  // stage 2
  rg4 u_or01   (.a(ac1), .b(nac0), .c(1'b0), .p(or01), .q(g[6]), .r(g[7]));
  rg4 u_or23   (.a(ac3), .b(nac2), .c(1'b0), .p(or23), .q(g[8]), .r(g[9]));
  // stage 3
  rg3 u_gate_lo (.a(b),  .b(or01), .c(1'b0), .p(b1),    .q(g[10]), .r(lo));
  rg1 u_gate_hi (.a(b1), .b(or23), .c(1'b1), .p(g[11]), .q(g[12]), .r(hi));
  // stage 4
  rg4 u_or_out  (.a(lo), .b(hi), .c(1'b0), .p(f), .q(g[13]), .r(g[14]));
endmodule
