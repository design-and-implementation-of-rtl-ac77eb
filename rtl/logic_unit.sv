// Logic unit: WIDTH independent lu_bit slices sharing the control lines.
//
// Every bit computes F = A'B'.C0 + AB'.C1 + A'B.C2 + AB.C3, so {C0,C1,C2,C3}
// is the truth table of the bitwise function applied to A and B (see
// qca_alu_pkg::lu_op_e). No signal passes between bits. Combinational.
module logic_unit #(
  parameter int unsigned WIDTH = qca_alu_pkg::ALU_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c0,
  input  logic             c1,
  input  logic             c2,
  input  logic             c3,
  output logic [WIDTH-1:0] f
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    lu_bit u_bit (
      .a(a[i]), .b(b[i]), .c0(c0), .c1(c1), .c2(c2), .c3(c3), .f(f[i])
    );
  end
endmodule
