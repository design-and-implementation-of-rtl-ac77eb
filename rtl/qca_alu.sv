// 16-bit arithmetic and logic unit built from reversible gates and
// majority-gate multiplexers.
//
// An arithmetic unit and a logic unit see the same operands A and B and the
// same control lines C0..C2 (C3 goes to the logic unit only); a column of
// WIDTH two-to-one multiplexers, steered by the mode select Sel, passes one
// result to Y:
//   Sel = 0: Y = arithmetic result, B + Y' + C2 with Y' = A'.C0 + A.C1
//            (transfer, increment, add, subtract, decrement of B)
//   Sel = 1: Y = logic result, the bitwise function with truth table
//            {C0,C1,C2,C3} over (A,B) = (0,0), (1,0), (0,1), (1,1)
// Cout is the carry out of the arithmetic unit and is driven in both modes;
// the published design defines no carry output, so this port is an addition. Which
// Sel value picks the arithmetic unit is also this design's choice.
//
// Interface: a, b (WIDTH bits), ctrl (qca_alu_pkg::alu_ctrl_t), y, cout.
// Timing: purely combinational; the longest path is the WIDTH-bit ripple
// carry of the arithmetic unit followed by one multiplexer.
module qca_alu #(
  parameter int unsigned WIDTH = qca_alu_pkg::ALU_WIDTH
) (
  input  logic [WIDTH-1:0]       a,
  input  logic [WIDTH-1:0]       b,
  input  qca_alu_pkg::alu_ctrl_t ctrl,
  output logic [WIDTH-1:0]       y,
  output logic                   cout
);
  logic [WIDTH-1:0] f_au, f_lu;

  arithmetic_unit #(.WIDTH(WIDTH)) u_au (
    .a(a), .b(b), .c0(ctrl.c0), .c1(ctrl.c1), .c2(ctrl.c2),
    .f(f_au), .cout(cout)
  );

  logic_unit #(.WIDTH(WIDTH)) u_lu (
    .a(a), .b(b), .c0(ctrl.c0), .c1(ctrl.c1), .c2(ctrl.c2), .c3(ctrl.c3),
    .f(f_lu)
  );

  for (genvar i = 0; i < WIDTH; i++) begin : g_mux
    qca_mux2 u_mux (.s(ctrl.sel), .d0(f_au[i]), .d1(f_lu[i]), .y(y[i]));
  end
endmodule
