// Arithmetic unit: WIDTH-bit ripple chain of au_bit slices.
//
// Computes F = B + Y + C2 (mod 2^WIDTH), where every bit of Y is
// A'.C0 + A.C1. The eight codes {C0,C1,C2} give:
//   000 B          001 B + 1        010 A + B      011 A + B + 1
//   100 B + A'     101 B - A        110 B - 1      111 B
// C2 enters bit 0 as its carry in; each slice passes its carry to the next.
// Cout is the carry out of the top bit (for 101 it is 1 when B >= A, for 110
// it is 1 unless B is 0). The operation table and the per-bit sum come from
// the published design; joining the bits by a ripple carry is this design's choice, as
// that design shows only one bit. Combinational, with a WIDTH-long carry path.
module arithmetic_unit #(
  parameter int unsigned WIDTH = qca_alu_pkg::ALU_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c0,
  input  logic             c1,
  input  logic             c2,
  output logic [WIDTH-1:0] f,
  output logic             cout
);
  logic [WIDTH:0] carry;

  assign carry[0] = c2;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    au_bit u_bit (
      .a(a[i]), .b(b[i]), .c0(c0), .c1(c1),
      .cin(carry[i]), .f(f[i]), .cout(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];
endmodule
