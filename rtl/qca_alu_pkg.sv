// Shared types and constants of the reversible-logic ALU.
//
// The ALU is steered by four control lines C0..C3 and a mode select Sel.
// alu_ctrl_t bundles them for the top-level port. The two enums name the
// control codes: au_op_e is {C0,C1,C2} for the arithmetic unit and lu_op_e
// is {C0,C1,C2,C3} for the logic unit, where each of C0..C3 is the output of
// the logic unit for one input pair (A,B) = (0,0), (1,0), (0,1), (1,1).
// The operation names follow the control tables of the design; the code
// values are the table rows. The logic code COPY_B is 0011, as the output
// equation gives it, and the four codes the table leaves unnamed are listed
// under the functions they compute.
package qca_alu_pkg;

  parameter int unsigned ALU_WIDTH = 16;

  typedef struct packed {
    logic c0;
    logic c1;
    logic c2;
    logic c3;
    logic sel;   // 0: arithmetic unit result, 1: logic unit result
  } alu_ctrl_t;

  // Arithmetic unit: F = B + Y + C2 with Y = A'.C0 + A.C1 per bit.
  typedef enum logic [2:0] {
    AU_TRANSFER_B   = 3'b000,  // B
    AU_INCREMENT_B  = 3'b001,  // B + 1
    AU_ADD          = 3'b010,  // A + B
    AU_ADD_CARRY    = 3'b011,  // A + B + 1
    AU_SUB_ONES     = 3'b100,  // B + A'       (one's complement B - A)
    AU_SUB_TWOS     = 3'b101,  // B + A' + 1   (two's complement B - A)
    AU_DECREMENT_B  = 3'b110,  // B - 1
    AU_TRANSFER_B_1 = 3'b111   // B
  } au_op_e;

  // Logic unit: F = A'B'.C0 + AB'.C1 + A'B.C2 + AB.C3 per bit.
  typedef enum logic [3:0] {
    LU_ZERO     = 4'b0000,
    LU_AND      = 4'b0001,
    LU_NOTA_B   = 4'b0010,  // A'.B
    LU_COPY_B   = 4'b0011,
    LU_A_NOTB   = 4'b0100,  // A.B'
    LU_COPY_A   = 4'b0101,
    LU_XOR      = 4'b0110,
    LU_OR       = 4'b0111,
    LU_NOR      = 4'b1000,
    LU_XNOR     = 4'b1001,  // equality
    LU_NOT_A    = 4'b1010,
    LU_A_IMPL_B = 4'b1011,  // A' + B
    LU_NOT_B    = 4'b1100,
    LU_B_IMPL_A = 4'b1101,  // A + B'
    LU_NAND     = 4'b1110,
    LU_ONE      = 4'b1111
  } lu_op_e;

endpackage
