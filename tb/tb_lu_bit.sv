// Exhaustive testbench for lu_bit: every control code C0..C3 with every
// (A, B) pair, 64 cases. The reference is the named two-input function of
// each code (AND, XOR, NOR, ...), written without the sum-of-products form.
module tb_lu_bit;
  import qca_alu_pkg::*;

  logic a, b, c0, c1, c2, c3, f, expected;
  int checks = 0, failures = 0;

  lu_bit dut (.a(a), .b(b), .c0(c0), .c1(c1), .c2(c2), .c3(c3), .f(f));

  initial begin
    for (int op = 0; op < 16; op++) begin
      for (int ab = 0; ab < 4; ab++) begin
        {c0, c1, c2, c3} = 4'(op);
        {a, b} = 2'(ab);
        #1;
        case (lu_op_e'(op))
          LU_ZERO:     expected = 1'b0;
          LU_AND:      expected = a & b;
          LU_NOTA_B:   expected = !a & b;
          LU_COPY_B:   expected = b;
          LU_A_NOTB:   expected = a & !b;
          LU_COPY_A:   expected = a;
          LU_XOR:      expected = a ^ b;
          LU_OR:       expected = a | b;
          LU_NOR:      expected = !(a | b);
          LU_XNOR:     expected = (a == b);
          LU_NOT_A:    expected = !a;
          LU_B_IMPL_A: expected = a | !b;
          LU_NOT_B:    expected = !b;
          LU_A_IMPL_B: expected = !a | b;
          LU_NAND:     expected = !(a & b);
          default:     expected = 1'b1;
        endcase
        checks++;
        if (f !== expected) begin
          failures++;
          $display("FAIL c=%04b a=%0b b=%0b f=%0b expected %0b", op[3:0], a, b, f, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
