// Testbench for logic_unit at its default width: for each of the sixteen
// control codes, corner and random operands are compared with the named
// bitwise function of that code computed on whole words.
module tb_logic_unit;
  import qca_alu_pkg::*;
  localparam int unsigned W = ALU_WIDTH;

  logic [W-1:0] a, b, f, expected;
  logic c0, c1, c2, c3;
  int checks = 0, failures = 0;

  logic_unit dut (.a(a), .b(b), .c0(c0), .c1(c1), .c2(c2), .c3(c3), .f(f));

  function automatic logic [W-1:0] reference(lu_op_e op, logic [W-1:0] x, logic [W-1:0] y);
    case (op)
      LU_ZERO:     return '0;
      LU_AND:      return x & y;
      LU_NOTA_B:   return ~x & y;
      LU_COPY_B:   return y;
      LU_A_NOTB:   return x & ~y;
      LU_COPY_A:   return x;
      LU_XOR:      return x ^ y;
      LU_OR:       return x | y;
      LU_NOR:      return ~(x | y);
      LU_XNOR:     return ~(x ^ y);
      LU_NOT_A:    return ~x;
      LU_B_IMPL_A: return x | ~y;
      LU_NOT_B:    return ~y;
      LU_A_IMPL_B: return ~x | y;
      LU_NAND:     return ~(x & y);
      default:     return '1;
    endcase
  endfunction

  task automatic check(lu_op_e op, logic [W-1:0] x, logic [W-1:0] y);
    {c0, c1, c2, c3} = op;
    a = x;
    b = y;
    #1;
    expected = reference(op, x, y);
    checks++;
    if (f !== expected) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h f=%h expected %h", op.name(), x, y, f, expected);
    end
  endtask

  initial begin
    for (int op = 0; op < 16; op++) begin
      check(lu_op_e'(op), '0, '0);
      check(lu_op_e'(op), '1, '1);
      check(lu_op_e'(op), W'(16'h00ff), W'(16'h0f0f));
      repeat (200) check(lu_op_e'(op), W'($urandom), W'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
