// End-to-end testbench for the ALU at its default parameters.
//
// Drives every control word (both Sel values, all codes of C0..C3) with
// corner and random operands and compares Y and Cout with a word-level
// model: for Sel = 0 the named arithmetic operation of {C0,C1,C2}, for
// Sel = 1 the named bitwise function of {C0,C1,C2,C3}; Cout is the carry of
// the arithmetic operation in both modes.
//
// It also counts how often each behaviour of the design occurred: the
// arithmetic and logic modes, each of the 8 arithmetic and 16 logic codes,
// a carry out, a carry rippling through all bits, a subtraction that borrows
// (B < A) and a decrement that wraps (B = 0). Each must occur at least once.
module tb_qca_alu;
  import qca_alu_pkg::*;
  localparam int unsigned W = ALU_WIDTH;

  logic [W-1:0] a, b, y;
  alu_ctrl_t    ctrl;
  logic         cout;
  int checks = 0, failures = 0;

  int n_arith = 0, n_logic = 0, n_carry = 0, n_full_ripple = 0;
  int n_borrow = 0, n_dec_wrap = 0;
  int n_au_op [8];
  int n_lu_op [16];

  qca_alu dut (.a(a), .b(b), .ctrl(ctrl), .y(y), .cout(cout));

  function automatic logic [W:0] arith_ref(au_op_e op, logic [W-1:0] x, logic [W-1:0] z);
    logic [W:0] xw = {1'b0, x};
    logic [W:0] zw = {1'b0, z};
    logic [W:0] ones = {1'b0, {W{1'b1}}};
    case (op)
      AU_TRANSFER_B:  return zw;
      AU_INCREMENT_B: return zw + 1;
      AU_ADD:         return xw + zw;
      AU_ADD_CARRY:   return xw + zw + 1;
      AU_SUB_ONES:    return zw + (ones ^ xw);
      AU_SUB_TWOS:    return zw + (ones ^ xw) + 1;
      AU_DECREMENT_B: return zw + ones;
      default:        return zw + ones + 1;
    endcase
  endfunction

  function automatic logic [W-1:0] logic_ref(lu_op_e op, logic [W-1:0] x, logic [W-1:0] z);
    case (op)
      LU_ZERO:     return '0;
      LU_AND:      return x & z;
      LU_NOTA_B:   return ~x & z;
      LU_COPY_B:   return z;
      LU_A_NOTB:   return x & ~z;
      LU_COPY_A:   return x;
      LU_XOR:      return x ^ z;
      LU_OR:       return x | z;
      LU_NOR:      return ~(x | z);
      LU_XNOR:     return ~(x ^ z);
      LU_NOT_A:    return ~x;
      LU_B_IMPL_A: return x | ~z;
      LU_NOT_B:    return ~z;
      LU_A_IMPL_B: return ~x | z;
      LU_NAND:     return ~(x & z);
      default:     return '1;
    endcase
  endfunction

  task automatic apply(logic [4:0] cw, logic [W-1:0] x, logic [W-1:0] z);
    au_op_e     aop;
    lu_op_e     lop;
    logic [W:0] ar;
    logic [W-1:0] exp_y;
    ctrl = alu_ctrl_t'(cw);
    a = x;
    b = z;
    #1;
    aop = au_op_e'({ctrl.c0, ctrl.c1, ctrl.c2});
    lop = lu_op_e'({ctrl.c0, ctrl.c1, ctrl.c2, ctrl.c3});
    ar = arith_ref(aop, x, z);
    exp_y = ctrl.sel ? logic_ref(lop, x, z) : ar[W-1:0];
    checks++;
    if (y !== exp_y || cout !== ar[W]) begin
      failures++;
      $display("FAIL sel=%0b c=%04b a=%h b=%h -> y=%h cout=%0b expected y=%h cout=%0b",
               ctrl.sel, cw[4:1], x, z, y, cout, exp_y, ar[W]);
    end
    // coverage of the design's behaviours
    if (ctrl.sel) begin
      n_logic++;
      n_lu_op[lop]++;
    end else begin
      n_arith++;
      n_au_op[aop]++;
      if (cout) n_carry++;
      if (aop == AU_INCREMENT_B && z == '1) n_full_ripple++;
      if (aop == AU_SUB_TWOS && z < x) n_borrow++;
      if (aop == AU_DECREMENT_B && z == '0) n_dec_wrap++;
    end
  endtask

  task automatic require(string what, int count);
    $display("  %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  initial begin
    logic [W-1:0] corners [0:4];
    corners = '{'0, W'(1), '1, {1'b1, {(W-1){1'b0}}}, W'(16'h3c96)};
    for (int cw = 0; cw < 32; cw++) begin
      foreach (corners[i])
        foreach (corners[j])
          apply(5'(cw), corners[i], corners[j]);
      repeat (300) apply(5'(cw), W'($urandom), W'($urandom));
    end
    repeat (5000) apply(5'($urandom), W'($urandom), W'($urandom));

    $display("behaviours seen:");
    require("arithmetic mode (Sel=0)", n_arith);
    require("logic mode (Sel=1)", n_logic);
    for (int i = 0; i < 8; i++)
      require($sformatf("arithmetic code %s", au_op_e'(i)), n_au_op[i]);
    for (int i = 0; i < 16; i++)
      require($sformatf("logic code %s", lu_op_e'(i)), n_lu_op[i]);
    require("carry out", n_carry);
    require("carry through all bits", n_full_ripple);
    require("subtraction with borrow", n_borrow);
    require("decrement wrapping at 0", n_dec_wrap);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
