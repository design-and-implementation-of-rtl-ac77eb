// Testbench for arithmetic_unit at its default width. For each of the eight
// control codes it applies corner operands (0, 1, all ones, the sign bit)
// and random ones, and compares F and Cout with the named operation computed
// on integers one bit wider than the unit: B, B+1, A+B, A+B+1, B+~A, B-A
// (as B+~A+1), B-1 (as B+all ones) and B again.
module tb_arithmetic_unit;
  import qca_alu_pkg::*;
  localparam int unsigned W = ALU_WIDTH;

  logic [W-1:0] a, b, f;
  logic c0, c1, c2, cout;
  logic [W:0] expected;
  int checks = 0, failures = 0;

  arithmetic_unit dut (.a(a), .b(b), .c0(c0), .c1(c1), .c2(c2), .f(f), .cout(cout));

  function automatic logic [W:0] reference(au_op_e op, logic [W-1:0] x, logic [W-1:0] y);
    logic [W:0] xw = {1'b0, x};
    logic [W:0] yw = {1'b0, y};
    logic [W:0] ones = {1'b0, {W{1'b1}}};
    case (op)
      AU_TRANSFER_B:   return yw;
      AU_INCREMENT_B:  return yw + 1;
      AU_ADD:          return xw + yw;
      AU_ADD_CARRY:    return xw + yw + 1;
      AU_SUB_ONES:     return yw + (ones ^ xw);
      AU_SUB_TWOS:     return yw + (ones ^ xw) + 1;
      AU_DECREMENT_B:  return yw + ones;
      default:         return yw + ones + 1;   // AU_TRANSFER_B_1
    endcase
  endfunction

  task automatic check(au_op_e op, logic [W-1:0] x, logic [W-1:0] y);
    {c0, c1, c2} = op;
    a = x;
    b = y;
    #1;
    expected = reference(op, x, y);
    checks++;
    if ({cout, f} !== expected) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h -> cout=%0b f=%h expected cout=%0b f=%h",
               op.name(), x, y, cout, f, expected[W], expected[W-1:0]);
    end
  endtask

  initial begin
    logic [W-1:0] corners [0:4];
    corners = '{'0, W'(1), '1, {1'b1, {(W-1){1'b0}}}, W'(16'h5a5a)};
    for (int op = 0; op < 8; op++) begin
      foreach (corners[i])
        foreach (corners[j])
          check(au_op_e'(op), corners[i], corners[j]);
      repeat (500) check(au_op_e'(op), W'($urandom), W'($urandom));
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
