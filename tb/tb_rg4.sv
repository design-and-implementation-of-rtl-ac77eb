// Exhaustive testbench for rg4: applies all eight input combinations and
// compares {P,Q,R} with a table worked out by hand from P = (A + B) xor C, Q = B, R = A.B xor C.
module tb_rg4;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  logic [2:0] expected [0:7] = '{3'b000, 3'b101, 3'b110, 3'b011, 3'b100, 3'b001, 3'b111, 3'b010};

  rg4 dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if ({p, q, r} !== expected[i]) begin
        failures++;
        $display("FAIL abc=%03b pqr=%03b expected %03b", {a, b, c}, {p, q, r}, expected[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
