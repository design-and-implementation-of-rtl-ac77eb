// Exhaustive testbench for majority_gate: all eight input combinations
// against the majority truth table (output 1 when two or more inputs are 1).
module tb_majority_gate;
  logic a, b, c, m;
  int checks = 0, failures = 0;
  logic expected [0:7] = '{1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b1, 1'b1, 1'b1};

  majority_gate dut (.a(a), .b(b), .c(c), .m(m));

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if (m !== expected[i]) begin
        failures++;
        $display("FAIL abc=%03b m=%0b expected %0b", {a, b, c}, m, expected[i]);
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
