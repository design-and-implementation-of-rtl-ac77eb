// Exhaustive testbench for feynman_gate: all four input pairs against the
// controlled-NOT truth table.
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  logic [1:0] expected [0:3] = '{2'b00, 2'b01, 2'b11, 2'b10};

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({p, q} !== expected[i]) begin
        failures++;
        $display("FAIL ab=%02b pq=%02b expected %02b", {a, b}, {p, q}, expected[i]);
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
