// Exhaustive testbench for rev_not: both input values.
module tb_rev_not;
  logic a, p;
  int checks = 0, failures = 0;

  rev_not dut (.a(a), .p(p));

  initial begin
    for (int i = 0; i < 2; i++) begin
      a = 1'(i);
      #1;
      checks++;
      if (p !== (i == 0)) begin
        failures++;
        $display("FAIL a=%0b p=%0b", a, p);
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
