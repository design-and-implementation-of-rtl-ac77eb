// Exhaustive testbench for qca_mux2: all eight (s, d0, d1) combinations;
// y must equal d0 when s is 0 and d1 when s is 1.
module tb_qca_mux2;
  logic s, d0, d1, y;
  int checks = 0, failures = 0;

  qca_mux2 dut (.s(s), .d0(d0), .d1(d1), .y(y));

  initial begin
    for (int i = 0; i < 8; i++) begin
      {s, d0, d1} = 3'(i);
      #1;
      checks++;
      if (y !== (s ? d1 : d0)) begin
        failures++;
        $display("FAIL s=%0b d0=%0b d1=%0b y=%0b", s, d0, d1, y);
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
