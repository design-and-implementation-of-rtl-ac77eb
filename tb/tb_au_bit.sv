// Exhaustive testbench for au_bit: all 32 combinations of A, B, C0, C1 and
// the carry in. The reference picks the addend from C0/C1 (0, A, A', 1) and
// adds it to B and the carry in as integers; F must be the low bit of that
// sum and Cout the high bit.
module tb_au_bit;
  logic a, b, c0, c1, cin, f, cout;
  logic addend;
  logic [1:0] sum;
  int checks = 0, failures = 0;

  au_bit dut (.a(a), .b(b), .c0(c0), .c1(c1), .cin(cin), .f(f), .cout(cout));

  initial begin
    for (int i = 0; i < 32; i++) begin
      {c0, c1, cin, a, b} = 5'(i);
      #1;
      unique case ({c0, c1})
        2'b00: addend = 1'b0;
        2'b01: addend = a;
        2'b10: addend = !a;
        2'b11: addend = 1'b1;
      endcase
      sum = 2'(addend) + 2'(b) + 2'(cin);
      checks++;
      if ({cout, f} !== sum) begin
        failures++;
        $display("FAIL c0c1=%02b cin=%0b a=%0b b=%0b -> cout,f=%02b expected %02b",
                 {c0, c1}, cin, a, b, {cout, f}, sum);
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
