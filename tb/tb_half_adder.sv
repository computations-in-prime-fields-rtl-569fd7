// tb_half_adder: exhaustive check of half_adder against integer addition.
// All four input pairs are applied; {cout, s} must equal a + b.
module tb_half_adder;
  logic a, b, s, cout;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .cout(cout));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (2'({cout, s}) != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> s=%0b cout=%0b", a, b, s, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
