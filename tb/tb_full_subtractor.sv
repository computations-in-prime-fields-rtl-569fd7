// tb_full_subtractor: exhaustive check of full_subtractor. For every input
// combination, a - b - bin as a two-bit two's complement number must equal
// {bout, d}.
module tb_full_subtractor;
  logic a, b, bin, d, bout;
  int checks = 0, failures = 0;

  full_subtractor dut (.a(a), .b(b), .bin(bin), .d(d), .bout(bout));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, bin} = 3'(i);
      #1;
      checks++;
      if (2'({bout, d}) != 2'(int'(a) - int'(b) - int'(bin))) begin
        failures++;
        $display("FAIL a=%0b b=%0b bin=%0b -> d=%0b bout=%0b", a, b, bin, d, bout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
