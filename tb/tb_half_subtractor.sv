// tb_half_subtractor: exhaustive check of half_subtractor. For every input
// pair, a - b as a two-bit two's complement number must equal {bout, d}.
module tb_half_subtractor;
  logic a, b, d, bout;
  int checks = 0, failures = 0;

  half_subtractor dut (.a(a), .b(b), .d(d), .bout(bout));

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
      if (2'({bout, d}) != 2'(int'(a) - int'(b))) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> d=%0b bout=%0b", a, b, d, bout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
