// tb_ripple_subtractor: exhaustive check of the 4-bit ripple subtractor.
// d must equal (a - b) mod 16, and bout must be set exactly when a < b.
module tb_ripple_subtractor;
  logic [3:0] a, b, d;
  logic       bout;
  int checks = 0, failures = 0;

  ripple_subtractor dut (.a(a), .b(b), .d(d), .bout(bout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (d != 4'(i - j) || bout != (i < j)) begin
          failures++;
          $display("FAIL %0d-%0d -> d=%0d bout=%0b", i, j, d, bout);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
