// tb_ripple_adder: exhaustive check of the three-bit ripple adder (half
// adder at bit 0) and of a 5-bit adder with carry in (full adder at bit 0).
// {cout, s} must equal a + b (+ cin) for every input.
module tb_ripple_adder;
  logic [2:0] a3, b3, s3;
  logic       c3;
  logic [4:0] a5, b5, s5;
  logic       cin5, c5;
  int checks = 0, failures = 0;

  ripple_adder dut3 (.a(a3), .b(b3), .cin(1'b1), .s(s3), .cout(c3));
  ripple_adder #(.N(5), .HAS_CIN(1'b1)) dut5 (.a(a5), .b(b5), .cin(cin5), .s(s5), .cout(c5));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // The three-bit adder ignores cin (it is tied to 1 above on purpose).
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a3 = 3'(i); b3 = 3'(j);
        #1;
        checks++;
        if ({c3, s3} != 4'(i + j)) begin
          failures++;
          $display("FAIL N=3 %0d+%0d -> %0d", i, j, {c3, s3});
        end
      end
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++)
        for (int k = 0; k < 2; k++) begin
          a5 = 5'(i); b5 = 5'(j); cin5 = 1'(k);
          #1;
          checks++;
          if ({c5, s5} != 6'(i + j + k)) begin
            failures++;
            $display("FAIL N=5 %0d+%0d+%0d -> %0d", i, j, k, {c5, s5});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
