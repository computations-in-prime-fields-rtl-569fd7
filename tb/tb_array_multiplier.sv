// tb_array_multiplier: exhaustive check of the 4 x 4 array multiplier and a
// random check of a 7 x 7 one. r must equal x*y.
module tb_array_multiplier;
  logic [3:0]  x4, y4;
  logic [7:0]  r4;
  logic [6:0]  x7, y7;
  logic [13:0] r7;
  int checks = 0, failures = 0;

  array_multiplier               dut4 (.x(x4), .y(y4), .r(r4));
  array_multiplier #(.N(7))      dut7 (.x(x7), .y(y7), .r(r7));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        x4 = 4'(i); y4 = 4'(j);
        #1;
        checks++;
        if (r4 != 8'(i * j)) begin
          failures++;
          $display("FAIL N=4 %0d*%0d -> %0d", i, j, r4);
        end
      end
    for (int n = 0; n < 2000; n++) begin
      x7 = 7'($urandom); y7 = 7'($urandom);
      if (n == 0) begin x7 = '1; y7 = '1; end
      #1;
      checks++;
      if (r7 != 14'(int'(x7) * int'(y7))) begin
        failures++;
        $display("FAIL N=7 %0d*%0d -> %0d", x7, y7, r7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
