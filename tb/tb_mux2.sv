// tb_mux2: random check of an 8-bit mux2. For random words and both select
// values, y must equal d1 when sel is 1 and d0 otherwise.
module tb_mux2;
  localparam int W = 8;
  logic         sel;
  logic [W-1:0] d0, d1, y;
  int checks = 0, failures = 0;

  mux2 #(.W(W)) dut (.sel(sel), .d0(d0), .d1(d1), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      d0  = W'($urandom);
      d1  = W'($urandom);
      sel = 1'(i);
      #1;
      checks++;
      if (y != (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%0b d0=%h d1=%h y=%h", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
