// chk_zp_adder: drives one zp_adder instance with prime P and checks every
// result against (c + d) mod p computed with integer arithmetic. With
// RAND_N = 0 it tries all p*p operand pairs; otherwise RAND_N random pairs.
// It counts how often the sum reached p, i.e. how often the subtraction path
// was taken. Results appear on the output ports once done is set.
module chk_zp_adder #(
  parameter int unsigned P      = 13,
  parameter int          RAND_N = 0
) (
  output int   checks,
  output int   failures,
  output int   n_reduced,
  output int   done
);
  localparam int N = $clog2(P);
  logic [N-1:0] c, d, e;

  zp_adder #(.P(P)) dut (.c(c), .d(d), .e(e));

  task automatic try_pair(longint x, longint y);
    longint expv;
    c = N'(x); d = N'(y);
    #1;
    expv = (x + y) % P;
    checks++;
    if (x + y >= P) n_reduced++;
    if (longint'(e) != expv) begin
      failures++;
      if (failures < 10) $display("FAIL zp_adder p=%0d: %0d + %0d -> %0d, expected %0d", P, x, y, e, expv);
    end
  endtask

  initial begin
    checks = 0; failures = 0; n_reduced = 0; done = 0;
    if (RAND_N == 0) begin
      for (longint x = 0; x < P; x++)
        for (longint y = 0; y < P; y++) try_pair(x, y);
    end else begin
      try_pair(P - 1, P - 1);
      try_pair(0, 0);
      for (int k = 0; k < RAND_N; k++)
        try_pair(longint'($urandom % P), longint'($urandom % P));
    end
    done = 1;
  end
endmodule
