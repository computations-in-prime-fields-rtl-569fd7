// chk_zp_multiplier: drives one zp_multiplier instance with prime P and
// checks every result against x*y mod p computed with integer arithmetic.
// With RAND_N = 0 it tries all p*p operand pairs; otherwise RAND_N random
// pairs. For each reduction step i it counts how often the product, on
// reaching that step, was at least 2^i*p. This is worked out from the
// operands, not read from the design. n_steps_seen counts the steps that
// were taken at least once.
module chk_zp_multiplier #(
  parameter int unsigned P      = 13,
  parameter int          RAND_N = 0
) (
  output int   checks,
  output int   failures,
  output int   n_steps_seen,
  output int   done
);
  localparam int N = $clog2(P);
  logic [N-1:0] x, y, z;
  int step_cnt [N];

  zp_multiplier #(.P(P)) dut (.x(x), .y(y), .z(z));

  longint expv, t, ta, tb_;

  task automatic try_pair(longint a, longint b);
    ta = a; tb_ = b;
    x = N'(ta); y = N'(tb_);
    #1;
    expv = (ta * tb_) % longint'(P);
    t = ta * tb_;
    for (int i = N - 1; i >= 0; i--)
      if (t >= (longint'(P) << i)) begin
        t -= longint'(P) << i;
        step_cnt[i] = step_cnt[i] + 1;
      end
    checks++;
    if (longint'(z) != expv) begin
      failures++;
      if (failures < 10) $display("FAIL zp_multiplier p=%0d: %0d * %0d -> %0d, expected %0d", P, ta, tb_, z, expv);
    end
  endtask

  initial begin
    checks = 0; failures = 0; n_steps_seen = 0; done = 0;
    for (int i = 0; i < N; i++) step_cnt[i] = 0;
    if (RAND_N == 0) begin
      for (int a = 0; a < int'(P); a++)
        for (int b = 0; b < int'(P); b++) try_pair(longint'(a), longint'(b));
    end else begin
      try_pair(P - 1, P - 1);
      for (int k = 0; k < RAND_N; k++)
        try_pair(longint'($urandom % P), longint'($urandom % P));
    end
    for (int i = 0; i < N; i++) if (step_cnt[i] > 0) n_steps_seen++;
    done = 1;
  end
endmodule
