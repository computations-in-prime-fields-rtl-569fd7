// array_multiplier: unsigned N x N bit-parallel array multiplier.
//
// This is long multiplication done by hand, laid out as an array. Row i
// ANDs multiplier bit x[i] with every bit of y. Row 0 is the first partial
// sum, and its bit 0 is the product bit r[0]. Each later row i adds x[i]*y
// to the upper N bits of the row before (the previous top carry included).
// The add is a ripple row with a half adder at bit 0 and full adders above.
// The low bit of each row is product bit r[i]. The last row supplies the
// upper N bits of the product.
// Cost: N^2 AND gates and N(N-1) one-bit adders.
//
// Interface: x, y (N bits) in; r (2N bits) = x*y out. N must be at least 2.
// Timing: purely combinational.
module array_multiplier #(
  parameter int N = 4
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] r
);
  logic [N-1:0][N-1:0] pp;    // pp[i] = x[i] AND y
  logic [N-1:0][N-1:0] acc;   // sum bits of row i
  logic [N-1:0]        top;   // carry out of row i

  always_comb begin
    for (int i = 0; i < N; i++) pp[i] = y & {N{x[i]}};
  end

  assign acc[0] = pp[0];
  assign top[0] = 1'b0;

  for (genvar i = 1; i < N; i++) begin : g_row
    ripple_adder #(.N(N), .HAS_CIN(1'b0)) u_row (
      .a({top[i-1], acc[i-1][N-1:1]}), .b(pp[i]), .cin(1'b0),
      .s(acc[i]), .cout(top[i])
    );
  end

  always_comb begin
    for (int i = 0; i < N; i++) r[i] = acc[i][0];
    r[2*N-1:N] = {top[N-1], acc[N-1][N-1:1]};
  end
endmodule
