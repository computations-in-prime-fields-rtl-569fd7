// zp_multiplier: multiplication in the prime field Z_p, z = x*y mod p.
//
// An array multiplier forms the full 2N-bit product. Since x, y <= p-1 and
// y < 2^N, the product is below 2^N * p. N reduction steps follow, for i =
// N-1 down to 0. Step i compares the running value with the constant 2^i*p
// and, when it is not smaller, subtracts it. The result is below p when the
// last step is done. The process is restoring long division by p, with the
// quotient bits discarded. Each step is a constant compare, a ripple
// subtractor with a constant input, and a row of multiplexers.
//
// Interface: x, y (N = ceil(log2 p) bits, each below p) in; z (N bits) out.
// Timing: purely combinational.
// The multiplier and the conditional subtraction of 2^i*p are the published
// architecture. The order of the steps (largest multiple first) is this
// design's own choice. It is the order in which N steps are always enough.
module zp_multiplier #(
  parameter int unsigned P = 13,
  localparam int N = $clog2(P)
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] z
);
  localparam int M = 2 * N;

  // t[N] is the raw product, t[i] the value after the step with 2^i*p.
  logic [N:0][M-1:0] t;

  array_multiplier #(.N(N)) u_mul (.x(x), .y(y), .r(t[N]));

  for (genvar i = N - 1; i >= 0; i--) begin : g_red
    localparam logic [M-1:0] KP = M'(longint'(P) << i);
    logic [M-1:0] diff;
    logic         borrow;
    logic         ge;

    ripple_subtractor #(.N(M)) u_sub (.a(t[i+1]), .b(KP), .d(diff), .bout(borrow));
    always_comb ge = (t[i+1] >= KP);
    mux2 #(.W(M)) u_mux (.sel(ge), .d0(t[i+1]), .d1(diff), .y(t[i]));
  end

  assign z = t[0][N-1:0];
endmodule
