// zp_adder: addition in the prime field Z_p, e = (c + d) mod p.
//
// Both operands are plain binary numbers below p, so their sum is at most
// 2p - 2. One conditional subtraction of p is enough. A ripple-carry adder
// forms the N+1-bit sum. In parallel, a ripple subtractor forms the low N
// bits of sum - p, and a constant comparator tests sum >= p. A row of
// multiplexers then keeps either the raw sum or the difference. When the sum
// overflows into bit N, the low N bits of the difference are still exact,
// because the result is below p < 2^N. The borrow out of the subtractor
// therefore goes unused.
//
// Interface: c, d (N bits, each below p) in; e (N bits) out. Operands must
// already be reduced mod p; larger ones are not detected.
// Timing: purely combinational, with no registers, clock or reset.
// The structure (adder row, subtractor row with constant p, compare, mux row)
// is the published one. Writing the compare as a constant comparison is this
// design's own choice.
module zp_adder #(
  parameter int unsigned P = 13,
  localparam int N = $clog2(P)
) (
  input  logic [N-1:0] c,
  input  logic [N-1:0] d,
  output logic [N-1:0] e
);
  localparam logic [N-1:0] P_N  = N'(P);
  localparam logic [N:0]   P_N1 = (N+1)'(P);

  logic [N-1:0] sum;
  logic         sum_c;
  logic [N-1:0] diff;
  logic         diff_b;
  logic         ge_p;

  ripple_adder #(.N(N), .HAS_CIN(1'b0)) u_add (
    .a(c), .b(d), .cin(1'b0), .s(sum), .cout(sum_c)
  );

  ripple_subtractor #(.N(N)) u_sub (
    .a(sum), .b(P_N), .d(diff), .bout(diff_b)
  );

  // Compare circuit: is the full N+1-bit sum at least p?
  always_comb ge_p = ({sum_c, sum} >= P_N1);

  mux2 #(.W(N)) u_mux (.sel(ge_p), .d0(sum), .d1(diff), .y(e));
endmodule
