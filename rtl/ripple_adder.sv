// ripple_adder: N-bit ripple-carry adder built from one-bit cells.
// Bit 0 is a half adder, and bits 1..N-1 are full adders chained through
// their carries. The final carry is cout, so {cout, s} is the full N+1-bit
// sum. With HAS_CIN = 1, bit 0 is a full adder as well and cin is added. The
// Gaussian adder uses that to add i for free in its first reduction. With
// HAS_CIN = 0, cin is ignored.
// Interface: a, b, cin in; s, cout out. Timing: combinational, with a
// carry path through N cells. The default N = 3 is the three-bit adder built
// from one half and two full adders.
module ripple_adder #(
  parameter int N       = 3,
  parameter bit HAS_CIN = 1'b0
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N:0] c;

  if (HAS_CIN) begin : g_lsb_fa
    full_adder u_lsb (.a(a[0]), .b(b[0]), .cin(cin), .s(s[0]), .cout(c[1]));
  end else begin : g_lsb_ha
    half_adder u_lsb (.a(a[0]), .b(b[0]), .s(s[0]), .cout(c[1]));
    // cin is not used in this configuration
    logic unused_cin;
    assign unused_cin = cin;
  end

  for (genvar k = 1; k < N; k++) begin : g_bit
    full_adder u_fa (.a(a[k]), .b(b[k]), .cin(c[k]), .s(s[k]), .cout(c[k+1]));
  end

  assign c[0] = 1'b0;
  assign cout = c[N];
endmodule
