// gauss_multiplier: multiplication in Z[i]/<a+bi>, a field isomorphic to Z_p
// with p = a^2 + b^2.
//
// Elements use the minimum-valuation representation. Each residue class is
// stored as its element c+di of least norm c^2+d^2. c and d are W-bit two's
// complement numbers: for p = 13 they are 0, +-1, +-i, +-1+-i, +-2 and +-2i.
// The product (c+di)(e+fi) = (ce - df) + (cf + de)i comes from four signed
// multipliers, a subtractor and an adder. This unreduced product usually lies
// outside the representative set, so it is then reduced. The reduction maps
// the product to its residue in Z_p with phi(u+vi) = u + k*v mod p, where
// k = -b^{-1}a mod p. A constant table then returns the least-norm member
// of that class. The table is computed while parameters are evaluated, from
// the same definition. Were two elements of a class to share the least norm,
// the first found would be kept, scanning the real part and then the
// imaginary part upward from the most negative value. No such tie occurs
// for 2+i, 3+2i or 4+i.
//
// Interface: x_re, x_im, y_re, y_im (W-bit signed) in; z_re, z_im out.
// Operands must be representatives. W must be wide enough to hold every
// representative; W = 3 covers p = 5, 13 and 17.
// Timing: purely combinational.
// The four signed multiplications are the published architecture. The way
// the product is reduced (a map to Z_p, then a table) is this design's own
// choice, because only the number of reduction cases is known.
module gauss_multiplier #(
  parameter int A = 3,
  parameter int B = 2,
  parameter int W = 3
) (
  input  logic signed [W-1:0] x_re,
  input  logic signed [W-1:0] x_im,
  input  logic signed [W-1:0] y_re,
  input  logic signed [W-1:0] y_im,
  output logic signed [W-1:0] z_re,
  output logic signed [W-1:0] z_im
);
  localparam int P    = A * A + B * B;
  localparam int K    = int'(gf_pkg::gauss_k(longint'(A), longint'(B)));
  localparam int CMIN = -(2 ** (W - 1));
  localparam int CMAX = (2 ** (W - 1)) - 1;

  typedef logic [P-1:0][2*W-1:0] rep_table_t;

  // For each class r of Z_p: {re, im} of its least-norm element.
  function automatic rep_table_t build_reps();
    rep_table_t tbl;
    int         best [P];
    int         cls;
    tbl = '0;
    for (int r = 0; r < P; r++) best[r] = -1;
    for (int re = CMIN; re <= CMAX; re++) begin
      for (int im = CMIN; im <= CMAX; im++) begin
        cls = int'(gf_pkg::mod_pos(longint'(re) + longint'(K) * im, longint'(P)));
        if (best[cls] < 0 || re * re + im * im < best[cls]) begin
          best[cls] = re * re + im * im;
          tbl[cls]  = {W'(re), W'(im)};
        end
      end
    end
    return tbl;
  endfunction

  localparam rep_table_t REPS = build_reps();

  // Four signed multiplications.
  logic signed [2*W-1:0] p_ce, p_df, p_cf, p_de;
  logic signed [2*W:0]   u, v;          // unreduced real and imaginary part
  always_comb begin
    p_ce = x_re * y_re;
    p_df = x_im * y_im;
    p_cf = x_re * y_im;
    p_de = x_im * y_re;
    u    = (2*W+1)'(p_ce) - (2*W+1)'(p_df);
    v    = (2*W+1)'(p_cf) + (2*W+1)'(p_de);
  end

  // Residue class of u + vi in Z_p, then its representative.
  int unsigned cls;
  always_comb begin
    int s;
    s   = int'(u) + K * int'(v);
    s   = s % P;
    if (s < 0) s += P;
    cls = s;
    {z_re, z_im} = REPS[cls];
  end
endmodule
