// ripple_subtractor: N-bit ripple-borrow subtractor built from one-bit cells.
// Computes d = a - b mod 2^N. Bit 0 is a half subtracter and bits 1..N-1 are
// full subtracters passing the borrow upward. bout is set exactly when a < b.
// In the field adders b is a constant (p or a multiple of it), so synthesis
// folds each cell down to a few gates.
// Interface: a, b in; d, bout out. Timing: combinational, with a borrow path
// through N cells.
module ripple_subtractor #(
  parameter int N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] d,
  output logic         bout
);
  logic [N:0] br;

  half_subtractor u_lsb (.a(a[0]), .b(b[0]), .d(d[0]), .bout(br[1]));
  for (genvar k = 1; k < N; k++) begin : g_bit
    full_subtractor u_fs (.a(a[k]), .b(b[k]), .bin(br[k]), .d(d[k]), .bout(br[k+1]));
  end

  assign br[0] = 1'b0;
  assign bout  = br[N];
endmodule
