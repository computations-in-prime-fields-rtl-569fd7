// gf_arith_top: the four prime-field arithmetic units for one prime, side
// by side.
//
// The prime is p = a^2 + (a-1)^2; the default a = 3 gives p = 13. One field,
// Z_13 ~ Z[i]/<3+2i>, is computed in two ways:
//   * zp_*  : ordinary binary residues 0..p-1 (zp_adder, zp_multiplier)
//   * gp_*  : Gaussian integers, positive representation (gauss_adder)
//   * gm_*  : Gaussian integers, least-norm representation, signed
//             components (gauss_multiplier)
// The units share no signals. Each keeps its own operand and result ports, so
// the two representations can be compared on the same field.
// Timing: purely combinational, with no clock or reset.
module gf_arith_top #(
  parameter int A = 3,
  localparam int B   = A - 1,
  localparam int P   = A * A + B * B,
  localparam int N   = $clog2(P),
  localparam int NRE = $clog2(2 * A - 1),
  localparam int NIM = $clog2(A),
  localparam int W   = $clog2(A) + 1
) (
  // Z_p addition and multiplication
  input  logic [N-1:0]          zp_c,
  input  logic [N-1:0]          zp_d,
  output logic [N-1:0]          zp_sum,
  output logic [N-1:0]          zp_prod,
  // Gaussian addition, positive representation
  input  logic [NRE-1:0]        gp_x_re,
  input  logic [NIM-1:0]        gp_x_im,
  input  logic [NRE-1:0]        gp_y_re,
  input  logic [NIM-1:0]        gp_y_im,
  output logic [NRE-1:0]        gp_sum_re,
  output logic [NIM-1:0]        gp_sum_im,
  // Gaussian multiplication, least-norm representation
  input  logic signed [W-1:0]   gm_x_re,
  input  logic signed [W-1:0]   gm_x_im,
  input  logic signed [W-1:0]   gm_y_re,
  input  logic signed [W-1:0]   gm_y_im,
  output logic signed [W-1:0]   gm_prod_re,
  output logic signed [W-1:0]   gm_prod_im
);
  zp_adder #(.P(P)) u_zp_add (.c(zp_c), .d(zp_d), .e(zp_sum));

  zp_multiplier #(.P(P)) u_zp_mul (.x(zp_c), .y(zp_d), .z(zp_prod));

  gauss_adder #(.A(A)) u_gauss_add (
    .x_re(gp_x_re), .x_im(gp_x_im), .y_re(gp_y_re), .y_im(gp_y_im),
    .z_re(gp_sum_re), .z_im(gp_sum_im)
  );

  gauss_multiplier #(.A(A), .B(B), .W(W)) u_gauss_mul (
    .x_re(gm_x_re), .x_im(gm_x_im), .y_re(gm_y_re), .y_im(gm_y_im),
    .z_re(gm_prod_re), .z_im(gm_prod_im)
  );
endmodule
