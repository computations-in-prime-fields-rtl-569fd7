// gauss_adder: addition in Z[i]/<a + (a-1)i>, a field isomorphic to Z_p
// with p = a^2 + (a-1)^2 (5, 13, 41, 61, 113, ...).
//
// Elements use the "positive" representation. Real and imaginary parts are
// non-negative binary numbers. Rows with Im < a-1 hold Re in 0..2a-2, and
// rows with a-1 <= Im <= a-1 hold Re in 0..a-1: an a x a square with an
// a-1 wide strip to its right. Adding two such elements gives real parts
// up to 4a-4 and imaginary parts up to 2a-2. Three conditional reductions,
// each a multiple of the modulus a+(a-1)i, bring the sum back into the set:
//   1. Re >= 2a-1            : add 1-2a+i  (2a-1 = i mod a+(a-1)i)
//   2. Re >= a and Im >= a-1  : subtract a+(a-1)i
//   3. Im >= a               : add a-1-ai
// The +i of step 1 costs nothing. The imaginary adder has a full adder at
// bit 0, and its carry in is the step 1 compare. So the real part is added
// and compared first, and the imaginary sum already holds the +i.
//
// Interface: x_re, y_re (NRE bits) and x_im, y_im (NIM bits) in; z_re,
// z_im out. Operands must be in the residue set; that is not checked.
// Timing: purely combinational: two ripple adders, then three stages of
// constant compare, ripple add/subtract of a constant and multiplexer.
// The reductions, the carry-in trick and the cell types of each stage are
// the published architecture. Writing the compares as word-level constant
// comparisons is this design's own choice. The carries and borrows out of
// the constant stages are unused: each compare has already decided that the
// stage's result is in range.
module gauss_adder #(
  parameter int A = 3,
  localparam int NRE = $clog2(2 * A - 1),
  localparam int NIM = $clog2(A)
) (
  input  logic [NRE-1:0] x_re,
  input  logic [NIM-1:0] x_im,
  input  logic [NRE-1:0] y_re,
  input  logic [NIM-1:0] y_im,
  output logic [NRE-1:0] z_re,
  output logic [NIM-1:0] z_im
);
  localparam logic [NRE:0] RE_2AM1 = (NRE+1)'(2 * A - 1);
  localparam logic [NRE:0] RE_A    = (NRE+1)'(A);
  localparam logic [NRE:0] RE_AM1  = (NRE+1)'(A - 1);
  localparam logic [NIM:0] IM_A    = (NIM+1)'(A);
  localparam logic [NIM:0] IM_AM1  = (NIM+1)'(A - 1);

  // "Re add": real parts, then the first compare.
  logic [NRE:0] re0;
  ripple_adder #(.N(NRE), .HAS_CIN(1'b0)) u_re_add (
    .a(x_re), .b(y_re), .cin(1'b0), .s(re0[NRE-1:0]), .cout(re0[NRE])
  );

  logic         red1;
  logic [NRE:0] re0_m;
  logic [NRE:0] re1;
  always_comb red1 = (re0 >= RE_2AM1);   // >= 2a-1
  logic unused_b1;
  ripple_subtractor #(.N(NRE+1)) u_sub1 (   // -2a+1
    .a(re0), .b(RE_2AM1), .d(re0_m), .bout(unused_b1)
  );
  mux2 #(.W(NRE+1)) u_mux1 (.sel(red1), .d0(re0), .d1(re0_m), .y(re1));

  // "Im add": imaginary parts plus the +i of the first reduction.
  logic [NIM:0] im1;
  ripple_adder #(.N(NIM), .HAS_CIN(1'b1)) u_im_add (
    .a(x_im), .b(y_im), .cin(red1), .s(im1[NIM-1:0]), .cout(im1[NIM])
  );

  // Second reduction: subtract a + (a-1)i.
  logic         red2;
  logic [NRE:0] re1_m;
  logic [NIM:0] im1_m;
  logic [NRE:0] re2;
  logic [NIM:0] im2;
  always_comb red2 = (re1 >= RE_A) && (im1 >= IM_AM1);  // >= a, >= a-1, AND
  logic unused_b2r, unused_b2i;
  ripple_subtractor #(.N(NRE+1)) u_sub2_re (  // -a
    .a(re1), .b(RE_A), .d(re1_m), .bout(unused_b2r)
  );
  ripple_subtractor #(.N(NIM+1)) u_sub2_im (  // -a+1
    .a(im1), .b(IM_AM1), .d(im1_m), .bout(unused_b2i)
  );
  mux2 #(.W(NRE+1)) u_mux2_re (.sel(red2), .d0(re1), .d1(re1_m), .y(re2));
  mux2 #(.W(NIM+1)) u_mux2_im (.sel(red2), .d0(im1), .d1(im1_m), .y(im2));

  // Third reduction: add (a-1) - ai.
  logic         red3;
  logic [NRE:0] re2_p;
  logic [NIM:0] im2_m;
  logic [NRE:0] re3;
  logic [NIM:0] im3;
  always_comb red3 = (im2 >= IM_A);      // >= a
  logic unused_c3, unused_b3;
  ripple_adder #(.N(NRE+1), .HAS_CIN(1'b0)) u_add3_re (  // a-1
    .a(re2), .b(RE_AM1), .cin(1'b0), .s(re2_p), .cout(unused_c3)
  );
  ripple_subtractor #(.N(NIM+1)) u_sub3_im (  // -a
    .a(im2), .b(IM_A), .d(im2_m), .bout(unused_b3)
  );
  mux2 #(.W(NRE+1)) u_mux3_re (.sel(red3), .d0(re2), .d1(re2_p), .y(re3));
  mux2 #(.W(NIM+1)) u_mux3_im (.sel(red3), .d0(im2), .d1(im2_m), .y(im3));

  // After the three reductions Re <= 2a-2 and Im <= a-1, so the top bits
  // are zero.
  assign z_re = re3[NRE-1:0];
  assign z_im = im3[NIM-1:0];
endmodule
