// mux2: two-input multiplexer for W-bit words.
// y follows d1 when sel is 1 and d0 when sel is 0. Every reduction step in
// the field adders and multipliers ends in one of these: it picks either
// the reduced or the unreduced value. The select polarity is this design's
// convention. Interface: sel, d0, d1 in; y out. Combinational.
module mux2 #(
  parameter int W = 1
) (
  input  logic         sel,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  output logic [W-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule
