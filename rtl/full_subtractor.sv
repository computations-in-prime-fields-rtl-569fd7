// full_subtractor: one-bit full subtracter.
// Computes a - b - bin: d is the parity of the three bits and bout is set
// when the result is negative, i.e. (not a and b), (not a and bin) or
// (b and bin). Interface: a, b, bin in; d, bout out. Combinational.
module full_subtractor (
  input  logic a,
  input  logic b,
  input  logic bin,
  output logic d,
  output logic bout
);
  always_comb begin
    d    = a ^ b ^ bin;
    bout = (~a & b) | (~a & bin) | (b & bin);
  end
endmodule
