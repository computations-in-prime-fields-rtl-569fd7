// half_subtractor: one-bit half subtracter.
// Computes a - b: d is a xor b and bout is set when a borrow is needed
// (a = 0, b = 1). It starts the borrow chain of ripple_subtractor.
// Interface: a (minuend), b (subtrahend) in; d, bout out. Combinational.
module half_subtractor (
  input  logic a,
  input  logic b,
  output logic d,
  output logic bout
);
  always_comb begin
    d    = a ^ b;
    bout = ~a & b;
  end
endmodule
