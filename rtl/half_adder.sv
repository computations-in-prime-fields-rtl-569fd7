// half_adder: one-bit half adder.
// Adds two bits: s is their exclusive or, cout their and. This is the cell
// that starts every carry chain in the adders and the array multiplier.
// Interface: a, b in; s, cout out. Timing: purely combinational.
// The truth table is the standard one; nothing here is a design choice.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = a ^ b;
    cout = a & b;
  end
endmodule
