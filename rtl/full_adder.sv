// full_adder: one-bit full adder.
// Adds a, b and a carry in; s is the parity of the three bits and cout is
// their majority. Used for every carry-chain position above bit 0.
// Interface: a, b, cin in; s, cout out. Timing: purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
