// Full adder: adds two operand bits and a carry-in into a sum bit and a
// carry-out, S = X xor Y xor Cin, Cout = X.Y + Cin.(X xor Y).  Purely
// combinational; the building cell of the ripple adder/subtractor and of the
// array multiplier.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic s,
  output logic cout
);
  assign s    = x ^ y ^ cin;
  assign cout = (x & y) | (cin & (x ^ y));
endmodule
