// Half adder: adds two bits X and Y into a sum S = X xor Y and a carry
// C = X and Y.  Purely combinational.  In a carry look-ahead adder the same
// two outputs are the propagate (P = S) and generate (G = C) functions of a
// bit position.
module half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic c
);
  assign s = x ^ y;
  assign c = x & y;
endmodule
