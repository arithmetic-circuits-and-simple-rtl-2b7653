// Nine's complement of a BCD digit: Y = 9 - X, the diminished-radix
// complement in base 10.  Codes above 9 are not BCD digits and give 0000, as
// in the original "nine's complement box".  Combinational.
module nines_complement (
  input  logic [3:0] x,
  output logic [3:0] y
);
  assign y = (x <= 4'd9) ? 4'd9 - x : 4'd0;
endmodule
