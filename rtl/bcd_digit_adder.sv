// BCD (decimal) full adder for one digit.
//
// A conventional 4-bit binary adder forms the direct sum Z4..Z0 of the two
// BCD digits and the carry in.  Because six of the sixteen 4-bit codes are
// unused in BCD, the direct sum must be corrected when it exceeds 9 (1001):
// the correction circuit then adds 6 (0110) to Z3..Z0 and raises the decimal
// carry out, which stands for the tens position.  The carry out is
//   Cout = Z4 + Z3.Z2 + Z3.Z1
// i.e. 1 exactly when the direct sum is 10..19.  Combinational.  The adder/
// correction-circuit split follows the original circuit model; the carry
// equation is the standard one for "sum greater than nine".
module bcd_digit_adder (
  input  logic [3:0] x,     // BCD digit
  input  logic [3:0] y,     // BCD digit
  input  logic       cin,
  output logic [3:0] s,     // corrected BCD sum digit
  output logic       cout   // decimal carry (tens)
);
  logic [3:0] z;
  logic       z4;
  logic       unused_c;

  cla_block #(.M(4)) u_bin (.x(x), .y(y), .cin(cin), .s(z), .cout(z4));

  assign cout = z4 | (z[3] & z[2]) | (z[3] & z[1]);

  // Correction: add 0110 when the direct sum exceeds nine.
  cla_block #(.M(4)) u_fix (
    .x(z), .y({1'b0, cout, cout, 1'b0}), .cin(1'b0), .s(s), .cout(unused_c)
  );
endmodule
