// DIGITS-digit BCD adder/subtractor.
//
// A ripple of decimal full adders (bcd_digit_adder), the decimal carry of each
// digit feeding the next.  For a subtraction (sub = 1) every digit of the
// subtrahend passes through a nine's complementer and the carry into the
// least significant digit is set to 1, which forms the ten's (radix)
// complement of the subtrahend: the same method as the binary adder/
// subtractor, with base 10.  For a subtraction cout = 1 means no borrow
// (a >= b) and the result is a - b; cout = 0 means a < b and the result is
// the ten's complement of b - a.  Combinational.  The structure answers the
// original "n-digit BCD adder/subtractor" question; DIGITS = 2 (one packed-
// BCD byte) is this design's choice.
module bcd_adder_subtractor #(
  parameter int unsigned DIGITS = 2
) (
  input  logic [4*DIGITS-1:0] a,
  input  logic [4*DIGITS-1:0] b,
  input  logic                sub,
  output logic [4*DIGITS-1:0] s,
  output logic                cout
);
  logic [DIGITS:0] dc;  // decimal carries

  assign dc[0] = sub;
  for (genvar d = 0; d < DIGITS; d++) begin : g_dig
    logic [3:0] b9, bsel;
    nines_complement u_nc (.x(b[4*d +: 4]), .y(b9));
    assign bsel = sub ? b9 : b[4*d +: 4];
    bcd_digit_adder u_add (
      .x(a[4*d +: 4]), .y(bsel), .cin(dc[d]), .s(s[4*d +: 4]), .cout(dc[d+1])
    );
  end
  assign cout = dc[DIGITS];
endmodule
