// N-bit radix (two's complement) ripple adder/subtractor with condition codes.
//
// A cascade of N full adders; the carry ripples from bit 0 to bit N-1.  For a
// subtraction (sub = 1) the subtrahend is complemented bit by bit with XOR
// gates (its diminished-radix complement) and the carry into bit 0 is set to
// 1, which together form its radix complement.  The same circuit serves
// signed and unsigned operands.  Condition codes:
//   c : carry out of the sign position (for a subtraction, 1 = no borrow)
//   z : result is zero
//   n : sign bit of the result
//   v : overflow, carry into the sign position differs from carry out of it
// Combinational, no clock.  The width N is this design's choice (8, the data
// width of the simple computer, whose ALU uses this block).
module adder_subtractor #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,    // augend / minuend
  input  logic [N-1:0] b,    // addend / subtrahend
  input  logic         sub,  // 0: a + b, 1: a - b
  output logic [N-1:0] s,
  output logic         c,
  output logic         z,
  output logic         n,
  output logic         v
);
  logic [N:0]   carry;
  logic [N-1:0] bx;

  assign carry[0] = sub;
  assign bx       = b ^ {N{sub}};

  for (genvar i = 0; i < N; i++) begin : g_bit
    full_adder u_fa (
      .x   (a[i]),
      .y   (bx[i]),
      .cin (carry[i]),
      .s   (s[i]),
      .cout(carry[i+1])
    );
  end

  assign c = carry[N];
  assign z = (s == '0);
  assign n = s[N-1];
  assign v = carry[N] ^ carry[N-1];
endmodule
