// Magnitude comparator: decides whether A = B, A < B or A > B by computing
// A - B with a radix adder/subtractor and reading its condition codes.
//   signed   (IS_SIGNED = 1): A = B if Z;  A < B if N xor V;  A > B otherwise
//   unsigned (IS_SIGNED = 0): A = B if Z;  A < B if not C (a borrow occurred)
// Exactly one of eq, lt, gt is high.  Combinational.  The 4-bit signed
// default and the subtract-and-examine-flags method are those of the original
// comparator example; the unsigned option is the "(signed or unsigned)"
// variant it mentions, with the usual borrow rule.
module magnitude_comparator #(
  parameter int unsigned N         = 4,
  parameter bit          IS_SIGNED = 1'b1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         eq,
  output logic         lt,
  output logic         gt
);
  logic [N-1:0] diff;
  logic c, z, n, v;

  adder_subtractor #(.N(N)) u_sub (
    .a(a), .b(b), .sub(1'b1), .s(diff), .c(c), .z(z), .n(n), .v(v)
  );

  assign eq = z;
  assign lt = IS_SIGNED ? (n ^ v) : ~c;
  assign gt = ~eq & ~lt;
endmodule
