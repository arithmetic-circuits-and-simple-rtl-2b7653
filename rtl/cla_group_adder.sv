// Group ripple adder: a K x M-bit adder made of K cascaded M-bit carry
// look-ahead blocks.  Inside a block the carries are computed in parallel;
// between blocks the carry ripples, so the delay grows with K only.  This is
// the compromise suggested for adders too wide for a single CLA.
// Combinational.  M = 4 follows the original CLA block; K = 4 (a 16-bit
// adder) is this design's choice, the text leaves k open.
module cla_group_adder #(
  parameter int unsigned K = 4,
  parameter int unsigned M = 4
) (
  input  logic [K*M-1:0] x,
  input  logic [K*M-1:0] y,
  input  logic           cin,
  output logic [K*M-1:0] s,
  output logic           cout
);
  logic [K:0] gc;  // carries between the groups

  assign gc[0] = cin;
  for (genvar k = 0; k < K; k++) begin : g_grp
    cla_block #(.M(M)) u_cla (
      .x   (x[k*M +: M]),
      .y   (y[k*M +: M]),
      .cin (gc[k]),
      .s   (s[k*M +: M]),
      .cout(gc[k+1])
    );
  end
  assign cout = gc[K];
endmodule
