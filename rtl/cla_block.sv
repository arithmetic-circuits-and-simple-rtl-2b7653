// M-bit carry look-ahead (CLA) adder block.
//
// Each bit position has a generate G_i = X_i.Y_i and a propagate
// P_i = X_i xor Y_i, both produced by a half adder.  Every carry is then
// expanded into a two-level sum of products of the P's, G's and Cin only:
//   C_i = G_i + G_(i-1).P_i + ... + G_0.P_1...P_i + Cin.P_0...P_i
// so that all carries, and hence all sum bits S_i = P_i xor C_(i-1), are
// produced in parallel instead of rippling.  C_(M-1) is the carry out.
// Combinational.  The equations and the XOR form of P follow the original
// 4-bit derivation; M = 4 is its size.  Larger M gives the "product term
// explosion" that the group ripple adder avoids.
module cla_block #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] x,
  input  logic [M-1:0] y,
  input  logic         cin,
  output logic [M-1:0] s,
  output logic         cout
);
  logic [M-1:0] p, g, c;

  for (genvar i = 0; i < M; i++) begin : g_pg
    half_adder u_ha (.x(x[i]), .y(y[i]), .s(p[i]), .c(g[i]));
  end

  // Expanded carry equations, one product term per generate plus Cin's term.
  always_comb begin
    for (int i = 0; i < M; i++) begin
      logic term;
      logic sop;
      sop = 1'b0;
      for (int j = 0; j <= i; j++) begin
        term = g[j];
        for (int k = j + 1; k <= i; k++) term = term & p[k];
        sop = sop | term;
      end
      term = cin;
      for (int k = 0; k <= i; k++) term = term & p[k];
      c[i] = sop | term;
    end
  end

  assign s[0] = p[0] ^ cin;
  for (genvar i = 1; i < M; i++) begin : g_sum
    assign s[i] = p[i] ^ c[i-1];
  end
  assign cout = c[M-1];
endmodule
