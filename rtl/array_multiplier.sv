// N x M unsigned combinational array multiplier.
//
// The product is the "paper-and-pencil" sum of M product components: row j
// is the multiplicand X shifted left by j and ANDed with multiplier bit Y_j
// (N x M AND gates in all, one per X_i.Y_j term).  Rows 1..M-1 each add their
// component to the running partial sum with a row of N full adders whose
// carries ripple along the row; the carry out of a row becomes the top bit of
// its partial sum.  Bit j of the product leaves the array at row j, and the
// last row gives the upper N bits.  The result has N+M bits.
// Combinational.  The 4x4 default is the size of the original example; the
// cell arrangement (one ripple row per multiplier bit after the first) is the
// usual array and is this design's reading of the "rows and diagonals" text.
module array_multiplier #(
  parameter int unsigned N = 4,  // multiplicand width
  parameter int unsigned M = 4   // multiplier width
) (
  input  logic [N-1:0]   x,  // multiplicand
  input  logic [M-1:0]   y,  // multiplier
  output logic [N+M-1:0] p
);
  // pc[j][i] = X_i . Y_j  (product component bits)
  logic [M-1:0][N-1:0] pc;
  // ps[j] = N+1-bit partial sum entering/leaving row j
  logic [M-1:0][N:0]   ps;
  // carry chain of each row
  logic [M-1:0][N:0]   rc;

  for (genvar j = 0; j < M; j++) begin : g_pc
    assign pc[j] = x & {N{y[j]}};
  end

  assign ps[0] = {1'b0, pc[0]};
  assign p[0]  = pc[0][0];

  for (genvar j = 1; j < M; j++) begin : g_row
    assign rc[j][0] = 1'b0;
    for (genvar i = 0; i < N; i++) begin : g_cell
      full_adder u_fa (
        .x   (pc[j][i]),
        .y   (ps[j-1][i+1]),
        .cin (rc[j][i]),
        .s   (ps[j][i]),
        .cout(rc[j][i+1])
      );
    end
    assign ps[j][N] = rc[j][N];
    assign p[j]     = ps[j][0];
  end
  assign rc[0] = '0;

  assign p[N+M-1:M] = ps[M-1][N:1];
endmodule
