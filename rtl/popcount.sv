// Population ("vote") counter: counts how many of the N input bits are 1.
//
// Built as an array of half adders.  The count starts as the first input
// bit; each further input bit is added to the running count by a row of W
// half adders that works as an incrementer: the input bit enters the row as
// the carry into the least significant position, and each half adder sums
// one count bit with the carry from the position below.  After N-1 rows the
// count is complete.  W = $clog2(N+1) bits always suffice, so no row can
// overflow.  Purely combinational.
// Ports: x (N input bits, one per voter) and count (number of ones).
// Only the purpose and the use of half and full adders are the original's;
// the row-per-input arrangement and the default of 7 inputs (the most a
// 3-bit count can hold) are this design's own choices.
module popcount #(
  parameter int unsigned N = 7
) (
  input  logic [N-1:0]           x,
  output logic [$clog2(N+1)-1:0] count
);
  localparam int unsigned W = $clog2(N + 1);

  // sum[i] = number of ones in x[i:0]
  logic [N-1:0][W-1:0] sum;
  // carry chain of row i: cy[i][k] enters bit k
  logic [N-1:0][W:0]   cy;

  assign sum[0] = W'(x[0]);
  assign cy[0]  = '0;

  for (genvar i = 1; i < N; i++) begin : g_row
    assign cy[i][0] = x[i];
    for (genvar k = 0; k < W; k++) begin : g_ha
      half_adder u_ha (
        .x(sum[i-1][k]), .y(cy[i][k]), .s(sum[i][k]), .c(cy[i][k+1])
      );
    end
  end

  assign count = sum[N-1];
endmodule
