// Stack pointer (SP): a 5-bit register that holds the address of the top
// stack item.  The stack lives at the top of memory and grows toward lower
// addresses, so a push decrements SP first and then writes at the new SP,
// and a pop reads at SP and then increments it.
//   ARS asynchronous reset to 00000 (START); the first push then moves SP to
//       11111, the highest address, as in the stack-growth illustration
//   SPD decrement on the rising clock edge
//   SPI increment on the rising clock edge
//   SPA drive SP onto the address bus (zero when off)
// SPD has priority over SPI (the control tables never assert both).
module stack_pointer #(
  parameter int unsigned ADDR_W = 5
) (
  input  logic              clk,
  input  logic              ars,
  input  logic              spi,
  input  logic              spd,
  input  logic              spa,
  output logic [ADDR_W-1:0] adr_drv,
  output logic [ADDR_W-1:0] sp
);
  always_ff @(posedge clk or posedge ars) begin
    if (ars)      sp <= '0;
    else if (spd) sp <= sp - 1'b1;
    else if (spi) sp <= sp + 1'b1;
  end

  assign adr_drv = spa ? sp : '0;
endmodule
