// Program counter (PC): a 5-bit binary up counter that points to the next
// instruction to fetch.
// Controls (active high):
//   ARS asynchronous reset to 00000 (connected to START)
//   PCC count enable: PC <= PC + 1 on the clock edge
//   PLA load from the address bus (jumps, JSR)
//   PLD load from the lower 5 bits of the data bus (RTS)
//   POA drive PC onto the address bus
//   POD drive PC, padded with three zeros, onto the data bus (JSR)
// Priority when several loads are asserted: PLA, then PLD, then PCC, as in
// the original PC.  Loads take effect on the rising clock edge; the bus
// drives are combinational, and are zero when disabled (the enclosing design
// ORs the drivers of each bus in place of tri-state buffers).  Because the
// PC changes only after the edge, the instruction fetched with the old PC is
// loaded into the IR on the same edge that increments the PC.
module program_counter #(
  parameter int unsigned ADDR_W = 5,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              ars,
  input  logic              pcc,
  input  logic              pla,
  input  logic              pld,
  input  logic              poa,
  input  logic              pod,
  input  logic [ADDR_W-1:0] adr_in,   // address bus
  input  logic [DATA_W-1:0] db_in,    // data bus
  output logic [ADDR_W-1:0] adr_drv,  // drive onto address bus
  output logic [DATA_W-1:0] db_drv,   // drive onto data bus
  output logic [ADDR_W-1:0] pc
);
  always_ff @(posedge clk or posedge ars) begin
    if (ars)      pc <= '0;
    else if (pla) pc <= adr_in;
    else if (pld) pc <= db_in[ADDR_W-1:0];
    else if (pcc) pc <= pc + 1'b1;
  end

  assign adr_drv = poa ? pc : '0;
  assign db_drv  = pod ? {{(DATA_W-ADDR_W){1'b0}}, pc} : '0;
endmodule
