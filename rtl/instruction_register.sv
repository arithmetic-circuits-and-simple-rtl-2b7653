// Instruction register (IR): an 8-bit register that stages the instruction
// fetched from memory while it is decoded and executed.
//   IRL load the data bus on the rising clock edge (fetch cycle)
//   IRA drive the 5-bit operand address field IR[4:0] onto the address bus
// The 3-bit opcode field IR[7:5] goes straight to the instruction decoder.
// The clear on ARS (START) is this design's choice, so that a decoded opcode
// is defined before the first fetch; the original does not reset the IR.
module instruction_register #(
  parameter int unsigned ADDR_W = 5,
  parameter int unsigned DATA_W = 8
) (
  input  logic                     clk,
  input  logic                     ars,
  input  logic                     irl,
  input  logic                     ira,
  input  logic [DATA_W-1:0]        db_in,
  output logic [DATA_W-ADDR_W-1:0] op,
  output logic [ADDR_W-1:0]        adr_drv
);
  logic [DATA_W-1:0] ir;

  always_ff @(posedge clk or posedge ars) begin
    if (ars)      ir <= '0;
    else if (irl) ir <= db_in;
  end

  assign op      = ir[DATA_W-1:ADDR_W];
  assign adr_drv = ira ? ir[ADDR_W-1:0] : '0;
endmodule
