// Memory-mapped-style I/O block at port address 00000, used by the IN and OUT
// instructions.
//   IOR with the port selected: the input port pins drive the data bus
//   IOW with the port selected: the data bus is written to the output port
// The port is selected when the address bus holds 00000.  With OUT_LATCHED = 1
// (the main form) the output port is a transparent latch: open while IOW and
// the select are high, holding afterwards, so the pins keep the last value
// written until the next OUT.  With OUT_LATCHED = 0 the pins show the data
// bus only during the OUT execute cycle and are 00000000 otherwise (that form
// drives zeros when idle; the original leaves that level open).
// The latch is intended: it is the output latch of the original I/O block.
module io_port #(
  parameter int unsigned ADDR_W      = 5,
  parameter int unsigned DATA_W      = 8,
  parameter bit          OUT_LATCHED = 1'b1
) (
  input  logic [ADDR_W-1:0] adr,       // address bus
  input  logic              ior,
  input  logic              iow,
  input  logic [DATA_W-1:0] in_port,
  input  logic [DATA_W-1:0] db_in,     // data bus
  output logic [DATA_W-1:0] db_drv,    // drive onto data bus (0 when off)
  output logic [DATA_W-1:0] out_port
);
  logic ps;  // port select

  assign ps     = (adr == '0);
  assign db_drv = (ior & ps) ? in_port : '0;

  if (OUT_LATCHED) begin : g_latch
    always_latch begin
      if (iow & ps) out_port = db_in;
    end
  end else begin : g_nolatch
    assign out_port = (iow & ps) ? db_in : '0;
  end
endmodule
