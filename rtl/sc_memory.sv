// 32 x 8 read/write memory of the simple computer.
//
// Holds the program, its operands and its results.  Three active-high
// controls: MSL selects the memory, MOE (with MSL) drives the word at the
// address bus onto the data bus, MWE (with MSL) stores the data bus into the
// word at the address bus.  Reads are combinational in the address, as in an
// SRAM built of latches.  The latch-based write of the original (the cell's
// latch is open while select and write are both asserted) is realised here as
// a write on the rising clock edge that ends the cycle in which MSL and MWE
// are asserted; address and data are stable on the buses for the whole
// cycle, so the stored value is the same.
// Bus drivers: the tri-state data outputs are modelled as an output that is
// zero unless enabled; the enclosing design ORs all drivers of a bus.
// The ld_* port is this design's own addition: a host-side port that writes
// and reads words directly (to load a program and read results) while the
// machine is stopped or held in START.  The 32 x 8 size is the original's.
module sc_memory #(
  parameter int unsigned ADDR_W = 5,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              msl,
  input  logic              moe,
  input  logic              mwe,
  input  logic [ADDR_W-1:0] addr,      // address bus
  input  logic [DATA_W-1:0] db_in,     // data bus (write data)
  output logic [DATA_W-1:0] db_drv,    // drive onto data bus (0 when off)
  input  logic              ld_we,     // host write
  input  logic [ADDR_W-1:0] ld_addr,
  input  logic [DATA_W-1:0] ld_wdata,
  output logic [DATA_W-1:0] ld_rdata   // host read (combinational)
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (ld_we)          mem[ld_addr] <= ld_wdata;
    else if (msl & mwe) mem[addr]    <= db_in;
  end

  assign db_drv   = (msl & moe) ? mem[addr] : '0;
  assign ld_rdata = mem[ld_addr];

  // A memory is never asked to read and write in the same cycle.
  a_no_read_write: assert property (@(posedge clk) !(msl && moe && mwe))
    else $error("memory read and write at once");
endmodule
