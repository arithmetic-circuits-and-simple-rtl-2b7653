// Simple 8-bit stored-program computer.
//
// An accumulator machine: one data register (A) plus the condition codes
// CF, VF, NF, ZF.  Each 8-bit instruction holds a 3-bit opcode and a 5-bit
// memory address; one operand is A, the other the addressed memory word.
// Functional blocks: 32 x 8 memory, program counter, instruction register,
// ALU with A and the flags, instruction decoder/microsequencer, and,
// depending on the variant, a stack pointer (STACK, SUBR) and an I/O port
// at address 00000 (IO).  They talk over a 5-bit address bus and an 8-bit
// data bus; each bus has exactly one driver per cycle.
//
// Every instruction starts with a fetch cycle S0: PC on the address bus,
// memory onto the data bus, IR loaded and PC incremented on the same rising
// edge.  One execute cycle S1 follows (LDA, ADD, SUB, AND, STA, shifts, IN,
// OUT, JMP, JZF, POP, RTS); PSH takes S1+S2, JSR S1+S2+S3.
//
// EXT selects the instruction set of opcodes 110/111 (see sc_pkg); the
// default is the final form of the machine with JSR/RTS.  START (active
// high, asynchronous) clears PC, SP, IR, A, flags and the state counter and
// sets RUN; HLT clears RUN and the machine stops in S0.
//
// The tri-state buses of the original are modelled as the OR of the block
// outputs, each of which is zero unless its enable is high; undriven bus
// lines read as 0.  Assertions check that at most one block drives each bus.
// The host port ld_* (load/read memory while stopped or in START) is this
// design's own addition; the original does not say how a program gets into
// memory.
module simple_computer #(
  parameter sc_pkg::ext_e EXT         = sc_pkg::EXT_SUBR,
  parameter bit           OUT_LATCHED = 1'b1
) (
  input  logic                        clk,
  input  logic                        start,
  // host access to memory
  input  logic                        ld_we,
  input  logic [sc_pkg::ADDR_W-1:0]   ld_addr,
  input  logic [sc_pkg::DATA_W-1:0]   ld_wdata,
  output logic [sc_pkg::DATA_W-1:0]   ld_rdata,
  // I/O port (EXT_IO only; out_port reads 0 otherwise)
  input  logic [sc_pkg::DATA_W-1:0]   in_port,
  output logic [sc_pkg::DATA_W-1:0]   out_port,
  // status
  output logic                        run,
  output logic [sc_pkg::ADDR_W-1:0]   pc,
  output logic [sc_pkg::DATA_W-1:0]   acc,
  output sc_pkg::flags_t              flags,
  output logic [sc_pkg::ADDR_W-1:0]   sp
);
  import sc_pkg::*;

  ctrl_t             ctrl;
  state_e            state;
  opcode_t           op;
  logic [ADDR_W-1:0] adr_bus, pc_adr, ir_adr, sp_adr;
  logic [DATA_W-1:0] db_bus, mem_db, alu_db, pc_db, io_db;

  assign adr_bus = pc_adr | ir_adr | sp_adr;
  assign db_bus  = mem_db | alu_db | pc_db | io_db;

  idms #(.EXT(EXT)) u_idms (
    .clk(clk), .start(start), .op(op), .zf(flags.zf),
    .ctrl(ctrl), .run(run), .state(state)
  );

  sc_memory #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_mem (
    .clk(clk), .msl(ctrl.msl), .moe(ctrl.moe), .mwe(ctrl.mwe),
    .addr(adr_bus), .db_in(db_bus), .db_drv(mem_db),
    .ld_we(ld_we), .ld_addr(ld_addr), .ld_wdata(ld_wdata), .ld_rdata(ld_rdata)
  );

  program_counter #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_pc (
    .clk(clk), .ars(start), .pcc(ctrl.pcc), .pla(ctrl.pla), .pld(ctrl.pld),
    .poa(ctrl.poa), .pod(ctrl.pod), .adr_in(adr_bus), .db_in(db_bus),
    .adr_drv(pc_adr), .db_drv(pc_db), .pc(pc)
  );

  instruction_register #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_ir (
    .clk(clk), .ars(start), .irl(ctrl.irl), .ira(ctrl.ira), .db_in(db_bus),
    .op(op), .adr_drv(ir_adr)
  );

  alu #(.DATA_W(DATA_W), .SHIFT_ALU(EXT == EXT_SHIFT)) u_alu (
    .clk(clk), .ars(start), .ale(ctrl.ale), .alx(ctrl.alx), .aly(ctrl.aly),
    .aoe(ctrl.aoe), .db_in(db_bus), .db_drv(alu_db), .a(acc), .flags(flags)
  );

  if (EXT == EXT_STACK || EXT == EXT_SUBR) begin : g_sp
    stack_pointer #(.ADDR_W(ADDR_W)) u_sp (
      .clk(clk), .ars(start), .spi(ctrl.spi), .spd(ctrl.spd), .spa(ctrl.spa),
      .adr_drv(sp_adr), .sp(sp)
    );
  end else begin : g_no_sp
    assign sp_adr = '0;
    assign sp     = '0;
  end

  if (EXT == EXT_IO) begin : g_io
    io_port #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .OUT_LATCHED(OUT_LATCHED)) u_io (
      .adr(adr_bus), .ior(ctrl.ior), .iow(ctrl.iow), .in_port(in_port),
      .db_in(db_bus), .db_drv(io_db), .out_port(out_port)
    );
  end else begin : g_no_io
    assign io_db    = '0;
    assign out_port = '0;
  end

  // Bus rules: only one device drives a bus in any machine cycle.
  a_adr_one_driver: assert property (@(posedge clk) disable iff (start)
    $onehot0({ctrl.poa, ctrl.ira, ctrl.spa}))
    else $error("address bus driven by more than one block");
  a_db_one_driver: assert property (@(posedge clk) disable iff (start)
    $onehot0({ctrl.msl & ctrl.moe, ctrl.aoe, ctrl.pod, ctrl.ior}))
    else $error("data bus driven by more than one block");
  // The host port is used only while the machine is held or stopped.
  a_ld_when_idle: assert property (@(posedge clk) ld_we |-> (start || !run))
    else $error("memory loaded while the machine runs");
endmodule
