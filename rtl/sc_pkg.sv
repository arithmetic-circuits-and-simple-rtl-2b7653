// Shared types and constants of the simple 8-bit computer.
//
// The machine has an 8-bit data path, a 5-bit address (32 memory words) and
// 8-bit instructions made of a 3-bit opcode and a 5-bit operand address.
// Opcodes 000..101 are fixed; the two spare opcodes 110 and 111 are given a
// different pair of instructions by each extension of the base machine, and
// one extension (SHIFT) re-uses 010..100 for shifts.  The extension in use is
// selected with an ext_e parameter.  The variant names and the control-word
// struct are this design's own; every opcode value and control signal name is
// the one of the original instruction set and control tables.
package sc_pkg;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned ADDR_W = 5;
  localparam int unsigned OP_W   = 3;

  // Instruction-set variants of the machine.
  typedef enum logic [2:0] {
    EXT_BASE  = 3'd0,  // HLT LDA ADD SUB AND STA
    EXT_SHIFT = 3'd1,  // HLT LDA LSR ASL ASR STA (shift ALU)
    EXT_IO    = 3'd2,  // base + IN (110), OUT (111)
    EXT_JUMP  = 3'd3,  // base + JMP (110), JZF (111)
    EXT_STACK = 3'd4,  // base + PSH (110), POP (111), multi-cycle execute
    EXT_SUBR  = 3'd5   // base + JSR (110), RTS (111), multi-cycle execute
  } ext_e;

  typedef logic [OP_W-1:0] opcode_t;

  localparam opcode_t OP_HLT = 3'b000;
  localparam opcode_t OP_LDA = 3'b001;
  localparam opcode_t OP_ADD = 3'b010;
  localparam opcode_t OP_SUB = 3'b011;
  localparam opcode_t OP_AND = 3'b100;
  localparam opcode_t OP_STA = 3'b101;
  localparam opcode_t OP_X6  = 3'b110;  // IN / JMP / PSH / JSR
  localparam opcode_t OP_X7  = 3'b111;  // OUT / JZF / POP / RTS
  // Shift variant
  localparam opcode_t OP_LSR = 3'b010;
  localparam opcode_t OP_ASL = 3'b011;
  localparam opcode_t OP_ASR = 3'b100;

  // Decoded micro-sequence states (S0 = fetch, S1..S3 = execute).
  typedef enum logic [1:0] {S0 = 2'd0, S1 = 2'd1, S2 = 2'd2, S3 = 2'd3} state_e;

  // System control signals, all active high.
  typedef struct packed {
    logic msl;  // memory select
    logic moe;  // memory output enable (onto data bus)
    logic mwe;  // memory write enable
    logic pcc;  // PC count enable
    logic poa;  // PC onto address bus
    logic pla;  // PC load from address bus
    logic pod;  // PC onto data bus
    logic pld;  // PC load from data bus
    logic irl;  // IR load
    logic ira;  // IR address field onto address bus
    logic aoe;  // A register onto data bus
    logic ale;  // ALU enable
    logic alx;  // ALU function select X
    logic aly;  // ALU function select Y
    logic spi;  // SP increment
    logic spd;  // SP decrement
    logic spa;  // SP onto address bus
    logic ior;  // I/O read (input port onto data bus)
    logic iow;  // I/O write (output port from data bus)
    logic rst;  // synchronous state counter reset (last execute state; STACK and SUBR only)
  } ctrl_t;

  // Condition codes.
  typedef struct packed {
    logic cf;
    logic zf;
    logic nf;
    logic vf;
  } flags_t;

endpackage
