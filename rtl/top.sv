// Top level: the simple computer in each of its six instruction-set
// variants, and the stand-alone arithmetic circuits, side by side.
//
// Computers (index = sc_pkg::ext_e value):
//   0 BASE  HLT LDA ADD SUB AND STA
//   1 SHIFT HLT LDA LSR ASL ASR STA
//   2 IO    base + IN / OUT through the port at address 00000
//   3 JUMP  base + JMP / JZF
//   4 STACK base + PSH / POP
//   5 SUBR  base + JSR / RTS
// Each has its own START, host memory port, I/O pins and status outputs;
// all share the clock.
// Arithmetic circuits (combinational):
//   16-bit group ripple adder of 4-bit carry look-ahead blocks
//   4 x 4 unsigned array multiplier
//   2-digit BCD adder/subtractor
//   4-bit signed magnitude comparator
//   7-input population (vote) counter
module top #(
  parameter int unsigned NV = 6
) (
  input  logic                                 clk,
  // simple computers
  input  logic [NV-1:0]                        start,
  input  logic [NV-1:0]                        ld_we,
  input  logic [NV-1:0][sc_pkg::ADDR_W-1:0]    ld_addr,
  input  logic [NV-1:0][sc_pkg::DATA_W-1:0]    ld_wdata,
  output logic [NV-1:0][sc_pkg::DATA_W-1:0]    ld_rdata,
  input  logic [NV-1:0][sc_pkg::DATA_W-1:0]    in_port,
  output logic [NV-1:0][sc_pkg::DATA_W-1:0]    out_port,
  output logic [NV-1:0]                        run,
  output logic [NV-1:0][sc_pkg::ADDR_W-1:0]    pc,
  output logic [NV-1:0][sc_pkg::DATA_W-1:0]    acc,
  output sc_pkg::flags_t [NV-1:0]              flags,
  output logic [NV-1:0][sc_pkg::ADDR_W-1:0]    sp,
  // CLA group adder
  input  logic [15:0]                          cla_x,
  input  logic [15:0]                          cla_y,
  input  logic                                 cla_cin,
  output logic [15:0]                          cla_s,
  output logic                                 cla_cout,
  // array multiplier
  input  logic [3:0]                           mul_x,
  input  logic [3:0]                           mul_y,
  output logic [7:0]                           mul_p,
  // BCD adder/subtractor
  input  logic [7:0]                           bcd_a,
  input  logic [7:0]                           bcd_b,
  input  logic                                 bcd_sub,
  output logic [7:0]                           bcd_s,
  output logic                                 bcd_cout,
  // magnitude comparator
  input  logic [3:0]                           cmp_a,
  input  logic [3:0]                           cmp_b,
  output logic                                 cmp_eq,
  output logic                                 cmp_lt,
  output logic                                 cmp_gt,
  // population counter
  input  logic [6:0]                           pop_x,
  output logic [2:0]                           pop_count
);
  import sc_pkg::*;

  for (genvar i = 0; i < NV; i++) begin : g_cpu
    logic [DATA_W-1:0] out_q;  // this computer's output pins
    assign out_port[i] = out_q;
    simple_computer #(.EXT(ext_e'(i))) u_cpu (
      .clk(clk), .start(start[i]),
      .ld_we(ld_we[i]), .ld_addr(ld_addr[i]), .ld_wdata(ld_wdata[i]),
      .ld_rdata(ld_rdata[i]), .in_port(in_port[i]), .out_port(out_q),
      .run(run[i]), .pc(pc[i]), .acc(acc[i]), .flags(flags[i]), .sp(sp[i])
    );
  end

  cla_group_adder #(.K(4), .M(4)) u_cla (
    .x(cla_x), .y(cla_y), .cin(cla_cin), .s(cla_s), .cout(cla_cout)
  );

  array_multiplier #(.N(4), .M(4)) u_mul (.x(mul_x), .y(mul_y), .p(mul_p));

  bcd_adder_subtractor #(.DIGITS(2)) u_bcd (
    .a(bcd_a), .b(bcd_b), .sub(bcd_sub), .s(bcd_s), .cout(bcd_cout)
  );

  magnitude_comparator #(.N(4), .IS_SIGNED(1'b1)) u_cmp (
    .a(cmp_a), .b(cmp_b), .eq(cmp_eq), .lt(cmp_lt), .gt(cmp_gt)
  );

  popcount #(.N(7)) u_pop (.x(pop_x), .count(pop_count));
endmodule
