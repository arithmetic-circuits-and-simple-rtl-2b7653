// Arithmetic logic unit with the accumulator (A register) and the condition
// code flags CF, ZF, NF, VF.
//
// The operand comes from the data bus; the result is written back into A on
// the rising clock edge when ALE is asserted.  ALX/ALY select the function.
// Base ALU (SHIFT_ALU = 0):
//   ALX ALY  function                     flags changed
//    0   0   ADD  A <- A + DB             CF ZF NF VF
//    0   1   SUB  A <- A - DB             CF ZF NF VF
//    1   0   LDA  A <- DB                 ZF NF
//    1   1   AND  A <- A & DB             ZF NF
// Shift ALU (SHIFT_ALU = 1), the alternative with shift instructions:
//    0   0   LDA  A <- DB                 ZF NF
//    0   1   LSR  A <- 0,A7..A1  CF<-A0   CF ZF NF
//    1   0   ASL  A <- A6..A0,0  CF<-A7   CF ZF NF
//    1   1   ASR  A <- A7,A7..A1 CF<-A0   CF ZF NF
// AOE drives A onto the data bus (zero when off).  Flags not listed keep
// their value.  ADD and SUB use the ripple adder/subtractor, so CF is the
// carry out of the sign position (1 = no borrow after SUB) and VF is the
// overflow.  Function codes and flag effects follow the original ALU tables.
// The clear of A and the flags on ARS (START) is this design's choice.
module alu #(
  parameter int unsigned DATA_W    = 8,
  parameter bit          SHIFT_ALU = 1'b0
) (
  input  logic              clk,
  input  logic              ars,
  input  logic              ale,
  input  logic              alx,
  input  logic              aly,
  input  logic              aoe,
  input  logic [DATA_W-1:0] db_in,
  output logic [DATA_W-1:0] db_drv,
  output logic [DATA_W-1:0] a,
  output sc_pkg::flags_t    flags
);
  import sc_pkg::*;

  logic [DATA_W-1:0] res;
  flags_t            nflags;

  if (!SHIFT_ALU) begin : g_arith
    logic [DATA_W-1:0] sum;
    logic c, z, n, v;

    // ALY selects subtraction for ADD (00) and SUB (01).
    adder_subtractor #(.N(DATA_W)) u_addsub (
      .a(a), .b(db_in), .sub(aly), .s(sum), .c(c), .z(z), .n(n), .v(v)
    );

    always_comb begin
      nflags = flags;
      unique case ({alx, aly})
        2'b00, 2'b01: begin
          res    = sum;
          nflags = '{cf: c, zf: z, nf: n, vf: v};
        end
        2'b10:   res = db_in;
        default: res = a & db_in;
      endcase
      if (alx) begin
        nflags.zf = (res == '0);
        nflags.nf = res[DATA_W-1];
      end
    end
  end else begin : g_shift
    always_comb begin
      nflags = flags;
      unique case ({alx, aly})
        2'b00: res = db_in;
        2'b01: begin
          res       = {1'b0, a[DATA_W-1:1]};
          nflags.cf = a[0];
        end
        2'b10: begin
          res       = {a[DATA_W-2:0], 1'b0};
          nflags.cf = a[DATA_W-1];
        end
        default: begin
          res       = {a[DATA_W-1], a[DATA_W-1:1]};
          nflags.cf = a[0];
        end
      endcase
      nflags.zf = (res == '0);
      nflags.nf = res[DATA_W-1];
    end
  end

  always_ff @(posedge clk or posedge ars) begin
    if (ars) begin
      a     <= '0;
      flags <= '0;
    end else if (ale) begin
      a     <= res;
      flags <= nflags;
    end
  end

  assign db_drv = aoe ? a : '0;
endmodule
