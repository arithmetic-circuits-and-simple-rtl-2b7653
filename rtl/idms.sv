// Instruction decoder and microsequencer (IDMS): the state machine that
// orchestrates all other blocks of the simple computer.
//
// State counter.  In the variants whose instructions all finish in one
// execute cycle (BASE, SHIFT, IO, JUMP) it is a single flip-flop SQ that
// toggles between S0 (fetch) and S1 (execute) while RUN is high and returns
// to S0 when RUN is low; there is no RST signal.  In the STACK and SUBR
// variants it is a 2-bit counter with decoded states S0 (fetch) and S1, S2,
// S3 (first, second, third execute): on each rising clock edge it counts up,
// unless RUN is low or the control signal RST (asserted in the last execute
// state of every instruction) is high, in which case it returns to S0.
// Instructions thus take only as many execute cycles as they need.  START
// clears either form asynchronously.
//
// RUN flip-flop: set asynchronously by START, cleared as soon as a HLT is in
// its execute state (RUN_ar = S1.HLT).  MSL, PCC, IRL and ALE are ANDed with
// RUN, which stops the machine after HLT.  The original clears the flip-flop
// asynchronously from RUN_ar; here RUN_ar masks the flip-flop output at once
// and clears it on the next clock edge, which gives the same RUN waveform
// with only one asynchronous control (START).
//
// Control word per decoded state and opcode (all other signals low):
//   S0 any  : MSL MOE PCC POA IRL                     (fetch)
//   S1 LDA  : MSL MOE IRA ALE ALX        (RST)
//   S1 ADD  : MSL MOE IRA ALE            (RST)
//   S1 SUB  : MSL MOE IRA ALE ALY        (RST)
//   S1 AND  : MSL MOE IRA ALE ALX ALY    (RST)
//   S1 STA  : MSL MWE IRA AOE            (RST)
//   (RST only in the STACK and SUBR variants)
//   SHIFT variant: LDA = ALE; LSR = ALE ALY; ASL = ALE ALX; ASR = ALE ALX ALY
//   IO    : IN  = IRA ALE ALX IOR;  OUT = IRA AOE IOW
//   JUMP  : JMP = IRA PLA;          JZF = IRA PLA only when ZF = 1
//   STACK : PSH S1 = SPD;  PSH S2 = MSL MWE AOE SPA RST
//           POP S1 = MSL MOE ALE ALX SPI SPA RST
//   SUBR  : JSR S1 = SPD;  JSR S2 = MSL MWE POD SPA;  JSR S3 = IRA PLA RST
//           RTS S1 = MSL MOE PLD SPI SPA RST
// These rows are the original system control tables.  Two choices are this
// design's own: IN/OUT take opcodes 110/111 and JMP/JZF take 110/111 in the
// order the tables list them.  JSR S3 drives
// IRA, as its control table shows, so that PLA has an address to load.
module idms #(
  parameter sc_pkg::ext_e EXT = sc_pkg::EXT_SUBR
) (
  input  logic                clk,
  input  logic                start,  // asynchronous START (ARS)
  input  sc_pkg::opcode_t     op,     // IR[7:5]
  input  logic                zf,     // zero flag, for JZF
  output sc_pkg::ctrl_t       ctrl,
  output logic                run,
  output sc_pkg::state_e      state
);
  import sc_pkg::*;

  localparam bit MULTI = (EXT == EXT_STACK) || (EXT == EXT_SUBR);

  logic s0, s1, s2, s3;
  logic hlt, lda, add, sub, band, sta, x6, x7;
  logic run_ar;

  assign s0 = (state == S0);
  assign s1 = (state == S1);
  assign s2 = (state == S2);
  assign s3 = (state == S3);

  assign hlt  = (op == OP_HLT);
  assign lda  = (op == OP_LDA);
  assign add  = (op == OP_ADD);  // LSR in the shift variant
  assign sub  = (op == OP_SUB);  // ASL in the shift variant
  assign band = (op == OP_AND);  // ASR in the shift variant
  assign sta  = (op == OP_STA);
  assign x6   = (op == OP_X6);
  assign x7   = (op == OP_X7);

  if (MULTI) begin : g_sq2
    // Two-bit state counter with asynchronous clear and synchronous reset
    // (RST).
    always_ff @(posedge clk or posedge start) begin
      if (start) state <= S0;
      else if (ctrl.rst || !run) state <= S0;
      else state <= state_e'(state + 2'd1);
    end
  end else begin : g_sq1
    // Single state flip-flop: fetch, execute, fetch, ... while RUN is high.
    logic sq;
    always_ff @(posedge clk or posedge start) begin
      if (start) sq <= 1'b0;
      else       sq <= run & ~sq;
    end
    assign state = sq ? S1 : S0;
  end

  // RUN flip-flop.  run_q is set asynchronously by START and cleared on the
  // clock edge after HLT's execute state; masking its output with RUN_ar
  // makes RUN fall as soon as HLT reaches S1, which is the behaviour of the
  // original asynchronously cleared flip-flop with a single asynchronous
  // control.
  logic run_q;
  assign run_ar = s1 & hlt;
  always_ff @(posedge clk or posedge start) begin
    if (start)       run_q <= 1'b1;
    else if (run_ar) run_q <= 1'b0;
  end
  assign run = run_q & ~run_ar;

  always_comb begin
    ctrl = '0;
    if (s0) begin
      ctrl.msl = 1'b1; ctrl.moe = 1'b1; ctrl.pcc = 1'b1;
      ctrl.poa = 1'b1; ctrl.irl = 1'b1;
    end else if (s1) begin
      // Memory-operand instructions common to every variant.
      if (lda || sta || (EXT != EXT_SHIFT && (add || sub || band))) begin
        ctrl.msl = 1'b1; ctrl.ira = 1'b1; ctrl.rst = MULTI;
        if (sta) begin
          ctrl.mwe = 1'b1; ctrl.aoe = 1'b1;
        end else begin
          ctrl.moe = 1'b1; ctrl.ale = 1'b1;
        end
      end
      if (EXT == EXT_SHIFT) begin
        if (add || sub || band) begin
          ctrl.ale = 1'b1;
        end
        ctrl.alx = sub | band;
        ctrl.aly = add | band;
      end else begin
        ctrl.alx = lda | band;
        ctrl.aly = sub | band;
      end
      unique case (EXT)
        EXT_IO: begin
          if (x6) begin  // IN
            ctrl.ira = 1'b1; ctrl.ale = 1'b1; ctrl.alx = 1'b1;
            ctrl.ior = 1'b1;
          end
          if (x7) begin  // OUT
            ctrl.ira = 1'b1; ctrl.aoe = 1'b1; ctrl.iow = 1'b1;
          end
        end
        EXT_JUMP: begin
          if (x6) begin  // JMP
            ctrl.ira = 1'b1; ctrl.pla = 1'b1;
          end
          if (x7) begin  // JZF
            ctrl.ira = zf; ctrl.pla = zf;
          end
        end
        EXT_STACK: begin
          if (x6) ctrl.spd = 1'b1;  // PSH, first cycle
          if (x7) begin             // POP
            ctrl.msl = 1'b1; ctrl.moe = 1'b1; ctrl.ale = 1'b1; ctrl.alx = 1'b1;
            ctrl.spi = 1'b1; ctrl.spa = 1'b1; ctrl.rst = 1'b1;
          end
        end
        EXT_SUBR: begin
          if (x6) ctrl.spd = 1'b1;  // JSR, first cycle
          if (x7) begin             // RTS
            ctrl.msl = 1'b1; ctrl.moe = 1'b1; ctrl.pld = 1'b1;
            ctrl.spi = 1'b1; ctrl.spa = 1'b1; ctrl.rst = 1'b1;
          end
        end
        default: ;
      endcase
    end else if (s2) begin
      if (EXT == EXT_STACK && x6) begin  // PSH, second cycle
        ctrl.msl = 1'b1; ctrl.mwe = 1'b1; ctrl.aoe = 1'b1;
        ctrl.spa = 1'b1; ctrl.rst = 1'b1;
      end
      if (EXT == EXT_SUBR && x6) begin   // JSR, second cycle
        ctrl.msl = 1'b1; ctrl.mwe = 1'b1; ctrl.pod = 1'b1; ctrl.spa = 1'b1;
      end
    end else begin  // s3
      if (EXT == EXT_SUBR && x6) begin   // JSR, third cycle
        ctrl.ira = 1'b1; ctrl.pla = 1'b1; ctrl.rst = 1'b1;
      end
    end
    // Synchronous system enables are gated by RUN.
    ctrl.msl &= run;
    ctrl.pcc &= run;
    ctrl.irl &= run;
    ctrl.ale &= run;
  end

  // Only the third execute cycle of JSR uses S3.
  if (EXT == EXT_SUBR) begin : g_a_s3
    a_s3_only_jsr: assert property (@(posedge clk) disable iff (start) s3 |-> x6);
  end else begin : g_a_no_s3
    a_no_s3: assert property (@(posedge clk) disable iff (start) !s3);
  end
endmodule
