// Instruction decoder / microsequencer check for all six variants.
//
// Each variant's control word is compared every cycle with the system control
// table written out below as lists of signal names per (state, instruction).
// The opcode is changed only in the fetch state, as the IR would.  The test
// also follows the state sequence (one execute state for most instructions,
// two for PSH, three for JSR), checks that HLT drops RUN in its execute
// state and that the stopped machine then sits in S0 with MSL, PCC, IRL and
// ALE off, and that START restarts it.
module idms_tb;
  import sc_pkg::*;
  int checks = 0, failures = 0;
  int done = 0;
  logic clk = 0;

  always #5 clk = ~clk;

  // Control table rows (signal names), independent of the RTL equations.
  function automatic string row(ext_e e, int s, opcode_t op, bit zf);
    if (s == 0) return "MSL MOE PCC POA IRL";
    if (s == 1) begin
      if (op == OP_HLT) return (e == EXT_STACK || e == EXT_SUBR) ? "" : "RST";
      if (op == OP_LDA) return (e == EXT_SHIFT) ? "MSL MOE IRA ALE RST" : "MSL MOE IRA ALE ALX RST";
      if (op == OP_STA) return "MSL MWE IRA AOE RST";
      if (e == EXT_SHIFT) begin
        if (op == OP_LSR) return "ALE ALY RST";
        if (op == OP_ASL) return "ALE ALX RST";
        if (op == OP_ASR) return "ALE ALX ALY RST";
        return "RST";
      end
      if (op == OP_ADD) return "MSL MOE IRA ALE RST";
      if (op == OP_SUB) return "MSL MOE IRA ALE ALY RST";
      if (op == OP_AND) return "MSL MOE IRA ALE ALX ALY RST";
      case (e)
        EXT_IO:    return (op == OP_X6) ? "IRA ALE ALX IOR RST" : "IRA AOE IOW RST";
        EXT_JUMP:  return (op == OP_X6) ? "IRA PLA RST" : (zf ? "IRA PLA RST" : "RST");
        EXT_STACK: return (op == OP_X6) ? "SPD" : "MSL MOE ALE ALX SPI SPA RST";
        EXT_SUBR:  return (op == OP_X6) ? "SPD" : "MSL MOE PLD SPI SPA RST";
        default:   return "RST";
      endcase
    end
    if (s == 2 && e == EXT_STACK && op == OP_X6) return "MSL MWE AOE SPA RST";
    if (s == 2 && e == EXT_SUBR && op == OP_X6) return "MSL MWE POD SPA";
    if (s == 3 && e == EXT_SUBR && op == OP_X6) return "IRA PLA RST";
    return "?";
  endfunction

  function automatic bit has(string r, string name);
    for (int i = 0; i + 3 <= r.len(); i++)
      if (r.substr(i, i + 2) == name) return 1;
    return 0;
  endfunction

  function automatic ctrl_t expect_ctrl(ext_e e, int s, opcode_t op, bit zf, bit run);
    ctrl_t c;
    string r;
    r = row(e, s, op, zf);
    c.msl = has(r, "MSL") & run; c.moe = has(r, "MOE"); c.mwe = has(r, "MWE");
    c.pcc = has(r, "PCC") & run; c.poa = has(r, "POA"); c.pla = has(r, "PLA");
    c.pod = has(r, "POD"); c.pld = has(r, "PLD"); c.irl = has(r, "IRL") & run;
    c.ira = has(r, "IRA"); c.aoe = has(r, "AOE"); c.ale = has(r, "ALE") & run;
    c.alx = has(r, "ALX"); c.aly = has(r, "ALY"); c.spi = has(r, "SPI");
    c.spd = has(r, "SPD"); c.spa = has(r, "SPA"); c.ior = has(r, "IOR");
    // RST exists only with the multi-cycle state counter
    c.iow = has(r, "IOW"); c.rst = has(r, "RST") & (e == EXT_STACK || e == EXT_SUBR);
    return c;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 6; g++) begin : g_v
    localparam ext_e E = ext_e'(g);
    logic    start, zf, run;
    opcode_t op;
    ctrl_t   ctrl;
    state_e  state;

    idms #(.EXT(E)) dut (.clk(clk), .start(start), .op(op), .zf(zf), .ctrl(ctrl), .run(run), .state(state));

    initial begin
      int s, last;
      bit mrun;
      int halts;
      halts = 0;
      op = OP_LDA; zf = 0;
      start = 0; #1 start = 1; @(posedge clk); #1 start = 0;
      s = 0; mrun = 1;
      for (int k = 0; k < 1500; k++) begin
        @(negedge clk);
        if (s == 0 && mrun) begin
          op = opcode_t'($urandom);
          if (op == OP_HLT && ($urandom % 4) != 0) op = OP_STA;
          zf = 1'($urandom);
        end
        #1;
        checks++;
        if (int'(state) != s || run != mrun || ctrl != expect_ctrl(E, s, op, zf, mrun)) begin
          failures++;
          $display("FAIL ext=%0d k=%0d state=%0d/%0d run=%b/%b op=%b ctrl=%b exp=%b", g, k, state, s, run,
                   mrun, op, ctrl, expect_ctrl(E, s, op, zf, mrun));
        end
        if (!mrun && (k % 5) == 0) begin
          // stopped: press START again
          start = 1; #1 start = 0; s = 0; mrun = 1;
          op = opcode_t'($urandom);
          if (op == OP_HLT) op = OP_LDA;
        end
        last = 1;
        if ((E == EXT_STACK || E == EXT_SUBR) && op == OP_X6) last = (E == EXT_STACK) ? 2 : 3;
        @(posedge clk);
        if (!mrun) s = 0;
        else if (s == 0) s = 1;
        else if (s == last) s = 0;
        else s = s + 1;
        if (s == 1 && op == OP_HLT) begin mrun = 0; halts++; end
      end
      checks++;
      if (halts == 0) begin
        failures++;
        $display("FAIL ext=%0d never halted", g);
      end
      done++;
    end
  end

  initial begin
    wait (done == 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
