// Instruction-level reference model of the simple computer, for testbenches.
//
// sc_model executes a memory image one instruction at a time, following the
// instruction set of each variant, and counts clock cycles: 2 per
// instruction (fetch + one execute), 3 for PSH, 4 for JSR, and 1 for the
// final HLT (the machine stops right after fetching it).  It does not model
// the buses or control signals, only the architectural result, so it is an
// independent check of the RTL.  An undriven data bus reads as 0 (IN from a
// port address other than 00000).
package sc_ref_pkg;
  import sc_pkg::*;

  function automatic logic [7:0] ins(input opcode_t op, input int addr);
    return {op, 5'(addr)};
  endfunction

  class sc_model;
    ext_e       ext;
    logic [7:0] mem [32];
    logic [7:0] a;
    flags_t     f;
    logic [4:0] pc, sp;
    logic [7:0] in_port, out_port;
    bit         halted;
    int         cycles, steps;
    // mechanism counters
    int n_ovf, n_jmp_taken, n_jzf_not_taken, n_push, n_pop, n_jsr, n_rts, n_in, n_out, n_shift;

    function new(ext_e e);
      ext = e;
      a = 0; f = '0; pc = 0; sp = 0; halted = 0; cycles = 0; steps = 0;
      in_port = 0; out_port = 0;
      n_ovf = 0; n_jmp_taken = 0; n_jzf_not_taken = 0; n_push = 0; n_pop = 0;
      n_jsr = 0; n_rts = 0; n_in = 0; n_out = 0; n_shift = 0;
      foreach (mem[i]) mem[i] = 0;
    endfunction

    function void set_zn(logic [7:0] r);
      f.zf = (r == 0);
      f.nf = r[7];
    endfunction

    function void step();
      logic [7:0] ir, m;
      logic [2:0] op;
      logic [4:0] ad;
      int sa, sm, sr;
      ir = mem[pc]; op = ir[7:5]; ad = ir[4:0]; m = mem[ad];
      pc = pc + 1;
      steps++;
      if (op == 3'b000) begin
        halted = 1; cycles += 1; return;
      end
      cycles += 2;
      sa = (a >= 128) ? int'(a) - 256 : int'(a);
      sm = (m >= 128) ? int'(m) - 256 : int'(m);
      case (op)
        3'b001: begin a = m; set_zn(a); end
        3'b101: mem[ad] = a;
        default: begin
          if (ext == EXT_SHIFT) begin
            if (op inside {3'b010, 3'b011, 3'b100}) n_shift++;
            case (op)
              3'b010: begin f.cf = a[0]; a = {1'b0, a[7:1]}; set_zn(a); end
              3'b011: begin f.cf = a[7]; a = {a[6:0], 1'b0}; set_zn(a); end
              3'b100: begin f.cf = a[0]; a = {a[7], a[7:1]}; set_zn(a); end
              default: ;
            endcase
          end else if (op == 3'b010) begin
            sr = sa + sm; f.cf = (int'(a) + int'(m)) > 255; f.vf = (sr > 127 || sr < -128);
            if (f.vf) n_ovf++;
            a = a + m; set_zn(a);
          end else if (op == 3'b011) begin
            sr = sa - sm; f.cf = (a >= m); f.vf = (sr > 127 || sr < -128);
            if (f.vf) n_ovf++;
            a = a - m; set_zn(a);
          end else if (op == 3'b100) begin
            a = a & m; set_zn(a);
          end else if (op == 3'b110) begin
            case (ext)
              EXT_IO:    begin a = (ad == 0) ? in_port : 8'h00; set_zn(a); n_in++; end
              EXT_JUMP:  begin pc = ad; n_jmp_taken++; end
              EXT_STACK: begin sp = sp - 1; mem[sp] = a; cycles += 1; n_push++; end
              EXT_SUBR:  begin sp = sp - 1; mem[sp] = {3'b000, pc}; pc = ad; cycles += 2; n_jsr++; end
              default: ;
            endcase
          end else begin  // 3'b111
            case (ext)
              EXT_IO:    begin if (ad == 0) out_port = a; n_out++; end
              EXT_JUMP:  begin if (f.zf) begin pc = ad; n_jmp_taken++; end else n_jzf_not_taken++; end
              EXT_STACK: begin a = mem[sp]; sp = sp + 1; set_zn(a); n_pop++; end
              EXT_SUBR:  begin pc = mem[sp][4:0]; sp = sp + 1; n_rts++; end
              default: ;
            endcase
          end
        end
      endcase
    endfunction

    // Runs until HLT or max_steps instructions; returns 1 if it halted.
    function bit run(int max_steps);
      while (!halted && steps < max_steps) step();
      return halted;
    endfunction
  endclass
endpackage
