// End-to-end test of the top level at its default parameters.
//
// Runs one program on each of the six computer variants (checked against
// the instruction-level model: all memory words, A, flags, PC, SP, output
// port and cycle count) and drives the five arithmetic circuits with
// exhaustive or random operands checked against integer arithmetic.
// Programs:
//   BASE  the sample program LDA/ADD/STA/LDA/AND/STA/LDA/SUB/STA/HLT on
//         locations 01011 and 01100, twice, with data that overflows ADD
//         and then SUB
//   SHIFT LSR, ASL and ASR of 10011010
//   IO    IN from port 00000, ADD, OUT to port 00000; the output port
//         must still hold the value after the machine stops
//   JUMP  a count-down loop closed by JMP and left through JZF
//   STACK an expression evaluated with PSH and POP
//   SUBR  nested JSR/RTS
// Every mechanism named below must occur at least once, counted on the RTL
// signals; one that never occurs counts as a failure.
module top_tb;
  import sc_pkg::*;
  import sc_ref_pkg::*;

  localparam int NV = 6;
  int checks = 0, failures = 0;
  logic clk = 0;

  logic [NV-1:0]             start, ld_we, run;
  logic [NV-1:0][4:0]        ld_addr, pc, sp;
  logic [NV-1:0][7:0]        ld_wdata, ld_rdata, in_port, out_port, acc;
  flags_t [NV-1:0]           flags;
  logic [15:0] cla_x, cla_y, cla_s;
  logic        cla_cin, cla_cout;
  logic [3:0]  mul_x, mul_y, cmp_a, cmp_b;
  logic [6:0]  pop_x;
  logic [2:0]  pop_count;
  logic [7:0]  mul_p, bcd_a, bcd_b, bcd_s;
  logic        bcd_sub, bcd_cout, cmp_eq, cmp_lt, cmp_gt;

  top dut (.*);

  always #5 clk = ~clk;

  // ---- mechanism counters, taken from the RTL ----
  int n_halt, n_ovf, n_carry, n_shift, n_in, n_out, n_jmp, n_jzf_taken, n_jzf_not;
  int n_psh, n_pop, n_jsr, n_rts, n_multi, n_bcd_fix, n_bcd_borrow, n_cla_ripple;
  int n_lt, n_gt, n_eq, n_pop_all;

  always @(posedge clk) begin
    if (dut.g_cpu[0].u_cpu.ctrl.ale && !dut.g_cpu[0].u_cpu.ctrl.alx &&
        dut.g_cpu[0].u_cpu.u_alu.nflags.vf) n_ovf++;
    if (dut.g_cpu[0].u_cpu.ctrl.ale && !dut.g_cpu[0].u_cpu.ctrl.alx &&
        dut.g_cpu[0].u_cpu.u_alu.nflags.cf) n_carry++;
    if (dut.g_cpu[1].u_cpu.ctrl.ale && (dut.g_cpu[1].u_cpu.ctrl.alx || dut.g_cpu[1].u_cpu.ctrl.aly)) n_shift++;
    if (dut.g_cpu[2].u_cpu.ctrl.ior) n_in++;
    if (dut.g_cpu[2].u_cpu.ctrl.iow) n_out++;
    if (dut.g_cpu[3].u_cpu.ctrl.pla && dut.g_cpu[3].u_cpu.op == OP_X6) n_jmp++;
    if (dut.g_cpu[3].u_cpu.state == S1 && dut.g_cpu[3].u_cpu.op == OP_X7) begin
      if (dut.g_cpu[3].u_cpu.ctrl.pla) n_jzf_taken++; else n_jzf_not++;
    end
    if (dut.g_cpu[4].u_cpu.state == S2) n_psh++;
    if (dut.g_cpu[4].u_cpu.ctrl.spi) n_pop++;
    if (dut.g_cpu[5].u_cpu.state == S3) n_jsr++;
    if (dut.g_cpu[5].u_cpu.ctrl.pld) n_rts++;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_prog(int v, sc_model m, string name);
    int n;
    @(negedge clk);
    start[v] = 1;
    for (int i = 0; i < 32; i++) begin
      ld_we[v] = 1; ld_addr[v] = 5'(i); ld_wdata[v] = m.mem[i];
      @(negedge clk);
    end
    ld_we[v] = 0;
    @(posedge clk); #1 start[v] = 0;
    m.in_port = in_port[v];
    void'(m.run(1000));
    n = 0;
    while (1) begin
      @(posedge clk);
      n++;
      #1;
      if (!run[v] || n > 5000) break;
    end
    if (!run[v]) n_halt++;
    checks++;
    if (run[v] || n != m.cycles) begin
      failures++;
      $display("FAIL %s: cycles %0d expected %0d", name, n, m.cycles);
    end
    repeat (3) @(negedge clk);  // stopped machine must stay put
    for (int i = 0; i < 32; i++) begin
      ld_addr[v] = 5'(i);
      #1;
      checks++;
      if (ld_rdata[v] != m.mem[i]) begin
        failures++;
        $display("FAIL %s: mem[%0d]=%h expected %h", name, i, ld_rdata[v], m.mem[i]);
      end
    end
    checks++;
    if (acc[v] != m.a || flags[v] != m.f || pc[v] != m.pc || sp[v] != m.sp ||
        (v == int'(EXT_IO) && out_port[v] != m.out_port)) begin
      failures++;
      $display("FAIL %s: A=%h F=%b PC=%0d SP=%0d OUT=%h expected %h %b %0d %0d %h", name, acc[v], flags[v],
               pc[v], sp[v], out_port[v], m.a, m.f, m.pc, m.sp, m.out_port);
    end
  endtask

  task automatic count_check(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    sc_model m;
    start = '0; ld_we = '0; ld_addr = '0; ld_wdata = '0; in_port = '0;
    {cla_x, cla_y, cla_cin, mul_x, mul_y, bcd_a, bcd_b, bcd_sub, cmp_a, cmp_b, pop_x} = '0;
    n_halt = 0; n_ovf = 0; n_carry = 0; n_shift = 0; n_in = 0; n_out = 0; n_jmp = 0;
    n_jzf_taken = 0; n_jzf_not = 0; n_psh = 0; n_pop = 0; n_jsr = 0; n_rts = 0;
    n_bcd_fix = 0; n_bcd_borrow = 0; n_cla_ripple = 0; n_lt = 0; n_gt = 0; n_eq = 0;
    #1 start = '1;

    // BASE: the sample program, twice
    for (int r = 0; r < 2; r++) begin
      m = new(EXT_BASE);
      m.mem[0] = ins(OP_LDA, 11); m.mem[1] = ins(OP_ADD, 12); m.mem[2] = ins(OP_STA, 13);
      m.mem[3] = ins(OP_LDA, 11); m.mem[4] = ins(OP_AND, 12); m.mem[5] = ins(OP_STA, 14);
      m.mem[6] = ins(OP_LDA, 11); m.mem[7] = ins(OP_SUB, 12); m.mem[8] = ins(OP_STA, 15);
      m.mem[9] = ins(OP_HLT, 0);
      m.mem[11] = (r == 0) ? 8'h70 : 8'h80;
      m.mem[12] = (r == 0) ? 8'h50 : 8'h01;
      run_prog(0, m, "BASE sample program");
    end

    // SHIFT
    m = new(EXT_SHIFT);
    m.mem[0] = ins(OP_LDA, 20); m.mem[1] = ins(OP_LSR, 0); m.mem[2] = ins(OP_STA, 21);
    m.mem[3] = ins(OP_LDA, 20); m.mem[4] = ins(OP_ASL, 0); m.mem[5] = ins(OP_STA, 22);
    m.mem[6] = ins(OP_LDA, 20); m.mem[7] = ins(OP_ASR, 0); m.mem[8] = ins(OP_STA, 23);
    m.mem[9] = ins(OP_HLT, 0);  m.mem[20] = 8'b10011010;
    run_prog(1, m, "SHIFT");
    checks++;
    if (m.mem[21] != 8'b01001101 || m.mem[22] != 8'b00110100 || m.mem[23] != 8'b11001101) failures++;

    // IO
    in_port[2] = 8'h2C;
    m = new(EXT_IO);
    m.mem[0] = ins(OP_X6, 0);  m.mem[1] = ins(OP_ADD, 20); m.mem[2] = ins(OP_X7, 0);
    m.mem[3] = ins(OP_STA, 21); m.mem[4] = ins(OP_LDA, 22); m.mem[5] = ins(OP_HLT, 0);
    m.mem[20] = 8'h11; m.mem[22] = 8'h99;
    run_prog(2, m, "IO");
    checks++;
    if (out_port[2] != 8'h3D) begin
      failures++;
      $display("FAIL IO: output port %h, expected 3D held after OUT", out_port[2]);
    end

    // JUMP: count down from 3
    m = new(EXT_JUMP);
    m.mem[0] = ins(OP_LDA, 20); m.mem[1] = ins(OP_SUB, 21); m.mem[2] = ins(OP_STA, 20);
    m.mem[3] = ins(OP_X7, 5);   m.mem[4] = ins(OP_X6, 1);   m.mem[5] = ins(OP_HLT, 0);
    m.mem[20] = 8'd3; m.mem[21] = 8'd1;
    run_prog(3, m, "JUMP");

    // STACK: (a) and (b + c) through the stack
    m = new(EXT_STACK);
    m.mem[0] = ins(OP_LDA, 20); m.mem[1] = ins(OP_X6, 0);   m.mem[2] = ins(OP_LDA, 21);
    m.mem[3] = ins(OP_X6, 0);   m.mem[4] = ins(OP_X7, 0);   m.mem[5] = ins(OP_ADD, 22);
    m.mem[6] = ins(OP_STA, 23); m.mem[7] = ins(OP_X7, 0);   m.mem[8] = ins(OP_STA, 24);
    m.mem[9] = ins(OP_HLT, 0);
    m.mem[20] = 8'h0A; m.mem[21] = 8'h14; m.mem[22] = 8'h05;
    run_prog(4, m, "STACK");

    // SUBR: nested JSR/RTS
    m = new(EXT_SUBR);
    m.mem[0]  = ins(OP_LDA, 20); m.mem[1]  = ins(OP_X6, 10); m.mem[2]  = ins(OP_STA, 24);
    m.mem[3]  = ins(OP_X6, 14);  m.mem[4]  = ins(OP_STA, 25); m.mem[5] = ins(OP_HLT, 0);
    m.mem[10] = ins(OP_ADD, 21); m.mem[11] = ins(OP_SUB, 22); m.mem[12] = ins(OP_X7, 0);
    m.mem[14] = ins(OP_AND, 23); m.mem[15] = ins(OP_X6, 10); m.mem[16] = ins(OP_X7, 0);
    m.mem[20] = 8'h35; m.mem[21] = 8'h5A; m.mem[22] = 8'h11; m.mem[23] = 8'hF0;
    run_prog(5, m, "SUBR");

    // ---- arithmetic circuits ----
    for (int k = 0; k < 500; k++) begin
      cla_x = 16'($urandom); cla_y = 16'($urandom); cla_cin = 1'($urandom);
      if (k == 0) begin cla_x = 16'h0FFF; cla_y = 16'h0001; cla_cin = 0; end
      #1;
      checks++;
      if ({cla_cout, cla_s} != 17'(int'(cla_x) + int'(cla_y) + int'(cla_cin))) failures++;
      if (((int'(cla_x[3:0]) + int'(cla_y[3:0]) + int'(cla_cin)) > 15)) n_cla_ripple++;
    end
    for (int i = 0; i < 256; i++) begin
      {mul_x, mul_y} = 8'(i);
      {cmp_a, cmp_b} = 8'(i);
      #1;
      checks++;
      if (int'(mul_p) != int'(mul_x) * int'(mul_y)) failures++;
      checks++;
      if (cmp_eq != ($signed(cmp_a) == $signed(cmp_b)) || cmp_lt != ($signed(cmp_a) < $signed(cmp_b)) ||
          cmp_gt != ($signed(cmp_a) > $signed(cmp_b))) failures++;
      n_eq += cmp_eq; n_lt += cmp_lt; n_gt += cmp_gt;
    end
    for (int k = 0; k < 2000; k++) begin
      int x, y, r;
      bit ec;
      x = $urandom % 100; y = $urandom % 100; bcd_sub = 1'($urandom);
      bcd_a = {4'(x / 10), 4'(x % 10)}; bcd_b = {4'(y / 10), 4'(y % 10)};
      if (!bcd_sub) begin r = (x + y) % 100; ec = (x + y) >= 100; end
      else begin r = (x - y + 100) % 100; ec = (x >= y); end
      #1;
      checks++;
      if (bcd_s != {4'(r / 10), 4'(r % 10)} || bcd_cout != ec) failures++;
      if (!bcd_sub && (x % 10 + y % 10) > 9) n_bcd_fix++;
      if (bcd_sub && !ec) n_bcd_borrow++;
    end

    for (int i = 0; i < 128; i++) begin
      int ones;
      pop_x = 7'(i);
      ones = 0;
      for (int b = 0; b < 7; b++) ones += (i >> b) & 1;
      #1;
      checks++;
      if (int'(pop_count) != ones) failures++;
      if (pop_count == 3'd7) n_pop_all++;
    end

    $display("mechanisms:");
    count_check("HLT stops the machine", n_halt);
    count_check("ADD/SUB overflow (VF)", n_ovf);
    count_check("carry out (CF)", n_carry);
    count_check("shift", n_shift);
    count_check("IN from port", n_in);
    count_check("OUT to latched port", n_out);
    count_check("JMP taken", n_jmp);
    count_check("JZF taken", n_jzf_taken);
    count_check("JZF not taken (NOP)", n_jzf_not);
    count_check("PSH second execute cycle", n_psh);
    count_check("POP with SP increment", n_pop);
    count_check("JSR third execute cycle", n_jsr);
    count_check("RTS loads PC from stack", n_rts);
    count_check("BCD +6 correction", n_bcd_fix);
    count_check("BCD subtract with borrow", n_bcd_borrow);
    count_check("carry between CLA groups", n_cla_ripple);
    count_check("comparator A<B", n_lt);
    count_check("comparator A>B", n_gt);
    count_check("comparator A=B", n_eq);
    count_check("population count of 7 ones", n_pop_all);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
