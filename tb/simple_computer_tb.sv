// Whole-machine check of the simple computer in its default form (with
// JSR/RTS), against the instruction-level model sc_ref_pkg::sc_model.
//
// Each program is loaded through the host port while START is held, then
// run until HLT stops the machine.  Compared with the model: every memory
// word, A, the flags, PC, SP and the number of clock cycles from START to
// the stop (2 per instruction, 4 for JSR, 1 for the final HLT).
// Programs: a nested-subroutine program (JSR inside a subroutine, stack in
// the top words of memory) and 200 random straight-line programs of LDA,
// ADD, SUB, AND and STA on random data.
module simple_computer_tb;
  import sc_pkg::*;
  import sc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  logic start, ld_we, run;
  logic [4:0] ld_addr, pc, sp;
  logic [7:0] ld_wdata, ld_rdata, in_port, out_port, acc;
  flags_t flags;

  simple_computer dut (.clk(clk), .start(start), .ld_we(ld_we), .ld_addr(ld_addr), .ld_wdata(ld_wdata),
                       .ld_rdata(ld_rdata), .in_port(in_port), .out_port(out_port), .run(run), .pc(pc),
                       .acc(acc), .flags(flags), .sp(sp));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_and_check(sc_model m, string name);
    int n;
    sc_model ref_m;
    // load while START is held
    @(negedge clk);
    start = 1;
    for (int i = 0; i < 32; i++) begin
      ld_we = 1; ld_addr = 5'(i); ld_wdata = m.mem[i];
      @(negedge clk);
    end
    ld_we = 0;
    @(posedge clk); #1 start = 0;
    void'(m.run(1000));
    n = 0;
    while (1) begin
      @(posedge clk);
      n++;
      #1;
      if (!run || n > 5000) break;
    end
    checks++;
    if (run || n != m.cycles) begin
      failures++;
      $display("FAIL %s: cycles %0d expected %0d (run=%b)", name, n, m.cycles, run);
    end
    @(negedge clk);
    for (int i = 0; i < 32; i++) begin
      ld_addr = 5'(i);
      #1;
      checks++;
      if (ld_rdata != m.mem[i]) begin
        failures++;
        $display("FAIL %s: mem[%0d]=%h expected %h", name, i, ld_rdata, m.mem[i]);
      end
    end
    checks++;
    if (acc != m.a || flags != m.f || pc != m.pc || sp != m.sp) begin
      failures++;
      $display("FAIL %s: A=%h F=%b PC=%0d SP=%0d expected %h %b %0d %0d", name, acc, flags, pc, sp,
               m.a, m.f, m.pc, m.sp);
    end
  endtask

  initial begin
    sc_model m;
    int jsr_seen;
    start = 0; ld_we = 0; ld_addr = 0; ld_wdata = 0; in_port = 0;
    #1 start = 1;
    // nested subroutines
    m = new(EXT_SUBR);
    m.mem[0]  = ins(OP_LDA, 20);
    m.mem[1]  = ins(OP_X6, 10);   // JSR sub1
    m.mem[2]  = ins(OP_STA, 24);
    m.mem[3]  = ins(OP_X6, 14);   // JSR sub2
    m.mem[4]  = ins(OP_STA, 25);
    m.mem[5]  = ins(OP_HLT, 0);
    m.mem[10] = ins(OP_ADD, 21);  // sub1
    m.mem[11] = ins(OP_SUB, 22);
    m.mem[12] = ins(OP_X7, 0);    // RTS
    m.mem[14] = ins(OP_AND, 23);  // sub2
    m.mem[15] = ins(OP_X6, 10);   // nested JSR sub1
    m.mem[16] = ins(OP_X7, 0);    // RTS
    m.mem[20] = 8'h35; m.mem[21] = 8'h5A; m.mem[22] = 8'h11; m.mem[23] = 8'hF0;
    run_and_check(m, "nested JSR/RTS");
    checks++;
    if (m.n_jsr != 3 || m.n_rts != 3 || m.mem[31] != 8'd4 || m.mem[30] != 8'd16) begin
      failures++;
      $display("FAIL model: nested program did not run as intended");
    end
    // random straight-line programs
    for (int p = 0; p < 200; p++) begin
      m = new(EXT_SUBR);
      for (int i = 0; i < 15; i++) begin
        opcode_t op;
        op = opcode_t'(1 + ($urandom % 5));
        m.mem[i] = ins(op, 16 + ($urandom % 14));
      end
      m.mem[15] = ins(OP_HLT, 0);
      for (int i = 16; i < 32; i++) m.mem[i] = 8'($urandom);
      run_and_check(m, $sformatf("random %0d", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
