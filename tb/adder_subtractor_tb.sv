// Adder/subtractor check: exhaustive at N = 4 (the comparator width) for
// both operations and random at the 8-bit default.  Sum, carry/borrow,
// zero, negative and overflow are recomputed with integer arithmetic:
// carry = unsigned result does not fit (add) / no borrow (sub), overflow =
// signed result outside the N-bit range.
module adder_subtractor_tb;
  int checks = 0, failures = 0;

  logic [3:0] a4, b4, s4;
  logic       sub4, c4, z4, n4, v4;
  logic [7:0] a8, b8, s8;
  logic       sub8, c8, z8, n8, v8;

  adder_subtractor #(.N(4)) dut4 (.a(a4), .b(b4), .sub(sub4), .s(s4), .c(c4), .z(z4), .n(n4), .v(v4));
  adder_subtractor        dut8 (.a(a8), .b(b8), .sub(sub8), .s(s8), .c(c8), .z(z8), .n(n8), .v(v8));

  task automatic check(input int w, input int a, input int b, input bit sub,
                       input int s, input bit c, input bit z, input bit n, input bit v);
    int mask, ua, ub, ures, sa, sb, sres;
    bit ec, ev;
    mask = (1 << w) - 1;
    ua = a; ub = b;
    sa = (a >= (1 << (w-1))) ? a - (1 << w) : a;
    sb = (b >= (1 << (w-1))) ? b - (1 << w) : b;
    if (!sub) begin
      ures = ua + ub; ec = (ures > mask); sres = sa + sb;
    end else begin
      ures = ua - ub; ec = (ua >= ub); sres = sa - sb;
    end
    ev = (sres >= (1 << (w-1))) || (sres < -(1 << (w-1)));
    checks++;
    if (s != (ures & mask) || c != ec || z != ((ures & mask) == 0) ||
        n != ((ures >> (w-1)) & 1) || v != ev) begin
      failures++;
      $display("FAIL w=%0d a=%0d b=%0d sub=%0b -> s=%0d c=%0b z=%0b n=%0b v=%0b", w, a, b, sub, s, c, z, n, v);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 2; op++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          a4 = 4'(i); b4 = 4'(j); sub4 = op[0];
          #1 check(4, i, j, op[0], int'(s4), c4, z4, n4, v4);
        end
    // the two quiz cases: 10111 + 11001 and 10111 - 11001 are 5-bit; use 8-bit sign extension
    for (int k = 0; k < 2000; k++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); sub8 = 1'($urandom);
      if (k == 0) begin a8 = 8'h7F; b8 = 8'h01; sub8 = 1'b0; end  // positive overflow
      if (k == 1) begin a8 = 8'h80; b8 = 8'h01; sub8 = 1'b1; end  // negative overflow
      if (k == 2) begin a8 = 8'h05; b8 = 8'h05; sub8 = 1'b1; end  // zero, no borrow
      #1 check(8, int'(a8), int'(b8), sub8, int'(s8), c8, z8, n8, v8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
