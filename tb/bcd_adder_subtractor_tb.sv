// Exhaustive check of the 2-digit BCD adder/subtractor over all operand
// pairs 00..99.  Addition: result (a + b) mod 100, carry = hundreds.
// Subtraction: cout = (a >= b), result (a - b) mod 100 (ten's complement of
// b - a when a < b).
module bcd_adder_subtractor_tb;
  int checks = 0, failures = 0;
  logic [7:0] a, b, s;
  logic sub, cout;

  bcd_adder_subtractor dut (.a(a), .b(b), .sub(sub), .s(s), .cout(cout));

  function automatic logic [7:0] to_bcd(input int v);
    return {4'(v / 10), 4'(v % 10)};
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 2; op++)
      for (int i = 0; i < 100; i++)
        for (int j = 0; j < 100; j++) begin
          int r;
          bit ec;
          a = to_bcd(i); b = to_bcd(j); sub = op[0];
          if (!sub) begin r = (i + j) % 100; ec = (i + j) >= 100; end
          else begin r = (i - j + 100) % 100; ec = (i >= j); end
          #1;
          checks++;
          if (s != to_bcd(r) || cout != ec) begin
            failures++;
            if (failures < 10) $display("FAIL %0d %s %0d -> %h c=%b", i, sub ? "-" : "+", j, s, cout);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
