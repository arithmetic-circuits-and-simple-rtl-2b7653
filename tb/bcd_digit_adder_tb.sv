// Exhaustive check of the BCD digit adder over all digit pairs 0..9 and both
// carry-ins: the sum must be the decimal units digit and the carry the tens.
// Includes the worked examples 3 + 4 = 7 and 7 + 8 = 15.
module bcd_digit_adder_tb;
  int checks = 0, failures = 0;
  logic [3:0] x, y, s;
  logic cin, cout;

  bcd_digit_adder dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 10; i++)
        for (int j = 0; j < 10; j++) begin
          int t;
          x = 4'(i); y = 4'(j); cin = c[0];
          t = i + j + c;
          #1;
          checks++;
          if (int'(s) != t % 10 || int'(cout) != t / 10) begin
            failures++;
            $display("FAIL %0d+%0d+%0d -> %0d%0d", i, j, c, cout, s);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
