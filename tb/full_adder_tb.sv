// Exhaustive check of the full adder against the integer sum of its inputs.
module full_adder_tb;
  logic x, y, cin, s, cout;
  int checks = 0, failures = 0;

  full_adder dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {x, y, cin} = 3'(i);
      #1;
      checks++;
      if ({cout, s} != 2'(int'(x) + int'(y) + int'(cin))) begin
        failures++;
        $display("FAIL %b%b%b -> %b%b", x, y, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
