// Exhaustive check of the 4-bit CLA block (all X, Y, Cin) and a random
// check of an 8-bit block, against integer addition.
module cla_block_tb;
  int checks = 0, failures = 0;
  logic [3:0] x, y, s;
  logic cin, cout;
  logic [7:0] x8, y8, s8;
  logic cin8, cout8;

  cla_block dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));
  cla_block #(.M(8)) dut8 (.x(x8), .y(y8), .cin(cin8), .s(s8), .cout(cout8));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, x, y} = 9'(i);
      #1;
      checks++;
      if ({cout, s} != 5'(int'(x) + int'(y) + int'(cin))) begin
        failures++;
        $display("FAIL %0d+%0d+%0d -> %0d", x, y, cin, {cout, s});
      end
    end
    for (int i = 0; i < 1000; i++) begin
      x8 = 8'($urandom); y8 = 8'($urandom); cin8 = 1'($urandom);
      #1;
      checks++;
      if ({cout8, s8} != 9'(int'(x8) + int'(y8) + int'(cin8))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
