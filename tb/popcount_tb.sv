// Check of the population counter: all 128 patterns of the default 7-input
// counter, and random patterns of a 20-input counter, against a count of the
// ones made bit by bit in the testbench.
module popcount_tb;
  int checks = 0, failures = 0;
  logic [6:0]  x7;
  logic [2:0]  c7;
  logic [19:0] x20;
  logic [4:0]  c20;

  popcount dut (.x(x7), .count(c7));
  popcount #(.N(20)) dut20 (.x(x20), .count(c20));

  function automatic int ones(input logic [31:0] v);
    int n = 0;
    for (int b = 0; b < 32; b++) n += int'(v[b]);
    return n;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      x7 = 7'(i);
      #1;
      checks++;
      if (int'(c7) != ones(32'(i))) begin
        failures++;
        $display("FAIL N=7 x=%b count=%0d", x7, c7);
      end
    end
    for (int k = 0; k < 2000; k++) begin
      x20 = 20'($urandom);
      if (k == 0) x20 = '1;
      if (k == 1) x20 = '0;
      #1;
      checks++;
      if (int'(c20) != ones(32'(x20))) begin
        failures++;
        $display("FAIL N=20 x=%b count=%0d", x20, c20);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
