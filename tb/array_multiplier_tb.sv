// Exhaustive check of the 4x4 array multiplier and of a 4x2 (the exercise's
// 2x4 shape) and a 6x4 array, against integer multiplication.
module array_multiplier_tb;
  int checks = 0, failures = 0;
  logic [3:0] x, y;
  logic [7:0] p;
  logic [1:0] y2;
  logic [5:0] p42;
  logic [5:0] x6;
  logic [9:0] p64;

  array_multiplier dut (.x(x), .y(y), .p(p));
  array_multiplier #(.N(4), .M(2)) dut42 (.x(x), .y(y2), .p(p42));
  array_multiplier #(.N(6), .M(4)) dut64 (.x(x6), .y(y), .p(p64));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        x = 4'(i); y = 4'(j); y2 = 2'(j); x6 = 6'(i * 4 + (j & 3));
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          $display("FAIL %0d*%0d -> %0d", i, j, p);
        end
        checks++;
        if (int'(p42) != i * (j & 3)) failures++;
        checks++;
        if (int'(p64) != int'(x6) * j) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
