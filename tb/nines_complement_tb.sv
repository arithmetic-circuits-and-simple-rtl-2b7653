// Exhaustive check of the nine's complementer: 9 - x for digits, 0 above 9.
module nines_complement_tb;
  int checks = 0, failures = 0;
  logic [3:0] x, y;

  nines_complement dut (.x(x), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1;
      checks++;
      if (int'(y) != ((i <= 9) ? 9 - i : 0)) begin
        failures++;
        $display("FAIL %0d -> %0d", i, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
