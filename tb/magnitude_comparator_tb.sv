// Exhaustive check of the 4-bit signed comparator, plus the unsigned option,
// against integer comparisons.  Also checks the 2-bit cases of the original
// condition-code table (-2..+1) through the 4-bit signed comparator.
module magnitude_comparator_tb;
  int checks = 0, failures = 0;
  logic [3:0] a, b;
  logic eq, lt, gt, ueq, ult, ugt;

  magnitude_comparator dut (.a(a), .b(b), .eq(eq), .lt(lt), .gt(gt));
  magnitude_comparator #(.IS_SIGNED(1'b0)) dutu (.a(a), .b(b), .eq(ueq), .lt(ult), .gt(ugt));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        int sa, sb;
        a = 4'(i); b = 4'(j);
        sa = (i >= 8) ? i - 16 : i;
        sb = (j >= 8) ? j - 16 : j;
        #1;
        checks++;
        if (eq != (sa == sb) || lt != (sa < sb) || gt != (sa > sb)) begin
          failures++;
          $display("FAIL signed %0d vs %0d -> eq=%b lt=%b gt=%b", sa, sb, eq, lt, gt);
        end
        checks++;
        if (ueq != (i == j) || ult != (i < j) || ugt != (i > j)) begin
          failures++;
          $display("FAIL unsigned %0d vs %0d", i, j);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
