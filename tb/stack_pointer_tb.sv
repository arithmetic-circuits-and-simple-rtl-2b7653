// Stack pointer check: reset to 00000, first decrement gives 11111 (top of
// memory), then random increments/decrements against a model, and the
// address-bus drive only with SPA.
module stack_pointer_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic ars, spi, spd, spa;
  logic [4:0] adr_drv, sp, m;

  stack_pointer dut (.clk(clk), .ars(ars), .spi(spi), .spd(spd), .spa(spa), .adr_drv(adr_drv), .sp(sp));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    spi = 0; spd = 0; spa = 0;
    ars = 0; #1 ars = 1; #2 ars = 0;
    @(negedge clk) spd = 1;
    @(negedge clk) spd = 0;
    checks++;
    if (sp != 5'b11111) begin
      failures++;
      $display("FAIL first push SP=%b", sp);
    end
    m = 5'b11111;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      spd = ($urandom % 3) == 0; spi = !spd && ($urandom % 2); spa = 1'($urandom);
      #1;
      checks++;
      if (adr_drv != (spa ? m : 5'd0)) failures++;
      @(posedge clk);
      if (spd) m = m - 1; else if (spi) m = m + 1;
      #1;
      checks++;
      if (sp != m) begin
        failures++;
        $display("FAIL sp=%0d exp %0d", sp, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
