// Program counter check against a register model: asynchronous reset, count,
// load from address bus and from data bus with priority PLA > PLD > PCC, and
// the gated drives onto the two buses.  Random controls over 2000 cycles.
module program_counter_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic ars, pcc, pla, pld, poa, pod;
  logic [4:0] adr_in, adr_drv, pc;
  logic [7:0] db_in, db_drv;
  logic [4:0] m;

  program_counter dut (.clk(clk), .ars(ars), .pcc(pcc), .pla(pla), .pld(pld), .poa(poa), .pod(pod),
                       .adr_in(adr_in), .db_in(db_in), .adr_drv(adr_drv), .db_drv(db_drv), .pc(pc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {pcc, pla, pld, poa, pod} = '0; adr_in = 0; db_in = 0;
    ars = 0; #1 ars = 1; #2 ars = 0; m = 0;
    checks++;
    if (pc != 0) failures++;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      pcc = 1'($urandom); pla = ($urandom % 4) == 0; pld = ($urandom % 4) == 0;
      poa = 1'($urandom); pod = 1'($urandom);
      adr_in = 5'($urandom); db_in = 8'($urandom);
      #1;
      checks++;
      if (adr_drv != (poa ? m : 5'd0) || db_drv != (pod ? {3'b000, m} : 8'd0)) begin
        failures++;
        $display("FAIL drive pc=%0d", m);
      end
      if (k % 97 == 50) begin
        {pcc, pla, pld} = '0; ars = 1; #1; ars = 0; m = 0;
        checks++;
        if (pc != 0) failures++;
      end else begin
        @(posedge clk);
        if (pla) m = adr_in;
        else if (pld) m = db_in[4:0];
        else if (pcc) m = m + 1;
        #1;
        checks++;
        if (pc != m) begin
          failures++;
          $display("FAIL pc=%0d exp %0d", pc, m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
