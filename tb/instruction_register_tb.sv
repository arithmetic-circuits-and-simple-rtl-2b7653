// Instruction register check: load on IRL, hold otherwise, clear on ARS,
// opcode field IR[7:5] always visible, address field IR[4:0] on the
// address bus only with IRA.
module instruction_register_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic ars, irl, ira;
  logic [7:0] db_in, m;
  logic [2:0] op;
  logic [4:0] adr_drv;

  instruction_register dut (.clk(clk), .ars(ars), .irl(irl), .ira(ira), .db_in(db_in),
                            .op(op), .adr_drv(adr_drv));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    irl = 0; ira = 0; db_in = 0;
    ars = 0; #1 ars = 1; #2 ars = 0; m = 0;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      irl = 1'($urandom); ira = 1'($urandom); db_in = 8'($urandom);
      #1;
      checks++;
      if (op != m[7:5] || adr_drv != (ira ? m[4:0] : 5'd0)) begin
        failures++;
        $display("FAIL ir=%h op=%b adr=%b", m, op, adr_drv);
      end
      @(posedge clk);
      if (irl) m = db_in;
    end
    ars = 1; #1;
    checks++;
    if (op != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
