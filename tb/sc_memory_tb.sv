// Memory check against an array model: host writes and bus writes
// (MSL.MWE, stored on the clock edge), bus reads (MSL.MOE, combinational)
// and the rule that the memory drives nothing unless both MSL and MOE are
// high.  Random controls over 2000 cycles.
module sc_memory_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic msl, moe, mwe, ld_we;
  logic [4:0] addr, ld_addr;
  logic [7:0] db_in, db_drv, ld_wdata, ld_rdata;
  logic [7:0] model [32];

  sc_memory dut (.clk(clk), .msl(msl), .moe(moe), .mwe(mwe), .addr(addr), .db_in(db_in),
                 .db_drv(db_drv), .ld_we(ld_we), .ld_addr(ld_addr), .ld_wdata(ld_wdata),
                 .ld_rdata(ld_rdata));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msl = 0; moe = 0; mwe = 0; ld_we = 0; addr = 0; ld_addr = 0; db_in = 0; ld_wdata = 0;
    // fill through the host port
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      ld_we = 1; ld_addr = 5'(i); ld_wdata = 8'($urandom); model[i] = ld_wdata;
    end
    @(negedge clk) ld_we = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      msl = 1'($urandom); addr = 5'($urandom); db_in = 8'($urandom);
      ld_addr = 5'($urandom);
      if ($urandom % 2) begin moe = 1; mwe = 0; end
      else begin moe = 0; mwe = 1'($urandom); end
      #1;
      checks++;
      if (db_drv != ((msl && moe) ? model[addr] : 8'h00)) begin
        failures++;
        $display("FAIL read addr=%0d msl=%b moe=%b got %h exp %h", addr, msl, moe, db_drv, model[addr]);
      end
      checks++;
      if (ld_rdata != model[ld_addr]) failures++;
      @(posedge clk);
      if (msl && mwe) model[addr] = db_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
