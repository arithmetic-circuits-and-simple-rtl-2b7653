// I/O port check, latched and unlatched output: the input port reaches the
// data bus only with IOR at address 00000; the output port follows the data
// bus with IOW at address 00000, and afterwards the latched form keeps the
// last value while the unlatched form returns to 0.
module io_port_tb;
  int checks = 0, failures = 0;
  logic [4:0] adr;
  logic ior, iow;
  logic [7:0] in_port, db_in, db_l, db_u, out_l, out_u, held;

  io_port dut_l (.adr(adr), .ior(ior), .iow(iow), .in_port(in_port), .db_in(db_in),
                 .db_drv(db_l), .out_port(out_l));
  io_port #(.OUT_LATCHED(1'b0)) dut_u (.adr(adr), .ior(ior), .iow(iow), .in_port(in_port),
                 .db_in(db_in), .db_drv(db_u), .out_port(out_u));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    adr = 0; ior = 0; iow = 1; db_in = 8'h00; in_port = 0;
    #1 iow = 0; held = 8'h00;
    for (int k = 0; k < 2000; k++) begin
      adr = ($urandom % 2) ? 5'd0 : 5'($urandom);
      ior = 1'($urandom); iow = !ior && ($urandom % 2);
      in_port = 8'($urandom); db_in = 8'($urandom);
      #1;
      checks++;
      if (db_l != ((ior && adr == 0) ? in_port : 8'h00) || db_u != db_l) begin
        failures++;
        $display("FAIL input adr=%0d ior=%b", adr, ior);
      end
      if (iow && adr == 0) held = db_in;
      checks++;
      if (out_l != held || out_u != ((iow && adr == 0) ? db_in : 8'h00)) begin
        failures++;
        $display("FAIL output adr=%0d iow=%b l=%h u=%h held=%h", adr, iow, out_l, out_u, held);
      end
      iow = 0;
      #1;
      checks++;
      if (out_l != held || out_u != 8'h00) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
