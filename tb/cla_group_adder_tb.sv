// Random and corner-case check of the 16-bit group ripple adder (four 4-bit
// CLA blocks) against integer addition, including carries that ripple
// through every group.
module cla_group_adder_tb;
  int checks = 0, failures = 0;
  logic [15:0] x, y, s;
  logic cin, cout;

  cla_group_adder dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      x = 16'($urandom); y = 16'($urandom); cin = 1'($urandom);
      if (i == 0) begin x = 16'hFFFF; y = 16'h0000; cin = 1'b1; end
      if (i == 1) begin x = 16'hFFFF; y = 16'hFFFF; cin = 1'b1; end
      if (i == 2) begin x = 16'h0F0F; y = 16'h00F1; cin = 1'b0; end
      #1;
      checks++;
      if ({cout, s} != 17'(int'(x) + int'(y) + int'(cin))) begin
        failures++;
        $display("FAIL %h+%h+%b -> %b %h", x, y, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
