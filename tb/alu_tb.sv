// ALU check for both function sets against integer arithmetic: ADD, SUB,
// LDA, AND (base) and LDA, LSR, ASL, ASR (shift), with the flags each
// function changes and keeps, the hold when ALE is low, and the A-register
// drive onto the data bus with AOE.  Includes the shift examples of the
// original (A = 10011010).
module alu_tb;
  import sc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic ars, ale, alx, aly, aoe;
  logic [7:0] db_in, db_a, db_s, a_a, a_s;
  flags_t f_a, f_s;
  logic [7:0] ma, ms;
  flags_t mfa, mfs;

  alu dut_a (.clk(clk), .ars(ars), .ale(ale), .alx(alx), .aly(aly), .aoe(aoe), .db_in(db_in),
             .db_drv(db_a), .a(a_a), .flags(f_a));
  alu #(.SHIFT_ALU(1'b1)) dut_s (.clk(clk), .ars(ars), .ale(ale), .alx(alx), .aly(aly), .aoe(aoe),
             .db_in(db_in), .db_drv(db_s), .a(a_s), .flags(f_s));

  always #5 clk = ~clk;

  function automatic int sx(logic [7:0] v);
    return (v >= 128) ? int'(v) - 256 : int'(v);
  endfunction

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ale = 0; alx = 0; aly = 0; aoe = 0; db_in = 0;
    ars = 0; #1 ars = 1; #2 ars = 0;
    ma = 0; ms = 0; mfa = '0; mfs = '0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      ale = ($urandom % 4) != 0; {alx, aly} = 2'($urandom); aoe = 1'($urandom);
      db_in = 8'($urandom);
      if (k == 0) begin ale = 1; {alx, aly} = 2'b10; db_in = 8'b10011010; end
      #1;
      checks++;
      if (db_a != (aoe ? ma : 8'h00) || db_s != (aoe ? ms : 8'h00)) failures++;
      // base model
      if (ale) begin
        int r;
        case ({alx, aly})
          2'b00: begin
            r = sx(ma) + sx(db_in);
            mfa.cf = (int'(ma) + int'(db_in)) > 255; mfa.vf = (r > 127 || r < -128);
            ma = ma + db_in;
          end
          2'b01: begin
            r = sx(ma) - sx(db_in);
            mfa.cf = (ma >= db_in); mfa.vf = (r > 127 || r < -128);
            ma = ma - db_in;
          end
          2'b10: ma = db_in;
          default: ma = ma & db_in;
        endcase
        mfa.zf = (ma == 0); mfa.nf = ma[7];
        // shift model
        case ({alx, aly})
          2'b00: ms = db_in;
          2'b01: begin mfs.cf = ms[0]; ms = ms >> 1; end
          2'b10: begin mfs.cf = ms[7]; ms = ms << 1; end
          default: begin mfs.cf = ms[0]; ms = 8'($signed(ms) >>> 1); end
        endcase
        mfs.zf = (ms == 0); mfs.nf = ms[7];
      end
      @(posedge clk); #1;
      checks++;
      if (a_a != ma || f_a != mfa) begin
        failures++;
        $display("FAIL base a=%h f=%b exp %h %b", a_a, f_a, ma, mfa);
      end
      checks++;
      if (a_s != ms || f_s != mfs) begin
        failures++;
        $display("FAIL shift a=%h f=%b exp %h %b", a_s, f_s, ms, mfs);
      end
    end
    // Worked shift examples: A = 10011010
    for (int fn = 1; fn < 4; fn++) begin
      logic [7:0] expv;
      logic       expc;
      @(negedge clk) ale = 1; {alx, aly} = 2'b00; db_in = 8'b10011010;
      @(negedge clk) {alx, aly} = 2'(fn);
      @(negedge clk) ale = 0;
      case (fn)
        1: begin expv = 8'b01001101; expc = 0; end
        2: begin expv = 8'b00110100; expc = 1; end
        default: begin expv = 8'b11001101; expc = 0; end
      endcase
      checks++;
      if (a_s != expv || f_s.cf != expc) begin
        failures++;
        $display("FAIL shift example %0d: %b cf=%b", fn, a_s, f_s.cf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
