// tb_parity_checker: checks the two-rail parity checker.
//
// For N = 16 random and walking-one vectors the rails must equal the parity
// of the low and of the high half, and err their XOR; vectors of even total
// parity must give 00 or 11 and odd ones 01 or 10. A second instance with
// N = 8 is swept exhaustively.
module tb_parity_checker;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  logic [15:0] v16;
  logic        a1, a2, ae;
  parity_checker dut (.in(v16), .r1(a1), .r2(a2), .err(ae));

  logic [7:0] v8;
  logic       b1, b2, be;
  parity_checker #(.N(8)) dut8 (.in(v8), .r1(b1), .r2(b2), .err(be));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit p_lo, p_hi;
    v16 = '0; v8 = '0;
    for (int i = 0; i < 1000; i++) begin
      v16 = (i < 16) ? 16'(1) << i : 16'($urandom);
      #1;
      p_lo = 1'b0; p_hi = 1'b0;
      for (int b = 0; b < 8; b++) begin
        p_lo ^= v16[b];
        p_hi ^= v16[b+8];
      end
      check(a1 == p_lo && a2 == p_hi, $sformatf("v=%h r1=%b r2=%b", v16, a1, a2));
      check(ae == (p_lo != p_hi), $sformatf("v=%h err=%b", v16, ae));
    end
    for (int i = 0; i < 256; i++) begin
      v8 = 8'(i);
      #1;
      check(be == ($countones(v8) % 2 == 1), $sformatf("N=8 v=%h err=%b", v8, be));
      check(b1 == (^v8[3:0]) && b2 == (^v8[7:4]), $sformatf("N=8 v=%h rails", v8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
