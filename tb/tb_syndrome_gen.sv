// tb_syndrome_gen: checks syndrome computation and its parity prediction.
//
// Code words are built with the reference encoder of ols_ref_pkg and up to
// three random bit errors are injected in data or check bits. The syndrome
// must equal reference_check_bits(received data) XOR received check bits, be
// zero for an error-free word, the rails must be parity(s) and parity(c_rx),
// and they must agree (no alarm in a fault-free circuit). The alarm itself
// is provoked in tb_ols_top by forcing a wrong syndrome bit.
module tb_syndrome_gen;
  import ols_ref_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  logic [19:0] d_rx;
  logic [15:0] c_rx, s;
  logic        r1, r2, ced_err;
  syndrome_gen dut (.d_rx(d_rx), .c_rx(c_rx), .s(s), .r1(r1), .r2(r2), .ced_err(ced_err));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [19:0] d;
    logic [35:0] e;
    int unsigned nerr;
    d_rx = '0; c_rx = '0;
    for (int i = 0; i < 3000; i++) begin
      d = 20'($urandom);
      e = '0;
      nerr = (i < 500) ? 0 : $urandom_range(3, 1);
      for (int j = 0; j < int'(nerr); j++) e[$urandom_range(35, 0)] = 1'b1;
      d_rx = d ^ e[19:0];
      c_rx = ref_encode(d) ^ e[35:20];
      #1;
      check(s == (ref_encode(d_rx) ^ c_rx), $sformatf("d=%h c=%h s=%h", d_rx, c_rx, s));
      if (e == '0) check(s == '0, "nonzero syndrome for a code word");
      check(!ced_err && r1 == r2, "ced alarm in a fault-free circuit");
      check(r1 == ^s && r2 == ^c_rx, "rail values");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
