// tb_mld_corrector: checks one-step majority correction.
//
// For random data words every pattern of one and of two bit errors over the
// 36-bit code word (20 data + 16 check bits) is applied together with the
// syndrome from the reference model. The corrected data must equal the
// original word and flip must mark exactly the data bits in error. For three
// errors the flip vector must match the reference majority decoder.
module tb_mld_corrector;
  import ols_ref_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  logic [19:0] d_rx, d_cor, flip;
  logic [15:0] s;
  mld_corrector dut (.d_rx(d_rx), .s(s), .d_cor(d_cor), .flip(flip));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [19:0] d, input logic [35:0] e, input bit exact);
    d_rx = d ^ e[19:0];
    s    = ref_encode(d_rx) ^ (ref_encode(d) ^ e[35:20]);
    #1;
    if (exact) begin
      check(d_cor == d, $sformatf("d=%h e=%h got=%h", d, e, d_cor));
      check(flip == e[19:0], $sformatf("e=%h flip=%h", e, flip));
    end else begin
      check(flip == ref_flip(s), $sformatf("3 errors e=%h flip=%h", e, flip));
      check(d_cor == (d_rx ^ ref_flip(s)), "3 errors data");
    end
  endtask

  initial begin
    logic [19:0] d;
    d_rx = '0; s = '0;
    for (int w = 0; w < 4; w++) begin
      d = (w == 0) ? 20'h0 : (w == 1) ? 20'hFFFFF : 20'($urandom);
      apply(d, '0, 1'b1);
      for (int a = 0; a < 36; a++) begin
        apply(d, 36'(1) << a, 1'b1);
        for (int b = a + 1; b < 36; b++) apply(d, (36'(1) << a) | (36'(1) << b), 1'b1);
      end
    end
    for (int i = 0; i < 2000; i++) begin
      int a, b, c;
      a = $urandom_range(35, 0);
      do b = $urandom_range(35, 0); while (b == a);
      do c = $urandom_range(35, 0); while (c == a || c == b);
      apply(20'($urandom), (36'(1) << a) | (36'(1) << b) | (36'(1) << c), 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
