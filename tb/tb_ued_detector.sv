// tb_ued_detector: checks the uncorrectable-error flag.
//
// The syndrome and flip vector of each error pattern come from the reference
// model. All patterns of up to two errors over the 36-bit code word must not
// raise the flag and must give n_flip + n_res equal to the number of errors;
// for every pattern of three errors the flag must match the reference
// verdict. The number of detected three-error patterns is printed.
module tb_ued_detector;
  import ols_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_three = 0, n_detected = 0;  // three-error patterns applied / detected

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  logic [15:0] s, s_res;
  logic [19:0] flip;
  logic [4:0]  n_flip;
  logic [4:0]  n_res;
  logic        unc;
  ued_detector dut (.s(s), .flip(flip), .s_res(s_res), .n_flip(n_flip), .n_res(n_res),
                    .uncorrectable(unc));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count3(input bit detected);
    n_three++;
    if (detected) n_detected++;
  endtask

  // syndrome of error pattern e (data errors e[19:0], check errors e[35:20])
  function automatic logic [15:0] syn_of(input logic [35:0] e);
    return ref_encode(e[19:0]) ^ e[35:20];
  endfunction

  initial begin
    logic [35:0] e;
    s = '0; flip = '0;
    for (int a = -1; a < 36; a++)
      for (int b = a + 1; b < 36; b++) begin
        e = '0;
        if (a >= 0) e[a] = 1'b1;
        e[b] = 1'b1;
        s = syn_of(e);
        flip = ref_flip(s);
        #1;
        check(!unc, $sformatf("false alarm e=%h", e));
        check(int'(n_flip) + int'(n_res) == $countones(e), $sformatf("count e=%h", e));
        check(s_res == e[35:20], $sformatf("residual e=%h", e));
      end
    for (int a = 0; a < 36; a++)
      for (int b = a + 1; b < 36; b++)
        for (int cc = b + 1; cc < 36; cc++) begin
          e = (36'(1) << a) | (36'(1) << b) | (36'(1) << cc);
          s = syn_of(e);
          flip = ref_flip(s);
          #1;
          count3(unc);
          check(unc == ref_uncorrectable(s), $sformatf("3 errors e=%h unc=%b", e, unc));
        end
    $display("three-error patterns detected: %0d of %0d", n_detected, n_three);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
