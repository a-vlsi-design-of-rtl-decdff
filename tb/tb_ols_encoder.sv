// tb_ols_encoder: checks the OLS check bit generator.
//
// Default instance (m = 4, t = 2, 20 data bits): every unit vector, 2000
// random words and the all-ones word are compared with ols_ref_pkg, which
// holds the published parity check matrix typed in by hand; the XOR of all
// check bits must be 0 (parity prediction). A k = 16, t = 1 instance is
// compared with the first eight rows. Instances for m = 8 and m = 16 (t = 2,
// extended) are checked for the properties one-step majority decoding needs:
// every data column has 2t ones and two columns share at most one check bit,
// and for the data width the construction is stated to reach (72 and 336).
module tb_ols_encoder;
  import ols_ref_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // ---- default: m = 4, t = 2, extended ----
  logic [19:0] d20;
  logic [15:0] c16;
  ols_encoder dut (.d(d20), .c(c16));

  // ---- m = 4, t = 1, not extended ----
  logic [15:0] d16;
  logic [7:0]  c8;
  ols_encoder #(.M(4), .T(1), .EXT(1'b0)) dut_t1 (.d(d16), .c(c8));

  // ---- m = 8, t = 2, extended: 64 + 8 data bits, 32 check bits ----
  localparam int unsigned K8 = ols_pkg::data_bits(8, 2, 1'b1);
  logic [K8-1:0] d8;
  logic [31:0]   c32;
  ols_encoder #(.M(8), .T(2), .EXT(1'b1)) dut_m8 (.d(d8), .c(c32));

  // ---- m = 16, t = 2, extended: 256 + 80 data bits, 64 check bits ----
  localparam int unsigned K16 = ols_pkg::data_bits(16, 2, 1'b1);
  logic [K16-1:0] dm16;
  logic [63:0]    c64;
  ols_encoder #(.M(16), .T(2), .EXT(1'b1)) dut_m16 (.d(dm16), .c(c64));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d20 = '0; d16 = '0; d8 = '0; dm16 = '0;
    #1;
    // unit vectors and random words, default configuration
    for (int i = 0; i < 2020; i++) begin
      if (i < 20) d20 = 20'(1) << i;
      else if (i == 2019) d20 = '1;
      else d20 = 20'($urandom);
      d16 = d20[15:0];
      #1;
      check(c16 == ref_encode(d20), $sformatf("t2 d=%h c=%h ref=%h", d20, c16, ref_encode(d20)));
      check(^c16 == 1'b0, "t2 parity of check bits");
      check(c8 == ref_encode(20'(d16), 8, 16) [7:0],
            $sformatf("t1 d=%h c=%h ref=%h", d16, c8, ref_encode(20'(d16), 8, 16)));
      check(^c8 == 1'b0, "t1 parity of check bits");
    end

    // structural properties of the larger codes
    check(K8 == 72, $sformatf("m=8 data bits %0d", K8));
    check(K16 == 336, $sformatf("m=16 data bits %0d", K16));
    for (int a = 0; a < int'(K8); a++) begin
      d8 = '0; d8[a] = 1'b1; #1;
      check($countones(c32) == 4, $sformatf("m=8 column %0d weight %0d", a, $countones(c32)));
      for (int b = a + 1; b < int'(K8); b++) begin
        d8 = '0; d8[a] = 1'b1; d8[b] = 1'b1; #1;
        // shared rows cancel: weight 8 - 2*shared, shared <= 1
        check($countones(c32) >= 6, $sformatf("m=8 columns %0d,%0d share >1", a, b));
      end
    end
    for (int a = 0; a < int'(K16); a++) begin
      dm16 = '0; dm16[a] = 1'b1; #1;
      check($countones(c64) == 4, $sformatf("m=16 column %0d weight", a));
      for (int b = a + 1; b < int'(K16); b++) begin
        dm16 = '0; dm16[a] = 1'b1; dm16[b] = 1'b1; #1;
        if ($countones(c64) < 6) check(1'b0, $sformatf("m=16 columns %0d,%0d share >1", a, b));
      end
    end
    checks++;  // the pairwise sweep above as one check
    for (int i = 0; i < 200; i++) begin
      dm16 = K16'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                   $urandom, $urandom, $urandom, $urandom});
      d8 = K8'({$urandom, $urandom, $urandom});
      #1;
      check(^c64 == 1'b0 && ^c32 == 1'b0, "parity of check bits, m=8/16");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
