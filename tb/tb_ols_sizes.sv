// tb_ols_sizes: runs the codec at every code size the design is evaluated
// for. Configurations: k = 16 with t = 1 and with t = 2 (plain OLS codes,
// m = 4), and the extended t = 2 codes for m = 8 (72 data bits), m = 16
// (336 data bits) and m = 32 (1312 data bits). Each instance gets a
// workload of random words with up to t errors (see ols_size_check); all
// must be corrected.
module tb_ols_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 5;
  logic done [NCFG];
  int   chk  [NCFG];
  int   fail [NCFG];
  int   det  [NCFG];

  ols_size_check #(.M(4),  .T(1), .EXT(1'b0), .N_WORDS(2000)) u_k16_t1
    (.clk, .done(done[0]), .checks(chk[0]), .failures(fail[0]), .n_detect(det[0]));
  ols_size_check #(.M(4),  .T(2), .EXT(1'b0), .N_WORDS(2000)) u_k16_t2
    (.clk, .done(done[1]), .checks(chk[1]), .failures(fail[1]), .n_detect(det[1]));
  ols_size_check #(.M(8),  .T(2), .EXT(1'b1), .N_WORDS(1000)) u_m8
    (.clk, .done(done[2]), .checks(chk[2]), .failures(fail[2]), .n_detect(det[2]));
  ols_size_check #(.M(16), .T(2), .EXT(1'b1), .N_WORDS(500))  u_m16
    (.clk, .done(done[3]), .checks(chk[3]), .failures(fail[3]), .n_detect(det[3]));
  ols_size_check #(.M(32), .T(2), .EXT(1'b1), .N_WORDS(200))  u_m32
    (.clk, .done(done[4]), .checks(chk[4]), .failures(fail[4]), .n_detect(det[4]));

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    @(posedge clk);  // the instances clear their flags at time 0
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    for (int i = 0; i < NCFG; i++) begin
      checks   += chk[i];
      failures += fail[i];
      $display("configuration %0d: checks=%0d failures=%0d words with t+1 errors detected=%0d",
               i, chk[i], fail[i], det[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
