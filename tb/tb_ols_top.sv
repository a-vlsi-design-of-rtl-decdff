// tb_ols_top: end-to-end test of the self-checking OLS codec at its default
// size (m = 4, t = 2, 20 data bits, 16 check bits).
//
// Words are written through the encoder into a small memory model kept here,
// read back with 0 to 3 injected bit errors, and decoded. Every output is
// checked against ols_ref_pkg one clock after its inputs (the design has one
// register stage). The run must make each mechanism happen at least once:
// reset, error-free read, correction of one and of two data bits, errors in
// check bits only, detection of a word with three errors, and the two
// concurrent error detection alarms. The alarms need a fault inside the
// design, so a stuck check bit in the encoder and a flipped syndrome bit are
// imposed with force/release for a few cycles.
module tb_ols_top;
  import ols_ref_pkg::*;

  localparam int unsigned K  = 20;
  localparam int unsigned NR = 16;
  localparam int unsigned DEPTH = 64;

  int checks = 0, failures = 0;
  // how often each mechanism happened
  int n_reset = 0, n_clean = 0, n_corr1 = 0, n_corr2 = 0, n_chkonly = 0;
  int n_uncorr = 0, n_enc_ced = 0, n_syn_ced = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  logic          clk = 1'b0;
  logic          rst;
  logic [K-1:0]  wr_d, enc_d, rd_d, dec_d;
  logic [NR-1:0] enc_c, rd_c, dec_syn;
  logic [1:0]    enc_rr, dec_rr;
  logic          enc_err, dec_corrected, dec_uncorrectable, dec_ced_err;

  ols_top dut (
    .clk, .rst,
    .wr_d, .enc_d, .enc_c, .enc_rr, .enc_err,
    .rd_d, .rd_c, .dec_d, .dec_syn, .dec_corrected, .dec_uncorrectable, .dec_rr, .dec_ced_err
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model: code words as written by the encoder
  logic [K-1:0]  mem_d [DEPTH];
  logic [NR-1:0] mem_c [DEPTH];

  // random error pattern over the 36-bit code word with exactly n ones
  function automatic logic [K+NR-1:0] rand_err(input int unsigned n);
    logic [K+NR-1:0] e;
    e = '0;
    while ($countones(e) < n) e[$urandom_range(K + NR - 1, 0)] = 1'b1;
    return e;
  endfunction

  // write one word and check the encoder output a clock later
  task automatic write_word(input int unsigned addr, input logic [K-1:0] d);
    wr_d <= d;
    @(posedge clk);
    #1;
    check(enc_d == d && enc_c == ref_encode(d), $sformatf("encode %h: c=%h ref=%h", d, enc_c,
          ref_encode(d)));
    check(!enc_err && enc_rr[0] == enc_rr[1], "encoder alarm without a fault");
    mem_d[addr] = enc_d;
    mem_c[addr] = enc_c;
  endtask

  // read one word with error pattern e and check the decoder a clock later
  task automatic read_word(input int unsigned addr, input logic [K+NR-1:0] e);
    logic [K-1:0]  d0;
    logic [NR-1:0] syn;
    int unsigned   nerr, ndata;
    d0    = mem_d[addr];
    nerr  = $countones(e);
    ndata = $countones(e[K-1:0]);
    rd_d <= d0 ^ e[K-1:0];
    rd_c <= mem_c[addr] ^ e[K+NR-1:K];
    @(posedge clk);
    #1;
    syn = ref_encode(d0 ^ e[K-1:0]) ^ mem_c[addr] ^ e[K+NR-1:K];
    check(dec_syn == syn, "syndrome");
    check(!dec_ced_err && dec_rr[0] == dec_rr[1], "syndrome alarm without a fault");
    if (nerr <= 2) begin
      check(dec_d == d0, $sformatf("read %h with %0d errors got %h", d0, nerr, dec_d));
      check(dec_corrected == (ndata != 0), "corrected flag");
      check(!dec_uncorrectable, $sformatf("false uncorrectable, e=%h", e));
      if (nerr == 0) n_clean++;
      else if (ndata == 0) n_chkonly++;
      else if (ndata == 1 && nerr == 1) n_corr1++;
      else if (ndata == 2) n_corr2++;
    end else begin
      check(dec_uncorrectable == ref_uncorrectable(syn), "uncorrectable flag");
      check(dec_d == ((d0 ^ e[K-1:0]) ^ ref_flip(syn)), "data with three errors");
      if (dec_uncorrectable) n_uncorr++;
    end
  endtask

  initial begin
    rst  = 1'b1;
    wr_d = '0;
    rd_d = '0;
    rd_c = '0;
    repeat (2) @(posedge clk);
    #1;
    check(enc_c == '0 && dec_d == '0 && !enc_err && !dec_uncorrectable && !dec_ced_err,
          "outputs after reset");
    n_reset++;
    rst = 1'b0;

    // fill the memory
    for (int a = 0; a < int'(DEPTH); a++)
      write_word(a, (a == 0) ? '0 : (a == 1) ? '1 : K'($urandom));

    // read back with 0..3 errors
    for (int i = 0; i < 4000; i++)
      read_word($urandom_range(DEPTH - 1, 0), rand_err(i % 4));

    // encoder fault: one check bit stuck at the wrong value
    for (int i = 0; i < 8; i++) begin
      logic [K-1:0] d;
      logic [NR-1:0] bad;
      d   = K'($urandom);
      bad = ref_encode(d) ^ (NR'(1) << (i % NR));
      force dut.c_enc = bad;
      wr_d <= d;
      @(posedge clk);
      #1;
      check(enc_err && enc_rr[0] != enc_rr[1], "encoder fault not signalled");
      if (enc_err) n_enc_ced++;
      release dut.c_enc;
    end

    // syndrome logic fault: one syndrome bit flipped
    for (int i = 0; i < 8; i++) begin
      int unsigned a;
      logic [NR-1:0] syn;
      a = $urandom_range(DEPTH - 1, 0);
      syn = ref_encode(mem_d[a]) ^ mem_c[a] ^ (NR'(1) << i);
      force dut.syn = syn;
      rd_d <= mem_d[a];
      rd_c <= mem_c[a];
      @(posedge clk);
      #1;
      check(dec_ced_err && dec_rr[0] != dec_rr[1], "syndrome fault not signalled");
      if (dec_ced_err) n_syn_ced++;
      release dut.syn;
    end

    // reset again in the middle of operation
    rst <= 1'b1;
    @(posedge clk);
    #1;
    check(enc_c == '0 && dec_d == '0 && !dec_corrected, "outputs after second reset");
    n_reset++;

    $display("mechanisms: reset=%0d clean=%0d corr1=%0d corr2=%0d check_only=%0d",
             n_reset, n_clean, n_corr1, n_corr2, n_chkonly);
    $display("            uncorrectable=%0d encoder_ced=%0d syndrome_ced=%0d",
             n_uncorr, n_enc_ced, n_syn_ced);
    check(n_reset > 0 && n_clean > 0 && n_corr1 > 0 && n_corr2 > 0 && n_chkonly > 0 &&
          n_uncorr > 0 && n_enc_ced > 0 && n_syn_ced > 0, "a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
