// ols_size_check: drives one ols_top of a given size through a workload of
// random words, used by tb_ols_sizes.
//
// Each word is encoded, up to T random bit errors are put into the code word
// (data and check bits alike), and the word is decoded. The decoded data
// must equal the written word, the uncorrectable flag must stay low, and the
// encoder and syndrome alarms must stay quiet. The expected values are the
// written words themselves, so no model of the code matrix is needed. One
// word in four is read back without errors, and for T = 2 one word in
// sixteen carries T+1 errors: then no check is made on the data, but the
// number of detected words is counted in n_detect.
module ols_size_check
  import ols_pkg::*;
#(
  parameter int unsigned M       = 8,
  parameter int unsigned T       = 2,
  parameter bit          EXT     = 1'b1,
  parameter int unsigned N_WORDS = 500
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_detect
);
  localparam int unsigned K  = data_bits(M, T, EXT);
  localparam int unsigned NR = check_bits(M, T);

  logic          rst;
  logic [K-1:0]  wr_d, enc_d, rd_d, dec_d;
  logic [NR-1:0] enc_c, rd_c, dec_syn;
  logic [1:0]    enc_rr, dec_rr;
  logic          enc_err, dec_corrected, dec_uncorrectable, dec_ced_err;

  ols_top #(.M(M), .T(T), .EXT(EXT)) dut (
    .clk, .rst,
    .wr_d, .enc_d, .enc_c, .enc_rr, .enc_err,
    .rd_d, .rd_c, .dec_d, .dec_syn, .dec_corrected, .dec_uncorrectable, .dec_rr, .dec_ced_err
  );

  function automatic logic [K-1:0] rand_word();
    logic [K-1:0] w;
    for (int i = 0; i < int'(K); i++) w[i] = 1'($urandom);
    return w;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 5) $display("FAIL M=%0d T=%0d EXT=%0d: %s", M, T, EXT, what);
    end
  endtask

  initial begin
    logic [K-1:0]    d;
    logic [K+NR-1:0] e;
    int unsigned     nerr;
    done = 1'b0; checks = 0; failures = 0; n_detect = 0;
    rst = 1'b1; wr_d = '0; rd_d = '0; rd_c = '0;
    @(posedge clk);
    #1;
    rst = 1'b0;
    for (int w = 0; w < int'(N_WORDS); w++) begin
      d = rand_word();
      wr_d = d;
      @(posedge clk);
      #1;
      check(enc_d == d && !enc_err, "encoder");
      e = '0;
      nerr = (w % 4 == 0) ? 0 : (T == 2 && w % 16 == 1) ? T + 1 : 1 + (w % T);
      while ($countones(e) < int'(nerr)) e[$urandom_range(K + NR - 1, 0)] = 1'b1;
      rd_d = enc_d ^ e[K-1:0];
      rd_c = enc_c ^ e[K+NR-1:K];
      @(posedge clk);
      #1;
      check(!dec_ced_err, "syndrome alarm");
      if (nerr <= T) begin
        check(dec_d == d, $sformatf("word %0d with %0d errors not corrected", w, nerr));
        check(!dec_uncorrectable, "false uncorrectable flag");
        check((dec_syn == '0) == (nerr == 0), "syndrome zero iff no error");
      end else if (dec_uncorrectable) begin
        n_detect++;
      end
    end
    done = 1'b1;
  end
endmodule
