// ols_top: self-checking OLS encoder and decoder for a protected memory word.
//
// Write side: the data word wr_d is encoded (ols_encoder) into NR check bits,
// and a two-rail parity checker (parity_checker) watches the check bits:
// every column of the generator matrix has an even number (2t) of ones, so a
// correct set of check bits has even parity and the checker answers 00 or 11.
// enc_err is raised when it answers 01 or 10, i.e. when a fault in the
// encoder has corrupted a check bit. The checking runs beside the write, off
// the encoder's critical path.
//
// Read side: the stored word (rd_d, rd_c) goes through syndrome_gen (with its
// own parity-prediction check, dec_ced_err), mld_corrector (one-step majority
// logic decoding, corrects up to T bit errors) and ued_detector, which flags
// words with more than T errors (dec_uncorrectable) instead of passing
// mis-corrected data on silently.
//
// Timing: inputs go through the combinational logic into one rank of
// registers that drive the outputs directly; every output is valid one clock
// after its inputs, with a new word accepted every cycle. There is no
// register-to-register path. Synchronous active-high reset clears the output
// registers. The single register stage and the clk/rst/error_det style of
// interface follow the published implementation; the split into write and
// read sides and the decoder flags are this design's choice.
//
// Defaults: m = 4, t = 2, extended code with 20 data bits and 16 check bits.
module ols_top
  import ols_pkg::*;
#(
  parameter int unsigned M   = 4,
  parameter int unsigned T   = 2,
  parameter bit          EXT = 1'b1,
  localparam int unsigned K  = data_bits(M, T, EXT),
  localparam int unsigned NR = check_bits(M, T)
) (
  input  logic          clk,
  input  logic          rst,
  // write side: data to protect
  input  logic [K-1:0]  wr_d,
  output logic [K-1:0]  enc_d,        // data bits of the code word
  output logic [NR-1:0] enc_c,        // check bits of the code word
  output logic [1:0]    enc_rr,       // checker rails {r2, r1}: 00/11 good
  output logic          enc_err,      // encoder concurrent error detection
  // read side: code word read back
  input  logic [K-1:0]  rd_d,
  input  logic [NR-1:0] rd_c,
  output logic [K-1:0]  dec_d,        // corrected data
  output logic [NR-1:0] dec_syn,      // syndrome
  output logic          dec_corrected,     // at least one data bit flipped
  output logic          dec_uncorrectable, // more than T errors detected
  output logic [1:0]    dec_rr,            // syndrome checker rails {r2, r1}
  output logic          dec_ced_err        // syndrome logic fault detected
);

  // ---------------- write side ----------------
  logic [NR-1:0] c_enc;
  logic          enc_r1, enc_r2, enc_chk_err;

  ols_encoder #(.M(M), .T(T), .EXT(EXT)) u_enc (
    .d(wr_d),
    .c(c_enc)
  );

  parity_checker #(.N(NR)) u_enc_chk (
    .in (c_enc),
    .r1 (enc_r1),
    .r2 (enc_r2),
    .err(enc_chk_err)
  );

  // ---------------- read side ----------------
  logic [NR-1:0] syn;
  logic          syn_r1, syn_r2, syn_err;
  logic [K-1:0]  d_cor, flip;
  logic          uncorr;

  syndrome_gen #(.M(M), .T(T), .EXT(EXT)) u_syn (
    .d_rx   (rd_d),
    .c_rx   (rd_c),
    .s      (syn),
    .r1     (syn_r1),
    .r2     (syn_r2),
    .ced_err(syn_err)
  );

  mld_corrector #(.M(M), .T(T), .EXT(EXT)) u_mld (
    .d_rx (rd_d),
    .s    (syn),
    .d_cor(d_cor),
    .flip (flip)
  );

  ued_detector #(.M(M), .T(T), .EXT(EXT)) u_ued (
    .s            (syn),
    .flip         (flip),
    .s_res        (),
    .n_flip       (),
    .n_res        (),
    .uncorrectable(uncorr)
  );

  // ---------------- output registers ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      enc_d             <= '0;
      enc_c             <= '0;
      enc_rr            <= 2'b00;
      enc_err           <= 1'b0;
      dec_d             <= '0;
      dec_syn           <= '0;
      dec_corrected     <= 1'b0;
      dec_uncorrectable <= 1'b0;
      dec_rr            <= 2'b00;
      dec_ced_err       <= 1'b0;
    end else begin
      enc_d             <= wr_d;
      enc_c             <= c_enc;
      enc_rr            <= {enc_r2, enc_r1};
      enc_err           <= enc_chk_err;
      dec_d             <= d_cor;
      dec_syn           <= syn;
      dec_corrected     <= |flip;
      dec_uncorrectable <= uncorr;
      dec_rr            <= {syn_r2, syn_r1};
      dec_ced_err       <= syn_err;
    end
  end

endmodule
