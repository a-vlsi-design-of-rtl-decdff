// parity_checker: self-checking two-rail parity checker.
//
// The input vector is cut into two disjoint halves and each output is the
// parity of one half: r1 = XOR of in[N/2-1:0], r2 = XOR of in[N-1:N/2]. When
// the whole vector has even parity the outputs form a code word of the
// repetition code, 00 or 11; 01 or 10 signals an error. Because the checker
// encodes its verdict on two rails, a stuck-at fault inside it also shows up
// as 01/10 for some valid input, so the checker is self-checking itself.
//
// For the encoder the input is the check bit vector c1..c2tm: every column of
// G has 2t ones, so the XOR of all check bits of a correct encoder is 0, and
// the halves are the first and second t groups (c1..c4 and c5..c8 for the
// k = 16, t = 1 code). The choice of the halves for larger codes is this
// design's own; any split works. err = r1 ^ r2 is given for convenience.
//
// Purely combinational. N must be even.
module parity_checker #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] in,
  output logic         r1,
  output logic         r2,
  output logic         err
);

  if (N % 2 != 0) begin : g_bad_n
    $error("parity_checker: N must be even");
  end

  assign r1  = ^in[N/2-1:0];
  assign r2  = ^in[N-1:N/2];
  assign err = r1 ^ r2;

endmodule
