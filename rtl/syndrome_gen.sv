// syndrome_gen: syndrome computation with concurrent error detection.
//
// The check bits of the received data word are recomputed with the same XOR
// trees as the encoder and XORed with the received check bits:
// s = G*d_rx XOR c_rx. Bit r of s is 1 when check equation r fails.
//
// Parity prediction: the recomputed check bits have even parity (every
// column of G has 2t ones), so the parity of s must equal the parity of
// c_rx. The two are delivered on two rails, r1 = parity(s) and
// r2 = parity(c_rx), by a parity_checker over {c_rx, s}; r1 != r2 (ced_err)
// means a fault in the syndrome logic. Concurrent error detection of the
// syndrome computation is part of the original architecture, but its
// circuit is not drawn there; this form, the encoder's parity prediction
// carried over to the syndrome, is this design's own.
//
// Purely combinational.
module syndrome_gen
  import ols_pkg::*;
#(
  parameter int unsigned M   = 4,
  parameter int unsigned T   = 2,
  parameter bit          EXT = 1'b1,
  localparam int unsigned K  = data_bits(M, T, EXT),
  localparam int unsigned NR = check_bits(M, T)
) (
  input  logic [K-1:0]  d_rx,
  input  logic [NR-1:0] c_rx,
  output logic [NR-1:0] s,
  output logic          r1,
  output logic          r2,
  output logic          ced_err
);

  logic [NR-1:0] c_re;

  ols_encoder #(.M(M), .T(T), .EXT(EXT)) u_recompute (
    .d(d_rx),
    .c(c_re)
  );

  assign s = c_re ^ c_rx;

  parity_checker #(.N(2 * NR)) u_check (
    .in ({c_rx, s}),
    .r1 (r1),
    .r2 (r2),
    .err(ced_err)
  );

endmodule
