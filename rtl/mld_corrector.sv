// mld_corrector: one-step majority logic decoding (OS-MLD) of the data bits.
//
// Each data bit takes part in exactly 2t check equations, and no other bit
// takes part in more than one of them. For every data bit a majority circuit
// looks at its 2t syndrome bits; when at least t+1 of them are 1 the bit is
// declared wrong and flipped by a correction XOR gate. With t or fewer errors
// at most t-1 of the 2t equations of a correct bit can fail, so correct bits
// are never flipped, and every wrong bit sees at least t+1 failing equations.
// The threshold t+1 follows the original architecture; for 2t = 4 inputs
// it is 3-of-4.
//
// Interface: d_rx (K received data bits), s (NR syndrome bits) in; d_cor
// (corrected data) and flip (which bits were flipped) out. Combinational.
module mld_corrector
  import ols_pkg::*;
#(
  parameter int unsigned M   = 4,
  parameter int unsigned T   = 2,
  parameter bit          EXT = 1'b1,
  localparam int unsigned K  = data_bits(M, T, EXT),
  localparam int unsigned NR = check_bits(M, T)
) (
  input  logic [K-1:0]  d_rx,
  input  logic [NR-1:0] s,
  output logic [K-1:0]  d_cor,
  output logic [K-1:0]  flip
);

  for (genvar col = 0; col < K; col++) begin : g_bit
    logic [2*T-1:0] votes;
    for (genvar n = 0; n < 2 * T; n++) begin : g_vote
      localparam int unsigned Row = col_row(M, T, col, n);
      assign votes[n] = s[Row];
    end
    assign flip[col]  = $countones(votes) >= T + 1;
    assign d_cor[col] = d_rx[col] ^ flip[col];
  end

endmodule
