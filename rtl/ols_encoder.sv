// ols_encoder: check bit generator of an (extended) OLS code.
//
// Each check bit is the XOR of the data bits that have a 1 in its row of the
// generator matrix G = [M1; M2; ...] (the data part of H). The rows are built
// at elaboration time by ols_pkg::row_mask, so the circuit is a bank of
// independent XOR trees, one per check bit, with no logic shared between
// trees. That is what makes the parity-prediction check of parity_checker
// work: a single faulty node changes at most one check bit.
//
// Defaults follow the main configuration of the design: m = 4, t = 2 (double
// error correction), extended from 16 to 20 data bits. With EXT = 0 and T = 1
// it is the single error correcting k = 16 encoder with 8 check bits.
//
// Interface: d (K data bits, data bit d_n is d[n-1]) in, c (NR check bits)
// out. Purely combinational, no clock.
module ols_encoder
  import ols_pkg::*;
#(
  parameter int unsigned M   = 4,
  parameter int unsigned T   = 2,
  parameter bit          EXT = 1'b1,
  localparam int unsigned K  = data_bits(M, T, EXT),
  localparam int unsigned NR = check_bits(M, T)
) (
  input  logic [K-1:0]  d,
  output logic [NR-1:0] c
);

  if (!valid_config(M, T, EXT)) begin : g_bad_config
    $error("ols_encoder: unsupported M/T/EXT combination");
  end

  for (genvar r = 0; r < NR; r++) begin : g_row
    localparam logic [KMAX-1:0] MaskFull = row_mask(M, T, K, r);
    localparam logic [K-1:0]    Mask     = MaskFull[K-1:0];
    assign c[r] = ^(d & Mask);
  end

endmodule
