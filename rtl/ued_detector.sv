// ued_detector: detection of uncorrectable errors (more than t bits wrong).
//
// After majority decoding has flipped the data bits in flip, the syndrome
// that is left unexplained is s_res = s XOR G*flip: the failing equations
// that the flipped data bits do not account for. With t or fewer errors these
// are exactly the wrong check bits, so weight(flip) + weight(s_res) equals
// the number of errors and is at most t. When it exceeds t the word holds
// more than t errors: uncorrectable is raised instead of silently passing
// mis-corrected data on. The original architecture states the aim (detecting
// errors that affect more than two bits, to avoid silent data corruption)
// but not the circuit; this residual-syndrome count is this design's own choice. It never
// raises a false alarm for t or fewer errors; it catches most, not all,
// patterns of t+1 or more errors.
//
// Interface: s (syndrome) and flip (from mld_corrector) in; uncorrectable and
// the two weights out. Combinational.
module ued_detector
  import ols_pkg::*;
#(
  parameter int unsigned M   = 4,
  parameter int unsigned T   = 2,
  parameter bit          EXT = 1'b1,
  localparam int unsigned K  = data_bits(M, T, EXT),
  localparam int unsigned NR = check_bits(M, T)
) (
  input  logic [NR-1:0]        s,
  input  logic [K-1:0]         flip,
  output logic [NR-1:0]        s_res,
  output logic [$clog2(K+1)-1:0]  n_flip,
  output logic [$clog2(NR+1)-1:0] n_res,
  output logic                 uncorrectable
);

  logic [NR-1:0] s_flip;

  ols_encoder #(.M(M), .T(T), .EXT(EXT)) u_explained (
    .d(flip),
    .c(s_flip)
  );

  assign s_res  = s ^ s_flip;
  assign n_flip = $bits(n_flip)'($countones(flip));
  assign n_res  = $bits(n_res)'($countones(s_res));
  assign uncorrectable = (32'(n_flip) + 32'(n_res)) > T;

endmodule
