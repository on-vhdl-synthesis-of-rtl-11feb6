// boselin_checker: totally self-checking checker for a Bose-Lin code word.
//
// The received code word is P information bits and K check bits. The check
// bits are regenerated from the information bits (boselin_gen), inverted, and
// paired bit by bit with the received check bits; a TSC double-rail checker
// (trc_tree with K pairs) reduces the K pairs to the error pair (g, f). The
// pair is 01 or 10 when received and regenerated check bits agree and 00 or
// 11 when they differ. This structure follows the Bose-Lin checker of the
// design; the generator's encoding is described in boselin_gen.
// Combinational, no clock.
module boselin_checker #(
  parameter int unsigned P = 16,  // information bits
  parameter int unsigned K = 3    // check bits
) (
  input  logic [P-1:0] info,  // information bits I_x
  input  logic [K-1:0] chk,   // received check bits P_x
  output logic         f,
  output logic         g
);
  logic [K-1:0] regen;

  boselin_gen #(.P(P), .K(K)) u_gen (.d(info), .chk(regen));

  trc_tree #(.N(K)) u_drc (.t(chk), .c(~regen), .f(f), .g(g));
endmodule
