// boselin_gen: Bose-Lin check bits generator.
//
// The check symbol of a Bose-Lin code with K check bits is the number of zeros
// among the P information bits, taken modulo 2^K. For K = 2 and K = 3 this
// code detects all unidirectional errors of up to 2 and 3 bits respectively,
// with a check part whose width does not depend on P. The counting by modulo
// 2^K follows the code's definition; counting zeros (rather than ones) is this
// design's choice, as are the code variants for K > 3, which are not
// supported. Combinational: a population count of ~d truncated to K bits.
module boselin_gen #(
  parameter int unsigned P = 16,  // information bits
  parameter int unsigned K = 3    // check bits, 2 or 3
) (
  input  logic [P-1:0] d,    // information bits
  output logic [K-1:0] chk   // zeros count modulo 2^K
);
  if (K < 2 || K > 3) begin : g_bad
    $error("boselin_gen: K=%0d not supported (2 or 3)", K);
  end

  always_comb begin
    chk = '0;
    for (int i = 0; i < P; i++) begin
      if (!d[i]) chk = chk + K'(1);
    end
  end
endmodule
