// pg_checker: checker for a parity-group code with G groups over P data bits.
//
// The data bits are cut into G contiguous groups of ceil(P/G) bits (the last
// group takes the remainder), as in the 16-bit, 4-group arrangement where
// group j holds Z(4j+1)..Z(4j+4) and check bit C(j+1). Each group has its own
// TSC parity checker giving a two-rail pair (f_j, g_j); a TRC tree with G
// input pairs merges them into the single error pair (f, g). G = 1 is the
// single-parity scheme. (f, g) is 01 or 10 when every group has even parity,
// 00 or 11 otherwise. Combinational, no clock.
module pg_checker #(
  parameter int unsigned P = 16,  // data bits
  parameter int unsigned G = 4    // parity groups = check bits
) (
  input  logic [P-1:0] d,  // data part
  input  logic [G-1:0] c,  // check part, one bit per group
  output logic         f,
  output logic         g
);
  localparam int unsigned S = (P + G - 1) / G;  // group size

  if (G == 0 || (G - 1) * S >= P) begin : g_bad
    $error("pg_checker: G=%0d groups do not fit in P=%0d bits", G, P);
  end

  logic [G-1:0] gf, gg;

  for (genvar j = 0; j < G; j++) begin : g_grp
    localparam int unsigned LO = j * S;
    localparam int unsigned HI = ((j + 1) * S < P) ? (j + 1) * S - 1 : P - 1;
    parity_checker #(.M(HI - LO + 1)) u_par (
      .d(d[HI:LO]), .c(c[j]), .f(gf[j]), .g(gg[j])
    );
  end

  trc_tree #(.N(G)) u_trc (.t(gf), .c(gg), .f(f), .g(g));
endmodule
