// trc_tree: totally self-checking two-rail (equality) checker for N pairs.
//
// Pair i is (t[i], c[i]) and is a code word when t[i] != c[i]. The pairs are
// reduced by a binary tree of N-1 trc_cell instances to one pair (f, g):
// f != g when every input pair is a code word, f == g as soon as one is not.
// The module is the TSC equality comparator of the duplication scheme
// (t = outputs of copy 1, c = complemented outputs of copy 2), the double-rail
// checker of the Bose-Lin checker and the final combiner of the parity-group
// checker. The tree is laid out like a heap: node n (1..2N-1) carries one
// pair, the input pairs are the leaves N..2N-1 and internal node n is the
// cell fed by nodes 2n and 2n+1; node 1 is the output. This gives a complete
// binary tree of depth ceil(log2 N) for any N. N = 1 is a wire. For four
// pairs this is the two-cells-into-a-third arrangement of the duplication
// checker; the heap layout for other N is this design's choice. Verilator
// may report the node vector as a circular (UNOPTFLAT) signal: the bits only
// depend on bits with a higher index, there is no real loop.
// Combinational, no clock.
module trc_tree #(
  parameter int unsigned N = 4  // number of two-rail input pairs, >= 1
) (
  input  logic [N-1:0] t,  // true rails
  input  logic [N-1:0] c,  // complement rails
  output logic         f,
  output logic         g
);
  if (N == 0) begin : g_bad
    $error("trc_tree: N must be at least 1");
  end

  logic [2*N-1:1] nf, ng;  // rails of every tree node

  for (genvar i = 0; i < N; i++) begin : g_leaf
    assign nf[N+i] = t[i];
    assign ng[N+i] = c[i];
  end

  for (genvar n = 1; n < N; n++) begin : g_node
    trc_cell u_cell (
      .a1(nf[2*n]), .a0(ng[2*n]), .b1(nf[2*n+1]), .b0(ng[2*n+1]),
      .f(nf[n]), .g(ng[n])
    );
  end

  assign f = nf[1];
  assign g = ng[1];
endmodule
