// trc_cell: two-rail code (TRC) checker cell.
//
// Takes two two-rail pairs (a1, a0) and (b1, b0) and produces one two-rail
// pair (f, g). A pair is a code word when its rails differ. The cell uses the
// classic equations f = a1&b1 | a0&b0 and g = a1&b0 | a0&b1: when both input
// pairs are code words the output is a code word (01 or 10), and when either
// input pair is a non-code word (00 or 11) the output is a non-code word, so
// an error is never masked. Every cell input sees both values under code-word
// inputs, which makes the cell self-testing for single stuck-at faults.
// Purely combinational, no clock. The cell is named by the design's checker
// trees; its equations are the standard ones and not spelled out there.
module trc_cell (
  input  logic a1,  // pair a, true rail
  input  logic a0,  // pair a, complement rail
  input  logic b1,  // pair b, true rail
  input  logic b0,  // pair b, complement rail
  output logic f,   // output pair, rail f
  output logic g    // output pair, rail g
);
  always_comb begin
    f = (a1 & b1) | (a0 & b0);
    g = (a1 & b0) | (a0 & b1);
  end
endmodule
