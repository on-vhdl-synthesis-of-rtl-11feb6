// parity_checker: totally self-checking parity checker for one parity group.
//
// The group is M data bits d plus one check bit c chosen so that the M+1 bits
// have even parity (c = XOR of d). The M+1 bits are split into two disjoint
// halves, each reduced by its own XOR tree; f is the parity of the lower half
// and g the inverted parity of the upper half. For a code word the two halves
// have equal parity, so (f, g) is 01 or 10; any odd number of bit errors makes
// f == g. Using two separate trees gives the two-rail output the TRC tree
// further on expects. Even parity and the half-and-half split are this
// design's choices. Combinational, no clock.
module parity_checker #(
  parameter int unsigned M = 4  // data bits in the group, >= 1
) (
  input  logic [M-1:0] d,  // data bits of the group
  input  logic         c,  // predicted parity (check) bit
  output logic         f,
  output logic         g
);
  localparam int unsigned W = M + 1;
  localparam int unsigned H = W / 2;  // bits in the lower half, >= 1

  logic [W-1:0] v;
  assign v = {c, d};

  always_comb begin
    f = ^v[H-1:0];
    g = ~(^v[W-1:H]);
  end
endmodule
