// multipl: 4-bit by 4-bit unsigned multiplier.
//
// p = a * b, an 8-bit product, written as the sum of the four shifted partial
// products a & b[j] so that the netlist is an AND array and adders. The 4-bit
// operand size is the evaluated benchmark's; unsigned operands are this
// design's choice. Combinational, no clock.
module multipl (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  always_comb begin
    p = '0;
    for (int j = 0; j < 4; j++) begin
      p = p + ({4'b0, a & {4{b[j]}}} << j);
    end
  end
endmodule
