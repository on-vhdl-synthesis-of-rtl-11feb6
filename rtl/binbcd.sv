// binbcd: N-bit binary to BCD converter (the SN74185A-style function).
//
// Converts an unsigned N-bit number into D packed BCD digits, D being the
// number of decimal digits of 2^N - 1 (N = 6, 8, 12 give 2, 3, 4 digits).
// The conversion is the shift-and-add-3 method unrolled into combinational
// logic: the binary number is shifted in MSB first, and before each shift
// every BCD digit that is 5 or more is increased by 3. Unused high bits of the
// most significant digit are always 0. The sizes 6, 8 and 12 are the three
// evaluated converter variants; the output packing and the conversion method
// are this design's choices. Combinational, no clock.
module binbcd
  import sc_pkg::*;
#(
  parameter int unsigned N = 6,  // binary input width
  localparam int unsigned D = bcd_digits(N)  // BCD digits of 2^N - 1
) (
  input  logic [N-1:0]   bin,  // unsigned binary value
  output logic [4*D-1:0] bcd   // digit i in bcd[4i+3:4i], units in [3:0]
);

  always_comb begin
    logic [4*D-1:0] acc;
    acc = '0;
    for (int i = N - 1; i >= 0; i--) begin
      for (int k = 0; k < D; k++) begin
        if (acc[4*k +: 4] >= 4'd5) acc[4*k +: 4] = acc[4*k +: 4] + 4'd3;
      end
      acc = {acc[4*D-2:0], bin[i]};
    end
    bcd = acc;
  end
endmodule
