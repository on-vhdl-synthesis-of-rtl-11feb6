// demux38: 3-line to 8-line decoder/demultiplexer (SN74AHC138 function).
//
// Output y_n[i] is 0 (active) exactly when the decoder is enabled (g1 = 1,
// g2a_n = 0, g2b_n = 0) and sel == i; all outputs are 1 otherwise. The enable
// structure and active-low outputs follow the standard part named for this
// benchmark. Combinational, no clock.
module demux38 (
  input  logic [2:0] sel,    // C B A select, A = sel[0]
  input  logic       g1,     // enable, active high
  input  logic       g2a_n,  // enable, active low
  input  logic       g2b_n,  // enable, active low
  output logic [7:0] y_n     // decoded outputs, active low
);
  always_comb begin
    y_n = '1;
    if (g1 && !g2a_n && !g2b_n) y_n[sel] = 1'b0;
  end
endmodule
