// bench_logic: the function logic of one benchmark behind a uniform bus.
//
// Selects, by the CIRCUIT parameter, one of the benchmark functions and maps
// its pins onto an n_in(CIRCUIT)-bit input bus x and an n_out(CIRCUIT)-bit
// output bus z, so that the CED wrappers can treat every benchmark alike.
// Bus layouts (LSB first):
//   BINBCD6/8/12: x = binary value;            z = packed BCD digits
//   COMPAR:       x = {i_eq, i_lt, i_gt, b, a}; z = {a_eq_b, a_lt_b, a_gt_b}
//   DEMUX38:      x = {g2b_n, g2a_n, g1, sel};  z = y_n
//   MULTIPL:      x = {b, a};                   z = product
// The set of benchmarks follows the evaluated circuits; the bus layouts are
// this design's. Combinational, no clock.
module bench_logic
  import sc_pkg::*;
#(
  parameter circuit_e CIRCUIT = MULTIPL
) (
  input  logic [n_in(CIRCUIT)-1:0]  x,
  output logic [n_out(CIRCUIT)-1:0] z
);
  case (CIRCUIT)
    BINBCD6:  begin : g_bb6  binbcd #(.N(6))  u_f (.bin(x), .bcd(z)); end
    BINBCD8:  begin : g_bb8  binbcd #(.N(8))  u_f (.bin(x), .bcd(z)); end
    BINBCD12: begin : g_bb12 binbcd #(.N(12)) u_f (.bin(x), .bcd(z)); end
    COMPAR: begin : g_cmp
      compar u_f (
        .a(x[3:0]), .b(x[7:4]), .i_gt(x[8]), .i_lt(x[9]), .i_eq(x[10]),
        .a_gt_b(z[0]), .a_lt_b(z[1]), .a_eq_b(z[2])
      );
    end
    DEMUX38: begin : g_dmx
      demux38 u_f (
        .sel(x[2:0]), .g1(x[3]), .g2a_n(x[4]), .g2b_n(x[5]), .y_n(z)
      );
    end
    default: begin : g_mul
      multipl u_f (.a(x[3:0]), .b(x[7:4]), .p(z));
    end
  endcase
endmodule
