// sc_top: the benchmark set, each circuit in each CED scheme, side by side.
//
// For every benchmark circuit c (index = sc_pkg::circuit_e value: BINBCD6,
// BINBCD8, BINBCD12, COMPAR, DEMUX38, MULTIPL) and every scheme s (index =
// sc_pkg::scheme_e value: dup, Blin, pov, pg2, pg4) one sc_circuit instance is
// built. All schemes of a circuit share its input bus x[c]; each instance has
// its own outputs, check part and error pair. Buses are 16 bits wide and
// right-aligned; unused high bits of x are ignored and those of z, chk and
// the injection masks are 0 / ignored. COMPAR has only three outputs and
// cannot be cut into four parity groups, so slot (COMPAR, pg4) is empty: its
// outputs are 0 and its error flag is 0. The unprotected original circuits,
// the comparison baseline, are not included. inj_data / inj_chk are the
// per-instance error-injection masks (0 in normal use).
// Fully combinational, no clock and no reset.
module sc_top
  import sc_pkg::*;
#(
  parameter int unsigned BL_K = 3  // Bose-Lin check bits for every Blin instance
) (
  input  logic [NUM_CIRCUITS-1:0][MAX_W-1:0]                  x,
  input  logic [NUM_CIRCUITS-1:0][NUM_SCHEMES-1:0][MAX_W-1:0] inj_data,
  input  logic [NUM_CIRCUITS-1:0][NUM_SCHEMES-1:0][MAX_W-1:0] inj_chk,
  output logic [NUM_CIRCUITS-1:0][NUM_SCHEMES-1:0][MAX_W-1:0] z,
  output logic [NUM_CIRCUITS-1:0][NUM_SCHEMES-1:0][MAX_W-1:0] chk,
  output logic [NUM_CIRCUITS-1:0][NUM_SCHEMES-1:0]            err_f,
  output logic [NUM_CIRCUITS-1:0][NUM_SCHEMES-1:0]            err_g,
  output logic [NUM_CIRCUITS-1:0][NUM_SCHEMES-1:0]            error
);
  for (genvar c = 0; c < NUM_CIRCUITS; c++) begin : g_c
    localparam circuit_e    CI = circuit_e'(c);
    localparam int unsigned NI = n_in(CI);
    localparam int unsigned P  = n_out(CI);
    for (genvar s = 0; s < NUM_SCHEMES; s++) begin : g_s
      localparam scheme_e     SI = scheme_e'(s);
      localparam int unsigned K  = n_chk(SI, P, BL_K);
      if (CI == COMPAR && SI == SCH_PG4) begin : g_none
        assign z[c][s]     = '0;
        assign chk[c][s]   = '0;
        assign err_f[c][s] = 1'b0;
        assign err_g[c][s] = 1'b1;
        assign error[c][s] = 1'b0;
      end else begin : g_sc
        logic [P-1:0] zi;
        logic [K-1:0] ci;
        sc_circuit #(.CIRCUIT(CI), .SCHEME(SI), .BL_K(BL_K)) u_sc (
          .x       (x[c][NI-1:0]),
          .inj_data(inj_data[c][s][P-1:0]),
          .inj_chk (inj_chk[c][s][K-1:0]),
          .z       (zi),
          .chk     (ci),
          .err_f   (err_f[c][s]),
          .err_g   (err_g[c][s]),
          .error   (error[c][s])
        );
        assign z[c][s]   = MAX_W'(zi);
        assign chk[c][s] = MAX_W'(ci);
      end
    end
  end
endmodule
