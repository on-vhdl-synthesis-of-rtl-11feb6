// sc_circuit: one benchmark made self-checking with one CED scheme.
//
// Structure: a functional circuit F, made of the function logic (bench_logic,
// giving the P-bit data part z) and the check symbol generator (check_gen,
// giving the K-bit check part chk), feeds a totally self-checking checker C
// whose two-rail output (err_f, err_g) is 01 or 10 for a code word and 00 or
// 11 otherwise. The checker is chosen by SCHEME:
//   SCH_DUP   trc_tree over P pairs (z[i], chk[i] = complemented copy)
//   SCH_BLIN  boselin_checker (regenerate, invert, double-rail compare)
//   parity    pg_checker with 1, 2 or 4 groups
// z is the primary output; no decoding is needed since the codes are
// separable. error = (err_f == err_g) is a convenience flag for the user.
// inj_data and inj_chk are XOR masks on the data and check parts, placed
// between F and C; they model erroneous bits for test and are tied to 0 in
// normal use (they are this design's addition). Combinational, no clock:
// the error pair is valid one propagation delay after x changes.
module sc_circuit
  import sc_pkg::*;
#(
  parameter circuit_e    CIRCUIT = MULTIPL,
  parameter scheme_e     SCHEME  = SCH_DUP,
  parameter int unsigned BL_K    = 3,  // Bose-Lin check bits (2 or 3)
  localparam int unsigned NI = n_in(CIRCUIT),
  localparam int unsigned P  = n_out(CIRCUIT),
  localparam int unsigned K  = n_chk(SCHEME, P, BL_K)
) (
  input  logic [NI-1:0] x,         // primary inputs
  input  logic [P-1:0]  inj_data,  // error injection on the data part
  input  logic [K-1:0]  inj_chk,   // error injection on the check part
  output logic [P-1:0]  z,         // primary outputs (data part)
  output logic [K-1:0]  chk,       // check part
  output logic          err_f,     // error indication, rail f
  output logic          err_g,     // error indication, rail g
  output logic          error      // 1 when (err_f, err_g) is not a code word
);
  logic [P-1:0] z_fn;
  logic [K-1:0] chk_fn;

  // Functional circuit F. The function logic is kept as its own hierarchy so
  // that synthesis cannot merge it with the predicting copy in check_gen;
  // merged logic would hide a fault from the checker.
  (* keep_hierarchy *)
  bench_logic #(.CIRCUIT(CIRCUIT)) u_func (.x(x), .z(z_fn));
  check_gen #(.CIRCUIT(CIRCUIT), .SCHEME(SCHEME), .BL_K(BL_K)) u_gen (
    .x(x), .chk(chk_fn)
  );

  assign z   = z_fn ^ inj_data;
  assign chk = chk_fn ^ inj_chk;

  // Checker C.
  if (SCHEME == SCH_DUP) begin : g_dup
    trc_tree #(.N(P)) u_chk (.t(z), .c(chk), .f(err_f), .g(err_g));
  end else if (SCHEME == SCH_BLIN) begin : g_blin
    boselin_checker #(.P(P), .K(BL_K)) u_chk (
      .info(z), .chk(chk), .f(err_f), .g(err_g)
    );
  end else begin : g_par
    pg_checker #(.P(P), .G(K)) u_chk (.d(z), .c(chk), .f(err_f), .g(err_g));
  end

  assign error = ~(err_f ^ err_g);
endmodule
