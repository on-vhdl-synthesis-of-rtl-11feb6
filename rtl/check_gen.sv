// check_gen: check symbol generator of a self-checking circuit.
//
// Predicts the check part of the output code word directly from the primary
// inputs x, using its own copy of the benchmark function (bench_logic)
// followed by an encoder chosen by SCHEME:
//   SCH_DUP          the complemented outputs of the second copy (K = P)
//   SCH_BLIN         Bose-Lin check bits, zeros of the outputs mod 2^BL_K
//   SCH_POV/PG2/PG4  one even-parity bit per contiguous output group
//                    (1, 2 or 4 groups; group sizes as in pg_checker)
// Because the prediction is computed from x and not from the outputs of the
// function logic, a fault inside the function logic makes data and check part
// disagree. At RTL the predicting copy is a separate instance; keeping it
// separate through synthesis (no logic shared with the function logic) is a
// matter of synthesis constraints. Combinational, no clock.
module check_gen
  import sc_pkg::*;
#(
  parameter circuit_e    CIRCUIT = MULTIPL,
  parameter scheme_e     SCHEME  = SCH_DUP,
  parameter int unsigned BL_K    = 3,
  localparam int unsigned NI = n_in(CIRCUIT),
  localparam int unsigned P  = n_out(CIRCUIT),
  localparam int unsigned K  = n_chk(SCHEME, P, BL_K)
) (
  input  logic [NI-1:0] x,
  output logic [K-1:0]  chk
);
  logic [P-1:0] zp;  // outputs of the predicting copy

  (* keep_hierarchy *)
  bench_logic #(.CIRCUIT(CIRCUIT)) u_copy (.x(x), .z(zp));

  if (SCHEME == SCH_DUP) begin : g_dup
    assign chk = ~zp;
  end else if (SCHEME == SCH_BLIN) begin : g_blin
    boselin_gen #(.P(P), .K(BL_K)) u_bl (.d(zp), .chk(chk));
  end else begin : g_par
    localparam int unsigned G = K;
    localparam int unsigned S = grp_size(P, G);
    for (genvar j = 0; j < G; j++) begin : g_grp
      localparam int unsigned LO = j * S;
      localparam int unsigned HI = ((j + 1) * S < P) ? (j + 1) * S - 1 : P - 1;
      assign chk[j] = ^zp[HI:LO];
    end
  end
endmodule
