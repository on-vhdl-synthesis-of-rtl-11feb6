// tb_ref_pkg: reference models for the self-checking circuit testbenches.
//
// ref_func computes each benchmark function arithmetically (division by 10,
// comparison, shift, multiplication) on the same bus layout as bench_logic,
// independently of the RTL. ref_chk computes the expected check part of each
// CED scheme from a data word: complement (duplication), zeros modulo 2^K
// (Bose-Lin), or even parity of contiguous groups of ceil(P/G) bits.
package tb_ref_pkg;
  import sc_pkg::*;

  function automatic logic [15:0] ref_func(circuit_e c, logic [15:0] x);
    logic [15:0] z = '0;
    int v;
    case (c)
      BINBCD6, BINBCD8, BINBCD12: begin
        v = int'(x) & ((1 << n_in(c)) - 1);
        for (int k = 0; k < 4; k++) begin
          z[4*k +: 4] = 4'(v % 10);
          v = v / 10;
        end
      end
      COMPAR: begin
        if (x[3:0] > x[7:4])      z[2:0] = 3'b001;
        else if (x[3:0] < x[7:4]) z[2:0] = 3'b010;
        else if (x[10])           z[2:0] = 3'b100;
        else if (x[8] && !x[9])   z[2:0] = 3'b001;
        else if (!x[8] && x[9])   z[2:0] = 3'b010;
        else if (x[8] && x[9])    z[2:0] = 3'b000;
        else                      z[2:0] = 3'b011;
      end
      DEMUX38: begin
        z[7:0] = 8'hFF;
        if (x[3] && !x[4] && !x[5]) z[4'(x[2:0])] = 1'b0;
      end
      default: z[7:0] = 8'(int'(x[3:0]) * int'(x[7:4]));
    endcase
    return z;
  endfunction

  function automatic logic [15:0] ref_chk(scheme_e s, int p, int bl_k, logic [15:0] z);
    logic [15:0] r = '0;
    int g, sz, nz;
    case (s)
      SCH_DUP: for (int i = 0; i < p; i++) r[i] = ~z[i];
      SCH_BLIN: begin
        nz = 0;
        for (int i = 0; i < p; i++) if (!z[i]) nz++;
        r = 16'(nz % (1 << bl_k));
      end
      default: begin
        g  = (s == SCH_POV) ? 1 : (s == SCH_PG2) ? 2 : 4;
        sz = (p + g - 1) / g;
        for (int i = 0; i < p; i++) r[i / sz] ^= z[i];
      end
    endcase
    return r;
  endfunction
endpackage
