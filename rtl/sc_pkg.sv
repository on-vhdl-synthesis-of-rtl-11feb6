// sc_pkg: shared types and size functions for the self-checking combinational
// circuits.
//
// A self-checking circuit here is a combinational function (the "data part",
// P bits) extended with a check part (K bits) predicted from the same inputs,
// followed by a totally self-checking checker whose two output rails (f, g)
// are complementary (01 or 10) for a code word and equal (00 or 11) for an
// error. The package names the benchmark functions and the concurrent error
// detection (CED) schemes and gives the port widths that follow from them.
// The benchmark list and the five schemes follow the evaluated set of
// circuits; the widths of COMPAR and of the binary-to-BCD outputs are this
// design's reading of the referenced standard parts.
package sc_pkg;

  // Benchmark functions (the 18-segment display decoder is not included).
  typedef enum logic [2:0] {
    BINBCD6  = 3'd0,
    BINBCD8  = 3'd1,
    BINBCD12 = 3'd2,
    COMPAR   = 3'd3,
    DEMUX38  = 3'd4,
    MULTIPL  = 3'd5
  } circuit_e;

  // CED schemes: duplication with complemented copy, Bose-Lin code, single
  // parity over all outputs, two and four parity groups.
  typedef enum logic [2:0] {
    SCH_DUP  = 3'd0,
    SCH_BLIN = 3'd1,
    SCH_POV  = 3'd2,
    SCH_PG2  = 3'd3,
    SCH_PG4  = 3'd4
  } scheme_e;

  localparam int unsigned NUM_CIRCUITS = 6;
  localparam int unsigned NUM_SCHEMES  = 5;
  localparam int unsigned MAX_W        = 16;  // widest input or output bus

  // Decimal digits of 2^n - 1, i.e. BCD digits of an n-bit binary number.
  function automatic int unsigned bcd_digits(int unsigned n);
    longint unsigned v;
    int unsigned     d;
    v = (64'd1 << n) - 1;
    d = 0;
    do begin
      v = v / 10;
      d++;
    end while (v != 0);
    return d;
  endfunction

  // Number of primary inputs of a benchmark.
  function automatic int unsigned n_in(circuit_e c);
    case (c)
      BINBCD6:  return 6;
      BINBCD8:  return 8;
      BINBCD12: return 12;
      COMPAR:   return 11;  // A[3:0], B[3:0], cascade in (>, <, =)
      DEMUX38:  return 6;   // select[2:0], G1, G2A_n, G2B_n
      default:  return 8;   // MULTIPL: A[3:0], B[3:0]
    endcase
  endfunction

  // Number of primary outputs (data part P) of a benchmark.
  function automatic int unsigned n_out(circuit_e c);
    case (c)
      BINBCD6:  return 4 * bcd_digits(6);   // two BCD digits
      BINBCD8:  return 4 * bcd_digits(8);   // three BCD digits
      BINBCD12: return 4 * bcd_digits(12);  // four BCD digits
      COMPAR:   return 3;   // A>B, A<B, A=B
      DEMUX38:  return 8;   // Y0_n .. Y7_n
      default:  return 8;   // MULTIPL: product
    endcase
  endfunction

  // Number of parity groups of a parity scheme (0 for the others).
  function automatic int unsigned n_groups(scheme_e s);
    case (s)
      SCH_POV: return 1;
      SCH_PG2: return 2;
      SCH_PG4: return 4;
      default: return 0;
    endcase
  endfunction

  // Width K of the check part for a scheme, P data bits and BL_K Bose-Lin bits.
  function automatic int unsigned n_chk(scheme_e s, int unsigned p, int unsigned bl_k);
    case (s)
      SCH_DUP:  return p;
      SCH_BLIN: return bl_k;
      default:  return n_groups(s);
    endcase
  endfunction

  // Size of one parity group: the P outputs are cut into G contiguous groups
  // of ceil(P/G) bits, the last group taking what is left.
  function automatic int unsigned grp_size(int unsigned p, int unsigned g);
    return (p + g - 1) / g;
  endfunction

endpackage
