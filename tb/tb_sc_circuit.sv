// tb_sc_circuit: checks complete self-checking circuits. MULTIPL is built in
// all five schemes (Bose-Lin with K = 3) and COMPAR in dup, Blin (K = 2), pov
// and pg2 (groups of 2 + 1 bits). For every input combination:
//  - fault free: z equals the reference function, chk the reference check
//    part, and the error pair is a code word (error = 0);
//  - a single flipped data bit and a single flipped check bit are detected
//    by every scheme;
//  - a unidirectional error of up to K_t bits on the data part is detected by
//    dup and Blin (K_t = all bits for dup, BL_K for Blin);
//  - two flipped bits in different parity groups are detected by pg2/pg4.
// Both checker output code words must occur. Watchdog on time.
module tb_sc_circuit;
  import sc_pkg::*;
  import tb_ref_pkg::*;

  localparam int NCFG = 9;
  localparam circuit_e CFG_C [NCFG] = '{MULTIPL, MULTIPL, MULTIPL, MULTIPL, MULTIPL,
                                        COMPAR, COMPAR, COMPAR, COMPAR};
  localparam scheme_e  CFG_S [NCFG] = '{SCH_DUP, SCH_BLIN, SCH_POV, SCH_PG2, SCH_PG4,
                                        SCH_DUP, SCH_BLIN, SCH_POV, SCH_PG2};
  localparam int       CFG_K [NCFG] = '{3, 3, 3, 3, 3, 2, 2, 2, 2};

  logic [NCFG-1:0][15:0] x, inj_d, inj_c, z, chk;
  logic [NCFG-1:0]       ef, eg, err;
  int checks = 0, failures = 0;
  int seen01 = 0, seen10 = 0;

  for (genvar i = 0; i < NCFG; i++) begin : g_dut
    localparam int unsigned NI = n_in(CFG_C[i]);
    localparam int unsigned P  = n_out(CFG_C[i]);
    localparam int unsigned K  = n_chk(CFG_S[i], P, CFG_K[i]);
    logic [P-1:0] zi;
    logic [K-1:0] ci;
    sc_circuit #(.CIRCUIT(CFG_C[i]), .SCHEME(CFG_S[i]), .BL_K(CFG_K[i])) dut (
      .x(x[i][NI-1:0]), .inj_data(inj_d[i][P-1:0]), .inj_chk(inj_c[i][K-1:0]),
      .z(zi), .chk(ci), .err_f(ef[i]), .err_g(eg[i]), .error(err[i])
    );
    assign z[i]   = 16'(zi);
    assign chk[i] = 16'(ci);
  end

  task automatic expect_err(int i, bit want, string what);
    #1;
    checks++;
    if (err[i] != want || (ef[i] == eg[i]) != want) begin
      failures++;
      $display("FAIL cfg %0d (%s/%s) %s: x=%h inj_d=%h inj_c=%h err=%b fg=%b%b",
               i, CFG_C[i].name(), CFG_S[i].name(), what, x[i], inj_d[i], inj_c[i],
               err[i], ef[i], eg[i]);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; inj_d = '0; inj_c = '0;
    for (int i = 0; i < NCFG; i++) begin
      int p, k, ni;
      p  = n_out(CFG_C[i]);
      k  = n_chk(CFG_S[i], p, CFG_K[i]);
      ni = n_in(CFG_C[i]);
      for (int v = 0; v < (1 << ni); v++) begin
        logic [15:0] zr, cr, m;
        int n, b0, b1, g, sz;
        x[i] = 16'(v); inj_d[i] = '0; inj_c[i] = '0;
        #1;
        zr = ref_func(CFG_C[i], 16'(v));
        cr = ref_chk(CFG_S[i], p, CFG_K[i], zr);
        checks += 2;
        if (z[i] != zr) begin
          failures++; $display("FAIL cfg %0d z x=%h got %h exp %h", i, v, z[i], zr);
        end
        if (chk[i] != cr) begin
          failures++; $display("FAIL cfg %0d chk x=%h got %h exp %h", i, v, chk[i], cr);
        end
        expect_err(i, 0, "fault free");
        if ({ef[i], eg[i]} == 2'b01) seen01++;
        if ({ef[i], eg[i]} == 2'b10) seen10++;
        // single data bit
        inj_d[i] = 16'(1) << $urandom_range(p - 1);
        expect_err(i, 1, "single data error");
        // single check bit
        inj_d[i] = '0;
        inj_c[i] = 16'(1) << $urandom_range(k - 1);
        expect_err(i, 1, "single check error");
        inj_c[i] = '0;
        // unidirectional multi-bit error on the data part
        if (CFG_S[i] == SCH_DUP || CFG_S[i] == SCH_BLIN) begin
          bit dir;
          dir = 1'($urandom);
          n = (CFG_S[i] == SCH_DUP) ? p : CFG_K[i];
          n = 1 + $urandom_range(n - 1);
          m = '0;
          for (int j = 0; j < p && $countones(m) < n; j++)
            if (zr[j] == dir) m[j] = 1'b1;
          if (m != 0) begin
            inj_d[i] = m;
            expect_err(i, 1, "unidirectional error");
          end
          inj_d[i] = '0;
        end
        // one error in each of two parity groups
        if (CFG_S[i] == SCH_PG2 || CFG_S[i] == SCH_PG4) begin
          g  = k;
          sz = (p + g - 1) / g;
          b0 = $urandom_range(p - 1);
          do b1 = $urandom_range(p - 1); while (b1 / sz == b0 / sz);
          inj_d[i] = (16'(1) << b0) | (16'(1) << b1);
          expect_err(i, 1, "errors in two groups");
          inj_d[i] = '0;
        end
      end
    end
    checks++;
    if (seen01 == 0 || seen10 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
