// tb_sc_top: end-to-end test of the whole benchmark set at default parameters
// (Bose-Lin K = 3). The input of every circuit walks through all its values
// (4096 steps cover BINBCD12, the others wrap around). In each step, for
// every one of the 29 built (circuit, scheme) slots:
//  - fault free: z and chk equal the reference model and no error is flagged;
//  - one data bit is flipped in that slot only: that slot must flag an error
//    and every other slot must stay error free;
//  - one check bit is flipped: the slot must flag an error;
//  - scheme-specific errors: a random unidirectional multi-bit data error
//    (dup: any size, Blin: up to K bits) must be detected; for pg2/pg4 two
//    errors in different groups must be detected; for pov (and the parity
//    groups) two errors inside one group must pass unseen, which is the
//    known limit of parity codes and is checked so that the grouping is
//    exercised.
// The empty (COMPAR, pg4) slot must never flag an error. Every mechanism is
// counted and each must have happened at least once. Watchdog on time.
module tb_sc_top;
  import sc_pkg::*;
  import tb_ref_pkg::*;

  logic [NUM_CIRCUITS-1:0][MAX_W-1:0]                  x;
  logic [NUM_CIRCUITS-1:0][NUM_SCHEMES-1:0][MAX_W-1:0] inj_data, inj_chk, z, chk;
  logic [NUM_CIRCUITS-1:0][NUM_SCHEMES-1:0]            err_f, err_g, error;
  int checks = 0, failures = 0;

  // Mechanism counters, per scheme.
  int n_code01 [NUM_SCHEMES];
  int n_code10 [NUM_SCHEMES];
  int n_det_data [NUM_SCHEMES];
  int n_det_chk [NUM_SCHEMES];
  int n_det_multi [NUM_SCHEMES];   // dup/Blin unidirectional, pg two-group
  int n_escape_even [NUM_SCHEMES]; // parity: even error inside one group

  sc_top dut (.*);

  localparam int BLK = 3;

  function automatic bit built(int c, int s);
    return !(circuit_e'(c) == COMPAR && scheme_e'(s) == SCH_PG4);
  endfunction

  // Error flags must be set in exactly the slots of mask 'want'.
  task automatic expect_flags(logic [NUM_CIRCUITS-1:0][NUM_SCHEMES-1:0] want, string what);
    #1;
    for (int c = 0; c < NUM_CIRCUITS; c++) begin
      for (int s = 0; s < NUM_SCHEMES; s++) begin
        checks++;
        if (error[c][s] != want[c][s] || ((err_f[c][s] == err_g[c][s]) != want[c][s])) begin
          failures++;
          if (failures < 20)
            $display("FAIL %s slot %s/%s x=%h err=%b fg=%b%b want %b", what,
                     circuit_e'(c), scheme_e'(s), x[c], error[c][s], err_f[c][s],
                     err_g[c][s], want[c][s]);
        end
      end
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NUM_CIRCUITS-1:0][NUM_SCHEMES-1:0] none, one;
    logic [15:0] zr, cr, m;
    int p, k, sz, b0, b1, n;
    bit dir;
    none = '0;
    inj_data = '0; inj_chk = '0;
    for (int s = 0; s < NUM_SCHEMES; s++) begin
      n_code01[s] = 0; n_code10[s] = 0; n_det_data[s] = 0; n_det_chk[s] = 0;
      n_det_multi[s] = 0; n_escape_even[s] = 0;
    end
    for (int v = 0; v < 4096; v++) begin
      for (int c = 0; c < NUM_CIRCUITS; c++)
        x[c] = 16'(v % (1 << n_in(circuit_e'(c))));
      expect_flags(none, "fault free");
      for (int c = 0; c < NUM_CIRCUITS; c++) begin
        p  = n_out(circuit_e'(c));
        zr = ref_func(circuit_e'(c), x[c]);
        for (int s = 0; s < NUM_SCHEMES; s++) begin
          if (!built(c, s)) continue;
          k  = n_chk(scheme_e'(s), p, BLK);
          cr = ref_chk(scheme_e'(s), p, BLK, zr);
          checks += 2;
          if (z[c][s] != zr) begin
            failures++;
            $display("FAIL z %s/%s x=%h got %h exp %h", circuit_e'(c), scheme_e'(s),
                     x[c], z[c][s], zr);
          end
          if (chk[c][s] != cr) begin
            failures++;
            $display("FAIL chk %s/%s x=%h got %h exp %h", circuit_e'(c), scheme_e'(s),
                     x[c], chk[c][s], cr);
          end
          if ({err_f[c][s], err_g[c][s]} == 2'b01) n_code01[s]++;
          if ({err_f[c][s], err_g[c][s]} == 2'b10) n_code10[s]++;
          one = '0;
          one[c][s] = 1'b1;
          // single data bit error
          inj_data[c][s] = 16'(1) << $urandom_range(p - 1);
          expect_flags(one, "single data error");
          if (error[c][s]) n_det_data[s]++;
          inj_data[c][s] = '0;
          // single check bit error
          inj_chk[c][s] = 16'(1) << $urandom_range(k - 1);
          expect_flags(one, "single check error");
          if (error[c][s]) n_det_chk[s]++;
          inj_chk[c][s] = '0;
          if (scheme_e'(s) == SCH_DUP || scheme_e'(s) == SCH_BLIN) begin
            dir = 1'($urandom);
            n = (scheme_e'(s) == SCH_DUP) ? p : BLK;
            n = 1 + $urandom_range(n - 1);
            m = '0;
            for (int j = 0; j < p; j++)
              if (zr[j] == dir && $countones(m) < n) m[j] = 1'b1;
            if (m != 0) begin
              inj_data[c][s] = m;
              expect_flags(one, "unidirectional error");
              if (error[c][s]) n_det_multi[s]++;
              inj_data[c][s] = '0;
            end
          end else begin
            sz = (p + k - 1) / k;
            // two errors in different groups: detected (pg2, pg4 only)
            if (k > 1) begin
              b0 = $urandom_range(p - 1);
              do b1 = $urandom_range(p - 1); while (b1 / sz == b0 / sz);
              inj_data[c][s] = (16'(1) << b0) | (16'(1) << b1);
              expect_flags(one, "errors in two groups");
              if (error[c][s]) n_det_multi[s]++;
            end
            // two errors in the same group: invisible to parity
            b0 = $urandom_range(p - 1);
            b1 = (b0 / sz) * sz + ((b0 % sz) + 1) % sz;
            if (b1 < p && b1 != b0) begin
              inj_data[c][s] = (16'(1) << b0) | (16'(1) << b1);
              expect_flags(none, "even error in one group");
              if (!error[c][s]) n_escape_even[s]++;
            end
            inj_data[c][s] = '0;
          end
        end
      end
    end
    for (int s = 0; s < NUM_SCHEMES; s++) begin
      $display("scheme %-8s code01=%0d code10=%0d det_data=%0d det_chk=%0d det_multi=%0d escape_even=%0d",
               scheme_e'(s), n_code01[s], n_code10[s], n_det_data[s], n_det_chk[s],
               n_det_multi[s], n_escape_even[s]);
      checks += 4;
      if (n_code01[s] == 0) failures++;
      if (n_code10[s] == 0) failures++;
      if (n_det_data[s] == 0) failures++;
      if (n_det_chk[s] == 0) failures++;
      if (scheme_e'(s) != SCH_POV) begin
        checks++;
        if (n_det_multi[s] == 0) failures++;
      end
      if (scheme_e'(s) inside {SCH_POV, SCH_PG2, SCH_PG4}) begin
        checks++;
        if (n_escape_even[s] == 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
