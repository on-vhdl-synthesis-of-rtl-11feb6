// tb_trc_tree: exhaustive test of the two-rail checker tree at N = 5 and at
// the default N = 4, plus N = 1. Every combination of the 2N input rails is
// applied; the output pair must be a code word exactly when all input pairs
// are code words. Both output code words must occur. Watchdog on time.
module tb_trc_tree;
  localparam int N5 = 5;
  localparam int N4 = 4;
  logic [N5-1:0] t5, c5;
  logic [N4-1:0] t4, c4;
  logic [0:0]    t1, c1;
  logic f5, g5, f4, g4, f1, g1;
  int checks = 0, failures = 0;
  int seen01 = 0, seen10 = 0;

  trc_tree #(.N(N5)) dut5 (.t(t5), .c(c5), .f(f5), .g(g5));
  trc_tree           dut4 (.t(t4), .c(c4), .f(f4), .g(g4));
  trc_tree #(.N(1))  dut1 (.t(t1), .c(c1), .f(f1), .g(g1));

  function automatic bit all_code(logic [7:0] t, logic [7:0] c, int n);
    for (int i = 0; i < n; i++) if (t[i] == c[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * N5)); v++) begin
      {t5, c5} = 10'(v);
      t4 = t5[N4-1:0]; c4 = c5[N4-1:0];
      t1 = t5[0:0];    c1 = c5[0:0];
      #1;
      checks += 3;
      if ((f5 != g5) != all_code(8'(t5), 8'(c5), N5)) begin
        failures++;
        $display("FAIL N=5 t=%b c=%b fg=%b%b", t5, c5, f5, g5);
      end
      if ((f4 != g4) != all_code(8'(t4), 8'(c4), N4)) begin
        failures++;
        $display("FAIL N=4 t=%b c=%b fg=%b%b", t4, c4, f4, g4);
      end
      if (f1 != t1[0] || g1 != c1[0]) failures++;
      if ({f5, g5} == 2'b01) seen01++;
      if ({f5, g5} == 2'b10) seen10++;
    end
    checks++;
    if (seen01 == 0 || seen10 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
