// tb_pg_checker: test of the parity-group checker at its default size
// (16 data bits, 4 groups of 4) and at 3 data bits in 2 groups (2 + 1).
// Random code words (check bit j = XOR of data bits 4j..4j+3) must give a
// code-word pair; flipping any single data or check bit must give a
// non-code-word pair; flipping two bits of one group must go undetected
// (the known limit of parity), while flipping one bit in each of two groups
// must be detected. The small instance is checked exhaustively. Watchdog.
module tb_pg_checker;
  logic [15:0] d; logic [3:0] c; logic f, g;
  logic [2:0]  ds; logic [1:0] cs; logic fs, gs;
  int checks = 0, failures = 0;

  pg_checker                 dut  (.d(d), .c(c), .f(f), .g(g));
  pg_checker #(.P(3), .G(2)) duts (.d(ds), .c(cs), .f(fs), .g(gs));

  function automatic logic [3:0] par4(logic [15:0] v);
    logic [3:0] r;
    for (int j = 0; j < 4; j++) r[j] = v[4*j] ^ v[4*j+1] ^ v[4*j+2] ^ v[4*j+3];
    return r;
  endfunction

  task automatic expect_code(bit want, string what);
    #1;
    checks++;
    if ((f != g) != want) begin
      failures++;
      $display("FAIL %s d=%h c=%b fg=%b%b", what, d, c, f, g);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d0;
    logic [3:0]  c0;
    int a, b;
    for (int it = 0; it < 200; it++) begin
      d0 = 16'($urandom);
      c0 = par4(d0);
      d = d0; c = c0; expect_code(1, "codeword");
      a = $urandom_range(19);
      if (a < 16) d[a] = ~d[a]; else c[a-16] = ~c[a-16];
      expect_code(0, "single error");
      // two errors in one group
      d = d0; c = c0;
      a = $urandom_range(3);
      d[4*a] = ~d[4*a]; d[4*a+1] = ~d[4*a+1];
      expect_code(1, "double error same group");
      // one error in each of two groups
      d = d0;
      b = (a + 1 + $urandom_range(2)) % 4;
      d[4*a+2] = ~d[4*a+2]; d[4*b+3] = ~d[4*b+3];
      expect_code(0, "double error two groups");
    end
    for (int v = 0; v < 32; v++) begin
      {cs, ds} = 5'(v);
      #1;
      checks++;
      if ((fs != gs) != ((^ds[1:0] == cs[0]) && (ds[2] == cs[1]))) begin
        failures++;
        $display("FAIL small d=%b c=%b fg=%b%b", ds, cs, fs, gs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
