// tb_parity_checker: exhaustive test of the TSC parity checker for group
// sizes M = 4 (default), M = 1 and M = 3. For every data/check combination
// the output pair must be a code word (f != g) exactly when the M+1 bits have
// even parity, and both code words must occur. Watchdog on time.
module tb_parity_checker;
  logic [3:0] d4; logic c4, f4, g4;
  logic [0:0] d1; logic c1, f1, g1;
  logic [2:0] d3; logic c3, f3, g3;
  int checks = 0, failures = 0;
  int seen01 = 0, seen10 = 0;

  parity_checker           dut4 (.d(d4), .c(c4), .f(f4), .g(g4));
  parity_checker #(.M(1))  dut1 (.d(d1), .c(c1), .f(f1), .g(g1));
  parity_checker #(.M(3))  dut3 (.d(d3), .c(c3), .f(f3), .g(g3));

  function automatic bit even(logic [4:0] v, int w);
    bit p = 0;
    for (int i = 0; i < w; i++) p ^= v[i];
    return !p;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {c4, d4} = 5'(v);
      {c1, d1} = 2'(v);
      {c3, d3} = 4'(v);
      #1;
      checks += 3;
      if ((f4 != g4) != even(5'(v), 5)) begin
        failures++; $display("FAIL M=4 v=%b fg=%b%b", 5'(v), f4, g4);
      end
      if ((f1 != g1) != even(5'(v), 2)) begin
        failures++; $display("FAIL M=1 v=%b fg=%b%b", 2'(v), f1, g1);
      end
      if ((f3 != g3) != even(5'(v), 4)) begin
        failures++; $display("FAIL M=3 v=%b fg=%b%b", 4'(v), f3, g3);
      end
      if ({f4, g4} == 2'b01) seen01++;
      if ({f4, g4} == 2'b10) seen10++;
    end
    checks++;
    if (seen01 == 0 || seen10 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
