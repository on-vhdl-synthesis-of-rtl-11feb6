// tb_boselin_checker: checks the Bose-Lin TSC checker (default P = 16,
// K = 3, and P = 8, K = 2). Code words are built in the testbench by counting
// zeros. Every code word must give a code-word pair, both code words (01, 10)
// must occur, every unidirectional error of 1..K bits (all 0->1 or all 1->0)
// on the information bits must be detected, and so must any single flipped
// check bit. Watchdog on time.
module tb_boselin_checker;
  logic [15:0] info;  logic [2:0] chk;  logic f, g;
  logic [7:0]  info2; logic [1:0] chk2; logic f2, g2;
  int checks = 0, failures = 0;
  int seen01 = 0, seen10 = 0;

  boselin_checker                 dut  (.info(info),  .chk(chk),  .f(f),  .g(g));
  boselin_checker #(.P(8), .K(2)) dut2 (.info(info2), .chk(chk2), .f(f2), .g(g2));

  function automatic int zeros(logic [15:0] v, int w);
    int n = 0;
    for (int i = 0; i < w; i++) if (!v[i]) n++;
    return n;
  endfunction

  // Flip up to n bits of v that currently equal 'from' (unidirectional error).
  function automatic logic [15:0] uni_err(logic [15:0] v, int w, bit from, int n);
    int done = 0;
    int start = $urandom_range(w - 1);
    for (int j = 0; j < w && done < n; j++) begin
      int i = (start + j) % w;
      if (v[i] == from) begin
        v[i] = ~from;
        done++;
      end
    end
    return v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v, e;
    for (int it = 0; it < 300; it++) begin
      v = 16'($urandom);
      info = v; chk = 3'(zeros(v, 16) % 8);
      info2 = v[7:0]; chk2 = 2'(zeros(v, 8) % 4);
      #1;
      checks += 2;
      if (f == g) begin failures++; $display("FAIL code word K3 %h", v); end
      if (f2 == g2) begin failures++; $display("FAIL code word K2 %h", v[7:0]); end
      if ({f, g} == 2'b01) seen01++;
      if ({f, g} == 2'b10) seen10++;
      for (int n = 1; n <= 3; n++) begin
        for (int dir = 0; dir < 2; dir++) begin
          e = uni_err(v, 16, dir[0], n);
          if (e != v) begin
            info = e;
            #1;
            checks++;
            if (f != g) begin
              failures++;
              $display("FAIL K3 missed %0d-bit error %h->%h", n, v, e);
            end
          end
          if (n <= 2) begin
            e = uni_err(v, 8, dir[0], n);
            if (e[7:0] != v[7:0]) begin
              info2 = e[7:0];
              #1;
              checks++;
              if (f2 != g2) begin
                failures++;
                $display("FAIL K2 missed %0d-bit error %h->%h", n, v[7:0], e[7:0]);
              end
              info2 = v[7:0];
            end
          end
        end
      end
      info = v;
      chk[$urandom_range(2)] ^= 1'b1;
      #1;
      checks++;
      if (f != g) begin failures++; $display("FAIL check-bit error missed"); end
    end
    checks++;
    if (seen01 == 0 || seen10 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
