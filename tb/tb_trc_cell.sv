// tb_trc_cell: exhaustive self-checking test of the two-rail checker cell.
// All 16 input combinations are applied. For two code-word pairs the output
// must be the code word (~(a1^b1), a1^b1); if either pair is a non-code word
// the output must be a non-code word (f == g). It also checks that both
// output code words 01 and 10 occur (the cell's self-testing property needs
// both). A time-out watchdog ends a hung run with a failure.
module tb_trc_cell;
  logic a1, a0, b1, b0, f, g;
  int checks = 0, failures = 0;
  int seen01 = 0, seen10 = 0;

  trc_cell dut (.a1(a1), .a0(a0), .b1(b1), .b0(b0), .f(f), .g(g));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a1, a0, b1, b0} = 4'(v);
      #1;
      checks++;
      if ((a1 != a0) && (b1 != b0)) begin
        if (f != ~(a1 ^ b1) || g != (a1 ^ b1)) begin
          failures++;
          $display("FAIL in=%b%b %b%b out=%b%b", a1, a0, b1, b0, f, g);
        end
        if ({f, g} == 2'b01) seen01++;
        if ({f, g} == 2'b10) seen10++;
      end else if (f != g) begin
        failures++;
        $display("FAIL non-code in=%b%b %b%b gave code out=%b%b", a1, a0, b1, b0, f, g);
      end
    end
    checks++;
    if (seen01 == 0 || seen10 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
