// tb_boselin_gen: checks the Bose-Lin check bits generator against a zero
// count done bit by bit in the testbench, exhaustively for P = 8 (K = 2 and
// K = 3) and on random words for the default P = 16, K = 3. Watchdog on time.
module tb_boselin_gen;
  logic [15:0] d16; logic [2:0] k16;
  logic [7:0]  d8;  logic [1:0] k8a; logic [2:0] k8b;
  int checks = 0, failures = 0;

  boselin_gen                dut16 (.d(d16), .chk(k16));
  boselin_gen #(.P(8), .K(2)) dut8a (.d(d8),  .chk(k8a));
  boselin_gen #(.P(8), .K(3)) dut8b (.d(d8),  .chk(k8b));

  function automatic int zeros(logic [15:0] v, int w);
    int n = 0;
    for (int i = 0; i < w; i++) if (!v[i]) n++;
    return n;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      d8 = 8'(v);
      d16 = 16'($urandom);
      #1;
      checks += 3;
      if (int'(k8a) != zeros(16'(d8), 8) % 4) begin
        failures++; $display("FAIL P8K2 d=%b chk=%0d", d8, k8a);
      end
      if (int'(k8b) != zeros(16'(d8), 8) % 8) begin
        failures++; $display("FAIL P8K3 d=%b chk=%0d", d8, k8b);
      end
      if (int'(k16) != zeros(d16, 16) % 8) begin
        failures++; $display("FAIL P16K3 d=%h chk=%0d", d16, k16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
