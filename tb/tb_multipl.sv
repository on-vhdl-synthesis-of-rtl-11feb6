// tb_multipl: exhaustive test of the 4x4 unsigned multiplier (256 products).
// Watchdog on time.
module tb_multipl;
  logic [3:0] a, b; logic [7:0] p;
  int checks = 0, failures = 0;

  multipl dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++; $display("FAIL %0d*%0d=%0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
