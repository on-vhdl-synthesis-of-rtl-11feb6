// tb_demux38: exhaustive test of the 3-to-8 decoder: all 64 combinations of
// select and the three enables; exactly one low output when enabled, all
// high otherwise. Watchdog on time.
module tb_demux38;
  logic [2:0] sel; logic g1, g2a_n, g2b_n; logic [7:0] y_n;
  int checks = 0, failures = 0;

  demux38 dut (.sel(sel), .g1(g1), .g2a_n(g2a_n), .g2b_n(g2b_n), .y_n(y_n));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e;
    for (int v = 0; v < 64; v++) begin
      {g2b_n, g2a_n, g1, sel} = 6'(v);
      #1;
      e = 8'hFF;
      if (g1 == 1'b1 && g2a_n == 1'b0 && g2b_n == 1'b0) e = ~(8'd1 << sel);
      checks++;
      if (y_n != e) begin
        failures++; $display("FAIL in=%b y_n=%b exp %b", 6'(v), y_n, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
