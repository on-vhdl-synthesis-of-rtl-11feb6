// tb_binbcd: exhaustive test of the binary-to-BCD converter at N = 6
// (default), 8 and 12. The expected digits are derived with division and
// remainder by 10 in the testbench. Watchdog on time.
module tb_binbcd;
  logic [5:0]  b6;  logic [7:0]  o6;
  logic [7:0]  b8;  logic [11:0] o8;
  logic [11:0] b12; logic [15:0] o12;
  int checks = 0, failures = 0;

  binbcd             dut6  (.bin(b6),  .bcd(o6));
  binbcd #(.N(8))    dut8  (.bin(b8),  .bcd(o8));
  binbcd #(.N(12))   dut12 (.bin(b12), .bcd(o12));

  function automatic logic [15:0] ref_bcd(int v);
    logic [15:0] r;
    for (int k = 0; k < 4; k++) begin
      r[4*k +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      b6 = 6'(v); b8 = 8'(v); b12 = 12'(v);
      #1;
      checks++;
      if (o12 != ref_bcd(v)) begin
        failures++; $display("FAIL N=12 %0d -> %h", v, o12);
      end
      if (v < 256) begin
        checks++;
        if (o8 != ref_bcd(v)[11:0]) begin
          failures++; $display("FAIL N=8 %0d -> %h", v, o8);
        end
      end
      if (v < 64) begin
        checks++;
        if (o6 != ref_bcd(v)[7:0]) begin
          failures++; $display("FAIL N=6 %0d -> %h", v, o6);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
