// tb_compar: exhaustive test (2^11 input combinations) of the 4-bit magnitude
// comparator against the function table of the standard part, including the
// cascade-input rows for A = B. Watchdog on time.
module tb_compar;
  logic [3:0] a, b;
  logic i_gt, i_lt, i_eq, gt, lt, eq;
  logic [2:0] expv;
  int checks = 0, failures = 0;

  compar dut (.a(a), .b(b), .i_gt(i_gt), .i_lt(i_lt), .i_eq(i_eq),
              .a_gt_b(gt), .a_lt_b(lt), .a_eq_b(eq));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2048; v++) begin
      {i_eq, i_lt, i_gt, b, a} = 11'(v);
      #1;
      // {gt, lt, eq}
      if (int'(a) > int'(b))      expv = 3'b100;
      else if (int'(a) < int'(b)) expv = 3'b010;
      else if (i_eq)              expv = 3'b001;
      else case ({i_gt, i_lt})
        2'b10:   expv = 3'b100;
        2'b01:   expv = 3'b010;
        2'b11:   expv = 3'b000;
        default: expv = 3'b110;
      endcase
      checks++;
      if ({gt, lt, eq} != expv) begin
        failures++;
        $display("FAIL a=%0d b=%0d casc=%b%b%b got %b exp %b", a, b, i_gt, i_lt, i_eq,
                 {gt, lt, eq}, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
