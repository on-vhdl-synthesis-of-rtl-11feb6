// tb_trc_selftest: single stuck-at faults inside the two-rail checker tree.
//
// A trc_tree with 4 pairs has 7 nodes (1 = output, 2..3 = cell outputs of
// the first level, 4..7 = input pairs), each with rails f and g. Each of the
// 28 single faults (node, rail, stuck-at 0/1) is forced in turn and all 16
// code-word inputs are applied. Two properties of a totally self-checking
// checker are verified for every fault:
//  - fault secure: an output is either the fault-free code word or a
//    non-code word (00/11), never the wrong code word;
//  - self-testing: at least one code-word input gives a non-code output, so
//    the fault is revealed in normal operation.
// Watchdog on time.
module tb_trc_selftest;
  logic [3:0] t, c;
  logic f, g;
  int checks = 0, failures = 0;

  trc_tree #(.N(4)) dut (.t(t), .c(c), .f(f), .g(g));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply a stuck-at value to rail 'rail' (0 = f, 1 = g) of node n.
  task automatic inject(int n, bit rail, bit v);
    case ({n[2:0], rail})
      {3'd1, 1'b0}: force dut.nf[1] = v;
      {3'd1, 1'b1}: force dut.ng[1] = v;
      {3'd2, 1'b0}: force dut.nf[2] = v;
      {3'd2, 1'b1}: force dut.ng[2] = v;
      {3'd3, 1'b0}: force dut.nf[3] = v;
      {3'd3, 1'b1}: force dut.ng[3] = v;
      {3'd4, 1'b0}: force dut.nf[4] = v;
      {3'd4, 1'b1}: force dut.ng[4] = v;
      {3'd5, 1'b0}: force dut.nf[5] = v;
      {3'd5, 1'b1}: force dut.ng[5] = v;
      {3'd6, 1'b0}: force dut.nf[6] = v;
      {3'd6, 1'b1}: force dut.ng[6] = v;
      {3'd7, 1'b0}: force dut.nf[7] = v;
      default:      force dut.ng[7] = v;
    endcase
  endtask

  task automatic clear();
    release dut.nf[1]; release dut.ng[1];
    release dut.nf[2]; release dut.ng[2];
    release dut.nf[3]; release dut.ng[3];
    release dut.nf[4]; release dut.ng[4];
    release dut.nf[5]; release dut.ng[5];
    release dut.nf[6]; release dut.ng[6];
    release dut.nf[7]; release dut.ng[7];
  endtask

  initial begin
    logic [1:0] good [16];
    int revealed, n_faults;
    n_faults = 0;
    // Fault-free responses to the 16 code words.
    for (int v = 0; v < 16; v++) begin
      t = 4'(v); c = ~t;
      #1;
      good[v] = {f, g};
      checks++;
      if (f == g) begin
        failures++; $display("FAIL fault-free code word %b gave %b%b", t, f, g);
      end
    end
    for (int n = 1; n <= 7; n++) begin
      for (int rail = 0; rail < 2; rail++) begin
        for (int sv = 0; sv < 2; sv++) begin
          inject(n, rail[0], sv[0]);
          revealed = 0;
          for (int v = 0; v < 16; v++) begin
            t = 4'(v); c = ~t;
            #1;
            checks++;
            if (f == g) revealed++;
            else if ({f, g} != good[v]) begin
              failures++;
              $display("FAIL node %0d rail %0d s-a-%0d: input %b gave wrong code word %b%b",
                       n, rail, sv, t, f, g);
            end
          end
          clear();
          #1;
          checks++;
          n_faults++;
          if (revealed == 0) begin
            failures++;
            $display("FAIL node %0d rail %0d s-a-%0d never revealed", n, rail, sv);
          end
        end
      end
    end
    $display("faults tried: %0d", n_faults);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
