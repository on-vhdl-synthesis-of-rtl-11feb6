// tb_check_gen: checks the check symbol generator against the reference check
// part of every scheme: DEMUX38 in all five schemes (all 64 inputs) and
// BINBCD12 in Bose-Lin (K = 2) and pg4 (all 4096 inputs). Watchdog on time.
module tb_check_gen;
  import sc_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS = 5;
  logic [5:0]  xd;
  logic [11:0] xb;
  logic [7:0]  cd_dup;
  logic [2:0]  cd_blin;
  logic [0:0]  cd_pov;
  logic [1:0]  cd_pg2, cb_blin;
  logic [3:0]  cd_pg4, cb_pg4;
  int checks = 0, failures = 0;

  check_gen #(.CIRCUIT(DEMUX38), .SCHEME(SCH_DUP))  u0 (.x(xd), .chk(cd_dup));
  check_gen #(.CIRCUIT(DEMUX38), .SCHEME(SCH_BLIN)) u1 (.x(xd), .chk(cd_blin));
  check_gen #(.CIRCUIT(DEMUX38), .SCHEME(SCH_POV))  u2 (.x(xd), .chk(cd_pov));
  check_gen #(.CIRCUIT(DEMUX38), .SCHEME(SCH_PG2))  u3 (.x(xd), .chk(cd_pg2));
  check_gen #(.CIRCUIT(DEMUX38), .SCHEME(SCH_PG4))  u4 (.x(xd), .chk(cd_pg4));
  check_gen #(.CIRCUIT(BINBCD12), .SCHEME(SCH_BLIN), .BL_K(2)) u5 (.x(xb), .chk(cb_blin));
  check_gen #(.CIRCUIT(BINBCD12), .SCHEME(SCH_PG4))            u6 (.x(xb), .chk(cb_pg4));

  task automatic cmp(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] zd, zb;
    for (int v = 0; v < 4096; v++) begin
      xd = 6'(v);
      xb = 12'(v);
      #1;
      zd = ref_func(DEMUX38, 16'(xd));
      zb = ref_func(BINBCD12, 16'(xb));
      if (v < 64) begin
        cmp(16'(cd_dup),  ref_chk(SCH_DUP,  8, 3, zd), "demux dup");
        cmp(16'(cd_blin), ref_chk(SCH_BLIN, 8, 3, zd), "demux blin");
        cmp(16'(cd_pov),  ref_chk(SCH_POV,  8, 3, zd), "demux pov");
        cmp(16'(cd_pg2),  ref_chk(SCH_PG2,  8, 3, zd), "demux pg2");
        cmp(16'(cd_pg4),  ref_chk(SCH_PG4,  8, 3, zd), "demux pg4");
      end
      cmp(16'(cb_blin), ref_chk(SCH_BLIN, 16, 2, zb), "binbcd12 blin");
      cmp(16'(cb_pg4),  ref_chk(SCH_PG4,  16, 3, zb), "binbcd12 pg4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
