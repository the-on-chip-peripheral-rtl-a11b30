// tb_opb_arbiter: self-checking test of the OPB arbiter with four masters.
// Random requests and bus-busy patterns are applied; after each edge the
// grant must equal the lowest-numbered request of the previous cycle if
// the bus was idle, and must be unchanged if it was busy. Also checks the
// one-cycle grant latency, reset, and that a master holding select keeps
// the bus against a higher-priority request.
module tb_opb_arbiter;
  localparam int NM = 4;
  logic OPB_Clk = 0, OPB_Rst, OPB_select;
  logic [NM-1:0] request, grant, exp;
  int checks = 0, failures = 0;

  opb_arbiter #(.NUM_MASTERS(NM)) dut (.*);

  always #5 OPB_Clk = ~OPB_Clk;

  function automatic logic [NM-1:0] lowest(input logic [NM-1:0] r);
    for (int i = 0; i < NM; i++) if (r[i]) return NM'(1 << i);
    return '0;
  endfunction

  task automatic check(input string what);
    checks++;
    if (grant !== exp) begin
      failures++;
      $display("FAIL t=%0t %s: grant=%b expected %b", $time, what, grant, exp);
    end
  endtask

  initial begin
    OPB_Rst = 1; request = '1; OPB_select = 0; exp = '0;
    @(posedge OPB_Clk); #1;
    check("reset");
    OPB_Rst = 0;
    // directed: master 2 gets the bus, holds it against master 0
    request = 4'b0100;
    @(posedge OPB_Clk); #1 exp = 4'b0100; check("grant after one cycle");
    OPB_select = 1; request = 4'b0101;
    repeat (3) begin @(posedge OPB_Clk); #1 check("held while busy"); end
    OPB_select = 0;
    @(posedge OPB_Clk); #1 exp = 4'b0001; check("priority after release");
    request = 0;
    @(posedge OPB_Clk); #1 exp = 0; check("no request no grant");
    // random
    for (int i = 0; i < 5000; i++) begin
      logic [NM-1:0] r; logic s;
      r = NM'($urandom); s = ($urandom % 3) == 0;
      request = r; OPB_select = s;
      @(posedge OPB_Clk); #1;
      if (!s) exp = lowest(r);
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge OPB_Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
