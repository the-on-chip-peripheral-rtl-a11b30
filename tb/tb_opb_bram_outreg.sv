// tb_opb_bram_outreg: self-checking test of the output data register.
// After each edge Sln_DBus must hold the previous ram_do in its top byte
// (byte lane 0) when output_enable was high and be all zero otherwise;
// reset must clear it.
module tb_opb_bram_outreg;
  logic OPB_Clk = 0, OPB_Rst, output_enable;
  logic [0:7] ram_do;
  logic [0:31] Sln_DBus;
  int checks = 0, failures = 0;

  opb_bram_outreg dut (.*);

  always #5 OPB_Clk = ~OPB_Clk;

  task automatic check(input logic [31:0] exp, input string what);
    checks++;
    if (Sln_DBus !== exp) begin
      failures++;
      $display("FAIL %s: Sln_DBus=%h expected %h", what, Sln_DBus, exp);
    end
  endtask

  initial begin
    logic [7:0] d;
    logic oe;
    OPB_Rst = 0; output_enable = 1; ram_do = 8'hA5;
    @(posedge OPB_Clk); #1;
    check(32'hA500_0000, "load");
    OPB_Rst = 1; #1;
    check(0, "async reset");
    @(posedge OPB_Clk); #1 OPB_Rst = 0;
    for (int i = 0; i < 2000; i++) begin
      d = $urandom; oe = $urandom;
      ram_do = d; output_enable = oe;
      @(posedge OPB_Clk); #1;
      check(oe ? {d, 24'h0} : 32'h0, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge OPB_Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
