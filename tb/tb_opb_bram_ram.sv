// tb_opb_bram_ram: self-checking test of the 512 x 8 block RAM.
// Random mixes of writes, reads and output resets are compared with a
// reference array kept in the testbench; also checks the one-cycle read
// latency, write-first output, RST clearing only the output, and EN = 0
// freezing both array and output.
module tb_opb_bram_ram;
  localparam int AW = 9, DW = 8;
  logic CLK = 0, EN, RST, WE;
  logic [0:AW-1] ADDR;
  logic [0:DW-1] DI, DO;
  int checks = 0, failures = 0;
  logic [DW-1:0] model [2**AW];
  logic [DW-1:0] exp_do;

  opb_bram_ram #(.AWIDTH(AW), .DWIDTH(DW)) dut (.*);

  always #5 CLK = ~CLK;

  task automatic check(input logic [DW-1:0] exp, input string what);
    checks++;
    if (DO !== exp) begin
      failures++;
      $display("FAIL %s: DO=%h expected %h", what, DO, exp);
    end
  endtask

  // One clock with the given controls; updates the model, checks DO after.
  task automatic cyc(input logic en, rst, we, input logic [AW-1:0] a, input logic [DW-1:0] d);
    EN = en; RST = rst; WE = we; ADDR = a; DI = d;
    @(posedge CLK);
    if (en) begin
      if (rst)     exp_do = '0;
      else if (we) exp_do = d;
      else         exp_do = model[a];
      if (we) model[a] = d;
    end
    #1 check(exp_do, "cycle");
  endtask

  initial begin
    EN = 1; RST = 0; WE = 0; ADDR = 0; DI = 0;
    // fill the whole array
    for (int i = 0; i < 2**AW; i++) cyc(1, 1, 1, i[AW-1:0], DW'($urandom));
    // read it all back
    for (int i = 0; i < 2**AW; i++) cyc(1, 0, 0, i[AW-1:0], '0);
    // random traffic
    for (int i = 0; i < 3000; i++)
      cyc(($urandom % 8) != 0, ($urandom % 3) == 0, ($urandom % 3) == 0,
          AW'($urandom), DW'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge CLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
