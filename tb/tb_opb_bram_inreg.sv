// tb_opb_bram_inreg: self-checking test of the BRAM peripheral's input
// registers. Random bus values are applied each cycle; after the edge the
// registered RAM address must be address bits 21..29, the write data byte
// lane 0 (bits 0..7) and rnw the previous OPB_RNW. The expected values are
// computed with ordinary little-endian shifts, independently of the
// big-endian slicing in the block. Reset must clear all three.
module tb_opb_bram_inreg;
  logic OPB_Clk = 0, OPB_Rst;
  logic [0:31] OPB_ABus, OPB_DBus;
  logic OPB_RNW;
  logic [0:7] ram_di;
  logic [0:8] abus;
  logic rnw;
  int checks = 0, failures = 0;

  opb_bram_inreg dut (.*);

  always #5 OPB_Clk = ~OPB_Clk;

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] a, d;
    logic r;
    OPB_Rst = 1; OPB_ABus = '1; OPB_DBus = '1; OPB_RNW = 1;
    repeat (2) @(posedge OPB_Clk);
    #1;
    check(ram_di, 0, "reset ram_di"); check(abus, 0, "reset abus"); check(rnw, 0, "reset rnw");
    OPB_Rst = 0;
    for (int i = 0; i < 2000; i++) begin
      a = $urandom; d = $urandom; r = $urandom;
      OPB_ABus = a; OPB_DBus = d; OPB_RNW = r;
      @(posedge OPB_Clk); #1;
      check(32'(abus), (a >> 2) & 32'h1FF, "abus");
      check(32'(ram_di), d >> 24, "ram_di");
      check(32'(rnw), 32'(r), "rnw");
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
