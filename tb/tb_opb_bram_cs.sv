// tb_opb_bram_cs: self-checking test of the address decoder. With a base
// address of 0x8000_1800 the decoder must answer exactly the addresses
// 0x8000_1800 .. 0x8000_1FFF while OPB_select is high. Random and
// boundary addresses, and addresses with each compared bit flipped, are
// checked against that range test.
module tb_opb_bram_cs;
  localparam logic [31:0] BASE = 32'h8000_1800;
  logic OPB_select;
  logic [0:31] OPB_ABus;
  logic chip_select;
  int checks = 0, failures = 0;

  opb_bram_cs #(.C_BASEADDR(BASE | 32'h3A5)) dut (.*);

  task automatic try(input logic [31:0] a, input logic sel);
    logic exp;
    OPB_ABus = a; OPB_select = sel;
    #1;
    exp = sel && (a >= BASE) && (a <= BASE + 32'h7FF);
    checks++;
    if (chip_select !== exp) begin
      failures++;
      $display("FAIL addr %h sel %b: cs=%b expected %b", a, sel, chip_select, exp);
    end
  endtask

  initial begin
    int hits = 0;
    try(BASE, 1); try(BASE + 32'h7FF, 1); try(BASE - 1, 1); try(BASE + 32'h800, 1);
    try(BASE, 0); try(BASE ^ 32'h8000_0000, 1); try(BASE + 32'h400, 1);
    // flipping any one compared bit (little-endian bits 11..31) must miss
    for (int k = 11; k < 32; k++) begin
      try(BASE ^ (32'h1 << k), 1);
      try((BASE + ($urandom % 32'h800)) ^ (32'h1 << k), 1);
    end
    for (int i = 0; i < 4000; i++) begin
      // half the addresses inside the window
      if (i % 2) try(BASE + ($urandom % 32'h800), 1'($urandom));
      else       try($urandom, 1'($urandom));
      hits += int'(chip_select);
    end
    checks++;
    if (hits < 500) begin failures++; $display("FAIL too few hits %0d", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
