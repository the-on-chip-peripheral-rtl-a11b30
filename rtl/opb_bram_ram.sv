// opb_bram_ram: 512 x 8 single-port synchronous block RAM, the storage of
// the OPB BRAM peripheral.
//
// It has the ports of the 4-kbit, byte-wide FPGA block RAM the peripheral
// is built around (DO, ADDR, CLK, DI, EN, RST, WE), written as an array so
// any synthesis tool can map it. Everything happens on the rising CLK edge
// and only while EN is high:
//   WE = 1            the word at ADDR takes DI;
//   RST = 1           the output register DO is cleared to 0;
//   RST = 0, WE = 0   DO takes the word at ADDR (one cycle read latency);
//   RST = 0, WE = 1   DO takes DI (write-first).
// RST clears only DO, never the array. The peripheral relies on the
// output reset: it holds RST high except in the one cycle it reads, so DO
// is 0 at all other times.
//
// The size (512 x 8) is the peripheral's. The read/write behaviour of the
// output register and the write-first choice follow the usual behaviour of
// that FPGA primitive and are this design's reading of it. The array has no
// reset and starts undefined, as a real block RAM does.
module opb_bram_ram #(
  parameter int unsigned AWIDTH = 9,
  parameter int unsigned DWIDTH = 8
) (
  input  logic              CLK,
  input  logic              EN,
  input  logic              RST,
  input  logic              WE,
  input  logic [0:AWIDTH-1] ADDR,
  input  logic [0:DWIDTH-1] DI,
  output logic [0:DWIDTH-1] DO
);

  logic [0:DWIDTH-1] mem [2**AWIDTH];

  always_ff @(posedge CLK) begin
    if (EN && WE) mem[ADDR] <= DI;
  end

  always_ff @(posedge CLK) begin
    if (EN) begin
      if (RST)     DO <= '0;
      else if (WE) DO <= DI;
      else         DO <= mem[ADDR];
    end
  end

endmodule
