// opb_bram_inreg: input registers of the OPB BRAM peripheral.
//
// OPB master signals arrive late in the clock cycle, so the peripheral
// registers what it needs before using it. On every rising edge, whatever
// the bus is doing, it captures
//   ram_di <= OPB_DBus[0 : RAM_DWIDTH-1]                    (byte lane 0)
//   abus   <= OPB_ABus[AWIDTH-2-RAM_AWIDTH : AWIDTH-3]      (word address)
//   rnw    <= OPB_RNW
// With the default sizes the RAM address is OPB_ABus[21:29]: bits 30 and 31
// are the byte offset within a 32-bit word, so byte-wide locations sit at
// word-aligned addresses 0, 4, 8, ... All three registers clear on the
// asynchronous reset. The bit slices are those of the peripheral's
// description; the widths are parameters.
module opb_bram_inreg #(
  parameter int unsigned C_OPB_AWIDTH = 32,
  parameter int unsigned C_OPB_DWIDTH = 32,
  parameter int unsigned RAM_AWIDTH   = 9,
  parameter int unsigned RAM_DWIDTH   = 8
) (
  input  logic                    OPB_Clk,
  input  logic                    OPB_Rst,
  input  logic [0:C_OPB_AWIDTH-1] OPB_ABus,
  input  logic [0:C_OPB_DWIDTH-1] OPB_DBus,
  input  logic                    OPB_RNW,
  output logic [0:RAM_DWIDTH-1]   ram_di,
  output logic [0:RAM_AWIDTH-1]   abus,
  output logic                    rnw
);

  localparam int unsigned ALSB = C_OPB_AWIDTH - 3;             // 29
  localparam int unsigned AMSB = C_OPB_AWIDTH - 2 - RAM_AWIDTH; // 21

  always_ff @(posedge OPB_Clk or posedge OPB_Rst) begin
    if (OPB_Rst) begin
      ram_di <= '0;
      abus   <= '0;
      rnw    <= 1'b0;
    end else begin
      ram_di <= OPB_DBus[0:RAM_DWIDTH-1];
      abus   <= OPB_ABus[AMSB:ALSB];
      rnw    <= OPB_RNW;
    end
  end

endmodule
