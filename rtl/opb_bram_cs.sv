// opb_bram_cs: address decoder (chip select) of the OPB BRAM peripheral.
//
// chip_select is high while OPB_select is high and the address bits above
// the RAM's word address, OPB_ABus[0 : AWIDTH-3-RAM_AWIDTH] (bits 0 to 20
// with the default sizes), equal the same bits of C_BASEADDR. It is purely
// combinational and works on the unregistered bus signals; the controller
// looks at it only in its Idle state. The peripheral thus occupies a
// 2**(RAM_AWIDTH+2)-byte window (2 KiB) aligned on that size; C_BASEADDR's
// lower bits are ignored, as the peripheral's description prescribes.
module opb_bram_cs #(
  parameter int unsigned              C_OPB_AWIDTH = 32,
  parameter int unsigned              RAM_AWIDTH   = 9,
  parameter logic [0:C_OPB_AWIDTH-1]  C_BASEADDR   = 32'hFFFF_FFFF
) (
  input  logic                    OPB_select,
  input  logic [0:C_OPB_AWIDTH-1] OPB_ABus,
  output logic                    chip_select
);

  localparam int unsigned TOP = C_OPB_AWIDTH - 3 - RAM_AWIDTH; // 20

  assign chip_select = OPB_select && (OPB_ABus[0:TOP] == C_BASEADDR[0:TOP]);

endmodule
