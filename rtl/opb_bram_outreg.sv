// opb_bram_outreg: output data register of the OPB BRAM peripheral.
//
// A slave must drive zero on its data bus whenever it is not answering,
// because the bus ORs all slaves together. On every rising edge this
// register loads the RAM output into byte lane 0 of Sln_DBus when
// output_enable is high and loads zero otherwise (an AND gate in front of a
// register). The controller raises output_enable for the one cycle before
// the acknowledge, so the data is on the bus exactly during the acknowledge
// cycle. Lanes 1 to 3 are always zero: a byte-wide peripheral uses data
// byte 0 only. Clears on the asynchronous reset.
module opb_bram_outreg #(
  parameter int unsigned C_OPB_DWIDTH = 32,
  parameter int unsigned RAM_DWIDTH   = 8
) (
  input  logic                    OPB_Clk,
  input  logic                    OPB_Rst,
  input  logic                    output_enable,
  input  logic [0:RAM_DWIDTH-1]   ram_do,
  output logic [0:C_OPB_DWIDTH-1] Sln_DBus
);

  always_ff @(posedge OPB_Clk or posedge OPB_Rst) begin
    if (OPB_Rst) begin
      Sln_DBus <= '0;
    end else begin
      Sln_DBus <= '0;
      if (output_enable) Sln_DBus[0:RAM_DWIDTH-1] <= ram_do;
    end
  end

endmodule
