// opb_bram_fsm: controller of the OPB BRAM peripheral.
//
// Four states, encoded so that the transfer acknowledge is one state bit:
//   Idle     (000)  wait for chip_select; chip_select -> Selected.
//   Selected (001)  address and RNW are now registered. If OPB_select has
//                   dropped -> Idle (aborted). A read releases the RAM's
//                   output reset (ram_rst = 0) so the RAM reads the word
//                   -> Read. A write pulses ram_we -> Xfer.
//   Read     (011)  RAM data is on its output; output_enable loads it into
//                   the output register -> Xfer, or -> Idle if OPB_select
//                   has dropped.
//   Xfer     (111)  xfer_ack is high (data is on Sln_DBus for a read)
//                   -> Idle unconditionally.
// A read therefore acknowledges in the fourth cycle of OPB_select, a write
// in the third; after Xfer the controller spends one cycle in Idle, so the
// next transfer's acknowledge comes at the earliest four (read) or three
// (write) cycles later again.
//
// Interface: chip_select and OPB_select are the raw bus-side signals, rnw
// is the registered OPB_RNW. Outputs other than xfer_ack are decoded from
// the state; ram_rst is high (RAM output held at zero) except in the read
// cycle. OPB_Rst resets to Idle asynchronously.
//
// States, encodings, outputs and transitions are those of the peripheral's
// description; making xfer_ack the leftmost state bit is how that encoding
// is meant to be used.
module opb_bram_fsm
  import opb_pkg::*;
(
  input  logic        OPB_Clk,
  input  logic        OPB_Rst,
  input  logic        chip_select,
  input  logic        OPB_select,
  input  logic        rnw,
  output logic        ram_rst,
  output logic        ram_we,
  output logic        output_enable,
  output logic        xfer_ack,
  output bram_state_e state
);

  bram_state_e next_state;

  always_ff @(posedge OPB_Clk or posedge OPB_Rst) begin
    if (OPB_Rst) state <= ST_IDLE;
    else         state <= next_state;
  end

  always_comb begin
    ram_rst       = 1'b1;
    ram_we        = 1'b0;
    output_enable = 1'b0;
    next_state    = ST_IDLE;
    unique case (state)
      ST_IDLE:
        if (chip_select) next_state = ST_SELECTED;
      ST_SELECTED:
        if (OPB_select) begin
          if (rnw) begin
            ram_rst    = 1'b0;
            next_state = ST_READ;
          end else begin
            ram_we     = 1'b1;
            next_state = ST_XFER;
          end
        end
      ST_READ:
        if (OPB_select) begin
          output_enable = 1'b1;
          next_state    = ST_XFER;
        end
      ST_XFER:
        next_state = ST_IDLE;
      default:
        next_state = ST_IDLE;
    endcase
  end

  // Only the Xfer encoding has its leftmost bit set.
  assign xfer_ack = state[0];

endmodule
