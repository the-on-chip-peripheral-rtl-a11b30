// opb_bram: OPB slave peripheral containing one 512 x 8 block RAM.
//
// A master's OPB read or write inside the peripheral's 2 KiB address
// window becomes a read or write of one RAM byte. The RAM holds byte-wide
// data on byte lane 0 (OPB_DBus[0:7]) at word-aligned addresses: the RAM
// address is OPB_ABus[21:29], the window is chosen by OPB_ABus[0:20]
// against C_BASEADDR.
//
// Structure: the address decoder (opb_bram_cs) looks at the raw bus; the
// input registers (opb_bram_inreg) capture address, write data and RNW
// every cycle because bus signals arrive late in the cycle; the controller
// (opb_bram_fsm) sequences the RAM (opb_bram_ram) and the output register
// (opb_bram_outreg), which drives Sln_DBus, and its state register gives
// Sln_xferAck directly. Every output leaves a flip-flop, because the bus
// needs DBus and xferAck early in the cycle.
//
// Timing, counting the cycle in which OPB_select rises as cycle 1:
//   read  : Sln_xferAck and valid Sln_DBus[0:7] in cycle 4;
//   write : RAM written at the end of cycle 2, Sln_xferAck in cycle 3;
//   a read whose OPB_select drops before cycle 4 gets no acknowledge and a
//   write whose OPB_select drops before cycle 2 is not performed (aborted);
//   a write still selected in cycle 2 is performed and acknowledged in
//   cycle 3 even if OPB_select has dropped by then; one idle cycle
//   separates back-to-back transfers.
// Between transfers every output is 0, as the OR-based bus requires.
// Sln_retry, Sln_toutSup and Sln_errAck are always 0: this slave never
// retries, never needs more time than the bus time-out and never fails.
// OPB_BE and OPB_seqAddr are not used: the peripheral ignores byte
// enables (byte-wide peripherals use lane 0 only) and sequential-address
// hints. C_HIGHADDR is kept for interface compatibility; the decoder uses
// only C_BASEADDR.
//
// The ports, generics and the whole structure follow the peripheral's
// description. The default C_BASEADDR (all ones) is the placeholder the
// description gives; a system sets its own. The concurrent assertions check
// that data appears only with the acknowledge and that the acknowledge
// comes only from the Xfer state.
module opb_bram
  import opb_pkg::*;
#(
  parameter logic [0:31] C_BASEADDR   = 32'hFFFF_FFFF,
  parameter logic [0:31] C_HIGHADDR   = 32'h0000_0000,
  parameter int unsigned C_OPB_AWIDTH = 32,
  parameter int unsigned C_OPB_DWIDTH = 32,
  parameter int unsigned RAM_AWIDTH   = 9,
  parameter int unsigned RAM_DWIDTH   = 8
) (
  input  logic                      OPB_Clk,
  input  logic                      OPB_Rst,
  input  logic [0:C_OPB_AWIDTH-1]   OPB_ABus,
  input  logic [0:C_OPB_DWIDTH/8-1] OPB_BE,
  input  logic [0:C_OPB_DWIDTH-1]   OPB_DBus,
  input  logic                      OPB_RNW,
  input  logic                      OPB_select,
  input  logic                      OPB_seqAddr,
  output logic [0:C_OPB_DWIDTH-1]   Sln_DBus,
  output logic                      Sln_errAck,
  output logic                      Sln_retry,
  output logic                      Sln_toutSup,
  output logic                      Sln_xferAck
);

  logic                  chip_select;
  logic [0:RAM_DWIDTH-1] ram_di, ram_do;
  logic [0:RAM_AWIDTH-1] abus;
  logic                  rnw;
  logic                  ram_rst, ram_we, output_enable;
  bram_state_e           state;

  opb_bram_cs #(
    .C_OPB_AWIDTH(C_OPB_AWIDTH),
    .RAM_AWIDTH  (RAM_AWIDTH),
    .C_BASEADDR  (C_BASEADDR[0:C_OPB_AWIDTH-1])
  ) u_cs (
    .OPB_select (OPB_select),
    .OPB_ABus   (OPB_ABus),
    .chip_select(chip_select)
  );

  opb_bram_inreg #(
    .C_OPB_AWIDTH(C_OPB_AWIDTH),
    .C_OPB_DWIDTH(C_OPB_DWIDTH),
    .RAM_AWIDTH  (RAM_AWIDTH),
    .RAM_DWIDTH  (RAM_DWIDTH)
  ) u_inreg (
    .OPB_Clk (OPB_Clk),
    .OPB_Rst (OPB_Rst),
    .OPB_ABus(OPB_ABus),
    .OPB_DBus(OPB_DBus),
    .OPB_RNW (OPB_RNW),
    .ram_di  (ram_di),
    .abus    (abus),
    .rnw     (rnw)
  );

  opb_bram_fsm u_fsm (
    .OPB_Clk      (OPB_Clk),
    .OPB_Rst      (OPB_Rst),
    .chip_select  (chip_select),
    .OPB_select   (OPB_select),
    .rnw          (rnw),
    .ram_rst      (ram_rst),
    .ram_we       (ram_we),
    .output_enable(output_enable),
    .xfer_ack     (Sln_xferAck),
    .state        (state)
  );

  opb_bram_ram #(
    .AWIDTH(RAM_AWIDTH),
    .DWIDTH(RAM_DWIDTH)
  ) u_ram (
    .CLK (OPB_Clk),
    .EN  (1'b1),
    .RST (ram_rst),
    .WE  (ram_we),
    .ADDR(abus),
    .DI  (ram_di),
    .DO  (ram_do)
  );

  opb_bram_outreg #(
    .C_OPB_DWIDTH(C_OPB_DWIDTH),
    .RAM_DWIDTH  (RAM_DWIDTH)
  ) u_outreg (
    .OPB_Clk      (OPB_Clk),
    .OPB_Rst      (OPB_Rst),
    .output_enable(output_enable),
    .ram_do       (ram_do),
    .Sln_DBus     (Sln_DBus)
  );

  assign Sln_errAck  = 1'b0;
  assign Sln_retry   = 1'b0;
  assign Sln_toutSup = 1'b0;

  // Bus rule for a slave: data only together with the acknowledge. (An
  // acknowledge without OPB_select is possible: a write whose select drops
  // after the RAM was written still passes through Xfer.)
  a_dbus_zero_when_idle: assert property (
    @(posedge OPB_Clk) disable iff (OPB_Rst) !Sln_xferAck |-> (Sln_DBus == '0));
  a_ack_only_in_xfer: assert property (
    @(posedge OPB_Clk) disable iff (OPB_Rst) Sln_xferAck == (state == ST_XFER));

endmodule
