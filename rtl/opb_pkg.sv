// opb_pkg: types and constants shared by the On-chip Peripheral Bus (OPB)
// blocks.
//
// The OPB is big-endian: bit 0 is the most significant bit of a bus and bit
// 31 the least, and byte lane 0 is bits 0 to 7. Every vector here is
// therefore declared [0:N-1], so an index printed in a bus specification
// (OPB_ABus[21:29], byte lane 0 = DBus[0:7]) is the same index in this code.
//
// The bus is 32 bits wide for both address and data, which is the only
// width the Xilinx variant supports (the IBM specification also allows 64).
//
// The three bundle structs follow the bus logic picture: what a master
// drives, what a slave drives, and the shared signals after the AND-OR
// logic. The state enum is the BRAM peripheral's controller; its encoding
// is part of the design (see opb_bram_fsm).
package opb_pkg;

  localparam int unsigned OPB_AWIDTH = 32;
  localparam int unsigned OPB_DWIDTH = 32;
  localparam int unsigned OPB_BEWIDTH = OPB_DWIDTH / 8;

  typedef logic [0:OPB_AWIDTH-1]  opb_addr_t;
  typedef logic [0:OPB_DWIDTH-1]  opb_data_t;
  typedef logic [0:OPB_BEWIDTH-1] opb_be_t;

  // Signals a master drives. abus, be, rnw and seq_addr count only while
  // select is high; dbus counts only while dbus_en is high.
  typedef struct packed {
    logic      request;
    logic      select;
    opb_addr_t abus;
    opb_be_t   be;
    logic      rnw;
    logic      seq_addr;
    opb_data_t dbus;
    logic      dbus_en;
  } opb_mst_out_t;

  // Signals a slave drives (Sl_*). dbus counts only while dbus_en is high.
  typedef struct packed {
    opb_data_t dbus;
    logic      dbus_en;
    logic      xfer_ack;
    logic      retry;
    logic      tout_sup;
    logic      err_ack;
  } opb_slv_out_t;

  // The shared bus (OPB_*), as every master and slave sees it.
  typedef struct packed {
    logic      select;
    opb_addr_t abus;
    opb_be_t   be;
    logic      rnw;
    logic      seq_addr;
    opb_data_t dbus;
    logic      xfer_ack;
    logic      retry;
    logic      tout_sup;
    logic      err_ack;
  } opb_bus_t;

  // BRAM peripheral controller states. Bit 0 (the leftmost) is set only in
  // XFER, so that bit is the transfer acknowledge straight from a flip-flop.
  typedef enum logic [0:2] {
    ST_IDLE     = 3'b000,
    ST_SELECTED = 3'b001,
    ST_READ     = 3'b011,
    ST_XFER     = 3'b111
  } bram_state_e;

endpackage
