// opb_bus: the OPB's bus logic, an AND-OR multiplexer in place of
// tri-state lines.
//
// Every master and slave drives its own copy of each signal. Before the
// copies are combined each one is ANDed with an enable: a master's
// address, byte enables, RNW and seqAddr with its select, a master's write
// data with its DBusEn, a slave's read data with its DBusEn. The gated
// copies are then ORed into the single shared signal that every device
// reads, so the bus carries the value of whichever device is enabled and 0
// when none is. The arbiter makes sure at most one master selects at a
// time; slaves keep their outputs at zero unless they are acknowledging,
// so their acknowledge, retry, time-out-suppress and error lines are ORed
// without gating. Write data from the master and read data from the slave
// share one data bus, OPB_DBus.
//
// Purely combinational. The AND-OR structure for the address and the two
// data directions is the one of the bus description; gating the other
// master outputs with select in the same way is this design's choice. The
// bus is 32 bits wide (the upper 64-bit half of the IBM bus is not built).
module opb_bus
  import opb_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 2,
  parameter int unsigned NUM_SLAVES  = 2
) (
  input  opb_mst_out_t m_out [NUM_MASTERS],
  input  opb_slv_out_t s_out [NUM_SLAVES],
  output opb_bus_t     opb
);

  always_comb begin
    opb = '0;
    for (int i = 0; i < NUM_MASTERS; i++) begin
      opb.select   |= m_out[i].select;
      opb.abus     |= m_out[i].abus & {OPB_AWIDTH{m_out[i].select}};
      opb.be       |= m_out[i].be & {OPB_BEWIDTH{m_out[i].select}};
      opb.rnw      |= m_out[i].rnw & m_out[i].select;
      opb.seq_addr |= m_out[i].seq_addr & m_out[i].select;
      opb.dbus     |= m_out[i].dbus & {OPB_DWIDTH{m_out[i].dbus_en}};
    end
    for (int j = 0; j < NUM_SLAVES; j++) begin
      opb.dbus     |= s_out[j].dbus & {OPB_DWIDTH{s_out[j].dbus_en}};
      opb.xfer_ack |= s_out[j].xfer_ack;
      opb.retry    |= s_out[j].retry;
      opb.tout_sup |= s_out[j].tout_sup;
      opb.err_ack  |= s_out[j].err_ack;
    end
  end

endmodule
