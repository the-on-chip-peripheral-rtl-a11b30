// opb_system: one On-chip Peripheral Bus segment with a block-RAM slave.
//
// This is the top level. It joins the OPB arbiter (opb_arbiter), the
// AND-OR bus logic (opb_bus) and the BRAM peripheral (opb_bram) as slave 0.
// The masters (a processor, the bridge from the processor bus) and a
// second slave (the bridge towards the processor bus) are outside this
// design: their signals are ports. Each master presents its outputs as one
// opb_mst_out_t and receives its grant and the shared bus 'opb'; the
// external slave presents an opb_slv_out_t and also reads 'opb'.
//
// Timing as seen by a master: the grant comes one cycle after the request
// while the bus is idle; a BRAM read is acknowledged in the fourth cycle of
// select, a write in the third; a master that keeps select high straight
// after an acknowledge keeps the bus. With the default C_BASEADDR the BRAM
// answers at 0xFFFF_F800 .. 0xFFFF_FFFF (byte lane 0 of every word).
//
// The arrangement of masters, slaves, arbiter and AND-OR logic follows the
// bus description (two masters and two slaves). An assertion checks the
// central bus rule: never more than one master selecting, and only with
// its grant.
module opb_system
  import opb_pkg::*;
#(
  parameter logic [0:31] C_BASEADDR  = 32'hFFFF_FFFF,
  parameter int unsigned NUM_MASTERS = 2
) (
  input  logic                   OPB_Clk,
  input  logic                   OPB_Rst,
  input  opb_mst_out_t           m_out [NUM_MASTERS],
  output logic [NUM_MASTERS-1:0] m_grant,
  input  opb_slv_out_t           ext_sl_out,
  output opb_bus_t               opb
);

  logic [NUM_MASTERS-1:0] request, select;
  opb_slv_out_t           s_out [2];
  logic [0:OPB_DWIDTH-1]  bram_dbus;
  logic                   bram_xfer_ack, bram_retry, bram_tout_sup, bram_err_ack;

  always_comb
    for (int i = 0; i < NUM_MASTERS; i++) begin
      request[i] = m_out[i].request;
      select[i]  = m_out[i].select;
    end

  opb_arbiter #(.NUM_MASTERS(NUM_MASTERS)) u_arbiter (
    .OPB_Clk   (OPB_Clk),
    .OPB_Rst   (OPB_Rst),
    .request   (request),
    .OPB_select(opb.select),
    .grant     (m_grant)
  );

  opb_bram #(
    .C_BASEADDR(C_BASEADDR),
    .C_HIGHADDR(C_BASEADDR | 32'h0000_07FF)
  ) u_bram (
    .OPB_Clk    (OPB_Clk),
    .OPB_Rst    (OPB_Rst),
    .OPB_ABus   (opb.abus),
    .OPB_BE     (opb.be),
    .OPB_DBus   (opb.dbus),
    .OPB_RNW    (opb.rnw),
    .OPB_select (opb.select),
    .OPB_seqAddr(opb.seq_addr),
    .Sln_DBus   (bram_dbus),
    .Sln_errAck (bram_err_ack),
    .Sln_retry  (bram_retry),
    .Sln_toutSup(bram_tout_sup),
    .Sln_xferAck(bram_xfer_ack)
  );

  always_comb begin
    s_out[0].dbus     = bram_dbus;
    s_out[0].dbus_en  = bram_xfer_ack;
    s_out[0].xfer_ack = bram_xfer_ack;
    s_out[0].retry    = bram_retry;
    s_out[0].tout_sup = bram_tout_sup;
    s_out[0].err_ack  = bram_err_ack;
    s_out[1]          = ext_sl_out;
  end

  opb_bus #(.NUM_MASTERS(NUM_MASTERS), .NUM_SLAVES(2)) u_bus (
    .m_out(m_out),
    .s_out(s_out),
    .opb  (opb)
  );

  a_one_master: assert property (
    @(posedge OPB_Clk) disable iff (OPB_Rst)
      ((select & (select - 1'b1)) == '0) && ((select & ~m_grant) == '0));

endmodule
