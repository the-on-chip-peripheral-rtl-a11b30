// tb_opb_bus: self-checking test of the AND-OR bus logic with three
// masters and three slaves. Random master and slave outputs are applied,
// with random selects and data enables; every shared signal is compared
// with the value worked out in the testbench: the OR of the copies whose
// enable is set, bit by bit. Includes the cases of exactly one master
// selecting (the normal case) and of nothing enabled (all zero).
module tb_opb_bus;
  import opb_pkg::*;
  localparam int NM = 3, NS = 3;
  opb_mst_out_t m_out [NM];
  opb_slv_out_t s_out [NS];
  opb_bus_t     opb;
  int checks = 0, failures = 0;

  opb_bus #(.NUM_MASTERS(NM), .NUM_SLAVES(NS)) dut (.*);

  task automatic check(input logic [63:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] e_abus, e_dbus; logic [3:0] e_be;
    logic e_sel, e_rnw, e_seq, e_ack, e_retry, e_tout, e_err;
    for (int t = 0; t < 3000; t++) begin
      int mode, who;
      mode = t % 3;   // 0: random, 1: one master only, 2: nothing enabled
      who = $urandom % NM;
      for (int i = 0; i < NM; i++) begin
        m_out[i] = {$urandom, $urandom, $urandom};
        if (mode == 1) m_out[i].select = (i == who);
        if (mode == 2) begin m_out[i].select = 0; m_out[i].dbus_en = 0; end
      end
      for (int j = 0; j < NS; j++) begin
        s_out[j] = {$urandom, $urandom};
        if (mode == 2) s_out[j] = '0;
        if (mode == 2 && j == 0) s_out[j].dbus = 32'hFFFF_FFFF;   // data without enable
      end
      #1;
      e_abus = 0; e_dbus = 0; e_be = 0; e_sel = 0; e_rnw = 0; e_seq = 0;
      e_ack = 0; e_retry = 0; e_tout = 0; e_err = 0;
      for (int i = 0; i < NM; i++) begin
        if (m_out[i].select) begin
          e_sel = 1; e_abus |= m_out[i].abus; e_be |= m_out[i].be;
          e_rnw |= m_out[i].rnw; e_seq |= m_out[i].seq_addr;
        end
        if (m_out[i].dbus_en) e_dbus |= m_out[i].dbus;
      end
      for (int j = 0; j < NS; j++) begin
        if (s_out[j].dbus_en) e_dbus |= s_out[j].dbus;
        e_ack |= s_out[j].xfer_ack; e_retry |= s_out[j].retry;
        e_tout |= s_out[j].tout_sup; e_err |= s_out[j].err_ack;
      end
      if (mode == 1) check(opb.abus, m_out[who].abus, "single master abus");
      check(opb.abus, e_abus, "abus");
      check(opb.dbus, e_dbus, "dbus");
      check(opb.be, e_be, "be");
      check({opb.select, opb.rnw, opb.seq_addr}, {e_sel, e_rnw, e_seq}, "select/rnw/seq");
      check({opb.xfer_ack, opb.retry, opb.tout_sup, opb.err_ack},
            {e_ack, e_retry, e_tout, e_err}, "slave flags");
    end
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
