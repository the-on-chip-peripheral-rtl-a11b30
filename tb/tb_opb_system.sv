// tb_opb_system: end-to-end test of the OPB segment at its default
// parameters (BRAM window 0xFFFF_F800 .. 0xFFFF_FFFF, two masters).
//
// Two master models run concurrently. Each requests the bus and raises
// select in the cycle it sees its grant, then waits for the acknowledge. Master 0 owns the
// even RAM locations and master 1 the odd ones; together they write all
// 512 bytes and read every one back, mixed with accesses to an external
// slave modelled here (16 words at 0x0000_0000, acknowledged in the second
// cycle of select). Then master 0 does back-to-back reads holding select,
// master 1 aborted transfers, and master 0 accesses to unmapped addresses
// that it abandons after 16 cycles (the bus time-out the masters rely
// on).
//
// Checked: all read data against a reference copy, acknowledge latencies
// (RAM read 4 cycles, RAM write 3, external 2), the OR bus carrying 0 on
// unused lanes, the arbiter's priority when both masters ask at once, and
// that each mechanism (RAM read, write, back-to-back read, aborted
// transfer, unmapped access, external-slave access, arbitration conflict)
// happened at least once.
module tb_opb_system;
  import opb_pkg::*;
  localparam logic [31:0] RAM_BASE = 32'hFFFF_F800;
  localparam int NM = 2;

  logic OPB_Clk = 0, OPB_Rst;
  opb_mst_out_t m_out [NM];
  logic [NM-1:0] m_grant;
  opb_slv_out_t ext_sl_out;
  opb_bus_t opb;

  opb_system dut (.*);

  always #5 OPB_Clk = ~OPB_Clk;

  int checks = 0, failures = 0;
  int n_read = 0, n_write = 0, n_b2b = 0, n_abort = 0, n_miss = 0, n_ext = 0, n_conflict = 0;
  logic [7:0]  ram_model [512];
  logic [31:0] ext_model [16];

  task automatic fail(input string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  // ---- external slave model: 16 words at 0x0000_0000 .. 0x0000_003F ----
  logic [31:0] ext_mem [16];
  logic ext_ack;
  wire  ext_hit = opb.select && (opb.abus[0:25] == '0);
  always_ff @(posedge OPB_Clk or posedge OPB_Rst)
    if (OPB_Rst) ext_ack <= 0;
    else begin
      ext_ack <= ext_hit && !ext_ack;
      if (ext_hit && !ext_ack && !opb.rnw) ext_mem[opb.abus[26:29]] <= opb.dbus;
    end
  always_comb begin
    ext_sl_out = '0;
    ext_sl_out.xfer_ack = ext_ack;
    ext_sl_out.dbus_en  = ext_ack;
    ext_sl_out.dbus     = ext_ack ? ext_mem[opb.abus[26:29]] : '0;
  end

  // ---- monitor, 1 ns before each rising edge: bus rules, arbitration ----
  logic both_idle_q;
  always @(negedge OPB_Clk) begin
    #4;
    if (!OPB_Rst) begin
      if (opb.xfer_ack && opb.rnw && opb.abus[0:20] == RAM_BASE[31:11]) begin
        checks++;
        if (opb.dbus[8:31] != 0) fail("RAM read: lanes 1-3 not zero");
      end
      if (both_idle_q) begin
        checks++; n_conflict++;
        if (m_grant != 2'b01) fail("master 0 should win the conflict");
      end
      both_idle_q = m_out[0].request && m_out[1].request && !opb.select;
    end
  end

  // ---- master model ----
  task automatic xfer(input int i, input logic [31:0] addr, input logic rnw,
                      input logic [31:0] wdata, input int limit, input bit keep,
                      output logic [31:0] rdata, output int cycles);
    int first;
    if (m_out[i].select && m_grant[i]) begin
      first = 1;            // keeps the bus: select stays high from this edge
    end else begin
      // request, then raise select in the cycle the grant is seen
      m_out[i].request = 1;
      do @(negedge OPB_Clk); while (!m_grant[i]);
      m_out[i].request = 0;
      first = 2;            // select rose in mid-cycle: that cycle is number 1
    end
    m_out[i].select = 1; m_out[i].abus = addr; m_out[i].rnw = rnw;
    m_out[i].be = rnw ? 4'hF : 4'h8; m_out[i].dbus = wdata; m_out[i].dbus_en = !rnw;
    cycles = 0; rdata = 0;
    for (int n = first; n <= limit; n++) begin
      @(negedge OPB_Clk);
      if (opb.xfer_ack) begin cycles = n; rdata = opb.dbus; break; end
    end
    @(posedge OPB_Clk); #1;
    m_out[i].dbus_en = 0;
    if (!keep) m_out[i] = '0;
  endtask

  function automatic logic [31:0] ram_addr(input int idx);
    return RAM_BASE + 32'(idx) * 4;
  endfunction

  task automatic ram_write(input int i, input int idx, input logic [7:0] d);
    logic [31:0] r; int c;
    xfer(i, ram_addr(idx), 0, {d, 24'h0}, 20, 0, r, c);
    checks++; n_write++;
    if (c != 3) fail($sformatf("M%0d RAM write ack after %0d cycles", i, c));
    ram_model[idx] = d;
  endtask

  task automatic ram_read(input int i, input int idx, input bit keep, input int exp_cycles);
    logic [31:0] r; int c;
    xfer(i, ram_addr(idx), 1, 32'h0, 20, keep, r, c);
    checks += 2; n_read++;
    if (c != exp_cycles) fail($sformatf("M%0d RAM read ack after %0d cycles", i, c));
    if (r[31:24] !== ram_model[idx])
      fail($sformatf("M%0d RAM[%0d] = %h expected %h", i, idx, r[31:24], ram_model[idx]));
  endtask

  task automatic ext_access(input int i);
    logic [31:0] r, d; int c, w; logic rnw;
    w = 2 * ($urandom % 8) + i;    // each master its own words
    rnw = 1'($urandom);
    d = $urandom;
    xfer(i, 32'(w) * 4, rnw, d, 20, 0, r, c);
    checks += 2; n_ext++;
    if (c != 2) fail($sformatf("M%0d external ack after %0d cycles", i, c));
    if (rnw && r !== ext_model[w]) fail($sformatf("external word %0d = %h expected %h", w, r, ext_model[w]));
    if (!rnw) ext_model[w] = d;
  endtask

  task automatic master_fill(input int i);
    for (int k = i; k < 512; k += 2) begin
      ram_write(i, k, 8'($urandom));
      if ($urandom % 8 == 0) ext_access(i);
    end
    for (int k = i; k < 512; k += 2) begin
      ram_read(i, k, 0, 4);
      if ($urandom % 8 == 0) ext_access(i);
    end
  endtask

  initial begin
    OPB_Rst = 1; both_idle_q = 0;
    for (int i = 0; i < NM; i++) m_out[i] = '0;
    for (int w = 0; w < 16; w++) begin ext_model[w] = 0; end
    repeat (3) @(posedge OPB_Clk);
    for (int w = 0; w < 16; w++) ext_mem[w] = 0;
    #1 OPB_Rst = 0;
    @(posedge OPB_Clk); #1;

    // both masters fill and read back the whole RAM concurrently
    fork
      master_fill(0);
      master_fill(1);
    join

    fork
      // master 0: back-to-back reads, select held between them
      begin
        for (int k = 0; k < 64; k++) begin
          ram_read(0, $urandom % 512, 1, 4);
          n_b2b++;
        end
        m_out[0] = '0;
        @(posedge OPB_Clk); #1;
        // unmapped addresses: nobody answers, the master gives up
        for (int k = 0; k < 8; k++) begin
          logic [31:0] r; int c;
          xfer(0, 32'h1000_0000 + 32'($urandom % 32'h1000) * 4, 1'($urandom), $urandom, 16, 0, r, c);
          checks++; n_miss++;
          if (c != 0) fail("unmapped address acknowledged");
        end
      end
      // master 1: aborted transfers; select dropped after 1 or 2 cycles
      begin
        for (int k = 0; k < 32; k++) begin
          logic [31:0] r; int c; int idx;
          idx = 2 * ($urandom % 256) + 1;
          xfer(1, ram_addr(idx), 1'(k % 2), $urandom, 1 + k % 2, 0, r, c);
          checks++; n_abort++;
          if (c != 0) fail("aborted transfer acknowledged");
          repeat (2) @(posedge OPB_Clk);
          #1;
        end
      end
    join

    // everything still intact after aborted transfers
    for (int k = 0; k < 512; k++) ram_read(k % 2, k, 0, 4);

    checks += 7;
    if (n_read == 0)     fail("no RAM read");
    if (n_write == 0)    fail("no RAM write");
    if (n_b2b == 0)      fail("no back-to-back read");
    if (n_abort == 0)    fail("no aborted transfer");
    if (n_miss == 0)     fail("no unmapped access");
    if (n_ext == 0)      fail("no external-slave access");
    if (n_conflict == 0) fail("no arbitration conflict");
    $display("reads=%0d writes=%0d back-to-back=%0d aborted=%0d unmapped=%0d external=%0d conflicts=%0d",
             n_read, n_write, n_b2b, n_abort, n_miss, n_ext, n_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge OPB_Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
