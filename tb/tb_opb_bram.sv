// tb_opb_bram: bus-level self-checking test of the OPB BRAM peripheral.
// The testbench acts as an OPB master. It writes random bytes to random
// word addresses in the peripheral's window, keeps a reference copy, and
// reads them back, checking the data (byte lane 0, other lanes zero) and
// the acknowledge latency: 4 cycles for a read and 3 for a write, counting
// the cycle OPB_select rises. It also checks back-to-back reads (one
// acknowledge every 4 cycles with OPB_select held high), aborted reads
// (OPB_select dropped early: no acknowledge and RAM unchanged, except a
// write still selected in its second cycle, which completes), accesses
// outside the window (never acknowledged), that byte enables and the low
// address bits do not matter, and that every slave output is zero
// whenever Sln_xferAck is low.
module tb_opb_bram;
  localparam logic [31:0] BASE = 32'h4000_0800;
  logic OPB_Clk = 0, OPB_Rst;
  logic [0:31] OPB_ABus, OPB_DBus, Sln_DBus;
  logic [0:3]  OPB_BE;
  logic OPB_RNW, OPB_select, OPB_seqAddr;
  logic Sln_errAck, Sln_retry, Sln_toutSup, Sln_xferAck;
  int checks = 0, failures = 0;
  logic [7:0] model [512];
  logic [511:0] written;
  int n_abort_len [2] = '{0, 0};

  opb_bram #(.C_BASEADDR(BASE), .C_HIGHADDR(BASE + 32'h7FF)) dut (.*);

  always #5 OPB_Clk = ~OPB_Clk;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  // Every cycle: outputs idle unless acknowledging.
  always @(negedge OPB_Clk) if (!OPB_Rst) begin
    checks++;
    if (!Sln_xferAck && Sln_DBus != 0) fail("Sln_DBus not zero while idle");
    if (Sln_errAck || Sln_retry || Sln_toutSup) fail("errAck/retry/toutSup set");
    if (Sln_xferAck && Sln_DBus[8:31] != 0) fail("lanes 1-3 not zero");
  end

  // Start a transfer right after a rising edge and wait for the acknowledge.
  // Returns the number of cycles to the acknowledge (0 = none in 'limit').
  task automatic xfer(input logic [31:0] addr, input logic rnw, input logic [7:0] wdata,
                      input int limit, input bit keep_select,
                      output logic [7:0] rdata, output int cycles);
    OPB_select = 1; OPB_ABus = addr; OPB_RNW = rnw; OPB_BE = 4'($urandom);
    OPB_DBus = rnw ? 32'($urandom) : {wdata, 24'($urandom)};
    cycles = 0; rdata = 'x;
    for (int n = 1; n <= limit; n++) begin
      @(negedge OPB_Clk);
      if (Sln_xferAck) begin
        cycles = n; rdata = Sln_DBus[0:7];
        break;
      end
    end
    @(posedge OPB_Clk); #1;
    if (!keep_select) begin
      OPB_select = 0; OPB_ABus = 32'($urandom); OPB_RNW = 1'($urandom); OPB_DBus = 32'($urandom);
    end
  endtask

  function automatic logic [31:0] addr_of(input int idx);
    return BASE + 32'(idx) * 4 + 32'($urandom % 4);
  endfunction

  initial begin
    logic [7:0] d, r;
    int cyc, idx;
    OPB_Rst = 1; OPB_select = 0; OPB_ABus = 0; OPB_DBus = 0; OPB_BE = 0;
    OPB_RNW = 0; OPB_seqAddr = 0; written = '0;
    repeat (3) @(posedge OPB_Clk);
    #1 OPB_Rst = 0;
    @(posedge OPB_Clk); #1;

    // writes
    for (int i = 0; i < 600; i++) begin
      idx = $urandom % 512; d = $urandom;
      xfer(addr_of(idx), 0, d, 10, 0, r, cyc);
      checks++;
      if (cyc != 3) fail($sformatf("write ack after %0d cycles", cyc));
      model[idx] = d; written[idx] = 1;
    end
    // reads
    for (int i = 0; i < 600; i++) begin
      idx = $urandom % 512;
      if (!written[idx]) continue;
      xfer(addr_of(idx), 1, 0, 10, 0, r, cyc);
      checks += 2;
      if (cyc != 4) fail($sformatf("read ack after %0d cycles", cyc));
      if (r !== model[idx]) fail($sformatf("read [%0d] = %h expected %h", idx, r, model[idx]));
    end
    // back-to-back reads, select held high between them
    for (int i = 0; i < 100; i++) begin
      idx = $urandom % 512;
      if (!written[idx]) continue;
      xfer(addr_of(idx), 1, 0, 10, 1, r, cyc);
      checks += 2;
      if (cyc != 4) fail($sformatf("b2b read ack after %0d cycles", cyc));
      if (r !== model[idx]) fail("b2b read data");
    end
    OPB_select = 0;
    @(posedge OPB_Clk); #1;
    // aborted transfers: select for only 1 or 2 cycles. A read or a
    // 1-cycle write must not be acknowledged and must leave the RAM alone;
    // a write still selected in its second cycle (the controller's Selected
    // state) is performed and acknowledged in cycle 3 with select low.
    for (int i = 0; i < 200; i++) begin
      int len;
      logic wr_done;
      len = 1 + ($urandom % 2);
      idx = $urandom % 512; d = $urandom;
      OPB_select = 1; OPB_ABus = addr_of(idx); OPB_RNW = (i % 2) == 0;
      OPB_DBus = {d, 24'($urandom)};
      wr_done = !OPB_RNW && len == 2;
      n_abort_len[len-1]++;
      repeat (len) begin
        @(negedge OPB_Clk);
        checks++;
        if (Sln_xferAck) fail("ack on aborted transfer");
      end
      @(posedge OPB_Clk); #1 OPB_select = 0;
      for (int k = len + 1; k <= len + 3; k++) begin
        @(negedge OPB_Clk);
        checks++;
        if (Sln_xferAck !== (wr_done && k == 3))
          fail($sformatf("aborted %s len %0d: ack=%b in cycle %0d",
                         OPB_RNW ? "read" : "write", len, Sln_xferAck, k));
      end
      if (wr_done) begin model[idx] = d; written[idx] = 1; end
      @(posedge OPB_Clk); #1;
    end
    checks++;
    if (n_abort_len[0] == 0 || n_abort_len[1] == 0) fail("aborted lengths not both seen");
    // outside the window
    for (int i = 0; i < 100; i++) begin
      logic [31:0] a;
      do a = $urandom; while ((a & 32'hFFFF_F800) == BASE);
      xfer(a, 1'($urandom), 8'($urandom), 8, 0, r, cyc);
      checks++;
      if (cyc != 0) fail($sformatf("ack outside window at %h", a));
    end
    // final read-back of everything written
    for (int k = 0; k < 512; k++) if (written[k]) begin
      xfer(addr_of(k), 1, 0, 10, 0, r, cyc);
      checks++;
      if (r !== model[k] || cyc != 4) fail($sformatf("final read [%0d] = %h expected %h", k, r, model[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge OPB_Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
