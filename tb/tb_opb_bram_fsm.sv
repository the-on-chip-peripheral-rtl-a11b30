// tb_opb_bram_fsm: self-checking test of the BRAM peripheral controller.
// Directed sequences reproduce the read, write, back-to-back and aborted
// cycles cycle by cycle (state, RAM reset, write enable, output enable,
// acknowledge), then random inputs are checked against a transition table
// written out in the testbench.
module tb_opb_bram_fsm;
  import opb_pkg::*;
  logic OPB_Clk = 0, OPB_Rst, chip_select, OPB_select, rnw;
  logic ram_rst, ram_we, output_enable, xfer_ack;
  bram_state_e state;
  int checks = 0, failures = 0;

  opb_bram_fsm dut (.*);

  always #5 OPB_Clk = ~OPB_Clk;

  // expected outputs in a state: {ram_rst, ram_we, output_enable, xfer_ack}
  function automatic logic [3:0] outs(input logic [2:0] s, input logic sel, r);
    case (s)
      3'b001:  return sel ? (r ? 4'b0000 : 4'b1100) : 4'b1000;
      3'b011:  return sel ? 4'b1010 : 4'b1000;
      3'b111:  return 4'b1001;
      default: return 4'b1000;
    endcase
  endfunction
  function automatic logic [2:0] nxt(input logic [2:0] s, input logic cs, sel, r);
    case (s)
      3'b000:  return cs ? 3'b001 : 3'b000;
      3'b001:  return !sel ? 3'b000 : (r ? 3'b011 : 3'b111);
      3'b011:  return sel ? 3'b111 : 3'b000;
      default: return 3'b000;
    endcase
  endfunction

  // Apply inputs for one cycle; check state and outputs in that cycle.
  task automatic step(input logic cs, sel, r, input logic [2:0] exp_state);
    chip_select = cs; OPB_select = sel; rnw = r;
    #1;
    checks++;
    if (3'(state) !== exp_state ||
        {ram_rst, ram_we, output_enable, xfer_ack} !== outs(exp_state, sel, r)) begin
      failures++;
      $display("FAIL t=%0t state=%b exp %b outs=%b exp %b", $time, state, exp_state,
               {ram_rst, ram_we, output_enable, xfer_ack}, outs(exp_state, sel, r));
    end
    @(posedge OPB_Clk); #1;
  endtask

  initial begin
    logic [2:0] s;
    logic cs, sel, r;
    OPB_Rst = 1; chip_select = 0; OPB_select = 0; rnw = 0;
    @(posedge OPB_Clk); #1 OPB_Rst = 0;
    // read: Idle, Selected, Read, Xfer, Idle
    step(1, 1, 0, 3'b000); step(1, 1, 1, 3'b001); step(1, 1, 1, 3'b011);
    step(1, 1, 1, 3'b111); step(0, 0, 1, 3'b000);
    // write: Idle, Selected, Xfer, Idle
    step(1, 1, 0, 3'b000); step(1, 1, 0, 3'b001); step(1, 1, 0, 3'b111);
    step(0, 0, 0, 3'b000);
    // back-to-back reads: select stays high
    step(1, 1, 1, 3'b000); step(1, 1, 1, 3'b001); step(1, 1, 1, 3'b011);
    step(1, 1, 1, 3'b111); step(1, 1, 1, 3'b000); step(1, 1, 1, 3'b001);
    step(1, 1, 1, 3'b011); step(1, 1, 1, 3'b111); step(0, 0, 1, 3'b000);
    // aborted in Read
    step(1, 1, 1, 3'b000); step(1, 1, 1, 3'b001); step(0, 0, 1, 3'b011);
    step(0, 0, 1, 3'b000);
    // aborted in Selected
    step(1, 1, 1, 3'b000); step(0, 0, 1, 3'b001); step(0, 0, 1, 3'b000);
    // random
    s = 3'b000;
    for (int i = 0; i < 5000; i++) begin
      sel = ($urandom % 5) != 0; cs = sel && (($urandom % 2) != 0); r = $urandom;
      step(cs, sel, r, s);
      s = nxt(s, cs, sel, r);
    end
    // asynchronous reset from Xfer
    step(1, 1, 0, s); 
    OPB_Rst = 1; #1;
    checks++;
    if (state !== ST_IDLE) begin failures++; $display("FAIL async reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge OPB_Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
