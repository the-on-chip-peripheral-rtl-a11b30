// opb_arbiter: OPB bus arbiter; decides which master may use the bus.
//
// Each master raises its request line and may start a transfer (raise its
// select) in any cycle in which it sees its grant; the grant comes from a
// flip-flop, so it is valid early in the cycle, and the master must raise
// select within that same cycle, because the grant can move at the next
// edge if select is still low. The arbiter keeps the grants in a register. While the bus is busy (OPB_select high) the grants are held,
// so the owner can finish, including starting its next transfer in the
// cycle right after an acknowledge. In every cycle the bus is idle the
// arbiter grants the lowest-numbered requesting master, or no master at
// all if none requests. A grant therefore appears one cycle after the
// request at the earliest, and at most one grant is ever high.
//
// Fixed priority, the hold-while-busy rule and the absence of bus parking
// and bus-lock support are this design's choices: the arbiter is only
// named in the bus description, with its request and grant lines.
module opb_arbiter #(
  parameter int unsigned NUM_MASTERS = 2
) (
  input  logic                   OPB_Clk,
  input  logic                   OPB_Rst,
  input  logic [NUM_MASTERS-1:0] request,
  input  logic                   OPB_select,
  output logic [NUM_MASTERS-1:0] grant
);

  logic [NUM_MASTERS-1:0] pick;

  // lowest-numbered request wins
  always_comb begin
    pick = '0;
    for (int i = NUM_MASTERS - 1; i >= 0; i--)
      if (request[i]) pick = NUM_MASTERS'(1) << i;
  end

  always_ff @(posedge OPB_Clk or posedge OPB_Rst) begin
    if (OPB_Rst)          grant <= '0;
    else if (!OPB_select) grant <= pick;
  end

  a_one_grant: assert property (
    @(posedge OPB_Clk) disable iff (OPB_Rst) (grant & (grant - 1'b1)) == '0);

endmodule
