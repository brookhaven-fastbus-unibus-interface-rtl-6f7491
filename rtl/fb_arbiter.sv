// fb_arbiter -- central arbiter of the interface's FASTBUS segment.
//
// Every potential master has a request line and a grant line; the requester
// with the highest priority (lowest index) is granted when the bus is free,
// and keeps the grant until it drops its request (no pre-emption). A grant
// is issued on the clock edge after the bus becomes free, and released on the
// edge after the request falls. Central arbitration by distinct priority is
// as published; the number of masters, the priority order and the
// hold-until-release rule are this design's choice.
module fb_arbiter #(
  parameter int N = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);
  logic [N-1:0] pick;

  always_comb begin
    pick = '0;
    for (int i = N - 1; i >= 0; i--)
      if (req[i]) pick = N'(1) << i;
  end

  always_ff @(posedge clk) begin
    if (rst)                    gnt <= '0;
    else if ((gnt & req) == '0) gnt <= pick;
  end

  // At most one master holds the bus.
  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(gnt));
endmodule
