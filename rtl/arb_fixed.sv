// arb_fixed: fixed-priority arbiter.
//
// Among the requesting devices the one with the lowest index wins; the order
// never changes, so a busy high-priority device can starve the others. The
// ranking by index (index 0 highest) is this design's choice; the policy itself
// is one of the four the interconnect offers per channel.
// Interface: req is one bit per device; grant is one-hot (or zero when nothing
// is requested) and purely combinational, valid in the same cycle as req.
// accept, clk and rst_n exist only so that all arbiters share one port list;
// this policy keeps no state.
module arb_fixed #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         accept,
  output logic [N-1:0] grant
);
  always_comb begin
    grant = '0;
    for (int i = N - 1; i >= 0; i--)
      if (req[i]) grant = N'(1) << i;
  end
endmodule
