// axi_arbiter: policy selector used by every shared channel.
//
// Instantiates one of the four arbiters (fixed priority, TDMA, weighted
// round-robin, lottery) according to POLICY; WEIGHT is handed to it as slot
// counts, grant thresholds or tickets respectively. The policy is fixed at
// elaboration, matching a bus whose arbitration is configured in advance.
// Interface: req one bit per source, grant one-hot and combinational, accept
// high in the cycle the grant was used.
module axi_arbiter
  import axi_pkg::*;
#(
  parameter int unsigned N      = 5,
  parameter int unsigned W_BITS = 8,
  parameter arb_policy_e POLICY = ARB_RR,
  parameter logic [N-1:0][W_BITS-1:0] WEIGHT = {8'd16, 8'd16, 8'd32, 8'd8, 8'd4}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         accept,
  output logic [N-1:0] grant
);
  if (POLICY == ARB_FIXED) begin : g_fixed
    arb_fixed #(.N(N)) u_arb (.clk, .rst_n, .req, .accept, .grant);
  end else if (POLICY == ARB_TDMA) begin : g_tdma
    arb_tdma #(.N(N), .W_BITS(W_BITS), .SLOTS(WEIGHT)) u_arb (.clk, .rst_n, .req, .accept, .grant);
  end else if (POLICY == ARB_RR) begin : g_rr
    arb_rr #(.N(N), .W_BITS(W_BITS), .THRESH(WEIGHT)) u_arb (.clk, .rst_n, .req, .accept, .grant);
  end else begin : g_lottery
    arb_lottery #(.N(N), .W_BITS(W_BITS), .TICKETS(WEIGHT)) u_arb (.clk, .rst_n, .req, .accept, .grant);
  end
endmodule
