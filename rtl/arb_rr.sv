// arb_rr: weighted round-robin arbiter with per-device grant thresholds.
//
// The devices stand in a priority list; a grant goes to the first requesting
// device in the list. Each device has a grant counter and a threshold: every
// accepted grant adds one to the counter, and when the counter reaches the
// device's threshold the counter clears and the device moves to the end of the
// list, wherever it stood before, while the devices behind it move up by one.
// A device with threshold 2 thus keeps its place for two grants in a row. This
// is the policy as the bus defines it; the reset order (index 0 first) and a
// threshold of 0 acting as 1 are this design's choices.
// Interface: grant is one-hot and combinational from req and the registered
// list; accept must be high in a cycle where the grant was used (transfer
// took place), and only then does the list or a counter change.
module arb_rr #(
  parameter int unsigned N      = 5,
  parameter int unsigned W_BITS = 8,
  // grant thresholds per device, index 0 in the least significant byte
  parameter logic [N-1:0][W_BITS-1:0] THRESH = {8'd16, 8'd16, 8'd32, 8'd8, 8'd4}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         accept,
  output logic [N-1:0] grant
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0][IW-1:0]     order;   // order[0] is the highest priority
  logic [N-1:0][W_BITS-1:0] cnt;
  logic [IW-1:0]            gpos;    // list position of the granted device
  logic                     gany;

  always_comb begin
    grant = '0;
    gpos  = '0;
    gany  = 1'b0;
    for (int p = 0; p < N; p++) begin
      if (!gany && req[order[p]]) begin
        gany  = 1'b1;
        gpos  = IW'(p);
        grant = N'(1) << order[p];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N; p++) order[p] <= IW'(p);
      cnt <= '0;
    end else if (accept && gany) begin
      logic [IW-1:0]     g;
      logic [W_BITS-1:0] th;
      g  = order[gpos];
      th = (THRESH[g] == '0) ? W_BITS'(1) : THRESH[g];
      if (cnt[g] + 1'b1 >= th) begin
        cnt[g] <= '0;
        for (int p = 0; p < N - 1; p++)
          if (p >= int'(gpos)) order[p] <= order[p+1];
        order[N-1] <= g;
      end else begin
        cnt[g] <= cnt[g] + 1'b1;
      end
    end
  end
endmodule
