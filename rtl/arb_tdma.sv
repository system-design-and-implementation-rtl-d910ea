// arb_tdma: time-division arbiter with per-device slot counts.
//
// Time is cut into slots; device i owns SLOTS[i] consecutive cycles during which
// it holds the highest priority. Its remaining-slot counter falls by one every
// clock from the moment it becomes the highest-priority device. When the count
// runs out, that device drops to the lowest priority and the next device in
// index order becomes the highest, with its own slot count reloaded. In every
// cycle the grant goes to the first requesting device counted from the current
// owner, so idle slots are passed on instead of wasted.
// The slot-owner rotation follows the policy as described for this bus; that
// the counter runs every cycle whether or not the owner is granted, and the
// reset state (device 0 owns the first slots), are this design's choices.
// Interface: grant is one-hot and combinational from req and the registered
// owner; accept is unused (time, not grants, moves the schedule).
module arb_tdma #(
  parameter int unsigned N      = 5,
  parameter int unsigned W_BITS = 8,
  // slot counts per device, index 0 in the least significant byte
  parameter logic [N-1:0][W_BITS-1:0] SLOTS = {8'd16, 8'd16, 8'd32, 8'd8, 8'd4}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         accept,
  output logic [N-1:0] grant
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0]     owner;
  logic [W_BITS-1:0] left;

  function automatic logic [IW-1:0] nxt(input logic [IW-1:0] i);
    return (int'(i) == N - 1) ? '0 : i + 1'b1;
  endfunction

  function automatic logic [W_BITS-1:0] slots_of(input logic [IW-1:0] i);
    return (SLOTS[i] == '0) ? W_BITS'(1) : SLOTS[i];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner <= '0;
      left  <= slots_of('0);
    end else if (left <= W_BITS'(1)) begin
      owner <= nxt(owner);
      left  <= slots_of(nxt(owner));
    end else begin
      left <= left - 1'b1;
    end
  end

  always_comb begin
    int unsigned k;
    grant = '0;
    for (int j = N - 1; j >= 0; j--) begin
      k = (int'(owner) + j) % N;
      if (req[k]) grant = N'(1) << k;
    end
  end
endmodule
