// arb_lottery: lottery arbiter (ticket manager).
//
// Every device holds TICKETS[i] tickets. Each cycle the manager adds up the
// tickets of the requesting devices, draws a winning ticket below that sum and
// grants the device whose ticket range holds it; the ranges are laid out in
// index order, device by device, over the requesting devices only. With
// tickets 5,4,3,2,1 and requests from devices 0, 1 and 3, the sum is 11 and the
// ranges are 0-4, 5-8 and 9-10, so a draw of 9 grants device 3.
// The draw is this design's choice: a 16-bit maximal-length LFSR
// (x^16+x^14+x^13+x^11+1, seed 16'hACE1) stepping once per clock, scaled to the
// sum as (lfsr * sum) >> 16 to avoid a divider. If the requesting devices hold
// no tickets at all, the lowest requesting index wins.
// Interface: grant is one-hot and combinational from req and the LFSR state;
// accept is unused.
module arb_lottery #(
  parameter int unsigned N      = 5,
  parameter int unsigned W_BITS = 8,
  // tickets per device, index 0 in the least significant byte
  parameter logic [N-1:0][W_BITS-1:0] TICKETS = {8'd16, 8'd16, 8'd32, 8'd8, 8'd4}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         accept,
  output logic [N-1:0] grant
);
  localparam int unsigned SW = W_BITS + $clog2(N + 1);

  logic [15:0]    lfsr;
  logic [SW-1:0]  sum;
  logic [SW-1:0]  draw;
  logic [SW+15:0] prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= 16'hACE1;
    else        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  always_comb begin
    logic [SW-1:0] acc;
    logic          found;
    sum = '0;
    for (int i = 0; i < N; i++)
      if (req[i]) sum = sum + SW'(TICKETS[i]);
    prod  = (SW+16)'(lfsr) * (SW+16)'(sum);
    draw  = prod[SW+15:16];
    grant = '0;
    acc   = '0;
    found = 1'b0;
    for (int i = 0; i < N; i++) begin
      if (req[i]) begin
        if (!found && draw < acc + SW'(TICKETS[i])) begin
          grant = N'(1) << i;
          found = 1'b1;
        end
        acc = acc + SW'(TICKETS[i]);
      end
    end
    if (!found) begin
      for (int i = N - 1; i >= 0; i--)
        if (req[i]) grant = N'(1) << i;
    end
  end
endmodule
