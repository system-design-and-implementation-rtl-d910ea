// axi_hybrid_ctr: hybrid mode counter of one direction (read or write).
//
// With the data lock buffer full, a new data lock transaction is either sent
// through as a normal transaction or held back. The counter decides: while it
// is below THRESH, the transaction goes as normal and the counter counts it
// (as_normal); once it has reached THRESH, data lock transactions are held
// (block) until a data lock transaction completes (lock_done), which clears the
// counter. This keeps a high-bandwidth device that uses data lock mode from
// turning all of its traffic into normal transfers. Decision flow, threshold and
// reset event are the document's; the counter width and that a lock_done in
// the same cycle as as_normal leaves the count at one are this design's.
module axi_hybrid_ctr #(
  parameter int unsigned THRESH = 1,
  parameter int unsigned CW     = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic as_normal,
  input  logic lock_done,
  output logic block
);
  logic [CW-1:0] cnt;

  assign block = (cnt >= CW'(THRESH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt <= '0;
    else if (lock_done)  cnt <= CW'(as_normal);
    else if (as_normal && !block) cnt <= cnt + 1'b1;
  end
endmodule
