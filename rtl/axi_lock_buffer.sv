// axi_lock_buffer: read or write data lock mode buffer.
//
// When the address channel grants a transaction that uses data lock mode, its
// interconnect-wide ID (master index and master ID) is recorded here. The data
// channel compares the ID of every beat a source presents against all entries
// (q_key/q_hit); a hit makes that source ask for the channel lock. The caller
// offers the ID of every last beat the data channel forwards (del_*); if it is
// recorded, one copy is removed and del_hit says that a data lock transaction
// has just completed. (A beat captured before its address was forwarded
// crosses the bus unlocked, so the entry must go whether or not the burst
// actually held the lock.) A full
// buffer is reported so that further lock requests are held back or, in
// hybrid mode, sent as normal transactions. Recording IDs, matching them on the
// data channel, capacity limits and the full condition are the document's; a
// fully associative array with first-free insertion and first-match removal is
// this design's implementation. The same key may be held twice (two lock
// transactions with the same ID); a delete removes one copy.
// Interface: ins_*/del_* take effect at the clock edge; q_hit, del_hit and
// full are combinational from the stored entries and the keys offered.
module axi_lock_buffer #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned KW    = 6,
  parameter int unsigned N_Q   = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ins_valid,
  input  logic [KW-1:0]           ins_key,
  input  logic                    del_valid,
  input  logic [KW-1:0]           del_key,
  input  logic [N_Q-1:0][KW-1:0]  q_key,
  output logic [N_Q-1:0]          q_hit,
  output logic                    del_hit,
  output logic                    full
);
  logic [DEPTH-1:0]         vld;
  logic [DEPTH-1:0][KW-1:0] key;

  always_comb begin
    full  = &vld;
    for (int q = 0; q < N_Q; q++) begin
      q_hit[q] = 1'b0;
      for (int e = 0; e < DEPTH; e++)
        if (vld[e] && key[e] == q_key[q]) q_hit[q] = 1'b1;
    end
  end

  // kept apart from the queries: del_key comes from the bus, the queries feed
  // its arbitration
  always_comb begin
    del_hit = 1'b0;
    for (int e = 0; e < DEPTH; e++)
      if (del_valid && vld[e] && key[e] == del_key) del_hit = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      key <= '0;
    end else begin
      logic done_del, done_ins;
      done_del = 1'b0;
      done_ins = 1'b0;
      for (int e = 0; e < DEPTH; e++) begin
        if (del_valid && !done_del && vld[e] && key[e] == del_key) begin
          vld[e]   <= 1'b0;
          done_del = 1'b1;
        end else if (ins_valid && !done_ins && !vld[e]) begin
          vld[e]   <= 1'b1;
          key[e]   <= ins_key;
          done_ins = 1'b1;
        end
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) ins_valid |-> !full || del_valid);
endmodule
