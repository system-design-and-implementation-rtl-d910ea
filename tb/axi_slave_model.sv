// axi_slave_model: behavioural AXI3 slave used by the interconnect testbenches.
//
// Not synthesizable. It stands in for the platform's peripherals and memory
// controllers. Like the transaction-level slaves it imitates, it keeps a read
// processing table and a write processing table of DEPTH entries each.
//  * Read entry: empty -> (MEM type only) delay count-down -> read data -> empty.
//    A regular slave starts returning data the cycle after the request; a MEM
//    slave first waits a random 0..MAX_DELAY cycles. Ready entries are served
//    oldest first, a whole burst at a time, never overtaking an older entry
//    with the same ID.
//  * Write entry: empty -> write data -> write response -> empty. Write beats
//    are matched to entries by WID.
// Data lives in a sparse memory; a word never written reads as its address
// XOR 32'hA5A5_5A5A. The model checks WLAST placement and counts its checks.
module axi_slave_model
  import axi_pkg::*;
#(
  parameter int unsigned IDX       = 0,
  parameter bit          MEM       = 1'b0,
  parameter int unsigned MAX_DELAY = 16,
  parameter int unsigned DEPTH     = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ar_valid,
  input  ax_s_t ar,
  output logic  ar_ready,
  input  logic  aw_valid,
  input  ax_s_t aw,
  output logic  aw_ready,
  input  logic  w_valid,
  input  w_s_t  w,
  output logic  w_ready,
  output logic  r_valid,
  output r_s_t  r,
  input  logic  r_ready,
  output logic  b_valid,
  output b_s_t  b,
  input  logic  b_ready,
  output int    checks,
  output int    failures
);
  logic [31:0] mem [logic [31:0]];

  // read processing table
  logic [DEPTH-1:0]   rd_v;
  logic [SID_W-1:0]   rd_id    [DEPTH];
  logic [31:0]        rd_addr  [DEPTH];
  logic [3:0]         rd_len   [DEPTH];
  int                 rd_delay [DEPTH];
  int                 rd_stamp [DEPTH];
  int                 stamp;
  logic               cur_v;
  int                 cur;
  logic [3:0]         cur_beat;

  // write processing table
  logic [DEPTH-1:0]   wr_v;
  logic [SID_W-1:0]   wr_id    [DEPTH];
  logic [31:0]        wr_addr  [DEPTH];
  logic [3:0]         wr_len   [DEPTH];
  logic [3:0]         wr_beat  [DEPTH];
  int                 wr_stamp [DEPTH];
  b_s_t               bq [$];

  function automatic logic [31:0] rd_word(input logic [31:0] a);
    if (mem.exists(a)) return mem[a];
    return a ^ 32'hA5A5_5A5A;
  endfunction

  function automatic int free_slot(input logic [DEPTH-1:0] v);
    for (int e = 0; e < DEPTH; e++) if (!v[e]) return e;
    return -1;
  endfunction

  assign ar_ready = !(&rd_v);
  assign aw_ready = !(&wr_v);
  assign w_ready  = 1'b1;
  assign r_valid  = cur_v;
  assign b_valid  = bq.size() != 0;
  always_comb begin
    r = '0;
    if (cur_v) begin
      r.id   = rd_id[cur];
      r.data = rd_word(rd_addr[cur] + 32'(cur_beat) * 4);
      r.resp = 2'b00;
      r.last = (cur_beat == rd_len[cur]);
    end
    b = (bq.size() != 0) ? bq[0] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_v <= '0; wr_v <= '0; cur_v <= 1'b0; cur <= 0; cur_beat <= '0;
      stamp <= 0; checks <= 0; failures <= 0;
      bq.delete();
    end else begin
      int e;
      // read requests
      if (ar_valid && ar_ready) begin
        e = free_slot(rd_v);
        rd_v[e]     <= 1'b1;
        rd_id[e]    <= ar.id;
        rd_addr[e]  <= ar.addr;
        rd_len[e]   <= ar.len;
        rd_delay[e] <= MEM ? int'($urandom_range(MAX_DELAY, 0)) : 0;
        rd_stamp[e] <= stamp;
        stamp       <= stamp + 1;
      end
      for (int k = 0; k < DEPTH; k++)
        if (rd_v[k] && rd_delay[k] > 0 && !(ar_valid && ar_ready && k == free_slot(rd_v)))
          rd_delay[k] <= rd_delay[k] - 1;
      // read data
      if (cur_v) begin
        if (r_ready) begin
          if (cur_beat == rd_len[cur]) begin
            cur_v    <= 1'b0;
            rd_v[cur] <= 1'b0;
          end else begin
            cur_beat <= cur_beat + 1'b1;
          end
        end
      end else begin
        int best;
        best = -1;
        for (int k = 0; k < DEPTH; k++) begin
          if (rd_v[k] && rd_delay[k] == 0) begin
            logic older_same;
            older_same = 1'b0;
            for (int j = 0; j < DEPTH; j++)
              if (rd_v[j] && rd_id[j] == rd_id[k] && rd_stamp[j] < rd_stamp[k]) older_same = 1'b1;
            if (!older_same && (best < 0 || rd_stamp[k] < rd_stamp[best])) best = k;
          end
        end
        if (best >= 0) begin
          cur_v    <= 1'b1;
          cur      <= best;
          cur_beat <= '0;
        end
      end
      // write requests
      if (aw_valid && aw_ready) begin
        e = free_slot(wr_v);
        wr_v[e]     <= 1'b1;
        wr_id[e]    <= aw.id;
        wr_addr[e]  <= aw.addr;
        wr_len[e]   <= aw.len;
        wr_beat[e]  <= '0;
        wr_stamp[e] <= stamp;
        stamp       <= stamp + 1;
      end
      // write data
      if (w_valid && w_ready) begin
        int best;
        best = -1;
        for (int k = 0; k < DEPTH; k++)
          if (wr_v[k] && wr_id[k] == w.id && (best < 0 || wr_stamp[k] < wr_stamp[best])) best = k;
        checks <= checks + 1;
        if (best < 0) begin
          failures <= failures + 1;
          $display("slave %0d: write data with unknown WID %0h", IDX, w.id);
        end else begin
          mem[wr_addr[best] + 32'(wr_beat[best]) * 4] = w.data;
          if (w.last != (wr_beat[best] == wr_len[best])) begin
            failures <= failures + 1;
            $display("slave %0d: WLAST misplaced for ID %0h", IDX, w.id);
          end
          if (w.last) begin
            wr_v[best] <= 1'b0;
            bq.push_back(b_s_t'{id: w.id, resp: 2'b00});
          end else begin
            wr_beat[best] <= wr_beat[best] + 1'b1;
          end
        end
      end
      if (b_valid && b_ready) void'(bq.pop_front());
    end
  end
endmodule
