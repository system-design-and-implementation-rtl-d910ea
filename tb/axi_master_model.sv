// axi_master_model: behavioural AXI3 master used by the interconnect testbenches.
//
// Not synthesizable. It issues N_TX random transactions, at most 8 at a time,
// each with its own ID, and checks every answer. Writes go to fresh 256-byte
// blocks owned by this master (addr = slave nibble, master index, write
// number), so no two writes ever overlap; reads either re-read a block whose
// write response has already come back (expected data known) or read a block
// nobody writes (expected data is the slave's default pattern). About MEM_PCT %
// of transactions go to the two memory controllers (slaves 6 and 7), and
// LOCK_PCT % carry AxLOCK = LOCKED. Write data for a burst is sent right after
// its address is accepted, beats back to back unless W_GAP_PCT asks for gaps.
// RD_PCT % of transactions are reads. Bursts are 1..16 beats at random, or
// LEN+1 beats when LEN >= 0. With PERIOD = 0 a new transaction is started in
// an idle cycle with probability ISSUE_PCT %; with PERIOD > 0 the k-th
// transaction is started no earlier than cycle k*PERIOD after reset (a paced
// source with a fixed bandwidth demand), and as soon as possible if late.
module axi_master_model
  import axi_pkg::*;
#(
  parameter int unsigned IDX       = 0,
  parameter int unsigned N_TX      = 50,
  parameter int unsigned MEM_PCT   = 60,
  parameter int unsigned LOCK_PCT  = 0,
  parameter int unsigned W_GAP_PCT = 0,
  parameter int unsigned ISSUE_PCT = 50,
  parameter int unsigned RD_PCT    = 50,
  parameter int          LEN       = -1,
  parameter int unsigned PERIOD    = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  output logic  ar_valid,
  output ax_m_t ar,
  input  logic  ar_ready,
  output logic  aw_valid,
  output ax_m_t aw,
  input  logic  aw_ready,
  output logic  w_valid,
  output w_m_t  w,
  input  logic  w_ready,
  input  logic  r_valid,
  input  r_m_t  r,
  output logic  r_ready,
  input  logic  b_valid,
  input  b_m_t  b,
  output logic  b_ready,
  output logic  done,
  output int    checks,
  output int    failures,
  output int    completed
);

  // True with a probability of pct percent.
  function automatic bit chance(input int pct);
    return int'($urandom_range(99, 0)) < pct;
  endfunction
  localparam int unsigned NID = BUF_SIZE;

  typedef struct {
    logic [31:0] addr;
    logic [3:0]  len;
    int          wno;     // write number whose data is expected, -1 for default pattern
  } rec_t;

  logic [NID-1:0] busy;
  logic [NID-1:0] is_rd;
  rec_t           tx [NID];
  logic [3:0]     beat [NID];
  rec_t           done_wr [$];
  int             issued, wr_count;
  int             now;     // cycles since reset
  // write data queue
  int             wq_id  [$];
  logic [3:0]     w_beat;
  logic           w_gap;

  function automatic logic [31:0] wdata(input int wno, input int i);
    return 32'(IDX) << 28 | 32'(wno & 16'hFFFF) << 8 | 32'(i);
  endfunction

  function automatic logic [31:0] exp_rd(input rec_t t, input int i);
    if (t.wno >= 0) return wdata(t.wno, i);
    return (t.addr + 32'(i) * 4) ^ 32'hA5A5_5A5A;
  endfunction

  assign r_ready = 1'b1;
  assign b_ready = 1'b1;
  assign done    = (completed == N_TX);

  always_comb begin
    w_valid = (wq_id.size() != 0) && !w_gap;
    w = '0;
    if (wq_id.size() != 0) begin
      w.id   = MID_W'(wq_id[0]);
      w.data = wdata(tx[wq_id[0]].wno, int'(w_beat));
      w.strb = '1;
      w.last = (w_beat == tx[wq_id[0]].len);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0; is_rd <= '0; issued <= 0; wr_count <= 0; completed <= 0; now <= 0;
      checks <= 0; failures <= 0; ar_valid <= 1'b0; aw_valid <= 1'b0;
      ar <= '0; aw <= '0; w_beat <= '0; w_gap <= 1'b0;
      wq_id.delete(); done_wr.delete();
    end else begin
      logic [NID-1:0] busy_n;
      int             n_done, n_chk, n_fail;
      busy_n = busy;
      n_done = 0; n_chk = 0; n_fail = 0;
      now <= now + 1;
      w_gap <= (chance(W_GAP_PCT));
      // address handshakes
      if (ar_valid && ar_ready) ar_valid <= 1'b0;
      if (aw_valid && aw_ready) begin
        aw_valid <= 1'b0;
        wq_id.push_back(int'(aw.id));
      end
      // write data
      if (w_valid && w_ready) begin
        if (w.last) begin
          void'(wq_id.pop_front());
          w_beat <= '0;
        end else begin
          w_beat <= w_beat + 1'b1;
        end
      end
      // read data
      if (r_valid && r_ready) begin
        n_chk++;
        if (!busy[r.id] || !is_rd[r.id]) begin
          n_fail++;
          $display("master %0d: read data for idle ID %0d", IDX, r.id);
        end else begin
          if (r.data !== exp_rd(tx[r.id], int'(beat[r.id])) || r.last != (beat[r.id] == tx[r.id].len)) begin
            n_fail++;
            $display("master %0d: read ID %0d beat %0d got %h last %b, expected %h", IDX, r.id,
                     beat[r.id], r.data, r.last, exp_rd(tx[r.id], int'(beat[r.id])));
          end
          if (r.last) begin
            busy_n[r.id] = 1'b0;
            n_done++;
          end else begin
            beat[r.id] <= beat[r.id] + 1'b1;
          end
        end
      end
      // write responses
      if (b_valid && b_ready) begin
        n_chk++;
        if (!busy[b.id] || is_rd[b.id] || b.resp != 2'b00) begin
          n_fail++;
          $display("master %0d: unexpected write response ID %0d", IDX, b.id);
        end else begin
          busy_n[b.id] = 1'b0;
          done_wr.push_back(tx[b.id]);
          n_done++;
        end
      end
      // issue a new transaction
      if (issued < N_TX && !ar_valid && !aw_valid
          && (PERIOD == 0 ? chance(ISSUE_PCT) : now >= issued * int'(PERIOD))) begin
        int id;
        id = -1;
        for (int k = NID - 1; k >= 0; k--) if (!busy[k] && !busy_n[k]) id = k;
        if (id >= 0) begin
          rec_t   t;
          logic [3:0] slv;
          logic [1:0] lk;
          bit     rd;
          slv = (chance(MEM_PCT)) ? 4'(6 + $urandom_range(1, 0))
                                                  : 4'($urandom_range(N_SLAVE - 1, 0));
          lk  = (chance(LOCK_PCT)) ? AXLOCK_LOCKED : 2'b00;
          rd  = chance(RD_PCT);
          t.len = (LEN < 0) ? 4'($urandom_range(15, 0)) : 4'(LEN);
          if (rd) begin
            if (done_wr.size() != 0 && $urandom_range(1, 0) == 1) begin
              t = done_wr[$urandom_range(done_wr.size() - 1, 0)];
            end else begin
              t.addr = {slv, 1'b1, 19'($urandom()), 8'h00};
              t.wno  = -1;
            end
            ar_valid <= 1'b1;
            ar <= ax_m_t'{id: MID_W'(id), addr: t.addr, len: t.len, size: 3'd2, burst: 2'b01, lock: lk};
          end else begin
            t.addr = {slv, 1'b0, 3'(IDX), 16'(wr_count), 8'h00};
            t.wno  = wr_count;
            wr_count <= wr_count + 1;
            aw_valid <= 1'b1;
            aw <= ax_m_t'{id: MID_W'(id), addr: t.addr, len: t.len, size: 3'd2, burst: 2'b01, lock: lk};
          end
          tx[id]    <= t;
          beat[id]  <= '0;
          is_rd[id] <= rd;
          busy_n[id] = 1'b1;
          issued    <= issued + 1;
        end
      end
      busy      <= busy_n;
      completed <= completed + n_done;
      checks    <= checks + n_chk;
      failures  <= failures + n_fail;
    end
  end
endmodule
