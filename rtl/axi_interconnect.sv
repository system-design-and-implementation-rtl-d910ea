// axi_interconnect: shared-bus AXI interconnect with interleaved, data lock
// and hybrid transfer modes.
//
// Five masters and eleven slaves share one bus per AXI channel. Read side: the
// read address channel (masters to slaves) and the read data channel (slaves
// to masters). Write side: write address, write data (masters to slaves) and
// write response (slaves to masters). Each channel is an axi_channel: one
// register slot per source, one arbiter, one bus. Around the channels sit
//  * the slave read and write buffer monitors, which hold back requests to a
//    slave that already has SLV_DEPTH transactions outstanding,
//  * the write data table, which routes each write data beat by its WID to the
//    slave its address went to,
//  * the read and write data lock buffers, which remember the IDs of data lock
//    transactions so the data channel can stream their bursts, and
//  * one hybrid mode counter per direction, used when a lock buffer is full.
// The interconnect prefixes every request ID with the master's index, so the
// slaves see MIDX_W + MID_W ID bits and the read data and write responses find
// their way back by those top bits.
//
// A transaction uses data lock mode when its AxLOCK is LOCKED (2'b10) or when it
// is addressed to a slave marked in LOCK_SLAVES; both ways can be used at once.
// With the lock buffer full, a data lock request is passed as a normal
// transaction while the hybrid counter is below HYB_THRESH and held back once it
// has reached it.
//
// What follows the document: the shared-bus topology, 5 masters and 11 slaves,
// 32-bit address and data, wrapper buffer size 8, the four transfer modes, the
// two ways of marking a data lock transaction, the lock buffer and hybrid
// counter behaviour (4 entries and threshold 1 as in its final evaluations), the
// four arbitration policies with master weights 4:8:32:16:16, round-robin on the
// write response channel, and the component list of the read and write
// sides. This design's own choices: the address map (decode_slave in axi_pkg),
// the slave weights, round-robin on address channels and TDMA on data
// channels by default, the AXI3 field subset, and active-low asynchronous reset.
//
// Interface: per master m_<ch>_valid/ready with a payload struct array
// (axi_pkg::ax_m_t, w_m_t, r_m_t, b_m_t); per slave s_<ch>_* with the
// extended-ID structs. Every channel adds one cycle of latency.
// Slaves must return the beats of a data lock read burst without interleaving
// other read data into it, and masters must not reuse a write ID before that
// write's data has been sent.
module axi_interconnect
  import axi_pkg::*;
#(
  parameter arb_policy_e POL_ADDR   = ARB_RR,
  parameter arb_policy_e POL_DATA   = ARB_TDMA,
  parameter arb_policy_e POL_RESP   = ARB_RR,
  parameter logic [N_MASTER-1:0][7:0] M_WEIGHT = {8'd16, 8'd16, 8'd32, 8'd8, 8'd4},
  parameter logic [N_SLAVE-1:0][7:0]  S_WEIGHT = {8'd4, 8'd4, 8'd4, 8'd16, 8'd16, 8'd16,
                                                  8'd4, 8'd4, 8'd4, 8'd4, 8'd4},
  parameter bit          INTERLEAVE  = 1'b1,
  parameter int unsigned LOCK_DEPTH  = 4,
  parameter int unsigned HYB_THRESH  = 1,
  parameter int unsigned SLV_DEPTH   = BUF_SIZE,
  parameter logic [N_SLAVE-1:0] LOCK_SLAVES = 11'b000_1100_0000
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // master side
  input  logic  [N_MASTER-1:0]       m_ar_valid,
  input  ax_m_t [N_MASTER-1:0]       m_ar,
  output logic  [N_MASTER-1:0]       m_ar_ready,
  input  logic  [N_MASTER-1:0]       m_aw_valid,
  input  ax_m_t [N_MASTER-1:0]       m_aw,
  output logic  [N_MASTER-1:0]       m_aw_ready,
  input  logic  [N_MASTER-1:0]       m_w_valid,
  input  w_m_t  [N_MASTER-1:0]       m_w,
  output logic  [N_MASTER-1:0]       m_w_ready,
  output logic  [N_MASTER-1:0]       m_r_valid,
  output r_m_t  [N_MASTER-1:0]       m_r,
  input  logic  [N_MASTER-1:0]       m_r_ready,
  output logic  [N_MASTER-1:0]       m_b_valid,
  output b_m_t  [N_MASTER-1:0]       m_b,
  input  logic  [N_MASTER-1:0]       m_b_ready,
  // slave side
  output logic  [N_SLAVE-1:0]        s_ar_valid,
  output ax_s_t [N_SLAVE-1:0]        s_ar,
  input  logic  [N_SLAVE-1:0]        s_ar_ready,
  output logic  [N_SLAVE-1:0]        s_aw_valid,
  output ax_s_t [N_SLAVE-1:0]        s_aw,
  input  logic  [N_SLAVE-1:0]        s_aw_ready,
  output logic  [N_SLAVE-1:0]        s_w_valid,
  output w_s_t  [N_SLAVE-1:0]        s_w,
  input  logic  [N_SLAVE-1:0]        s_w_ready,
  input  logic  [N_SLAVE-1:0]        s_r_valid,
  input  r_s_t  [N_SLAVE-1:0]        s_r,
  output logic  [N_SLAVE-1:0]        s_r_ready,
  input  logic  [N_SLAVE-1:0]        s_b_valid,
  input  b_s_t  [N_SLAVE-1:0]        s_b,
  output logic  [N_SLAVE-1:0]        s_b_ready,
  // mode activity, one pulse per event (for observation)
  output logic                       ev_r_lock,     // read data lock granted
  output logic                       ev_w_lock,     // write data lock granted
  output logic                       ev_r_hybrid,   // read lock request passed as normal
  output logic                       ev_w_hybrid,   // write lock request passed as normal
  output logic                       ev_ar_block,   // read lock request held back
  output logic                       ev_aw_block    // write lock request held back
);
  localparam int unsigned AXW = $bits(ax_s_t);
  localparam int unsigned WW  = $bits(w_s_t);
  localparam int unsigned RW  = $bits(r_s_t);
  localparam int unsigned BW  = $bits(b_s_t);
  localparam int unsigned MW  = (N_MASTER > 1) ? $clog2(N_MASTER) : 1;
  localparam int unsigned SXW = (N_SLAVE > 1) ? $clog2(N_SLAVE) : 1;

  // ------------------------------------------------------------------ shared state
  logic                 rlb_full, wlb_full;
  logic                 hyb_r_block, hyb_w_block;
  logic [N_SLAVE-1:0]   rmon_full, wmon_full;
  logic [N_MASTER-1:0][BUF_SIZE-1:0]           wt_vld;
  logic [N_MASTER-1:0][BUF_SIZE-1:0][SXW-1:0]  wt_dst;

  function automatic logic is_lock(input ax_s_t a);
    return (a.lock == AXLOCK_LOCKED) || LOCK_SLAVES[decode_slave(a.addr)];
  endfunction

  // ------------------------------------------------------------------ read address
  logic [N_MASTER-1:0][AXW-1:0] ar_in, ar_slot;
  logic [N_MASTER-1:0]          ar_slot_v, ar_ok, ar_pri;
  logic [N_MASTER-1:0][SXW-1:0] ar_dst;
  logic          ar_fire, ar_fire_last, ar_fire_locked, ar_lock_start;
  logic [MW-1:0] ar_fire_src;
  logic [SXW-1:0] ar_fire_dst;
  logic [AXW-1:0] ar_fire_pl, ar_bus;
  ax_s_t         ar_f;

  always_comb begin
    ev_ar_block = 1'b0;
    for (int m = 0; m < N_MASTER; m++) begin
      ax_s_t a;
      ar_in[m] = AXW'({MW'(m), m_ar[m].id, m_ar[m].addr, m_ar[m].len,
                       m_ar[m].size, m_ar[m].burst, m_ar[m].lock});
      a = ax_s_t'(ar_slot[m]);
      ar_dst[m] = decode_slave(a.addr);
      ar_pri[m] = is_lock(a) && !rlb_full;
      ar_ok[m]  = !rmon_full[ar_dst[m]] && !(is_lock(a) && rlb_full && hyb_r_block);
      if (ar_slot_v[m] && is_lock(a) && rlb_full && hyb_r_block) ev_ar_block = 1'b1;
    end
  end

  axi_channel #(.N_SRC(N_MASTER), .N_DST(N_SLAVE), .PW(AXW), .POLICY(POL_ADDR),
                .WEIGHT(M_WEIGHT), .INTERLEAVE(INTERLEAVE), .LOCK_EN(1'b0)) u_ar (
    .clk, .rst_n,
    .src_valid(m_ar_valid), .src_payload(ar_in), .src_last('1), .src_lock_match('0),
    .src_ready(m_ar_ready),
    .slot_valid(ar_slot_v), .slot_payload(ar_slot), .slot_dst(ar_dst), .slot_ok(ar_ok),
    .slot_pri(ar_pri),
    .dst_valid(s_ar_valid), .dst_payload(ar_bus), .dst_ready(s_ar_ready),
    .fire(ar_fire), .fire_src(ar_fire_src), .fire_dst(ar_fire_dst), .fire_payload(ar_fire_pl),
    .fire_last(ar_fire_last), .fire_locked(ar_fire_locked), .lock_start(ar_lock_start)
  );
  assign ar_f = ax_s_t'(ar_fire_pl);
  always_comb for (int s = 0; s < N_SLAVE; s++) s_ar[s] = ax_s_t'(ar_bus);

  // ------------------------------------------------------------------ read data
  logic [N_SLAVE-1:0][RW-1:0]   r_in, r_slot;
  logic [N_SLAVE-1:0]           r_slot_v, r_last, r_match;
  logic [N_SLAVE-1:0][MW-1:0]   r_dst;
  logic [N_SLAVE-1:0][SID_W-1:0] rlb_q;
  logic [N_SLAVE-1:0]           rlb_hit;
  logic          r_fire, r_fire_last, r_fire_locked, r_lock_start;
  logic [SXW-1:0] r_fire_src;
  logic [MW-1:0] r_fire_dst;
  logic [RW-1:0] r_fire_pl, r_bus;
  r_s_t          r_f;

  always_comb begin
    r_s_t rs;
    for (int s = 0; s < N_SLAVE; s++) begin
      r_in[s]   = RW'(s_r[s]);
      r_last[s] = s_r[s].last;
      rlb_q[s]  = s_r[s].id;
      r_match[s] = rlb_hit[s];
      rs        = r_s_t'(r_slot[s]);
      r_dst[s]  = rs.id[SID_W-1 -: MW];
    end
  end

  axi_channel #(.N_SRC(N_SLAVE), .N_DST(N_MASTER), .PW(RW), .POLICY(POL_DATA),
                .WEIGHT(S_WEIGHT), .INTERLEAVE(INTERLEAVE), .LOCK_EN(1'b1)) u_r (
    .clk, .rst_n,
    .src_valid(s_r_valid), .src_payload(r_in), .src_last(r_last), .src_lock_match(r_match),
    .src_ready(s_r_ready),
    .slot_valid(r_slot_v), .slot_payload(r_slot), .slot_dst(r_dst), .slot_ok('1), .slot_pri('0),
    .dst_valid(m_r_valid), .dst_payload(r_bus), .dst_ready(m_r_ready),
    .fire(r_fire), .fire_src(r_fire_src), .fire_dst(r_fire_dst), .fire_payload(r_fire_pl),
    .fire_last(r_fire_last), .fire_locked(r_fire_locked), .lock_start(r_lock_start)
  );
  assign r_f = r_s_t'(r_fire_pl);
  always_comb begin
    r_s_t rb;
    rb = r_s_t'(r_bus);
    for (int m = 0; m < N_MASTER; m++)
      m_r[m] = r_m_t'{id: rb.id[MID_W-1:0], data: rb.data, resp: rb.resp, last: rb.last};
  end

  // read lock buffer, hybrid counter, monitor
  logic r_lock_done, ar_as_normal, ar_ins, rlb_del_hit;
  assign ar_ins       = ar_fire && is_lock(ar_f) && !rlb_full;
  assign ar_as_normal = ar_fire && is_lock(ar_f) && rlb_full;
  assign r_lock_done  = rlb_del_hit;

  axi_lock_buffer #(.DEPTH(LOCK_DEPTH), .KW(SID_W), .N_Q(N_SLAVE)) u_rlb (
    .clk, .rst_n, .ins_valid(ar_ins), .ins_key(ar_f.id),
    .del_valid(r_fire && r_fire_last), .del_key(r_f.id), .del_hit(rlb_del_hit),
    .q_key(rlb_q), .q_hit(rlb_hit), .full(rlb_full)
  );
  axi_hybrid_ctr #(.THRESH(HYB_THRESH)) u_rhyb (
    .clk, .rst_n, .as_normal(ar_as_normal), .lock_done(r_lock_done), .block(hyb_r_block)
  );
  axi_slave_monitor #(.N(N_SLAVE), .DEPTH(SLV_DEPTH)) u_rmon (
    .clk, .rst_n, .inc_valid(ar_fire), .inc_idx(ar_fire_dst),
    .dec_valid(r_fire && r_fire_last), .dec_idx(r_fire_src), .full(rmon_full)
  );
  assign ev_r_lock   = r_lock_start;
  assign ev_r_hybrid = ar_as_normal;

  // ------------------------------------------------------------------ write address
  logic [N_MASTER-1:0][AXW-1:0] aw_in, aw_slot;
  logic [N_MASTER-1:0]          aw_slot_v, aw_ok, aw_pri;
  logic [N_MASTER-1:0][SXW-1:0] aw_dst;
  logic          aw_fire, aw_fire_last, aw_fire_locked, aw_lock_start;
  logic [MW-1:0] aw_fire_src;
  logic [SXW-1:0] aw_fire_dst;
  logic [AXW-1:0] aw_fire_pl, aw_bus;
  ax_s_t         aw_f;

  always_comb begin
    ev_aw_block = 1'b0;
    for (int m = 0; m < N_MASTER; m++) begin
      ax_s_t a;
      aw_in[m] = AXW'({MW'(m), m_aw[m].id, m_aw[m].addr, m_aw[m].len,
                       m_aw[m].size, m_aw[m].burst, m_aw[m].lock});
      a = ax_s_t'(aw_slot[m]);
      aw_dst[m] = decode_slave(a.addr);
      aw_pri[m] = is_lock(a) && !wlb_full;
      aw_ok[m]  = !wmon_full[aw_dst[m]] && !wt_vld[m][a.id[MID_W-1:0]]
                  && !(is_lock(a) && wlb_full && hyb_w_block);
      if (aw_slot_v[m] && is_lock(a) && wlb_full && hyb_w_block) ev_aw_block = 1'b1;
    end
  end

  axi_channel #(.N_SRC(N_MASTER), .N_DST(N_SLAVE), .PW(AXW), .POLICY(POL_ADDR),
                .WEIGHT(M_WEIGHT), .INTERLEAVE(INTERLEAVE), .LOCK_EN(1'b0)) u_aw (
    .clk, .rst_n,
    .src_valid(m_aw_valid), .src_payload(aw_in), .src_last('1), .src_lock_match('0),
    .src_ready(m_aw_ready),
    .slot_valid(aw_slot_v), .slot_payload(aw_slot), .slot_dst(aw_dst), .slot_ok(aw_ok),
    .slot_pri(aw_pri),
    .dst_valid(s_aw_valid), .dst_payload(aw_bus), .dst_ready(s_aw_ready),
    .fire(aw_fire), .fire_src(aw_fire_src), .fire_dst(aw_fire_dst), .fire_payload(aw_fire_pl),
    .fire_last(aw_fire_last), .fire_locked(aw_fire_locked), .lock_start(aw_lock_start)
  );
  assign aw_f = ax_s_t'(aw_fire_pl);
  always_comb for (int s = 0; s < N_SLAVE; s++) s_aw[s] = ax_s_t'(aw_bus);

  // ------------------------------------------------------------------ write data
  logic [N_MASTER-1:0][WW-1:0]  w_in, w_slot;
  logic [N_MASTER-1:0]          w_slot_v, w_last, w_match, w_ok;
  logic [N_MASTER-1:0][SXW-1:0] w_dst;
  logic [N_MASTER-1:0][SID_W-1:0] wlb_q;
  logic [N_MASTER-1:0]          wlb_hit;
  logic          w_fire, w_fire_last, w_fire_locked, w_lock_start;
  logic [MW-1:0] w_fire_src;
  logic [SXW-1:0] w_fire_dst;
  logic [WW-1:0] w_fire_pl, w_bus;
  w_s_t          w_f;

  always_comb begin
    for (int m = 0; m < N_MASTER; m++) begin
      logic [MID_W-1:0] sid;
      w_s_t             ws;
      w_in[m]   = WW'({MW'(m), m_w[m].id, m_w[m].data, m_w[m].strb, m_w[m].last});
      w_last[m] = m_w[m].last;
      wlb_q[m]  = {MW'(m), m_w[m].id};
      w_match[m] = wlb_hit[m];
      ws        = w_s_t'(w_slot[m]);
      sid       = ws.id[MID_W-1:0];
      w_dst[m]  = wt_dst[m][sid];
      w_ok[m]   = wt_vld[m][sid];
    end
  end

  axi_channel #(.N_SRC(N_MASTER), .N_DST(N_SLAVE), .PW(WW), .POLICY(POL_DATA),
                .WEIGHT(M_WEIGHT), .INTERLEAVE(INTERLEAVE), .LOCK_EN(1'b1)) u_w (
    .clk, .rst_n,
    .src_valid(m_w_valid), .src_payload(w_in), .src_last(w_last), .src_lock_match(w_match),
    .src_ready(m_w_ready),
    .slot_valid(w_slot_v), .slot_payload(w_slot), .slot_dst(w_dst), .slot_ok(w_ok), .slot_pri('0),
    .dst_valid(s_w_valid), .dst_payload(w_bus), .dst_ready(s_w_ready),
    .fire(w_fire), .fire_src(w_fire_src), .fire_dst(w_fire_dst), .fire_payload(w_fire_pl),
    .fire_last(w_fire_last), .fire_locked(w_fire_locked), .lock_start(w_lock_start)
  );
  assign w_f = w_s_t'(w_fire_pl);
  always_comb for (int s = 0; s < N_SLAVE; s++) s_w[s] = w_s_t'(w_bus);

  logic w_lock_done, aw_as_normal, aw_ins, wlb_del_hit;
  assign aw_ins       = aw_fire && is_lock(aw_f) && !wlb_full;
  assign aw_as_normal = aw_fire && is_lock(aw_f) && wlb_full;
  assign w_lock_done  = wlb_del_hit;

  axi_wdata_table #(.N_M(N_MASTER), .N_ID(BUF_SIZE), .SW(SXW)) u_wtab (
    .clk, .rst_n,
    .set_valid(aw_fire), .set_m(aw_fire_src), .set_id(aw_f.id[MID_W-1:0]), .set_dst(aw_fire_dst),
    .clr_valid(w_fire && w_fire_last), .clr_m(w_fire_src), .clr_id(w_f.id[MID_W-1:0]),
    .vld(wt_vld), .dst(wt_dst)
  );
  axi_lock_buffer #(.DEPTH(LOCK_DEPTH), .KW(SID_W), .N_Q(N_MASTER)) u_wlb (
    .clk, .rst_n, .ins_valid(aw_ins), .ins_key(aw_f.id),
    .del_valid(w_fire && w_fire_last), .del_key(w_f.id), .del_hit(wlb_del_hit),
    .q_key(wlb_q), .q_hit(wlb_hit), .full(wlb_full)
  );
  axi_hybrid_ctr #(.THRESH(HYB_THRESH)) u_whyb (
    .clk, .rst_n, .as_normal(aw_as_normal), .lock_done(w_lock_done), .block(hyb_w_block)
  );
  assign ev_w_lock   = w_lock_start;
  assign ev_w_hybrid = aw_as_normal;

  // ------------------------------------------------------------------ write response
  logic [N_SLAVE-1:0][BW-1:0]  b_in, b_slot;
  logic [N_SLAVE-1:0]          b_slot_v;
  logic [N_SLAVE-1:0][MW-1:0]  b_dst;
  logic          b_fire, b_fire_last, b_fire_locked, b_lock_start;
  logic [SXW-1:0] b_fire_src;
  logic [MW-1:0] b_fire_dst;
  logic [BW-1:0] b_fire_pl, b_bus;

  always_comb begin
    b_s_t bs;
    for (int s = 0; s < N_SLAVE; s++) begin
      b_in[s]  = BW'(s_b[s]);
      bs       = b_s_t'(b_slot[s]);
      b_dst[s] = bs.id[SID_W-1 -: MW];
    end
  end

  axi_channel #(.N_SRC(N_SLAVE), .N_DST(N_MASTER), .PW(BW), .POLICY(POL_RESP),
                .WEIGHT(S_WEIGHT), .INTERLEAVE(INTERLEAVE), .LOCK_EN(1'b0)) u_b (
    .clk, .rst_n,
    .src_valid(s_b_valid), .src_payload(b_in), .src_last('1), .src_lock_match('0),
    .src_ready(s_b_ready),
    .slot_valid(b_slot_v), .slot_payload(b_slot), .slot_dst(b_dst), .slot_ok('1), .slot_pri('0),
    .dst_valid(m_b_valid), .dst_payload(b_bus), .dst_ready(m_b_ready),
    .fire(b_fire), .fire_src(b_fire_src), .fire_dst(b_fire_dst), .fire_payload(b_fire_pl),
    .fire_last(b_fire_last), .fire_locked(b_fire_locked), .lock_start(b_lock_start)
  );
  always_comb begin
    b_s_t bb;
    bb = b_s_t'(b_bus);
    for (int m = 0; m < N_MASTER; m++)
      m_b[m] = b_m_t'{id: bb.id[MID_W-1:0], resp: bb.resp};
  end

  axi_slave_monitor #(.N(N_SLAVE), .DEPTH(SLV_DEPTH)) u_wmon (
    .clk, .rst_n, .inc_valid(aw_fire), .inc_idx(aw_fire_dst),
    .dec_valid(b_fire), .dec_idx(b_fire_src), .full(wmon_full)
  );
endmodule
