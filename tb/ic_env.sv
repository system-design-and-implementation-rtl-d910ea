// ic_env: self-contained test environment around one axi_interconnect, used by
// the testbenches that run the interconnect in other configurations or under a
// given traffic load.
//
// It instantiates the interconnect with the policy and mode parameters given
// here, five axi_master_model sources and eleven axi_slave_model targets
// (slaves 6 and 7 memory-type with a random 0..16 cycle latency). It runs on its
// own: reset, then a directed check that two masters' four read requests cross
// the address channel in 5 cycles (interleaved) or 8 cycles (normal mode), then
// the random or paced traffic given by the per-master parameters. The masters
// check all read data and write responses, the slaves check write bursts.
//
// Afterwards it checks that every master completed its transactions, and, when
// DEADLINE > 0, that each did so by cycle DEADLINE after the traffic started:
// the real-time condition of a paced workload. LOCK_DEPTH sets the size of the
// interconnect's data lock buffers; the counters n_lock_ev, n_hyb_ev and
// n_block_cyc count lock grants, lock requests passed as normal, and cycles in
// which a lock request was held back. It also counts the data beats
// moved and, as in the main end-to-end test, how often transfers from
// different sources followed each other back to back (interleaving). In normal
// mode that must never happen outside a data lock burst; in interleaved mode it
// must happen.
//
// Interface: clk in; finished rises when the run is over, with the totals on
// checks/failures and the measured numbers on the other outputs. The parent
// testbench owns the watchdog.
module ic_env
  import axi_pkg::*;
#(
  parameter arb_policy_e POL_ADDR   = ARB_RR,
  parameter arb_policy_e POL_DATA   = ARB_TDMA,
  parameter arb_policy_e POL_RESP   = ARB_RR,
  parameter bit          INTERLEAVE = 1'b1,
  parameter int unsigned N_TX      [N_MASTER] = '{100, 100, 100, 100, 100},
  parameter int unsigned LOCK_PCT  [N_MASTER] = '{10, 0, 30, 0, 0},
  parameter int unsigned GAP_PCT   [N_MASTER] = '{0, 20, 0, 0, 10},
  parameter int unsigned RD_PCT    [N_MASTER] = '{50, 50, 50, 50, 50},
  parameter int unsigned MEM_PCT   [N_MASTER] = '{60, 60, 60, 60, 60},
  parameter int unsigned PERIOD    [N_MASTER] = '{0, 0, 0, 0, 0},
  parameter int          LEN                  = -1,
  parameter int unsigned DEADLINE             = 0,
  parameter int unsigned LOCK_DEPTH           = 4,
  parameter string       NAME                 = "env"
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   cycles,       // cycles from traffic start to the last completion
  output int   r_beats,
  output int   w_beats
);
  logic rst_n = 1'b0, run_n = 1'b0;

  logic  [N_MASTER-1:0] m_ar_valid, m_ar_ready, m_aw_valid, m_aw_ready, m_w_valid, m_w_ready;
  logic  [N_MASTER-1:0] m_r_valid, m_r_ready, m_b_valid, m_b_ready;
  ax_m_t [N_MASTER-1:0] m_ar, m_aw;
  w_m_t  [N_MASTER-1:0] m_w;
  r_m_t  [N_MASTER-1:0] m_r;
  b_m_t  [N_MASTER-1:0] m_b;
  logic  [N_SLAVE-1:0]  s_ar_valid, s_ar_ready, s_aw_valid, s_aw_ready, s_w_valid, s_w_ready;
  logic  [N_SLAVE-1:0]  s_r_valid, s_r_ready, s_b_valid, s_b_ready;
  ax_s_t [N_SLAVE-1:0]  s_ar, s_aw;
  w_s_t  [N_SLAVE-1:0]  s_w;
  r_s_t  [N_SLAVE-1:0]  s_r;
  b_s_t  [N_SLAVE-1:0]  s_b;
  logic ev_r_lock, ev_w_lock, ev_r_hybrid, ev_w_hybrid, ev_ar_block, ev_aw_block;

  // directed phase drives the AR inputs of masters 0 and 1
  logic  [N_MASTER-1:0] mdl_ar_valid;
  ax_m_t [N_MASTER-1:0] mdl_ar;
  logic                 dir_on = 1'b1;
  logic  [1:0]          dir_v  = '0;
  ax_m_t [1:0]          dir_ar = '0;

  always_comb begin
    m_ar_valid = mdl_ar_valid;
    m_ar       = mdl_ar;
    if (dir_on) begin
      m_ar_valid[1:0] = dir_v;
      m_ar[0]         = dir_ar[0];
      m_ar[1]         = dir_ar[1];
    end
  end

  axi_interconnect #(.POL_ADDR(POL_ADDR), .POL_DATA(POL_DATA), .POL_RESP(POL_RESP),
                     .INTERLEAVE(INTERLEAVE), .LOCK_DEPTH(LOCK_DEPTH)) dut (.*);

  // data lock and hybrid mode events, read by parent testbenches
  int n_lock_ev = 0, n_hyb_ev = 0, n_block_cyc = 0;
  always @(posedge clk) if (rst_n) begin
    n_lock_ev   <= n_lock_ev + int'(ev_r_lock) + int'(ev_w_lock);
    n_hyb_ev    <= n_hyb_ev + int'(ev_r_hybrid) + int'(ev_w_hybrid);
    n_block_cyc <= n_block_cyc + int'(ev_ar_block) + int'(ev_aw_block);
  end

  int m_checks [N_MASTER], m_fail [N_MASTER], m_done_cnt [N_MASTER];
  int s_checks [N_SLAVE],  s_fail [N_SLAVE];
  logic [N_MASTER-1:0] m_done;

  for (genvar m = 0; m < N_MASTER; m++) begin : g_m
    axi_master_model #(.IDX(m), .N_TX(N_TX[m]), .LOCK_PCT(LOCK_PCT[m]), .W_GAP_PCT(GAP_PCT[m]),
                       .ISSUE_PCT(60), .RD_PCT(RD_PCT[m]), .MEM_PCT(MEM_PCT[m]), .LEN(LEN),
                       .PERIOD(PERIOD[m])) u_m (
      .clk, .rst_n(run_n),
      .ar_valid(mdl_ar_valid[m]), .ar(mdl_ar[m]), .ar_ready(m_ar_ready[m]),
      .aw_valid(m_aw_valid[m]), .aw(m_aw[m]), .aw_ready(m_aw_ready[m]),
      .w_valid(m_w_valid[m]), .w(m_w[m]), .w_ready(m_w_ready[m]),
      .r_valid(m_r_valid[m]), .r(m_r[m]), .r_ready(m_r_ready[m]),
      .b_valid(m_b_valid[m]), .b(m_b[m]), .b_ready(m_b_ready[m]),
      .done(m_done[m]), .checks(m_checks[m]), .failures(m_fail[m]), .completed(m_done_cnt[m])
    );
  end
  for (genvar s = 0; s < N_SLAVE; s++) begin : g_s
    axi_slave_model #(.IDX(s), .MEM(s == 6 || s == 7)) u_s (
      .clk, .rst_n,
      .ar_valid(s_ar_valid[s]), .ar(s_ar[s]), .ar_ready(s_ar_ready[s]),
      .aw_valid(s_aw_valid[s]), .aw(s_aw[s]), .aw_ready(s_aw_ready[s]),
      .w_valid(s_w_valid[s]), .w(s_w[s]), .w_ready(s_w_ready[s]),
      .r_valid(s_r_valid[s]), .r(s_r[s]), .r_ready(s_r_ready[s]),
      .b_valid(s_b_valid[s]), .b(s_b[s]), .b_ready(s_b_ready[s]),
      .checks(s_checks[s]), .failures(s_fail[s])
    );
  end

  // ------------------------------------------------------------ measurements
  int cyc = 0, t_start = 0;
  int done_cyc [N_MASTER];
  int n_interleave = 0, n_unlocked_b2b = 0;
  int last_w_src = -1, last_w_cyc = -10, last_r_src = -1, last_r_cyc = -10;
  logic last_w_lk = 1'b0, last_r_lk = 1'b0;
  int n_r = 0, n_w = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (run_n) begin
      for (int m = 0; m < N_MASTER; m++)
        if (m_done[m] && done_cyc[m] < 0) done_cyc[m] = cyc - t_start;
      if (dut.u_w.fire) begin
        n_w++;
        if (last_w_cyc == cyc - 1 && last_w_src != int'(dut.u_w.fire_src)) n_interleave++;
        if (last_w_cyc == cyc - 1 && !dut.u_w.fire_locked && !last_w_lk) n_unlocked_b2b++;
        last_w_src = int'(dut.u_w.fire_src); last_w_cyc = cyc; last_w_lk = dut.u_w.fire_locked;
      end
      if (dut.u_r.fire) begin
        n_r++;
        if (last_r_cyc == cyc - 1 && last_r_src != int'(dut.u_r.fire_src)) n_interleave++;
        if (last_r_cyc == cyc - 1 && !dut.u_r.fire_locked && !last_r_lk) n_unlocked_b2b++;
        last_r_src = int'(dut.u_r.fire_src); last_r_cyc = cyc; last_r_lk = dut.u_r.fire_locked;
      end
    end
  end

  // ------------------------------------------------------------ directed phase
  int fire_cyc [$];
  always @(posedge clk) if (rst_n && dir_on && |(s_ar_valid & s_ar_ready)) fire_cyc.push_back(cyc);

  ax_m_t q0 [2], q1 [2];
  logic  dir_go = 1'b0;
  int    i0 = 0, i1 = 0;
  always @(posedge clk) begin
    if (dir_go) begin
      if (dir_v[0] && m_ar_ready[0]) begin
        i0 <= i0 + 1;
        if (i0 == 0) dir_ar[0] <= q0[1]; else dir_v[0] <= 1'b0;
      end
      if (dir_v[1] && m_ar_ready[1]) begin
        i1 <= i1 + 1;
        if (i1 == 0) dir_ar[1] <= q1[1]; else dir_v[1] <= 1'b0;
      end
    end
  end

  int n_chk = 0, n_fail = 0;
  task automatic check(input bit ok, input string what);
    n_chk++;
    if (!ok) begin
      n_fail++;
      $display("%s FAIL: %s", NAME, what);
    end
  endtask

  initial begin
    int c0, span, want, last;
    finished = 1'b0; checks = 0; failures = 0; cycles = 0; r_beats = 0; w_beats = 0;
    for (int m = 0; m < N_MASTER; m++) done_cyc[m] = -1;
    q0[0] = ax_m_t'{id: 3'd0, addr: 32'h1000_0000, len: 4'd0, size: 3'd2, burst: 2'b01, lock: 2'b00};
    q0[1] = ax_m_t'{id: 3'd1, addr: 32'h1000_0100, len: 4'd0, size: 3'd2, burst: 2'b01, lock: 2'b00};
    q1[0] = ax_m_t'{id: 3'd0, addr: 32'h1000_0200, len: 4'd0, size: 3'd2, burst: 2'b01, lock: 2'b00};
    q1[1] = ax_m_t'{id: 3'd1, addr: 32'h1000_0300, len: 4'd0, size: 3'd2, burst: 2'b01, lock: 2'b00};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2) @(negedge clk);
    dir_v = 2'b11; dir_ar[0] = q0[0]; dir_ar[1] = q1[0]; dir_go = 1'b1;
    c0 = cyc;
    repeat (20) @(posedge clk);
    want = INTERLEAVE ? 5 : 8;
    check(fire_cyc.size() == 4, $sformatf("directed phase: four read requests reach the slave (%0d, first at %0d, c0 %0d)", fire_cyc.size(), (fire_cyc.size() != 0) ? fire_cyc[0] : -1, c0));
    if (fire_cyc.size() == 4) begin
      span = fire_cyc[3] - c0 + 1;
      check(span == want, $sformatf("4 requests from 2 masters take %0d cycles, expected %0d", span, want));
    end
    // the directed reads are answered by slave 1; let them drain
    repeat (20) @(posedge clk);
    @(negedge clk) dir_on = 1'b0;
    t_start = cyc;
    run_n = 1'b1;
    wait (&m_done);
    repeat (200) @(posedge clk);
    last = 0;
    for (int m = 0; m < N_MASTER; m++) begin
      checks += m_checks[m]; failures += m_fail[m];
      check(m_done_cnt[m] == int'(N_TX[m]),
            $sformatf("master %0d completed %0d of %0d", m, m_done_cnt[m], N_TX[m]));
      if (done_cyc[m] > last) last = done_cyc[m];
      if (DEADLINE > 0)
        check(done_cyc[m] <= int'(DEADLINE),
              $sformatf("master %0d finished at cycle %0d, deadline %0d", m, done_cyc[m], DEADLINE));
    end
    for (int s = 0; s < N_SLAVE; s++) begin
      checks += s_checks[s]; failures += s_fail[s];
    end
    check(s_r_valid == '0 && s_b_valid == '0, "no response left over");
    if (INTERLEAVE) check(n_interleave > 0, "interleaved transfers happened");
    else            check(n_unlocked_b2b == 0, "normal mode: no back-to-back transfers outside a lock");
    $display("%s: masters done at cycles %0d %0d %0d %0d %0d; R beats %0d, W beats %0d; interleaved %0d",
             NAME, done_cyc[0], done_cyc[1], done_cyc[2], done_cyc[3], done_cyc[4], n_r, n_w, n_interleave);
    checks   += n_chk;
    failures += n_fail;
    cycles   = last;
    r_beats  = n_r;
    w_beats  = n_w;
    finished = 1'b1;
  end
endmodule
