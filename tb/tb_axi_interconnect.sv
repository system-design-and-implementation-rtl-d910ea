// tb_axi_interconnect: end-to-end test of the interconnect at its default size
// (5 masters, 11 slaves, 32-bit, every parameter at its default).
//
// Phase 1 (directed): masters 0 and 1 each present two read requests at once.
// With the interleaved mode the four requests must reach the slave in five
// cycles, counted from the first VALID to the last transfer.
// Phase 2 (random): five behavioural masters run random reads and writes
// against eleven behavioural slaves (slaves 6 and 7 are memory-type with a
// random 0..16 cycle latency, and are marked for data lock mode). Masters check
// every read beat and write response; slaves check write bursts. The bench
// also counts how often each mechanism happened: interleaved transfers,
// half-rate (normal mode) transfers, data lock grants, streamed lock beats,
// hybrid pass-through, held-back lock requests, slave-buffer-full waits and
// write-data waits for the routing table; each must occur at least once.
module tb_axi_interconnect;
  import axi_pkg::*;

  localparam int unsigned N_TX = 300;

  logic clk = 1'b0, rst_n = 1'b0, run_n = 1'b0;
  always #5 clk = ~clk;

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

  // models' AR outputs, overridden by the directed phase
  logic  [N_MASTER-1:0] mdl_ar_valid;
  ax_m_t [N_MASTER-1:0] mdl_ar;
  logic                 dir_on = 1'b1;
  logic  [1:0]          dir_v = '0;
  ax_m_t [1:0]          dir_ar;

  always_comb begin
    m_ar_valid = mdl_ar_valid;
    m_ar       = mdl_ar;
    if (dir_on) begin
      m_ar_valid[1:0] = dir_v;
      m_ar[0]         = dir_ar[0];
      m_ar[1]         = dir_ar[1];
    end
  end

  axi_interconnect dut (.*);

  int m_checks [N_MASTER], m_fail [N_MASTER], m_done_cnt [N_MASTER];
  int s_checks [N_SLAVE],  s_fail [N_SLAVE];
  logic [N_MASTER-1:0] m_done;

  localparam int unsigned LOCK_PCT [N_MASTER] = '{10, 0, 30, 0, 0};
  localparam int unsigned GAP_PCT  [N_MASTER] = '{0, 20, 0, 0, 10};
  for (genvar m = 0; m < N_MASTER; m++) begin : g_m
    axi_master_model #(.IDX(m), .N_TX(N_TX), .LOCK_PCT(LOCK_PCT[m]), .W_GAP_PCT(GAP_PCT[m]),
                       .ISSUE_PCT(60)) u_m (
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

  // ------------------------------------------------------------ mechanism counters
  int cyc = 0;
  int n_interleave = 0, n_half_rate = 0, n_lock = 0, n_stream = 0, n_hybrid = 0;
  int n_block = 0, n_slvfull = 0, n_wtab_wait = 0;
  int last_w_src = -1, last_w_cyc = -10, last_r_src = -1, last_r_cyc = -10;
  int last_ar_src = -1, last_ar_cyc = -10;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (run_n) begin
      if (dut.u_w.fire) begin
        if (last_w_cyc == cyc - 1 && last_w_src != int'(dut.u_w.fire_src)) n_interleave++;
        if (last_w_cyc == cyc - 1 && last_w_src == int'(dut.u_w.fire_src)) n_stream++;
        last_w_src = int'(dut.u_w.fire_src); last_w_cyc = cyc;
      end
      if (dut.u_r.fire) begin
        if (last_r_cyc == cyc - 1 && last_r_src != int'(dut.u_r.fire_src)) n_interleave++;
        if (last_r_cyc == cyc - 1 && last_r_src == int'(dut.u_r.fire_src)) n_stream++;
        last_r_src = int'(dut.u_r.fire_src); last_r_cyc = cyc;
      end
      if (dut.u_ar.fire) begin
        if (last_ar_cyc == cyc - 2 && last_ar_src == int'(dut.u_ar.fire_src)) n_half_rate++;
        last_ar_src = int'(dut.u_ar.fire_src); last_ar_cyc = cyc;
      end
      if (ev_r_lock || ev_w_lock)     n_lock++;
      if (ev_r_hybrid || ev_w_hybrid) n_hybrid++;
      if (ev_ar_block || ev_aw_block) n_block++;
      for (int m = 0; m < N_MASTER; m++) begin
        if (dut.ar_slot_v[m] && dut.rmon_full[dut.ar_dst[m]]) n_slvfull++;
        if (dut.w_slot_v[m] && !dut.w_ok[m]) n_wtab_wait++;
      end
    end
  end

  // ------------------------------------------------------------ directed phase
  int checks = 0, failures = 0;
  int fire_cyc [$];
  always @(posedge clk) if (rst_n && dir_on && |(s_ar_valid & s_ar_ready)) fire_cyc.push_back(cyc);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

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

  initial begin
    int c0, span;
    q0[0] = ax_m_t'{id: 3'd0, addr: 32'h1000_0000, len: 4'd0, size: 3'd2, burst: 2'b01, lock: 2'b00};
    q0[1] = ax_m_t'{id: 3'd1, addr: 32'h1000_0100, len: 4'd0, size: 3'd2, burst: 2'b01, lock: 2'b00};
    q1[0] = ax_m_t'{id: 3'd0, addr: 32'h1000_0200, len: 4'd0, size: 3'd2, burst: 2'b01, lock: 2'b00};
    q1[1] = ax_m_t'{id: 3'd1, addr: 32'h1000_0300, len: 4'd0, size: 3'd2, burst: 2'b01, lock: 2'b00};
    dir_ar = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2) @(negedge clk);
    dir_v = 2'b11; dir_ar[0] = q0[0]; dir_ar[1] = q1[0]; dir_go = 1'b1;
    c0 = cyc;
    repeat (20) @(posedge clk);
    check(fire_cyc.size() == 4, "directed phase: four read requests reach the slave");
    if (fire_cyc.size() == 4) begin
      span = fire_cyc[3] - c0 + 1;
      check(span == 5, $sformatf("interleaved mode: 4 requests from 2 masters take %0d cycles, expected 5", span));
    end
    @(negedge clk) dir_on = 1'b0;
    run_n = 1'b1;
    wait (&m_done);
    repeat (200) @(posedge clk);
    for (int m = 0; m < N_MASTER; m++) begin
      checks += m_checks[m]; failures += m_fail[m];
      check(m_done_cnt[m] == N_TX, $sformatf("master %0d completed %0d of %0d", m, m_done_cnt[m], N_TX));
    end
    for (int s = 0; s < N_SLAVE; s++) begin
      checks += s_checks[s]; failures += s_fail[s];
    end
    check(s_r_valid == '0 && s_b_valid == '0, "no response left over");
    $display("mechanisms: interleave=%0d half_rate=%0d lock=%0d stream=%0d hybrid=%0d block=%0d slave_full=%0d wtab_wait=%0d",
             n_interleave, n_half_rate, n_lock, n_stream, n_hybrid, n_block, n_slvfull, n_wtab_wait);
    check(n_interleave > 0, "interleaved transfers happened");
    check(n_half_rate > 0,  "normal-mode half-rate transfers happened");
    check(n_lock > 0,       "data lock mode was granted");
    check(n_stream > 0,     "data lock bursts streamed beat after beat");
    check(n_hybrid > 0,     "hybrid mode passed a lock request as normal");
    check(n_block > 0,      "hybrid mode held a lock request back");
    check(n_slvfull > 0,    "a request waited for a full slave buffer");
    check(n_wtab_wait > 0,  "write data waited for its routing entry");
    $display("cycles=%0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
