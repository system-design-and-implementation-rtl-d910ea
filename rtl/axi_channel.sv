// axi_channel: one shared-bus AXI channel (AR, AW, R, W or B).
//
// N_SRC sources reach N_DST destinations over a single bus that carries one
// beat per cycle. Each source has an input port (axi_in_port) holding one
// beat; an arbiter picks one held beat per cycle and the output port set
// (axi_out_port) raises VALID at the beat's destination, which the caller
// computes from the held payload (slot_dst). The caller can also hold a beat
// back (slot_ok low, e.g. its slave's buffer is full) and mark beats to be
// served first (slot_pri, used for data lock mode address requests).
//
// Transfer modes.
//  * Interleaved (INTERLEAVE=1): a source's port takes a new beat only every
//    other cycle, but while one port's beat crosses the bus the next source's
//    beat is being captured, so two or more active sources keep the bus busy
//    every cycle. Four requests, two from each of two masters, take five cycles
//    from first VALID to last transfer.
//  * Normal (INTERLEAVE=0): after each transfer the bus stays idle for one
//    cycle, so every transfer occupies it for two cycles (50 %); the same four
//    requests take eight cycles.
//  * Data lock (LOCK_EN=1, data channels): a source presenting a beat of a
//    data lock transaction (src_lock_match) is captured and then requests the
//    lock. Lock requests are arbitrated before normal ones, and the grant
//    forwards the burst's first beat. While the lock is held only its owner
//    uses the bus and its burst streams at one beat per cycle; the lock is
//    released when the owner's last beat has been forwarded. A 4-beat lock
//    burst takes five cycles from first VALID to last transfer, like the
//    interleaved example, and one source's back-to-back lock bursts start
//    burst length + 2 cycles apart.
// The modes and their cycle counts are the document's; the arbitration order
// (lock requests, then priority-marked, then other beats) follows its
// arbitration flow, and everything else is this design's implementation.
//
// Interface: src_* are the sources' AXI handshakes; dst_valid/dst_payload/
// dst_ready face the destinations (payload broadcast, VALID one-hot). fire and
// the fire_* outputs report the transfer of this cycle for bookkeeping;
// lock_start pulses when a lock is granted (with the first locked beat);
// with LOCK_EN=0 (address and response channels) it and fire_locked stay 0.
// Latency through the channel is one cycle in every mode (capture, then
// forward).
module axi_channel
  import axi_pkg::*;
#(
  parameter int unsigned N_SRC      = 5,
  parameter int unsigned N_DST      = 11,
  parameter int unsigned PW         = 8,
  parameter arb_policy_e POLICY     = ARB_RR,
  parameter int unsigned W_BITS     = 8,
  parameter logic [N_SRC-1:0][W_BITS-1:0] WEIGHT = {8'd16, 8'd16, 8'd32, 8'd8, 8'd4},
  parameter bit          INTERLEAVE = 1'b1,
  parameter bit          LOCK_EN    = 1'b0,
  parameter int unsigned SW         = (N_SRC > 1) ? $clog2(N_SRC) : 1,
  parameter int unsigned DW         = (N_DST > 1) ? $clog2(N_DST) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // sources
  input  logic [N_SRC-1:0]           src_valid,
  input  logic [N_SRC-1:0][PW-1:0]   src_payload,
  input  logic [N_SRC-1:0]           src_last,
  input  logic [N_SRC-1:0]           src_lock_match,
  output logic [N_SRC-1:0]           src_ready,
  // held beats and the caller's view of them
  output logic [N_SRC-1:0]           slot_valid,
  output logic [N_SRC-1:0][PW-1:0]   slot_payload,
  input  logic [N_SRC-1:0][DW-1:0]   slot_dst,
  input  logic [N_SRC-1:0]           slot_ok,
  input  logic [N_SRC-1:0]           slot_pri,
  // destinations
  output logic [N_DST-1:0]           dst_valid,
  output logic [PW-1:0]              dst_payload,
  input  logic [N_DST-1:0]           dst_ready,
  // transfer report
  output logic                       fire,
  output logic [SW-1:0]              fire_src,
  output logic [DW-1:0]              fire_dst,
  output logic [PW-1:0]              fire_payload,
  output logic                       fire_last,
  output logic                       fire_locked,
  output logic                       lock_start
);
  logic [N_SRC-1:0] slot_last, pop, lock_req, lock_own, lock_win;
  logic [N_SRC-1:0] norm_req, pri_req, arb_req, grant;
  logic             lock_active, bubble;
  logic [SW-1:0]    lock_owner, sel, gidx;
  logic             bus_valid, bus_ready;
  logic [DW-1:0]    bus_dst;

  for (genvar i = 0; i < N_SRC; i++) begin : g_port
    axi_in_port #(.PW(PW)) u_port (
      .clk, .rst_n,
      .s_valid      (src_valid[i]),
      .s_payload    (src_payload[i]),
      .s_last       (src_last[i]),
      .s_lock_match (LOCK_EN && src_lock_match[i]),
      .s_ready      (src_ready[i]),
      .slot_valid   (slot_valid[i]),
      .slot_payload (slot_payload[i]),
      .slot_last    (slot_last[i]),
      .pop          (pop[i]),
      .lock_own     (lock_own[i]),
      .lock_win     (lock_win[i]),
      .lock_req     (lock_req[i])
    );
    assign lock_own[i] = lock_active && lock_owner == SW'(i);
    assign lock_win[i] = lock_start && gidx == SW'(i);
  end

  axi_arbiter #(.N(N_SRC), .W_BITS(W_BITS), .POLICY(POLICY), .WEIGHT(WEIGHT)) u_arb (
    .clk, .rst_n, .req(arb_req), .accept(fire), .grant
  );

  // Requests to the arbiter: lock requests first, then priority-marked beats,
  // then the rest; nothing while a lock is held or during a normal-mode idle cycle.
  always_comb begin
    norm_req = slot_valid & slot_ok & ~lock_req;
    pri_req  = norm_req & slot_pri;
    arb_req  = '0;
    if (!lock_active && !bubble) begin
      if (LOCK_EN && |(lock_req & slot_ok)) arb_req = lock_req & slot_ok;
      else                      arb_req = (|pri_req) ? pri_req : norm_req;
    end
  end

  // The granted (or lock-owning) source drives the bus.
  always_comb begin
    gidx = '0;
    for (int i = 0; i < N_SRC; i++) if (grant[i]) gidx = SW'(i);
    lock_start = 1'b0;
    bus_valid  = 1'b0;
    sel        = gidx;
    if (lock_active) begin
      sel       = lock_owner;
      bus_valid = slot_valid[lock_owner];
    end else if (!bubble) begin
      bus_valid = |grant;
    end
    bus_dst     = slot_dst[sel];
    dst_payload = slot_payload[sel];
    fire        = bus_valid && bus_ready;
    lock_start  = LOCK_EN && !lock_active && fire && |(lock_req & slot_ok);
    pop         = fire ? (N_SRC'(1) << sel) : '0;
  end

  axi_out_port #(.N_DST(N_DST), .DW(DW)) u_out (
    .bus_valid, .bus_dst, .bus_ready, .dst_valid, .dst_ready
  );

  assign fire_src     = sel;
  assign fire_dst     = bus_dst;
  assign fire_payload = dst_payload;
  assign fire_last    = slot_last[sel];
  assign fire_locked  = lock_active || lock_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_active <= 1'b0;
      lock_owner  <= '0;
      bubble      <= 1'b0;
    end else begin
      bubble <= !INTERLEAVE && fire && !fire_locked;
      if (lock_start && !slot_last[gidx]) begin
        lock_active <= 1'b1;
        lock_owner  <= gidx;
      end else if (lock_active && fire && slot_last[lock_owner]) begin
        lock_active <= 1'b0;
      end
    end
  end

  a_onehot_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_dst_onehot:   assert property (@(posedge clk) disable iff (!rst_n) $onehot0(dst_valid));
endmodule
