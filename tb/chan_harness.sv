// chan_harness: test sequence for one axi_channel instance (3 sources, 4
// destinations, 16-bit payload {source, sequence, destination}).
//  A. Two sources present two single beats each at the same time; the span from
//     first VALID to last transfer must be 5 cycles with interleaving and 8
//     without.
//  B. Source 2 sends three 4-beat data lock bursts back to back: each burst must
//     cross the bus on 4 consecutive cycles, the first one must be done 5
//     cycles after its first VALID, and bursts must start 6 cycles apart
//     (burst length + 2).
//  C. Random traffic from all sources with random gaps, destinations, slave
//     back-pressure, caller hold-offs and occasional lock bursts on source 2;
//     every beat must arrive once, at its destination, in source order.
module chan_harness
  import axi_pkg::*;
#(
  parameter bit INTERLEAVE = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned NS = 3, ND = 4, PW = 16;

  typedef struct packed { logic [PW-1:0] pl; logic last; logic lock; } beat_t;

  logic [NS-1:0]         src_valid, src_last, src_lock_match, src_ready;
  logic [NS-1:0][PW-1:0] src_payload, slot_payload;
  logic [NS-1:0]         slot_valid, slot_ok, slot_pri;
  logic [NS-1:0][1:0]    slot_dst;
  logic [ND-1:0]         dst_valid, dst_ready;
  logic [PW-1:0]         dst_payload;
  logic                  fire, fire_last, fire_locked, lock_start;
  logic [1:0]            fire_src, fire_dst;
  logic [PW-1:0]         fire_payload;

  axi_channel #(.N_SRC(NS), .N_DST(ND), .PW(PW), .POLICY(ARB_RR),
                .WEIGHT({8'd1, 8'd1, 8'd1}), .INTERLEAVE(INTERLEAVE), .LOCK_EN(1'b1)) dut (.*);

  beat_t q [NS][$];
  beat_t exp_q [NS][$];
  logic  [NS-1:0] gap;
  int    cyc = 0;
  int    fires [$];
  int    fire_cycles_src2 [$];
  bit    rand_mode = 0;

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      src_valid[i]      = q[i].size() != 0 && !gap[i];
      src_payload[i]    = (q[i].size() != 0) ? q[i][0].pl : '0;
      src_last[i]       = (q[i].size() != 0) ? q[i][0].last : 1'b0;
      src_lock_match[i] = (q[i].size() != 0) ? q[i][0].lock : 1'b0;
      slot_dst[i]       = slot_payload[i][1:0];
      slot_pri[i]       = 1'b0;
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < NS; i++)
      if (src_valid[i] && src_ready[i]) void'(q[i].pop_front());
    if (fire) begin
      int s;
      beat_t e;
      s = int'(dst_payload[PW-1 -: 2]);
      checks++;
      if (exp_q[s].size() == 0) begin
        failures++; $display("FAIL unexpected beat %h", dst_payload);
      end else begin
        e = exp_q[s].pop_front();
        if (e.pl !== dst_payload || !dst_valid[dst_payload[1:0]] || fire_src != 2'(s)) begin
          failures++; $display("FAIL beat %h, expected %h", dst_payload, e.pl);
        end
      end
      fires.push_back(cyc);
      if (s == 2) fire_cycles_src2.push_back(cyc);
    end
    gap       <= rand_mode ? NS'($urandom()) & NS'($urandom()) : '0;
    dst_ready <= rand_mode ? ND'($urandom()) | ND'($urandom()) : '1;
    slot_ok   <= rand_mode ? NS'($urandom()) | NS'($urandom()) : '1;
  end

  function automatic beat_t mk(input int s, input int seq, input int d, input bit last, input bit lock);
    return beat_t'{pl: {2'(s), 10'(seq), 2'b00, 2'(d)}, last: last, lock: lock};
  endfunction

  task automatic push(input beat_t b);
    int s;
    s = int'(b.pl[PW-1 -: 2]);
    q[s].push_back(b);
    exp_q[s].push_back(b);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL (INTERLEAVE=%0d) %s", INTERLEAVE, what); end
  endtask

  initial begin
    int c0, span, seq;
    done = 0; checks = 0; failures = 0;
    gap = '0; dst_ready = '1; slot_ok = '1;
    wait (rst_n);
    repeat (2) @(negedge clk);
    // A: interleave / normal
    c0 = cyc;
    push(mk(0, 0, 1, 1, 0)); push(mk(0, 1, 1, 1, 0));
    push(mk(1, 0, 1, 1, 0)); push(mk(1, 1, 1, 1, 0));
    repeat (15) @(negedge clk);
    check(fires.size() == 4, "four beats delivered");
    if (fires.size() == 4) begin
      span = fires[3] - c0 + 1;
      check(span == (INTERLEAVE ? 5 : 8), $sformatf("two sources, two beats each: %0d cycles", span));
    end
    // B: data lock bursts
    fire_cycles_src2.delete();
    c0 = cyc;
    for (int b = 0; b < 3; b++)
      for (int k = 0; k < 4; k++) push(mk(2, 4 * b + k, 2, k == 3, 1));
    repeat (30) @(negedge clk);
    check(fire_cycles_src2.size() == 12, "twelve lock beats delivered");
    if (fire_cycles_src2.size() == 12) begin
      span = fire_cycles_src2[3] - c0 + 1;
      check(span == 5, $sformatf("single lock burst: %0d cycles", span));
    end
    if (fire_cycles_src2.size() == 12)
      for (int b = 0; b < 3; b++) begin
        check(fire_cycles_src2[4*b+3] - fire_cycles_src2[4*b] == 3, "lock burst streams");
        if (b > 0) check(fire_cycles_src2[4*b] - fire_cycles_src2[4*b-4] == 6,
                         $sformatf("lock burst period %0d, expected 6", fire_cycles_src2[4*b] - fire_cycles_src2[4*b-4]));
      end
    // C: random traffic
    rand_mode = 1;
    seq = 100;
    for (int n = 0; n < 300; n++) begin
      int s;
      s = $urandom_range(NS - 1, 0);
      if (s == 2 && $urandom_range(3, 0) == 0) begin
        int len;
        len = $urandom_range(4, 1);
        for (int k = 0; k < len; k++) push(mk(2, seq++, $urandom_range(ND - 1, 0), k == len - 1, 1));
      end else begin
        push(mk(s, seq++, $urandom_range(ND - 1, 0), 1, 0));
      end
    end
    while (q[0].size() + q[1].size() + q[2].size() != 0) @(negedge clk);
    rand_mode = 0;
    repeat (10) @(negedge clk);
    for (int i = 0; i < NS; i++) check(exp_q[i].size() == 0, $sformatf("all beats of source %0d delivered", i));
    done = 1;
  end
endmodule
