// tb_axi_in_port: drives one input port as a source that always has data.
//  * Normal mode: a beat is taken at most every other cycle (50 %) and every
//    beat comes out in order with its payload intact.
//  * Data lock mode: the four beats of a burst are taken on four consecutive
//    cycles and the last one leaves 4 cycles after the first was taken (5
//    cycles in all). After the last beat READY stays low until it has left and
//    one cycle more, so back-to-back lock bursts from one source take burst
//    length + 2 cycles each (4 of 6 cycles used).
//  * Random phase: bursts of 1..4 beats, each randomly a lock or a normal
//    burst, with gaps on the source side and a destination that is READY three
//    cycles in four. Every beat must come out once and in order; a lock grant
//    must carry the first beat of a lock burst; beats forwarded under a lock
//    must belong to the burst that won it; normal beats must not be forwarded
//    as locked ones; and no beat may be taken in the cycle after a lock burst.
// The bench plays the channel: it forwards the held beat whenever one is held
// and the destination is ready, grants a lock request at once together with
// the held beat, and keeps the lock until the last beat has been forwarded.
module tb_axi_in_port;
  localparam int unsigned PW = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          s_valid, s_last, s_lock_match, s_ready;
  logic [PW-1:0] s_payload;
  logic          slot_valid, slot_last, pop, lock_own = 1'b0, lock_win, lock_req;
  logic [PW-1:0] slot_payload;
  int checks = 0, failures = 0;

  axi_in_port #(.PW(PW)) dut (.*);

  // channel stand-in
  logic bus_ok = 1'b1;
  logic rnd_phase = 1'b0, stop = 1'b0;
  always_comb begin
    pop      = slot_valid && bus_ok;
    lock_win = lock_req && pop;
  end
  always_ff @(posedge clk) begin
    if (!rst_n)                 lock_own <= 1'b0;
    else if (lock_win && !slot_last) lock_own <= 1'b1;
    else if (lock_own && pop && slot_last) lock_own <= 1'b0;
  end

  // source: sequence numbers, bursts of 4 in lock phase
  logic lock_phase = 1'b0;
  int   sent = 0, got = 0;
  int   take_cyc [$], out_cyc [$];
  int   cyc = 0;
  int   lock_start_cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  // random-phase source state: current burst length, position, lock flag
  int   blen = 4, bpos = 0, burst_no = 0, owned = -1, lock_end = -10, n_rlock = 0;
  bit   block = 1'b1, gap = 1'b0;
  int   bof [int];
  bit   lof [int], fof [int];

  always_comb begin
    s_valid      = rst_n && !gap && !stop;
    s_payload    = PW'(sent);
    s_last       = rnd_phase ? (bpos == blen - 1) : lock_phase ? ((sent % 4) == 3) : 1'b1;
    s_lock_match = rnd_phase ? block : lock_phase;
  end
  always @(posedge clk) if (rst_n) begin
    if (s_valid && s_ready) begin
      sent <= sent + 1;
      take_cyc.push_back(cyc);
      bof[sent] = burst_no;
      lof[sent] = s_lock_match;
      fof[sent] = (bpos == 0);
      if (rnd_phase) begin
        checks++;
        if (cyc == lock_end + 1) begin failures++; $display("FAIL beat taken right after a lock burst"); end
        if (s_last) begin
          bpos     <= 0;
          blen     <= $urandom_range(4, 1);
          block    <= 1'($urandom_range(1, 0));
          burst_no <= burst_no + 1;
        end else begin
          bpos <= bpos + 1;
        end
      end
    end
    if (pop) begin
      checks++;
      if (slot_payload !== PW'(got)) begin
        failures++;
        $display("FAIL beat %0d came out as %0d", got, slot_payload);
      end
      if (rnd_phase) begin
        checks++;
        if (lock_win) begin
          if (!lof[got] || !fof[got]) begin failures++; $display("FAIL lock granted on beat %0d", got); end
          owned = bof[got];
          n_rlock++;
        end else if (lock_own) begin
          if (bof[got] != owned) begin failures++; $display("FAIL beat %0d forwarded under another burst's lock", got); end
        end else if (lof[got]) begin
          failures++; $display("FAIL lock beat %0d forwarded without the lock", got);
        end
        if ((lock_win || lock_own) && slot_last) lock_end = cyc;
      end
      got <= got + 1;
      out_cyc.push_back(cyc);
    end
    gap    <= rnd_phase && $urandom_range(3, 0) == 0;
    bus_ok <= !rnd_phase || $urandom_range(3, 0) != 0;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (40) @(negedge clk);
    // normal mode: takes every other cycle
    checks++;
    if (take_cyc.size() < 19 || take_cyc.size() > 21) begin
      failures++;
      $display("FAIL normal mode took %0d beats in 40 cycles", take_cyc.size());
    end
    for (int i = 1; i < take_cyc.size(); i++) begin
      checks++;
      if (take_cyc[i] - take_cyc[i-1] != 2) begin failures++; $display("FAIL normal spacing"); end
    end
    // switch to lock mode at a burst boundary
    while (slot_valid || (sent % 4) != 0) @(negedge clk);
    lock_start_cyc = cyc;
    lock_phase = 1'b1;
    repeat (62) @(negedge clk);
    begin
      int first, n, bursts;
      first = -1; n = 0; bursts = 0;
      // find lock-mode takes and check streaming and spacing
      for (int i = 0; i < take_cyc.size(); i++) if (take_cyc[i] >= lock_start_cyc) begin
        if (first < 0) first = i;
      end
      for (int i = first; i + 4 < take_cyc.size(); i += 4) begin
        bursts++;
        checks++;
        if (take_cyc[i+3] - take_cyc[i] != 3) begin failures++; $display("FAIL lock burst not streamed"); end
        checks++;
        if (i + 3 < out_cyc.size() && out_cyc[i+3] - take_cyc[i] != 4) begin
          failures++;
          $display("FAIL lock burst left %0d cycles after its first beat, expected 4", out_cyc[i+3] - take_cyc[i]);
        end
        checks++;
        if (take_cyc[i+4] - take_cyc[i] != 6) begin
          failures++;
          $display("FAIL lock burst period %0d, expected 6", take_cyc[i+4] - take_cyc[i]);
        end
      end
      checks++;
      if (bursts < 8) begin failures++; $display("FAIL only %0d lock bursts", bursts); end
    end
    // random phase, entered at a burst boundary
    while (slot_valid || lock_own || (sent % 4) != 0) @(negedge clk);
    lock_phase = 1'b0;
    rnd_phase  = 1'b1;
    repeat (4000) @(negedge clk);
    stop = 1'b1;
    repeat (20) @(negedge clk);
    checks++;
    if (got != sent) begin failures++; $display("FAIL %0d beats taken, %0d forwarded", sent, got); end
    checks++;
    if (n_rlock < 100) begin failures++; $display("FAIL only %0d lock grants in the random phase", n_rlock); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
