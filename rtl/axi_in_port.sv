// axi_in_port: interface input port of one source on a shared channel.
//
// The port is the interconnect's register stage: it samples the source's
// VALID/payload into a one-entry slot and asks the channel for the bus from
// there, so that every channel has exactly one register layer between source
// and destination ("register input, combinational output").
//
// Normal mode. READY is high only while the slot is empty. A beat is captured,
// forwarded in a later cycle, and only then may the next beat be captured, so a
// single source gets at most one transfer every two cycles. That half rate is
// what keeps the register stage from taking a beat twice; a channel recovers
// the lost cycles by interleaving two sources (see axi_channel).
//
// Data lock mode. A beat whose ID belongs to a data lock transaction
// (s_lock_match) is captured like any other, but the slot remembers it and the
// port raises lock_req instead of a normal request. The channel grants the lock
// and forwards that first beat in the same cycle (lock_win); from then on,
// while the port owns the lock (lock_own, registered), READY follows the bus: a
// beat can enter the slot in the same cycle the previous one leaves, so the
// burst streams one beat per cycle. After the last beat has entered, READY
// stays low until it has left, and for one more cycle after that. A single
// lock burst of L beats therefore spans L+1 cycles from the first VALID to the
// last transfer, and back-to-back lock bursts from one source start L+2 cycles
// apart, the L/(L+2) limit. Both figures are the document's; the cycle split
// (capture, grant with transfer, one idle cycle after the burst) is this
// design's reading of them.
//
// Interface: s_* face the source (AXI VALID/READY), slot_* present the held
// beat to the channel, pop says the channel forwarded the slot this cycle,
// lock_win says it did so as the first beat of a granted lock. While streaming,
// s_ready depends combinationally on pop and lock_win, i.e. on the arbiter and
// the destination's READY.
module axi_in_port #(
  parameter int unsigned PW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // source side
  input  logic          s_valid,
  input  logic [PW-1:0] s_payload,
  input  logic          s_last,
  input  logic          s_lock_match,
  output logic          s_ready,
  // channel side
  output logic          slot_valid,
  output logic [PW-1:0] slot_payload,
  output logic          slot_last,
  input  logic          pop,
  input  logic          lock_own,
  input  logic          lock_win,
  output logic          lock_req
);
  logic drain, hold, slot_lock;
  logic streaming, take;

  always_comb begin
    streaming = lock_own || lock_win;
    if (streaming) s_ready = !drain && !(lock_win && slot_last) && (!slot_valid || pop);
    else           s_ready = !slot_valid && !hold;
    lock_req = slot_valid && slot_lock && !lock_own;
    take     = s_valid && s_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_valid <= 1'b0;
      slot_last  <= 1'b0;
      slot_lock  <= 1'b0;
      drain      <= 1'b0;
      hold       <= 1'b0;
    end else begin
      if (take) begin
        slot_valid <= 1'b1;
        slot_last  <= s_last;
        slot_lock  <= s_lock_match;
      end else if (pop) begin
        slot_valid <= 1'b0;
      end
      hold <= streaming && pop && slot_last;
      if (!streaming)                 drain <= 1'b0;
      else if (take && s_last)        drain <= 1'b1;
      else if (pop && slot_last)      drain <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (take) slot_payload <= s_payload;
  end

  // A captured beat stays put until the channel forwards it.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           slot_valid && !pop |=> slot_valid && $stable(slot_payload));
endmodule
