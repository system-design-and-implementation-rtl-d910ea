// axi_slave_monitor: slave read (or write) buffer monitor.
//
// Keeps, for every slave, the number of transactions the interconnect has sent
// it and that have not finished yet: one more when the address channel
// forwards a request to the slave (inc), one less when the slave's last read
// beat or its write response has been forwarded (dec). A slave whose count has
// reached DEPTH, the size of its transaction buffer, is reported full, and the
// address arbiter then leaves requests to it waiting. The document gives the
// monitor's purpose; plain per-slave counters are this design's implementation.
// Interface: full is combinational from the registered counts; inc and dec may
// name the same slave in one cycle.
module axi_slave_monitor #(
  parameter int unsigned N     = 11,
  parameter int unsigned DEPTH = 8,
  parameter int unsigned IW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          inc_valid,
  input  logic [IW-1:0] inc_idx,
  input  logic          dec_valid,
  input  logic [IW-1:0] dec_idx,
  output logic [N-1:0]  full
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  logic [N-1:0][CW-1:0] cnt;

  always_comb
    for (int s = 0; s < N; s++) full[s] = (cnt[s] >= CW'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else begin
      for (int s = 0; s < N; s++) begin
        logic up, dn;
        up = inc_valid && int'(inc_idx) == s;
        dn = dec_valid && int'(dec_idx) == s && cnt[s] != '0;
        if (up && !dn)      cnt[s] <= cnt[s] + 1'b1;
        else if (dn && !up) cnt[s] <= cnt[s] - 1'b1;
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  inc_valid |-> !full[inc_idx] || (dec_valid && dec_idx == inc_idx));
endmodule
