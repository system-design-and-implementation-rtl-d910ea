// tb_axi_slave_monitor: random request/completion events per slave against
// reference counters; a slave must read full exactly when DEPTH transactions
// are outstanding. Requests to a full slave are never issued, as in the
// interconnect.
module tb_axi_slave_monitor;
  localparam int unsigned N = 11, DEPTH = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic inc_valid = 0, dec_valid = 0;
  logic [3:0] inc_idx = '0, dec_idx = '0;
  logic [N-1:0] full;
  int checks = 0, failures = 0;
  int cnt [N];

  axi_slave_monitor #(.N(N), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 800; t++) begin
      int s, d;
      s = $urandom_range(N - 1, 0);
      d = $urandom_range(N - 1, 0);
      inc_idx = 4'(s); dec_idx = 4'(d);
      inc_valid = (cnt[s] < DEPTH || (d == s && cnt[d] > 0)) && $urandom_range(1, 0) == 1;
      dec_valid = cnt[d] > 0 && $urandom_range(2, 0) == 0;
      if (inc_valid && cnt[s] >= DEPTH && !(dec_valid && d == s)) inc_valid = 0;
      #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (full[k] !== (cnt[k] >= DEPTH)) begin failures++; $display("FAIL slave %0d full=%b count=%0d", k, full[k], cnt[k]); end
      end
      @(posedge clk);
      if (inc_valid) cnt[s]++;
      if (dec_valid) cnt[d]--;
      @(negedge clk);
    end
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
