// tb_arb_rr: compares the weighted round-robin arbiter with a reference model
// (priority list, grant counters, move-to-end at the threshold) under random
// requests and random acceptance, then replays the policy's own example: a
// device with threshold 2 keeps the top priority for two grants and then
// drops to the end of the list.
module tb_arb_rr;
  localparam int unsigned N = 4;
  localparam logic [N-1:0][7:0] TH = {8'd1, 8'd3, 8'd2, 8'd1};  // device 1: threshold 2
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [N-1:0] req = '0, grant;
  logic accept = 1'b0;
  int checks = 0, failures = 0;
  int order [$];
  int cnt [N];

  arb_rr #(.N(N), .THRESH(TH)) dut (.clk, .rst_n, .req, .accept, .grant);

  function automatic logic [N-1:0] model(input logic [N-1:0] r);
    foreach (order[p]) if (r[order[p]]) return N'(1) << order[p];
    return '0;
  endfunction

  task automatic step(input logic [N-1:0] r, input logic acc);
    logic [N-1:0] exp;
    req = r; accept = acc;
    #1;
    exp = model(r);
    checks++;
    if (grant !== exp) begin
      failures++;
      $display("FAIL req=%b grant=%b expected=%b", r, grant, exp);
    end
    @(posedge clk);
    if (acc && exp != 0) begin
      int g, p;
      for (int i = 0; i < N; i++) if (exp[i]) g = i;
      cnt[g]++;
      if (cnt[g] >= TH[g]) begin
        cnt[g] = 0;
        foreach (order[k]) if (order[k] == g) p = k;
        order.delete(p);
        order.push_back(g);
      end
    end
    @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < N; i++) order.push_back(i);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // example: devices 1 and 2 both request; device 0 is idle
    step(4'b0110, 1'b1);   // device 1 first grant
    step(4'b0110, 1'b1);   // device 1 second grant, then it drops to the end
    checks++;
    if (order[N-1] != 1) begin failures++; $display("FAIL model order"); end
    step(4'b0110, 1'b0);   // now device 2 must win
    checks++;
    if (grant !== 4'b0100) begin failures++; $display("FAIL device 1 kept priority after its threshold"); end
    for (int t = 0; t < 500; t++) step(N'($urandom()), $urandom_range(1, 0) == 1);
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
