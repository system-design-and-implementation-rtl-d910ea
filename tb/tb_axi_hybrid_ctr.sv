// tb_axi_hybrid_ctr: with threshold 2, the first two lock requests that meet a
// full buffer pass as normal, the third is blocked; completing a data lock
// transaction unblocks. Then a random sequence against a reference counter.
module tb_axi_hybrid_ctr;
  localparam int unsigned TH = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic as_normal = 0, lock_done = 0, block;
  int checks = 0, failures = 0;
  int cnt = 0;

  axi_hybrid_ctr #(.THRESH(TH)) dut (.*);

  task automatic cyc(input bit n, input bit d);
    as_normal = n; lock_done = d;
    #1;
    checks++;
    if (block !== (cnt >= TH)) begin failures++; $display("FAIL block=%b count=%0d", block, cnt); end
    @(posedge clk);
    if (d) cnt = int'(n);
    else if (n && cnt < TH) cnt++;
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cyc(1, 0); cyc(1, 0);
    checks++; if (!block) begin failures++; $display("FAIL not blocked at threshold"); end
    cyc(0, 1);
    checks++; if (block) begin failures++; $display("FAIL still blocked after lock completion"); end
    for (int t = 0; t < 300; t++) cyc(1'($urandom_range(1, 0)), $urandom_range(4, 0) == 0);
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
