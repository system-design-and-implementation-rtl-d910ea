// tb_axi_channel: runs the channel test sequence (chan_harness) on a channel
// with interleaving and on one without, both with data lock mode enabled.
module tb_axi_channel;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic d0, d1;
  int c0, f0, c1, f1;

  chan_harness #(.INTERLEAVE(1'b1)) h_il  (.clk, .rst_n, .done(d0), .checks(c0), .failures(f0));
  chan_harness #(.INTERLEAVE(1'b0)) h_nrm (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (d0 && d1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end
endmodule
