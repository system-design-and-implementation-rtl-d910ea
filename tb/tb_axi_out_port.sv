// tb_axi_out_port: exhaustive check of the output port decode: VALID goes only
// to the addressed destination, READY comes back from it, and an index beyond
// the last destination raises no VALID and is taken.
module tb_axi_out_port;
  localparam int unsigned N = 11;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic bus_valid, bus_ready;
  logic [3:0] bus_dst;
  logic [N-1:0] dst_valid, dst_ready;
  int checks = 0, failures = 0;

  axi_out_port #(.N_DST(N)) dut (.*);

  initial begin
    for (int v = 0; v < 2; v++)
      for (int d = 0; d < 16; d++)
        for (int k = 0; k < 8; k++) begin
          logic [N-1:0] ev; logic er;
          bus_valid = v[0]; bus_dst = 4'(d); dst_ready = N'($urandom());
          ev = (d < N) ? (N'(v) << d) : '0;
          er = (d < N) ? dst_ready[d] : 1'b1;
          #1;
          checks++;
          if (dst_valid !== ev || bus_ready !== er) begin
            failures++;
            $display("FAIL v=%0d d=%0d valid=%b ready=%b", v, d, dst_valid, bus_ready);
          end
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
