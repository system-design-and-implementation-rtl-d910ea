// tb_arb_fixed: random requests; the grant must be the lowest requesting index.
module tb_arb_fixed;
  localparam int unsigned N = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [N-1:0] req, grant;
  int checks = 0, failures = 0;

  arb_fixed #(.N(N)) dut (.clk, .rst_n, .req, .accept(1'b1), .grant);

  function automatic logic [N-1:0] model(input logic [N-1:0] r);
    for (int i = 0; i < N; i++) if (r[i]) return N'(1) << i;
    return '0;
  endfunction

  initial begin
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      req = N'($urandom());
      #1;
      checks++;
      if (grant !== model(req)) begin
        failures++;
        $display("FAIL req=%b grant=%b", req, grant);
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
