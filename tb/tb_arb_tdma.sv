// tb_arb_tdma: compares the TDMA arbiter with a reference model of the slot
// rotation (owner keeps the top priority for SLOTS[owner] cycles, then the next
// index takes over) under random requests, and checks that a device asking
// all the time gets exactly its share when every device asks.
module tb_arb_tdma;
  localparam int unsigned N = 4;
  localparam logic [N-1:0][7:0] SLOTS = {8'd1, 8'd2, 8'd4, 8'd3};  // device 0: 3 slots
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [N-1:0] req = '0, grant;
  int checks = 0, failures = 0;
  int owner, left;
  int wins [N];

  arb_tdma #(.N(N), .SLOTS(SLOTS)) dut (.clk, .rst_n, .req, .accept(1'b1), .grant);

  function automatic logic [N-1:0] model(input logic [N-1:0] r, input int o);
    for (int j = 0; j < N; j++) if (r[(o + j) % N]) return N'(1) << ((o + j) % N);
    return '0;
  endfunction

  initial begin
    owner = 0; left = int'(SLOTS[0]);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      req = (t < 200) ? N'($urandom()) : '1;
      #1;
      checks++;
      if (grant !== model(req, owner)) begin
        failures++;
        $display("FAIL t=%0d req=%b grant=%b owner=%0d", t, req, grant, owner);
      end
      if (t >= 200) for (int i = 0; i < N; i++) if (grant[i]) wins[i]++;
      @(posedge clk);
      if (left <= 1) begin owner = (owner + 1) % N; left = int'(SLOTS[owner]); end
      else left--;
      @(negedge clk);
    end
    // 200 cycles = 20 rounds of 10 slots: shares 3,4,2,1 per round
    for (int i = 0; i < N; i++) begin
      checks++;
      if (wins[i] != 20 * SLOTS[i]) begin
        failures++;
        $display("FAIL device %0d won %0d, expected %0d", i, wins[i], 20 * SLOTS[i]);
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
