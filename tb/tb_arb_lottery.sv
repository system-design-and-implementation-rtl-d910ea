// tb_arb_lottery: compares the lottery arbiter with a reference model of its
// draw (same LFSR, draw = (lfsr * sum) >> 16, ranges in index order). It uses
// tickets 5,4,3,2,1 and checks the worked example of the policy: requests from
// devices 0, 1 and 3 (sum 11) and a draw of 9 (the tenth ticket) grant device
// 3. Finally, with everybody requesting, each device's share of 11000 draws
// must be within 15 % of its ticket share.
module tb_arb_lottery;
  localparam int unsigned N = 5;
  localparam logic [N-1:0][7:0] T = {8'd1, 8'd2, 8'd3, 8'd4, 8'd5};
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [N-1:0] req = '0, grant;
  int checks = 0, failures = 0;
  logic [15:0] lfsr;
  int wins [N];
  bit seen_example = 0;

  arb_lottery #(.N(N), .TICKETS(T)) dut (.clk, .rst_n, .req, .accept(1'b1), .grant);

  function automatic int draw_of(input logic [N-1:0] r, input logic [15:0] l);
    int sum;
    sum = 0;
    for (int i = 0; i < N; i++) if (r[i]) sum += int'(T[i]);
    return (int'(l) * sum) >>> 16;
  endfunction

  function automatic logic [N-1:0] model(input logic [N-1:0] r, input logic [15:0] l);
    int d, acc;
    d = draw_of(r, l); acc = 0;
    for (int i = 0; i < N; i++) if (r[i]) begin
      if (d < acc + int'(T[i])) return N'(1) << i;
      acc += int'(T[i]);
    end
    return '0;
  endfunction

  task automatic step(input logic [N-1:0] r);
    req = r;
    #1;
    checks++;
    if (grant !== model(r, lfsr)) begin
      failures++;
      $display("FAIL req=%b lfsr=%h grant=%b expected=%b", r, lfsr, grant, model(r, lfsr));
    end
    if (r == 5'b01011 && draw_of(r, lfsr) == 9) begin
      seen_example = 1;
      checks++;
      if (grant !== 5'b01000) begin failures++; $display("FAIL worked example"); end
    end
    if (r == '1) for (int i = 0; i < N; i++) if (grant[i]) wins[i]++;
    @(posedge clk);
    lfsr = {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
    @(negedge clk);
  endtask

  initial begin
    lfsr = 16'hACE1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) step(5'b01011);
    checks++;
    if (!seen_example) begin failures++; $display("FAIL example draw never occurred"); end
    for (int t = 0; t < 300; t++) step(N'($urandom()));
    for (int t = 0; t < 11000; t++) step('1);
    for (int i = 0; i < N; i++) begin
      int expw;
      expw = 11000 * T[i] / 15;
      checks++;
      if (wins[i] < expw * 85 / 100 || wins[i] > expw * 115 / 100) begin
        failures++;
        $display("FAIL share of device %0d: %0d wins, expected about %0d", i, wins[i], expw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
