// tb_axi_wdata_table: fills and clears random (master, ID) entries with random
// slave indices and checks every entry's valid bit and destination against a
// reference table after each cycle.
module tb_axi_wdata_table;
  localparam int unsigned NM = 5, NID = 8, SW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic set_valid = 0, clr_valid = 0;
  logic [2:0] set_m = '0, clr_m = '0, set_id = '0, clr_id = '0;
  logic [SW-1:0] set_dst = '0;
  logic [NM-1:0][NID-1:0] vld;
  logic [NM-1:0][NID-1:0][SW-1:0] dst;
  int checks = 0, failures = 0;
  bit rv [NM][NID];
  int rd [NM][NID];

  axi_wdata_table #(.N_M(NM), .N_ID(NID), .SW(SW)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      int m, i, cm, ci;
      m = $urandom_range(NM - 1, 0); i = $urandom_range(NID - 1, 0);
      cm = $urandom_range(NM - 1, 0); ci = $urandom_range(NID - 1, 0);
      set_m = 3'(m); set_id = 3'(i); set_dst = SW'($urandom_range(10, 0));
      clr_m = 3'(cm); clr_id = 3'(ci);
      clr_valid = rv[cm][ci] && $urandom_range(1, 0) == 1;
      set_valid = (!rv[m][i] || (clr_valid && cm == m && ci == i)) && $urandom_range(1, 0) == 1;
      @(posedge clk);
      if (clr_valid) rv[cm][ci] = 0;
      if (set_valid) begin rv[m][i] = 1; rd[m][i] = int'(set_dst); end
      @(negedge clk);
      for (int a = 0; a < NM; a++)
        for (int b = 0; b < NID; b++) begin
          checks++;
          if (vld[a][b] !== rv[a][b] || (rv[a][b] && int'(dst[a][b]) != rd[a][b])) begin
            failures++; $display("FAIL entry %0d/%0d", a, b);
          end
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
