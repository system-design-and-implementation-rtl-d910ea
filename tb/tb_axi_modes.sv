// tb_axi_modes: the interconnect in its other transfer mode and with every
// arbitration policy on every kind of channel.
//
// Four copies of the test environment (ic_env) run side by side:
//  * normal mode (INTERLEAVE = 0) with the default policies: four requests
//    from two masters must take 8 cycles, and outside data lock bursts no two
//    transfers may follow each other back to back on a data channel;
//  * fixed priority on the address channels, lottery on the data channels,
//    TDMA on the write response channel;
//  * lottery / fixed priority / lottery;
//  * TDMA / round-robin / fixed priority.
// Each runs random reads and writes with data lock and hybrid traffic, with all
// data and responses checked by the behavioural masters and slaves. The
// interconnect's size parameters stay at their defaults.
module tb_axi_modes;
  import axi_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NE = 4;
  logic [NE-1:0] fin;
  int chk [NE], fl [NE], cy [NE], rb [NE], wb [NE];

  ic_env #(.INTERLEAVE(1'b0), .NAME("normal")) e0 (
    .clk, .finished(fin[0]), .checks(chk[0]), .failures(fl[0]), .cycles(cy[0]),
    .r_beats(rb[0]), .w_beats(wb[0]));
  ic_env #(.POL_ADDR(ARB_FIXED), .POL_DATA(ARB_LOTTERY), .POL_RESP(ARB_TDMA), .NAME("FLT")) e1 (
    .clk, .finished(fin[1]), .checks(chk[1]), .failures(fl[1]), .cycles(cy[1]),
    .r_beats(rb[1]), .w_beats(wb[1]));
  ic_env #(.POL_ADDR(ARB_LOTTERY), .POL_DATA(ARB_FIXED), .POL_RESP(ARB_LOTTERY), .NAME("LFL")) e2 (
    .clk, .finished(fin[2]), .checks(chk[2]), .failures(fl[2]), .cycles(cy[2]),
    .r_beats(rb[2]), .w_beats(wb[2]));
  ic_env #(.POL_ADDR(ARB_TDMA), .POL_DATA(ARB_RR), .POL_RESP(ARB_FIXED), .NAME("TRF")) e3 (
    .clk, .finished(fin[3]), .checks(chk[3]), .failures(fl[3]), .cycles(cy[3]),
    .r_beats(rb[3]), .w_beats(wb[3]));

  int checks = 0, failures = 0;

  initial begin
    @(posedge clk);
    wait (&fin);
    @(posedge clk);   // let the last results settle
    for (int e = 0; e < NE; e++) begin
      checks += chk[e]; failures += fl[e];
    end
    // normal mode halves the bus rate, so the same traffic must take longer
    checks++;
    if (!(cy[0] > cy[1] && cy[0] > cy[3])) begin
      failures++;
      $display("FAIL: normal mode run (%0d cycles) not slower than interleaved runs (%0d, %0d)",
               cy[0], cy[1], cy[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
