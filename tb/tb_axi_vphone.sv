// tb_axi_vphone: the video phone workload at 40 MHz, scaled to a 0.5 ms window.
//
// Each master is a paced source whose demand matches the bandwidth table of
// the video phone scenario (read + write, MB/s): MPU 1.64 + 1.96, DSP
// 14.84 + 42.47, video encoder 59.93 + 14.25, DMA 1 28.24 + 28.24, DMA 2
// 28.10 + 28.10, 247.8 MB/s in all. With 16-beat bursts of 4 bytes (64 bytes
// per transaction) at 40 MHz a master needing B MB/s starts one transaction
// every 2560 / B cycles; the periods below are rounded down, so the demand is
// slightly above the table (about 250 MB/s). The read share of each master
// follows its read/write split, and 77 % of the traffic goes to the two memory
// controllers (slaves 6 and 7, random 0..16 cycle latency), which use data
// lock mode by default. The shared buses give 160 MB/s per direction.
//
// The window is 20000 cycles (0.5 ms); N_TX is the number of transactions a
// master must start in it. The workload meets its real-time condition if every
// master has finished all its transactions by cycle 21000 (5 % slack for the
// last transactions in flight). All read data and responses are checked as in
// the other end-to-end tests, and the bench prints the bandwidth carried.
module tb_axi_vphone;
  import axi_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned WINDOW = 20000;
  localparam int unsigned PER [N_MASTER] = '{711, 44, 34, 45, 45};
  localparam int unsigned NTX [N_MASTER] = '{WINDOW / 711, WINDOW / 44, WINDOW / 34,
                                             WINDOW / 45, WINDOW / 45};

  logic fin;
  int chk, fl, cy, rb, wb;

  ic_env #(.N_TX(NTX), .PERIOD(PER), .LEN(15),
           .LOCK_PCT('{0, 0, 0, 0, 0}), .GAP_PCT('{0, 0, 0, 0, 0}),
           .RD_PCT('{46, 26, 81, 50, 50}), .MEM_PCT('{77, 77, 77, 77, 77}),
           .DEADLINE(WINDOW + WINDOW / 20), .NAME("video phone")) e (
    .clk, .finished(fin), .checks(chk), .failures(fl), .cycles(cy), .r_beats(rb), .w_beats(wb));

  int checks = 0, failures = 0;

  initial begin
    real mbs_r, mbs_w;
    @(posedge clk);
    wait (fin);
    @(posedge clk);
    checks = chk; failures = fl;
    // bandwidth over the window at 40 MHz: beats * 4 B * 40e6 / cycles
    mbs_r = real'(rb) * 4.0 * 40.0 / real'(WINDOW);
    mbs_w = real'(wb) * 4.0 * 40.0 / real'(WINDOW);
    $display("video phone: done after %0d cycles; carried %0.1f MB/s read, %0.1f MB/s write (needed 132.7, 115.0)",
             cy, mbs_r, mbs_w);
    checks++;
    if (mbs_r + mbs_w < 247.7) begin
      failures++;
      $display("FAIL: carried %0.1f MB/s, below the 247.8 MB/s the scenario needs", mbs_r + mbs_w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
