// tb_axi_lockbuf: the video phone workload with data lock buffers of 1, 2 and
// 4 entries.
//
// Three copies of the test environment (ic_env) run the same paced video phone
// traffic as tb_axi_vphone (16-beat bursts, 77 % of the traffic to the two
// memory controllers, which use data lock mode), each with a different
// LOCK_DEPTH. With a small lock buffer more data lock requests meet a full
// buffer and go through hybrid mode (passed as normal, or held back).
//
// Checks, per depth: every master finishes its transactions by cycle 21000
// of a 20000-cycle window, all data and responses are correct (as in the other
// end-to-end tests), data lock mode was granted, and the carried bandwidth
// covers the 247.8 MB/s the scenario needs at 40 MHz. Across depths: the
// one-entry buffer did fill up (hybrid mode was used), and it sent at least as
// many requests through hybrid mode as the four-entry buffer did.
module tb_axi_lockbuf;
  import axi_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned WINDOW = 20000;
  localparam int unsigned PER [N_MASTER] = '{711, 44, 34, 45, 45};
  localparam int unsigned NTX [N_MASTER] = '{WINDOW / 711, WINDOW / 44, WINDOW / 34,
                                             WINDOW / 45, WINDOW / 45};
  localparam int NE = 3;
  localparam int unsigned DEPTH [NE] = '{1, 2, 4};

  logic [NE-1:0] fin;
  int chk [NE], fl [NE], cy [NE], rb [NE], wb [NE];
  int nlock [NE], nhyb [NE], nblk [NE];

  for (genvar k = 0; k < NE; k++) begin : g_env
    ic_env #(.N_TX(NTX), .PERIOD(PER), .LEN(15), .LOCK_DEPTH(DEPTH[k]),
             .LOCK_PCT('{0, 0, 0, 0, 0}), .GAP_PCT('{0, 0, 0, 0, 0}),
             .RD_PCT('{46, 26, 81, 50, 50}), .MEM_PCT('{77, 77, 77, 77, 77}),
             .DEADLINE(WINDOW + WINDOW / 20), .NAME($sformatf("lock buffer %0d", DEPTH[k]))) e (
      .clk, .finished(fin[k]), .checks(chk[k]), .failures(fl[k]), .cycles(cy[k]),
      .r_beats(rb[k]), .w_beats(wb[k]));
    assign nlock[k] = e.n_lock_ev;
    assign nhyb[k]  = e.n_hyb_ev;
    assign nblk[k]  = e.n_block_cyc;
  end

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    real mbs;
    @(posedge clk);
    wait (&fin);
    @(posedge clk);
    for (int k = 0; k < NE; k++) begin
      checks += chk[k]; failures += fl[k];
      mbs = real'(rb[k] + wb[k]) * 4.0 * 40.0 / real'(WINDOW);
      $display("lock buffer %0d: done after %0d cycles, %0.1f MB/s; %0d lock grants, %0d passed as normal, %0d held-back cycles",
               DEPTH[k], cy[k], mbs, nlock[k], nhyb[k], nblk[k]);
      check(mbs >= 247.7, $sformatf("lock buffer %0d carried %0.1f MB/s", DEPTH[k], mbs));
      check(nlock[k] > 0, $sformatf("lock buffer %0d: data lock mode was granted", DEPTH[k]));
    end
    check(nhyb[0] > 0, "one-entry lock buffer: hybrid mode was used");
    check(nhyb[0] >= nhyb[NE-1], "one-entry buffer passed at least as many requests as normal as the four-entry one");
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
