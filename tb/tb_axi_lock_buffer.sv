// tb_axi_lock_buffer: random inserts, deletes and queries against a reference
// multiset of keys (deletes sometimes name an absent key); checks q_hit for
// every query port, del_hit and the full flag, and
// that a key recorded twice survives one delete.
module tb_axi_lock_buffer;
  localparam int unsigned DEPTH = 4, KW = 6, NQ = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic ins_valid = 0, del_valid = 0, full;
  logic [KW-1:0] ins_key = '0, del_key = '0;
  logic [NQ-1:0][KW-1:0] q_key = '0;
  logic [NQ-1:0] q_hit;
  logic del_hit;
  int checks = 0, failures = 0;
  int ref_keys [$];

  axi_lock_buffer #(.DEPTH(DEPTH), .KW(KW), .N_Q(NQ)) dut (.*);

  function automatic bit has(input int k);
    foreach (ref_keys[i]) if (ref_keys[i] == k) return 1;
    return 0;
  endfunction

  task automatic cmp();
    #1;
    for (int q = 0; q < NQ; q++) begin
      checks++;
      if (q_hit[q] !== has(int'(q_key[q]))) begin
        failures++; $display("FAIL key %0d hit=%b", q_key[q], q_hit[q]);
      end
    end
    checks++;
    if (del_hit !== (del_valid && has(int'(del_key)))) begin
      failures++; $display("FAIL del key %0d del_hit=%b", del_key, del_hit);
    end
    checks++;
    if (full !== (ref_keys.size() == DEPTH)) begin failures++; $display("FAIL full=%b size=%0d", full, ref_keys.size()); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // duplicate key
    ins_valid = 1; ins_key = 6'd9; @(negedge clk);
    ins_key = 6'd9; @(negedge clk);
    ins_valid = 0; ref_keys = '{9, 9};
    del_valid = 1; del_key = 6'd9; @(negedge clk); del_valid = 0;
    ref_keys.pop_front();
    q_key[0] = 6'd9; cmp();
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      // choose operations for this cycle
      del_valid = ref_keys.size() != 0 && $urandom_range(2, 0) == 0;
      if (del_valid) del_key = ($urandom_range(3, 0) == 0) ? KW'($urandom_range(15, 0))
                                : KW'(ref_keys[$urandom_range(ref_keys.size() - 1, 0)]);
      ins_valid = !full && $urandom_range(1, 0) == 1;
      ins_key   = KW'($urandom_range(15, 0));
      for (int q = 0; q < NQ; q++)
        q_key[q] = (ref_keys.size() != 0 && $urandom_range(1, 0) == 1)
                   ? KW'(ref_keys[$urandom_range(ref_keys.size() - 1, 0)]) : KW'($urandom_range(15, 0));
      cmp();
      @(posedge clk);
      if (del_valid) foreach (ref_keys[i]) if (ref_keys[i] == int'(del_key)) begin ref_keys.delete(i); break; end
      if (ins_valid) ref_keys.push_back(int'(ins_key));
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
