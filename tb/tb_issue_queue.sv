// tb_issue_queue: runs the Issue Queue for 3000 cycles with random dispatch
// bundles and random wakeup tags, next to a queue model that issues the way
// the described model does: up to WIDTH times, the ready entry with the
// lowest sequence number. Every cycle the issued instructions (in order),
// the free-entry count and the occupancy are compared. Directed checks at
// the start: an entry dispatched in a cycle cannot issue in that cycle, a
// younger ready entry issues ahead of an older waiting one, and a wakeup
// lets an entry issue in the same cycle.
module tb_issue_queue;
  import ooo_pkg::*;
  localparam int unsigned W = 2, IQ = 8, NW = 3, IQC = $clog2(IQ + 1);
  logic clk = 0, rst_n = 0;
  wake_t wake [NW];
  logic iq_load;
  ren_instr_t iq_in [W], issued [W];
  logic [IQC-1:0] iq_free, iq_count;
  int checks = 0, failures = 0;
  ren_instr_t mq[$];
  int seq = 0;

  issue_queue #(.WIDTH(W), .IQ_SIZE(IQ), .NWAKE(NW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic rsrc_t src(bit ren, int tag);
    return '{renamed: ren, rdy: !ren, tag: ren ? tag_t'(tag) : '0};
  endfunction

  function automatic ren_instr_t mk(rsrc_t a, rsrc_t b);
    ren_instr_t e;
    e = '{valid: 1'b1, seq: seq_t'(seq), op: op_t'(seq % 3), dst_tag: tag_t'(seq % 16), src1: a, src2: b};
    seq++;
    return e;
  endfunction

  // One cycle of the model: wakeup, WIDTH oldest-first passes, append.
  // Compares with the DUT outputs, which must be settled.
  task automatic model_cycle();
    ren_instr_t exp [W];
    int n = 0, nfree;
    foreach (mq[i]) for (int k = 0; k < NW; k++) if (wake[k].valid) begin
      if (mq[i].src1.renamed && mq[i].src1.tag == wake[k].tag) mq[i].src1.rdy = 1'b1;
      if (mq[i].src2.renamed && mq[i].src2.tag == wake[k].tag) mq[i].src2.rdy = 1'b1;
    end
    for (int p = 0; p < W; p++) exp[p] = '0;
    for (int p = 0; p < W; p++) begin
      int best = -1;
      foreach (mq[i])
        if (mq[i].src1.rdy && mq[i].src2.rdy && (best < 0 || mq[i].seq < mq[best].seq)) best = i;
      if (best < 0) break;
      exp[p] = mq[best];
      mq.delete(best);
      n++;
    end
    check(int'(iq_count) == mq.size() + n, $sformatf("count %0d vs %0d", iq_count, mq.size() + n));
    nfree = IQ - mq.size();
    check(int'(iq_free) == nfree, $sformatf("free %0d vs %0d", iq_free, nfree));
    for (int p = 0; p < W; p++)
      check(issued[p].valid == exp[p].valid && (!exp[p].valid || issued[p].seq == exp[p].seq),
            $sformatf("issue slot %0d: %0d/%0d vs %0d/%0d", p, issued[p].valid, issued[p].seq,
                      exp[p].valid, exp[p].seq));
    if (iq_load) for (int k = 0; k < W; k++) if (iq_in[k].valid) mq.push_back(iq_in[k]);
  endtask

  task automatic no_inputs();
    for (int k = 0; k < NW; k++) wake[k] = '0;
    for (int k = 0; k < W; k++) iq_in[k] = '0;
    iq_load = 0;
  endtask

  initial begin
    no_inputs();
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1; #1;
    check(iq_free == IQC'(IQ) && iq_count == '0, "empty after reset");
    // directed: A waits on tag 5, B ready
    iq_in[0] = mk(src(1, 5), src(0, 0));
    iq_in[1] = mk(src(0, 0), src(0, 0));
    iq_load = 1; #1;
    check(!issued[0].valid, "nothing issues in the cycle of dispatch");
    model_cycle();
    @(negedge clk); no_inputs(); #1;
    check(issued[0].valid && issued[0].seq == 1 && !issued[1].valid, "younger ready entry bypasses");
    model_cycle();
    @(negedge clk); wake[1] = '{valid: 1'b1, tag: tag_t'(5)}; #1;
    check(issued[0].valid && issued[0].seq == 0, "wakeup and issue in the same cycle");
    model_cycle();
    // random
    for (int c = 0; c < 3000; c++) begin
      int n;
      @(negedge clk); no_inputs();
      for (int k = 0; k < NW; k++)
        if ($urandom_range(2) == 0) wake[k] = '{valid: 1'b1, tag: tag_t'($urandom_range(15))};
      n = int'($urandom_range(W));
      for (int k = 0; k < n; k++)
        iq_in[k] = mk(src($urandom_range(1) == 1, $urandom_range(15)),
                      src($urandom_range(2) == 0, $urandom_range(15)));
      #1;
      iq_load = (n > 0) && (int'(iq_free) >= n);
      if (!iq_load) seq -= n;        // bundle not taken: reuse its numbers
      #1;
      model_cycle();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
