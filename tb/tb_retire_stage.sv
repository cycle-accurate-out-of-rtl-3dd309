// tb_retire_stage: checks that Retire takes the run of consecutive ready
// entries from the head (stopping at the first not-ready or empty entry, at
// most WIDTH), reports them in order, and asks the RMT to invalidate only for
// retiring instructions that have a destination.
module tb_retire_stage;
  import ooo_pkg::*;
  localparam int unsigned W = 4;
  rob_head_t head_win [W];
  logic [9:0] retire_n;
  rmt_wr_t rmt_inv [W];
  retire_t retired [W];
  int checks = 0, failures = 0;

  retire_stage #(.WIDTH(W), .CNT_W(10)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 300; t++) begin
      automatic int exp = 0;
      automatic bit run = 1;
      for (int i = 0; i < W; i++) begin
        head_win[i].valid = ($urandom_range(5) != 0);
        head_win[i].rdy   = ($urandom_range(3) != 0);
        head_win[i].tag   = tag_t'((t + i) % 512);
        head_win[i].dst   = '{valid: ($urandom_range(2) != 0), idx: areg_idx_t'($urandom_range(66))};
        head_win[i].seq   = seq_t'(1000 * t + i);
        head_win[i].pc    = pc_t'(4 * i + 'h40);
      end
      if (t == 0) for (int i = 0; i < W; i++) begin head_win[i].valid = 1; head_win[i].rdy = 1; end
      if (t == 1) begin head_win[0].rdy = 1; head_win[0].valid = 1; head_win[1].rdy = 0; head_win[2].rdy = 1; end
      #1;
      for (int i = 0; i < W; i++) begin
        run = run && head_win[i].valid && head_win[i].rdy;
        if (run) exp++;
        check(retired[i].valid == run && (!run || retired[i].seq == head_win[i].seq),
              $sformatf("t %0d slot %0d retired", t, i));
        check(rmt_inv[i].valid == (run && head_win[i].dst.valid) &&
              (!rmt_inv[i].valid || (rmt_inv[i].idx == head_win[i].dst.idx &&
                                     rmt_inv[i].tag == head_win[i].tag)),
              $sformatf("t %0d slot %0d invalidation", t, i));
      end
      check(int'(retire_n) == exp, $sformatf("t %0d: retire_n %0d vs %0d", t, retire_n, exp));
      if (t == 0) check(retire_n == 10'(W), "full-width retire");
      if (t == 1) check(retire_n == 10'd1, "stops at the first entry not ready");
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
