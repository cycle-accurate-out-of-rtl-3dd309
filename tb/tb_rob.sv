// tb_rob: runs an 8-entry ROB for 2000 cycles with random allocation
// bundles, random writebacks of occupied entries and retirement of the
// ready run at the head, next to a circular-buffer model. Every cycle it
// compares tail, occupancy, free count (which must include this cycle's
// retirements), the head window with its ready bits, and the ready view
// that includes this cycle's writebacks. It also checks that the buffer
// wraps around and becomes full at least once.
module tb_rob;
  import ooo_pkg::*;
  localparam int unsigned W = 2, ROB = 8, CW = $clog2(ROB + 1);
  logic clk = 0, rst_n = 0;
  logic alloc;
  fe_instr_t alloc_in [W];
  tag_t tail;
  logic [CW-1:0] rob_free, retire_n, count;
  logic [ROB-1:0] set_rdy, rdy_now;
  rob_head_t head_win [W];
  int checks = 0, failures = 0;
  // model
  int m_head = 0, m_tail = 0, m_cnt = 0, m_seq[ROB], m_dst[ROB];
  bit m_rdy[ROB];
  int seq = 0, wraps = 0, fulls = 0;

  rob #(.WIDTH(W), .ROB_SIZE(ROB)) dut (.*);

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

  initial begin
    alloc = 0; set_rdy = '0; retire_n = '0;
    for (int k = 0; k < W; k++) alloc_in[k] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      automatic int nret = 0, nal = 0, mfree = 0;
      // retirement decided from the model's ready bits at the head
      for (int i = 0; i < W; i++) begin
        automatic int t = (m_head + i) % ROB;
        if (i < m_cnt && m_rdy[t] && nret == i) nret++;
      end
      retire_n = CW'(nret);
      // writebacks of occupied, not-ready entries
      set_rdy = '0;
      for (int i = 0; i < m_cnt; i++) begin
        automatic int t = (m_head + i) % ROB;
        if (!m_rdy[t] && $urandom_range(2) == 0) set_rdy[t] = 1'b1;
      end
      #1;
      // compare
      check(int'(tail) == m_tail && int'(count) == m_cnt, $sformatf("c %0d tail/count", c));
      mfree = ROB - m_cnt + nret;
      check(int'(rob_free) == mfree, $sformatf("c %0d free %0d vs %0d", c, rob_free, mfree));
      for (int i = 0; i < W; i++) begin
        automatic int t = (m_head + i) % ROB;
        check(head_win[i].valid == (i < m_cnt), "head window valid");
        if (i < m_cnt)
          check(int'(head_win[i].tag) == t && head_win[i].rdy == m_rdy[t] &&
                int'(head_win[i].seq) == m_seq[t] && int'(head_win[i].dst.idx) == m_dst[t],
                $sformatf("c %0d head %0d entry", c, i));
      end
      for (int t = 0; t < ROB; t++)
        check(rdy_now[t] == ((m_rdy[t] && 1'b1) || set_rdy[t]) || !(((t - m_head + ROB) % ROB) < m_cnt),
              "ready view");
      // allocation
      nal = int'($urandom_range(W));
      alloc = (nal > 0) && (mfree >= nal);
      for (int k = 0; k < W; k++) begin
        alloc_in[k] = '0;
        alloc_in[k].valid = (k < nal);
        alloc_in[k].seq = seq_t'(seq + k);
        alloc_in[k].dst = '{valid: 1'b1, idx: areg_idx_t'((seq + k) % 67)};
      end
      // advance the model
      for (int t = 0; t < ROB; t++) if (set_rdy[t]) m_rdy[t] = 1;
      m_head = (m_head + nret) % ROB; m_cnt -= nret;
      if (alloc) for (int k = 0; k < nal; k++) begin
        m_seq[m_tail] = seq + k; m_dst[m_tail] = (seq + k) % 67; m_rdy[m_tail] = 0;
        m_tail = (m_tail + 1) % ROB; m_cnt++;
        if (m_tail == 0) wraps++;
      end
      if (alloc) seq += nal;
      if (m_cnt == ROB) fulls++;
      @(negedge clk);
    end
    check(wraps > 2 && fulls > 0, $sformatf("wrapped %0d times, full %0d times", wraps, fulls));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
