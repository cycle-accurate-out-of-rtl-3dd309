// tb_rename_stage: checks Rename on one bundle of four instructions with a
// ROB tail that wraps (tags 14, 15, 0, 1 of a 16-entry ROB):
//   i0: r1 <- r2        r2 mapped to tag 7 in the RMT
//   i1: r3 <- r1, r5    r1 from i0 in the same bundle, r5 unmapped (ready)
//   i2: r1 <- r1        r1 from i0
//   i3: -  <- r1, r3    r1 from i2 (the youngest older writer), r3 from i1
// and the all-or-nothing ROB check (3 free entries stall, 4 proceed), the
// RR-free check, and the RMT writes.
module tb_rename_stage;
  import ooo_pkg::*;
  localparam int unsigned W = 4, ROB = 16, CW = $clog2(ROB + 1);
  logic clk = 0, rst_n = 0;
  logic busy, rn_load, rn_free, rob_alloc, rr_free, rr_load;
  fe_instr_t rn_in [W], rob_alloc_in [W];
  tag_t rob_tail;
  logic [CW-1:0] rob_free;
  areg_idx_t rmt_rd_idx [2*W];
  rmt_entry_t rmt_rd_data [2*W];
  rmt_wr_t rmt_wr [W];
  ren_instr_t rr_in [W];
  rmt_entry_t map [NUM_AREGS];
  int checks = 0, failures = 0;

  rename_stage #(.WIDTH(W), .ROB_SIZE(ROB)) dut (.*);

  always_comb
    for (int i = 0; i < 2 * W; i++) rmt_rd_data[i] = map[rmt_rd_idx[i]];

  always #5 clk = ~clk;
  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic areg_t r(int i);
    return (i < 0) ? areg_t'('0) : '{valid: 1'b1, idx: areg_idx_t'(i)};
  endfunction

  task automatic expect_src(rsrc_t s, bit ren, int tag, string what);
    check(s.renamed == ren && s.rdy == !ren && (!ren || int'(s.tag) == tag),
          $sformatf("%s: renamed %0d tag %0d rdy %0d", what, s.renamed, s.tag, s.rdy));
  endtask

  initial begin
    foreach (map[i]) map[i] = '0;
    map[2] = '{valid: 1'b1, tag: tag_t'(7)};
    rn_load = 0; rr_free = 1; rob_tail = tag_t'(14); rob_free = CW'(3);
    for (int i = 0; i < W; i++) rn_in[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    rn_in[0] = '{valid: 1'b1, seq: 0, pc: 'h10, op: 0, dst: r(1), src1: r(2),  src2: r(-1)};
    rn_in[1] = '{valid: 1'b1, seq: 1, pc: 'h14, op: 1, dst: r(3), src1: r(1),  src2: r(5)};
    rn_in[2] = '{valid: 1'b1, seq: 2, pc: 'h18, op: 2, dst: r(1), src1: r(1),  src2: r(-1)};
    rn_in[3] = '{valid: 1'b1, seq: 3, pc: 'h1c, op: 0, dst: r(-1), src1: r(1), src2: r(3)};
    rn_load = 1;
    @(negedge clk); rn_load = 0; #1;
    check(busy && !rr_load && !rn_free, "ROB with 3 free entries stalls a 4-bundle");
    for (int k = 0; k < W; k++) check(!rmt_wr[k].valid, "no RMT write while stalled");
    rob_free = CW'(4); rr_free = 0; #1;
    check(!rr_load, "stalls while RR is not free");
    rr_free = 1; #1;
    check(rr_load && rob_alloc && rn_free, "advances with room");
    check(int'(rr_in[0].dst_tag) == 14 && int'(rr_in[1].dst_tag) == 15 &&
          int'(rr_in[2].dst_tag) == 0 && int'(rr_in[3].dst_tag) == 1, "dst tags wrap");
    expect_src(rr_in[0].src1, 1, 7,  "i0 src1 from RMT");
    expect_src(rr_in[0].src2, 0, 0,  "i0 src2 none");
    expect_src(rr_in[1].src1, 1, 14, "i1 src1 from i0");
    expect_src(rr_in[1].src2, 0, 0,  "i1 src2 unmapped");
    expect_src(rr_in[2].src1, 1, 14, "i2 src1 from i0");
    expect_src(rr_in[3].src1, 1, 0,  "i3 src1 from i2");
    expect_src(rr_in[3].src2, 1, 15, "i3 src2 from i1");
    check(rmt_wr[0].valid && rmt_wr[0].idx == 1 && int'(rmt_wr[0].tag) == 14, "RMT write i0");
    check(rmt_wr[1].valid && rmt_wr[1].idx == 3 && int'(rmt_wr[1].tag) == 15, "RMT write i1");
    check(rmt_wr[2].valid && rmt_wr[2].idx == 1 && int'(rmt_wr[2].tag) == 0,  "RMT write i2");
    check(!rmt_wr[3].valid, "no RMT write without dst");
    check(rob_alloc_in[2].seq == 2 && rob_alloc_in[2].pc == 'h18 && rob_alloc_in[2].dst == r(1),
          "ROB allocation data");
    check(rr_in[1].seq == 1 && rr_in[2].op == 2, "seq and op carried");
    @(negedge clk); #1;
    check(!busy && !rr_load, "empty after advancing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
