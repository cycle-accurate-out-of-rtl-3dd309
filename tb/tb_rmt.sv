// tb_rmt: checks the Rename Map Table: reset state, writes (younger port
// wins), reads that already see this cycle's invalidations, the stale-rename
// guard (an invalidation with an outdated tag leaves the entry alone) and a
// write beating an invalidation of the same register in the same cycle.
module tb_rmt;
  import ooo_pkg::*;
  localparam int unsigned NRD = 2, NWR = 2, NINV = 2;
  logic clk = 0, rst_n = 0;
  rmt_wr_t inv [NINV], wr [NWR];
  areg_idx_t rd_idx [NRD];
  rmt_entry_t rd_data [NRD];
  int checks = 0, failures = 0;

  rmt #(.NUM_REGS(67), .NRD(NRD), .NWR(NWR), .NINV(NINV)) dut (.*);

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

  task automatic idle_ports();
    for (int i = 0; i < NINV; i++) inv[i] = '0;
    for (int i = 0; i < NWR; i++) wr[i] = '0;
  endtask

  function automatic rmt_wr_t req(int idx, int tag);
    return '{valid: 1'b1, idx: areg_idx_t'(idx), tag: tag_t'(tag)};
  endfunction

  task automatic read(int a, int b);
    rd_idx[0] = areg_idx_t'(a); rd_idx[1] = areg_idx_t'(b); #1;
  endtask

  initial begin
    idle_ports(); read(0, 66);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    read(0, 66);
    check(!rd_data[0].valid && !rd_data[1].valid, "all invalid after reset");
    wr[0] = req(5, 10); wr[1] = req(5, 11);
    @(negedge clk); idle_ports(); wr[0] = req(66, 3);
    @(negedge clk); idle_ports();
    read(5, 66);
    check(rd_data[0].valid && int'(rd_data[0].tag) == 11, "younger write port wins");
    check(rd_data[1].valid && int'(rd_data[1].tag) == 3, "r66 mapped");
    // stale invalidation: r5 now maps to 11, retiring tag 10 must not clear it
    inv[0] = req(5, 10); read(5, 66);
    check(rd_data[0].valid && int'(rd_data[0].tag) == 11, "stale invalidation ignored");
    @(negedge clk); idle_ports(); read(5, 66);
    check(rd_data[0].valid, "still mapped after stale invalidation");
    // matching invalidation is seen by reads in the same cycle
    inv[1] = req(66, 3); read(5, 66);
    check(!rd_data[1].valid && rd_data[0].valid, "invalidation visible to same-cycle read");
    @(negedge clk); idle_ports(); read(5, 66);
    check(!rd_data[1].valid, "invalidated");
    // write and invalidation of the same register in one cycle: write wins
    inv[0] = req(5, 11); wr[0] = req(5, 20);
    @(negedge clk); idle_ports(); read(5, 0);
    check(rd_data[0].valid && int'(rd_data[0].tag) == 20, "rename write wins over retire");
    check(!rd_data[1].valid, "r0 untouched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
