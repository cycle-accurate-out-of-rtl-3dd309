// tb_dispatch_stage: checks that DI moves a bundle into the IQ only when the
// IQ has room for all of it, that wakeups while it waits are kept, and that
// the bundle handed over includes the wakeups of the cycle it moves.
module tb_dispatch_stage;
  import ooo_pkg::*;
  localparam int unsigned W = 2, IQ = 8, NW = 2, IQC = $clog2(IQ + 1);
  logic clk = 0, rst_n = 0;
  logic di_load, di_free, iq_load;
  ren_instr_t di_in [W], iq_in [W];
  wake_t wake [NW];
  logic [IQC-1:0] iq_free;
  int checks = 0, failures = 0;

  dispatch_stage #(.WIDTH(W), .IQ_SIZE(IQ), .NWAKE(NW)) dut (.*);

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

  function automatic rsrc_t wait_on(int tag);
    return '{renamed: 1'b1, rdy: 1'b0, tag: tag_t'(tag)};
  endfunction

  initial begin
    for (int i = 0; i < NW; i++) wake[i] = '0;
    di_load = 0; iq_free = IQC'(1);
    for (int i = 0; i < W; i++) di_in[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1; #1;
    check(di_free && !iq_load, "empty after reset");
    di_in[0] = '{valid: 1'b1, seq: 1, op: 0, dst_tag: 2, src1: wait_on(4), src2: wait_on(5)};
    di_in[1] = '{valid: 1'b1, seq: 2, op: 1, dst_tag: 3, src1: wait_on(5), src2: wait_on(6)};
    di_load = 1;
    @(negedge clk); di_load = 0;
    wake[1] = '{valid: 1'b1, tag: tag_t'(5)}; #1;
    check(!iq_load && !di_free, "one free IQ entry is not enough for two");
    @(negedge clk); wake[1] = '0;
    wake[0] = '{valid: 1'b1, tag: tag_t'(6)};
    iq_free = IQC'(2); #1;
    check(iq_load && di_free, "dispatches with room for the bundle");
    check(!iq_in[0].src1.rdy && iq_in[0].src2.rdy && iq_in[1].src1.rdy, "kept wakeup of tag 5");
    check(iq_in[1].src2.rdy, "same-cycle wakeup of tag 6");
    check(iq_in[0].seq == 1 && iq_in[1].dst_tag == 3 && iq_in[1].valid, "fields carried");
    @(negedge clk); wake[0] = '0; #1;
    check(!iq_load && di_free, "empty after dispatch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
