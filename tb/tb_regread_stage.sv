// tb_regread_stage: checks that RR keeps a bundle while DI is busy, that a
// wakeup broadcast while it waits is remembered, that the ROB ready bits are
// consulted when it advances, that a wakeup in the cycle of advancing is
// passed on, and that unrelated sources stay not ready.
module tb_regread_stage;
  import ooo_pkg::*;
  localparam int unsigned W = 2, ROB = 16, NW = 4;
  logic clk = 0, rst_n = 0;
  logic rr_load, rr_free, di_free, di_load;
  ren_instr_t rr_in [W], di_in [W];
  wake_t wake [NW];
  logic [ROB-1:0] rob_rdy;
  int checks = 0, failures = 0;

  regread_stage #(.WIDTH(W), .ROB_SIZE(ROB), .NWAKE(NW)) dut (.*);

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

  task automatic no_wake();
    for (int i = 0; i < NW; i++) wake[i] = '0;
  endtask

  initial begin
    no_wake(); rob_rdy = '0; rr_load = 0; di_free = 0;
    for (int i = 0; i < W; i++) rr_in[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    rr_in[0] = '{valid: 1'b1, seq: 4, op: 0, dst_tag: 9, src1: wait_on(3), src2: wait_on(5)};
    rr_in[1] = '{valid: 1'b1, seq: 5, op: 1, dst_tag: 10, src1: wait_on(6),
                 src2: '{renamed: 1'b0, rdy: 1'b1, tag: '0}};
    rr_load = 1;
    @(negedge clk); rr_load = 0;
    wake[2] = '{valid: 1'b1, tag: tag_t'(3)};   // tag 3 completes while waiting
    #1;
    check(!di_load && !rr_free, "held while DI busy");
    @(negedge clk); no_wake(); #1;
    check(!di_load, "still held");
    rob_rdy[5] = 1'b1;                 // tag 5 written back this cycle
    wake[0] = '{valid: 1'b1, tag: tag_t'(7)};   // unrelated tag
    di_free = 1; #1;
    check(di_load && rr_free, "advances when DI frees");
    check(di_in[0].src1.rdy, "remembered wakeup");
    check(di_in[0].src2.rdy, "ROB ready bit seen on advance");
    check(!di_in[1].src1.rdy, "waiting source stays not ready");
    check(di_in[1].src2.rdy, "unrenamed source ready");
    check(di_in[0].seq == 4 && di_in[1].dst_tag == 10, "fields carried");
    // same-cycle wakeup on advance
    @(negedge clk); no_wake(); rob_rdy = '0;
    rr_in[0] = '{valid: 1'b1, seq: 6, op: 2, dst_tag: 11, src1: wait_on(12), src2: wait_on(12)};
    rr_in[1] = '0;
    rr_load = 1;
    @(negedge clk); rr_load = 0;
    wake[3] = '{valid: 1'b1, tag: tag_t'(12)}; #1;
    check(di_load && di_in[0].src1.rdy && di_in[0].src2.rdy && !di_in[1].valid,
          "wakeup in the cycle of advancing");
    @(negedge clk); no_wake(); #1;
    check(!di_load && rr_free, "empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
