// tb_fetch_stage: checks that Fetch takes a trace bundle only when DE is
// free, numbers the instructions consecutively from 0 across bundles of
// different sizes, and copies the trace fields into DE.
module tb_fetch_stage;
  import ooo_pkg::*;
  localparam int unsigned W = 4;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] trace_valid;
  trace_instr_t trace_in [W];
  logic trace_ready, de_free, de_load;
  fe_instr_t de_in [W];
  int checks = 0, failures = 0;

  fetch_stage #(.WIDTH(W)) dut (.*);

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

  task automatic offer(int n, int base_pc);
    for (int i = 0; i < W; i++) begin
      trace_valid[i]      = (i < n);
      trace_in[i].pc      = pc_t'(base_pc + 4 * i);
      trace_in[i].op      = op_t'(i % 3);
      trace_in[i].dst     = '{valid: 1'b1, idx: areg_idx_t'(i + 10)};
      trace_in[i].src1    = '{valid: (i % 2 == 0), idx: areg_idx_t'(i)};
      trace_in[i].src2    = '{valid: 1'b0, idx: '0};
    end
  endtask

  task automatic expect_bundle(int n, int seq0, int base_pc);
    check(de_load == 1'b1, "de_load");
    for (int i = 0; i < W; i++) begin
      check(de_in[i].valid == (i < n), $sformatf("slot %0d valid", i));
      if (i < n) begin
        check(int'(de_in[i].seq) == seq0 + i, $sformatf("slot %0d seq %0d", i, de_in[i].seq));
        check(int'(de_in[i].pc) == base_pc + 4 * i, "pc copied");
        check(de_in[i].dst.idx == areg_idx_t'(i + 10) && de_in[i].op == op_t'(i % 3), "fields copied");
        check(de_in[i].src1.valid == (i % 2 == 0), "src1 valid copied");
      end
    end
  endtask

  initial begin
    trace_valid = '0; de_free = 1'b1;
    for (int i = 0; i < W; i++) trace_in[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    offer(3, 'h100); #1;
    check(trace_ready, "ready while DE free");
    expect_bundle(3, 0, 'h100);
    @(negedge clk);
    offer(4, 'h200); de_free = 1'b0; #1;
    check(!trace_ready && !de_load, "no fetch while DE busy");
    @(negedge clk);
    de_free = 1'b1; #1;
    expect_bundle(4, 3, 'h200);
    @(negedge clk);
    offer(1, 'h300); #1;
    expect_bundle(1, 7, 'h300);
    @(negedge clk);
    offer(0, 'h400); #1;
    check(!de_load, "no load without trace");
    @(negedge clk);
    offer(2, 'h500); #1;
    expect_bundle(2, 8, 'h500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
