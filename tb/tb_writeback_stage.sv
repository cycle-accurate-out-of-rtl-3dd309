// tb_writeback_stage: checks that the tags completed in one cycle appear as
// ROB ready marks in the next cycle, and only then.
module tb_writeback_stage;
  import ooo_pkg::*;
  localparam int unsigned W = 2, ROB = 16, NWB = W * MAX_LAT;
  logic clk = 0, rst_n = 0;
  wake_t wb_in [NWB];
  logic [ROB-1:0] rob_set_rdy;
  logic busy;
  int checks = 0, failures = 0;

  writeback_stage #(.WIDTH(W), .ROB_SIZE(ROB)) dut (.*);

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

  initial begin
    logic [ROB-1:0] exp;
    for (int i = 0; i < NWB; i++) wb_in[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1; #1;
    check(rob_set_rdy == '0 && !busy, "empty after reset");
    for (int t = 0; t < 20; t++) begin
      exp = '0;
      for (int i = 0; i < NWB; i++) begin
        wb_in[i].valid = ($urandom_range(3) == 0);
        wb_in[i].tag   = tag_t'($urandom_range(ROB - 1));
        if (wb_in[i].valid) exp[wb_in[i].tag] = 1'b1;
      end
      #1;
      @(negedge clk);
      for (int i = 0; i < NWB; i++) wb_in[i] = '0;
      #1;
      check(rob_set_rdy == exp, $sformatf("cycle %0d: mask %h vs %h", t, rob_set_rdy, exp));
      check(busy == (exp != '0), "busy");
      @(negedge clk); #1;
      check(rob_set_rdy == '0, "WB empties after one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
