// tb_execute_unit: issues random instructions of all three op types on the
// function units for 400 cycles and checks, every cycle, that exactly the
// instructions issued `latency` cycles earlier (1, 2 or 5 by op type)
// complete, with their tags, and that nothing else does. Directed start: an
// op-type-0, -1 and -2 instruction issued together complete 1, 2 and 5
// cycles later.
module tb_execute_unit;
  import ooo_pkg::*;
  localparam int unsigned W = 3, NW = W * MAX_LAT;
  logic clk = 0, rst_n = 0;
  ren_instr_t issued [W];
  wake_t wake [NW];
  logic busy;
  int checks = 0, failures = 0;
  int due [int][$];       // cycle -> tags expected to complete then
  int cyc = 0;

  execute_unit #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int latency(int op);
    return (op == 0) ? 1 : (op == 1) ? 2 : 5;
  endfunction

  // Compare this cycle's completions with the expected tags.
  task automatic compare();
    int got[$], exp[$];
    for (int i = 0; i < NW; i++) if (wake[i].valid) got.push_back(int'(wake[i].tag));
    if (due.exists(cyc)) exp = due[cyc];
    got.sort(); exp.sort();
    check(got == exp, $sformatf("cycle %0d: %0d completions vs %0d", cyc, got.size(), exp.size()));
  endtask

  task automatic issue(int l, int op, int tag);
    issued[l] = '0;
    issued[l].valid   = 1'b1;
    issued[l].op      = op_t'(op);
    issued[l].dst_tag = tag_t'(tag);
    due[cyc + latency(op)].push_back(tag);
  endtask

  initial begin
    int tag = 0;
    for (int l = 0; l < W; l++) issued[l] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1; #1;
    check(!busy, "idle after reset");
    compare();
    issue(0, 0, 100); issue(1, 1, 101); issue(2, 2, 102);
    for (int c = 0; c < 400; c++) begin
      @(negedge clk); cyc++;
      for (int l = 0; l < W; l++) issued[l] = '0;
      #1;
      compare();
      if (cyc == 1) check(wake[0].valid && wake[0].tag == 100, "op type 0 done after 1 cycle");
      if (cyc == 2) check(wake[MAX_LAT + 1].valid && wake[MAX_LAT + 1].tag == 101, "op type 1 after 2");
      if (cyc == 5) check(wake[2 * MAX_LAT + 4].valid && wake[2 * MAX_LAT + 4].tag == 102, "op type 2 after 5");
      if (cyc >= 6 && c < 380)
        for (int l = 0; l < W; l++)
          if ($urandom_range(3) != 0) begin issue(l, int'($urandom_range(2)), tag % 512); tag++; end
    end
    check(!busy, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
