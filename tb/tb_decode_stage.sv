// tb_decode_stage: checks that DE holds a bundle while RN is not free, hands
// it to RN when RN frees, and accepts the next bundle in the same cycle.
module tb_decode_stage;
  import ooo_pkg::*;
  localparam int unsigned W = 4;
  logic clk = 0, rst_n = 0;
  logic busy, de_load, de_free, rn_free, rn_load;
  fe_instr_t de_in [W], rn_in [W];
  int checks = 0, failures = 0;

  decode_stage #(.WIDTH(W)) dut (.*);

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

  task automatic make(int n, int seq0);
    for (int i = 0; i < W; i++) begin
      de_in[i] = '0;
      de_in[i].valid = (i < n);
      de_in[i].seq   = seq_t'(seq0 + i);
    end
  endtask

  initial begin
    de_load = 0; rn_free = 0; make(0, 0);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1; #1;
    check(!busy && de_free && !rn_load, "empty after reset");
    make(3, 10); de_load = 1;
    @(negedge clk); de_load = 0; #1;
    check(busy && !de_free && !rn_load, "holds while RN busy");
    @(negedge clk); #1;
    check(busy && !rn_load, "still holds");
    rn_free = 1; #1;
    check(rn_load && de_free, "moves when RN frees");
    for (int i = 0; i < W; i++)
      check(rn_in[i].valid == (i < 3) && (i >= 3 || int'(rn_in[i].seq) == 10 + i), "bundle content");
    make(2, 13); de_load = 1;
    @(negedge clk); de_load = 0; #1;
    check(busy && rn_load && int'(rn_in[0].seq) == 13 && rn_in[1].valid && !rn_in[2].valid,
          "next bundle loaded while the first left");
    @(negedge clk); #1;
    check(!busy && de_free, "empty again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
