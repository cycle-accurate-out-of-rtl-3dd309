// tb_ooo_sweep: the same synthetic trace run on twelve configurations of the
// pipeline, taken from the two sweeps the design was evaluated with:
//   * ROB 512 with WIDTH 1, 2, 4, 8 and IQ_SIZE 8, 32, 128 (IQ sweep);
//   * WIDTH 8 with IQ 128 and ROB 32, 128, 256 (ROB sweep);
//   (WIDTH 8 / IQ 128 / ROB 512 is shared by both).
// For each, the trace is streamed in, the retirement stream is checked to be
// in program order without gaps, and the total cycle count must equal what
// the reference model gives for that configuration. The IPC table is
// printed. The trace is a gcc-like mix (50/25/25 % op types 0/1/2, 16
// registers); the real benchmark traces are not part of this design.
module tb_ooo_sweep;
  import ooo_pkg::*;
  import ooo_ref_pkg::*;

  localparam int NCFG = 12;
  localparam int N    = 3000;
  localparam int unsigned CW   [NCFG] = '{1, 1, 1, 2, 2, 2, 4, 4, 4, 8, 8, 8};
  localparam int unsigned CIQ  [NCFG] = '{8, 32, 128, 8, 32, 128, 8, 32, 128, 128, 128, 128};
  localparam int unsigned CROB [NCFG] = '{512, 512, 512, 512, 512, 512, 512, 512, 512, 32, 128, 512};

  logic clk = 0, rst_n = 0;
  trace_instr_t tr [N];
  int rtl_cycles [NCFG];
  bit rtl_done [NCFG];
  int order_errors [NCFG];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic areg_t areg(int r);
    return (r >= 0) ? '{valid: 1'b1, idx: areg_idx_t'(r)} : areg_t'('0);
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : cfg
    localparam int unsigned W = CW[g];
    logic [W-1:0] tv;
    trace_instr_t ti [W];
    logic tr_rdy, idl;
    retire_t ret [W];
    logic [63:0] cc, rc;
    int ptr = 0, next_seq = 0, nf;

    ooo_top #(.WIDTH(W), .IQ_SIZE(CIQ[g]), .ROB_SIZE(CROB[g])) dut (
      .clk, .rst_n, .trace_valid(tv), .trace_in(ti), .trace_ready(tr_rdy), .retired(ret),
      .cycle_count(cc), .retired_count(rc), .idle(idl));

    always_comb
      for (int i = 0; i < W; i++) begin
        tv[i] = (ptr + i < N);
        ti[i] = (ptr + i < N) ? tr[ptr + i] : '0;
      end

    always @(posedge clk) if (rst_n && !rtl_done[g]) begin
      for (int i = 0; i < W; i++)
        if (ret[i].valid) begin
          if (int'(ret[i].seq) != next_seq) order_errors[g]++;
          next_seq++;
        end
      if (idl && ptr == N) begin
        rtl_done[g]   <= 1'b1;
        rtl_cycles[g] <= int'(cc);
      end
      nf = 0;
      if (tr_rdy && tv[0]) for (int i = 0; i < W; i++) if (tv[i]) nf++;
      ptr <= ptr + nf;
    end
  end

  initial begin
    ooo_ref m;
    m = new(1, 8, 32);
    m.gen_random(N, 16, 50, 25, 90, 70);
    foreach (tr[i]) begin
      tr[i].pc   = pc_t'(m.trace[i].pc);
      tr[i].op   = op_t'(m.trace[i].op);
      tr[i].dst  = areg(m.trace[i].dst);
      tr[i].src1 = areg(m.trace[i].s1);
      tr[i].src2 = areg(m.trace[i].s2);
    end
    for (int g = 0; g < NCFG; g++) begin rtl_done[g] = 0; order_errors[g] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (rtl_done.and() == 1'b1);
    $display("WIDTH IQ_SIZE ROB_SIZE  cycles  IPC");
    for (int g = 0; g < NCFG; g++) begin
      ooo_ref r;
      r = new(int'(CW[g]), int'(CIQ[g]), int'(CROB[g]));
      r.trace = m.trace;
      while (!r.done()) r.step();
      $display("%5d %7d %8d %7d  %0.3f", CW[g], CIQ[g], CROB[g], rtl_cycles[g],
               real'(N) / real'(rtl_cycles[g]));
      check(rtl_cycles[g] == r.cycle, $sformatf("config %0d: %0d cycles vs model %0d", g, rtl_cycles[g], r.cycle));
      check(order_errors[g] == 0, $sformatf("config %0d: retirement out of order", g));
    end
    // a larger IQ never costs cycles at ROB 512 on this trace
    for (int w = 0; w < 3; w++)
      check(rtl_cycles[3*w] >= rtl_cycles[3*w+1] && rtl_cycles[3*w+1] >= rtl_cycles[3*w+2],
            "IPC rises with IQ_SIZE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
