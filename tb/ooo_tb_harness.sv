// ooo_tb_harness: stimulus and checking for the whole pipeline.
//
// Generates clock and reset, feeds trace programs to the pipeline and runs
// the reference model of ooo_ref_pkg next to it. Every cycle it checks that
// the pipeline accepted as many trace instructions as the model fetched and
// retired exactly the instructions the model retired, in the same order. At
// the end of each program it checks idle, the cycle counter and the retired
// counter. Directed programs also check latencies worked out by hand:
//   * one op-type-0 instruction fetched in cycle 0 retires in cycle 8, one of
//     op type 2 in cycle 12 (nine stages, execute 1 or 5 cycles);
//   * a chain of k dependent op-type-0 instructions fetched in one bundle
//     retires one per cycle from cycle 8;
//   * N independent instructions stream at WIDTH per cycle, the last one
//     retiring in cycle N/WIDTH + 7.
// Random programs follow. With REQUIRE_EVENTS set, every mechanism of the
// design must have happened at least once (counted in the model, whose
// timing the pipeline matched, and for the stalls also in the pipeline).
module ooo_tb_harness
  import ooo_pkg::*;
  import ooo_ref_pkg::*;
#(
  parameter int unsigned WIDTH    = 4,
  parameter int unsigned IQ_SIZE  = 16,
  parameter int unsigned ROB_SIZE = 32,
  parameter int unsigned NRAND    = 2000,   // instructions per random program
  parameter int unsigned NPROG    = 6,      // random programs
  parameter bit          REQUIRE_EVENTS = 1'b1,
  parameter int unsigned WATCHDOG = 400000
) (
  output logic              clk,
  output logic              rst_n,
  output logic [WIDTH-1:0]  trace_valid,
  output trace_instr_t      trace_in [WIDTH],
  input  logic              trace_ready,
  input  retire_t           retired [WIDTH],
  input  logic [63:0]       cycle_count,
  input  logic [63:0]       retired_count,
  input  logic              idle,
  input  logic              rob_stall,     // Rename held for ROB room
  input  logic              iq_stall       // Dispatch held for IQ room
);

  int checks = 0, failures = 0;
  int rtl_rob_stalls = 0, rtl_iq_stalls = 0;
  ooo_ref m;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic areg_t areg(int r);
    areg_t a;
    a.valid = (r >= 0);
    a.idx   = (r >= 0) ? areg_idx_t'(r) : '0;
    return a;
  endfunction

  // Runs the program loaded into m; returns the cycle of the last retirement.
  task automatic run_program(output int last_ret);
    int ptr = 0, c = 0, nfetch, nret;
    last_ret = -1;
    trace_valid = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    forever begin
      for (int i = 0; i < WIDTH; i++) begin
        if (ptr + i < m.trace.size()) begin
          trace_valid[i]    = 1'b1;
          trace_in[i].pc    = pc_t'(m.trace[ptr+i].pc);
          trace_in[i].op    = op_t'(m.trace[ptr+i].op);
          trace_in[i].dst   = areg(m.trace[ptr+i].dst);
          trace_in[i].src1  = areg(m.trace[ptr+i].s1);
          trace_in[i].src2  = areg(m.trace[ptr+i].s2);
        end else begin
          trace_valid[i] = 1'b0;
          trace_in[i]    = '0;
        end
      end
      #1;
      if (m.done()) begin
        check(idle, "pipeline idle when the model is empty");
        check(cycle_count == 64'(m.cycle), $sformatf("cycle count %0d vs %0d", cycle_count, m.cycle));
        check(retired_count == 64'(m.trace.size()),
              $sformatf("retired %0d vs %0d", retired_count, m.trace.size()));
        break;
      end
      nfetch = 0;
      if (trace_ready && trace_valid[0])
        for (int i = 0; i < WIDTH; i++) if (trace_valid[i]) nfetch++;
      if (rob_stall) rtl_rob_stalls++;
      if (iq_stall)  rtl_iq_stalls++;
      m.step();
      check(nfetch == m.fetched_now, $sformatf("cycle %0d: fetched %0d vs %0d", c, nfetch, m.fetched_now));
      nret = 0;
      for (int i = 0; i < WIDTH; i++) if (retired[i].valid) nret++;
      check(nret == m.retired_now.size(),
            $sformatf("cycle %0d: retired %0d vs %0d", c, nret, m.retired_now.size()));
      for (int i = 0; i < WIDTH && i < m.retired_now.size(); i++)
        if (retired[i].valid)
          check(int'(retired[i].seq) == m.retired_now[i] &&
                int'(retired[i].pc) == m.trace[m.retired_now[i]].pc,
                $sformatf("cycle %0d: retired seq %0d vs %0d", c, retired[i].seq, m.retired_now[i]));
      if (nret > 0) last_ret = c;
      ptr += nfetch;
      c++;
      @(negedge clk);
    end
    trace_valid = '0;
  endtask

  initial begin
    int last;
    m = new(WIDTH, IQ_SIZE, ROB_SIZE);
    m.clear_events();
    rst_n = 1'b0;
    trace_valid = '0;
    for (int i = 0; i < WIDTH; i++) trace_in[i] = '0;

    // 1. a lone op-type-0 and a lone op-type-2 instruction
    m.reset(); m.add(32'h100, 0, 3, -1, -1);
    run_program(last);
    check(last == 8, $sformatf("op type 0 retires in cycle %0d, expected 8", last));
    m.reset(); m.add(32'h100, 2, 3, -1, -1);
    run_program(last);
    check(last == 12, $sformatf("op type 2 retires in cycle %0d, expected 12", last));

    // 2. a dependent chain within one bundle: back-to-back issue
    m.reset();
    m.add(32'h200, 0, 1, -1, -1);
    for (int i = 1; i < WIDTH; i++) m.add(32'h200 + 4 * i, 0, 1, 1, -1);
    run_program(last);
    check(last == 8 + WIDTH - 1, $sformatf("chain of %0d ends in cycle %0d", WIDTH, last));

    // 3. independent instructions at full rate
    m.reset();
    for (int i = 0; i < 16 * WIDTH; i++) m.add(32'h300 + 4 * i, 0, -1, -1, -1);
    run_program(last);
    check(last == 16 + 7, $sformatf("stream of %0d ends in cycle %0d, expected %0d",
                                    16 * WIDTH, last, 16 + 7));

    // 4. random programs: few registers (many dependences) to many
    for (int p = 0; p < NPROG; p++) begin
      m.reset();
      case (p % 3)
        0: m.gen_random(NRAND, 6, 50, 25, 90, 60);
        1: m.gen_random(NRAND, 67, 30, 20, 80, 70);
        default: m.gen_random(NRAND, 16, 20, 20, 95, 80);
      endcase
      run_program(last);
      $display("program %0d: %0d instructions in %0d cycles", p, m.trace.size(), m.cycle);
    end

    $display("events: wake IQ %0d DI %0d RR %0d, RR ROB check %0d, RMT invalidate %0d, stale guard %0d",
             m.ev_wake_iq, m.ev_wake_di, m.ev_wake_rr, m.ev_rr_robcheck, m.ev_rmt_inval, m.ev_stale_guard);
    $display("events: in-bundle dep %0d, out-of-order issue %0d, full-width issue %0d, lat %0d/%0d/%0d",
             m.ev_inbundle_dep, m.ev_ooo_issue, m.ev_full_issue, m.ev_lat[0], m.ev_lat[1], m.ev_lat[2]);
    $display("events: ROB-full stall %0d (pipeline %0d), IQ-full stall %0d (pipeline %0d)",
             m.ev_rob_stall, rtl_rob_stalls, m.ev_iq_stall, rtl_iq_stalls);
    if (REQUIRE_EVENTS) begin
      check(m.ev_wake_iq > 0, "wakeup in IQ never happened");
      check(m.ev_wake_di > 0, "wakeup in DI never happened");
      check(m.ev_wake_rr > 0, "wakeup in RR never happened");
      check(m.ev_rr_robcheck > 0, "RegRead ROB-ready check never fired");
      check(m.ev_rmt_inval > 0, "RMT invalidation at retire never happened");
      check(m.ev_stale_guard > 0, "stale-rename guard never held");
      check(m.ev_inbundle_dep > 0, "in-bundle dependence never renamed");
      check(m.ev_ooo_issue > 0, "out-of-order issue never happened");
      check(m.ev_full_issue > 0, "full-width issue never happened");
      check(m.ev_lat[0] > 0 && m.ev_lat[1] > 0 && m.ev_lat[2] > 0, "some latency never executed");
      check(m.ev_rob_stall > 0 && rtl_rob_stalls == m.ev_rob_stall, "ROB-full stall missing or miscounted");
      check(m.ev_iq_stall > 0 && rtl_iq_stalls == m.ev_iq_stall, "IQ-full stall missing or miscounted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
