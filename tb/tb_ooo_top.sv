// tb_ooo_top: end-to-end test of the pipeline at a reduced size (WIDTH 4,
// IQ 16, ROB 32), small enough that the ROB and the IQ fill up often. The
// harness runs directed and random trace programs against the reference
// model and requires every mechanism (wakeup into IQ, DI and RR, the RegRead
// ROB check, guarded RMT invalidation, in-bundle renaming, out-of-order and
// full-width issue, all three latencies, ROB-full and IQ-full stalls) to
// occur at least once.
module tb_ooo_top;
  import ooo_pkg::*;

  localparam int unsigned W = 4;

  logic clk, rst_n, trace_ready, idle;
  logic [W-1:0] trace_valid;
  trace_instr_t trace_in [W];
  retire_t retired [W];
  logic [63:0] cycle_count, retired_count;
  logic rob_stall, iq_stall;

  ooo_top #(.WIDTH(W), .IQ_SIZE(16), .ROB_SIZE(32)) dut (
    .clk, .rst_n, .trace_valid, .trace_in, .trace_ready, .retired,
    .cycle_count, .retired_count, .idle);

  assign rob_stall = dut.u_rename.busy && dut.rr_free && !dut.rr_load;
  assign iq_stall  = dut.u_dispatch.occupied && !dut.iq_load;

  ooo_tb_harness #(.WIDTH(W), .IQ_SIZE(16), .ROB_SIZE(32), .NRAND(2000), .NPROG(6)) h (
    .clk, .rst_n, .trace_valid, .trace_in, .trace_ready, .retired,
    .cycle_count, .retired_count, .idle, .rob_stall, .iq_stall);

endmodule
