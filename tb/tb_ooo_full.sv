// tb_ooo_full: the pipeline at its default size (WIDTH 8, IQ 128, ROB 512)
// running directed programs and random traces against the reference model,
// cycle by cycle. The stall counters are reported, and every mechanism must
// again occur at least once.
module tb_ooo_full;
  import ooo_pkg::*;

  localparam int unsigned W = 8;

  logic clk, rst_n, trace_ready, idle;
  logic [W-1:0] trace_valid;
  trace_instr_t trace_in [W];
  retire_t retired [W];
  logic [63:0] cycle_count, retired_count;
  logic rob_stall, iq_stall;

  ooo_top dut (
    .clk, .rst_n, .trace_valid, .trace_in, .trace_ready, .retired,
    .cycle_count, .retired_count, .idle);

  assign rob_stall = dut.u_rename.busy && dut.rr_free && !dut.rr_load;
  assign iq_stall  = dut.u_dispatch.occupied && !dut.iq_load;

  ooo_tb_harness #(.WIDTH(W), .IQ_SIZE(128), .ROB_SIZE(512), .NRAND(6000), .NPROG(3)) h (
    .clk, .rst_n, .trace_valid, .trace_in, .trace_ready, .retired,
    .cycle_count, .retired_count, .idle, .rob_stall, .iq_stall);

endmodule
