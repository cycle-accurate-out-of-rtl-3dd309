// ooo_top: a WIDTH-wide, nine-stage out-of-order superscalar pipeline that
// models dynamic scheduling (timing only, no data values).
//
// Instructions arrive from a trace, up to WIDTH per cycle, each with a PC, an
// op type (0/1/2 taking 1/2/5 execute cycles) and optional destination and
// source architectural registers r0..r66. They flow in bundles through
//   Fetch -> DE -> Decode -> RN -> Rename -> RR -> RegRead -> DI -> Dispatch
//   -> IQ -> Issue -> Execute -> WB -> Writeback -> ROB -> Retire.
// Rename gives each instruction the ROB entry at the tail and names its
// result by that entry's index (no separate physical register file), using a
// 67-entry Rename Map Table. Issue sends up to WIDTH of the oldest ready IQ
// entries per cycle to WIDTH pipelined universal function units. A finishing
// instruction broadcasts its tag to the IQ, DI and RR in the same cycle, which
// is what lets a consumer anywhere between Rename and Issue see it; Writeback
// marks the ROB entry ready one cycle later and Retire frees up to WIDTH
// ready entries per cycle in order, clearing RMT mappings that still point at
// them. Every stage advances only when its next register is free in that same
// cycle (full backpressure); Rename also needs ROB room and Dispatch IQ room
// for the whole bundle.
//
// A lone op-type-0 instruction fetched in cycle 0 retires in cycle 8; a
// dependent op-type-0 consumer can issue in the cycle right after its
// producer. Ports: the trace bundle (trace_valid contiguous from bit 0,
// accepted when trace_ready), the instructions retired this cycle, counters
// of cycles and retired instructions since reset (their ratio is the IPC),
// and idle, high when no instruction is in flight.
//
// The structure, sizes and stage rules follow the software model; the
// defaults WIDTH = 8, IQ_SIZE = 128, ROB_SIZE = 512 are its widest
// configuration with the issue-queue size it found sufficient for WIDTH 8.
module ooo_top
  import ooo_pkg::*;
#(
  parameter int unsigned WIDTH    = 8,
  parameter int unsigned IQ_SIZE  = 128,
  parameter int unsigned ROB_SIZE = 512
) (
  input  logic               clk,
  input  logic               rst_n,
  // trace input
  input  logic [WIDTH-1:0]   trace_valid,
  input  trace_instr_t       trace_in [WIDTH],
  output logic               trace_ready,
  // retirement
  output retire_t            retired [WIDTH],
  // statistics
  output logic [63:0]        cycle_count,
  output logic [63:0]        retired_count,
  output logic               idle
);

  localparam int unsigned NWAKE = WIDTH * MAX_LAT;
  localparam int unsigned CNT_W = $clog2(ROB_SIZE + 1);
  localparam int unsigned IQC_W = $clog2(IQ_SIZE + 1);

  // Fetch -> DE
  logic       de_load, de_free, de_busy;
  fe_instr_t  de_in [WIDTH];
  // DE -> RN
  logic       rn_load, rn_free, rn_busy;
  fe_instr_t  rn_in [WIDTH];
  // RN -> RR
  logic       rr_load, rr_free;
  ren_instr_t rr_in [WIDTH];
  // RR -> DI
  logic       di_load, di_free;
  ren_instr_t di_in [WIDTH];
  // DI -> IQ
  logic       iq_load;
  ren_instr_t iq_in [WIDTH];
  logic [IQC_W-1:0] iq_free, iq_count;
  // IQ -> EX -> WB
  ren_instr_t issued [WIDTH];
  wake_t      wake [NWAKE];
  logic       ex_busy, wb_busy;
  logic [ROB_SIZE-1:0] rob_set_rdy, rob_rdy_now;
  // ROB / RMT
  tag_t       rob_tail;
  logic [CNT_W-1:0] rob_free, retire_n, rob_count;
  logic       rob_alloc;
  fe_instr_t  rob_alloc_in [WIDTH];
  rob_head_t  head_win [WIDTH];
  areg_idx_t  rmt_rd_idx  [2*WIDTH];
  rmt_entry_t rmt_rd_data [2*WIDTH];
  rmt_wr_t    rmt_wr  [WIDTH];
  rmt_wr_t    rmt_inv [WIDTH];

  fetch_stage #(.WIDTH(WIDTH)) u_fetch (
    .clk, .rst_n, .trace_valid, .trace_in, .trace_ready,
    .de_free, .de_load, .de_in);

  decode_stage #(.WIDTH(WIDTH)) u_decode (
    .clk, .rst_n, .busy(de_busy), .de_load, .de_in, .de_free,
    .rn_free, .rn_load, .rn_in);

  rename_stage #(.WIDTH(WIDTH), .ROB_SIZE(ROB_SIZE)) u_rename (
    .clk, .rst_n, .busy(rn_busy), .rn_load, .rn_in, .rn_free,
    .rob_tail, .rob_free, .rob_alloc, .rob_alloc_in,
    .rmt_rd_idx, .rmt_rd_data, .rmt_wr,
    .rr_free, .rr_load, .rr_in);

  rmt #(.NUM_REGS(NUM_AREGS), .NRD(2*WIDTH), .NWR(WIDTH), .NINV(WIDTH)) u_rmt (
    .clk, .rst_n, .inv(rmt_inv), .rd_idx(rmt_rd_idx), .rd_data(rmt_rd_data), .wr(rmt_wr));

  regread_stage #(.WIDTH(WIDTH), .ROB_SIZE(ROB_SIZE), .NWAKE(NWAKE)) u_regread (
    .clk, .rst_n, .rr_load, .rr_in, .rr_free, .wake, .rob_rdy(rob_rdy_now),
    .di_free, .di_load, .di_in);

  dispatch_stage #(.WIDTH(WIDTH), .IQ_SIZE(IQ_SIZE), .NWAKE(NWAKE)) u_dispatch (
    .clk, .rst_n, .di_load, .di_in, .di_free, .wake, .iq_free, .iq_load, .iq_in);

  issue_queue #(.WIDTH(WIDTH), .IQ_SIZE(IQ_SIZE), .NWAKE(NWAKE)) u_iq (
    .clk, .rst_n, .wake, .iq_load, .iq_in, .iq_free, .issued, .iq_count);

  execute_unit #(.WIDTH(WIDTH)) u_execute (
    .clk, .rst_n, .issued, .wake, .busy(ex_busy));

  writeback_stage #(.WIDTH(WIDTH), .ROB_SIZE(ROB_SIZE)) u_writeback (
    .clk, .rst_n, .wb_in(wake), .rob_set_rdy, .busy(wb_busy));

  rob #(.WIDTH(WIDTH), .ROB_SIZE(ROB_SIZE)) u_rob (
    .clk, .rst_n, .alloc(rob_alloc), .alloc_in(rob_alloc_in), .tail(rob_tail),
    .rob_free, .set_rdy(rob_set_rdy), .rdy_now(rob_rdy_now), .head_win,
    .retire_n, .count(rob_count));

  retire_stage #(.WIDTH(WIDTH), .CNT_W(CNT_W)) u_retire (
    .head_win, .retire_n, .rmt_inv, .retired);

  // Everything from RR onwards holds a ROB entry, so an empty ROB with empty
  // DE and RN means nothing is in flight.
  assign idle = !de_busy && !rn_busy && (rob_count == '0);

  a_idle_empty: assert property (@(posedge clk) disable iff (!rst_n)
    idle |-> (iq_count == '0) && !ex_busy && !wb_busy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycle_count   <= '0;
      retired_count <= '0;
    end else begin
      cycle_count   <= cycle_count + 64'd1;
      retired_count <= retired_count + 64'(retire_n);
    end
  end

endmodule
