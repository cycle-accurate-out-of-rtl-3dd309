// rob: the Reorder Buffer, which is also the physical register file's name
// space.
//
// A circular buffer of ROB_SIZE entries with head, tail and count. Each entry
// holds the instruction's sequence number, PC, destination architectural
// register and a ready bit; no values are kept. The index of an entry is the
// tag under which its result is known everywhere else in the pipeline.
//
// Per cycle, in the order the software model applies them:
//   * Retire removes retire_n entries at the head (retire_stage decides how
//     many from head_win, the WIDTH oldest entries and their registered ready
//     bits);
//   * Writeback sets ready bits (set_rdy mask); rdy_now = ready bits OR this
//     mask is what RegRead sees in the same cycle;
//   * Rename allocates its bundle at the tail (alloc, alloc_in), with ready
//     bits cleared. rob_free = ROB_SIZE - count + retire_n includes the
//     entries freed by this cycle's retirement.
// Reset empties the buffer and points head and tail at entry 0.
module rob
  import ooo_pkg::*;
#(
  parameter int unsigned WIDTH    = 8,
  parameter int unsigned ROB_SIZE = 512,
  localparam int unsigned CNT_W   = $clog2(ROB_SIZE + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // allocation from Rename
  input  logic                alloc,
  input  fe_instr_t           alloc_in [WIDTH],
  output tag_t                tail,
  output logic [CNT_W-1:0]    rob_free,
  // writeback
  input  logic [ROB_SIZE-1:0] set_rdy,
  output logic [ROB_SIZE-1:0] rdy_now,
  // retirement
  output rob_head_t           head_win [WIDTH],
  input  logic [CNT_W-1:0]    retire_n,
  output logic [CNT_W-1:0]    count
);

  rob_entry_t          ent_q [ROB_SIZE];
  logic [ROB_SIZE-1:0] rdy_q;
  tag_t                head_q, tail_q;
  logic [CNT_W-1:0]    count_q, n_alloc;
  logic [ROB_SIZE-1:0] rdy_d;

  assign tail     = tail_q;
  assign count    = count_q;
  assign rob_free = CNT_W'(ROB_SIZE) - count_q + retire_n;
  assign rdy_now  = rdy_q | set_rdy;

  always_comb begin
    n_alloc = '0;
    for (int unsigned k = 0; k < WIDTH; k++)
      if (alloc && alloc_in[k].valid) n_alloc = n_alloc + 1'b1;
  end

  always_comb begin
    for (int unsigned i = 0; i < WIDTH; i++) begin
      tag_t t;
      t = rob_idx_add(head_q, i, ROB_SIZE);
      head_win[i].valid = (i < count_q);
      head_win[i].rdy   = rdy_q[t];
      head_win[i].tag   = t;
      head_win[i].dst   = ent_q[t].dst;
      head_win[i].seq   = ent_q[t].seq;
      head_win[i].pc    = ent_q[t].pc;
    end
  end

  // Writeback sets ready bits; allocation clears those of the new entries.
  always_comb begin
    rdy_d = rdy_q | set_rdy;
    for (int unsigned k = 0; k < WIDTH; k++)
      if (alloc && alloc_in[k].valid) rdy_d[rob_idx_add(tail_q, k, ROB_SIZE)] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
      rdy_q   <= '0;
    end else begin
      rdy_q   <= rdy_d;
      head_q  <= rob_idx_add(head_q, int'(retire_n), ROB_SIZE);
      tail_q  <= rob_idx_add(tail_q, int'(n_alloc), ROB_SIZE);
      count_q <= count_q - retire_n + n_alloc;
    end
  end

  // Entry contents need no reset: an entry is read only while occupied.
  always_ff @(posedge clk) begin
    for (int unsigned k = 0; k < WIDTH; k++)
      if (alloc && alloc_in[k].valid)
        ent_q[rob_idx_add(tail_q, k, ROB_SIZE)] <= '{seq: alloc_in[k].seq, pc: alloc_in[k].pc,
                                                     dst: alloc_in[k].dst, rdy: 1'b0};
  end

  initial begin
    assert (ROB_SIZE <= MAX_ROB && ROB_SIZE >= WIDTH)
      else $error("rob: ROB_SIZE must lie between WIDTH and %0d", MAX_ROB);
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    alloc |-> (n_alloc <= rob_free));
  a_retire_ok: assert property (@(posedge clk) disable iff (!rst_n)
    retire_n <= count_q);

endmodule
