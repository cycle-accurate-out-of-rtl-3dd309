// issue_queue: the Issue Queue and the Issue stage (wakeup and select).
//
// The IQ holds up to IQ_SIZE renamed instructions, kept contiguous from entry
// 0: Dispatch appends a bundle behind the last occupied entry and Issue
// removes entries by sliding the younger ones down. Because bundles enter in
// program order and compaction keeps the order, entry 0 is always the oldest.
//
// Each cycle:
//   * wakeup: the tags completing in Execute this cycle (wake) set the ready
//     bit of every waiting source that matches;
//   * select: among entries whose two sources are ready (after this cycle's
//     wakeups), the up to WIDTH oldest are issued; issued[j] is the j-th
//     oldest of them and goes to function unit j;
//   * compaction: the remaining entries slide down over the issued ones and
//     the dispatched bundle (iq_load, iq_in) is appended after them;
//   * iq_free = IQ_SIZE - count + number issued, so Dispatch sees the room
//     that Issue makes in the same cycle; a dispatched bundle can issue at the
//     earliest in the next cycle.
// The software model finds the oldest ready entry by the lowest sequence
// number, WIDTH times in a row. Selecting the first ready entries by position
// gives the same instructions, since position order is age order here; that
// replacement, a priority select in place of repeated searches, is this
// design's own. Reset empties the queue.
module issue_queue
  import ooo_pkg::*;
#(
  parameter int unsigned WIDTH   = 8,
  parameter int unsigned IQ_SIZE = 128,
  parameter int unsigned NWAKE   = WIDTH * MAX_LAT,
  localparam int unsigned IQC_W  = $clog2(IQ_SIZE + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // wakeup broadcast from Execute
  input  wake_t             wake [NWAKE],
  // from Dispatch
  input  logic              iq_load,
  input  ren_instr_t        iq_in [WIDTH],
  output logic [IQC_W-1:0]  iq_free,
  // to Execute
  output ren_instr_t        issued [WIDTH],
  // occupancy, for observation
  output logic [IQC_W-1:0]  iq_count
);

  ren_instr_t q [IQ_SIZE];
  ren_instr_t q_w [IQ_SIZE];     // after wakeup
  ren_instr_t q_d [IQ_SIZE];
  logic [IQC_W-1:0] count_q, count_d, n_issued, n_disp, base;
  logic [IQ_SIZE-1:0] sel;

  // The completing tags as one bit per tag; a renamed source is woken when
  // the bit of its tag is set.
  logic [MAX_ROB-1:0] wake_vec;

  always_comb begin
    wake_vec = '0;
    for (int unsigned i = 0; i < NWAKE; i++)
      if (wake[i].valid) wake_vec[wake[i].tag] = 1'b1;
  end

  // wakeup; rank[i] = number of ready entries below entry i
  logic [IQ_SIZE-1:0] rdy;
  logic [IQC_W-1:0]   rank [IQ_SIZE];

  always_comb begin
    logic [IQC_W-1:0] r;
    r = '0;
    for (int unsigned i = 0; i < IQ_SIZE; i++) begin
      q_w[i] = q[i];
      q_w[i].src1.rdy = q[i].src1.rdy || (q[i].src1.renamed && wake_vec[q[i].src1.tag]);
      q_w[i].src2.rdy = q[i].src2.rdy || (q[i].src2.renamed && wake_vec[q[i].src2.tag]);
      rdy[i]  = q_w[i].valid && q_w[i].src1.rdy && q_w[i].src2.rdy;
      rank[i] = r;
      if (rdy[i]) r = r + 1'b1;
    end
  end

  // select: the first WIDTH ready entries; issue slot j gets the one of rank j
  always_comb begin
    n_issued = '0;
    for (int unsigned i = 0; i < IQ_SIZE; i++) begin
      sel[i] = rdy[i] && (rank[i] < IQC_W'(WIDTH));
      if (sel[i]) n_issued = n_issued + 1'b1;
    end
    for (int unsigned j = 0; j < WIDTH; j++) begin
      issued[j] = '0;
      for (int unsigned i = 0; i < IQ_SIZE; i++)
        if (sel[i] && rank[i] == IQC_W'(j)) issued[j] = issued[j] | q_w[i];
    end
  end

  // compaction: an entry that stays moves down by the number of selected
  // entries below it (at most WIDTH), so entry j takes entry j+s for the one
  // s in 0..WIDTH that fits; then the dispatched bundle is appended.
  always_comb begin
    base = count_q - n_issued;
    n_disp = '0;
    if (iq_load)
      for (int unsigned k = 0; k < WIDTH; k++)
        if (iq_in[k].valid) n_disp = n_disp + 1'b1;
    for (int unsigned j = 0; j < IQ_SIZE; j++) begin
      q_d[j] = '0;
      for (int unsigned s = 0; s <= WIDTH; s++) begin
        if (j + s < IQ_SIZE) begin
          if (q_w[j+s].valid && !sel[j+s] &&
              ((rank[j+s] < IQC_W'(WIDTH)) ? rank[j+s] : IQC_W'(WIDTH)) == IQC_W'(s))
            q_d[j] = q_w[j+s];
        end
      end
      for (int unsigned k = 0; k < WIDTH; k++)
        if (iq_load && iq_in[k].valid && (IQC_W'(j) == base + IQC_W'(k)))
          q_d[j] = iq_in[k];
    end
    count_d = base + n_disp;
  end

  assign iq_free  = IQC_W'(IQ_SIZE) - count_q + n_issued;
  assign iq_count = count_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < IQ_SIZE; i++) q[i] <= '0;
      count_q <= '0;
    end else begin
      q       <= q_d;
      count_q <= count_d;
    end
  end

  // The queue stays contiguous from entry 0 and count matches it.
  for (genvar i = 0; i < IQ_SIZE; i++) begin : g_contig
    a_contig: assert property (@(posedge clk) disable iff (!rst_n)
      q[i].valid == (i < count_q));
  end

  a_fits: assert property (@(posedge clk) disable iff (!rst_n)
    iq_load |-> (int'(iq_free) >= 1));

endmodule
