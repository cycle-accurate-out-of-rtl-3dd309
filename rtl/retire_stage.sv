// retire_stage: the Retire stage.
//
// Looks at the WIDTH oldest ROB entries (head_win, registered ready bits) and
// retires the longest run of consecutive ready entries starting at the head,
// at most WIDTH per cycle; retire_n tells the ROB how far to move its head.
// For each retired instruction that writes a register it sends the RMT a
// guarded invalidation {dst, own ROB tag}: the RMT clears the mapping only if
// it still points at this ROB entry, so a younger producer of the same
// register keeps its mapping. The retired instructions are also reported on
// retired (sequence number and PC), in program order. This is the described
// model's Retire; it acts first in a cycle, so ROB room and RMT state freed
// here are visible to Rename in the same cycle. The sequence number, PC and
// destination in retired/rmt_inv are copied from the ROB window unchanged;
// only the valid bits and retire_n are computed here.
module retire_stage
  import ooo_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned CNT_W = 10
) (
  input  rob_head_t         head_win [WIDTH],
  output logic [CNT_W-1:0]  retire_n,
  output rmt_wr_t           rmt_inv [WIDTH],
  output retire_t           retired [WIDTH]
);

  always_comb begin
    logic run;
    run      = 1'b1;
    retire_n = '0;
    for (int unsigned i = 0; i < WIDTH; i++) begin
      run = run && head_win[i].valid && head_win[i].rdy;
      if (run) retire_n = retire_n + 1'b1;
      retired[i].valid = run;
      retired[i].seq   = head_win[i].seq;
      retired[i].pc    = head_win[i].pc;
      rmt_inv[i].valid = run && head_win[i].dst.valid;
      rmt_inv[i].idx   = head_win[i].dst.idx;
      rmt_inv[i].tag   = head_win[i].tag;
    end
  end

endmodule
