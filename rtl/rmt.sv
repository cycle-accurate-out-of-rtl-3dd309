// rmt: the Rename Map Table.
//
// One entry per architectural register (67 by default): a valid bit and the
// ROB tag of the most recent in-flight producer of that register. An invalid
// entry means the value is in the architectural register file.
//
// Retire, which acts first in a cycle, sends up to NINV invalidation requests
// {valid, idx, tag}: RMT[idx] is cleared only if it still holds that tag,
// i.e. the retiring instruction is still the latest producer. This guard keeps
// a newer producer's mapping alive. Rename, which acts after Retire, reads the
// table through NRD combinational read ports that already see this cycle's
// invalidations, and writes up to NWR mappings at the clock edge; the writes
// are applied in port order, so a higher port (a younger instruction of the
// bundle) wins, and a write wins over an invalidation of the same entry.
// All of this is the software model's behaviour; reset clears every entry.
module rmt
  import ooo_pkg::*;
#(
  parameter int unsigned NUM_REGS = NUM_AREGS,
  parameter int unsigned NRD      = 16,
  parameter int unsigned NWR      = 8,
  parameter int unsigned NINV     = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // guarded invalidations from Retire
  input  rmt_wr_t     inv [NINV],
  // reads from Rename
  input  areg_idx_t   rd_idx  [NRD],
  output rmt_entry_t  rd_data [NRD],
  // writes from Rename
  input  rmt_wr_t     wr [NWR]
);

  rmt_entry_t tbl_q [NUM_REGS];
  rmt_entry_t tbl_inv [NUM_REGS];   // after this cycle's invalidations
  rmt_entry_t tbl_d [NUM_REGS];

  always_comb begin
    tbl_inv = tbl_q;
    for (int unsigned k = 0; k < NINV; k++) begin
      if (inv[k].valid && (int'(inv[k].idx) < NUM_REGS)) begin
        if (tbl_q[inv[k].idx].valid && tbl_q[inv[k].idx].tag == inv[k].tag)
          tbl_inv[inv[k].idx].valid = 1'b0;
      end
    end
    tbl_d = tbl_inv;
    for (int unsigned k = 0; k < NWR; k++) begin
      if (wr[k].valid && (int'(wr[k].idx) < NUM_REGS))
        tbl_d[wr[k].idx] = '{valid: 1'b1, tag: wr[k].tag};
    end
  end

  always_comb begin
    for (int unsigned r = 0; r < NRD; r++) begin
      if (int'(rd_idx[r]) < NUM_REGS) rd_data[r] = tbl_inv[rd_idx[r]];
      else                            rd_data[r] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NUM_REGS; i++) tbl_q[i] <= '0;
    end else begin
      tbl_q <= tbl_d;
    end
  end

endmodule
