// rename_stage: the RN pipeline register and the Rename stage.
//
// RN holds one bundle of up to WIDTH decoded instructions (slots contiguous
// from 0). Rename advances the whole bundle in one cycle, and only when three
// things hold: RN is occupied, RR is free (rr_free), and the ROB has room for
// every instruction of the bundle (rob_free, which already counts entries
// that Retire frees in the same cycle). This all-or-nothing check keeps
// bundles whole. On advance, slot k
//   * gets ROB entry rob_tail+k (modulo ROB_SIZE), which is also its
//     destination tag; the ROB records seq, PC and dst (rob_alloc),
//   * renames each source: if an older slot j<k of the same bundle writes
//     that register, the source waits for tag rob_tail+j (youngest such j);
//     otherwise, if RMT says the register has an in-flight producer, it waits
//     for that tag; otherwise it is ready (architectural file),
//   * writes RMT[dst] = rob_tail+k (sources are renamed before the
//     destination, so an instruction never waits on itself).
// The in-bundle comparison is how hardware obtains the result of the
// software model's slot-by-slot renaming within one cycle. Renamed sources
// start not ready; RegRead and the wakeup broadcast make them ready later.
module rename_stage
  import ooo_pkg::*;
#(
  parameter int unsigned WIDTH    = 8,
  parameter int unsigned ROB_SIZE = 512,
  localparam int unsigned CNT_W   = $clog2(ROB_SIZE + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              busy,        // RN holds a bundle
  // from Decode
  input  logic              rn_load,
  input  fe_instr_t         rn_in [WIDTH],
  output logic              rn_free,
  // ROB allocation
  input  tag_t              rob_tail,
  input  logic [CNT_W-1:0]  rob_free,
  output logic              rob_alloc,
  output fe_instr_t         rob_alloc_in [WIDTH],
  // RMT
  output areg_idx_t         rmt_rd_idx  [2*WIDTH],
  input  rmt_entry_t        rmt_rd_data [2*WIDTH],
  output rmt_wr_t           rmt_wr [WIDTH],
  // to RegRead (RR register)
  input  logic              rr_free,
  output logic              rr_load,
  output ren_instr_t        rr_in [WIDTH]
);

  fe_instr_t rn_q [WIDTH];
  logic      occupied;
  logic [CNT_W-1:0] n_bundle;

  assign occupied = rn_q[0].valid;
  assign busy     = occupied;

  always_comb begin
    n_bundle = '0;
    for (int unsigned i = 0; i < WIDTH; i++)
      if (rn_q[i].valid) n_bundle = n_bundle + 1'b1;
  end

  assign rr_load   = occupied && rr_free && (rob_free >= n_bundle);
  assign rn_free   = !occupied || rr_load;
  assign rob_alloc = rr_load;
  assign rob_alloc_in = rn_q;

  function automatic rsrc_t rename_src(areg_t src, rmt_entry_t map, int unsigned k,
                                       fe_instr_t b [WIDTH], tag_t tail);
    rsrc_t r;
    r.renamed = src.valid && map.valid;
    r.tag     = map.tag;
    for (int unsigned j = 0; j < WIDTH; j++) begin
      if (j < k && b[j].valid && b[j].dst.valid && src.valid && b[j].dst.idx == src.idx) begin
        r.renamed = 1'b1;
        r.tag     = rob_idx_add(tail, j, ROB_SIZE);
      end
    end
    r.rdy = !r.renamed;
    if (!r.renamed) r.tag = '0;
    return r;
  endfunction

  always_comb begin
    for (int unsigned k = 0; k < WIDTH; k++) begin
      rmt_rd_idx[2*k]   = rn_q[k].src1.idx;
      rmt_rd_idx[2*k+1] = rn_q[k].src2.idx;
      rr_in[k].valid    = rn_q[k].valid;
      rr_in[k].seq      = rn_q[k].seq;
      rr_in[k].op       = rn_q[k].op;
      rr_in[k].dst_tag  = rob_idx_add(rob_tail, k, ROB_SIZE);
      rr_in[k].src1     = rename_src(rn_q[k].src1, rmt_rd_data[2*k],   k, rn_q, rob_tail);
      rr_in[k].src2     = rename_src(rn_q[k].src2, rmt_rd_data[2*k+1], k, rn_q, rob_tail);
      rmt_wr[k].valid   = rr_load && rn_q[k].valid && rn_q[k].dst.valid;
      rmt_wr[k].idx     = rn_q[k].dst.idx;
      rmt_wr[k].tag     = rob_idx_add(rob_tail, k, ROB_SIZE);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < WIDTH; i++) rn_q[i] <= '0;
    end else if (rn_load) begin
      rn_q <= rn_in;
    end else if (rr_load) begin
      for (int unsigned i = 0; i < WIDTH; i++) rn_q[i].valid <= 1'b0;
    end
  end

  initial begin
    assert (ROB_SIZE <= MAX_ROB && ROB_SIZE >= WIDTH)
      else $error("rename_stage: ROB_SIZE must lie between WIDTH and %0d", MAX_ROB);
  end

  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    rn_load |-> rn_free);

endmodule
