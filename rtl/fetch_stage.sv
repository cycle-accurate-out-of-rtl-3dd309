// fetch_stage: Fetch, the first of the nine pipeline stages.
//
// Each cycle in which the DE pipeline register is free (empty, or being
// emptied by Decode in the same cycle), Fetch takes the bundle of up to WIDTH
// trace instructions offered on trace_in and writes it into DE, giving every
// instruction the next sequence number in program order (the first
// instruction after reset gets 0). The trace source offers its instructions
// in slots 0..n-1 (trace_valid contiguous from bit 0); trace_ready tells it
// that the offered bundle is taken at the next clock edge. Sequence
// numbering at Fetch and the whole-bundle transfer follow the described
// model; the valid/ready handshake with the trace source is this design's
// own interface to the (off-chip) trace. Fetch changes no instruction field:
// pc, op and register fields reach DE exactly as the trace delivered them,
// so those output bits are wired straight from trace_in by intent.
module fetch_stage
  import ooo_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // trace source
  input  logic [WIDTH-1:0]   trace_valid,
  input  trace_instr_t       trace_in [WIDTH],
  output logic               trace_ready,
  // DE pipeline register (held in decode_stage)
  input  logic               de_free,
  output logic               de_load,
  output fe_instr_t          de_in [WIDTH]
);

  seq_t seq_q;
  logic [$clog2(WIDTH+1)-1:0] n_fetch;

  assign trace_ready = de_free;
  assign de_load     = de_free && trace_valid[0];

  always_comb begin
    n_fetch = '0;
    for (int unsigned i = 0; i < WIDTH; i++) begin
      de_in[i].valid = trace_valid[i];
      de_in[i].seq   = seq_q + seq_t'(i);
      de_in[i].pc    = trace_in[i].pc;
      de_in[i].op    = trace_in[i].op;
      de_in[i].dst   = trace_in[i].dst;
      de_in[i].src1  = trace_in[i].src1;
      de_in[i].src2  = trace_in[i].src2;
      if (trace_valid[i]) n_fetch = n_fetch + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       seq_q <= '0;
    else if (de_load) seq_q <= seq_q + seq_t'(n_fetch);
  end

  // The trace source fills its slots from slot 0 without gaps.
  a_contiguous: assert property (@(posedge clk) disable iff (!rst_n)
    ((trace_valid & (trace_valid + 1'b1)) == '0));

endmodule
