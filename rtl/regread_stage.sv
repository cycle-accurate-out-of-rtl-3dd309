// regread_stage: the RR pipeline register and the Register-Read stage.
//
// RR holds one renamed bundle of up to WIDTH instructions. Its renamed,
// not-yet-ready sources become ready in two ways:
//   * the wakeup broadcast from Execute (wake, up to NWAKE completing tags per
//     cycle) sets the ready bit of every RR source that waits on a completing
//     tag, in every cycle the bundle sits in RR;
//   * when the bundle advances, each renamed source is also checked against
//     the ROB ready bits (rob_rdy), which already include the writebacks of
//     the same cycle.
// Sources that were not renamed are ready from the start. The bundle moves to
// DI, whole, in the cycle in which DI is free (di_free); what it carries into
// DI already includes the wakeups of that cycle. Broadcasting into RR and the
// ROB check follow the software model (both are needed to avoid a consumer
// missing its producer's only wakeup); reset empties RR.
module regread_stage
  import ooo_pkg::*;
#(
  parameter int unsigned WIDTH    = 8,
  parameter int unsigned ROB_SIZE = 512,
  parameter int unsigned NWAKE    = WIDTH * MAX_LAT
) (
  input  logic                clk,
  input  logic                rst_n,
  // from Rename
  input  logic                rr_load,
  input  ren_instr_t          rr_in [WIDTH],
  output logic                rr_free,
  // wakeup broadcast from Execute
  input  wake_t               wake [NWAKE],
  // ROB ready bits including this cycle's writeback
  input  logic [ROB_SIZE-1:0] rob_rdy,
  // to Dispatch (DI register)
  input  logic                di_free,
  output logic                di_load,
  output ren_instr_t          di_in [WIDTH]
);

  ren_instr_t rr_q [WIDTH];
  ren_instr_t rr_w [WIDTH];     // RR after this cycle's wakeups
  logic       occupied;

  // The completing tags as one bit per tag; a renamed source is woken when
  // the bit of its tag is set.
  logic [MAX_ROB-1:0] wake_vec;

  always_comb begin
    wake_vec = '0;
    for (int unsigned i = 0; i < NWAKE; i++)
      if (wake[i].valid) wake_vec[wake[i].tag] = 1'b1;
  end

  assign occupied = rr_q[0].valid;
  assign di_load  = occupied && di_free;
  assign rr_free  = !occupied || di_load;

  always_comb begin
    for (int unsigned k = 0; k < WIDTH; k++) begin
      rr_w[k] = rr_q[k];
      rr_w[k].src1.rdy = rr_q[k].src1.rdy || (rr_q[k].src1.renamed && wake_vec[rr_q[k].src1.tag]);
      rr_w[k].src2.rdy = rr_q[k].src2.rdy || (rr_q[k].src2.renamed && wake_vec[rr_q[k].src2.tag]);
      di_in[k] = rr_w[k];
      if (rr_q[k].src1.renamed && int'(rr_q[k].src1.tag) < ROB_SIZE && rob_rdy[rr_q[k].src1.tag])
        di_in[k].src1.rdy = 1'b1;
      if (rr_q[k].src2.renamed && int'(rr_q[k].src2.tag) < ROB_SIZE && rob_rdy[rr_q[k].src2.tag])
        di_in[k].src2.rdy = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < WIDTH; i++) rr_q[i] <= '0;
    end else if (rr_load) begin
      rr_q <= rr_in;
    end else if (di_load) begin
      for (int unsigned i = 0; i < WIDTH; i++) rr_q[i].valid <= 1'b0;
    end else begin
      rr_q <= rr_w;
    end
  end

  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    rr_load |-> rr_free);

endmodule
