// dispatch_stage: the DI pipeline register and the Dispatch stage.
//
// DI holds one bundle of up to WIDTH renamed instructions whose source ready
// bits were settled by RegRead. While the bundle waits in DI, the wakeup
// broadcast from Execute keeps setting the ready bit of any source that waits
// on a completing tag. Dispatch moves the whole bundle into the Issue Queue
// only when the IQ has room for all of it (iq_free, which already counts the
// entries Issue removes in the same cycle); the bundle handed to the IQ
// includes this cycle's wakeups. Whole-bundle dispatch and the wakeup into DI
// follow the software model; reset empties DI.
module dispatch_stage
  import ooo_pkg::*;
#(
  parameter int unsigned WIDTH   = 8,
  parameter int unsigned IQ_SIZE = 128,
  parameter int unsigned NWAKE   = WIDTH * MAX_LAT,
  localparam int unsigned IQC_W  = $clog2(IQ_SIZE + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // from RegRead
  input  logic              di_load,
  input  ren_instr_t        di_in [WIDTH],
  output logic              di_free,
  // wakeup broadcast from Execute
  input  wake_t             wake [NWAKE],
  // to the Issue Queue
  input  logic [IQC_W-1:0]  iq_free,
  output logic              iq_load,
  output ren_instr_t        iq_in [WIDTH]
);

  ren_instr_t di_q [WIDTH];
  logic       occupied;
  logic [IQC_W-1:0] n_bundle;

  // The completing tags as one bit per tag; a renamed source is woken when
  // the bit of its tag is set.
  logic [MAX_ROB-1:0] wake_vec;

  always_comb begin
    wake_vec = '0;
    for (int unsigned i = 0; i < NWAKE; i++)
      if (wake[i].valid) wake_vec[wake[i].tag] = 1'b1;
  end

  assign occupied = di_q[0].valid;

  always_comb begin
    n_bundle = '0;
    for (int unsigned k = 0; k < WIDTH; k++) begin
      if (di_q[k].valid) n_bundle = n_bundle + 1'b1;
      iq_in[k] = di_q[k];
      iq_in[k].src1.rdy = di_q[k].src1.rdy || (di_q[k].src1.renamed && wake_vec[di_q[k].src1.tag]);
      iq_in[k].src2.rdy = di_q[k].src2.rdy || (di_q[k].src2.renamed && wake_vec[di_q[k].src2.tag]);
    end
  end

  assign iq_load = occupied && (iq_free >= n_bundle);
  assign di_free = !occupied || iq_load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < WIDTH; i++) di_q[i] <= '0;
    end else if (di_load) begin
      di_q <= di_in;
    end else if (iq_load) begin
      for (int unsigned i = 0; i < WIDTH; i++) di_q[i].valid <= 1'b0;
    end else begin
      di_q <= iq_in;
    end
  end

  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    di_load |-> di_free);

endmodule
