// writeback_stage: the WB pipeline register and the Writeback stage.
//
// WB has WIDTH*5 entries, one per execute sub-stage slot, and is rewritten
// every cycle with the instructions that completed in Execute (wb_in). In the
// following cycle Writeback marks the ROB entry of each of them ready: it
// decodes the tags into a ROB_SIZE-bit mask, rob_set_rdy, which the ROB ORs
// into its ready bits at the clock edge and which RegRead sees in the same
// cycle (writeback acts before register read within a cycle). Writeback then
// leaves WB empty unless Execute refills it. This follows the described
// model; the mask form is this design's own.
module writeback_stage
  import ooo_pkg::*;
#(
  parameter int unsigned WIDTH    = 8,
  parameter int unsigned ROB_SIZE = 512,
  localparam int unsigned NWB     = WIDTH * MAX_LAT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  wake_t               wb_in [NWB],
  output logic [ROB_SIZE-1:0] rob_set_rdy,
  output logic                busy         // WB holds something
);

  wake_t wb_q [NWB];

  always_comb begin
    rob_set_rdy = '0;
    busy        = 1'b0;
    for (int unsigned i = 0; i < NWB; i++) begin
      if (wb_q[i].valid && int'(wb_q[i].tag) < ROB_SIZE) rob_set_rdy[wb_q[i].tag] = 1'b1;
      busy |= wb_q[i].valid;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NWB; i++) wb_q[i] <= '0;
    end else begin
      wb_q <= wb_in;
    end
  end

endmodule
