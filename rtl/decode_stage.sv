// decode_stage: the DE pipeline register and the Decode stage.
//
// DE holds one bundle of up to WIDTH fetched instructions (slot valid bits
// contiguous from slot 0; the bundle is present when slot 0 is valid).
// Decode moves the whole bundle from DE to RN in the cycle in which RN is
// free (rn_free: RN empty or being emptied by Rename in the same cycle), and
// DE is then free for Fetch in that same cycle (de_free), so a bundle can
// advance one stage per clock. Decode does no other work because the trace
// is already decoded; this follows the software model. Reset empties DE.
module decode_stage
  import ooo_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       busy,        // the register holds a bundle
  // from Fetch
  input  logic       de_load,
  input  fe_instr_t  de_in [WIDTH],
  output logic       de_free,
  // to Rename (RN register)
  input  logic       rn_free,
  output logic       rn_load,
  output fe_instr_t  rn_in [WIDTH]
);

  fe_instr_t de_q [WIDTH];
  logic      occupied;

  assign occupied = de_q[0].valid;
  assign busy     = occupied;
  assign rn_load  = occupied && rn_free;
  assign de_free  = !occupied || rn_load;
  assign rn_in    = de_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < WIDTH; i++) de_q[i] <= '0;
    end else if (de_load) begin
      de_q <= de_in;
    end else if (rn_load) begin
      for (int unsigned i = 0; i < WIDTH; i++) de_q[i].valid <= 1'b0;
    end
  end

  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    de_load |-> de_free);

endmodule
