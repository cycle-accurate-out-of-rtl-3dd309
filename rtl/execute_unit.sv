// execute_unit: Execute, WIDTH universal pipelined function units.
//
// Function unit l takes the instruction issued on issued[l], whatever its op
// type, and is pipelined: it accepts a new instruction every cycle. Each FU is
// a chain of MAX_LAT = 5 sub-stage slots; an instruction enters slot 0 with a
// countdown ex_cycles = 1, 2 or 5 (op type 0, 1, 2), moves one slot per cycle
// and leaves when its countdown runs out: in the cycle in which a slot holds
// ex_cycles = 1, the instruction completes. Its ROB tag is then driven on
// wake (the wakeup broadcast to IQ, DI and RR, seen in that same cycle) and
// written into the WB register at the clock edge. wake has WIDTH*5 entries,
// one per slot, the size the software model reserves for its execute list
// and WB. An instruction issued in cycle t therefore completes in cycle
// t + latency. The countdown and latencies follow the software model; the
// slot chain is this design's way of holding up to five instructions per FU.
module execute_unit
  import ooo_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  localparam int unsigned NWAKE = WIDTH * MAX_LAT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ren_instr_t  issued [WIDTH],
  output wake_t       wake [NWAKE],
  output logic        busy            // some instruction is executing
);

  typedef struct packed {
    logic       valid;
    tag_t       tag;
    logic [2:0] ex_cycles;
  } ex_slot_t;

  ex_slot_t slot_q [WIDTH][MAX_LAT];

  always_comb begin
    busy = 1'b0;
    for (int unsigned l = 0; l < WIDTH; l++) begin
      for (int unsigned s = 0; s < MAX_LAT; s++) begin
        wake[l*MAX_LAT + s].valid = slot_q[l][s].valid && (slot_q[l][s].ex_cycles == 3'd1);
        wake[l*MAX_LAT + s].tag   = slot_q[l][s].tag;
        busy |= slot_q[l][s].valid;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned l = 0; l < WIDTH; l++)
        for (int unsigned s = 0; s < MAX_LAT; s++) slot_q[l][s] <= '0;
    end else begin
      for (int unsigned l = 0; l < WIDTH; l++) begin
        slot_q[l][0].valid     <= issued[l].valid;
        slot_q[l][0].tag       <= issued[l].dst_tag;
        slot_q[l][0].ex_cycles <= op_latency(issued[l].op);
        for (int unsigned s = 1; s < MAX_LAT; s++) begin
          slot_q[l][s].valid     <= slot_q[l][s-1].valid && (slot_q[l][s-1].ex_cycles != 3'd1);
          slot_q[l][s].tag       <= slot_q[l][s-1].tag;
          slot_q[l][s].ex_cycles <= slot_q[l][s-1].ex_cycles - 3'd1;
        end
      end
    end
  end

  // An instruction never outlives the last sub-stage.
  for (genvar l = 0; l < WIDTH; l++) begin : g_last
    a_last: assert property (@(posedge clk) disable iff (!rst_n)
      slot_q[l][MAX_LAT-1].valid |-> slot_q[l][MAX_LAT-1].ex_cycles == 3'd1);
  end

endmodule
