// ooo_pkg: types and constants shared by the out-of-order pipeline.
//
// The pipeline models dynamic scheduling only: no register values, no
// memory, perfect branch prediction. An instruction is described by its
// PC, an op type (0/1/2, executing in 1/2/5 cycles) and up to three
// architectural register specifiers out of 67 (r0..r66), each of which may be
// absent. After Rename every destination is named by the index of its
// reorder-buffer entry: the ROB index is the physical register tag.
//
// Tags are TAG_W = 9 bits wide, enough for the largest ROB the design is
// meant for (512 entries); a ROB_SIZE above 512 is rejected by the modules
// that use it. Sequence numbers are 32 bits and only ever compared for
// equality, so their wrap-around does not matter. These widths are this
// design's own choice.
package ooo_pkg;

  localparam int unsigned NUM_AREGS = 67;   // architectural registers r0..r66
  localparam int unsigned AREG_W    = 7;
  localparam int unsigned MAX_ROB   = 512;
  localparam int unsigned TAG_W     = 9;
  localparam int unsigned PC_W      = 32;
  localparam int unsigned SEQ_W     = 32;
  localparam int unsigned MAX_LAT   = 5;    // longest execute latency (op type 2)

  typedef logic [1:0]        op_t;
  typedef logic [TAG_W-1:0]  tag_t;
  typedef logic [AREG_W-1:0] areg_idx_t;
  typedef logic [SEQ_W-1:0]  seq_t;
  typedef logic [PC_W-1:0]   pc_t;

  // Optional architectural register specifier (valid = 0 stands for "none").
  typedef struct packed {
    logic      valid;
    areg_idx_t idx;
  } areg_t;

  // One line of the instruction trace.
  typedef struct packed {
    pc_t   pc;
    op_t   op;
    areg_t dst;
    areg_t src1;
    areg_t src2;
  } trace_instr_t;

  // One slot of the DE and RN pipeline registers.
  typedef struct packed {
    logic  valid;
    seq_t  seq;
    pc_t   pc;
    op_t   op;
    areg_t dst;
    areg_t src1;
    areg_t src2;
  } fe_instr_t;

  // A renamed source operand. renamed = 0: value comes from the
  // architectural file and is ready; renamed = 1: waits for ROB entry tag.
  typedef struct packed {
    logic renamed;
    logic rdy;
    tag_t tag;
  } rsrc_t;

  // One slot of the RR and DI pipeline registers and one IQ entry.
  typedef struct packed {
    logic  valid;
    seq_t  seq;
    op_t   op;
    tag_t  dst_tag;
    rsrc_t src1;
    rsrc_t src2;
  } ren_instr_t;

  // Wakeup broadcast / writeback entry: a ROB tag whose result is done.
  typedef struct packed {
    logic valid;
    tag_t tag;
  } wake_t;

  // RMT read result.
  typedef struct packed {
    logic valid;
    tag_t tag;
  } rmt_entry_t;

  // RMT write from Rename (valid = 1 writes {valid, tag} to RMT[idx]).
  typedef struct packed {
    logic      valid;
    areg_idx_t idx;
    tag_t      tag;
  } rmt_wr_t;

  // ROB entry contents.
  typedef struct packed {
    seq_t  seq;
    pc_t   pc;
    areg_t dst;
    logic  rdy;
  } rob_entry_t;

  // One of the WIDTH oldest ROB entries, as shown to Retire.
  typedef struct packed {
    logic  valid;     // the entry is occupied
    logic  rdy;
    tag_t  tag;       // its ROB index
    areg_t dst;
    seq_t  seq;
    pc_t   pc;
  } rob_head_t;

  // A retired instruction, as reported on the top's retire port.
  typedef struct packed {
    logic valid;
    seq_t seq;
    pc_t  pc;
  } retire_t;

  // Execute latency of an op type: 0 -> 1, 1 -> 2, 2 -> 5 cycles.
  // Op type 3 does not occur in the trace format; it is treated like type 2.
  function automatic logic [2:0] op_latency(op_t op);
    case (op)
      2'd0:    return 3'd1;
      2'd1:    return 3'd2;
      default: return 3'd5;
    endcase
  endfunction

  // (base + off) modulo rob_size, for base < rob_size and off < rob_size.
  function automatic tag_t rob_idx_add(tag_t base, int unsigned off, int unsigned rob_size);
    int unsigned s;
    s = int'(base) + off;
    if (s >= rob_size) s = s - rob_size;
    return tag_t'(s);
  endfunction

endpackage
