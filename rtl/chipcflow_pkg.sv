// chipcflow_pkg: types and constants shared by the dataflow operators, the
// partition communicators and the bus scheduler.
//
// Tokens travel between operators on 16-bit data buses with a one-bit strobe
// (str) and a one-bit acknowledge (ack).  Between partitions they travel as
// 72-bit frames on a shared data bus.  The frame layout follows the protocol
// frame of the partition model: Synchronous (8), Partition (8), Activation (8),
// Iteration (8), Nesting (4), Arc (4), data (32), most significant field first.
// The value of the Synchronous marker, the partition numbering and the
// encoding of the tag operators are choices of this design.
package chipcflow_pkg;

  localparam int DATA_W = 16;           // operator data bus width
  localparam int FRAME_DATA_W = 32;     // data field of a frame

  // Marker in the Synchronous field that tells a partition a frame is on the
  // bus. Any other value means the bus is idle.
  localparam logic [7:0] SYNC_WORD = 8'hA5;

  // Partition numbers on the bus.
  localparam logic [7:0] PID_IO      = 8'd0;
  localparam logic [7:0] PID_P1      = 8'd1;
  localparam logic [7:0] PID_P2_BASE = 8'd2;   // PRR k holds partition number 2+k

  // Tag carried by every token between partitions.
  typedef struct packed {
    logic [7:0] activation;
    logic [7:0] iteration;
    logic [3:0] nesting;
  } tag_t;

  localparam int TAG_W = $bits(tag_t);  // 20

  // Data token with its tag, as handed to an output communicator.
  typedef struct packed {
    tag_t              tag;
    logic [DATA_W-1:0] data;
  } tagged_tok_t;

  localparam int TTOK_W = $bits(tagged_tok_t);  // 36

  // Protocol frame on the data bus.
  typedef struct packed {
    logic [7:0]              sync;
    logic [7:0]              partition;
    tag_t                    tag;
    logic [3:0]              arc;
    logic [FRAME_DATA_W-1:0] data;
  } frame_t;

  localparam int FRAME_W = $bits(frame_t);  // 72

  localparam frame_t IDLE_FRAME = '0;

  // Operations of the primitive operator.
  typedef enum logic [3:0] {
    OP_ADD, OP_SUB, OP_MUL, OP_DIV, OP_AND, OP_OR, OP_NOT,
    OP_EQ,  OP_NE,  OP_LT,  OP_GT,  OP_LE,  OP_GE
  } prim_op_e;

  // Tag operators.
  typedef enum logic [1:0] {
    TAG_KEEP,      // pass the tag unchanged
    TAG_NEXT,      // next iteration of a loop
    TAG_RESTORE    // leave the loop: back to the enclosing context
  } tag_mode_e;

  function automatic tag_t tag_next(tag_t t);
    tag_t r = t;
    r.iteration = t.iteration + 8'd1;
    return r;
  endfunction

  function automatic tag_t tag_restore(tag_t t);
    tag_t r = t;
    r.iteration = '0;
    r.nesting   = (t.nesting == '0) ? '0 : t.nesting - 4'd1;
    return r;
  endfunction

  function automatic tag_t tag_apply(tag_mode_e m, tag_t t);
    case (m)
      TAG_NEXT:    return tag_next(t);
      TAG_RESTORE: return tag_restore(t);
      default:     return t;
    endcase
  endfunction

endpackage
