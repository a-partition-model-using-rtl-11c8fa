// p1_static: the static-region node that runs partition p1 of the Fibonacci
// graph.  Frames for partition number PID_P1 come in through an input
// communicator (arc 0: n from the I/O block, arc 1: a returned by p2).  The
// loop-start group {i, n-1, b, a} from p1 passes the new tag area, which gives
// it a fresh activation number, and leaves as four frames for the first PRR
// (P2_PID), arcs 0..3 = i, n, b, a.  The returned result leaves as a frame for
// the I/O block (arc 0) with the tag of the frame that brought it in.
//
// Bus side: bus_frame is watched every cycle; arc_free goes to the scheduler;
// req/frame/gnt is the requester interface (frame leaves in the cycle gnt=1).
//
// From the document: p1 in the static region, its inputs n and a and outputs
// i(p2), n(p2), b(p2), a(p2) through the new tag area.  The arc numbering and
// partition numbers are this design's choice.
module p1_static
  import chipcflow_pkg::*;
#(
  parameter logic [7:0] P2_PID = PID_P2_BASE
) (
  input  logic        clk,
  input  logic        rst_n,
  input  frame_t      bus_frame,
  output logic [15:0] arc_free,
  output logic        req,
  output frame_t      frame,
  input  logic        gnt
);

  logic [1:0][DATA_W-1:0] in_tok;
  logic [1:0]             in_str, in_ack;
  tag_t                   cur_tag;

  comm_in #(.PID(PID_P1), .N_ARCS(2)) u_in (
    .clk, .rst_n, .bus_frame, .arc_free,
    .tok(in_tok), .tok_str(in_str), .tok_ack(in_ack), .cur_tag);

  logic [DATA_W-1:0]   ret;
  logic                ret_str, ret_ack;
  logic [4*DATA_W-1:0] start;
  logic                start_str, start_ack;

  fib_partition1 #(.W(DATA_W)) u_p1 (
    .clk, .rst_n,
    .n(in_tok[0]), .n_str(in_str[0]), .n_ack(in_ack[0]),
    .a(in_tok[1]), .a_str(in_str[1]), .a_ack(in_ack[1]),
    .ret, .ret_str, .ret_ack,
    .start, .start_str, .start_ack);

  // Output ports: 0 = a, 1 = b, 2 = n-1, 3 = i (from the new tag area),
  // 4 = returned result.
  tagged_tok_t [4:0] ot;
  logic [4:0]        ot_str, ot_ack;

  new_tag_area #(.W(DATA_W), .N(4)) u_ntag (
    .clk, .rst_n, .grp(start), .grp_str(start_str), .grp_ack(start_ack),
    .in_tag(cur_tag), .tok(ot[3:0]), .tok_str(ot_str[3:0]), .tok_ack(ot_ack[3:0]));

  df_tag_op #(.W(DATA_W), .MODE(TAG_KEEP)) u_rtag (
    .clk, .rst_n, .a(ret), .stra(ret_str), .acka(ret_ack), .cur_tag,
    .z(ot[4]), .strz(ot_str[4]), .ackz(ot_ack[4]));

  comm_out #(
    .N_PORTS (5),
    .DEST_PID({PID_IO, P2_PID, P2_PID, P2_PID, P2_PID}),
    .DEST_ARC({4'd0,   4'd0,   4'd1,   4'd2,   4'd3})
  ) u_out (
    .clk, .rst_n, .tok(ot), .tok_str(ot_str), .tok_ack(ot_ack),
    .req, .frame, .gnt);

endmodule
