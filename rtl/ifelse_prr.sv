// ifelse_prr: one partially reconfigurable region configured with one
// instance of the if/else partition, z = (x > 0) ? a + b : c - d.
//
// Frames for partition number PID arrive through the input communicator on
// arcs 0..4 = x, a, b, c, d.  The partition computes z, which takes the tag of
// the activation (the tag of the frames just received) and leaves through the
// output communicator as one frame to partition RET_PID, arc 0.
//
// Bus side: bus_frame is watched every cycle; arc_free goes to the scheduler;
// req/frame/gnt is the requester interface.  From the last operand frame to
// the request for the result takes about six clocks when nothing is blocked.
//
// From the document: the instance of the if/else partition inside a region,
// between an input and an output communicator, with its result going back to
// a restore-tag in the static part.  The arc numbers, and the rule that a
// region holds one activation at a time (kept by the sender, ifelse_static,
// so that the tag read here cannot change before z has taken it), are this
// design's choices.
module ifelse_prr
  import chipcflow_pkg::*;
#(
  parameter logic [7:0] PID     = 8'd4,
  parameter logic [7:0] RET_PID = 8'd3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  frame_t      bus_frame,
  output logic [15:0] arc_free,
  output logic        req,
  output frame_t      frame,
  input  logic        gnt
);

  logic [4:0][DATA_W-1:0] in_tok;
  logic [4:0]             in_str, in_ack;
  tag_t                   cur_tag;

  comm_in #(.PID(PID), .N_ARCS(5)) u_in (
    .clk, .rst_n, .bus_frame, .arc_free,
    .tok(in_tok), .tok_str(in_str), .tok_ack(in_ack), .cur_tag);

  logic [DATA_W-1:0] z;
  logic              z_str, z_ack;

  ifelse_partition #(.W(DATA_W)) u_part (
    .clk, .rst_n,
    .x(in_tok[0]), .x_str(in_str[0]), .x_ack(in_ack[0]),
    .a(in_tok[1]), .a_str(in_str[1]), .a_ack(in_ack[1]),
    .b(in_tok[2]), .b_str(in_str[2]), .b_ack(in_ack[2]),
    .c(in_tok[3]), .c_str(in_str[3]), .c_ack(in_ack[3]),
    .d(in_tok[4]), .d_str(in_str[4]), .d_ack(in_ack[4]),
    .z, .z_str, .z_ack);

  tagged_tok_t [0:0] ot;
  logic [0:0]        ot_str, ot_ack;

  df_tag_op #(.W(DATA_W), .MODE(TAG_KEEP)) u_tag (
    .clk, .rst_n, .a(z), .stra(z_str), .acka(z_ack), .cur_tag,
    .z(ot[0]), .strz(ot_str[0]), .ackz(ot_ack[0]));

  comm_out #(.N_PORTS(1), .DEST_PID(RET_PID), .DEST_ARC(4'd0)) u_out (
    .clk, .rst_n, .tok(ot), .tok_str(ot_str), .tok_ack(ot_ack),
    .req, .frame, .gnt);

endmodule
