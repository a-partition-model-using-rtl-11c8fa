// p2_prr: one partially reconfigurable region configured with partition p2
// of the Fibonacci graph (one loop iteration per activation).
//
// Frames for partition number PID arrive through the input communicator on
// arcs 0..3 = i, n, b, a.  When the loop continues, the four new values get a
// next-tag (iteration + 1) and go as frames to partition NEXT_PID, the region
// that runs the next activation.  When the loop ends, a+b gets a restore-tag
// and goes to partition p1 (arc 1).  The other exit values (i, n, a) are
// consumed and dropped, as nothing in the graph reads them.
//
// Bus side: bus_frame is watched every cycle; arc_free goes to the scheduler;
// req/frame/gnt is the requester interface.
//
// From the document: p2's inputs i, n, b, a, its next-tag outputs to the next
// activation of p2 and its restore-tag output a(p1) to p1, and activations
// placed in different regions.  The ring of regions (NEXT_PID) is this
// design's choice; it needs at least two regions so that a region's tag is
// not overwritten before all outputs of its activation have taken it.
module p2_prr
  import chipcflow_pkg::*;
#(
  parameter logic [7:0] PID      = PID_P2_BASE,
  parameter logic [7:0] NEXT_PID = PID_P2_BASE + 8'd1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  frame_t      bus_frame,
  output logic [15:0] arc_free,
  output logic        req,
  output frame_t      frame,
  input  logic        gnt
);

  logic [3:0][DATA_W-1:0] in_tok;
  logic [3:0]             in_str, in_ack;
  tag_t                   cur_tag;

  comm_in #(.PID(PID), .N_ARCS(4)) u_in (
    .clk, .rst_n, .bus_frame, .arc_free,
    .tok(in_tok), .tok_str(in_str), .tok_ack(in_ack), .cur_tag);

  logic [3:0][DATA_W-1:0] nxt, ext;
  logic [3:0]             nxt_str, nxt_ack, ext_str, ext_ack;

  fib_partition2 #(.W(DATA_W)) u_p2 (
    .clk, .rst_n,
    .i(in_tok[0]), .i_str(in_str[0]), .i_ack(in_ack[0]),
    .n(in_tok[1]), .n_str(in_str[1]), .n_ack(in_ack[1]),
    .b(in_tok[2]), .b_str(in_str[2]), .b_ack(in_ack[2]),
    .a(in_tok[3]), .a_str(in_str[3]), .a_ack(in_ack[3]),
    .nxt, .nxt_str, .nxt_ack, .ext, .ext_str, .ext_ack);

  // Dropped exit values.
  assign ext_ack[3:1] = '0;

  // Ports 0..3: next-tag of nxt[0..3] (= a, b, n, i); port 4: restore-tag of a+b.
  tagged_tok_t [4:0] ot;
  logic [4:0]        ot_str, ot_ack;

  for (genvar k = 0; k < 4; k++) begin : g_next
    df_tag_op #(.W(DATA_W), .MODE(TAG_NEXT)) u_ntag (
      .clk, .rst_n, .a(nxt[k]), .stra(nxt_str[k]), .acka(nxt_ack[k]), .cur_tag,
      .z(ot[k]), .strz(ot_str[k]), .ackz(ot_ack[k]));
  end

  df_tag_op #(.W(DATA_W), .MODE(TAG_RESTORE)) u_rtag (
    .clk, .rst_n, .a(ext[0]), .stra(ext_str[0]), .acka(ext_ack[0]), .cur_tag,
    .z(ot[4]), .strz(ot_str[4]), .ackz(ot_ack[4]));

  comm_out #(
    .N_PORTS (5),
    .DEST_PID({PID_P1, NEXT_PID, NEXT_PID, NEXT_PID, NEXT_PID}),
    .DEST_ARC({4'd1,   4'd0,     4'd1,     4'd2,     4'd3})
  ) u_out (
    .clk, .rst_n, .tok(ot), .tok_str(ot_str), .tok_ack(ot_ack),
    .req, .frame, .gnt);

endmodule
