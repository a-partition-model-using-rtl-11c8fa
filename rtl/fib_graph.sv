// fib_graph: the whole Fibonacci dataflow graph in one piece, before it is
// cut into partitions.  The same p1 and p2 node sets are wired directly:
//
//   n -> p1 -> loop-start group {i=1, n-1, b=0, a=1} -> new tag area (split
//   into four tokens) -> one non-deterministic merge per loop variable -> p2
//   p2 continue outputs (i+1, n, a, a+b) -> back into the merges
//   p2 exit a+b -> p1 "a" input -> p1 return -> res
//
// The merges at the loop entries take the start value or the value coming
// round the loop, whichever is there.  Tags are not carried on the direct
// arcs, so the next-tag and restore-tag operators of the drawn graph reduce to
// plain connections here; the new tag area is used only to split the group.
// Only one n is let into the graph at a time (n_ack stays 1 until the result
// has been taken), because tokens of two computations would mix at the
// merges.  Ports use the str/ack handshake (ack=1: busy).
//
// From the document: the node set, the merges (triangles) at the loop
// entries and the new tag area between the two areas.  The one-at-a-time
// gate and dropping the unused exit values are this design's choices.
module fib_graph
  import chipcflow_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] n,
  input  logic              n_str,
  output logic              n_ack,
  output logic [DATA_W-1:0] res,
  output logic              res_str,
  input  logic              res_ack
);

  logic busy, p1_n_ack, n_take, res_take;
  assign n_ack    = busy || p1_n_ack;
  assign n_take   = n_str && !n_ack;
  assign res_take = res_str && !res_ack;

  always_ff @(posedge clk) begin
    if (!rst_n)        busy <= 1'b0;
    else if (n_take)   busy <= 1'b1;
    else if (res_take) busy <= 1'b0;
  end

  logic [DATA_W-1:0]   a_back;
  logic                a_back_str, a_back_ack;
  logic [4*DATA_W-1:0] start;
  logic                start_str, start_ack;

  fib_partition1 #(.W(DATA_W)) u_p1 (
    .clk, .rst_n,
    .n(n), .n_str(n_str && !busy), .n_ack(p1_n_ack),
    .a(a_back), .a_str(a_back_str), .a_ack(a_back_ack),
    .ret(res), .ret_str(res_str), .ret_ack(res_ack),
    .start, .start_str, .start_ack);

  // Split the group: tok[0] = a, tok[1] = b, tok[2] = n-1, tok[3] = i.
  tagged_tok_t [3:0] st;
  logic [3:0]        st_str, st_ack;
  new_tag_area #(.W(DATA_W), .N(4)) u_ntag (
    .clk, .rst_n, .grp(start), .grp_str(start_str), .grp_ack(start_ack),
    .in_tag('0), .tok(st), .tok_str(st_str), .tok_ack(st_ack));

  // Loop-entry merges, index as p2's nxt: 0 = a, 1 = b, 2 = n, 3 = i.
  logic [3:0][DATA_W-1:0] nxt, ext, lv;
  logic [3:0]             nxt_str, nxt_ack, ext_str, ext_ack, lv_str, lv_ack;

  for (genvar k = 0; k < 4; k++) begin : g_merge
    df_ndmerge #(.W(DATA_W)) u_m (
      .clk, .rst_n,
      .a(st[k].data), .stra(st_str[k]), .acka(st_ack[k]),
      .b(nxt[k]), .strb(nxt_str[k]), .ackb(nxt_ack[k]),
      .z(lv[k]), .strz(lv_str[k]), .ackz(lv_ack[k]));
  end

  fib_partition2 #(.W(DATA_W)) u_p2 (
    .clk, .rst_n,
    .i(lv[3]), .i_str(lv_str[3]), .i_ack(lv_ack[3]),
    .n(lv[2]), .n_str(lv_str[2]), .n_ack(lv_ack[2]),
    .b(lv[1]), .b_str(lv_str[1]), .b_ack(lv_ack[1]),
    .a(lv[0]), .a_str(lv_str[0]), .a_ack(lv_ack[0]),
    .nxt, .nxt_str, .nxt_ack, .ext, .ext_str, .ext_ack);

  assign a_back      = ext[0];
  assign a_back_str  = ext_str[0];
  assign ext_ack[0]  = a_back_ack;
  assign ext_ack[3:1] = '0;   // exit values i, n, a: no reader

endmodule
