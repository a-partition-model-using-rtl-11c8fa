// ifelse_static: static-region side of the if/else example placed as two
// instances of one partition in two regions.
//
// The host hands in one group {d, c, b, a, x} (grp[0] = x) with a single
// str/ack pair.  A new-tag area gives the group a fresh activation number and
// splits it into five tagged tokens.  Even activations go to the region with
// partition number PRR_PID, odd ones to PRR_PID+1, so the first group uses
// instance 1, the second instance 2, the third instance 1 again, and so on.
// Each token becomes one frame through the output communicator, on arcs
// 0..4 = x, a, b, c, d.  The z frames coming back arrive on arc 0 of this
// partition's input communicator (number PID), get a restore-tag and are
// handed to the host as res/res_tag; results of the two instances may come
// back in either order, and the activation number in res_tag tells them
// apart.
//
// A region holds one activation at a time: a group is refused (grp_ack = 1)
// while the region it would go to still owes its result.  Its busy bit is
// set when the group is accepted and cleared when the result enters the
// restore-tag.
//
// Bus side: bus_frame, arc_free, req/frame/gnt as for any partition.
//
// From the document: the new-tag area in front of two instances of the same
// partition, the alternation between the instances and the restore-tag
// behind them.  The busy bits, the arc numbers and the parity rule for
// choosing a region are this design's choices.
module ifelse_static
  import chipcflow_pkg::*;
#(
  parameter logic [7:0] PID     = 8'd4,
  parameter logic [7:0] PRR_PID = 8'd5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [4:0][DATA_W-1:0] grp,
  input  logic                   grp_str,
  output logic                   grp_ack,
  output logic [DATA_W-1:0]      res,
  output tag_t                   res_tag,
  output logic                   res_str,
  input  logic                   res_ack,
  input  frame_t                 bus_frame,
  output logic [15:0]            arc_free,
  output logic                   req,
  output frame_t                 frame,
  input  logic                   gnt
);

  // ---- one activation per region ----
  logic [1:0] busy;
  logic       par;          // region of the next group (follows the activation number)
  logic       nt_str, nt_ack, take;

  assign nt_str  = grp_str && !busy[par];
  assign grp_ack = nt_ack || busy[par];
  assign take    = nt_str && !nt_ack;

  // ---- new tag area and the choice of region ----
  tagged_tok_t [4:0] nt;
  logic [4:0]        nt_tok_str, nt_tok_ack;

  new_tag_area #(.W(DATA_W), .N(5)) u_ntag (
    .clk, .rst_n, .grp(grp), .grp_str(nt_str), .grp_ack(nt_ack), .in_tag('0),
    .tok(nt), .tok_str(nt_tok_str), .tok_ack(nt_tok_ack));

  // Ports 0..4 go to the even region, ports 5..9 to the odd one.
  tagged_tok_t [9:0] ot;
  logic [9:0]        ot_str, ot_ack;

  for (genvar k = 0; k < 5; k++) begin : g_steer
    logic odd;
    assign odd           = nt[k].tag.activation[0];
    assign ot[k]         = nt[k];
    assign ot[k+5]       = nt[k];
    assign ot_str[k]     = nt_tok_str[k] && !odd;
    assign ot_str[k+5]   = nt_tok_str[k] &&  odd;
    assign nt_tok_ack[k] = odd ? ot_ack[k+5] : ot_ack[k];
  end

  localparam logic [7:0] P0 = PRR_PID;
  localparam logic [7:0] P1 = PRR_PID + 8'd1;

  comm_out #(
    .N_PORTS (10),
    .DEST_PID({P1, P1, P1, P1, P1, P0, P0, P0, P0, P0}),
    .DEST_ARC({4'd4, 4'd3, 4'd2, 4'd1, 4'd0, 4'd4, 4'd3, 4'd2, 4'd1, 4'd0})
  ) u_out (
    .clk, .rst_n, .tok(ot), .tok_str(ot_str), .tok_ack(ot_ack),
    .req, .frame, .gnt);

  // ---- results ----
  logic [0:0][DATA_W-1:0] in_tok;
  logic [0:0]             in_str, in_ack;
  tag_t                   cur_tag;
  tagged_tok_t            rz;
  logic                   back;

  comm_in #(.PID(PID), .N_ARCS(1)) u_in (
    .clk, .rst_n, .bus_frame, .arc_free,
    .tok(in_tok), .tok_str(in_str), .tok_ack(in_ack), .cur_tag);

  df_tag_op #(.W(DATA_W), .MODE(TAG_RESTORE)) u_rtag (
    .clk, .rst_n, .a(in_tok[0]), .stra(in_str[0]), .acka(in_ack[0]), .cur_tag,
    .z(rz), .strz(res_str), .ackz(res_ack));

  assign res     = rz.data;
  assign res_tag = rz.tag;
  assign back    = in_str[0] && !in_ack[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= '0;
      par  <= 1'b0;
    end else begin
      if (take) begin
        busy[par] <= 1'b1;
        par       <= !par;
      end
      if (back) busy[cur_tag.activation[0]] <= 1'b0;
    end
  end

endmodule
