// new_tag_area: gives a group of N tokens that enters a partitioned area a
// fresh tag, and splits the group into N tagged tokens, one per outgoing arc.
//
// The group arrives as one token of N*W bits (str/ack handshake, ack=1: busy).
// When it holds a group and all N output registers are empty, it fires: every
// output gets the same tag {activation = counter, iteration = 0,
// nesting = in_tag.nesting + 1} and the counter advances, so each group that
// enters the area is told apart from the others by its activation number.
// Each output is then drained by its own receiver.  One cycle latency.
//
// From the document: the new tag area generates a new tag for each data item
// coming into the instances, and the tag is made of activation, iteration and
// nesting fields.  Design choices: the counter (wrapping at 256), iteration
// starting at 0 and nesting one deeper than the enclosing context.
module new_tag_area
  import chipcflow_pkg::*;
#(
  parameter int W = DATA_W,
  parameter int N = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N*W-1:0]           grp,
  input  logic                     grp_str,
  output logic                     grp_ack,
  input  tag_t                     in_tag,
  output tagged_tok_t [N-1:0]      tok,
  output logic [N-1:0]             tok_str,
  input  logic [N-1:0]             tok_ack
);

  logic [N*W-1:0] g_q;
  logic           g_full;
  tag_t           in_tag_q;
  tagged_tok_t [N-1:0] o_q;
  logic [N-1:0]   o_full, o_go;
  logic [7:0]     act_cnt;
  logic           fire;

  assign grp_ack = g_full;
  assign tok     = o_q;
  assign tok_str = o_full;
  assign o_go    = o_full & ~tok_ack;
  assign fire    = g_full && ((o_full & ~o_go) == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      g_full   <= 1'b0;
      o_full   <= '0;
      act_cnt  <= '0;
      g_q      <= '0;
      in_tag_q <= '0;
      o_q      <= '0;
    end else begin
      if (grp_str && !g_full) begin
        g_q      <= grp;
        in_tag_q <= in_tag;
        g_full   <= 1'b1;
      end else if (fire) begin
        g_full <= 1'b0;
      end
      if (fire) begin
        for (int k = 0; k < N; k++) begin
          o_q[k].data           <= DATA_W'(g_q[k*W +: W]);
          o_q[k].tag.activation <= act_cnt;
          o_q[k].tag.iteration  <= '0;
          o_q[k].tag.nesting    <= in_tag_q.nesting + 4'd1;
        end
        o_full  <= '1;
        act_cnt <= act_cnt + 8'd1;
      end else begin
        o_full <= o_full & ~o_go;
      end
    end
  end

endmodule
