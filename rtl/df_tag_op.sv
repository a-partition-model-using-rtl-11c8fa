// df_tag_op: next-tag / restore-tag operator.  It takes a data token and
// attaches to it the tag of the activation that produced it, transformed by
// MODE: TAG_NEXT increments the iteration (the token goes on to the next loop
// iteration), TAG_RESTORE clears the iteration and steps the nesting back out
// (the token leaves the loop), TAG_KEEP leaves the tag as it is.
//
// cur_tag is the tag of the running activation; it is sampled together with
// the data token.  Input and output are one-token registers with the str/ack
// handshake (ack=1: busy); one cycle latency.
//
// The document only names the next-tag and restore-tag operators; what they
// do to the tag fields is this design's choice.
module df_tag_op
  import chipcflow_pkg::*;
#(
  parameter int        W    = DATA_W,
  parameter tag_mode_e MODE = TAG_NEXT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic         stra,
  output logic         acka,
  input  tag_t         cur_tag,
  output tagged_tok_t  z,
  output logic         strz,
  input  logic         ackz
);

  logic [W-1:0] a_q;
  tag_t         t_q;
  logic         a_full, z_full, fire, z_go;
  tagged_tok_t  z_q;

  assign acka = a_full;
  assign z    = z_q;
  assign strz = z_full;
  assign z_go = z_full && !ackz;
  assign fire = a_full && (!z_full || z_go);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_full <= 1'b0;
      z_full <= 1'b0;
      a_q    <= '0;
      t_q    <= '0;
      z_q    <= '0;
    end else begin
      if (stra && !a_full) begin
        a_q    <= a;
        t_q    <= cur_tag;
        a_full <= 1'b1;
      end else if (fire) begin
        a_full <= 1'b0;
      end
      if (fire) begin
        z_q.data <= DATA_W'(a_q);
        z_q.tag  <= tag_apply(MODE, t_q);
        z_full   <= 1'b1;
      end else if (z_go) begin
        z_full <= 1'b0;
      end
    end
  end

endmodule
