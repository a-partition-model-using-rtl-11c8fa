// df_ndmerge: non-deterministic merge.  Whichever of inputs a and b delivers
// a token first is sent to z.  When both registers hold a token, the older one
// goes first; tokens that arrive in the same cycle are ordered a before b.
// Each arc is a one-token register with the str/ack handshake (ack=1: busy).
// One cycle from token accepted to strz.
//
// From the document: the first data to arrive from a or b is sent to z.
// Design choice: the tie rule (a first) and the age bit that orders waiting
// tokens.
module df_ndmerge
  import chipcflow_pkg::*;
#(
  parameter int W = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic         stra,
  output logic         acka,
  input  logic [W-1:0] b,
  input  logic         strb,
  output logic         ackb,
  output logic [W-1:0] z,
  output logic         strz,
  input  logic         ackz
);

  logic [W-1:0] a_q, b_q, z_q;
  logic         a_full, b_full, z_full, b_older;
  logic         take_a, take_b, sel_a, fire, z_go;

  assign acka = a_full;
  assign ackb = b_full;
  assign z    = z_q;
  assign strz = z_full;

  assign take_a = stra && !a_full;
  assign take_b = strb && !b_full;
  assign sel_a  = a_full && !(b_full && b_older);
  assign z_go   = z_full && !ackz;
  assign fire   = (a_full || b_full) && (!z_full || z_go);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_full  <= 1'b0;
      b_full  <= 1'b0;
      z_full  <= 1'b0;
      b_older <= 1'b0;
      a_q     <= '0;
      b_q     <= '0;
      z_q     <= '0;
    end else begin
      if (take_a) begin
        a_q    <= a;
        a_full <= 1'b1;
      end else if (fire && sel_a) begin
        a_full <= 1'b0;
      end
      if (take_b) begin
        b_q    <= b;
        b_full <= 1'b1;
      end else if (fire && !sel_a) begin
        b_full <= 1'b0;
      end
      // Age: b is older than a when b waits and a arrives after it.
      if (take_a && b_full && !(fire && !sel_a)) b_older <= 1'b1;
      else if (take_b) b_older <= 1'b0;
      if (fire) begin
        z_q    <= sel_a ? a_q : b_q;
        z_full <= 1'b1;
      end else if (z_go) begin
        z_full <= 1'b0;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (stra && acka) |=> (stra && $stable(a)));

endmodule
