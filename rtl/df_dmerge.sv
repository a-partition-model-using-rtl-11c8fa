// df_dmerge: deterministic (controlled) merge.  A control token c decides
// which data input is read: TRUE (c != 0) reads input a, FALSE reads input b.
// The selected token is sent to z; the other input is left untouched and stays
// in its register for a later control token.  It fires when c holds a token,
// the selected input holds a token and the output register is empty or being
// emptied.  Each arc is a one-token register with the str/ack handshake
// (ack=1: busy).  One cycle from the last token accepted to strz.
//
// From the document: the TRUE/FALSE item selects input a or b respectively.
// Design choice: any non-zero control value is TRUE.
module df_dmerge
  import chipcflow_pkg::*;
#(
  parameter int W = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] c,
  input  logic         strc,
  output logic         ackc,
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

  logic [W-1:0] c_q, a_q, b_q, z_q;
  logic         c_full, a_full, b_full, z_full;
  logic         sel_a, fire, z_go;

  assign ackc = c_full;
  assign acka = a_full;
  assign ackb = b_full;
  assign z    = z_q;
  assign strz = z_full;

  assign sel_a = (c_q != '0);
  assign z_go  = z_full && !ackz;
  assign fire  = c_full && (sel_a ? a_full : b_full) && (!z_full || z_go);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_full <= 1'b0;
      a_full <= 1'b0;
      b_full <= 1'b0;
      z_full <= 1'b0;
      c_q    <= '0;
      a_q    <= '0;
      b_q    <= '0;
      z_q    <= '0;
    end else begin
      if (strc && !c_full) begin
        c_q    <= c;
        c_full <= 1'b1;
      end else if (fire) begin
        c_full <= 1'b0;
      end
      if (stra && !a_full) begin
        a_q    <= a;
        a_full <= 1'b1;
      end else if (fire && sel_a) begin
        a_full <= 1'b0;
      end
      if (strb && !b_full) begin
        b_q    <= b;
        b_full <= 1'b1;
      end else if (fire && !sel_a) begin
        b_full <= 1'b0;
      end
      if (fire) begin
        z_q    <= sel_a ? a_q : b_q;
        z_full <= 1'b1;
      end else if (z_go) begin
        z_full <= 1'b0;
      end
    end
  end

  c_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (strc && ackc) |=> (strc && $stable(c)));

endmodule
