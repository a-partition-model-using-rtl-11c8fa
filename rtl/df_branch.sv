// df_branch: controlled branch.  A control token c steers the data token a to
// output t (TRUE, c != 0) or to output f (FALSE).  It fires when c and a both
// hold a token and no earlier result is still waiting on either output (or it
// is being taken in the same cycle).  Each arc is a one-token register with the
// str/ack handshake (ack=1: busy).  One cycle from the last token accepted to
// the output strobe.
//
// From the document: a TRUE/FALSE control item decides whether the input goes
// to output t or f.  Design choice: any non-zero control value is TRUE; the
// data width is a parameter so that one branch can steer a group of values
// (partition p1 steers i, n-1, b and a together).
module df_branch
  import chipcflow_pkg::*;
#(
  parameter int W = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [DATA_W-1:0] c,
  input  logic         strc,
  output logic         ackc,
  input  logic [W-1:0] a,
  input  logic         stra,
  output logic         acka,
  output logic [W-1:0] t,
  output logic         strt,
  input  logic         ackt,
  output logic [W-1:0] f,
  output logic         strf,
  input  logic         ackf
);

  logic [DATA_W-1:0] c_q;
  logic [W-1:0]      a_q, o_q;
  logic              c_full, a_full, t_full, f_full;
  logic              sel_t, fire, t_go, f_go;

  assign ackc = c_full;
  assign acka = a_full;
  assign t    = o_q;
  assign f    = o_q;
  assign strt = t_full;
  assign strf = f_full;

  assign sel_t = (c_q != '0);
  assign t_go  = t_full && !ackt;
  assign f_go  = f_full && !ackf;
  // One shared output register: fire only when both outputs are free after
  // this cycle, so a waiting token is never overwritten.
  assign fire  = c_full && a_full && (!t_full || t_go) && (!f_full || f_go);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_full <= 1'b0;
      a_full <= 1'b0;
      t_full <= 1'b0;
      f_full <= 1'b0;
      c_q    <= '0;
      a_q    <= '0;
      o_q    <= '0;
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
      end else if (fire) begin
        a_full <= 1'b0;
      end
      if (fire) o_q <= a_q;
      t_full <= fire ? sel_t  : (t_full && !t_go);
      f_full <= fire ? !sel_t : (f_full && !f_go);
    end
  end

  c_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (strc && ackc) |=> (strc && $stable(c)));
  one_out: assert property (@(posedge clk) disable iff (!rst_n) !(t_full && f_full));

endmodule
