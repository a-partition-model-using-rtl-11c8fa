// df_copy: copy operator.  Duplicates every input token onto N_OUT output
// arcs.  It fires when the input register holds a token and every output
// register is empty; each output is then drained by its own receiver with the
// str/ack handshake (ack=1: receiver busy).  One cycle from input accepted to
// outputs valid.
//
// From the document: a copy node sends the item of data to two receivers.
// Design choice: N_OUT is a parameter (default 2) because the partition
// graphs draw one copy node feeding three or four operators.
module df_copy
  import chipcflow_pkg::*;
#(
  parameter int W     = DATA_W,
  parameter int N_OUT = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [W-1:0]          a,
  input  logic                  stra,
  output logic                  acka,
  output logic [N_OUT-1:0][W-1:0] z,
  output logic [N_OUT-1:0]      strz,
  input  logic [N_OUT-1:0]      ackz
);

  logic [W-1:0]     a_q, z_q;
  logic             a_full;
  logic [N_OUT-1:0] z_full, z_go;
  logic             fire;

  assign acka = a_full;
  assign strz = z_full;
  assign z_go = z_full & ~ackz;
  assign fire = a_full && ((z_full & ~z_go) == '0);

  always_comb
    for (int k = 0; k < N_OUT; k++) z[k] = z_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_full <= 1'b0;
      z_full <= '0;
      a_q    <= '0;
      z_q    <= '0;
    end else begin
      if (stra && !a_full) begin
        a_q    <= a;
        a_full <= 1'b1;
      end else if (fire) begin
        a_full <= 1'b0;
      end
      if (fire) begin
        z_q    <= a_q;
        z_full <= '1;
      end else begin
        z_full <= z_full & ~z_go;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (stra && acka) |=> (stra && $stable(a)));

endmodule
