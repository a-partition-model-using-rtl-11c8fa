// fib_partition2: partition p2 of the Fibonacci dataflow graph, one loop
// iteration.  It is loaded into a partially reconfigurable region and runs
// once per activation.
//
// Graph (each node is a registered dataflow operator):
//   i -> copy(2) -> [i < n], [i + 1]
//   n -> copy(2) -> [i < n], n-branch data
//   a -> copy(2) -> [a + b], a-branch data
//   b -> [a + b]
//   [i < n] -> copy(4) = "go": control of the four branches
//   i-branch on i+1, n-branch on n, s-branch on a+b, a-branch on a
// TRUE (continue) outputs: i+1, n, a+b, a become i, n, a, b of the next
//   activation (nxt = {i, n, b, a} with nxt[3] = i ... nxt[0] = a).
// FALSE (exit) outputs: ext[3] = i+1, ext[2] = n, ext[1] = a, ext[0] = a+b;
//   ext[0] is Fib of the original n and goes back to partition p1.
//
// Starting from i=1, n-1, b=0, a=1 the state after k iterations is
// a = Fib(k+1), b = Fib(k), and the exit after n-2 iterations returns
// a+b = Fib(n).  From the document: the node set and wiring of the second
// partition (copies of i, n and a, the "<" compare, "+1", "a+b" and four
// branches with next-tag / restore-tag outputs).  Design choices: which
// branch output continues (TRUE) and which exits (FALSE), and the exit value
// order.  Ports use the str/ack handshake (ack=1: busy).
module fib_partition2
  import chipcflow_pkg::*;
#(
  parameter int W = DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [W-1:0]      i,
  input  logic              i_str,
  output logic              i_ack,
  input  logic [W-1:0]      n,
  input  logic              n_str,
  output logic              n_ack,
  input  logic [W-1:0]      b,
  input  logic              b_str,
  output logic              b_ack,
  input  logic [W-1:0]      a,
  input  logic              a_str,
  output logic              a_ack,
  output logic [3:0][W-1:0] nxt,
  output logic [3:0]        nxt_str,
  input  logic [3:0]        nxt_ack,
  output logic [3:0][W-1:0] ext,
  output logic [3:0]        ext_str,
  input  logic [3:0]        ext_ack
);

  logic [1:0][W-1:0] ic, ncp, ac;
  logic [1:0]        ic_str, ic_ack, nc_str, nc_ack, ac_str, ac_ack;

  df_copy #(.W(W), .N_OUT(2)) u_icopy (
    .clk, .rst_n, .a(i), .stra(i_str), .acka(i_ack), .z(ic), .strz(ic_str), .ackz(ic_ack));
  df_copy #(.W(W), .N_OUT(2)) u_ncopy (
    .clk, .rst_n, .a(n), .stra(n_str), .acka(n_ack), .z(ncp), .strz(nc_str), .ackz(nc_ack));
  df_copy #(.W(W), .N_OUT(2)) u_acopy (
    .clk, .rst_n, .a(a), .stra(a_str), .acka(a_ack), .z(ac), .strz(ac_str), .ackz(ac_ack));

  logic [W-1:0] lt, inc, sum;
  logic lt_str, lt_ack, inc_str, inc_ack, sum_str, sum_ack, unused_b;

  df_primitive #(.W(W), .OP(OP_LT)) u_lt (
    .clk, .rst_n, .a(ic[0]), .stra(ic_str[0]), .acka(ic_ack[0]),
    .b(ncp[0]), .strb(nc_str[0]), .ackb(nc_ack[0]), .z(lt), .strz(lt_str), .ackz(lt_ack));
  df_primitive #(.W(W), .OP(OP_ADD), .USE_IMM(1'b1), .IMM(W'(1))) u_inc (
    .clk, .rst_n, .a(ic[1]), .stra(ic_str[1]), .acka(ic_ack[1]),
    .b('0), .strb(1'b0), .ackb(unused_b), .z(inc), .strz(inc_str), .ackz(inc_ack));
  df_primitive #(.W(W), .OP(OP_ADD)) u_sum (
    .clk, .rst_n, .a(ac[0]), .stra(ac_str[0]), .acka(ac_ack[0]),
    .b(b), .strb(b_str), .ackb(b_ack), .z(sum), .strz(sum_str), .ackz(sum_ack));

  // go copy: 0 -> i-branch, 1 -> n-branch, 2 -> s-branch, 3 -> a-branch
  logic [3:0][W-1:0] gc;
  logic [3:0]        gc_str, gc_ack;
  df_copy #(.W(W), .N_OUT(4)) u_gcopy (
    .clk, .rst_n, .a(lt), .stra(lt_str), .acka(lt_ack), .z(gc), .strz(gc_str), .ackz(gc_ack));

  // i-branch: continue -> next i; exit -> ext[3]
  df_branch #(.W(W)) u_ibr (
    .clk, .rst_n, .c(DATA_W'(gc[0])), .strc(gc_str[0]), .ackc(gc_ack[0]),
    .a(inc), .stra(inc_str), .acka(inc_ack),
    .t(nxt[3]), .strt(nxt_str[3]), .ackt(nxt_ack[3]),
    .f(ext[3]), .strf(ext_str[3]), .ackf(ext_ack[3]));
  // n-branch: continue -> next n; exit -> ext[2]
  df_branch #(.W(W)) u_nbr (
    .clk, .rst_n, .c(DATA_W'(gc[1])), .strc(gc_str[1]), .ackc(gc_ack[1]),
    .a(ncp[1]), .stra(nc_str[1]), .acka(nc_ack[1]),
    .t(nxt[2]), .strt(nxt_str[2]), .ackt(nxt_ack[2]),
    .f(ext[2]), .strf(ext_str[2]), .ackf(ext_ack[2]));
  // s-branch: continue -> next a; exit -> ext[0] (the result)
  df_branch #(.W(W)) u_sbr (
    .clk, .rst_n, .c(DATA_W'(gc[2])), .strc(gc_str[2]), .ackc(gc_ack[2]),
    .a(sum), .stra(sum_str), .acka(sum_ack),
    .t(nxt[0]), .strt(nxt_str[0]), .ackt(nxt_ack[0]),
    .f(ext[0]), .strf(ext_str[0]), .ackf(ext_ack[0]));
  // a-branch: continue -> next b; exit -> ext[1]
  df_branch #(.W(W)) u_abr (
    .clk, .rst_n, .c(DATA_W'(gc[3])), .strc(gc_str[3]), .ackc(gc_ack[3]),
    .a(ac[1]), .stra(ac_str[1]), .acka(ac_ack[1]),
    .t(nxt[1]), .strt(nxt_str[1]), .ackt(nxt_ack[1]),
    .f(ext[1]), .strf(ext_str[1]), .ackf(ext_ack[1]));

endmodule
