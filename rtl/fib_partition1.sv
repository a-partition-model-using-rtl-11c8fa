// fib_partition1: partition p1 of the Fibonacci dataflow graph, the part that
// sits in the static region.
//
// Graph (each node is a registered dataflow operator):
//   n  -> copy(4) -> [n == 0], [n == 1], [n - 1], n-branch data
//   [n == 0] or [n == 1] -> copy(3) = "sml": control of the start branch,
//                           of the n-branch and of the return merge
//   start branch (64-bit group {i=1, n-1, b=0, a=1}):
//        FALSE (n >= 2) -> start output (to the new tag area and p2)
//        TRUE  (n <  2) -> dropped
//   n-branch: TRUE -> return merge TRUE input, FALSE -> dropped
//   return merge: TRUE (n < 2) returns n, FALSE returns a coming back from p2
//
// So Fib(0) = 0 and Fib(1) = 1 return at once, and for n >= 2 the loop state
// i=1, n-1, b=0, a=1 is sent out to p2, whose final a+b comes back on a_in.
//
// From the document: the comparisons with 0 and 1, their "or", n-1, the
// controlled branch that emits i, n-1, b, a with the constants 1, 0, 1, the
// new tag area after it and the merge that returns a.  Design choices: the
// branch steers the four values as one 64-bit group, constants are immediates
// of the operators, the unused TRUE outputs are dropped (always acknowledged),
// and the n token is routed through a branch before the return merge so that
// no stale token is left on an arc when n >= 2.  Ports use the str/ack
// handshake (ack=1: busy).  start = {i, n-1, b, a}, i in the top bits.
module fib_partition1
  import chipcflow_pkg::*;
#(
  parameter int W = DATA_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [W-1:0]   n,
  input  logic           n_str,
  output logic           n_ack,
  input  logic [W-1:0]   a,
  input  logic           a_str,
  output logic           a_ack,
  output logic [W-1:0]   ret,
  output logic           ret_str,
  input  logic           ret_ack,
  output logic [4*W-1:0] start,
  output logic           start_str,
  input  logic           start_ack
);

  // n copy: 0 -> eq0, 1 -> eq1, 2 -> minus, 3 -> n-branch
  logic [3:0][W-1:0] nc;
  logic [3:0]        nc_str, nc_ack;
  df_copy #(.W(W), .N_OUT(4)) u_ncopy (
    .clk, .rst_n, .a(n), .stra(n_str), .acka(n_ack),
    .z(nc), .strz(nc_str), .ackz(nc_ack));

  logic [W-1:0] eq0, eq1, nm1, sml;
  logic eq0_str, eq0_ack, eq1_str, eq1_ack, nm1_str, nm1_ack, sml_str, sml_ack;
  logic unused_b0, unused_b1, unused_b2;

  df_primitive #(.W(W), .OP(OP_EQ), .USE_IMM(1'b1), .IMM(W'(0))) u_eq0 (
    .clk, .rst_n, .a(nc[0]), .stra(nc_str[0]), .acka(nc_ack[0]),
    .b('0), .strb(1'b0), .ackb(unused_b0), .z(eq0), .strz(eq0_str), .ackz(eq0_ack));
  df_primitive #(.W(W), .OP(OP_EQ), .USE_IMM(1'b1), .IMM(W'(1))) u_eq1 (
    .clk, .rst_n, .a(nc[1]), .stra(nc_str[1]), .acka(nc_ack[1]),
    .b('0), .strb(1'b0), .ackb(unused_b1), .z(eq1), .strz(eq1_str), .ackz(eq1_ack));
  df_primitive #(.W(W), .OP(OP_SUB), .USE_IMM(1'b1), .IMM(W'(1))) u_minus (
    .clk, .rst_n, .a(nc[2]), .stra(nc_str[2]), .acka(nc_ack[2]),
    .b('0), .strb(1'b0), .ackb(unused_b2), .z(nm1), .strz(nm1_str), .ackz(nm1_ack));
  df_primitive #(.W(W), .OP(OP_OR)) u_or (
    .clk, .rst_n, .a(eq0), .stra(eq0_str), .acka(eq0_ack),
    .b(eq1), .strb(eq1_str), .ackb(eq1_ack), .z(sml), .strz(sml_str), .ackz(sml_ack));

  // sml copy: 0 -> start branch, 1 -> n-branch, 2 -> return merge
  logic [2:0][W-1:0] sc;
  logic [2:0]        sc_str, sc_ack;
  df_copy #(.W(W), .N_OUT(3)) u_scopy (
    .clk, .rst_n, .a(sml), .stra(sml_str), .acka(sml_ack),
    .z(sc), .strz(sc_str), .ackz(sc_ack));

  // Start branch on the group {i=1, n-1, b=0, a=1}.
  logic [4*W-1:0] grp_t;
  logic           grp_t_str;
  df_branch #(.W(4*W)) u_start (
    .clk, .rst_n, .c(DATA_W'(sc[0])), .strc(sc_str[0]), .ackc(sc_ack[0]),
    .a({W'(1), nm1, W'(0), W'(1)}), .stra(nm1_str), .acka(nm1_ack),
    .t(grp_t), .strt(grp_t_str), .ackt(1'b0),
    .f(start), .strf(start_str), .ackf(start_ack));

  // n-branch: only n < 2 reaches the return merge.
  logic [W-1:0] nb_t, nb_f;
  logic         nb_t_str, nb_t_ack, nb_f_str;
  df_branch #(.W(W)) u_nbr (
    .clk, .rst_n, .c(DATA_W'(sc[1])), .strc(sc_str[1]), .ackc(sc_ack[1]),
    .a(nc[3]), .stra(nc_str[3]), .acka(nc_ack[3]),
    .t(nb_t), .strt(nb_t_str), .ackt(nb_t_ack),
    .f(nb_f), .strf(nb_f_str), .ackf(1'b0));

  // Return merge: TRUE -> n, FALSE -> a from p2.
  df_dmerge #(.W(W)) u_ret (
    .clk, .rst_n, .c(sc[2]), .strc(sc_str[2]), .ackc(sc_ack[2]),
    .a(nb_t), .stra(nb_t_str), .acka(nb_t_ack),
    .b(a), .strb(a_str), .ackb(a_ack),
    .z(ret), .strz(ret_str), .ackz(ret_ack));

endmodule
