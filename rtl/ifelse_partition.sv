// ifelse_partition: the example partition used to explain the partition
// model, computing  z = (x > 0) ? a + b : c - d  as a dataflow graph.
//
// Graph (each node is a registered dataflow operator):
//   x -> [x > 0] -> copy(3) = "cond": control of the merge and two branches
//   a, b -> [a + b] -> sum-branch:  TRUE -> merge TRUE input,  FALSE -> dropped
//   c, d -> [c - d] -> diff-branch: FALSE -> merge FALSE input, TRUE -> dropped
//   merge (deterministic): TRUE takes a + b, FALSE takes c - d -> z
//
// Every evaluation takes one token on each of x, a, b, c, d and gives one z.
// Ports use the str/ack handshake (ack=1: busy); x > 0 is a signed compare.
//
// From the document: the ">" against 0, the adder, the subtractor and the
// merge controlled by the compare.  Design choice: the two branches in front
// of the merge, which drop the result that is not selected so that no stale
// token stays on an arc for the next evaluation.
module ifelse_partition
  import chipcflow_pkg::*;
#(
  parameter int W = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] x,
  input  logic         x_str,
  output logic         x_ack,
  input  logic [W-1:0] a,
  input  logic         a_str,
  output logic         a_ack,
  input  logic [W-1:0] b,
  input  logic         b_str,
  output logic         b_ack,
  input  logic [W-1:0] c,
  input  logic         c_str,
  output logic         c_ack,
  input  logic [W-1:0] d,
  input  logic         d_str,
  output logic         d_ack,
  output logic [W-1:0] z,
  output logic         z_str,
  input  logic         z_ack
);

  logic [W-1:0] gt, sum, dif;
  logic gt_str, gt_ack, sum_str, sum_ack, dif_str, dif_ack, unused_b;

  df_primitive #(.W(W), .OP(OP_GT), .USE_IMM(1'b1), .IMM(W'(0)), .SIGNED_CMP(1'b1)) u_gt (
    .clk, .rst_n, .a(x), .stra(x_str), .acka(x_ack), .b('0), .strb(1'b0), .ackb(unused_b),
    .z(gt), .strz(gt_str), .ackz(gt_ack));
  df_primitive #(.W(W), .OP(OP_ADD)) u_add (
    .clk, .rst_n, .a(a), .stra(a_str), .acka(a_ack), .b(b), .strb(b_str), .ackb(b_ack),
    .z(sum), .strz(sum_str), .ackz(sum_ack));
  df_primitive #(.W(W), .OP(OP_SUB)) u_sub (
    .clk, .rst_n, .a(c), .stra(c_str), .acka(c_ack), .b(d), .strb(d_str), .ackb(d_ack),
    .z(dif), .strz(dif_str), .ackz(dif_ack));

  // cond copy: 0 -> merge, 1 -> sum-branch, 2 -> diff-branch
  logic [2:0][W-1:0] cc;
  logic [2:0]        cc_str, cc_ack;
  df_copy #(.W(W), .N_OUT(3)) u_ccopy (
    .clk, .rst_n, .a(gt), .stra(gt_str), .acka(gt_ack), .z(cc), .strz(cc_str), .ackz(cc_ack));

  logic [W-1:0] s_t, s_f, d_t, d_f;
  logic s_t_str, s_t_ack, s_f_str, d_t_str, d_f_str, d_f_ack;

  df_branch #(.W(W)) u_sbr (
    .clk, .rst_n, .c(DATA_W'(cc[1])), .strc(cc_str[1]), .ackc(cc_ack[1]),
    .a(sum), .stra(sum_str), .acka(sum_ack),
    .t(s_t), .strt(s_t_str), .ackt(s_t_ack), .f(s_f), .strf(s_f_str), .ackf(1'b0));
  df_branch #(.W(W)) u_dbr (
    .clk, .rst_n, .c(DATA_W'(cc[2])), .strc(cc_str[2]), .ackc(cc_ack[2]),
    .a(dif), .stra(dif_str), .acka(dif_ack),
    .t(d_t), .strt(d_t_str), .ackt(1'b0), .f(d_f), .strf(d_f_str), .ackf(d_f_ack));

  df_dmerge #(.W(W)) u_merge (
    .clk, .rst_n, .c(cc[0]), .strc(cc_str[0]), .ackc(cc_ack[0]),
    .a(s_t), .stra(s_t_str), .acka(s_t_ack),
    .b(d_f), .strb(d_f_str), .ackb(d_f_ack),
    .z, .strz(z_str), .ackz(z_ack));

endmodule
