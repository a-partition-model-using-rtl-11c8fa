// df_primitive: primitive dataflow operator (add, sub, mul, div, and, or, not
// and the comparisons used as the IF operator).
//
// Each arc ends in a one-token register, so an arc holds at most one item of
// data (static dataflow).  A token is passed on a rising clock edge when the
// sender drives str=1 and the receiver drives ack=0; ack=1 means the
// receiver's register is busy.  The operator fires when every input it needs
// holds a token and its output register is empty or is being emptied in the
// same cycle: it consumes the inputs and writes the result into the output
// register.  Latency from the last operand accepted to strz is one cycle;
// one result every two cycles at most.
//
// From the document: 16-bit data buses, str/ack control per bus, registers on
// the input and output buses, firing only when all inputs hold data.
// Design choices: ack as "register full", constants are folded in as an
// immediate operand (USE_IMM) instead of constant-generating nodes, a
// comparison yields 1 (TRUE) or 0 (FALSE), comparisons are signed when
// SIGNED_CMP is set, division by zero yields all ones, and OP_NOT uses only a.
module df_primitive
  import chipcflow_pkg::*;
#(
  parameter int          W          = DATA_W,
  parameter prim_op_e    OP         = OP_ADD,
  parameter bit          USE_IMM    = 1'b0,
  parameter logic [W-1:0] IMM       = '0,
  parameter bit          SIGNED_CMP = 1'b1
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

  localparam bit NEED_B = !USE_IMM && (OP != OP_NOT);

  logic [W-1:0] a_q, b_q, z_q;
  logic         a_full, b_full, z_full;
  logic [W-1:0] opb, res;
  logic         take_a, take_b, fire, z_go;

  assign acka = a_full;
  assign ackb = NEED_B ? b_full : 1'b1;
  assign z    = z_q;
  assign strz = z_full;

  assign take_a = stra && !a_full;
  assign take_b = NEED_B && strb && !b_full;
  assign z_go   = z_full && !ackz;
  assign fire   = a_full && (b_full || !NEED_B) && (!z_full || z_go);

  assign opb = USE_IMM ? IMM : b_q;

  always_comb begin
    logic lt, gt;
    lt = SIGNED_CMP ? ($signed(a_q) < $signed(opb)) : (a_q < opb);
    gt = SIGNED_CMP ? ($signed(a_q) > $signed(opb)) : (a_q > opb);
    case (OP)
      OP_ADD: res = a_q + opb;
      OP_SUB: res = a_q - opb;
      OP_MUL: res = a_q * opb;
      OP_DIV: res = (opb == '0) ? '1 : a_q / opb;
      OP_AND: res = a_q & opb;
      OP_OR:  res = a_q | opb;
      OP_NOT: res = ~a_q;
      OP_EQ:  res = W'(a_q == opb);
      OP_NE:  res = W'(a_q != opb);
      OP_LT:  res = W'(lt);
      OP_GT:  res = W'(gt);
      OP_LE:  res = W'(!gt);
      OP_GE:  res = W'(!lt);
      default: res = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_full <= 1'b0;
      b_full <= 1'b0;
      z_full <= 1'b0;
      a_q    <= '0;
      b_q    <= '0;
      z_q    <= '0;
    end else begin
      if (take_a) begin
        a_q    <= a;
        a_full <= 1'b1;
      end else if (fire) begin
        a_full <= 1'b0;
      end
      if (take_b) begin
        b_q    <= b;
        b_full <= 1'b1;
      end else if (fire && NEED_B) begin
        b_full <= 1'b0;
      end
      if (fire) begin
        z_q    <= res;
        z_full <= 1'b1;
      end else if (z_go) begin
        z_full <= 1'b0;
      end
    end
  end

  // A sender keeps its token on the bus until it has been taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (stra && acka) |=> (stra && $stable(a)));

endmodule
