// tb_df_primitive: self-checking test of the primitive operator.  Seven
// instances (add, sub, mul, div, signed less-than, equal-to-immediate, not)
// each receive the same pseudo-random operand streams through senders that
// pause at random, while their receivers are busy at random.  Every result is
// compared, in order, with the operation computed here; the number of
// results must equal the number of operand pairs.
`timescale 1ns/1ps
module tb_df_primitive;
  import chipcflow_pkg::*;

  localparam int N    = 200;
  localparam int NOPS = 7;
  localparam prim_op_e OPS [NOPS] = '{OP_ADD, OP_SUB, OP_MUL, OP_DIV, OP_LT, OP_EQ, OP_NOT};
  localparam bit       IMM_USE [NOPS] = '{0, 0, 0, 0, 0, 1, 0};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int done_cnt [NOPS];

  logic [15:0] av [N], bv [N];
  initial begin
    for (int k = 0; k < N; k++) begin
      av[k] = 16'($urandom);
      bv[k] = (k % 5 == 0) ? 16'(k % 3) : 16'($urandom);
      if (k % 7 == 0) bv[k] = av[k];
      if (k == 3) bv[k] = 16'd0;
    end
  end

  function automatic logic [15:0] model(prim_op_e op, logic [15:0] x, logic [15:0] y);
    case (op)
      OP_ADD: return x + y;
      OP_SUB: return x - y;
      OP_MUL: return 16'(32'(x) * 32'(y));
      OP_DIV: return (y == 0) ? 16'hFFFF : x / y;
      OP_LT:  return {15'd0, ($signed(x) < $signed(y))};
      OP_EQ:  return {15'd0, (x == 16'd7)};
      OP_NOT: return ~x;
      default: return 16'hDEAD;
    endcase
  endfunction

  for (genvar g = 0; g < NOPS; g++) begin : g_op
    logic [15:0] a, b, z;
    logic stra, strb, acka, ackb, strz, ackz;
    int ai, bi, zi;
    localparam bit NEEDB = !IMM_USE[g] && OPS[g] != OP_NOT;

    df_primitive #(.OP(OPS[g]), .USE_IMM(IMM_USE[g]), .IMM(16'd7)) dut (
      .clk, .rst_n, .a, .stra, .acka, .b, .strb, .ackb, .z, .strz, .ackz);

    always @(posedge clk) begin
      if (!rst_n) begin
        stra <= 0; strb <= 0; ai <= 0; bi <= 0; zi <= 0; ackz <= 1; a <= 0; b <= 0;
      end else begin
        if (stra && !acka) begin stra <= 0; ai <= ai + 1; end
        else if (!stra && ai < N && ($urandom % 4) != 0) begin stra <= 1; a <= av[ai]; end
        if (NEEDB) begin
          if (strb && !ackb) begin strb <= 0; bi <= bi + 1; end
          else if (!strb && bi < N && ($urandom % 3) != 0) begin strb <= 1; b <= bv[bi]; end
        end
        ackz <= ($urandom % 3) == 0;
        if (strz && !ackz) begin
          checks++;
          if (z !== model(OPS[g], av[zi], bv[zi])) begin
            failures++;
            $display("FAIL op=%s k=%0d a=%h b=%h z=%h exp=%h", OPS[g].name(), zi, av[zi], bv[zi],
                     z, model(OPS[g], av[zi], bv[zi]));
          end
          zi <= zi + 1;
        end
      end
    end
    assign done_cnt[g] = zi;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_cnt[0] == N && done_cnt[1] == N && done_cnt[2] == N && done_cnt[3] == N &&
          done_cnt[4] == N && done_cnt[5] == N && done_cnt[6] == N);
    repeat (20) @(posedge clk);
    for (int g = 0; g < NOPS; g++) begin
      checks++;
      if (done_cnt[g] != N) failures++;
    end
    // NOT and immediate forms must refuse a token on b.
    checks++;
    if (g_op[5].ackb !== 1'b1 || g_op[6].ackb !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
