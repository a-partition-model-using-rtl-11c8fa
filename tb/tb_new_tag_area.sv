// tb_new_tag_area: self-checking test of the new tag area with four outputs.
// N groups are sent with random pauses and random enclosing tags; the four
// receivers are busy at random.  Output k of group g must carry data word k
// of the group and the tag {activation = g mod 256, iteration = 0,
// nesting = enclosing nesting + 1}; all four outputs of a group share it.
`timescale 1ns/1ps
module tb_new_tag_area;
  import chipcflow_pkg::*;
  localparam int N = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [63:0] grp;
  logic grp_str, grp_ack;
  tag_t in_tag;
  tagged_tok_t [3:0] tok;
  logic [3:0] tok_str, tok_ack;
  logic [63:0] gv [N];
  tag_t        tv [N];
  int gi, oi [4];

  new_tag_area #(.W(16), .N(4)) dut (.clk, .rst_n, .grp, .grp_str, .grp_ack, .in_tag,
                                     .tok, .tok_str, .tok_ack);

  initial for (int k = 0; k < N; k++) begin
    gv[k] = {$urandom, $urandom};
    tv[k] = tag_t'($urandom);
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      grp_str <= 0; gi <= 0; grp <= 0; in_tag <= 0; tok_ack <= '1;
      for (int k = 0; k < 4; k++) oi[k] <= 0;
    end else begin
      if (grp_str && !grp_ack) begin grp_str <= 0; gi <= gi + 1; end
      else if (!grp_str && gi < N && ($urandom % 2) != 0) begin
        grp_str <= 1; grp <= gv[gi]; in_tag <= tv[gi];
      end
      for (int k = 0; k < 4; k++) begin
        tok_ack[k] <= ($urandom % 3) == 0;
        if (tok_str[k] && !tok_ack[k]) begin
          checks++;
          if (tok[k].data !== gv[oi[k]][k*16 +: 16] || tok[k].tag.activation !== 8'(oi[k]) ||
              tok[k].tag.iteration !== 8'd0 || tok[k].tag.nesting !== tv[oi[k]].nesting + 4'd1) begin
            failures++;
            $display("FAIL out %0d group %0d: %h", k, oi[k], tok[k]);
          end
          oi[k] <= oi[k] + 1;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (oi[0] == N && oi[1] == N && oi[2] == N && oi[3] == N);
    repeat (5) @(posedge clk);
    checks++;
    if (tok_str != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
