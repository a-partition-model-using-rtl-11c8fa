// tb_df_dmerge: self-checking test of the deterministic merge.  A random
// control stream is generated; the a and b senders deliver exactly the tokens
// the control stream will select from them, with random pauses, and the
// receiver is busy at random.  Output order and values must follow the control
// stream: TRUE takes the next a token, FALSE the next b token.  At the end no
// token may be left in the operator.
`timescale 1ns/1ps
module tb_df_dmerge;
  localparam int N = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] c, a, b, z;
  logic strc, ackc, stra, acka, strb, ackb, strz, ackz;
  logic        cv [N];
  logic [15:0] exp_z [N], av [N], bv [N];
  int na = 0, nb = 0, ci, ai, bi, zi;

  df_dmerge #(.W(16)) dut (.clk, .rst_n, .c, .strc, .ackc, .a, .stra, .acka, .b, .strb, .ackb,
                           .z, .strz, .ackz);

  initial begin
    for (int k = 0; k < N; k++) begin
      cv[k] = 1'($urandom);
      exp_z[k] = 16'($urandom);
      if (cv[k]) av[na++] = exp_z[k]; else bv[nb++] = exp_z[k];
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      strc <= 0; stra <= 0; strb <= 0; ci <= 0; ai <= 0; bi <= 0; zi <= 0; ackz <= 1;
      c <= 0; a <= 0; b <= 0;
    end else begin
      if (strc && !ackc) begin strc <= 0; ci <= ci + 1; end
      else if (!strc && ci < N && ($urandom % 3) != 0) begin
        strc <= 1; c <= cv[ci] ? 16'(1 + ($urandom % 100)) : 16'd0;
      end
      if (stra && !acka) begin stra <= 0; ai <= ai + 1; end
      else if (!stra && ai < na && ($urandom % 3) != 0) begin stra <= 1; a <= av[ai]; end
      if (strb && !ackb) begin strb <= 0; bi <= bi + 1; end
      else if (!strb && bi < nb && ($urandom % 3) != 0) begin strb <= 1; b <= bv[bi]; end
      ackz <= ($urandom % 3) == 0;
      if (strz && !ackz) begin
        checks++;
        if (z !== exp_z[zi]) begin
          failures++;
          $display("FAIL token %0d: %h expected %h", zi, z, exp_z[zi]);
        end
        zi <= zi + 1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (zi == N);
    repeat (10) @(posedge clk);
    checks += 2;
    if (ackc || acka || ackb || strz) failures++;
    if (ai != na || bi != nb) failures++;
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
