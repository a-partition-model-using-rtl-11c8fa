// tb_df_ndmerge: self-checking test of the non-deterministic merge.
// Part 1: directed arrival orders - a alone, b alone, b then a (b must come
// out first), a then b, both in the same cycle (a first), and tokens that
// wait behind a busy output, which must leave in arrival order.  Part 2: random
// streams on both inputs with a busy receiver; every token must come out
// exactly once, and each input's tokens keep their order.
`timescale 1ns/1ps
module tb_df_ndmerge;
  localparam int N = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] a, b, z;
  logic stra, acka, strb, ackb, strz, ackz;

  df_ndmerge #(.W(16)) dut (.clk, .rst_n, .a, .stra, .acka, .b, .strb, .ackb, .z, .strz, .ackz);

  task automatic expect_out(logic [15:0] v);
    int t = 0;
    ackz = 0;
    while (!strz && t < 20) begin @(posedge clk); #1; t++; end
    checks++;
    if (!strz || z !== v) begin
      failures++;
      $display("FAIL directed: got %h (str %0b) expected %h", z, strz, v);
    end
    @(posedge clk); #1;
    ackz = 1;
  endtask

  task automatic send_a(logic [15:0] v);
    a = v; stra = 1;
    while (acka) begin @(posedge clk); #1; end
    @(posedge clk); #1; stra = 0;
  endtask
  task automatic send_b(logic [15:0] v);
    b = v; strb = 1;
    while (ackb) begin @(posedge clk); #1; end
    @(posedge clk); #1; strb = 0;
  endtask

  int ai, bi, ao, bo;
  bit rnd = 0;
  always @(posedge clk) if (rnd) begin
    if (stra && !acka) begin stra <= 0; ai <= ai + 1; end
    else if (!stra && ai < N && ($urandom % 3) == 0) begin stra <= 1; a <= 16'h1000 + 16'(ai); end
    if (strb && !ackb) begin strb <= 0; bi <= bi + 1; end
    else if (!strb && bi < N && ($urandom % 3) == 0) begin strb <= 1; b <= 16'h2000 + 16'(bi); end
    ackz <= ($urandom % 3) == 0;
    if (strz && !ackz) begin
      checks++;
      if (z == 16'h1000 + 16'(ao)) ao <= ao + 1;
      else if (z == 16'h2000 + 16'(bo)) bo <= bo + 1;
      else begin failures++; $display("FAIL random: unexpected %h (ao=%0d bo=%0d)", z, ao, bo); end
    end
  end

  initial begin
    a = 0; b = 0; stra = 0; strb = 0; ackz = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    send_a(16'h0A01); expect_out(16'h0A01);
    send_b(16'h0B01); expect_out(16'h0B01);
    send_b(16'h0B02); send_a(16'h0A02); expect_out(16'h0B02); expect_out(16'h0A02);
    send_a(16'h0A03); send_b(16'h0B03); expect_out(16'h0A03); expect_out(16'h0B03);
    a = 16'h0A04; b = 16'h0B04; stra = 1; strb = 1; @(posedge clk); #1; stra = 0; strb = 0;
    expect_out(16'h0A04); expect_out(16'h0B04);
    // Output held busy: b waits first, then a arrives; b must leave first.
    send_a(16'h0A05); send_b(16'h0B05); repeat (2) @(posedge clk); #1 send_a(16'h0A06);
    expect_out(16'h0A05); expect_out(16'h0B05); expect_out(16'h0A06);
    send_a(16'h0A07); send_a(16'h0A08); send_b(16'h0B08); ackz = 0;
    expect_out(16'h0A07); expect_out(16'h0A08); expect_out(16'h0B08);
    // random part
    ai = 0; bi = 0; ao = 0; bo = 0;
    @(negedge clk) rnd = 1;
    wait (ao == N && bo == N);
    repeat (5) @(posedge clk);
    checks++;
    if (strz) failures++;
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
