// tb_fib_partition1: self-checking test of partition p1.  For n = 0 .. 40
// and random n: n is sent; for n < 2 the return output must give n and no
// loop-start group may appear.  For n >= 2 the start group must be
// {i=1, n-1, b=0, a=1}; the test then plays p2 by sending back a random
// value on a, which must appear on the return output.  Receivers are busy at
// random.  Ends by checking no token is left inside.
`timescale 1ns/1ps
module tb_fib_partition1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] n, a, ret;
  logic n_str, n_ack, a_str, a_ack, ret_str, ret_ack, start_str, start_ack;
  logic [63:0] start;
  bit early_seen = 0, loop_seen = 0;

  fib_partition1 #(.W(16)) dut (.clk, .rst_n, .n, .n_str, .n_ack, .a, .a_str, .a_ack,
                                .ret, .ret_str, .ret_ack, .start, .start_str, .start_ack);

  always @(posedge clk) begin
    ret_ack   <= rst_n ? ($urandom % 2) : 1'b1;
    start_ack <= rst_n ? ($urandom % 2) : 1'b1;
  end

  task automatic put(ref logic [15:0] d, ref logic s, ref logic k, input logic [15:0] v);
    d = v; s = 1;
    do @(posedge clk); while (k);
    #1 s = 0;
  endtask

  task automatic get_ret(output logic [15:0] v);
    do @(posedge clk); while (!(ret_str && !ret_ack));
    v = ret;
  endtask

  task automatic one(int nv);
    logic [15:0] r, av;
    logic [63:0] g;
    fork
      put(n, n_str, n_ack, 16'(nv));
    join
    if (nv < 2) begin
      get_ret(r);
      checks++;
      if (r !== 16'(nv) || start_str) begin
        failures++; $display("FAIL n=%0d early return %0d", nv, r);
      end
      early_seen = 1;
    end else begin
      do @(posedge clk); while (!(start_str && !start_ack));
      g = start;
      checks++;
      if (g !== {16'd1, 16'(nv - 1), 16'd0, 16'd1} || ret_str) begin
        failures++; $display("FAIL n=%0d start group %h", nv, g);
      end
      av = 16'($urandom);
      #1 put(a, a_str, a_ack, av);
      get_ret(r);
      checks++;
      if (r !== av) begin failures++; $display("FAIL n=%0d returned %h expected %h", nv, r, av); end
      loop_seen = 1;
    end
    #1;
  endtask

  initial begin
    n = 0; a = 0; n_str = 0; a_str = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k <= 40; k++) one(k);
    for (int k = 0; k < 40; k++) one($urandom % 5);
    repeat (10) @(posedge clk);
    checks += 2;
    if (ret_str || start_str || n_ack || a_ack) failures++;
    if (!early_seen || !loop_seen) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
