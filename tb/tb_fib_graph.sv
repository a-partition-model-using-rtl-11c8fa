// tb_fib_graph: self-checking test of the unpartitioned Fibonacci graph.
// Sends n = 0 .. 30 and then random n, each as soon as the graph accepts it,
// with the result receiver busy at random; every result must be Fib(n)
// mod 2^16 and a second n must be refused while one is in the graph.  Counts
// how often the loop-entry merges took a start value and a loop-back value;
// both must happen.
`timescale 1ns/1ps
module tb_fib_graph;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, refused = 0;

  logic [15:0] n, res;
  logic n_str, n_ack, res_str, res_ack;

  fib_graph dut (.clk, .rst_n, .n, .n_str, .n_ack, .res, .res_str, .res_ack);

  function automatic logic [15:0] fib(int k);
    logic [15:0] x = 0, y = 1, t;
    for (int j = 0; j < k; j++) begin t = x + y; x = y; y = t; end
    return x;
  endfunction

  int from_start = 0, from_loop = 0;
  always @(posedge clk) if (rst_n) begin
    res_ack <= ($urandom % 3) == 0;
    if (dut.st_str[3] && !dut.st_ack[3]) from_start++;
    if (dut.nxt_str[3] && !dut.nxt_ack[3]) from_loop++;
    if (n_str && n_ack) refused++;
  end

  task automatic one(int k);
    n = 16'(k); n_str = 1;
    do @(posedge clk); while (n_ack);
    #1;
    // keep offering another value: it must be refused until the result is out
    n = 16'hFFFF;
    while (!(res_str && !res_ack)) begin
      @(posedge clk);
      checks++;
      if (n_str && !n_ack && !(res_str && !res_ack)) begin failures++; $display("FAIL accepted while busy"); end
    end
    checks++;
    if (res !== fib(k)) begin failures++; $display("FAIL n=%0d res=%0d", k, res); end
    #1 n_str = 0;
  endtask

  initial begin
    n = 0; n_str = 0; res_ack = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k <= 30; k++) one(k);
    for (int k = 0; k < 20; k++) one($urandom % 25);
    repeat (20) @(posedge clk);
    checks += 3;
    if (from_start == 0 || from_loop == 0) failures++;
    if (refused == 0) failures++;
    if (res_str || n_ack) failures++;
    $display("merges: start=%0d loop=%0d refused=%0d", from_start, from_loop, refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
