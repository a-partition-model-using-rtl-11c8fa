// tb_fib_partition2: self-checking test of partition p2 run as a loop.  The
// test plays the bus: it starts each computation with i=1, n-1, b=0, a=1,
// collects the four outputs of every activation, checks them against one
// iteration of the loop computed here, and feeds continue outputs back as the
// next activation's inputs.  On exit, ext[0] must be Fib(n) (mod 2^16), and
// the number of activations must be n-1.  Inputs are sent in random order,
// receivers are busy at random.
`timescale 1ns/1ps
module tb_fib_partition2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0][15:0] din;
  logic [3:0] din_str, din_ack;
  logic [3:0][15:0] nxt, ext;
  logic [3:0] nxt_str, nxt_ack, ext_str, ext_ack;

  fib_partition2 #(.W(16)) dut (.clk, .rst_n,
    .i(din[0]), .i_str(din_str[0]), .i_ack(din_ack[0]),
    .n(din[1]), .n_str(din_str[1]), .n_ack(din_ack[1]),
    .b(din[2]), .b_str(din_str[2]), .b_ack(din_ack[2]),
    .a(din[3]), .a_str(din_str[3]), .a_ack(din_ack[3]),
    .nxt, .nxt_str, .nxt_ack, .ext, .ext_str, .ext_ack);

  function automatic logic [15:0] fib(int n);
    logic [15:0] x = 0, y = 1, t;
    for (int k = 0; k < n; k++) begin t = x + y; x = y; y = t; end
    return x;
  endfunction

  // Input senders: value and "pending" per input, driven in random order.
  logic [3:0][15:0] pend_v;
  logic [3:0]       pend;
  always @(posedge clk) begin
    if (!rst_n) begin din_str <= '0; din <= '0; end
    else for (int k = 0; k < 4; k++) begin
      if (din_str[k] && !din_ack[k]) din_str[k] <= 0;
      else if (!din_str[k] && pend[k] && ($urandom % 3) == 0) begin
        din_str[k] <= 1; din[k] <= pend_v[k];
      end
    end
  end
  // A pending value is cleared when its token is taken.
  always @(posedge clk) if (rst_n) for (int k = 0; k < 4; k++)
    if (din_str[k] && !din_ack[k]) pend[k] <= 0;

  // Receivers: collect one output per branch.
  logic [3:0][15:0] got_n, got_e;
  logic [3:0]       have_n, have_e;
  always @(posedge clk) begin
    nxt_ack <= 4'($urandom);
    ext_ack <= 4'($urandom);
    if (rst_n) for (int k = 0; k < 4; k++) begin
      if (nxt_str[k] && !nxt_ack[k]) begin got_n[k] <= nxt[k]; have_n[k] <= 1; end
      if (ext_str[k] && !ext_ack[k]) begin got_e[k] <= ext[k]; have_e[k] <= 1; end
    end
  end

  int acts;
  task automatic run(int nv);
    logic [15:0] i, n, b, a;
    bit go;
    i = 1; n = 16'(nv - 1); b = 0; a = 1; acts = 0;
    go = 1;
    while (go) begin
      have_n <= '0; have_e <= '0;
      pend_v <= {a, b, n, i};
      pend   <= '1;
      acts++;
      @(posedge clk);
      while (!((have_n | have_e) == 4'hF)) @(posedge clk);
      checks++;
      if ($signed(i) < $signed(n)) begin
        if (have_e != 0 || got_n !== {16'(i + 1), n, a, 16'(a + b)}) begin
          failures++; $display("FAIL n=%0d act %0d continue %h", nv, acts, got_n);
        end
        i = got_n[3]; n = got_n[2]; b = got_n[1]; a = got_n[0];
      end else begin
        if (have_n != 0 || got_e !== {16'(i + 1), n, a, 16'(a + b)}) begin
          failures++; $display("FAIL n=%0d act %0d exit %h", nv, acts, got_e);
        end
        checks += 2;
        if (got_e[0] !== fib(nv)) begin failures++; $display("FAIL n=%0d fib %0d", nv, got_e[0]); end
        if (acts != nv - 1) begin failures++; $display("FAIL n=%0d activations %0d", nv, acts); end
        go = 0;
      end
      @(posedge clk);
    end
  endtask

  initial begin
    pend = '0; have_n = '0; have_e = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 2; k <= 26; k++) run(k);
    repeat (10) @(posedge clk);
    checks++;
    if (nxt_str != 0 || ext_str != 0 || din_ack != 0) failures++;
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
