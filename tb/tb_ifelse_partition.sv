// tb_ifelse_partition: self-checking test of the if/else example partition.
// N evaluations with random x (about half positive, some zero), a, b, c, d;
// the five senders pause at random and independently, the receiver is busy
// at random.  Each z must equal a+b when x > 0 (signed) and c-d otherwise, in
// order; both branches must be taken, and no token may be left at the end.
`timescale 1ns/1ps
module tb_ifelse_partition;
  localparam int N = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0;

  logic [4:0][15:0] din;
  logic [4:0] din_str, din_ack;
  logic [15:0] z;
  logic z_str, z_ack;
  logic [15:0] v [N][5];
  int si [5], zi;

  ifelse_partition #(.W(16)) dut (.clk, .rst_n,
    .x(din[0]), .x_str(din_str[0]), .x_ack(din_ack[0]),
    .a(din[1]), .a_str(din_str[1]), .a_ack(din_ack[1]),
    .b(din[2]), .b_str(din_str[2]), .b_ack(din_ack[2]),
    .c(din[3]), .c_str(din_str[3]), .c_ack(din_ack[3]),
    .d(din[4]), .d_str(din_str[4]), .d_ack(din_ack[4]),
    .z, .z_str, .z_ack);

  initial for (int k = 0; k < N; k++) begin
    for (int p = 0; p < 5; p++) v[k][p] = 16'($urandom);
    if (k % 9 == 0) v[k][0] = 16'd0;
  end

  function automatic logic [15:0] model(int k);
    return ($signed(v[k][0]) > 0) ? 16'(v[k][1] + v[k][2]) : 16'(v[k][3] - v[k][4]);
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      din_str <= '0; din <= '0; z_ack <= 1; zi <= 0;
      for (int p = 0; p < 5; p++) si[p] <= 0;
    end else begin
      for (int p = 0; p < 5; p++) begin
        if (din_str[p] && !din_ack[p]) begin din_str[p] <= 0; si[p] <= si[p] + 1; end
        else if (!din_str[p] && si[p] < N && ($urandom % 3) == 0) begin
          din_str[p] <= 1; din[p] <= v[si[p]][p];
        end
      end
      z_ack <= ($urandom % 3) == 0;
      if (z_str && !z_ack) begin
        checks++;
        if (z !== model(zi)) begin failures++; $display("FAIL eval %0d z=%h exp=%h", zi, z, model(zi)); end
        if ($signed(v[zi][0]) > 0) n_pos++; else n_neg++;
        zi <= zi + 1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (zi == N);
    repeat (20) @(posedge clk);
    checks += 2;
    if (z_str || din_ack != 0) failures++;
    if (n_pos == 0 || n_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
