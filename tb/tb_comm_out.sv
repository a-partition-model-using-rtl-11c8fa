// tb_comm_out: self-checking test of the output communicator with three
// ports, each with its own destination partition and arc.  Senders deliver
// random tagged tokens with random pauses; the test grants the bus at random
// while req is high.  Every granted frame must carry SYNC_WORD, the port's
// destination fields, the token's tag and its zero-extended data; per port,
// tokens leave in order, and when several ports are full the lowest one goes.
`timescale 1ns/1ps
module tb_comm_out;
  import chipcflow_pkg::*;
  localparam int NP = 3, N = 150;
  localparam logic [NP*8-1:0] DP = {8'd9, 8'd4, 8'd1};
  localparam logic [NP*4-1:0] DA = {4'd2, 4'd7, 4'd0};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  tagged_tok_t [NP-1:0] tok;
  logic [NP-1:0] tok_str, tok_ack;
  logic req, gnt;
  frame_t frame;

  comm_out #(.N_PORTS(NP), .DEST_PID(DP), .DEST_ARC(DA)) dut (.clk, .rst_n, .tok, .tok_str, .tok_ack,
                                                            .req, .frame, .gnt);

  tagged_tok_t q [NP][$];
  int si [NP], nrecv = 0;

  always @(posedge clk) begin
    if (!rst_n) begin tok_str <= '0; tok <= '0; for (int p = 0; p < NP; p++) si[p] <= 0; end
    else for (int p = 0; p < NP; p++) begin
      if (tok_str[p] && !tok_ack[p]) begin tok_str[p] <= 0; si[p] <= si[p] + 1; q[p].push_back(tok[p]); end
      else if (!tok_str[p] && si[p] < N && ($urandom % 3) == 0) begin
        tok_str[p] <= 1; tok[p] <= tagged_tok_t'({$urandom, $urandom});
      end
    end
  end

  always_comb gnt = req && rst_n && g_rand;
  logic g_rand;
  always @(posedge clk) g_rand <= ($urandom % 2) == 0;

  always @(posedge clk) if (rst_n && gnt) begin
    int p;
    tagged_tok_t e;
    p = -1;
    for (int k = NP - 1; k >= 0; k--) if (dut.full[k]) p = k;
    checks++;
    if (p < 0 || q[p].size() == 0) begin failures++; $display("FAIL grant with nothing queued"); end
    else begin
      e = q[p].pop_front();
      if (frame.sync !== SYNC_WORD || frame.partition !== DP[p*8 +: 8] || frame.arc !== DA[p*4 +: 4] ||
          frame.tag !== e.tag || frame.data !== {16'd0, e.data}) begin
        failures++; $display("FAIL port %0d frame %h expected token %h", p, frame, e);
      end
    end
    nrecv++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nrecv == NP * N);
    repeat (10) @(posedge clk);
    checks++;
    if (req) failures++;
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
