// tb_comm_in: self-checking test of the input communicator (partition
// number 5, three arcs).  The test drives the bus like the scheduler does:
// each cycle it may put a frame on the bus, only for an arc that arc_free
// reports free.  Frames for other partitions, for arcs beyond N_ARCS and
// frames without the SYNC_WORD marker are mixed in and must be ignored.  Per
// arc the tokens must come out in order with the frame's low 16 data bits,
// and cur_tag must follow the tag of the last accepted frame.
`timescale 1ns/1ps
module tb_comm_in;
  import chipcflow_pkg::*;
  localparam int NA = 3, N = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  frame_t bus_frame;
  logic [15:0] arc_free;
  logic [NA-1:0][15:0] tok;
  logic [NA-1:0] tok_str, tok_ack;
  tag_t cur_tag, exp_tag;

  comm_in #(.PID(8'd5), .N_ARCS(NA)) dut (.clk, .rst_n, .bus_frame, .arc_free, .tok, .tok_str,
                                          .tok_ack, .cur_tag);

  logic [15:0] sent [NA][$];
  int nsent = 0, nrecv = 0, ignored = 0;

  always @(posedge clk) begin
    frame_t f;
    int k;
    if (!rst_n) begin bus_frame <= IDLE_FRAME; tok_ack <= '1; end
    else begin
      // check outputs
      for (int a = 0; a < NA; a++) begin
        tok_ack[a] <= ($urandom % 3) == 0;
        if (tok_str[a] && !tok_ack[a]) begin
          checks++;
          if (sent[a].size() == 0 || tok[a] !== sent[a].pop_front()) begin
            failures++; $display("FAIL arc %0d token %h", a, tok[a]);
          end
          nrecv++;
        end
      end
      // the frame of the previous cycle has been taken: check cur_tag
      if (bus_frame.sync == SYNC_WORD && bus_frame.partition == 8'd5 && bus_frame.arc < NA)
        exp_tag = bus_frame.tag;
      // drive a new frame
      f = IDLE_FRAME;
      k = $urandom % 8;
      if (nsent < N && k < 4) begin
        int a = $urandom % NA;
        if (arc_free[a] && !(bus_frame.sync == SYNC_WORD && bus_frame.partition == 8'd5 &&
                             bus_frame.arc == 4'(a))) begin
          f.sync = SYNC_WORD; f.partition = 8'd5; f.arc = 4'(a);
          f.tag = tag_t'($urandom); f.data = $urandom;
          sent[a].push_back(f.data[15:0]);
          nsent++;
        end
      end else if (k == 4) begin
        f.sync = SYNC_WORD; f.partition = 8'd6; f.arc = 4'd0; f.data = $urandom; ignored++;
      end else if (k == 5) begin
        f.sync = 8'h00; f.partition = 8'd5; f.arc = 4'd1; f.data = $urandom; ignored++;
      end else if (k == 6) begin
        f.sync = SYNC_WORD; f.partition = 8'd5; f.arc = 4'(NA + 1); f.data = $urandom; ignored++;
      end
      bus_frame <= f;
    end
  end

  always @(posedge clk) if (rst_n) begin
    #1;
    checks++;
    if (cur_tag !== exp_tag) begin failures++; $display("FAIL cur_tag %h expected %h", cur_tag, exp_tag); end
  end

  initial begin
    exp_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nrecv == N);
    repeat (10) @(posedge clk);
    checks += 2;
    if (tok_str != '0 || arc_free[NA-1:0] != '1 || arc_free[15:NA] != '0) failures++;
    if (ignored == 0) failures++;
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
