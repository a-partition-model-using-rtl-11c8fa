// tb_io_block: self-checking test of the I/O block.  The test plays both the
// host and the rest of the system.  For each request it sends n on the host
// input; the block must ask for the bus with a frame {SYNC_WORD, partition 1,
// activation = request number, iteration 0, nesting 0, arc 0, data n}.  While
// the computation is open, a second host input must be refused.  The test
// then delivers a result frame to partition 0, arc 0, which must reach the
// host output with its data and tag; the host is busy at random.
`timescale 1ns/1ps
module tb_io_block;
  import chipcflow_pkg::*;
  localparam int N = 60;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, refused = 0;

  logic [15:0] host_n, host_res;
  logic host_n_str, host_n_ack, host_res_str, host_res_ack, req, gnt;
  tag_t host_res_tag;
  frame_t bus_frame, frame;
  logic [15:0] arc_free;

  io_block dut (.clk, .rst_n, .host_n, .host_n_str, .host_n_ack, .host_res, .host_res_tag,
                .host_res_str, .host_res_ack, .bus_frame, .arc_free, .req, .frame, .gnt);

  always @(posedge clk) host_res_ack <= rst_n ? (($urandom % 3) == 0) : 1'b1;

  initial begin
    host_n = 0; host_n_str = 0; gnt = 0; bus_frame = IDLE_FRAME;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < N; k++) begin
      logic [15:0] nv, rv;
      tag_t rt;
      int t;
      nv = 16'($urandom);
      host_n = nv; host_n_str = 1;
      do @(posedge clk); while (host_n_ack);
      #1 host_n_str = 0;
      // wait for the bus request, then grant it
      t = 0;
      while (!req && t < 10) begin @(posedge clk); #1; t++; end
      checks++;
      if (!req || frame.sync !== SYNC_WORD || frame.partition !== PID_P1 || frame.arc !== 4'd0 ||
          frame.data !== {16'd0, nv} || frame.tag !== tag_t'({8'(k), 8'd0, 4'd0})) begin
        failures++; $display("FAIL request %0d frame %h", k, frame);
      end
      gnt = 1; bus_frame = frame;
      @(posedge clk); #1 gnt = 0; bus_frame = IDLE_FRAME;
      // a second input is refused while busy
      host_n = 16'hFFFF; host_n_str = 1;
      repeat (3) begin
        @(posedge clk);
        checks++;
        if (!host_n_ack) failures++; else refused++;
      end
      #1 host_n_str = 0;
      // deliver the result frame
      rv = 16'($urandom); rt = tag_t'($urandom);
      checks++;
      if (!arc_free[0]) failures++;
      bus_frame.sync = SYNC_WORD; bus_frame.partition = PID_IO; bus_frame.arc = 0;
      bus_frame.tag = rt; bus_frame.data = {16'hABCD, rv};
      @(posedge clk); #1 bus_frame = IDLE_FRAME;
      do @(posedge clk); while (!(host_res_str && !host_res_ack));
      checks++;
      if (host_res !== rv || host_res_tag !== rt) begin
        failures++; $display("FAIL result %h tag %h", host_res, host_res_tag);
      end
      #1;
    end
    checks++;
    if (refused == 0) failures++;
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
