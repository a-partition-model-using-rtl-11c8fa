// tb_p1_static: self-checking test of the static-region node.  The test
// plays the I/O block, the regions and the scheduler: it delivers n in a
// frame to partition 1 arc 0, grants every request (after a random delay)
// and records the frames.  For n < 2 one frame {partition 0, arc 0, data n}
// must follow.  For n >= 2 four frames to partition 2 arcs 0..3 must carry
// i=1, n-1, b=0, a=1 with one fresh activation number (counting up), iteration
// 0 and nesting one above the n frame's; the test then returns a random a on
// partition 1 arc 1 and expects it in a frame to partition 0.
`timescale 1ns/1ps
module tb_p1_static;
  import chipcflow_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  frame_t bus_frame, frame;
  logic [15:0] arc_free;
  logic req, gnt;

  p1_static dut (.clk, .rst_n, .bus_frame, .arc_free, .req, .frame, .gnt);

  frame_t got [$];
  logic [7:0] next_act = 0;

  // Bus driver: frames from the test take precedence over requests.
  frame_t inject;
  logic   inject_v;
  always_comb begin
    gnt = 0; bus_frame = IDLE_FRAME;
    if (inject_v) bus_frame = inject;
    else if (req && g_ok) begin gnt = 1; bus_frame = frame; end
  end
  logic g_ok;
  always @(posedge clk) begin
    g_ok <= ($urandom % 3) != 0;
    if (rst_n && gnt) got.push_back(frame);
  end

  task automatic send(logic [3:0] arc, logic [15:0] v, tag_t t);
    while (!arc_free[arc]) @(negedge clk);
    @(negedge clk);
    inject = IDLE_FRAME; inject.sync = SYNC_WORD; inject.partition = PID_P1; inject.arc = arc;
    inject.tag = t; inject.data = {16'd0, v}; inject_v = 1;
    @(negedge clk) inject_v = 0;
  endtask

  task automatic wait_frames(int k);
    int t = 0;
    while (got.size() < k && t < 200) begin @(posedge clk); t++; end
  endtask

  task automatic one(int nv);
    tag_t t0;
    frame_t f;
    logic [15:0] av;
    t0 = tag_t'($urandom);
    if (t0.nesting == 4'hF) t0.nesting = 4'h3;
    send(4'd0, 16'(nv), t0);
    if (nv < 2) begin
      wait_frames(1);
      checks++;
      if (got.size() != 1 || got[0].partition !== PID_IO || got[0].data !== 32'(nv)) begin
        failures++; $display("FAIL n=%0d early frame", nv);
      end
      got.delete();
    end else begin
      wait_frames(4);
      for (int k = 0; k < 4; k++) begin
        f = got[k];
        checks++;
        if (f.partition !== PID_P2_BASE || f.tag.activation !== next_act || f.tag.iteration !== 0 ||
            f.tag.nesting !== t0.nesting + 1 ||
            f.data !== ((f.arc == 0) ? 32'd1 : (f.arc == 1) ? 32'(nv - 1) : (f.arc == 2) ? 32'd0 : 32'd1)) begin
          failures++; $display("FAIL n=%0d start frame %h", nv, f);
        end
      end
      checks++;
      if (got.size() != 4 || (got[0].arc ^ got[1].arc ^ got[2].arc ^ got[3].arc) != 4'd0) failures++;
      next_act++;
      got.delete();
      av = 16'($urandom);
      send(4'd1, av, tag_t'($urandom));
      wait_frames(1);
      checks++;
      if (got.size() != 1 || got[0].partition !== PID_IO || got[0].arc !== 0 || got[0].data !== 32'(av)) begin
        failures++; $display("FAIL n=%0d return frame", nv);
      end
      got.delete();
    end
  endtask

  initial begin
    inject_v = 0; inject = IDLE_FRAME;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 30; k++) one(k);
    for (int k = 0; k < 30; k++) one($urandom % 4);
    repeat (20) @(posedge clk);
    checks++;
    if (req || arc_free[1:0] != 2'b11) failures++;
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
