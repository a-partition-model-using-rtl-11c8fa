// tb_p2_prr: self-checking test of one region running partition p2
// (partition 2, next region 3).  The test plays the scheduler and the other
// region: it delivers i, n, b, a as frames to partition 2 in random order,
// grants requests after random delays, and collects the frames.  While i < n
// there must be four frames to partition 3 with i+1, n, a+b, a on arcs
// 0, 1, 3, 2 and the tag's iteration one higher; the test sends them back in
// as the next activation.  On exit there must be one frame to partition 1,
// arc 1, holding Fib(n) with iteration 0 and nesting one lower.
`timescale 1ns/1ps
module tb_p2_prr;
  import chipcflow_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  frame_t bus_frame, frame;
  logic [15:0] arc_free;
  logic req, gnt;

  p2_prr #(.PID(8'd2), .NEXT_PID(8'd3)) dut (.clk, .rst_n, .bus_frame, .arc_free, .req, .frame, .gnt);

  function automatic logic [15:0] fib(int n);
    logic [15:0] x = 0, y = 1, t;
    for (int k = 0; k < n; k++) begin t = x + y; x = y; y = t; end
    return x;
  endfunction

  frame_t got [$];
  frame_t inject;
  logic inject_v, g_ok;
  always_comb begin
    gnt = 0; bus_frame = IDLE_FRAME;
    if (inject_v) bus_frame = inject;
    else if (req && g_ok) begin gnt = 1; bus_frame = frame; end
  end
  always @(posedge clk) begin
    g_ok <= ($urandom % 3) != 0;
    if (rst_n && gnt) got.push_back(frame);
  end

  task automatic send(logic [3:0] arc, logic [15:0] v, tag_t t);
    while (!arc_free[arc]) @(negedge clk);
    inject = IDLE_FRAME; inject.sync = SYNC_WORD; inject.partition = 8'd2; inject.arc = arc;
    inject.tag = t; inject.data = {16'd0, v}; inject_v = 1;
    @(negedge clk) inject_v = 0;
    repeat ($urandom % 3) @(negedge clk);
  endtask

  task automatic run(int nv);
    logic [15:0] v [4];
    tag_t t;
    int order [4] = '{0, 1, 2, 3};
    int tmo;
    bit go = 1;
    v = '{16'd1, 16'(nv - 1), 16'd0, 16'd1};
    t = tag_t'($urandom); t.iteration = 0; t.nesting = 4'(1 + $urandom % 14);
    while (go) begin
      order.shuffle();
      @(negedge clk);
      for (int k = 0; k < 4; k++) send(4'(order[k]), v[order[k]], t);
      tmo = 0;
      while (!(got.size() == 4 || (got.size() == 1 && got[0].partition == PID_P1)) && tmo < 300) begin
        @(posedge clk); tmo++;
      end
      repeat (3) @(posedge clk);
      checks++;
      if ($signed(v[0]) < $signed(v[1])) begin
        logic [15:0] w [4];
        w = '{16'(v[0] + 1), v[1], v[3], 16'(v[3] + v[2])};
        if (got.size() != 4) begin failures++; $display("FAIL n=%0d continue count %0d", nv, got.size()); go = 0; end
        else foreach (got[k]) begin
          if (got[k].partition !== 8'd3 || got[k].tag !== tag_t'({t.activation, 8'(t.iteration + 1), t.nesting}) ||
              got[k].data !== 32'(w[got[k].arc])) begin
            failures++; $display("FAIL n=%0d continue frame %h", nv, got[k]);
          end
        end
        v = w; t.iteration++;
      end else begin
        if (got.size() != 1 || got[0].partition !== PID_P1 || got[0].arc !== 4'd1 ||
            got[0].data !== 32'(fib(nv)) ||
            got[0].tag !== tag_t'({t.activation, 8'd0, 4'(t.nesting - 1)})) begin
          failures++; $display("FAIL n=%0d exit %0d frames, first %h", nv, got.size(), got[0]);
        end
        go = 0;
      end
      got.delete();
    end
  endtask

  initial begin
    inject_v = 0; inject = IDLE_FRAME;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 2; k <= 20; k++) run(k);
    repeat (20) @(posedge clk);
    checks++;
    if (req || arc_free[3:0] != 4'hF) failures++;
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
