// tb_ifelse_prr: self-checking test of one region holding an instance of the
// if/else partition (partition 5, results to partition 4).  The test plays
// the scheduler and the static side: for each of 300 random operand groups
// it delivers x, a, b, c, d as frames to arcs 0..4 in random order with a
// random tag, grants the region's request after random delays, and expects
// exactly one frame back: partition 4, arc 0, the same tag, and
// z = x > 0 ? a + b : c - d (signed compare).  x is drawn so that x = 0,
// x < 0 and x > 0 all occur.
`timescale 1ns/1ps
module tb_ifelse_prr;
  import chipcflow_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  frame_t bus_frame, frame;
  logic [15:0] arc_free;
  logic req, gnt;

  ifelse_prr #(.PID(8'd5), .RET_PID(8'd4)) dut (.clk, .rst_n, .bus_frame, .arc_free, .req, .frame, .gnt);

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
    inject = IDLE_FRAME; inject.sync = SYNC_WORD; inject.partition = 8'd5; inject.arc = arc;
    inject.tag = t; inject.data = {16'd0, v}; inject_v = 1;
    @(negedge clk) inject_v = 0;
    repeat ($urandom % 3) @(negedge clk);
  endtask

  int c_pos = 0, c_neg = 0, c_zero = 0;

  task automatic run();
    logic [15:0] v [5];
    logic [15:0] e;
    tag_t t;
    int order [5] = '{0, 1, 2, 3, 4};
    int tmo;
    foreach (v[k]) v[k] = 16'($urandom);
    case ($urandom % 4)
      0: v[0] = 16'd0;
      1: v[0] = 16'(1 + $urandom % 4);
      default: ;
    endcase
    if (v[0] == 0) c_zero++; else if ($signed(v[0]) > 0) c_pos++; else c_neg++;
    e = ($signed(v[0]) > 0) ? 16'(v[1] + v[2]) : 16'(v[3] - v[4]);
    t = tag_t'($urandom);
    order.shuffle();
    @(negedge clk);
    for (int k = 0; k < 5; k++) send(4'(order[k]), v[order[k]], t);
    tmo = 0;
    while (got.size() == 0 && tmo < 300) begin @(posedge clk); tmo++; end
    repeat (5) @(posedge clk);
    checks++;
    if (got.size() != 1 || got[0].sync !== SYNC_WORD || got[0].partition !== 8'd4 ||
        got[0].arc !== 4'd0 || got[0].tag !== t || got[0].data !== 32'(e)) begin
      failures++;
      $display("FAIL x=%h a=%h b=%h c=%h d=%h: %0d frames, first %h expected z=%h",
               v[0], v[1], v[2], v[3], v[4], got.size(), got[0], e);
    end
    got.delete();
  endtask

  initial begin
    inject_v = 0; inject = IDLE_FRAME;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (300) run();
    repeat (20) @(posedge clk);
    checks += 4;
    if (req || arc_free[4:0] != 5'h1F) failures++;
    if (c_pos == 0) failures++;
    if (c_neg == 0) failures++;
    if (c_zero == 0) failures++;
    $display("x>0: %0d  x<0: %0d  x=0: %0d", c_pos, c_neg, c_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
