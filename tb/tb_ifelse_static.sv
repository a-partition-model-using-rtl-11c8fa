// tb_ifelse_static: self-checking test of the static side of the if/else
// example (partition 4, regions 5 and 6).  The test plays the host, the
// scheduler and both regions.  The host hands in NG random operand groups
// with random gaps.  Every frame granted to the bus must go to region
// 5 + (activation mod 2), carry tag {activation, 0, 1} and the operand that
// belongs on its arc.  Each activation 0 .. NG-1 must be sent once (frames of
// an odd group may leave after those of the next even group, as the output
// communicator serves its lowest port first), and a region must
// never be sent a new group while it still owes the result of the previous
// one.  Once a region has all five operands it answers after a random delay
// with a z frame to partition 4, arc 0, so the two regions' answers come back
// in either order.  The host output, busy at random, must then deliver each
// z exactly once with tag {activation, 0, 0}.  Both "regions answered out of
// order" and "host input refused because the region was busy" must occur.
`timescale 1ns/1ps
module tb_ifelse_static;
  import chipcflow_pkg::*;
  localparam int NG = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [4:0][15:0] grp;
  logic grp_str, grp_ack, res_str, res_ack;
  logic [15:0] res;
  tag_t res_tag;
  frame_t bus_frame, frame;
  logic [15:0] arc_free;
  logic req, gnt;

  ifelse_static #(.PID(8'd4), .PRR_PID(8'd5)) dut (
    .clk, .rst_n, .grp, .grp_str, .grp_ack, .res, .res_tag, .res_str, .res_ack,
    .bus_frame, .arc_free, .req, .frame, .gnt);

  logic [15:0] gv [NG][5];
  logic [15:0] ez [NG];
  bit seen [NG], sent [NG];
  initial for (int k = 0; k < NG; k++) begin
    for (int p = 0; p < 5; p++) gv[k][p] = 16'($urandom);
    ez[k] = ($signed(gv[k][0]) > 0) ? 16'(gv[k][1] + gv[k][2]) : 16'(gv[k][3] - gv[k][4]);
  end

  // Bus: an injected region answer has priority over the DUT's request.
  frame_t inject;
  logic inject_v, g_ok;
  always_comb begin
    gnt = 0; bus_frame = IDLE_FRAME;
    if (inject_v) bus_frame = inject;
    else if (req && g_ok) begin gnt = 1; bus_frame = frame; end
  end

  // Region models.
  int   have [2];       // operands received for the current group
  int   act  [2];
  bit   owes [2];
  int   wait_c [2];
  int   last_done = -1, c_ooo = 0, c_refused = 0;

  always @(posedge clk) begin
    g_ok <= ($urandom % 3) != 0;
    if (rst_n && grp_str && grp_ack && !dut.nt_ack) c_refused++;
    if (rst_n && gnt) begin
      int r;
      r = int'(frame.partition) - 5;
      checks++;
      if (r != int'(frame.tag.activation % 2) || frame.tag.iteration != 0 || frame.tag.nesting != 1 ||
          int'(frame.arc) > 4 || frame.data !== 32'(gv[frame.tag.activation][frame.arc])) begin
        failures++; $display("FAIL frame %h", frame);
      end else if (owes[r]) begin
        failures++; $display("FAIL region %0d sent a group while it owes a result", r);
      end else begin
        if (have[r] == 0) begin
          act[r] = int'(frame.tag.activation);
          checks++;
          if (act[r] >= NG || sent[act[r]]) begin failures++; $display("FAIL activation %0d sent twice", act[r]); end
          else sent[act[r]] = 1;
        end else if (int'(frame.tag.activation) != act[r]) begin
          failures++; $display("FAIL mixed activations in region %0d", r);
        end
        have[r]++;
        if (have[r] == 5) begin owes[r] = 1; have[r] = 0; wait_c[r] = $urandom % 25; end
      end
    end
  end

  always @(negedge clk) begin
    inject_v = 0;
    if (rst_n) begin
      for (int r = 0; r < 2; r++) if (owes[r] && wait_c[r] > 0) wait_c[r]--;
      for (int r = 0; r < 2; r++) begin
        if (!inject_v && owes[r] && wait_c[r] == 0 && arc_free[0]) begin
          inject = IDLE_FRAME; inject.sync = SYNC_WORD; inject.partition = 8'd4; inject.arc = 4'd0;
          inject.tag = '{activation: 8'(act[r]), iteration: 8'd0, nesting: 4'd1};
          inject.data = 32'(ez[act[r]]);
          inject_v = 1; owes[r] = 0;
          if (act[r] < last_done) c_ooo++;
          last_done = act[r];
        end
      end
    end
  end

  // Host output.
  int n_res = 0;
  always @(posedge clk) begin
    res_ack <= rst_n ? (($urandom % 3) == 0) : 1'b1;
    if (rst_n && res_str && !res_ack) begin
      int k;
      k = int'(res_tag.activation);
      checks++;
      if (k >= NG || seen[k] || res_tag.iteration != 0 || res_tag.nesting != 0 || res !== ez[k]) begin
        failures++; $display("FAIL result %h tag %h", res, res_tag);
      end else seen[k] = 1;
      n_res++;
    end
  end

  initial begin
    grp = '0; grp_str = 0; inject_v = 0; inject = IDLE_FRAME;
    have = '{0, 0}; owes = '{0, 0}; wait_c = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < NG; k++) begin
      repeat (1 + $urandom % 4) @(negedge clk);
      grp = {gv[k][4], gv[k][3], gv[k][2], gv[k][1], gv[k][0]};
      grp_str = 1;
      // ack is stable between falling and rising edge: 0 here means taken at the next edge
      while (grp_ack) @(negedge clk);
      @(negedge clk) grp_str = 0;
    end
    while (n_res < NG) @(posedge clk);
    repeat (20) @(posedge clk);
    checks += 4;
    foreach (seen[k]) if (!seen[k] || !sent[k]) failures++;
    if (req || !arc_free[0] || res_str) failures++;
    if (c_ooo == 0) failures++;
    if (c_refused == 0) failures++;
    $display("groups=%0d out-of-order=%0d refused=%0d", n_res, c_ooo, c_refused);
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
