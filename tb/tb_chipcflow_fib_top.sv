// tb_chipcflow_fib_top: end-to-end test of the partitioned Fibonacci graph at
// its default size (N_PRR = 2 regions for p2; the test reads the number of
// regions from the top, so it also runs when that default is changed).  The host side sends n = 0 .. 24 in
// order, then a pseudo-random mix of n in 0 .. 30, and checks every result
// against Fib(n) mod 2^16 computed here.  The result receiver is busy at
// random.  A bus monitor checks every frame sent to a region: the iteration
// field counts the loop iterations, frames of iteration j go to region
// j mod N_PRR, and the largest iteration of a computation is n-2.
//
// Mechanisms counted (each must occur at least once): early return (n < 2),
// loop continue (next-tag frame), loop exit (restore-tag frame to p1), new
// tag (fresh activation per computation), activations in both regions, an
// output communicator holding several frames for the bus at once, host result
// back-pressure and a refused host input.
//
// In parallel, the if/else example on the same bus evaluates NIE random
// operand groups.  Each z is matched to its group by the activation number
// in its tag and checked; every group must come back exactly once, frames of
// activation k must go to if/else region k mod 2, both the a+b and the c-d
// path must be taken, and some results must come back out of order.  Because both examples share the bus, two further
// mechanisms are counted: cycles with several requesters at once (bus
// contention) and requesters held back because their destination arc is
// full (the z reader is busy seven cycles in eight so that results pile up).
// The unpartitioned graph beside it computes Fib(n) for n = 0 .. 24,
// one after the other, and is checked the same way.
`timescale 1ns/1ps
module tb_chipcflow_fib_top;
  import chipcflow_pkg::*;

  localparam int NSEQ = 25;
  localparam int NRND = 15;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] host_n, host_res;
  logic        host_n_str, host_n_ack, host_res_str, host_res_ack;
  tag_t        host_res_tag;
  frame_t      bus_frame;

  localparam int NIE = 200;
  logic [4:0][15:0] ie_in;
  logic ie_in_str, ie_in_ack;
  logic [15:0] ie_z;
  tag_t ie_z_tag;
  logic ie_z_str, ie_z_ack;

  chipcflow_fib_top dut (
    .clk, .rst_n, .host_n, .host_n_str, .host_n_ack,
    .host_res, .host_res_tag, .host_res_str, .host_res_ack, .bus_frame,
    .ie_in, .ie_in_str, .ie_in_ack, .ie_z, .ie_z_tag, .ie_z_str, .ie_z_ack,
    .fg_n, .fg_n_str, .fg_n_ack, .fg_res, .fg_res_str, .fg_res_ack);

  // unpartitioned graph driver and checker: n = 0, 1, 2, ... up to NFG-1
  localparam int NFG = 25;
  logic [15:0] fg_n, fg_res;
  logic fg_n_str, fg_n_ack, fg_res_str, fg_res_ack;
  int fg_sent = 0, fg_got = 0;
  always @(posedge clk) begin
    if (!rst_n) begin fg_n_str <= 0; fg_n <= 0; fg_res_ack <= 1; end
    else begin
      if (fg_n_str && !fg_n_ack) begin fg_n_str <= 0; fg_sent <= fg_sent + 1; end
      else if (!fg_n_str && fg_sent < NFG) begin fg_n_str <= 1; fg_n <= 16'(fg_sent); end
      fg_res_ack <= ($urandom % 2) == 0;
      if (fg_res_str && !fg_res_ack) begin
        checks++;
        if (fg_res !== fib(fg_got)) begin failures++; $display("FAIL graph n=%0d res=%0d", fg_got, fg_res); end
        fg_got <= fg_got + 1;
      end
    end
  end

  // if/else driver and checker
  logic [15:0] iev [NIE][5];
  bit ie_seen [NIE];
  int ie_si = 0, ie_zi = 0, c_ie_pos = 0, c_ie_neg = 0, c_ie_ooo = 0, c_ie_wait = 0;
  int ie_last = -1;
  initial for (int k = 0; k < NIE; k++) for (int p = 0; p < 5; p++) iev[k][p] = 16'($urandom);
  always @(posedge clk) begin
    if (!rst_n) begin
      ie_in_str <= 0; ie_in <= '0; ie_z_ack <= 1;
    end else begin
      if (ie_in_str && !ie_in_ack) begin ie_in_str <= 0; ie_si <= ie_si + 1; end
      else if (!ie_in_str && ie_si < NIE && ($urandom % 4) == 0) begin
        ie_in_str <= 1;
        for (int p = 0; p < 5; p++) ie_in[p] <= iev[ie_si][p];
      end
      if (ie_in_str && ie_in_ack && !dut.u_ie.nt_ack) c_ie_wait++;
      ie_z_ack <= ($urandom % 8) != 0;
      if (ie_z_str && !ie_z_ack) begin
        int k;
        logic [15:0] e;
        k = int'(ie_z_tag.activation);
        checks++;
        if (k >= NIE || ie_seen[k] || ie_z_tag.iteration != 0 || ie_z_tag.nesting != 0) begin
          failures++; $display("FAIL if/else result tag %h", ie_z_tag);
        end else begin
          ie_seen[k] = 1;
          e = ($signed(iev[k][0]) > 0) ? 16'(iev[k][1] + iev[k][2]) : 16'(iev[k][3] - iev[k][4]);
          if (ie_z !== e) begin failures++; $display("FAIL if/else %0d: %h expected %h", k, ie_z, e); end
          if ($signed(iev[k][0]) > 0) c_ie_pos++; else c_ie_neg++;
          if (k < ie_last) c_ie_ooo++;
          ie_last = k;
        end
        ie_zi <= ie_zi + 1;
      end
    end
  end

  function automatic logic [15:0] fib(int n);
    logic [15:0] x = 0, y = 1, t;
    for (int k = 0; k < n; k++) begin t = x + y; x = y; y = t; end
    return x;
  endfunction

  // Mechanism counters.
  int c_early = 0, c_next = 0, c_exit = 0, c_newtag = 0, c_prr0 = 0, c_prr1 = 0;
  int c_queued = 0, c_res_bp = 0, c_refused = 0, c_contend = 0, c_dest_busy = 0;
  int c_ie0 = 0, c_ie1 = 0;
  // Number of p2 regions, read from the top: its requesters are the I/O
  // block, p1, the p2 regions and the three nodes of the if/else example.
  localparam int N_PRR = $bits(dut.req) - 5;
  localparam logic [7:0] PID_IE_PRR = PID_P2_BASE + 8'(N_PRR) + 8'd1;
  int max_iter;
  logic [7:0] last_act;
  logic       have_act = 0;

  always @(posedge clk) if (rst_n) begin
    if ($countones(dut.u_p1.u_out.full) > 1 || $countones(dut.g_prr[0].u_prr.u_out.full) > 1 ||
        $countones(dut.g_prr[1].u_prr.u_out.full) > 1) c_queued++;
    if (host_res_str && host_res_ack) c_res_bp++;
    if (host_n_str && host_n_ack) c_refused++;
    if ($countones(dut.req) > 1) c_contend++;
    for (int r = 0; r < $bits(dut.req); r++)
      if (dut.req[r] && !dut.arc_free[dut.req_frame[r].partition][dut.req_frame[r].arc]) c_dest_busy++;
    if (bus_frame.sync == SYNC_WORD) begin
      if (bus_frame.partition >= PID_IE_PRR) begin
        checks++;
        if (bus_frame.partition != PID_IE_PRR + 8'(bus_frame.tag.activation % 2)) begin
          failures++;
          $display("FAIL if/else activation %0d went to partition %0d",
                   bus_frame.tag.activation, bus_frame.partition);
        end
        if (bus_frame.partition == PID_IE_PRR) c_ie0++; else c_ie1++;
      end
      if (bus_frame.partition >= PID_P2_BASE && bus_frame.partition < PID_P2_BASE + 8'(N_PRR)) begin
        checks++;
        if (bus_frame.partition != PID_P2_BASE + 8'(int'(bus_frame.tag.iteration) % N_PRR)) begin
          failures++;
          $display("FAIL frame iteration %0d went to partition %0d",
                   bus_frame.tag.iteration, bus_frame.partition);
        end
        if (bus_frame.partition == PID_P2_BASE) c_prr0++; else c_prr1++;
        if (bus_frame.tag.iteration != 0) c_next++;
        if (int'(bus_frame.tag.iteration) > max_iter) max_iter = int'(bus_frame.tag.iteration);
        if (bus_frame.tag.iteration == 0 && bus_frame.arc == 4'd0) begin
          c_newtag++;
          checks++;
          if (have_act && bus_frame.tag.activation != last_act + 8'd1) begin
            failures++;
            $display("FAIL new tag activation %0d after %0d", bus_frame.tag.activation, last_act);
          end
          last_act = bus_frame.tag.activation;
          have_act = 1;
        end
      end
      if (bus_frame.partition == PID_P1 && bus_frame.arc == 4'd1) c_exit++;
    end
  end

  always @(posedge clk) host_res_ack <= rst_n ? (($urandom % 3) == 0) : 1'b1;

  task automatic run_one(int n);
    longint t0;
    int cyc;
    max_iter = -1;
    host_n     <= 16'(n);
    host_n_str <= 1'b1;
    @(posedge clk);
    while (host_n_ack) @(posedge clk);
    host_n_str <= 1'b0;
    t0 = longint'($time);
    // The next host input is refused while this one runs.
    host_n     <= 16'(n);
    host_n_str <= ($urandom % 2) == 0;
    @(posedge clk);
    while (!(host_res_str && !host_res_ack)) begin
      checks++;
      if (host_n_str && !host_n_ack) begin
        failures++;
        $display("FAIL second input accepted while busy");
      end
      @(posedge clk);
    end
    host_n_str <= 1'b0;
    cyc = int'(($time - t0) / 10);
    checks++;
    if (host_res !== fib(n)) begin
      failures++;
      $display("FAIL n=%0d result=%0d expected=%0d", n, host_res, fib(n));
    end
    if (n < 2) c_early++;
    checks++;
    if (max_iter != ((n < 2) ? -1 : n - 2)) begin
      failures++;
      $display("FAIL n=%0d largest iteration %0d", n, max_iter);
    end
    $display("n=%0d Fib=%0d cycles=%0d", n, host_res, cyc);
    @(posedge clk);
  endtask

  initial begin
    host_n = 0; host_n_str = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NSEQ; n++) run_one(n);
    for (int k = 0; k < NRND; k++) run_one($urandom % 31);
    while (ie_zi != NIE) @(posedge clk);
    checks += 4;
    if (fg_got != NFG) failures++;
    foreach (ie_seen[k]) if (!ie_seen[k]) failures++;
    if (c_ie_pos == 0) failures++;
    if (c_ie_neg == 0) failures++;
    $display("if/else evaluations=%0d (a+b: %0d, c-d: %0d) region0=%0d region1=%0d out-of-order=%0d waited=%0d",
             ie_zi, c_ie_pos, c_ie_neg, c_ie0, c_ie1, c_ie_ooo, c_ie_wait);
    $display("bus: contention=%0d destination-busy=%0d", c_contend, c_dest_busy);
    $display("mechanisms: early=%0d next=%0d exit=%0d newtag=%0d prr0=%0d prr1=%0d queued=%0d res_bp=%0d refused=%0d",
             c_early, c_next, c_exit, c_newtag, c_prr0, c_prr1, c_queued, c_res_bp, c_refused);
    checks += 15;
    if (c_ie_ooo == 0) failures++;
    if (c_contend == 0) failures++;
    if (c_dest_busy == 0) failures++;
    if (c_ie0 == 0) failures++;
    if (c_ie1 == 0) failures++;
    if (c_ie_wait == 0) failures++;
    if (c_early == 0) failures++;
    if (c_next == 0) failures++;
    if (c_exit == 0) failures++;
    if (c_newtag == 0) failures++;
    if (c_prr0 == 0) failures++;
    if (c_prr1 == 0) failures++;
    if (c_queued == 0) failures++;
    if (c_res_bp == 0) failures++;
    if (c_refused == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
