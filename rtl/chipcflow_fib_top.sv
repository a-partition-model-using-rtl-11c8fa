// chipcflow_fib_top: the Fibonacci dataflow graph built with the partition
// model.  Partition p1 runs in the static region; partition p2 is placed in
// N_PRR reconfigurable regions that run its successive activations in turn
// (region k hands the next activation to region (k+1) mod N_PRR).  All
// traffic between the I/O block, p1 and the regions travels as 72-bit frames
// on one shared data bus, granted one frame per cycle by the scheduler.
//
// Host interface: host_n (str/ack, ack=1 busy) starts a computation;
// host_res returns Fib(n) with the tag of its result frame.  One computation
// is in flight at a time.  bus_frame shows the frame on the data bus.
//
// On the same bus runs the if/else example (z = x > 0 ? a + b : c - d):
// its static side (new-tag area, restore-tag) hands each group of operands
// to one of two regions holding an instance of the if/else partition,
// alternating between them, and returns z with its tag on ports ie_*.  The
// two examples run at the same time and compete for the bus.  Beside them,
// with ports fg_*, is the same Fibonacci graph wired directly without
// partitions, the reference the partitioned version is cut from; it shares
// only the clock and reset.
//
// Partition numbers, which are also the scheduler's requester numbers:
// 0 = I/O block, 1 = p1, 2 .. 1+N_PRR = p2 regions, 2+N_PRR = if/else static
// side, 3+N_PRR and 4+N_PRR = if/else regions.
//
// From the document: p1 in the static region, two activations of p2 in
// separate regions (N_PRR = 2), two instances of the if/else partition in
// separate regions, a shared data bus with a schedule and an I/O block.
// The regions stay configured with their partitions all the time: loading
// bitstreams is not modelled.  Sharing one bus between both examples is
// this design's choice.
module chipcflow_fib_top
  import chipcflow_pkg::*;
#(
  parameter int N_PRR = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] host_n,
  input  logic              host_n_str,
  output logic              host_n_ack,
  output logic [DATA_W-1:0] host_res,
  output tag_t              host_res_tag,
  output logic              host_res_str,
  input  logic              host_res_ack,
  output frame_t            bus_frame,
  // if/else example in two regions: ie_in = {d, c, b, a, x}, ie_in[0] = x
  input  logic [4:0][DATA_W-1:0] ie_in,
  input  logic              ie_in_str,
  output logic              ie_in_ack,
  output logic [DATA_W-1:0] ie_z,
  output tag_t              ie_z_tag,
  output logic              ie_z_str,
  input  logic              ie_z_ack,
  // unpartitioned Fibonacci graph
  input  logic [DATA_W-1:0] fg_n,
  input  logic              fg_n_str,
  output logic              fg_n_ack,
  output logic [DATA_W-1:0] fg_res,
  output logic              fg_res_str,
  input  logic              fg_res_ack
);

  localparam int N_NODE = 5 + N_PRR;
  // Partition numbers of the if/else example: its static side, then its two regions.
  localparam logic [7:0] PID_IE     = PID_P2_BASE + 8'(N_PRR);
  localparam logic [7:0] PID_IE_PRR = PID_IE + 8'd1;

  if (N_PRR < 2) begin : g_bad
    $error("chipcflow_fib_top needs N_PRR >= 2");
  end

  logic [N_NODE-1:0]        req, gnt;
  frame_t [N_NODE-1:0]      req_frame;
  logic [N_NODE-1:0][15:0]  arc_free;

  io_block #(.PID(PID_IO), .DEST_PID(PID_P1)) u_io (
    .clk, .rst_n,
    .host_n, .host_n_str, .host_n_ack,
    .host_res, .host_res_tag, .host_res_str, .host_res_ack,
    .bus_frame, .arc_free(arc_free[0]),
    .req(req[0]), .frame(req_frame[0]), .gnt(gnt[0]));

  p1_static #(.P2_PID(PID_P2_BASE)) u_p1 (
    .clk, .rst_n, .bus_frame, .arc_free(arc_free[1]),
    .req(req[1]), .frame(req_frame[1]), .gnt(gnt[1]));

  for (genvar k = 0; k < N_PRR; k++) begin : g_prr
    p2_prr #(
      .PID     (PID_P2_BASE + 8'(k)),
      .NEXT_PID(PID_P2_BASE + 8'((k + 1) % N_PRR))
    ) u_prr (
      .clk, .rst_n, .bus_frame, .arc_free(arc_free[2+k]),
      .req(req[2+k]), .frame(req_frame[2+k]), .gnt(gnt[2+k]));
  end

  comm_bus #(.N_REQ(N_NODE), .N_PART(N_NODE)) u_bus (
    .clk, .rst_n, .req, .req_frame, .gnt, .arc_free, .bus_frame);

  ifelse_static #(.PID(PID_IE), .PRR_PID(PID_IE_PRR)) u_ie (
    .clk, .rst_n,
    .grp(ie_in), .grp_str(ie_in_str), .grp_ack(ie_in_ack),
    .res(ie_z), .res_tag(ie_z_tag), .res_str(ie_z_str), .res_ack(ie_z_ack),
    .bus_frame, .arc_free(arc_free[2+N_PRR]),
    .req(req[2+N_PRR]), .frame(req_frame[2+N_PRR]), .gnt(gnt[2+N_PRR]));

  for (genvar k = 0; k < 2; k++) begin : g_ie_prr
    ifelse_prr #(.PID(PID_IE_PRR + 8'(k)), .RET_PID(PID_IE)) u_prr (
      .clk, .rst_n, .bus_frame, .arc_free(arc_free[3+N_PRR+k]),
      .req(req[3+N_PRR+k]), .frame(req_frame[3+N_PRR+k]), .gnt(gnt[3+N_PRR+k]));
  end

  fib_graph u_fib_graph (
    .clk, .rst_n, .n(fg_n), .n_str(fg_n_str), .n_ack(fg_n_ack),
    .res(fg_res), .res_str(fg_res_str), .res_ack(fg_res_ack));

endmodule
