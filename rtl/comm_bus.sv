// comm_bus: bus access and control block with the schedule.  N_REQ output
// communicators (the I/O block, the static partition and the PRRs) share one
// data bus.  Each cycle the schedule looks at the requests and at the
// destination of each requester's frame, and grants the bus to one requester
// whose destination arc register is free (arc_free of the partition named in
// the frame's Partition field).  Requesters are served round robin, starting
// after the last one granted.  The granted frame is driven onto bus_frame in
// the same cycle; with no grant the bus carries IDLE_FRAME, whose
// Synchronous field is not SYNC_WORD.  One frame per cycle.
//
// From the document: a data bus shared by the PRRs and a control bus with a
// schedule that controls the access of PRRs to the data bus, steering frames
// by their Partition and Arc fields.  Design choices: round-robin order,
// single-cycle grant, and checking that the destination is free before
// granting, which keeps one item of data per arc.
module comm_bus
  import chipcflow_pkg::*;
#(
  parameter int N_REQ  = 4,
  parameter int N_PART = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N_REQ-1:0]             req,
  input  frame_t [N_REQ-1:0]           req_frame,
  output logic [N_REQ-1:0]             gnt,
  input  logic [N_PART-1:0][15:0]      arc_free,
  output frame_t                       bus_frame
);

  localparam int PW = (N_REQ > 1) ? $clog2(N_REQ) : 1;

  logic [N_REQ-1:0] elig;
  logic [PW-1:0]    last_q;
  logic [PW-1:0]    win;
  logic             any;

  always_comb begin
    for (int r = 0; r < N_REQ; r++) begin
      elig[r] = 1'b0;
      if (req[r] && (32'(req_frame[r].partition) < N_PART))
        elig[r] = arc_free[req_frame[r].partition[$clog2(N_PART > 1 ? N_PART : 2)-1:0]]
                          [req_frame[r].arc];
    end
  end

  // Round robin: first eligible requester after last_q.
  always_comb begin
    int idx;
    any = 1'b0;
    win = '0;
    for (int s = 1; s <= N_REQ; s++) begin
      idx = (32'(last_q) + s) % N_REQ;
      if (!any && elig[idx]) begin
        any = 1'b1;
        win = PW'(idx);
      end
    end
    gnt = '0;
    if (any) gnt[win] = 1'b1;
    bus_frame = any ? req_frame[win] : IDLE_FRAME;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) last_q <= PW'(N_REQ - 1);
    else if (any) last_q <= win;
  end

  one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  gnt_to_req: assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);

endmodule
