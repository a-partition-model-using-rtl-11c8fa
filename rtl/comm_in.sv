// comm_in: input communicator of a partition.  It watches the shared data
// bus and takes every frame whose Synchronous field holds SYNC_WORD and whose
// Partition field equals PID.  The frame's Arc field selects one of N_ARCS
// one-token registers; the low DATA_W bits of the frame's data field are
// stored there and offered to the partition as a token (str/ack handshake,
// ack=1: busy).  arc_free tells the bus scheduler which arc registers can
// take a frame; the scheduler only sends a frame to a free arc, so a frame
// is never refused.  cur_tag is the tag of the last frame taken: the tag of
// the activation the partition is running.  A frame on the bus in cycle t is
// offered to the partition in cycle t+1.
//
// From the document: the Synchronous field tells a partition that data is
// coming into it, and the Partition and Arc fields steer the frame.  Design
// choices: the SYNC_WORD value, one register per arc, the arc_free
// signalling and truncation of the 32-bit data field to 16 bits.
module comm_in
  import chipcflow_pkg::*;
#(
  parameter logic [7:0] PID    = PID_P1,
  parameter int         N_ARCS = 4
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  frame_t                         bus_frame,
  output logic [15:0]                    arc_free,
  output logic [N_ARCS-1:0][DATA_W-1:0]  tok,
  output logic [N_ARCS-1:0]              tok_str,
  input  logic [N_ARCS-1:0]              tok_ack,
  output tag_t                           cur_tag
);

  logic [N_ARCS-1:0][DATA_W-1:0] d_q;
  logic [N_ARCS-1:0]             full;
  tag_t                          tag_q;
  logic                          hit;

  assign hit     = (bus_frame.sync == SYNC_WORD) && (bus_frame.partition == PID)
                   && (32'(bus_frame.arc) < N_ARCS);
  assign tok     = d_q;
  assign tok_str = full;
  assign cur_tag = tag_q;

  always_comb begin
    arc_free = '0;
    for (int k = 0; k < N_ARCS; k++) arc_free[k] = !full[k];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full  <= '0;
      d_q   <= '0;
      tag_q <= '0;
    end else begin
      for (int k = 0; k < N_ARCS; k++) begin
        if (hit && (32'(bus_frame.arc) == k)) begin
          d_q[k]  <= bus_frame.data[DATA_W-1:0];
          full[k] <= 1'b1;
        end else if (full[k] && !tok_ack[k]) begin
          full[k] <= 1'b0;
        end
      end
      if (hit) tag_q <= bus_frame.tag;
    end
  end

  // The scheduler only delivers to a free arc register.
  no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    hit |-> !full[bus_frame.arc[$clog2(N_ARCS > 1 ? N_ARCS : 2)-1:0]]);

endmodule
