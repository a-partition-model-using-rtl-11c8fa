// io_block: input/output block between the host and the partitions.
//
// The host hands in n (str/ack handshake, ack=1: busy).  The block tags it
// {activation = request counter, iteration 0, nesting 0} and sends it as a
// frame to partition DEST_PID, arc 0.  Frames addressed to PID (arc 0) are
// results; they are handed to the host with their tag.  Only one computation
// is in the graph at a time: a new n is refused (host_n_ack = 1) from the
// moment one is accepted until its result has been taken by the host, since a
// static dataflow graph holds one item per arc and activations of different
// computations must not mix in a shared region.
//
// From the document: an input/output block that controls input and output of
// data of the FPGA on the shared data bus.  The tagging, the one-at-a-time
// rule and the numbering are this design's choices.
module io_block
  import chipcflow_pkg::*;
#(
  parameter logic [7:0] PID      = PID_IO,
  parameter logic [7:0] DEST_PID = PID_P1
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
  input  frame_t            bus_frame,
  output logic [15:0]       arc_free,
  output logic              req,
  output frame_t            frame,
  input  logic              gnt
);

  logic        busy;
  logic [7:0]  req_cnt;
  logic        out_ack;
  tagged_tok_t out_tok;
  logic        take, done;

  assign host_n_ack = busy || out_ack;
  assign take       = host_n_str && !host_n_ack;
  assign done       = host_res_str && !host_res_ack;

  always_comb begin
    out_tok.data           = host_n;
    out_tok.tag.activation = req_cnt;
    out_tok.tag.iteration  = '0;
    out_tok.tag.nesting    = '0;
  end

  comm_out #(.N_PORTS(1), .DEST_PID(DEST_PID), .DEST_ARC(4'd0)) u_out (
    .clk, .rst_n, .tok(out_tok), .tok_str(take), .tok_ack(out_ack),
    .req, .frame, .gnt);

  comm_in #(.PID(PID), .N_ARCS(1)) u_in (
    .clk, .rst_n, .bus_frame, .arc_free,
    .tok(host_res), .tok_str(host_res_str), .tok_ack(host_res_ack), .cur_tag(host_res_tag));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      req_cnt <= '0;
    end else begin
      if (take) begin
        busy    <= 1'b1;
        req_cnt <= req_cnt + 8'd1;
      end else if (done) begin
        busy <= 1'b0;
      end
    end
  end

endmodule
