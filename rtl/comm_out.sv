// comm_out: output communicator of a partition.  Each of its N_PORTS input
// ports takes tagged tokens (str/ack handshake, ack=1: busy) into a one-token
// register.  While any register is full it requests the bus (req) and shows
// the frame of the lowest-numbered full port: Synchronous = SYNC_WORD,
// Partition = DEST_PID of that port, the token's tag, Arc = DEST_ARC of that
// port and the token's data, zero-extended to 32 bits.  In a cycle where the
// scheduler answers with gnt, the frame is on the data bus and the port
// register is freed.  Frame in the cycle after the token is accepted, at the
// earliest.
//
// From the document: an output communicator connects the partition's outputs
// to the bus access block and requests the schedule to send data.  Design
// choices: fixed destinations per port (packed 8-bit PID and 4-bit arc
// fields per port), lowest-port-first order and zero extension.
module comm_out
  import chipcflow_pkg::*;
#(
  parameter int                       N_PORTS  = 4,
  parameter logic [N_PORTS*8-1:0]     DEST_PID = '0,
  parameter logic [N_PORTS*4-1:0]     DEST_ARC = '0
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  tagged_tok_t [N_PORTS-1:0]   tok,
  input  logic [N_PORTS-1:0]          tok_str,
  output logic [N_PORTS-1:0]          tok_ack,
  output logic                        req,
  output frame_t                      frame,
  input  logic                        gnt
);

  tagged_tok_t [N_PORTS-1:0] q;
  logic [N_PORTS-1:0]        full;
  logic [N_PORTS-1:0]        sent;

  assign tok_ack = full;
  assign req     = |full;

  always_comb begin
    frame = IDLE_FRAME;
    sent  = '0;
    for (int k = N_PORTS - 1; k >= 0; k--) begin
      if (full[k]) begin
        frame.sync      = SYNC_WORD;
        frame.partition = DEST_PID[k*8 +: 8];
        frame.tag       = q[k].tag;
        frame.arc       = DEST_ARC[k*4 +: 4];
        frame.data      = FRAME_DATA_W'(q[k].data);
        sent            = '0;
        sent[k]         = gnt;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full <= '0;
      q    <= '0;
    end else begin
      for (int k = 0; k < N_PORTS; k++) begin
        if (tok_str[k] && !full[k]) begin
          q[k]    <= tok[k];
          full[k] <= 1'b1;
        end else if (sent[k]) begin
          full[k] <= 1'b0;
        end
      end
    end
  end

  gnt_only_on_req: assert property (@(posedge clk) disable iff (!rst_n) gnt |-> req);

endmodule
