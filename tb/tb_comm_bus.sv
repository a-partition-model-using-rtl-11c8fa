// tb_comm_bus: self-checking test of the bus scheduler with four requesters
// and four partitions.  Requests, frame destinations (including a partition
// number that does not exist) and the free-arc map are random each cycle.
// A reference model computes which requester should win (first eligible after
// the last winner, eligible = requesting and destination arc free) and the
// test compares grants and the bus frame with it every cycle.  It also counts
// cycles with several requests, and with a request held back because its
// destination arc was busy; both must occur.
`timescale 1ns/1ps
module tb_comm_bus;
  import chipcflow_pkg::*;
  localparam int NR = 4, NPART = 4, CYC = 5000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NR-1:0] req, gnt;
  frame_t [NR-1:0] req_frame;
  logic [NPART-1:0][15:0] arc_free;
  frame_t bus_frame;

  comm_bus #(.N_REQ(NR), .N_PART(NPART)) dut (.clk, .rst_n, .req, .req_frame, .gnt, .arc_free, .bus_frame);

  int last = NR - 1, contend = 0, blocked = 0, granted = 0;

  always @(negedge clk) begin
    req = 4'($urandom);
    for (int r = 0; r < NR; r++) begin
      req_frame[r] = frame_t'({$urandom, $urandom, $urandom});
      req_frame[r].sync = SYNC_WORD;
      req_frame[r].partition = (($urandom % 8) == 0) ? 8'd7 : 8'($urandom % NPART);
      req_frame[r].arc = 4'($urandom % 4);
    end
    for (int p = 0; p < NPART; p++) arc_free[p] = 16'($urandom);
  end

  always @(posedge clk) if (rst_n) begin
    logic [NR-1:0] el;
    int w;
    for (int r = 0; r < NR; r++)
      el[r] = req[r] && req_frame[r].partition < NPART &&
              arc_free[req_frame[r].partition][req_frame[r].arc];
    w = -1;
    for (int s = 1; s <= NR; s++) if (w < 0 && el[(last + s) % NR]) w = (last + s) % NR;
    checks++;
    if (w < 0) begin
      if (gnt != 0 || bus_frame.sync == SYNC_WORD) begin failures++; $display("FAIL idle expected"); end
    end else begin
      if (gnt != (1 << w) || bus_frame !== req_frame[w]) begin
        failures++; $display("FAIL winner %0d gnt %b", w, gnt);
      end
      last = w;
      granted++;
    end
    if ($countones(req) > 1) contend++;
    for (int r = 0; r < NR; r++) if (req[r] && !el[r]) blocked++;
  end

  initial begin
    req = 0; req_frame = '0; arc_free = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (CYC) @(posedge clk);
    checks += 3;
    if (contend == 0) failures++;
    if (blocked == 0) failures++;
    if (granted == 0) failures++;
    $display("contend=%0d blocked=%0d granted=%0d", contend, blocked, granted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (CYC + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
