// tb_df_tag_op: self-checking test of the three tag operator modes.  The
// same token stream, each token with its own random current tag, is sent to a
// next-tag, a restore-tag and a keep instance; receivers are busy at random.
// next: iteration + 1 (mod 256); restore: iteration 0 and nesting - 1
// (stays 0 at 0); keep: unchanged.  The data must pass unchanged.
`timescale 1ns/1ps
module tb_df_tag_op;
  import chipcflow_pkg::*;
  localparam int N = 300;
  localparam tag_mode_e MODES [3] = '{TAG_NEXT, TAG_RESTORE, TAG_KEEP};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [15:0] dv [N];
  tag_t        tv [N];
  int done_cnt [3];

  initial for (int k = 0; k < N; k++) begin
    dv[k] = 16'($urandom);
    tv[k] = tag_t'($urandom);
    if (k % 10 == 0) tv[k].nesting = 0;
    if (k % 10 == 1) tv[k].iteration = 8'hFF;
  end

  function automatic tag_t model(tag_mode_e m, tag_t t);
    tag_t r = t;
    if (m == TAG_NEXT) r.iteration = t.iteration + 1;
    if (m == TAG_RESTORE) begin r.iteration = 0; r.nesting = (t.nesting == 0) ? 0 : t.nesting - 1; end
    return r;
  endfunction

  for (genvar g = 0; g < 3; g++) begin : g_m
    logic [15:0] a;
    logic stra, acka, strz, ackz;
    tag_t cur_tag;
    tagged_tok_t z;
    int ai, zi;
    df_tag_op #(.W(16), .MODE(MODES[g])) dut (.clk, .rst_n, .a, .stra, .acka, .cur_tag, .z, .strz, .ackz);
    always @(posedge clk) begin
      if (!rst_n) begin stra <= 0; ai <= 0; zi <= 0; a <= 0; cur_tag <= 0; ackz <= 1; end
      else begin
        if (stra && !acka) begin stra <= 0; ai <= ai + 1; cur_tag <= tag_t'($urandom); end
        else if (!stra && ai < N && ($urandom % 3) != 0) begin stra <= 1; a <= dv[ai]; cur_tag <= tv[ai]; end
        ackz <= ($urandom % 3) == 0;
        if (strz && !ackz) begin
          checks++;
          if (z.data !== dv[zi] || z.tag !== model(MODES[g], tv[zi])) begin
            failures++;
            $display("FAIL mode %0d token %0d: %h", g, zi, z);
          end
          zi <= zi + 1;
        end
      end
    end
    assign done_cnt[g] = zi;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_cnt[0] == N && done_cnt[1] == N && done_cnt[2] == N);
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
