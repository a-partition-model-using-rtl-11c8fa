// tb_df_branch: self-checking test of the controlled branch.  Random control
// and data streams with random pauses; the two receivers are busy at random.
// Each data token must appear once, in order, on t when its control token was
// TRUE (non-zero) and on f when it was FALSE.
`timescale 1ns/1ps
module tb_df_branch;
  localparam int N = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] c, a, t, f;
  logic strc, ackc, stra, acka, strt, ackt, strf, ackf;
  logic        cv [N];
  logic [15:0] av [N], tv [N], fv [N];
  int nt = 0, nf = 0, ci, ai, ti, fi;

  df_branch #(.W(16)) dut (.clk, .rst_n, .c, .strc, .ackc, .a, .stra, .acka,
                           .t, .strt, .ackt, .f, .strf, .ackf);

  initial for (int k = 0; k < N; k++) begin
    cv[k] = 1'($urandom); av[k] = 16'($urandom);
    if (cv[k]) tv[nt++] = av[k]; else fv[nf++] = av[k];
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      strc <= 0; stra <= 0; ci <= 0; ai <= 0; ti <= 0; fi <= 0; ackt <= 1; ackf <= 1; c <= 0; a <= 0;
    end else begin
      if (strc && !ackc) begin strc <= 0; ci <= ci + 1; end
      else if (!strc && ci < N && ($urandom % 3) != 0) begin
        strc <= 1; c <= cv[ci] ? 16'(1 << ($urandom % 16)) : 16'd0;
      end
      if (stra && !acka) begin stra <= 0; ai <= ai + 1; end
      else if (!stra && ai < N && ($urandom % 3) != 0) begin stra <= 1; a <= av[ai]; end
      ackt <= ($urandom % 3) == 0;
      ackf <= ($urandom % 2) == 0;
      if (strt && !ackt) begin
        checks++;
        if (ti >= nt || t !== tv[ti]) begin failures++; $display("FAIL t %0d: %h", ti, t); end
        ti <= ti + 1;
      end
      if (strf && !ackf) begin
        checks++;
        if (fi >= nf || f !== fv[fi]) begin failures++; $display("FAIL f %0d: %h", fi, f); end
        fi <= fi + 1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ti == nt && fi == nf);
    repeat (10) @(posedge clk);
    checks += 2;
    if (strt || strf || ackc || acka) failures++;
    if (ti != nt || fi != nf) failures++;
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
