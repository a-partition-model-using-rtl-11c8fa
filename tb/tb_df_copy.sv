// tb_df_copy: self-checking test of the copy operator with three outputs.
// A sender with random pauses delivers N tokens; each receiver is busy at
// random and independently.  Every output must see all N tokens, in order,
// unchanged, and the input must not be taken while an earlier copy waits.
`timescale 1ns/1ps
module tb_df_copy;
  localparam int N = 300, NO = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] a;
  logic stra, acka;
  logic [NO-1:0][15:0] z;
  logic [NO-1:0] strz, ackz;
  logic [15:0] av [N];
  int ai, zi [NO];

  df_copy #(.W(16), .N_OUT(NO)) dut (.clk, .rst_n, .a, .stra, .acka, .z, .strz, .ackz);

  initial for (int k = 0; k < N; k++) av[k] = 16'($urandom);

  always @(posedge clk) begin
    if (!rst_n) begin
      stra <= 0; ai <= 0; a <= 0; ackz <= '1;
      for (int o = 0; o < NO; o++) zi[o] <= 0;
    end else begin
      if (stra && !acka) begin stra <= 0; ai <= ai + 1; end
      else if (!stra && ai < N && ($urandom % 3) != 0) begin stra <= 1; a <= av[ai]; end
      for (int o = 0; o < NO; o++) begin
        ackz[o] <= ($urandom % (o + 2)) == 0;
        if (strz[o] && !ackz[o]) begin
          checks++;
          if (z[o] !== av[zi[o]]) begin
            failures++;
            $display("FAIL out %0d token %0d: %h expected %h", o, zi[o], z[o], av[zi[o]]);
          end
          zi[o] <= zi[o] + 1;
        end
      end
      // A copy may not run ahead of a receiver by more than one token.
      for (int o = 0; o < NO; o++) begin
        checks++;
        if (ai - zi[o] > 3) failures++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (zi[0] == N && zi[1] == N && zi[2] == N);
    repeat (10) @(posedge clk);
    checks++;
    if (strz != '0 || zi[0] != N) failures++;
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
