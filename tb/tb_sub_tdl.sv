// tb_sub_tdl: drives random tap vectors and checks that sub-TDL k, tap j is
// line tap 4*j + k, one clock later.
module tb_sub_tdl;
  timeunit 1ps; timeprecision 1fs;
  localparam int N = 50;
  logic clk = 0;
  logic [4*N-1:0] taps, prev;
  logic [N-1:0]   sub_q [4];
  int checks = 0, failures = 0;

  sub_tdl #(.N_CARRY4(N), .N_SUB(4)) dut (.clk, .taps, .sub_q);
  always #5000 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    taps = '0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      for (int w = 0; w < 4 * N; w += 32) taps[w +: 8] = 8'($urandom);
      for (int b = 0; b < 4 * N; b++) if ($urandom % 3 == 0) taps[b] = ~taps[b];
      prev = taps;
      @(posedge clk); #1;
      for (int k = 0; k < 4; k++)
        for (int j = 0; j < N; j++) begin
          checks++;
          if (sub_q[k][j] !== prev[4 * j + k]) begin
            failures++;
            if (failures < 10) $display("FAIL sub %0d tap %0d", k, j);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
